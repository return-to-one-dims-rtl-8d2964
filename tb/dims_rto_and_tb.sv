// Self-checking testbench for dims_rto_and (return-to-one dual-rail AND).
//
// Two independent references are used: the rows of the gate's printed
// return-to-one truth table, held here as constants, and the single-rail
// result a & b re-encoded in the return-to-one code (logic 0 = t1 f0,
// logic 1 = t0 f1, spacer = t1 f1). Every operand pair is sent in all four
// combinations of arrival and release order, and the output is checked to
// stay at the spacer with one operand present, show the result with both,
// hold it with one operand released, and return to the spacer with none.
// The output is also watched continuously for the non-code word t0 f0.
module dims_rto_and_tb;
  import dr_rto_pkg::*;

  dr_t a, b, y;
  int  checks   = 0;
  int  failures = 0;

  // Printed truth-table rows, indexed by {A, B}: {y.t, y.f}.
  localparam logic [1:0] TABLE_ROW [4] = '{2'b10, 2'b10, 2'b10, 2'b01};

  dims_rto_and dut (.a(a), .b(b), .y(y));

  always @(y) begin
    if (y == DR_INVALID) begin
      failures++;
      $display("FAIL non-code word t0 f0 on the output at %0t", $time);
    end
  end

  task automatic expect_y(input dr_t exp, input string what);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b y=%b expected %b", what, a, b, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = DR_SPACER;
    b = DR_SPACER;
    expect_y(DR_SPACER, "spacer in, spacer out");
    for (int round = 0; round < 4; round++) begin
      for (int va = 0; va < 2; va++) begin
        for (int vb = 0; vb < 2; vb++) begin
          dr_t from_table, from_function;
          from_table    = dr_t'(TABLE_ROW[2 * va + vb]);
          from_function = dr_encode(1'(va) & 1'(vb));
          checks++;
          if (from_table !== from_function) begin
            failures++;
            $display("FAIL reference mismatch for a=%0d b=%0d", va, vb);
          end
          if (round[0]) a = dr_encode(1'(va)); else b = dr_encode(1'(vb));
          expect_y(DR_SPACER, "one operand present");
          a = dr_encode(1'(va));
          b = dr_encode(1'(vb));
          expect_y(from_table, "both operands present");
          if (round[1]) a = DR_SPACER; else b = DR_SPACER;
          expect_y(from_table, "one operand released");
          a = DR_SPACER;
          b = DR_SPACER;
          expect_y(DR_SPACER, "both released");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
