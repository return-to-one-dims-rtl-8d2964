// Self-checking testbench for dims_minterms (return-to-one levels).
//
// For every pair of operand values and every arrival order it checks that
// all four minterms stay high while only one operand carries data, that
// exactly the minterm named after the two values falls once both do, that
// it stays low while only one operand has returned to the spacer, and that
// all four are high again once both have.
module dims_minterms_tb;
  import dr_rto_pkg::*;

  dr_t  a, b;
  logic n11, n10, n01, n00;
  int   checks   = 0;
  int   failures = 0;

  dims_minterms dut (.a(a), .b(b), .n11(n11), .n10(n10), .n01(n01), .n00(n00));

  task automatic expect_n(input logic [3:0] exp, input string what);
    #1;
    checks++;
    if ({n11, n10, n01, n00} !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b n11..n00=%b expected %b", what, a, b,
               {n11, n10, n01, n00}, exp);
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
    expect_n(4'b1111, "spacer");
    for (int va = 0; va < 2; va++) begin
      for (int vb = 0; vb < 2; vb++) begin
        for (int order = 0; order < 4; order++) begin
          logic [3:0] active;
          // Position of the minterm {va,vb} in {n11,n10,n01,n00}, low-active.
          active = 4'b1111;
          active[{1'(va), 1'(vb)}] = 1'b0;
          if (order[0]) a = dr_encode(1'(va)); else b = dr_encode(1'(vb));
          expect_n(4'b1111, "one operand only, still spacer");
          a = dr_encode(1'(va));
          b = dr_encode(1'(vb));
          expect_n(active, "both operands");
          if (order[1]) a = DR_SPACER; else b = DR_SPACER;
          expect_n(active, "one operand released, minterm held");
          a = DR_SPACER;
          b = DR_SPACER;
          expect_n(4'b1111, "both released");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
