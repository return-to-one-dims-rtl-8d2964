// Self-checking testbench for c_element.
//
// Part 1 walks every edge of the C-element state graph (states written as
// A B Q): from 000 one input rises and Q holds 0, the second rises and Q goes
// to 1; from 111 one input falls and Q holds 1, the second falls and Q goes
// to 0; an input that rises and falls again while the other stays put leaves
// Q unchanged. Part 2 applies 2000 random input pairs and compares with a
// reference that keeps its own copy of the state and updates it from the
// truth table rows (00 -> 0, 11 -> 1, 01/10 -> previous value).
module c_element_tb;

  logic a, b, q;
  int   checks   = 0;
  int   failures = 0;
  logic q_ref;

  c_element dut (.a(a), .b(b), .q(q));

  task automatic apply(input logic na, input logic nb, input logic exp, input string what);
    a = na;
    b = nb;
    #1;
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b q=%b expected %b", what, a, b, q, exp);
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
    // Known starting state 000.
    apply(0, 0, 0, "initial 000");
    // 000 -> 100 -> 110 (Q rises) -> 111.
    apply(1, 0, 0, "A rises first, hold 0");
    apply(1, 1, 1, "B joins, Q rises");
    // 111 -> 011 -> 001 (Q falls) -> 000.
    apply(0, 1, 1, "A falls first, hold 1");
    apply(0, 0, 0, "B joins, Q falls");
    // 000 -> 010 -> 110 -> 111.
    apply(0, 1, 0, "B rises first, hold 0");
    apply(1, 1, 1, "A joins, Q rises");
    // 111 -> 101 -> 001 -> 000.
    apply(1, 0, 1, "B falls first, hold 1");
    apply(0, 0, 0, "A joins, Q falls");
    // Withdrawn transitions: the state returns without Q moving.
    apply(1, 0, 0, "A up alone");
    apply(0, 0, 0, "A back down, Q stays 0");
    apply(1, 1, 1, "both up");
    apply(1, 0, 1, "B down alone");
    apply(1, 1, 1, "B back up, Q stays 1");
    apply(0, 1, 1, "A down alone");
    apply(1, 1, 1, "A back up, Q stays 1");

    // Random sequence against the truth table.
    q_ref = q;
    for (int i = 0; i < 2000; i++) begin
      logic na, nb;
      na = 1'($urandom_range(0, 1));
      nb = 1'($urandom_range(0, 1));
      unique case ({na, nb})
        2'b00:   q_ref = 1'b0;
        2'b11:   q_ref = 1'b1;
        default: q_ref = q_ref;
      endcase
      apply(na, nb, q_ref, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
