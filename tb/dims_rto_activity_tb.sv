// Switching-activity testbench for the RTO DIMS gates.
//
// Replays the four phases a gate goes through in a power characterisation:
// compute a data word, store it, compute the spacer, store the spacer. The
// phases run for every operand pair in every order of arrival and release, on
// all three gates at once through dims_rto_gates. It counts transitions on the
// twelve minterm C-element outputs and on the six output rails and checks the
// property DIMS relies on:
//   * a data wave switches exactly one minterm and one output rail per gate,
//     and both fall (RTO data is signalled by 0s);
//   * a spacer wave switches the same minterm and rail back up, once each;
//   * nothing switches while a data word or the spacer is stored;
//   * an operand that arrives or leaves alone switches nothing.
// Per-wave activity is the same for every operand pair, so the three gates do
// the same amount of switching whatever the data.
module dims_rto_activity_tb;
  import dr_rto_pkg::*;

  dr_t a, b, y_or, y_xor, y_and;
  int  checks   = 0;
  int  failures = 0;

  dims_rto_gates dut (.a(a), .b(b), .y_or(y_or), .y_xor(y_xor), .y_and(y_and));

  // Minterm nets of the three gates, low-active.
  logic [11:0] minterms;
  assign minterms = {dut.u_or.n11,  dut.u_or.n10,  dut.u_or.n01,  dut.u_or.n00,
                     dut.u_xor.n11, dut.u_xor.n10, dut.u_xor.n01, dut.u_xor.n00,
                     dut.u_and.n11, dut.u_and.n10, dut.u_and.n01, dut.u_and.n00};
  logic [5:0] rails;
  assign rails = {y_or, y_xor, y_and};

  int n_min_rise = 0, n_min_fall = 0, n_rail_rise = 0, n_rail_fall = 0;
  logic [11:0] minterms_q;
  logic [5:0]  rails_q;
  logic        armed = 1'b0;

  always @(minterms) begin
    if (armed) begin
      n_min_rise += $countones(minterms & ~minterms_q);
      n_min_fall += $countones(~minterms & minterms_q);
    end
    minterms_q = minterms;
  end

  always @(rails) begin
    if (armed) begin
      n_rail_rise += $countones(rails & ~rails_q);
      n_rail_fall += $countones(~rails & rails_q);
    end
    rails_q = rails;
  end

  task automatic clear_counts();
    n_min_rise  = 0;
    n_min_fall  = 0;
    n_rail_rise = 0;
    n_rail_fall = 0;
  endtask

  task automatic expect_counts(input int min_fall, input int min_rise,
                               input int rail_fall, input int rail_rise,
                               input string what);
    checks++;
    if (n_min_fall != min_fall || n_min_rise != min_rise ||
        n_rail_fall != rail_fall || n_rail_rise != rail_rise) begin
      failures++;
      $display("FAIL %s: minterms fell %0d rose %0d, rails fell %0d rose %0d",
               what, n_min_fall, n_min_rise, n_rail_fall, n_rail_rise);
    end
    clear_counts();
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
    #1;
    minterms_q = minterms;
    rails_q    = rails;
    armed      = 1'b1;
    checks++;
    if (minterms !== '1 || rails !== '1) begin
      failures++;
      $display("FAIL start-up: not at the spacer");
    end
    for (int va = 0; va < 2; va++) begin
      for (int vb = 0; vb < 2; vb++) begin
        for (int order = 0; order < 4; order++) begin
          clear_counts();
          // Compute data, first operand alone.
          if (order[0]) a = dr_encode(1'(va)); else b = dr_encode(1'(vb));
          #1 expect_counts(0, 0, 0, 0, "lone operand arrives");
          a = dr_encode(1'(va));
          b = dr_encode(1'(vb));
          #1 expect_counts(3, 0, 3, 0, "compute data");
          #10 expect_counts(0, 0, 0, 0, "store data");
          // Compute spacer, first operand alone.
          if (order[1]) a = DR_SPACER; else b = DR_SPACER;
          #1 expect_counts(0, 0, 0, 0, "lone operand leaves");
          a = DR_SPACER;
          b = DR_SPACER;
          #1 expect_counts(0, 3, 0, 3, "compute spacer");
          #10 expect_counts(0, 0, 0, 0, "store spacer");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
