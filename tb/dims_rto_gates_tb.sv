// End-to-end testbench for dims_rto_gates under a 4-phase return-to-one
// handshake.
//
// A sender drives the two dual-rail operands and a receiver closes the loop
// with an acknowledge, as a 4-phase channel does:
//   1. ack low: the sender puts data on a and b, one after the other in a
//      random order and with a random gap, or both at once;
//   2. the receiver sees all three results complete (t != f on each), checks
//      them against a | b, a ^ b and a & b and raises ack;
//   3. the sender returns a and b to the spacer (all rails high), again in a
//      random order;
//   4. the receiver sees all three results back at the spacer and lowers ack.
// The handshake itself shows that the gates wait for both operands: if a
// result completed early the receiver would acknowledge before the second
// operand arrived, which the sender flags. The testbench counts how often
// each behaviour occurred (data wave, spacer wave, a result held at the spacer
// while only one operand had arrived, a result held at its data word while
// only one operand had left, each of the four operand pairs) and counts a
// failure for any that never occurred. It also watches every output for the
// non-code word t0 f0.
module dims_rto_gates_tb;
  import dr_rto_pkg::*;

  localparam int N_TRANSFERS = 400;

  dr_t  a, b, y_or, y_xor, y_and;
  logic ack;
  int   checks   = 0;
  int   failures = 0;

  // Operand values of the transfer in flight, for the receiver's check.
  logic cur_a, cur_b;

  // Behaviour counters.
  int n_data_waves   = 0;
  int n_spacer_waves = 0;
  int n_early_holds  = 0;
  int n_late_holds   = 0;
  int n_pair [4]     = '{0, 0, 0, 0};

  dims_rto_gates dut (
    .a    (a),
    .b    (b),
    .y_or (y_or),
    .y_xor(y_xor),
    .y_and(y_and)
  );

  // Completion detection of the receiver: every result a data word, or every
  // result back at the spacer.
  logic all_valid, all_spacer;
  assign all_valid  = dr_is_valid(y_or) && dr_is_valid(y_xor) && dr_is_valid(y_and);
  assign all_spacer = dr_is_spacer(y_or) && dr_is_spacer(y_xor) && dr_is_spacer(y_and);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: a=%b b=%b or=%b xor=%b and=%b", what, $time,
               a, b, y_or, y_xor, y_and);
    end
  endtask

  // Output code-word monitor.
  always @(y_or or y_xor or y_and) begin
    if (y_or == DR_INVALID || y_xor == DR_INVALID || y_and == DR_INVALID) begin
      failures++;
      $display("FAIL non-code word t0 f0 on an output at %0t", $time);
    end
  end

  // Receiver: completion detection and acknowledge.
  initial begin
    ack = 1'b0;
    forever begin
      wait (all_valid);
      #1;
      check(y_or  == dr_encode(cur_a | cur_b), "OR result");
      check(y_xor == dr_encode(cur_a ^ cur_b), "XOR result");
      check(y_and == dr_encode(cur_a & cur_b), "AND result");
      n_data_waves++;
      ack = 1'b1;
      wait (all_spacer);
      #1;
      n_spacer_waves++;
      ack = 1'b0;
    end
  end

  // Watchdog.
  initial begin
    #(N_TRANSFERS * 100 + 1000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sender.
  initial begin
    a = DR_SPACER;
    b = DR_SPACER;
    cur_a = 1'b0;
    cur_b = 1'b0;
    #5;
    check(all_spacer && !ack, "idle after start-up");
    for (int i = 0; i < N_TRANSFERS; i++) begin
      int order, gap;
      wait (ack == 1'b0);
      #1;
      cur_a = 1'($urandom_range(0, 1));
      cur_b = 1'($urandom_range(0, 1));
      n_pair[{cur_a, cur_b}]++;
      order = $urandom_range(0, 2);
      gap   = $urandom_range(1, 5);

      // Data phase.
      if (order == 0) a = dr_encode(cur_a);
      else if (order == 1) b = dr_encode(cur_b);
      if (order != 2) begin
        #(gap);
        check(all_spacer && !ack, "results wait for the second operand");
        n_early_holds++;
      end
      a = dr_encode(cur_a);
      b = dr_encode(cur_b);
      wait (ack == 1'b1);
      #1;

      // Return-to-spacer phase.
      order = $urandom_range(0, 2);
      gap   = $urandom_range(1, 5);
      if (order == 0) a = DR_SPACER;
      else if (order == 1) b = DR_SPACER;
      if (order != 2) begin
        #(gap);
        check(all_valid && ack, "results hold until both operands leave");
        n_late_holds++;
      end
      a = DR_SPACER;
      b = DR_SPACER;
    end
    wait (ack == 1'b0);
    #2;

    check(n_data_waves == N_TRANSFERS, "one data wave per transfer");
    check(n_spacer_waves == N_TRANSFERS, "one spacer wave per transfer");
    check(n_early_holds > 0, "early-operand hold exercised");
    check(n_late_holds > 0, "late-release hold exercised");
    for (int p = 0; p < 4; p++) check(n_pair[p] > 0, "operand pair exercised");
    $display("data waves %0d, spacer waves %0d, early holds %0d, late holds %0d",
             n_data_waves, n_spacer_waves, n_early_holds, n_late_holds);
    $display("operand pairs 00:%0d 01:%0d 10:%0d 11:%0d",
             n_pair[0], n_pair[1], n_pair[2], n_pair[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
