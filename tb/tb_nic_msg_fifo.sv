// tb_nic_msg_fifo -- self-checking test of the message queue.
//
// Drives random pushes and pops (including pushes into a full queue and
// pops from an empty one) against a reference queue kept in the testbench,
// and checks the head message, full, empty and count every cycle. Also
// checks that a pushed message is visible at the head one cycle later.
module tb_nic_msg_fifo;
  import nic_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  msg_t in, out;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  int nfull = 0, nempty = 0;
  msg_t model[$];
  bit p, q;
  int phase;

  always #5 clk = ~clk;

  nic_msg_fifo #(.DEPTH(DEPTH)) dut (.*);

  function automatic msg_t rand_msg();
    msg_t m;
    m.mtype = mtype_t'($urandom);
    for (int k = 0; k < NWORDS; k++) m.w[k] = $urandom;
    return m;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "reset state");
    // latency: a push is visible at the head next cycle
    in = rand_msg(); push = 1;
    @(negedge clk);
    push = 0;
    check(!empty && out == in && count == 1, "push visible after one cycle");
    model.push_back(in);
    for (int n = 0; n < 4000; n++) begin
      phase = (n / 500) % 4;
      // phases: fill-biased, drain-biased, balanced, balanced
      push = ($urandom % 100) < (phase == 0 ? 85 : phase == 1 ? 15 : 50);
      pop  = ($urandom % 100) < (phase == 0 ? 15 : phase == 1 ? 85 : 50);
      in   = rand_msg();
      if (full) nfull++;
      if (empty) nempty++;
      @(negedge clk);
      q = push && (model.size() < DEPTH);
      p = pop && model.size() > 0;
      if (p) void'(model.pop_front());
      if (q) model.push_back(in);
      check(count == CW'(model.size()), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(out == model[0], "head message");
    end
    check(nfull > 10 && nempty > 10, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
