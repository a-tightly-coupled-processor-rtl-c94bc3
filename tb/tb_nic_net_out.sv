// tb_nic_net_out -- self-checking test of the network output port.
//
// A testbench queue offers random messages; the link is drained with a
// random ready. Every flit is compared with the expected sequence m0..m4,
// type (last). A second phase keeps ready high and checks that a stream of
// messages leaves at one message per six cycles with no gaps.
module tb_nic_net_out;
  import nic_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  msg_t  q_msg;
  logic  q_empty, q_pop;
  word_t link_data;
  logic  link_valid, link_last, link_ready;
  int checks = 0, failures = 0;
  msg_t src[$], sent[$];
  int   flit = 0, nmsg = 0, stalls = 0;
  bit   ready_rand = 1'b1;

  always #5 clk = ~clk;

  nic_net_out dut (.*);

  // Present the head of the testbench queue shortly after each falling edge.
  always @(negedge clk) begin
    #1;
    q_empty = (src.size() == 0);
    q_msg   = q_empty ? '0 : src[0];
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic msg_t rand_msg();
    msg_t m;
    m.mtype = mtype_t'($urandom);
    for (int k = 0; k < NWORDS; k++) m.w[k] = $urandom;
    return m;
  endfunction

  // Queue side and link monitor.
  always @(posedge clk) if (rst_n) begin
    if (link_valid && !link_ready) stalls++;
    if (link_valid && link_ready) begin
      word_t exp;
      exp = (flit == NWORDS) ? word_t'(sent[0].mtype) : sent[0].w[flit];
      check(link_data == exp, "flit data");
      check(link_last == (flit == NWORDS), "last flag");
      if (flit == NWORDS) begin
        flit = 0;
        void'(sent.pop_front());
        nmsg++;
      end else flit++;
    end
    if (q_pop) begin
      check(!q_empty, "pop only when not empty");
      sent.push_back(src.pop_front());
    end
  end

  always @(negedge clk) link_ready = ready_rand ? ($urandom % 3 != 0) : 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if ($urandom % 4 == 0) src.push_back(rand_msg());
    end
    wait (src.size() == 0 && sent.size() == 0);
    check(nmsg > 20 && stalls > 0, "random phase transferred messages and saw backpressure");
    // throughput: 10 back-to-back messages, ready held high
    @(negedge clk);
    ready_rand = 1'b0;
    nmsg = 0;
    for (int n = 0; n < 10; n++) src.push_back(rand_msg());
    @(posedge clk);
    t0 = $time;
    wait (nmsg == 10);
    check(($time - t0) / 10 <= 6 * 10 + 2, "six cycles per message");
    $display("10 messages in %0d cycles", ($time - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
