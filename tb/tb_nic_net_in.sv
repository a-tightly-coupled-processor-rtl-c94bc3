// tb_nic_net_in -- self-checking test of the network input port.
//
// Sends a random mix of good messages (six flits, last on the sixth),
// short messages (last too early) and long ones (no last on the sixth flit,
// with extra flits up to a last) over the link, with random gaps, while the
// queue side accepts at random. Checks that exactly the good messages come
// out, in order and intact, that each bad one raises err once, and that
// link_ready drops while a finished message cannot be delivered.
module tb_nic_net_in;
  import nic_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  word_t link_data;
  logic  link_valid, link_last, link_ready;
  msg_t  msg;
  logic  msg_valid, msg_ready, err;
  int checks = 0, failures = 0;
  msg_t exp_q[$];
  int   nerr = 0, exp_err = 0, ngood = 0, nback = 0;

  always #5 clk = ~clk;

  nic_net_in dut (.*);

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

  task automatic send_flit(input word_t d, input logic last);
    while ($urandom % 4 == 0) begin
      link_valid = 1'b0;
      @(negedge clk);
    end
    link_valid = 1'b1;
    link_data  = d;
    link_last  = last;
    @(posedge clk);
    while (!link_ready) @(posedge clk);
    @(negedge clk);
    link_valid = 1'b0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (err) nerr++;
    if (msg_valid && !link_ready) nback++;
    check(link_ready == (!msg_valid || msg_ready), "ready rule");
    if (msg_valid && msg_ready) begin
      check(exp_q.size() > 0, "no unexpected message");
      if (exp_q.size() > 0) check(msg == exp_q.pop_front(), "message contents");
      ngood++;
    end
  end

  always @(negedge clk) msg_ready = ($urandom % 3 == 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nsent = 0;
    link_valid = 0; link_data = '0; link_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      msg_t m;
      int   kind;
      m    = rand_msg();
      kind = $urandom % 6;
      if (kind == 0) begin
        // short: last on flit 1..5
        int len;
        len = 1 + $urandom % 5;
        for (int f = 0; f < len; f++) send_flit(m.w[f], f == len - 1);
        exp_err++;
      end else if (kind == 1) begin
        // long: six flits without last, then 1..3 flits, the final one last
        int extra;
        extra = 1 + $urandom % 3;
        for (int f = 0; f < 6 + extra; f++) send_flit($urandom, f == 5 + extra);
        exp_err++;
      end else begin
        for (int f = 0; f < NWORDS; f++) send_flit(m.w[f], 1'b0);
        send_flit(word_t'(m.mtype), 1'b1);
        exp_q.push_back(m);
        nsent++;
      end
    end
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all good messages delivered");
    check(ngood == nsent, "good message count");
    check(nerr == exp_err, "one err per broken message");
    check(nback > 0, "backpressure seen");
    $display("good=%0d errors=%0d backpressure cycles=%0d", ngood, nerr, nback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
