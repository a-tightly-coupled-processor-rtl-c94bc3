// tb_nic_top -- end-to-end test of the NIC at its default sizes.
//
// The outgoing link is looped back to the incoming one through a
// testbench network that buffers flits, can hold off the NIC (tx_ready
// low), delivers with random gaps and can inject one malformed packet.
// The testbench plays the processor with bus accesses, written as the
// message handlers of a remote-read service:
//   - requests (type 12: m0 address, m1 reply frame, m2 reply handler
//     address) are composed in o0..o2 and sent, the last store carrying the
//     SEND;
//   - dispatch is one load of MSGIP;
//   - the type-12 handler loads i0, then stores the looked-up value to o2
//     with SEND reply type 0 and NEXT, so the reply goes to the requester's
//     frame and handler address taken straight from i1,i2;
//   - a reply (type 0) dispatches straight to its handler address through
//     MsgIP case 2, and its handler checks the value;
//   - type-5 messages are forwarded as type 6 with m3,m4 taken from i3,i4.
// The run also fills the output queue (refused SEND in exception mode,
// then a stalled SEND in stall mode), fills the input queue so that the
// link backs up, crosses both thresholds, and injects a framing error.
// Each of those mechanisms is counted and must occur. Every reply value,
// every forwarded word and the three NIC accesses per remote read are
// checked.
module tb_nic_top;
  import nic_pkg::*;

  localparam logic [15:0] BASE = 16'hFFFE;   // the NIC's default window
  localparam int unsigned QD   = 16;         // the NIC's default queue depth
  localparam int          NREQ = 40;
  localparam int          NFWD = 6;
  localparam word_t       CB   = 32'h0002_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pb_req, pb_we, pb_ack, pb_rvalid, pb_fault, irq;
  logic [31:0] pb_addr;
  word_t pb_wdata, pb_rdata;
  word_t tx_data, rx_data;
  logic  tx_valid, tx_last, tx_ready, rx_valid, rx_last, rx_ready;

  int checks = 0, failures = 0;
  int stall_cycles;

  // mechanism counters
  int n_send = 0, n_reply = 0, n_fwd = 0, n_next = 0, n_nomsg = 0, n_case2 = 0;
  int n_iafull = 0, n_oafull = 0, n_ovf = 0, n_inerr = 0, n_stall = 0;
  int n_rx_bp = 0, n_tx_bp = 0, n_irq = 0;

  always #5 clk = ~clk;

  nic_top dut (.*);

  // ---------------- loop-back network ----------------
  typedef struct packed { logic last; word_t data; } flit_t;
  flit_t net[$];
  bit    net_hold = 1'b0;
  bit    inject_err = 1'b0;
  bit    rx_hold = 1'b0;
  bit    rx_taken = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) net.push_back('{tx_last, tx_data});
    if (dbg && tx_valid && tx_ready) $display("%0t tx %h %b", $time, tx_data, tx_last);
    if (tx_valid && !tx_ready) n_tx_bp++;
    if (rx_valid && !rx_ready) n_rx_bp++;
    if (rx_valid && rx_ready) begin
      void'(net.pop_front());
      rx_taken = 1'b1;
      if (dbg) $display("%0t rx %h %b", $time, rx_data, rx_last);
    end
    if (irq) n_irq++;
  end

  always @(negedge clk) begin
    #1;
    tx_ready = !net_hold;
    if (inject_err && !rx_valid) begin
      // a two-flit packet with last on the second flit: a framing error
      net.push_front('{1'b1, 32'hBAD0_0002});
      net.push_front('{1'b0, 32'hBAD0_0001});
      inject_err = 1'b0;
    end
    if (!rx_valid || rx_taken) begin
      rx_taken = 1'b0;
      rx_valid = !rx_hold && net.size() > 0 && ($urandom % 5 != 0);
      rx_data  = rx_valid ? net[0].data : '0;
      rx_last  = rx_valid ? net[0].last : 1'b0;
    end
  end

  // ---------------- processor side ----------------
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] adr(input int r, input int t = 0, input bit nx = 0, input int mode = 0);
    return {BASE, 2'b00, 2'(mode), nx, 1'b0, 4'(t), 4'(r), 2'b00};
  endfunction

  int n_access = 0;
  bit dbg = 0;

  task automatic access(input bit we, input logic [31:0] a, input word_t wd,
                        output word_t rd, output bit fault);
    @(negedge clk);
    pb_req = 1'b1; pb_we = we; pb_addr = a; pb_wdata = wd;
    stall_cycles = 0;
    @(posedge clk);
    while (!pb_ack) begin
      stall_cycles++;
      @(posedge clk);
    end
    @(negedge clk);
    pb_req = 1'b0;
    n_access++;
    rd = pb_rdata; fault = pb_fault;
    if (a[13:12] == 2'b01 && !fault) n_send++;
    if (a[13:12] == 2'b10 && !fault) n_reply++;
    if (a[13:12] == 2'b11 && !fault) n_fwd++;
    if (a[11] && !fault) n_next++;
    if (stall_cycles > 0) n_stall++;
  endtask

  task automatic rd_reg(input int r, output word_t v);
    bit f;
    access(1'b0, adr(r), '0, v, f);
  endtask

  task automatic wr_reg(input int r, input word_t v);
    word_t d; bit f;
    access(1'b1, adr(r), v, d, f);
  endtask

  // remote-read bookkeeping
  word_t mem_val [NREQ];
  bit    replied [NREQ];
  bit    fwd_seen [NFWD];
  word_t fwd_w3 [NFWD], fwd_w4 [NFWD];

  function automatic word_t req_addr(input int k);  return 32'h0100_0000 | (k << 2); endfunction
  function automatic word_t req_frame(input int k); return 32'h0030_0000 | (k << 4); endfunction
  function automatic word_t req_ip(input int k);    return 32'h4000_0001 | (k << 4); endfunction

  task automatic send_request(input int k, output bit fault);
    word_t d;
    wr_reg(R_O0, req_addr(k));
    wr_reg(R_O1, req_frame(k));
    access(1'b1, adr(R_O2, 12, 0, 1), req_ip(k), d, fault);
  endtask

  task automatic send_fwd_source(input int k);
    word_t d; bit f;
    wr_reg(R_O3, fwd_w3[k]);
    access(1'b1, adr(R_O4, 5, 0, 1), fwd_w4[k], d, f);
  endtask

  task automatic check_reply(input word_t ip, input word_t frame, input word_t val);
    int k;
    k = int'((ip - 32'h4000_0001) >> 4);
    check(k >= 0 && k < NREQ && ip == req_ip(k), "reply handler address");
    if (k >= 0 && k < NREQ) begin
      check(!replied[k], "single reply per request");
      check(frame == req_frame(k), "reply frame");
      check(val == mem_val[k], "reply value");
      replied[k] = 1'b1;
    end
  endtask

  // One dispatch: returns 1 when there was no message.
  task automatic dispatch(output bit idle);
    word_t ip, v, w3, w4, fr;
    bit f;
    int acc0;
    idle = 1'b0;
    acc0 = n_access;
    rd_reg(R_MSGIP, ip);
    if (dbg) $display("%0t msgip=%h icnt=%0d", $time, ip, dut.iq_cnt);
    if (ip[31:14] == CB[31:14] && ip[7:0] == 8'h00) begin
      if (ip[13]) n_iafull++;
      if (ip[12]) n_oafull++;
      case (int'(ip[11:8]))
        15: begin
          rd_reg(R_STATUS, v);
          check(v[ST_EXC] && (v[ST_SOVF] || v[ST_INERR]), "exception handler sees a flag");
          if (v[ST_SOVF])  n_ovf++;
          if (v[ST_INERR]) n_inerr++;
          wr_reg(R_STATUS, v & ((32'(1) << ST_SOVF) | (32'(1) << ST_INERR)));
        end
        14: begin
          access(1'b0, adr(R_STATUS, 0, 1), '0, v, f);
          n_nomsg++;
          idle = 1'b1;
        end
        12: begin
          rd_reg(R_I0, v);
          if (dbg) $display("  i0=%h ocnt=%0d ivalid=%b", v, dut.oq_cnt, dut.u_pif.ivalid);
          access(1'b1, adr(R_O2, 0, 1, 2), mem_val[int'((v - 32'h0100_0000) >> 2)], v, f);
          check(!f, "reply accepted");
          check(n_access - acc0 == 3, "remote read handled in three NIC accesses");
        end
        0: begin   // a reply while a queue is over its threshold
          rd_reg(R_I1, v);
          rd_reg(R_I0, fr);
          access(1'b0, adr(R_I2, 0, 1), '0, w3, f);
          check_reply(v, fr, w3);
        end
        5: begin   // forward m3,m4 as type 6
          access(1'b0, adr(R_I0, 6, 1, 3), '0, v, f);
          check(!f, "forward accepted");
        end
        6: begin
          rd_reg(R_I3, w3);
          access(1'b0, adr(R_I4, 0, 1), '0, w4, f);
          begin
            bit found = 1'b0;
            for (int k = 0; k < NFWD; k++)
              if (!fwd_seen[k] && fwd_w3[k] == w3 && fwd_w4[k] == w4) begin
                fwd_seen[k] = 1'b1;
                found = 1'b1;
                break;
              end
            check(found, "forwarded words");
          end
        end
        default: check(0, $sformatf("unexpected handler %0d", ip[11:8]));
      endcase
    end else begin
      // MsgIP case 2: jump straight to the reply handler named in m1
      n_case2++;
      rd_reg(R_I0, fr);
      access(1'b0, adr(R_I2, 0, 1), '0, v, f);
      check_reply(ip, fr, v);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t v;
    bit f, idle;
    int quiet, k, t0;
    pb_req = 0; pb_we = 0; pb_addr = '0; pb_wdata = '0;
    rx_valid = 0; rx_data = '0; rx_last = 0; tx_ready = 1;
    for (int i = 0; i < NREQ; i++) begin
      mem_val[i] = $urandom;
      replied[i] = 1'b0;
    end
    for (int i = 0; i < NFWD; i++) begin
      fwd_w3[i] = $urandom; fwd_w4[i] = $urandom; fwd_seen[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    wr_reg(R_CODEBASE, CB);
    wr_reg(R_CONTROL, 32'(4) | (32'(4) << CTL_OTHR_LSB));   // thresholds 4/4, exception mode

    // A: network holds the NIC off; fill the output queue, then overflow it
    net_hold = 1'b1;
    for (k = 0; k <= QD; k++) begin
      send_request(k, f);
      check(!f, "request accepted");
    end
    rd_reg(R_STATUS, v);
    check(int'(v[ST_OCNT +: CNT_W]) == QD, $sformatf("output queue holds 16 messages: %h tx_ready=%b", v, tx_ready));
    send_request(QD + 1, f);
    check(f && irq, "SEND to full output queue raises an exception");
    dispatch(idle);                    // exception handler clears it

    // B: stall mode; the SEND waits until the network takes a message
    wr_reg(R_CONTROL, (32'(1) << CTL_STALL) | 32'(4) | (32'(4) << CTL_OTHR_LSB));
    rx_hold = 1'b1;                     // keep arrivals in the network for now
    fork
      send_request(QD + 1, f);
      begin
        repeat (30) @(posedge clk);
        net_hold = 1'b0;
      end
    join
    check(!f && stall_cycles >= 25, "SEND stalled until the output queue had room");
    wr_reg(R_CONTROL, 32'(4) | (32'(4) << CTL_OTHR_LSB));

    // C: let everything loop back while the processor is busy elsewhere;
    // the input queue fills and the link backs up; one corrupt packet
    // reaches the input port first.
    repeat (150) @(posedge clk);
    inject_err = 1'b1;
    rx_hold = 1'b0;
    repeat (400) @(posedge clk);
    rd_reg(R_STATUS, v);
    check(int'(v[ST_ICNT +: CNT_W]) == QD, "input queue filled to 16");

    // D: serve messages; interleave the remaining requests and forwards
    k = QD + 2;
    quiet = 0;
    for (int it = 0; it < 5000 && quiet < 40; it++) begin
      dispatch(idle);
      if (idle) quiet++; else quiet = 0;
      // once the backlog is served, thresholds at the queue depth: replies
      // then dispatch straight to their handler (MsgIP case 2)
      if (it == 40) wr_reg(R_CONTROL, QD | (QD << CTL_OTHR_LSB));
      if (k < NREQ && it % 3 == 0) begin
        send_request(k, f);
        check(!f, "request accepted");
        k++;
      end else if (k >= NREQ && k < NREQ + NFWD) begin
        send_fwd_source(k - NREQ);
        k++;
      end
      if (k < NREQ + NFWD) quiet = 0;
    end

    for (int i = 0; i < NREQ; i++) check(replied[i], $sformatf("request %0d answered", i));
    for (int i = 0; i < NFWD; i++) check(fwd_seen[i], $sformatf("forward %0d arrived", i));
    check(net.size() == 0, "network drained");

    $display("sends=%0d replies=%0d forwards=%0d nexts=%0d nomsg=%0d case2=%0d",
             n_send, n_reply, n_fwd, n_next, n_nomsg, n_case2);
    $display("iafull=%0d oafull=%0d overflow=%0d inerr=%0d stalls=%0d rx_bp=%0d tx_bp=%0d",
             n_iafull, n_oafull, n_ovf, n_inerr, n_stall, n_rx_bp, n_tx_bp);
    check(n_send > 0,   "plain SEND happened");
    check(n_reply > 0,  "SEND reply happened");
    check(n_fwd > 0,    "SEND forward happened");
    check(n_next > 0,   "NEXT happened");
    check(n_nomsg > 0,  "no-message handler reached");
    check(n_case2 > 0,  "MsgIP case 2 (type-0 escape) happened");
    check(n_iafull > 0, "input threshold crossed");
    check(n_oafull > 0, "output threshold crossed");
    check(n_ovf > 0,    "output overflow exception happened");
    check(n_inerr > 0,  "input port error happened");
    check(n_stall > 0,  "stall happened");
    check(n_rx_bp > 0,  "input backed up into the network");
    check(n_tx_bp > 0,  "network held off the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
