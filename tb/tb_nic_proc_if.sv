// tb_nic_proc_if -- self-checking test of the NIC processor interface.
//
// The two message queues are modelled in the testbench, so the test sees
// exactly what the interface pushes and pops. Directed sequences cover:
// reset state; CONTROL/CODEBASE read-back; composing and sending from
// o0..o4; NEXT loading i0..i4 and STATUS; the combined access "load i1,
// SEND reply 7, NEXT" and "store o2, SEND reply, NEXT"; FORWARD; MsgIP for
// typed, type-0, empty and threshold cases; a SEND to a full output queue
// refused in exception mode (fault, no side effects, STATUS flag, irq,
// handler 15, clear by write) and held in stall mode until the queue
// drains; and an input-port error. Expected values are built here from the
// register and address layout.
module tb_nic_proc_if;
  import nic_pkg::*;

  localparam logic [15:0] BASE  = 16'hFFFE;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pb_req, pb_we, pb_ack, pb_rvalid, pb_fault, irq;
  logic [31:0] pb_addr;
  word_t pb_wdata, pb_rdata;
  logic oq_push, oq_full, iq_pop, iq_empty, in_err;
  msg_t oq_msg, iq_msg;
  logic [CNT_W-1:0] oq_count, iq_count;
  int checks = 0, failures = 0;
  msg_t oq[$], iq[$];
  int   stall_cycles;

  always #5 clk = ~clk;

  nic_proc_if #(.BASE(BASE), .DEPTH(DEPTH)) dut (.*);

  // Queue models.
  always @(posedge clk) if (rst_n) begin
    if (oq_push) oq.push_back(oq_msg);
    if (iq_pop)  void'(iq.pop_front());
  end
  always @(negedge clk) begin
    #1;
    oq_full  = (oq.size() >= DEPTH);
    oq_count = CNT_W'(oq.size());
    iq_empty = (iq.size() == 0);
    iq_count = CNT_W'(iq.size());
    iq_msg   = iq_empty ? '0 : iq[0];
  end

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

  // One bus access; returns load data and fault, counts cycles without ack.
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
    check(pb_rvalid, "response one cycle after ack");
    rd = pb_rdata; fault = pb_fault;
  endtask

  task automatic rd_reg(input int r, output word_t v);
    bit f;
    access(1'b0, adr(r), '0, v, f);
  endtask

  task automatic wr_reg(input int r, input word_t v);
    word_t d; bit f;
    access(1'b1, adr(r), v, d, f);
  endtask

  function automatic msg_t rand_msg(input int t);
    msg_t m;
    m.mtype = mtype_t'(t);
    for (int k = 0; k < NWORDS; k++) m.w[k] = $urandom;
    return m;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t v, o[NWORDS], cb;
    bit f;
    msg_t m1, m2, m3;
    pb_req = 0; pb_we = 0; pb_addr = '0; pb_wdata = '0; in_err = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // reset state
    rd_reg(R_STATUS, v);
    check(v[ST_VALID] == 0 && v[ST_EXC] == 0 && !irq, "reset status");
    rd_reg(R_MSGIP, v);
    check(v == 32'h0000_0E00, "reset MsgIP = no-message handler");
    rd_reg(R_CONTROL, v);
    check(v == (DEPTH | (DEPTH << 8)), "reset CONTROL thresholds at depth");

    // CODEBASE and a request outside the window
    cb = 32'h1234_C000;
    wr_reg(R_CODEBASE, cb | 32'h3FFF);
    rd_reg(R_CODEBASE, v);
    check(v == (cb | 32'h3FFF), "CODEBASE read back");
    @(negedge clk);
    pb_req = 1; pb_we = 1; pb_addr = adr(R_CODEBASE) ^ 32'h1111_0000; pb_wdata = 0;
    @(posedge clk);
    check(!pb_ack, "no ack outside window");
    @(negedge clk);
    pb_req = 0;

    // compose in o0..o4 and SEND type 5; the store to o4 is in the same access
    for (int k = 0; k < NWORDS; k++) o[k] = $urandom;
    for (int k = 0; k < NWORDS - 1; k++) wr_reg(k, o[k]);
    access(1'b1, adr(R_O4, 5, 0, 1), o[4], v, f);
    check(!f && oq.size() == 1, "SEND queued one message");
    if (oq.size() == 1) begin
      check(oq[0].mtype == 5, "SEND type");
      for (int k = 0; k < NWORDS; k++) check(oq[0].w[k] == o[k], "SEND words incl. same-access store");
    end
    for (int k = 0; k < NWORDS; k++) begin
      rd_reg(k, v);
      check(v == o[k], "o register read back");
    end
    oq.delete();

    // NEXT loads the input registers
    m1 = rand_msg(12); m2 = rand_msg(0); m3 = rand_msg(3);
    iq.push_back(m1); iq.push_back(m2); iq.push_back(m3);
    @(negedge clk);
    access(1'b0, adr(R_STATUS, 0, 1), '0, v, f);
    check(v[ST_VALID] == 0, "status read before NEXT takes effect");
    rd_reg(R_STATUS, v);
    check(v[ST_VALID] && v[ST_TYPE +: 4] == 12 && v[ST_ICNT +: CNT_W] == 2, "status after NEXT");
    for (int k = 0; k < NWORDS; k++) begin
      rd_reg(R_I0 + k, v);
      check(v == m1.w[k], "input register contents");
    end
    rd_reg(R_MSGIP, v);
    check(v == (cb | (12 << 8)), $sformatf("MsgIP for type 12: %h", v));

    // load i1 + SEND reply 7 + NEXT (the address-line example)
    access(1'b0, adr(R_I1, 7, 1, 2), '0, v, f);
    check(v == m1.w[1], "load returns i1 of the current message");
    check(oq.size() == 1, "reply queued");
    if (oq.size() == 1)
      check(oq[0].mtype == 7 && oq[0].w[0] == m1.w[1] && oq[0].w[1] == m1.w[2] &&
            oq[0].w[2] == o[2] && oq[0].w[3] == o[3] && oq[0].w[4] == o[4], "reply words");
    oq.delete();
    rd_reg(R_MSGIP, v);
    check(v == m2.w[1], "MsgIP = m1 for a type-0 message");

    // store o2 + SEND reply 0 + NEXT: the message carries the new o2
    access(1'b1, adr(R_O2, 0, 1, 2), 32'hCAFE_0002, v, f);
    if (oq.size() == 1)
      check(oq[0].w[0] == m2.w[1] && oq[0].w[1] == m2.w[2] && oq[0].w[2] == 32'hCAFE_0002, "store+reply words");
    else check(0, "store+reply queued");
    oq.delete();

    // FORWARD from message m3
    access(1'b0, adr(R_I0, 9, 0, 3), '0, v, f);
    if (oq.size() == 1)
      check(oq[0].mtype == 9 && oq[0].w[0] == o[0] && oq[0].w[1] == o[1] && oq[0].w[2] == 32'hCAFE_0002 &&
            oq[0].w[3] == m3.w[3] && oq[0].w[4] == m3.w[4], "forward words");
    else check(0, "forward queued");
    oq.delete();

    // NEXT on an empty queue empties the input registers
    access(1'b0, adr(R_I0, 0, 1, 0), '0, v, f);
    rd_reg(R_STATUS, v);
    check(!v[ST_VALID], "VALID cleared by NEXT on empty queue");
    rd_reg(R_MSGIP, v);
    check(v == (cb | (14 << 8)), "MsgIP no-message handler");

    // thresholds: input above 1, output above 0
    wr_reg(R_CONTROL, 32'h0000_0001);
    iq.push_back(rand_msg(4)); iq.push_back(rand_msg(4)); iq.push_back(rand_msg(4));
    access(1'b0, adr(R_I0, 0, 1, 0), '0, v, f);
    rd_reg(R_MSGIP, v);
    check(v == (cb | (1 << 13) | (4 << 8)), "iafull set, type 4");
    access(1'b0, adr(R_I0, 0, 1, 1), '0, v, f);   // SEND + NEXT
    rd_reg(R_MSGIP, v);
    check(v == (cb | (1 << 12) | (4 << 8)), "oafull set, iafull clear");
    iq.delete(); oq.delete();
    wr_reg(R_CONTROL, DEPTH | (DEPTH << 8));   // exception mode

    // full output queue, exception mode
    for (int k = 0; k < DEPTH; k++) access(1'b1, adr(R_O0, 1, 0, 1), k, v, f);
    check(oq.size() == DEPTH, "output queue filled");
    iq.push_back(rand_msg(6));
    access(1'b1, adr(R_O0, 2, 1, 1), 32'hDEAD, v, f);
    check(f, "SEND to full queue faults");
    check(oq.size() == DEPTH && iq.size() == 1, "refused access has no queue effect");
    rd_reg(R_O0, v);
    check(v == DEPTH - 1, "refused access does not write its register");
    rd_reg(R_STATUS, v);
    check(v[ST_SOVF] && v[ST_EXC] && irq, "overflow flagged");
    rd_reg(R_MSGIP, v);
    check(v[11:8] == 15, "exception handler selected");
    wr_reg(R_STATUS, 32'(1) << ST_SOVF);
    rd_reg(R_STATUS, v);
    check(!v[ST_SOVF] && !irq, "overflow flag cleared");

    // stall mode: the access waits until the queue drains
    wr_reg(R_CONTROL, (32'(1) << CTL_STALL) | DEPTH | (DEPTH << 8));
    fork
      access(1'b1, adr(R_O1, 3, 0, 1), 32'hBEEF, v, f);
      begin
        repeat (7) @(posedge clk);
        @(negedge clk);
        void'(oq.pop_front());
      end
    join
    check(!f && stall_cycles >= 6, "SEND stalled until room");
    check(oq.size() == DEPTH && oq[DEPTH-1].mtype == 3 && oq[DEPTH-1].w[1] == 32'hBEEF, "stalled SEND completed");
    $display("stall cycles: %0d", stall_cycles);
    oq.delete(); iq.delete();

    // input-port error
    @(negedge clk);
    in_err = 1;
    @(negedge clk);
    in_err = 0;
    rd_reg(R_STATUS, v);
    check(v[ST_INERR] && irq, "input error flagged");
    wr_reg(R_STATUS, 32'(1) << ST_INERR);
    rd_reg(R_STATUS, v);
    check(!v[ST_INERR] && !irq, "input error cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
