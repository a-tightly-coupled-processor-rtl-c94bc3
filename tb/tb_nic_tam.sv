// tb_nic_tam -- the fine-grain message workload (Send, I-fetch, I-store,
// I-allocate, F-allocate, F-free) run through the NIC at its default sizes.
//
// One node talks to itself through a looped-back link. The testbench plays
// the processor and implements the message handlers in terms of NIC
// accesses, using the interface's features the way a compiler would:
//   Send        type 0: m0 frame, m1 handler address, data in m3,m4.
//               Dispatched directly through MsgIP = m1 (escape type).
//   I-fetch     type 2: m0 element address, m1,m2 reply frame/handler.
//               Full element: one SEND reply carrying the value in o3.
//               Empty element: the request is queued as a deferred reader.
//   I-store     type 3: m0 element address, m3 value. Stores the value
//               and sends it to every deferred reader with SEND forward
//               (m3 taken from i3), the reader's frame/handler in o0,o1.
//   I-allocate  type 4: m1,m2 reply frame/handler, m3 size; replies with
//               the new array's address in o3.
//   F-allocate  type 5: m1,m2 parent frame/handler, m3 child handler;
//               replies to the parent (o3 = child frame) and sends to the
//               child (m0 = child frame, m1 = child handler, m3 = parent).
//   F-free      type 6: m0 frame; no reply.
// The message layouts are this test's own. Checked: every continuation
// arrives exactly once with the right frame and data; dispatch always
// takes one NIC access (a load of MSGIP); an I-fetch of a full element is
// answered in two further accesses; each deferred reader costs two
// accesses in the I-store handler.
module tb_nic_tam;
  import nic_pkg::*;

  localparam logic [15:0] BASE = 16'hFFFE;
  localparam word_t       CB   = 32'h0002_0000;
  localparam int          NEL  = 4;    // array elements
  localparam int          NRD  = 3;    // deferred readers per element
  localparam int          NCONT = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pb_req, pb_we, pb_ack, pb_rvalid, pb_fault, irq;
  logic [31:0] pb_addr;
  word_t pb_wdata, pb_rdata;
  word_t tx_data, rx_data;
  logic  tx_valid, tx_last, tx_ready, rx_valid, rx_last, rx_ready;

  int checks = 0, failures = 0, n_access = 0;

  always #5 clk = ~clk;

  nic_top dut (.*);

  // looped-back network
  typedef struct packed { logic last; word_t data; } flit_t;
  flit_t net[$];
  bit    rx_taken = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) net.push_back('{tx_last, tx_data});
    if (rx_valid && rx_ready) begin
      void'(net.pop_front());
      rx_taken = 1'b1;
    end
  end
  always @(negedge clk) begin
    #1;
    tx_ready = ($urandom % 4 != 0);
    if (!rx_valid || rx_taken) begin
      rx_taken = 1'b0;
      rx_valid = net.size() > 0 && ($urandom % 4 != 0);
      rx_data  = rx_valid ? net[0].data : '0;
      rx_last  = rx_valid ? net[0].last : 1'b0;
    end
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

  task automatic access(input bit we, input logic [31:0] a, input word_t wd, output word_t rd);
    @(negedge clk);
    pb_req = 1'b1; pb_we = we; pb_addr = a; pb_wdata = wd;
    @(posedge clk);
    while (!pb_ack) @(posedge clk);
    @(negedge clk);
    pb_req = 1'b0;
    n_access++;
    rd = pb_rdata;
    check(!pb_fault, "access not refused");
  endtask

  task automatic wr(input int r, input word_t v, input int t = 0, input bit nx = 0, input int mode = 0);
    word_t d;
    access(1'b1, adr(r, t, nx, mode), v, d);
  endtask

  task automatic rd(input int r, output word_t v, input bit nx = 0);
    access(1'b0, adr(r, 0, nx, 0), '0, v);
  endtask

  // ---- software state of the node ----
  // continuations: handler address 0x5000_0001 | id << 4
  word_t cont_frame [NCONT];
  word_t cont_d3 [NCONT];
  bit    cont_chk3 [NCONT];
  int    cont_hits [NCONT];
  int    ncont = 0;
  word_t el_val [NEL];
  bit    el_full [NEL];
  word_t defer_frame [NEL][$];
  word_t defer_ip [NEL][$];
  word_t heap = 32'h0040_0000;
  int    n_free = 0;
  int    kinds [7];

  function automatic word_t new_cont(input word_t frame, input word_t d3, input bit chk3);
    cont_frame[ncont] = frame;
    cont_d3[ncont]    = d3;
    cont_chk3[ncont]  = chk3;
    cont_hits[ncont]  = 0;
    ncont++;
    return 32'h5000_0001 | ((ncont - 1) << 4);
  endfunction

  function automatic word_t el_addr(input int e); return 32'h0100_0000 | (e << 2); endfunction

  // compose and send; the last store carries the SEND
  task automatic send_msg(input int t, input word_t m0, m1, m2, m3);
    wr(R_O0, m0); wr(R_O1, m1); wr(R_O2, m2);
    wr(R_O3, m3, t, 0, 1);
  endtask

  // one dispatch and handler; returns 0 when there was no message
  task automatic serve(output bit got);
    word_t ip, a, v, f1, f2;
    int acc0, e, id;
    got = 1'b1;
    acc0 = n_access;
    rd(R_MSGIP, ip);
    check(n_access - acc0 == 1, "dispatch is one NIC access");
    if (ip[31:14] != CB[31:14] || ip[7:0] != 0) begin
      // continuation (a Send message) reached through MsgIP = m1
      id = int'((ip - 32'h5000_0001) >> 4);
      check(id >= 0 && id < ncont && ip == (32'h5000_0001 | (id << 4)), "continuation address");
      rd(R_I0, f1);
      rd(R_I3, v, 1'b1);
      if (id >= 0 && id < ncont) begin
        cont_hits[id]++;
        if (cont_frame[id] != 0) check(f1 == cont_frame[id], "continuation frame");
        if (cont_chk3[id]) check(v == cont_d3[id], "continuation data");
      end
      kinds[0]++;
      return;
    end
    check(!ip[13] && !ip[12], "thresholds at depth: never over");
    case (int'(ip[11:8]))
      14: begin rd(R_STATUS, v, 1'b1); got = 1'b0; end
      2: begin   // I-fetch
        kinds[2]++;
        rd(R_I0, a);
        e = int'((a - 32'h0100_0000) >> 2);
        if (el_full[e]) begin
          wr(R_O3, el_val[e], 0, 1, 2);              // SEND reply, NEXT
          check(n_access - acc0 == 3, "full I-fetch answered in two accesses");
        end else begin
          rd(R_I1, f1); rd(R_I2, f2, 1'b1);
          defer_frame[e].push_back(f1);
          defer_ip[e].push_back(f2);
        end
      end
      3: begin   // I-store: forward the value to each deferred reader
        int nr;
        kinds[3]++;
        rd(R_I0, a);
        rd(R_I3, v);
        e = int'((a - 32'h0100_0000) >> 2);
        el_val[e] = v; el_full[e] = 1'b1;
        nr = defer_frame[e].size();
        acc0 = n_access;
        while (defer_frame[e].size() > 0) begin
          wr(R_O0, defer_frame[e].pop_front());
          wr(R_O1, defer_ip[e].pop_front(), 0, 0, 3);   // SEND forward: m3 <- i3
        end
        check(n_access - acc0 == 2 * nr, "two accesses per deferred reader");
        rd(R_STATUS, v, 1'b1);
      end
      4: begin   // I-allocate
        kinds[4]++;
        rd(R_I3, v);
        a = heap; heap += v << 2;
        wr(R_O3, a, 0, 1, 2);
      end
      5: begin   // F-allocate: reply to the parent, start the child
        word_t child, cip, parent;
        kinds[5]++;
        rd(R_I3, cip);
        rd(R_I1, parent);
        child = heap; heap += 32'h100;
        wr(R_O3, child, 0, 0, 2);                   // reply to parent
        wr(R_O0, child); wr(R_O1, cip);
        wr(R_O3, parent, 0, 1, 1);                  // Send to child, NEXT
      end
      6: begin   // F-free
        kinds[6]++;
        n_free++;
        rd(R_I0, v, 1'b1);
      end
      default: check(0, $sformatf("unexpected handler %0d", ip[11:8]));
    endcase
  endtask

  task automatic drain();
    bit got;
    int quiet = 0;
    for (int it = 0; it < 2000 && quiet < 30; it++) begin
      serve(got);
      quiet = got ? 0 : quiet + 1;
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t c, v, fr[NRD];
    word_t vals[NEL];
    word_t child_cont [4];
    pb_req = 0; pb_we = 0; pb_addr = '0; pb_wdata = '0;
    rx_valid = 0; rx_data = '0; rx_last = 0; tx_ready = 1;
    for (int e = 0; e < NEL; e++) begin el_full[e] = 0; vals[e] = $urandom; end
    for (int k = 0; k < 7; k++) kinds[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wr(R_CODEBASE, CB);

    // I-fetch of empty elements: NRD deferred readers each
    for (int e = 0; e < NEL; e++)
      for (int r = 0; r < NRD; r++) begin
        word_t frame = 32'h0030_0000 | ((e * NRD + r) << 8);
        c = new_cont(frame, vals[e], 1'b1);
        send_msg(2, el_addr(e), frame, c, 0);
      end
    drain();
    // I-store: the value goes to every deferred reader
    for (int e = 0; e < NEL; e++) send_msg(3, el_addr(e), 0, 0, vals[e]);
    drain();
    // I-fetch of full elements: answered at once
    for (int e = 0; e < NEL; e++) begin
      c = new_cont(32'h0031_0000 | (e << 8), vals[e], 1'b1);
      send_msg(2, el_addr(e), 32'h0031_0000 | (e << 8), c, 0);
    end
    // Send messages with 0, 1 and 2 data words
    for (int k = 0; k < 3; k++) begin
      v = $urandom;
      c = new_cont(32'h0032_0000 | (k << 8), v, k > 0);
      send_msg(0, 32'h0032_0000 | (k << 8), c, 0, k > 0 ? v : 0);
    end
    // I-allocate and F-allocate (check reply arrives; address is not known in advance)
    for (int k = 0; k < 3; k++) begin
      c = new_cont(32'h0033_0000 | (k << 8), 0, 1'b0);
      send_msg(4, 32'h0000_0000, 32'h0033_0000 | (k << 8), c, 8 + k);
    end
    for (int k = 0; k < 2; k++) begin
      word_t pc, cc;
      pc = new_cont(32'h0034_0000 | (k << 8), 0, 1'b0);
      cc = new_cont(0, 32'h0034_0000 | (k << 8), 1'b1);   // child: frame not known in advance (0), data = parent
      send_msg(5, 32'h0000_0000, 32'h0034_0000 | (k << 8), pc, cc);
    end
    // F-free
    for (int k = 0; k < 2; k++) send_msg(6, 32'h0040_0000 + (k << 8), 0, 0, 0);
    drain();

    for (int i = 0; i < ncont; i++)
      check(cont_hits[i] == 1, $sformatf("continuation %0d reached once", i));
    check(n_free == 2, "frames freed");
    check(kinds[2] == NEL * NRD + NEL && kinds[3] == NEL && kinds[4] == 3 && kinds[5] == 2 && kinds[6] == 2,
          "every message type handled");
    check(net.size() == 0, "network drained");
    $display("handled: send=%0d ifetch=%0d istore=%0d ialloc=%0d falloc=%0d ffree=%0d, NIC accesses=%0d",
             kinds[0], kinds[2], kinds[3], kinds[4], kinds[5], kinds[6], n_access);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
