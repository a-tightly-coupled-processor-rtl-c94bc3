// nic_net_out -- network output port: serialises queued messages onto the
// network link.
//
// The link to the router is word-wide with a valid/ready handshake and a
// "last" flag. A message leaves as six flits: m0 first, so the router sees
// the routing address (m0[31:24]) at once, then m1..m4, then a flit holding
// the type in its low four bits, marked last. The architecture only names
// the network output block; the link format, the flit order and the
// handshake are this design's own (the router chip it was built for is
// not described).
//
// Interface: q_* pulls messages from the output queue (q_pop when a message
// is taken); link_* is the outgoing channel. A flit is transferred in every
// cycle with link_valid && link_ready, and the next queued message is taken
// in the same cycle as the last flit of the current one, so a busy link
// carries one message every six cycles.
module nic_net_out
  import nic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // from the output queue
  input  msg_t  q_msg,
  input  logic  q_empty,
  output logic  q_pop,
  // to the network
  output word_t link_data,
  output logic  link_valid,
  output logic  link_last,
  input  logic  link_ready
);

  localparam int unsigned NFLITS = NWORDS + 1;

  msg_t       cur;
  logic       busy;
  logic [2:0] idx;
  logic       fire, done;

  assign fire  = link_valid && link_ready;
  assign done  = fire && link_last;
  assign q_pop = !q_empty && (!busy || done);

  always_comb begin
    link_valid = busy;
    link_last  = (idx == 3'(NFLITS - 1));
    link_data  = link_last ? word_t'(cur.mtype) : cur.w[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      cur  <= '0;
    end else if (q_pop) begin
      busy <= 1'b1;
      idx  <= '0;
      cur  <= q_msg;
    end else if (done) begin
      busy <= 1'b0;
      idx  <= '0;
    end else if (fire) begin
      idx  <= idx + 1'b1;
    end
  end

  // Valid/ready rule: an offered flit stays until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_ready |=> link_valid && $stable(link_data) && $stable(link_last));

endmodule
