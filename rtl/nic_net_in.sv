// nic_net_in -- network input port: reassembles messages arriving on the
// network link and checks their framing.
//
// Flits arrive in the order the output port sends them: m0..m4, then the
// type flit marked "last". A message whose last flag comes early, or whose
// sixth flit is not marked last, is a framing error: the port drops the
// broken message, pulses err for one cycle (the interface records it as an
// exceptional condition, the architecture's "error in the message input
// port") and, after a missing last flag, discards flits up to and including
// the next last flag before it starts a new message. The link format and
// what counts as an error are this design's own; the architecture only
// names the input port and this kind of error.
//
// Interface: link_* is the incoming channel (valid/ready/last); a complete
// message is offered on msg/msg_valid until msg_ready (the input queue is
// not full). While a message waits, the link is held off unless it is
// taken in the same cycle, so a full input queue backs up into the network.
module nic_net_in
  import nic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // from the network
  input  word_t link_data,
  input  logic  link_valid,
  input  logic  link_last,
  output logic  link_ready,
  // to the input queue
  output msg_t  msg,
  output logic  msg_valid,
  input  logic  msg_ready,
  // framing error, one-cycle pulse
  output logic  err
);

  localparam int unsigned NFLITS = NWORDS + 1;

  logic [NWORDS-1:0][WORD_W-1:0] words;
  logic [2:0] idx;
  logic       resync;
  logic       fire;

  assign link_ready = !msg_valid || msg_ready;
  assign fire       = link_valid && link_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      words     <= '0;
      idx       <= '0;
      resync    <= 1'b0;
      msg       <= '0;
      msg_valid <= 1'b0;
      err       <= 1'b0;
    end else begin
      err <= 1'b0;
      if (msg_valid && msg_ready) msg_valid <= 1'b0;
      if (fire) begin
        if (resync) begin
          if (link_last) resync <= 1'b0;
        end else if (idx == 3'(NFLITS - 1)) begin
          idx <= '0;
          if (link_last) begin
            msg.w     <= words;
            msg.mtype <= link_data[TYPE_W-1:0];
            msg_valid <= 1'b1;
          end else begin
            err    <= 1'b1;
            resync <= 1'b1;
          end
        end else if (link_last) begin
          idx <= '0;
          err <= 1'b1;
        end else begin
          words[idx] <= link_data;
          idx        <= idx + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    msg_valid && !msg_ready |=> msg_valid && $stable(msg));

endmodule
