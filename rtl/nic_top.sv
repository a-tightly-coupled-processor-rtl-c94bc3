// nic_top -- the Network Interface Chip (NIC): a message-passing interface
// that an off-the-shelf processor reaches through its data-cache bus.
//
// Structure (as in the architecture's block diagram): the processor
// interface with its fourteen interface registers (nic_proc_if), a message
// output queue feeding the network output port, and the network input port
// feeding a message input queue. Each queue holds 16 messages (DEPTH).
// SEND moves a message from the registers into the output queue, from
// where nic_net_out serialises it onto the outgoing link; nic_net_in
// reassembles arriving messages into the input queue, and NEXT moves the
// oldest one into the input registers. A full input queue holds off the
// incoming link, so congestion backs up into the network; a full output
// queue stalls or refuses a SEND, as CONTROL selects.
//
// Ports: the processor bus (pb_*, see nic_proc_if for timing), the
// exception/interrupt line irq, and one outgoing and one incoming network
// link (word-wide data, valid, ready, last; see nic_net_out/nic_net_in).
// BASE is the upper 16 address bits of the NIC's window; its default is
// this design's choice.
module nic_top
  import nic_pkg::*;
#(
  parameter logic [15:0] BASE  = 16'hFFFE,
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  // processor bus
  input  logic        pb_req,
  input  logic        pb_we,
  input  logic [31:0] pb_addr,
  input  word_t       pb_wdata,
  output logic        pb_ack,
  output word_t       pb_rdata,
  output logic        pb_rvalid,
  output logic        pb_fault,
  output logic        irq,
  // network, outgoing
  output word_t       tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready,
  // network, incoming
  input  word_t       rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  output logic        rx_ready
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  msg_t          oq_in, oq_out, iq_in, iq_out;
  logic          oq_push, oq_pop, oq_full, oq_empty;
  logic          iq_push, iq_pop, iq_full, iq_empty;
  logic [CW-1:0] oq_cnt, iq_cnt;
  logic          in_err;

  nic_proc_if #(.BASE(BASE), .DEPTH(DEPTH)) u_pif (
    .clk, .rst_n,
    .pb_req, .pb_we, .pb_addr, .pb_wdata,
    .pb_ack, .pb_rdata, .pb_rvalid, .pb_fault, .irq,
    .oq_push, .oq_msg(oq_in), .oq_full, .oq_count(CNT_W'(oq_cnt)),
    .iq_pop, .iq_msg(iq_out), .iq_empty, .iq_count(CNT_W'(iq_cnt)),
    .in_err
  );

  nic_msg_fifo #(.DEPTH(DEPTH)) u_oq (
    .clk, .rst_n,
    .push(oq_push), .in(oq_in), .full(oq_full),
    .pop(oq_pop), .out(oq_out), .empty(oq_empty), .count(oq_cnt)
  );

  nic_net_out u_nout (
    .clk, .rst_n,
    .q_msg(oq_out), .q_empty(oq_empty), .q_pop(oq_pop),
    .link_data(tx_data), .link_valid(tx_valid), .link_last(tx_last),
    .link_ready(tx_ready)
  );

  nic_net_in u_nin (
    .clk, .rst_n,
    .link_data(rx_data), .link_valid(rx_valid), .link_last(rx_last),
    .link_ready(rx_ready),
    .msg(iq_in), .msg_valid(iq_push), .msg_ready(!iq_full),
    .err(in_err)
  );

  nic_msg_fifo #(.DEPTH(DEPTH)) u_iq (
    .clk, .rst_n,
    .push(iq_push), .in(iq_in), .full(iq_full),
    .pop(iq_pop), .out(iq_out), .empty(iq_empty), .count(iq_cnt)
  );

endmodule
