// nic_proc_if -- processor interface of the NIC: the fourteen interface
// registers and the execution of SEND and NEXT commands.
//
// The processor reaches the NIC with ordinary loads and stores in the NIC's
// 64 KiB window. One access reads or writes one interface register and may
// at the same time issue a SEND (with its type and mode) and a NEXT, all
// encoded in the low address bits (see nic_cmd_decode). Within one access
// the effects are ordered as the architecture's examples need them:
//   1. a load returns the register as it was before the access;
//   2. a store updates its register;
//   3. SEND queues a message built from the output registers including
//      that store, and from the current input registers (reply/forward);
//   4. NEXT replaces i0..i4 with the head of the input queue, or marks the
//      input registers empty when the queue is empty.
// So "load i1, SEND reply, NEXT" answers the current message and moves on,
// and "store o2, SEND reply, NEXT" sends the value just stored.
//
// Registers: o0..o4 (read/write), i0..i4 (read only), CONTROL (read/write:
// input threshold [4:0], output threshold [12:8], stall-on-full [16]),
// STATUS (read; writing 1 to bit 12 or 13 clears that exception flag),
// CODEBASE (read/write), MSGIP (read only, from nic_msgip). The two queue
// thresholds in CONTROL and the stall-or-exception choice for a SEND to a
// full output queue follow the architecture; the bit positions, the reset
// values (thresholds at the queue depth, exception mode) and the STATUS
// layout apart from the type at [11:8] are this design's own.
//
// SEND to a full output queue: with CONTROL[16] set the access is held
// (pb_ack low) until the queue has room; otherwise it is refused with no
// effect at all, answered with pb_fault, and STATUS[12] is set, which is an
// exceptional condition (MsgIP then points at handler 15 and irq is high
// until software clears the flag). A framing error at the input port sets
// STATUS[13] in the same way.
//
// Bus timing: a request (pb_req with a hit address) is accepted in the
// cycle pb_ack is high; the load data and pb_fault come in the next cycle
// with pb_rvalid. pb_ack is combinational from the request and queue state.
module nic_proc_if
  import nic_pkg::*;
#(
  parameter logic [15:0] BASE  = 16'hFFFE,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor (data-cache) bus
  input  logic             pb_req,
  input  logic             pb_we,
  input  logic [31:0]      pb_addr,
  input  word_t            pb_wdata,
  output logic             pb_ack,
  output word_t            pb_rdata,
  output logic             pb_rvalid,
  output logic             pb_fault,
  output logic             irq,
  // output message queue
  output logic             oq_push,
  output msg_t             oq_msg,
  input  logic             oq_full,
  input  logic [CNT_W-1:0] oq_count,
  // input message queue
  output logic             iq_pop,
  input  msg_t             iq_msg,
  input  logic             iq_empty,
  input  logic [CNT_W-1:0] iq_count,
  // input port framing error
  input  logic             in_err
);

  logic [NWORDS-1:0][WORD_W-1:0] oreg, ireg, o_eff;
  mtype_t   itype;
  logic     ivalid;
  word_t    control, codebase;
  logic     sovf, inerr;

  logic     hit;
  nic_cmd_t cmd;
  logic     is_send, stall, refuse, acc, ok;
  logic     iafull, oafull, exc;
  word_t    msgip, status, rd_val;
  msg_t     smsg;

  nic_cmd_decode #(.BASE(BASE)) u_dec (.addr(pb_addr), .hit(hit), .cmd(cmd));

  assign is_send = (cmd.mode != SEND_NONE);
  assign stall   = pb_req && hit && is_send && oq_full &&  control[CTL_STALL];
  assign refuse  = is_send && oq_full && !control[CTL_STALL];
  assign pb_ack  = pb_req && hit && !stall;
  assign acc     = pb_ack;
  assign ok      = acc && !refuse;   // the access takes effect

  // Output registers as seen by a SEND of the same access.
  always_comb begin
    o_eff = oreg;
    if (pb_we && cmd.regnum <= R_O4) o_eff[cmd.regnum] = pb_wdata;
  end

  nic_msg_compose u_compose (
    .mode(cmd.mode), .stype(cmd.stype), .o(o_eff), .i(ireg), .msg(smsg)
  );

  assign exc = sovf || inerr;
  assign irq = exc;

  nic_msgip u_msgip (
    .codebase(codebase), .valid(ivalid), .mtype(itype), .i1(ireg[1]),
    .exc(exc), .icount(iq_count), .ocount(oq_count),
    .ithr(control[CTL_ITHR_LSB +: CNT_W]), .othr(control[CTL_OTHR_LSB +: CNT_W]),
    .iafull(iafull), .oafull(oafull), .msgip(msgip)
  );

  always_comb begin
    status = '0;
    status[ST_VALID]            = ivalid;
    status[ST_IAFULL]           = iafull;
    status[ST_OAFULL]           = oafull;
    status[ST_EXC]              = exc;
    status[ST_TYPE +: TYPE_W]   = itype;
    status[ST_SOVF]             = sovf;
    status[ST_INERR]            = inerr;
    status[ST_ICNT +: CNT_W]    = iq_count;
    status[ST_OCNT +: CNT_W]    = oq_count;
  end

  always_comb begin
    case (cmd.regnum)
      R_O0, R_O1, R_O2, R_O3, R_O4: rd_val = oreg[cmd.regnum];
      R_I0, R_I1, R_I2, R_I3, R_I4: rd_val = ireg[cmd.regnum - R_I0];
      R_CONTROL:                    rd_val = control;
      R_STATUS:                     rd_val = status;
      R_CODEBASE:                   rd_val = codebase;
      R_MSGIP:                      rd_val = msgip;
      default:                      rd_val = '0;
    endcase
  end

  assign oq_push = ok && is_send;
  assign oq_msg  = smsg;
  assign iq_pop  = ok && cmd.next && !iq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oreg      <= '0;
      ireg      <= '0;
      itype     <= '0;
      ivalid    <= 1'b0;
      control   <= word_t'(DEPTH) | (word_t'(DEPTH) << CTL_OTHR_LSB);
      codebase  <= '0;
      sovf      <= 1'b0;
      inerr     <= 1'b0;
      pb_rdata  <= '0;
      pb_rvalid <= 1'b0;
      pb_fault  <= 1'b0;
    end else begin
      pb_rvalid <= acc;
      pb_fault  <= acc && refuse;
      if (acc) pb_rdata <= rd_val;
      if (in_err) inerr <= 1'b1;
      if (acc && refuse) sovf <= 1'b1;
      if (ok && pb_we) begin
        case (cmd.regnum)
          R_CONTROL:  control  <= pb_wdata;
          R_CODEBASE: codebase <= pb_wdata;
          R_STATUS: begin
            if (pb_wdata[ST_SOVF])  sovf  <= 1'b0;
            if (pb_wdata[ST_INERR] && !in_err) inerr <= 1'b0;
          end
          default: ;
        endcase
      end
      if (ok) oreg <= o_eff;
      if (ok && cmd.next) begin
        if (iq_empty) begin
          ivalid <= 1'b0;
        end else begin
          ivalid <= 1'b1;
          ireg   <= iq_msg.w;
          itype  <= iq_msg.mtype;
        end
      end
    end
  end

  // A refused SEND never reaches the queue; a stalled one is not acknowledged.
  assert property (@(posedge clk) disable iff (!rst_n) oq_push |-> !oq_full);
  assert property (@(posedge clk) disable iff (!rst_n) stall |-> !pb_ack);

endmodule
