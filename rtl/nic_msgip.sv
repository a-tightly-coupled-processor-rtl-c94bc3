// nic_msgip -- hardware message dispatch: computes the MsgIP register.
//
// Software dispatches an arrived message with a single jump to MsgIP.
// Case 1 (the usual one): MsgIP = {CodeBase[31:14], iafull, oafull,
// handler ID, 8'b0}, where the handler ID is 15 if an exceptional condition
// is pending, else 14 if the input registers hold no message, else the
// input message's type. iafull/oafull are set when the input/output queue
// holds more messages than its threshold, so every handler exists in four
// versions, one per combination. Case 2: a valid type-0 ("escape") message
// with no exception and neither queue over its threshold carries its
// handler address itself, in word m1, and MsgIP is that word.
// All of this follows the architecture. A type-14 or type-15 message lands
// on the no-message or exception handler slot; software should not send
// those types. Purely combinational, so MsgIP tracks the interface state in
// the same cycle.
module nic_msgip
  import nic_pkg::*;
(
  input  word_t            codebase,
  input  logic             valid,      // input registers hold a message
  input  mtype_t           mtype,      // type of that message
  input  word_t            i1,         // word m1 of that message
  input  logic             exc,        // an exceptional condition is pending
  input  logic [CNT_W-1:0] icount,     // input queue occupancy
  input  logic [CNT_W-1:0] ocount,     // output queue occupancy
  input  logic [CNT_W-1:0] ithr,       // input queue threshold
  input  logic [CNT_W-1:0] othr,       // output queue threshold
  output logic             iafull,
  output logic             oafull,
  output word_t            msgip
);

  mtype_t hid;

  always_comb begin
    iafull = icount > ithr;
    oafull = ocount > othr;
    if (exc)         hid = HID_EXC;
    else if (!valid) hid = HID_NOMSG;
    else             hid = mtype;
    if (!exc && valid && !iafull && !oafull && mtype == '0)
      msgip = i1;
    else
      msgip = {codebase[31:14], iafull, oafull, hid, 8'h00};
  end

endmodule
