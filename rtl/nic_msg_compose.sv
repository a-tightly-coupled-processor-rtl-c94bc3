// nic_msg_compose -- SEND datapath: forms the outgoing message.
//
// By default the message is o0..o4 with the type given in the SEND command.
// In REPLY mode the address words m0,m1 come from the return address held
// in the input registers, i1 and i2; in FORWARD mode the data words m3,m4
// come from i3 and i4. This is the architecture's fast reply/forward
// mechanism; the FORWARD word choice follows its prose description (the
// command summary names m2,m3 <- i2,i3 instead). Purely combinational: the
// output-register values given here already include a store made by the
// same access, so "store to o2 and SEND" sends the new o2.
module nic_msg_compose
  import nic_pkg::*;
(
  input  send_mode_e                   mode,
  input  mtype_t                       stype,
  input  logic [NWORDS-1:0][WORD_W-1:0] o,    // output registers o0..o4
  input  logic [NWORDS-1:0][WORD_W-1:0] i,    // input registers i0..i4
  output msg_t                         msg
);

  always_comb begin
    msg.mtype = stype;
    msg.w     = o;
    case (mode)
      SEND_REPLY: begin
        msg.w[0] = i[1];
        msg.w[1] = i[2];
      end
      SEND_FORWARD: begin
        msg.w[3] = i[3];
        msg.w[4] = i[4];
      end
      default: ;
    endcase
  end

endmodule
