// nic_cmd_decode -- address decoder of the NIC's processor-bus side.
//
// The NIC sits on the processor's data-cache bus and claims every access
// whose upper 16 address bits equal its 64 KiB window (BASE). The low
// address bits of such an access are not an offset but a command:
//   a[5:2]   interface register read or written
//   a[10:6]  type of the message to send (the type field is 4 bits wide,
//            so a[9:6] is used and a[10] is ignored)
//   a[11]    NEXT: load the next input message into i0..i4
//   a[13:12] 00 none, 01 SEND, 10 SEND reply, 11 SEND forward
// The field positions follow the architecture's address-line table; the
// treatment of a[10] is this design's choice. Purely combinational.
module nic_cmd_decode
  import nic_pkg::*;
#(
  parameter logic [15:0] BASE = 16'hFFFE
) (
  input  logic [31:0] addr,
  output logic        hit,    // address falls in the NIC window
  output nic_cmd_t    cmd
);

  always_comb begin
    hit        = (addr[31:16] == BASE);
    cmd.regnum = reg_num_e'(addr[5:2]);
    cmd.stype  = addr[9:6];
    cmd.next   = addr[11];
    cmd.mode   = send_mode_e'(addr[13:12]);
  end

endmodule
