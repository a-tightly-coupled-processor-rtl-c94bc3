// nic_msg_fifo -- message queue of the NIC (used as both the input and the
// output message queue).
//
// A synchronous first-in first-out buffer of whole messages (type + five
// words). The architecture asks for a queue between the network and the
// interface registers in each direction; the NIC holds 16 messages in each,
// which is the default DEPTH. The storage is a circular array with read and
// write pointers and an occupancy count; the count is reported to the
// STATUS register and compared with the user thresholds.
//
// Interface: push/in with full, pop/out with empty; out always shows the
// oldest message (first-word fall-through). A push is accepted only when
// the queue is not full, so "not full" is the producer's ready signal; a
// pop while empty is ignored. A push and a pop in the same cycle are both
// performed.
// Timing: a message pushed in cycle t is visible at out in cycle t+1.
module nic_msg_fifo
  import nic_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  msg_t          in,
  output logic          full,
  input  logic          pop,
  output msg_t          out,
  output logic          empty,
  output logic [CW-1:0] count
);

  msg_t          mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && !full;
  assign out     = mem[rptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= incr(wptr);
      if (do_pop)  rptr <= incr(rptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A full queue never grows, an empty one never shrinks.
  assert property (@(posedge clk) disable iff (!rst_n) full |=> count <= CW'(DEPTH));

endmodule
