// vr_payload_buffer: one bit-serial shift register buffer of an input port.
//
// Holds the 384-bit payload of one cell, with the copy counter (CNT) and
// the read flip-flop that sit beside it. Payload bits are shifted in while
// the buffer is selected for writing (wsel) and k is in the payload part of
// the slot (40 .. 423). While the read flip-flop is set, the same bit
// positions shift the payload out at dout, most significant (first
// received) bit first, and feed each bit back in, so a multicast cell can be
// read again in a later slot (ring shift register). If the buffer is read
// and written in the same slot (its last copy leaves while a new cell
// arrives) the new bits replace the old ones as they leave.
//   cnt_load/cnt_in : number of copies still to send (at valid_cell)
//   r               : read request from the address decoder in the
//                     connection phase; sets the read flip-flop and takes
//                     one from the counter
//   c_sig           : k = 424, clears the read flip-flop after a transfer
//   free            : combinational, high with the r that takes the counter
//                     to zero; the buffer's address then goes back to the
//                     input scheduler
module vr_payload_buffer
  import vr_pkg::*;
#(
  parameter int unsigned PAY_LEN = PAY_BITS,
  parameter int unsigned CW      = 3
) (
  input  logic          pclk,
  input  logic          reset,
  input  logic [KW-1:0] k,
  input  logic          d_in,
  input  logic          wsel,
  input  logic          cnt_load,
  input  logic [CW-1:0] cnt_in,
  input  logic          r,
  input  logic          c_sig,
  output logic          dout,
  output logic          reading,
  output logic [CW-1:0] count,
  output logic          free
);

  logic [PAY_LEN-1:0] sr;
  logic               pay_phase;

  always_comb begin
    pay_phase = (k >= KW'(HDR_BITS)) && (k < KW'(HDR_BITS + PAY_LEN));
    dout      = sr[PAY_LEN-1];
    free      = r && (count == CW'(1));
  end

  always_ff @(posedge pclk) begin
    if (reset) sr <= '0;
    else if (pay_phase && (wsel || reading))
      sr <= {sr[PAY_LEN-2:0], wsel ? d_in : sr[PAY_LEN-1]};
  end

  always_ff @(posedge pclk) begin
    if (reset) begin
      reading <= 1'b0;
      count   <= '0;
    end else begin
      if (c_sig)  reading <= 1'b0;
      else if (r) reading <= 1'b1;
      if (cnt_load)              count <= cnt_in;
      else if (r && count != '0) count <= count - 1'b1;
    end
  end

  // A read request must name a buffer that still holds copies.
  assert property (@(posedge pclk) disable iff (reset) r |-> count != '0);

endmodule
