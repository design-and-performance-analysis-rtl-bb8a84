// vr_slot_timer: cell-slot counter of the VR switch.
//
// The switch works with two clocks in the original description: pclk moves
// one bit, hclk marks cell slots. Here only pclk is a clock. This counter
// runs k = 0 .. SLOT_BITS-1 (512 pclk periods per slot, as for a 155.52 Mbit/s
// SONET STS-3c port) and derives hclk as a level that is high while the 424
// bits of a cell are transferred (k < CELL_BITS), low for the 88-bit gap.
// It also produces the strobes the input scheduler's counters provide:
//   rst   : k == 0, first bit of a slot
//   rs    : k == HDR_BITS (40), the whole header has been received
//   c_sig : k == CELL_BITS (424), hclk falls and connections are cleared
// All outputs are registered-state decodes; reset (synchronous, active high)
// restarts the slot at k = 0.
module vr_slot_timer
  import vr_pkg::*;
(
  input  logic          pclk,
  input  logic          reset,
  output logic [KW-1:0] k,
  output logic          hclk,
  output logic          rst,
  output logic          rs,
  output logic          c_sig
);

  always_ff @(posedge pclk) begin
    if (reset)                       k <= '0;
    else if (k == KW'(SLOT_BITS - 1)) k <= '0;
    else                             k <= k + 1'b1;
  end

  always_comb begin
    hclk  = (k < KW'(CELL_BITS));
    rst   = (k == '0);
    rs    = (k == KW'(K_RS));
    c_sig = (k == KW'(K_CSIG));
  end

endmodule
