// vr_input_scheduler: idle-buffer bookkeeping of one input port.
//
// One idle address register (IAR) per shift register buffer holds 1 while
// the buffer is empty. A priority generator picks the lowest-numbered IAR
// holding 1 and an encoder turns it into the address placed on the write bus,
// so an arriving cell is always written into an empty buffer. After reset all
// IARs hold 1.
//   * valid_cell with cell_addr: the cell written into that buffer was valid,
//     its IAR is cleared (the figure's mux selected by "hclk AND valid_cell").
//     A cell that never gets valid_cell leaves its IAR at 1, which drops it.
//   * free_valid with free_addr: the buffer's copy counter reached zero and
//     its address came back on the CNT bus; its IAR is set again.
// Both updates take effect at the next pclk edge; idle_addr/idle_valid are
// combinational from the IARs. If both name the same buffer in one cycle the
// free wins (cannot happen in the switch: frees come in the connection
// phase, valid_cell in the queue-update phase).
module vr_input_scheduler
  import vr_pkg::*;
#(
  parameter int unsigned B  = 7,
  parameter int unsigned BW = clog2_min1(B)
) (
  input  logic          pclk,
  input  logic          reset,
  input  logic          free_valid,
  input  logic [BW-1:0] free_addr,
  input  logic          valid_cell,
  input  logic [BW-1:0] cell_addr,
  output logic          idle_valid,
  output logic [BW-1:0] idle_addr,
  output logic [B-1:0]  iar
);

  always_ff @(posedge pclk) begin
    if (reset) iar <= '1;
    else begin
      for (int unsigned i = 0; i < B; i++) begin
        if (free_valid && free_addr == BW'(i))      iar[i] <= 1'b1;
        else if (valid_cell && cell_addr == BW'(i)) iar[i] <= 1'b0;
      end
    end
  end

  // Priority generator and encoder: lowest index first.
  always_comb begin
    idle_valid = 1'b0;
    idle_addr  = '0;
    for (int i = B - 1; i >= 0; i--) begin
      if (iar[i]) begin
        idle_valid = 1'b1;
        idle_addr  = BW'(i);
      end
    end
  end

endmodule
