// vr_output_buffer: sends one outgoing cell per slot on the output line.
//
// In the port's connection slot (load high, hclk low) it stores the full
// 40-bit header of the cell to be sent in the next slot: the 28-bit
// translated GFC/VPI/VCI from the output controller and the 12 kept bits
// (PT, CLP, HEC) from the header queue. With load high and valid low no
// cell is pending. In the next slot it sends, one bit per pclk, the header
// for k = 0..39 (most significant bit first) and then, for k = 40..423,
// the payload bit arriving on its cell-fabric line, so the cell leaves with
// no delay beyond the bit in flight. tx is combinational.
// tx_valid is high for the 424 bits of a cell; when it is low (no cell to
// send) the physical layer is to send an unassigned cell instead.
module vr_output_buffer
  import vr_pkg::*;
(
  input  logic                pclk,
  input  logic                reset,
  input  logic [KW-1:0]       k,
  input  logic                load,
  input  logic                valid,
  input  logic [HEAD28_W-1:0] new_head,
  input  logic [KEEP_W-1:0]   keep,
  input  logic                line,
  output logic                tx,
  output logic                tx_valid
);

  logic [HDR_BITS-1:0] hsr;
  logic                pending;

  always_ff @(posedge pclk) begin
    if (reset) begin
      hsr     <= '0;
      pending <= 1'b0;
    end else if (load) begin
      hsr     <= {new_head, keep};
      pending <= valid;
    end else if (k < KW'(HDR_BITS)) begin
      hsr     <= {hsr[HDR_BITS-2:0], 1'b0};
    end
  end

  always_comb begin
    tx_valid = pending && (k < KW'(CELL_BITS));
    if (!tx_valid)              tx = 1'b0;
    else if (k < KW'(HDR_BITS)) tx = hsr[HDR_BITS-1];
    else                        tx = line;
  end

endmodule
