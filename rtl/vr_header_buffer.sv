// vr_header_buffer: captures the 40-bit cell header from the serial line.
//
// The line bit d_in is shifted in at every pclk edge while hclk is high and
// the header is not yet complete (k < HDR_BITS); the first bit received ends
// up as bit 39 (most significant bit of octet 1). At k = HDR_BITS (the RS
// strobe) shifting stops, so h_bus holds the whole header until the next
// slot starts; the next 40 bits then replace it completely. The RS input of
// the original block is the decode k == HDR_BITS here.
module vr_header_buffer
  import vr_pkg::*;
(
  input  logic                pclk,
  input  logic                reset,
  input  logic [KW-1:0]       k,
  input  logic                d_in,
  output logic [HDR_BITS-1:0] h_bus
);

  always_ff @(posedge pclk) begin
    if (reset)                        h_bus <= '0;
    else if (k < KW'(HDR_BITS))       h_bus <= {h_bus[HDR_BITS-2:0], d_in};
  end

endmodule
