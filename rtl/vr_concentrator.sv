// vr_concentrator: b-to-N concentrator of one input port.
//
// A B x N crossbar. Crosspoint (i, j) is a flip-flop: it is set when the
// port's address decoder reads buffer i for output j in the connection
// phase (rd with rd_buf = i, rd_out = j) and cleared for all crosspoints by
// c_sig at the end of each transfer. Column j carries the serial bit of the
// buffer connected to it. The original crosspoint drives the column through
// a tristate buffer; here the columns are AND-OR gated, and the columns of
// the N concentrators are ORed in the cell fabric, which gives the same
// result because each output column is connected to at most one buffer of
// the whole switch. A buffer may drive several columns at once (multicast).
module vr_concentrator
  import vr_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned B  = 7,
  parameter int unsigned PW = clog2_min1(N),
  parameter int unsigned BW = clog2_min1(B)
) (
  input  logic          pclk,
  input  logic          reset,
  input  logic          c_sig,
  input  logic          rd,
  input  logic [BW-1:0] rd_buf,
  input  logic [PW-1:0] rd_out,
  input  logic [B-1:0]  buf_out,
  output logic [N-1:0]  col,
  output logic [B-1:0][N-1:0] xp
);

  always_ff @(posedge pclk) begin
    if (reset || c_sig) xp <= '0;
    else if (rd && 32'(rd_buf) < B && 32'(rd_out) < N)
      xp[rd_buf][rd_out] <= 1'b1;
  end

  always_comb begin
    col = '0;
    for (int unsigned i = 0; i < B; i++)
      col |= xp[i] & {N{buf_out[i]}};
  end

endmodule
