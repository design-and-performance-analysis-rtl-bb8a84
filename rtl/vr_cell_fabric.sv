// vr_cell_fabric: switching fabric for real cell routing.
//
// An N-bit bus: line j joins column j of every input port's concentrator
// to output port j. No processing is done here, only the movement of bits,
// which is what lets an optical fabric replace it. Each concentrator column
// comes with a drive enable (its crosspoints on that column); line j takes
// the bit of the concentrator driving it. More than one driver on a line is
// a set-up error: collision[j] reports it and an assertion flags it. Pure
// combinational.
module vr_cell_fabric #(
  parameter int unsigned N = 4
) (
  input  logic                pclk,
  input  logic                reset,    // only disables the check below
  input  logic [N-1:0][N-1:0] col,      // [input port][output line]
  input  logic [N-1:0][N-1:0] drive,    // [input port][output line]
  output logic [N-1:0]        line,
  output logic [N-1:0]        collision
);

  logic [N-1:0] seen;

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      line[j]      = 1'b0;
      collision[j] = 1'b0;
      seen[j]      = 1'b0;
      for (int unsigned i = 0; i < N; i++) begin
        if (drive[i][j]) begin
          collision[j] = collision[j] | seen[j];
          seen[j]      = 1'b1;
          line[j]      = line[j] | col[i][j];
        end
      end
    end
  end

  assert property (@(posedge pclk) disable iff (reset) collision == '0);

endmodule
