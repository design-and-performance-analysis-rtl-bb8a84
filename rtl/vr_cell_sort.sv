// vr_cell_sort: classifies an arriving cell from its first four header octets.
//
// Decision order, from the pre-assigned UNI header values and payload types:
//   unassigned : GFC, VPI and VCI all zero                 -> dropped
//   signalling : VPI = 0, VCI = 5                          -> CAC processor
//   VP OAM     : VCI = 3 (segment) or VCI = 4 (end to end) -> management
//   ILMI       : VPI = 0, VCI = 16                         -> management
//   VC OAM     : PT = 100 or 101 (and 11x, reserved/RM)    -> management
//   user       : everything else                           -> routed
// User and management cells need a route-table lookup (table_search); user
// cells also go to the usage parameter control (traffic_search). The GFC
// field and the 'a' (available) bits of the pre-assigned values are not
// compared; treating ILMI and PT 11x as management cells is this design's
// choice.
// Timing: the header is sampled at the pclk edge that ends slot bit
// K_RS (= 40, the RS strobe). cell_type, unassigned_cell and the two
// search strobes are then valid (the strobes for one pclk period) while
// k = K_LOOKUP, together with done.
// Only the VPI, VCI and the top PT bit decide the class; the GFC, CLP and
// the two lower PT bits are not looked at.
module vr_cell_sort
  import vr_pkg::*;
(
  input  logic                pclk,
  input  logic                reset,
  input  logic [KW-1:0]       k,
  input  logic [31:0]         h_bus,       // header octets 1..4
  output cell_type_e          cell_type,
  output logic                done,
  output logic                unassigned_cell,
  output logic                table_search,
  output logic                traffic_search
);

  logic [7:0]  vpi;
  logic [15:0] vci;
  logic [2:0]  pt;
  cell_type_e  kind;

  always_comb begin
    vpi = h_bus[27:20];
    vci = h_bus[19:4];
    pt  = h_bus[3:1];
    if (vpi == 8'd0 && vci == 16'd0)                 kind = CELL_UNASSIGNED;
    else if (vpi == 8'd0 && vci == 16'd5)            kind = CELL_SIGNALLING;
    else if (vci == 16'd3 || vci == 16'd4)           kind = CELL_OAM;
    else if (vpi == 8'd0 && vci == 16'd16)           kind = CELL_OAM;
    else if (pt[2])                                  kind = CELL_OAM;
    else                                             kind = CELL_USER;
  end

  always_ff @(posedge pclk) begin
    if (reset) begin
      cell_type       <= CELL_UNASSIGNED;
      done            <= 1'b0;
      unassigned_cell <= 1'b0;
      table_search    <= 1'b0;
      traffic_search  <= 1'b0;
    end else begin
      done            <= 1'b0;
      table_search    <= 1'b0;
      traffic_search  <= 1'b0;
      if (k == KW'(K_RS)) begin
        cell_type       <= kind;
        done            <= 1'b1;
        unassigned_cell <= (kind == CELL_UNASSIGNED);
        table_search    <= (kind == CELL_USER) || (kind == CELL_OAM);
        traffic_search  <= (kind == CELL_USER);
      end
    end
  end

endmodule
