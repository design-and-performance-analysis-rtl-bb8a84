// vr_traffic: usage parameter control (UPC, policing) of one input port.
//
// The input controller hands the header of each user cell to this module
// (traffic_search). The connection's traffic contract is found by comparing
// the 28-bit GFC/VPI/VCI with UPC_DEPTH contract entries; a cell of a
// connection without a contract passes unchanged. Each contract is a token
// bucket: one token is added every (period+1) cell slots up to depth tokens,
// and a conforming cell takes one token. A nonconforming cell is tagged
// (CLP = 1) if the contract allows tagging, otherwise discarded. The results,
// cell_discard and the two-level CLP, are registered at the edge where
// traffic_search is high; traffic_done pulses in the next cycle.
// The token-bucket algorithm and the contract write port are this design's
// choice: the original only says a software UPC enforces the contract.
// Timing: tokens are added at the edge where slot_start (k == 0) is high;
// writing a contract fills its bucket.
module vr_traffic
  import vr_pkg::*;
#(
  parameter int unsigned UPC_DEPTH = 8,
  parameter int unsigned IW        = clog2_min1(UPC_DEPTH)
) (
  input  logic                pclk,
  input  logic                reset,
  input  logic                slot_start,
  input  logic                cfg_we,
  input  logic [IW-1:0]       cfg_idx,
  input  upc_entry_t          cfg_entry,
  input  logic [HEAD28_W-1:0] table_bus,
  input  logic                clp_in,
  input  logic                traffic_search,
  output logic                traffic_done,
  output logic                cell_discard,
  output logic                clp
);

  upc_entry_t contract [UPC_DEPTH];
  logic [7:0] tokens   [UPC_DEPTH];
  logic [7:0] pcnt     [UPC_DEPTH];

  logic          hit;
  logic [IW-1:0] hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = UPC_DEPTH - 1; i >= 0; i--) begin
      if (contract[i].valid && contract[i].head == table_bus) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge pclk) begin
    if (reset) begin
      for (int unsigned i = 0; i < UPC_DEPTH; i++) begin
        contract[i] <= '0;
        tokens[i]   <= '0;
        pcnt[i]     <= '0;
      end
      traffic_done <= 1'b0;
      cell_discard <= 1'b0;
      clp          <= 1'b0;
    end else begin
      traffic_done <= traffic_search;
      for (int unsigned i = 0; i < UPC_DEPTH; i++) begin
        if (cfg_we && cfg_idx == IW'(i)) begin
          contract[i] <= cfg_entry;
          tokens[i]   <= cfg_entry.depth;
          pcnt[i]     <= '0;
        end else if (traffic_search && hit && hit_idx == IW'(i) && tokens[i] != 0) begin
          tokens[i] <= tokens[i] - 1'b1;
        end else if (slot_start) begin
          if (pcnt[i] >= contract[i].period) begin
            pcnt[i] <= '0;
            if (tokens[i] < contract[i].depth) tokens[i] <= tokens[i] + 1'b1;
          end else begin
            pcnt[i] <= pcnt[i] + 1'b1;
          end
        end
      end
      if (traffic_search) begin
        if (!hit || tokens[hit_idx] != 0) begin
          cell_discard <= 1'b0;
          clp          <= clp_in;
        end else if (contract[hit_idx].tag) begin
          cell_discard <= 1'b0;
          clp          <= 1'b1;
        end else begin
          cell_discard <= 1'b1;
          clp          <= clp_in;
        end
      end
    end
  end

endmodule
