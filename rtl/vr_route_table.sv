// vr_route_table: content-addressable route table of one input port.
//
// Each entry is 32 bits of the original format, the incoming 28-bit
// GFC/VPI/VCI and a 4-bit call number, plus a valid bit. On table_search all
// entries are compared with table_bus at once. No match raises table_error
// (the cell is then dropped); one match is a unicast cell, several matches
// a multicast cell. count is the number of matches and table_out lists
// their call numbers, lowest entry first; at most NOUT matches are listed
// and counted (a cell cannot have more destinations than output ports).
// Results are registered at the pclk edge where table_search is high and
// table_done pulses in the following cycle. Entries are written through the
// cfg_* port (the table depth and the write port are this design's choice).
module vr_route_table
  import vr_pkg::*;
#(
  parameter int unsigned RT_DEPTH = 16,
  parameter int unsigned NOUT     = 4,
  parameter int unsigned IW       = clog2_min1(RT_DEPTH),
  parameter int unsigned CW       = $clog2(NOUT + 1)
) (
  input  logic                        pclk,
  input  logic                        reset,
  input  logic                        cfg_we,
  input  logic [IW-1:0]               cfg_idx,
  input  rt_entry_t                   cfg_entry,
  input  logic [HEAD28_W-1:0]         table_bus,
  input  logic                        table_search,
  output logic                        table_done,
  output logic                        table_error,
  output logic [CW-1:0]               count,
  output logic [NOUT-1:0][CALL_W-1:0] table_out
);

  rt_entry_t table_q [RT_DEPTH];

  logic [CW-1:0]               n_match;
  logic [NOUT-1:0][CALL_W-1:0] calls;

  always_comb begin
    n_match = '0;
    calls   = '0;
    for (int unsigned e = 0; e < RT_DEPTH; e++) begin
      if (table_q[e].valid && table_q[e].head == table_bus && n_match < CW'(NOUT)) begin
        calls[int'(n_match)] = table_q[e].call;
        n_match = n_match + 1'b1;
      end
    end
  end

  always_ff @(posedge pclk) begin
    if (reset) begin
      for (int unsigned e = 0; e < RT_DEPTH; e++) table_q[e] <= '0;
    end else if (cfg_we) begin
      table_q[cfg_idx] <= cfg_entry;
    end
  end

  always_ff @(posedge pclk) begin
    if (reset) begin
      table_done  <= 1'b0;
      table_error <= 1'b0;
      count       <= '0;
      table_out   <= '0;
    end else begin
      table_done <= table_search;
      if (table_search) begin
        table_error <= (n_match == '0);
        count       <= n_match;
        table_out   <= calls;
      end
    end
  end

endmodule
