// vr_output_controller: lookup table of one output port.
//
// A content-addressable table keyed by (input port, call number). Each
// entry gives the 28-bit translated GFC/VPI/VCI of the outgoing cell and
// the service-class queue the cell is kept in. data_in is the key: in the
// queue-update phase it comes from the selection and address buses, in the
// connection phase from the head of the virtual queues. A match raises
// write_signal (the cell is for this port) and puts the new header on
// data_out. The lookup is combinational; entries are written through cfg_*.
// The table depth, the class field and the write port are this design's
// choices.
module vr_output_controller
  import vr_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter int unsigned OC_DEPTH = 16,
  parameter int unsigned NCLASS   = 4,
  parameter int unsigned PW       = clog2_min1(N),
  parameter int unsigned IW       = clog2_min1(OC_DEPTH),
  parameter int unsigned QW       = clog2_min1(NCLASS)
) (
  input  logic                pclk,
  input  logic                reset,
  input  logic                cfg_we,
  input  logic [IW-1:0]       cfg_idx,
  input  oc_entry_t           cfg_entry,
  input  logic [PW-1:0]       in_port,
  input  logic [CALL_W-1:0]   call,
  output logic                write_signal,
  output logic [HEAD28_W-1:0] data_out,
  output logic [QW-1:0]       cls
);

  oc_entry_t tbl [OC_DEPTH];

  always_ff @(posedge pclk) begin
    if (reset) begin
      for (int unsigned e = 0; e < OC_DEPTH; e++) tbl[e] <= '0;
    end else if (cfg_we) begin
      tbl[cfg_idx] <= cfg_entry;
    end
  end

  always_comb begin
    write_signal = 1'b0;
    data_out     = '0;
    cls          = '0;
    for (int e = OC_DEPTH - 1; e >= 0; e--) begin
      if (tbl[e].valid && tbl[e].in_port[PW-1:0] == in_port && tbl[e].call == call) begin
        write_signal = 1'b1;
        data_out     = tbl[e].new_head;
        cls          = QW'(tbl[e].cls);
      end
    end
  end

endmodule
