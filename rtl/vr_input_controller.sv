// vr_input_controller: header processing of one input port.
//
// Made of the header buffer, the cell sort module, the route table and the
// traffic (UPC) module. It sees the serial line like the payload buffers do
// but keeps only the header. Per slot:
//   k < 40      header shifts into the header buffer
//   k = 40      cell sort classifies the header (RS)
//   k = 41      route table and UPC lookups
//   k = 42      header processing ends (HP is high during k = 43): the
//               cell is accepted for routing if it is a user cell,
//               the table matched, the UPC did not discard it and the input
//               scheduler had an empty buffer (buf_ok) for its payload
//   window      k = VQ_START + PORT*N + w, w = 0..N-1: for w < count the
//               controller drives one PDU on the virtual-routing buses:
//               call number (s_bus_data), 12 kept header bits (header_data:
//               PT, CLP after policing, HEC) and the buffer address
//               {PORT, buf_addr}. vq_ack_cnt returns how many output ports
//               stored it.
//   k = VQ_END  valid_cell pulses if at least one output queue took the
//               cell, with cnt = number of queues that did; this count is
//               loaded into the buffer's copy counter and valid_cell marks
//               the buffer full in the input scheduler. fate reports what
//               became of the cell.
// Signalling and management cells are not routed by the switch itself:
// ctrl_valid/ctrl_head hand them to the port's CAC or management processor,
// which this design does not contain. Loading the destination count at
// VQ_END from the acknowledgements (rather than straight after HP from the
// number of table matches) is this design's choice; it keeps the copy
// counter right when an output queue is full.
// The done strobes of cell sort, route table and traffic module and the
// unassigned flag are not needed: the controller acts at fixed k values,
// and the cell type already says unassigned.
module vr_input_controller
  import vr_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned B         = 7,
  parameter int unsigned PORT      = 0,
  parameter int unsigned RT_DEPTH  = 16,
  parameter int unsigned UPC_DEPTH = 8,
  parameter int unsigned PW        = clog2_min1(N),
  parameter int unsigned BW        = clog2_min1(B),
  parameter int unsigned CW        = $clog2(N + 1),
  parameter int unsigned RIW       = clog2_min1(RT_DEPTH),
  parameter int unsigned UIW       = clog2_min1(UPC_DEPTH)
) (
  input  logic                pclk,
  input  logic                reset,
  input  logic [KW-1:0]       k,
  input  logic                d_in,
  // table configuration
  input  logic                rt_we,
  input  logic [RIW-1:0]      rt_idx,
  input  rt_entry_t           rt_entry,
  input  logic                upc_we,
  input  logic [UIW-1:0]      upc_idx,
  input  upc_entry_t          upc_entry,
  // payload buffer chosen by the input scheduler
  input  logic                buf_ok,
  input  logic [BW-1:0]       buf_addr,
  // virtual-routing buses, queue-update direction
  output logic                vq_valid,
  output logic [CALL_W-1:0]   s_bus_data,
  output logic [KEEP_W-1:0]   header_data,
  output logic [PW+BW-1:0]    add_data,
  input  logic [CW-1:0]       vq_ack_cnt,
  // to the payload buffers and the input scheduler
  output logic                hp,
  output logic                valid_cell,
  output logic [CW-1:0]       cnt,
  output logic [BW-1:0]       cell_addr,
  // cell report and control-cell hand-off
  output fate_e               fate,
  output logic                ctrl_valid,
  output cell_type_e          ctrl_type,
  output logic [HDR_BITS-1:0] ctrl_head
);

  localparam int unsigned WIN   = VQ_START + PORT * N;
  localparam int unsigned VQEND = VQ_START + N * N;

  logic [HDR_BITS-1:0]         h_bus;
  cell_type_e                  cell_type;
  logic                        cs_done, unassigned_cell, table_search, traffic_search;
  logic                        table_done, table_error, traffic_done, cell_discard, clp;
  logic [CW-1:0]               t_count;
  logic [N-1:0][CALL_W-1:0]    t_out;

  vr_header_buffer u_hbuf (
    .pclk, .reset, .k, .d_in, .h_bus
  );

  vr_cell_sort u_sort (
    .pclk, .reset, .k, .h_bus(h_bus[HDR_BITS-1 -: 32]), .cell_type, .done(cs_done),
    .unassigned_cell, .table_search, .traffic_search
  );

  vr_route_table #(.RT_DEPTH(RT_DEPTH), .NOUT(N)) u_rt (
    .pclk, .reset, .cfg_we(rt_we), .cfg_idx(rt_idx), .cfg_entry(rt_entry),
    .table_bus(h_bus[HDR_BITS-1 -: HEAD28_W]), .table_search, .table_done,
    .table_error, .count(t_count), .table_out(t_out)
  );

  vr_traffic #(.UPC_DEPTH(UPC_DEPTH)) u_upc (
    .pclk, .reset, .slot_start(k == '0), .cfg_we(upc_we), .cfg_idx(upc_idx),
    .cfg_entry(upc_entry), .table_bus(h_bus[HDR_BITS-1 -: HEAD28_W]),
    .clp_in(h_bus[H_CLP]), .traffic_search, .traffic_done, .cell_discard, .clp
  );

  // Cell state latched at HP.
  logic                     route_ok;
  fate_e                    fate_q;
  logic [CW-1:0]            n_dest;
  logic [N-1:0][CALL_W-1:0] calls;
  logic [KEEP_W-1:0]        keep;
  logic [BW-1:0]            addr_q;
  logic [CW-1:0]            acked;

  logic in_win;
  logic [KW-1:0] w;

  always_comb begin
    in_win = (k >= KW'(WIN)) && (k < KW'(WIN + N));
    w      = k - KW'(WIN);
  end

  always_ff @(posedge pclk) begin
    if (reset) begin
      route_ok   <= 1'b0;
      fate_q     <= FATE_NONE;
      n_dest     <= '0;
      calls      <= '0;
      keep       <= '0;
      addr_q     <= '0;
      acked      <= '0;
      hp         <= 1'b0;
      ctrl_valid <= 1'b0;
      ctrl_type  <= CELL_UNASSIGNED;
      ctrl_head  <= '0;
    end else begin
      hp         <= 1'b0;
      ctrl_valid <= 1'b0;
      if (k == KW'(K_HP)) begin
        hp       <= 1'b1;
        acked    <= '0;
        n_dest   <= t_count;
        calls    <= t_out;
        keep     <= {h_bus[H_CLP+3:H_CLP+1], clp, h_bus[H_CLP-1:0]};
        addr_q   <= buf_addr;
        route_ok <= 1'b0;
        unique case (cell_type)
          CELL_UNASSIGNED: fate_q <= FATE_UNASSIGNED;
          CELL_SIGNALLING, CELL_OAM: begin
            fate_q     <= FATE_CONTROL;
            ctrl_valid <= 1'b1;
            ctrl_type  <= cell_type;
            ctrl_head  <= h_bus;
          end
          default: begin
            if (table_error)       fate_q <= FATE_TABLE_MISS;
            else if (cell_discard) fate_q <= FATE_UPC_DISCARD;
            else if (!buf_ok)      fate_q <= FATE_NO_BUFFER;
            else begin
              fate_q   <= FATE_ROUTED;
              route_ok <= 1'b1;
            end
          end
        endcase
      end else if (in_win && route_ok) begin
        acked <= acked + vq_ack_cnt;
      end
    end
  end

  always_comb begin
    vq_valid    = in_win && route_ok && (w < KW'(n_dest));
    s_bus_data  = vq_valid ? calls[w[$clog2(N)-1:0]] : '0;
    header_data = vq_valid ? keep : '0;
    add_data    = vq_valid ? {PW'(PORT), addr_q} : '0;

    valid_cell  = (k == KW'(VQEND)) && route_ok && (acked != '0);
    cnt         = acked;
    cell_addr   = addr_q;
    fate        = FATE_NONE;
    if (k == KW'(VQEND)) begin
      if (route_ok && acked == '0) fate = FATE_QUEUE_FULL;
      else                         fate = fate_q;
    end
  end

  // The queue-update windows of all ports must end before hclk falls.
  initial assert (VQ_START + N * N < CELL_BITS)
    else $fatal(1, "N too large for time-division virtual routing");

endmodule
