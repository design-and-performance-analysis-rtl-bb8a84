// vr_switch: N x N VR (virtual routing) ATM switch, top level.
//
// An input-buffered, bit-serial ATM switch. Each input port stores the
// payload of an arriving cell in one of B shift register buffers and, while
// the payload is still arriving, sends only the cell's address (input port,
// buffer), call number and 12 header bits to the virtual queues of the
// destination output ports. In the gap between cells every output port
// sends back the address at the head of its queue, which sets the crosspoint
// that joins that buffer to the port's line of the cell fabric. In the next
// slot all connected buffers shift their payloads out at once, while each
// output port sends the translated header ahead of the payload. A multicast
// cell is stored once and read once per destination; its buffer is freed
// when the last copy has left. There is no head-of-line blocking because
// every buffer is directly reachable from every output.
//
// Clocking: one clock, pclk, one bit per period; a cell slot is 512 pclk
// periods (hclk output: high for the 424 bits of a cell). rx[i] carries
// input i's cells aligned to the slot (bit k of the slot = bit k of the
// cell, first header bit at k = 0). tx[j] carries output j's cells with the
// same alignment; tx_valid[j] low means no cell in that slot (the physical
// layer sends an unassigned cell). A cell arriving in slot t leaves at the
// earliest in slot t+1.
// Configuration: route tables (rt_*), traffic contracts (upc_*) per input
// port and lookup tables (oc_*) per output port are written one entry per
// pclk through the *_we[port] strobes.
// Reports: fate[i] (what became of input i's cell, at k = VQ_END),
// ctrl_* (signalling/OAM cells for the CAC and management processors, which
// are outside this design), queue_loss[j], lent[j] (a window-based
// scheduler slot lent to a lower queue), collision (fabric set-up error).
// The slot timer's rst and rs strobes are left open here because every
// block decodes its own instants from k; the per-port idle-buffer maps are
// status signals kept for debugging and are not brought out.
module vr_switch
  import vr_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned B         = 7,
  parameter int unsigned RT_DEPTH  = 16,
  parameter int unsigned UPC_DEPTH = 8,
  parameter int unsigned OC_DEPTH  = 16,
  parameter int unsigned NCLASS    = 4,
  parameter int unsigned DEPTH     = N * B,
  parameter logic [NCLASS-1:0][7:0] WINDOW = {8'd1, 8'd2, 8'd4, 8'd8},
  parameter int unsigned RIW       = clog2_min1(RT_DEPTH),
  parameter int unsigned UIW       = clog2_min1(UPC_DEPTH),
  parameter int unsigned OIW       = clog2_min1(OC_DEPTH)
) (
  input  logic                       pclk,
  input  logic                       reset,
  output logic [KW-1:0]              k,
  output logic                       hclk,
  input  logic [N-1:0]               rx,
  output logic [N-1:0]               tx,
  output logic [N-1:0]               tx_valid,
  input  logic [N-1:0]               rt_we,
  input  logic [RIW-1:0]             rt_idx,
  input  rt_entry_t                  rt_entry,
  input  logic [N-1:0]               upc_we,
  input  logic [UIW-1:0]             upc_idx,
  input  upc_entry_t                 upc_entry,
  input  logic [N-1:0]               oc_we,
  input  logic [OIW-1:0]             oc_idx,
  input  oc_entry_t                  oc_entry,
  output fate_e [N-1:0]              fate,
  output logic [N-1:0]               ctrl_valid,
  output cell_type_e [N-1:0]         ctrl_type,
  output logic [N-1:0][HDR_BITS-1:0] ctrl_head,
  output logic [N-1:0]               queue_loss,
  output logic [N-1:0]               lent,
  output logic [N-1:0]               collision
);

  localparam int unsigned PW = clog2_min1(N);
  localparam int unsigned BW = clog2_min1(B);
  localparam int unsigned CW = $clog2(N + 1);

  logic c_sig_s;

  vr_slot_timer u_timer (
    .pclk, .reset, .k, .hclk, .rst(), .rs(), .c_sig(c_sig_s)
  );

  logic [N-1:0]               in_valid;
  logic [N-1:0][CALL_W-1:0]   in_call;
  logic [N-1:0][KEEP_W-1:0]   in_head;
  logic [N-1:0][PW+BW-1:0]    in_add;
  logic                       vq_valid, conn_valid;
  logic [CALL_W-1:0]          sel_bus;
  logic [KEEP_W-1:0]          hdr_bus;
  logic [PW+BW-1:0]           add_bus;
  logic [N-1:0]               accept, out_valid;
  logic [N-1:0][PW+BW-1:0]    out_add;
  logic [CW-1:0]              ack_cnt;
  logic [PW-1:0]              conn_out;
  logic [N-1:0][N-1:0]        col, drive;
  logic [N-1:0]               line;
  logic [N-1:0][B-1:0]        idle_map;

  for (genvar i = 0; i < N; i++) begin : g_in
    vr_input_port #(.N(N), .B(B), .PORT(i), .RT_DEPTH(RT_DEPTH),
                    .UPC_DEPTH(UPC_DEPTH)) u_in (
      .pclk, .reset, .k, .d_in(rx[i]),
      .rt_we(rt_we[i]), .rt_idx, .rt_entry, .upc_we(upc_we[i]), .upc_idx, .upc_entry,
      .vq_valid(in_valid[i]), .s_bus_data(in_call[i]), .header_data(in_head[i]),
      .add_data(in_add[i]), .vq_ack_cnt(ack_cnt),
      .conn_valid, .conn_addr(add_bus), .conn_out,
      .c_sig(c_sig_s), .col(col[i]), .drive(drive[i]),
      .fate(fate[i]), .ctrl_valid(ctrl_valid[i]), .ctrl_type(ctrl_type[i]),
      .ctrl_head(ctrl_head[i]), .idle_map(idle_map[i])
    );
  end

  vr_vroute_fabric #(.N(N), .B(B)) u_vfab (
    .pclk, .reset, .in_valid, .in_call, .in_head, .in_add, .vq_valid, .sel_bus, .hdr_bus,
    .add_bus, .vq_accept(accept), .ack_cnt, .out_valid, .out_add, .conn_valid, .conn_out
  );

  vr_cell_fabric #(.N(N)) u_cfab (
    .pclk, .reset, .col, .drive, .line, .collision
  );

  for (genvar j = 0; j < N; j++) begin : g_out
    vr_output_port #(.N(N), .B(B), .PORT(j), .OC_DEPTH(OC_DEPTH), .NCLASS(NCLASS),
                     .DEPTH(DEPTH), .WINDOW(WINDOW)) u_out (
      .pclk, .reset, .k, .oc_we(oc_we[j]), .oc_idx, .oc_entry,
      .vq_valid, .sel_bus, .hdr_bus, .add_bus, .accept(accept[j]),
      .queue_loss(queue_loss[j]), .conn_valid(out_valid[j]), .conn_addr(out_add[j]),
      .line(line[j]), .tx(tx[j]), .tx_valid(tx_valid[j]), .served_lent(lent[j])
    );
  end

endmodule
