// vr_input_port: one input port of the VR switch.
//
// B bit-serial payload buffers, the input scheduler that tracks which of
// them are empty, the input controller that processes the header, and the
// B-to-N concentrator that connects the buffers to the cell fabric.
// Per slot:
//   k = 39      the scheduler's lowest empty buffer is latched as the write
//               buffer (Add_Reg); with no empty buffer the cell is lost
//   k = 40..423 the payload shifts into that buffer
//   queue-update window: the controller sends one PDU per destination
//   k = VQ_END  valid_cell loads the copy counter and marks the buffer full
//   connection phase: every address on the connection bus whose port field
//               equals PORT is decoded: read flip-flop and concentrator
//               crosspoint (buffer, conn_out) are set and the copy counter
//               decremented; a counter reaching zero returns the buffer to
//               the scheduler
//   k = 424     c_sig (from the slot timer) clears read flip-flops and
//               crosspoints
//   next slot, k = 40..423: connected buffers shift their payload out on
//               the concentrator columns; drive tells the cell fabric
//               which columns this port is driving
// The controller's hp strobe and the buffers' reading/count state are
// status signals kept visible for debugging; nothing in the port needs
// them, so lint lists them as unused.
module vr_input_port
  import vr_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned B         = 7,
  parameter int unsigned PORT      = 0,
  parameter int unsigned RT_DEPTH  = 16,
  parameter int unsigned UPC_DEPTH = 8,
  parameter int unsigned PAY_LEN   = PAY_BITS,
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
  input  logic                rt_we,
  input  logic [RIW-1:0]      rt_idx,
  input  rt_entry_t           rt_entry,
  input  logic                upc_we,
  input  logic [UIW-1:0]      upc_idx,
  input  upc_entry_t          upc_entry,
  // virtual routing, queue update (to the output ports)
  output logic                vq_valid,
  output logic [CALL_W-1:0]   s_bus_data,
  output logic [KEEP_W-1:0]   header_data,
  output logic [PW+BW-1:0]    add_data,
  input  logic [CW-1:0]       vq_ack_cnt,
  // virtual routing, connection set-up (from the output ports)
  input  logic                conn_valid,
  input  logic [PW+BW-1:0]    conn_addr,
  input  logic [PW-1:0]       conn_out,
  // real cell routing
  input  logic                c_sig,
  output logic [N-1:0]        col,
  output logic [N-1:0]        drive,
  // reports
  output fate_e               fate,
  output logic                ctrl_valid,
  output cell_type_e          ctrl_type,
  output logic [HDR_BITS-1:0] ctrl_head,
  output logic [B-1:0]        idle_map
);

  logic          idle_valid, wr_ok;
  logic [BW-1:0] idle_addr, wr_addr;
  logic          hp, valid_cell;
  logic [CW-1:0] cnt;
  logic [BW-1:0] cell_addr;
  logic [B-1:0]  wsel, rreq, dout, reading, free;
  logic [B-1:0][CW-1:0] count;
  logic          free_valid;
  logic [BW-1:0] free_addr;
  logic          rd_me;

  // Add_Reg: the buffer this slot's payload goes to.
  always_ff @(posedge pclk) begin
    if (reset) begin
      wr_ok   <= 1'b0;
      wr_addr <= '0;
    end else if (k == KW'(HDR_BITS - 1)) begin
      wr_ok   <= idle_valid;
      wr_addr <= idle_addr;
    end
  end

  // Address decoders for writing and reading.
  always_comb begin
    rd_me = conn_valid && (conn_addr[PW+BW-1:BW] == PW'(PORT));
    for (int unsigned i = 0; i < B; i++) begin
      wsel[i] = wr_ok && (wr_addr == BW'(i));
      rreq[i] = rd_me && (conn_addr[BW-1:0] == BW'(i));
    end
    free_valid = |free;
    free_addr  = '0;
    for (int unsigned i = 0; i < B; i++)
      if (free[i]) free_addr = BW'(i);
  end

  vr_input_scheduler #(.B(B)) u_sched (
    .pclk, .reset, .free_valid, .free_addr, .valid_cell, .cell_addr,
    .idle_valid, .idle_addr, .iar(idle_map)
  );

  vr_input_controller #(.N(N), .B(B), .PORT(PORT), .RT_DEPTH(RT_DEPTH),
                        .UPC_DEPTH(UPC_DEPTH)) u_ctrl (
    .pclk, .reset, .k, .d_in, .rt_we, .rt_idx, .rt_entry, .upc_we, .upc_idx,
    .upc_entry, .buf_ok(wr_ok), .buf_addr(wr_addr), .vq_valid, .s_bus_data,
    .header_data, .add_data, .vq_ack_cnt, .hp, .valid_cell, .cnt, .cell_addr,
    .fate, .ctrl_valid, .ctrl_type, .ctrl_head
  );

  for (genvar i = 0; i < B; i++) begin : g_buf
    vr_payload_buffer #(.PAY_LEN(PAY_LEN), .CW(CW)) u_pb (
      .pclk, .reset, .k, .d_in, .wsel(wsel[i]),
      .cnt_load(valid_cell && cell_addr == BW'(i)), .cnt_in(cnt),
      .r(rreq[i]), .c_sig, .dout(dout[i]), .reading(reading[i]),
      .count(count[i]), .free(free[i])
    );
  end

  logic [B-1:0][N-1:0] xp;

  vr_concentrator #(.N(N), .B(B)) u_conc (
    .pclk, .reset, .c_sig, .rd(rd_me), .rd_buf(conn_addr[BW-1:0]),
    .rd_out(conn_out), .buf_out(dout), .col, .xp
  );

  // Columns this port drives on the cell fabric.
  always_comb begin
    drive = '0;
    for (int unsigned i = 0; i < B; i++) drive |= xp[i];
  end

endmodule
