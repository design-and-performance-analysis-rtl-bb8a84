// vr_output_port: one output port of the VR switch.
//
// Output controller (lookup table), virtual FIFO queues, output scheduler
// and output buffer. The queues hold only cell addresses: for each service
// class there is an Add_FIFO ({input port, buffer}), a Call_no_FIFO and a
// Header_FIFO, written and read together.
//   queue update: each PDU on the virtual-routing buses is looked up with
//     key (input port, call number). On a match the PDU is written into the
//     queues of the entry's class and accept is raised; if that class's
//     queue is full the PDU is refused and queue_loss pulses.
//   (the scheduler's window owner, cur, is a status output not used here)
//   connection set-up (k = CONN_START + PORT): the scheduler picks a queue,
//     its head is popped and driven on the address bus (conn_valid,
//     conn_addr) to the input ports, and the output buffer is loaded with
//     the translated header found by the lookup table for the head entry.
//   next slot: the output buffer sends the header and then the payload from
//     this port's cell-fabric line.
module vr_output_port
  import vr_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter int unsigned B        = 7,
  parameter int unsigned PORT     = 0,
  parameter int unsigned OC_DEPTH = 16,
  parameter int unsigned NCLASS   = 4,
  parameter int unsigned DEPTH    = N * B,
  parameter logic [NCLASS-1:0][7:0] WINDOW = {8'd1, 8'd2, 8'd4, 8'd8},
  parameter int unsigned PW       = clog2_min1(N),
  parameter int unsigned BW       = clog2_min1(B),
  parameter int unsigned IW       = clog2_min1(OC_DEPTH),
  parameter int unsigned QW       = clog2_min1(NCLASS),
  parameter int unsigned AW       = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic                  pclk,
  input  logic                  reset,
  input  logic [KW-1:0]         k,
  input  logic                  oc_we,
  input  logic [IW-1:0]         oc_idx,
  input  oc_entry_t             oc_entry,
  // queue update
  input  logic                  vq_valid,
  input  logic [CALL_W-1:0]     sel_bus,
  input  logic [KEEP_W-1:0]     hdr_bus,
  input  logic [PW+BW-1:0]      add_bus,
  output logic                  accept,
  output logic                  queue_loss,
  // connection set-up
  output logic                  conn_valid,
  output logic [PW+BW-1:0]      conn_addr,
  // cell output
  input  logic                  line,
  output logic                  tx,
  output logic                  tx_valid,
  output logic                  served_lent
);

  logic                  serve;
  logic [NCLASS-1:0]     nonempty, pop, qfull, wq;
  logic [NCLASS-1:0][PW+BW-1:0]  q_add;
  logic [NCLASS-1:0][CALL_W-1:0] q_call;
  logic [NCLASS-1:0][KEEP_W-1:0] q_keep;
  logic                  any, lent;
  logic [QW-1:0]         sel, cur;
  logic                  hit;
  logic [HEAD28_W-1:0]   new_head;
  logic [QW-1:0]         cls;
  logic [PW-1:0]         key_port;
  logic [CALL_W-1:0]     key_call;

  always_comb begin
    serve = (k == KW'(CONN_START + PORT));
    // The lookup key comes from the buses or from the selected queue head.
    if (serve) begin
      key_port = q_add[sel][PW+BW-1:BW];
      key_call = q_call[sel];
    end else begin
      key_port = add_bus[PW+BW-1:BW];
      key_call = sel_bus;
    end
    accept     = vq_valid && hit && !qfull[cls];
    queue_loss = vq_valid && hit && qfull[cls];
    for (int unsigned q = 0; q < NCLASS; q++)
      wq[q] = accept && (cls == QW'(q));
    conn_valid = serve && any;
    conn_addr  = conn_valid ? q_add[sel] : '0;
  end

  vr_output_controller #(.N(N), .OC_DEPTH(OC_DEPTH), .NCLASS(NCLASS)) u_oc (
    .pclk, .reset, .cfg_we(oc_we), .cfg_idx(oc_idx), .cfg_entry(oc_entry),
    .in_port(key_port), .call(key_call), .write_signal(hit), .data_out(new_head),
    .cls
  );

  for (genvar q = 0; q < NCLASS; q++) begin : g_q
    logic e_add, e_call, e_keep, f_call, f_keep;
    logic [AW:0] l_add, l_call, l_keep;
    vr_vfifo #(.W(PW + BW), .DEPTH(DEPTH)) u_add_fifo (
      .pclk, .reset, .w(wq[q]), .r(pop[q]), .add_in(add_bus), .add_out(q_add[q]),
      .empty(e_add), .full(qfull[q]), .level(l_add)
    );
    vr_vfifo #(.W(CALL_W), .DEPTH(DEPTH)) u_call_fifo (
      .pclk, .reset, .w(wq[q]), .r(pop[q]), .add_in(sel_bus), .add_out(q_call[q]),
      .empty(e_call), .full(f_call), .level(l_call)
    );
    vr_vfifo #(.W(KEEP_W), .DEPTH(DEPTH)) u_header_fifo (
      .pclk, .reset, .w(wq[q]), .r(pop[q]), .add_in(hdr_bus), .add_out(q_keep[q]),
      .empty(e_keep), .full(f_keep), .level(l_keep)
    );
    assign nonempty[q] = !e_add;
    // The three queues of a class are written and read together and must
    // stay in step.
    assert property (@(posedge pclk) disable iff (reset)
      l_add == l_call && l_add == l_keep && e_add == e_call && e_add == e_keep
      && qfull[q] == f_call && qfull[q] == f_keep);
  end

  vr_output_scheduler #(.NCLASS(NCLASS), .WINDOW(WINDOW)) u_sched (
    .pclk, .reset, .serve, .nonempty, .pop, .any, .sel, .lent, .cur
  );

  vr_output_buffer u_obuf (
    .pclk, .reset, .k, .load(serve), .valid(any), .new_head, .keep(q_keep[sel]),
    .line, .tx, .tx_valid
  );

  always_comb served_lent = serve && any && lent;

endmodule
