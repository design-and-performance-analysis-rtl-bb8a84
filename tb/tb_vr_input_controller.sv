// tb_vr_input_controller: input port 1 of a 4-port switch receives, slot by
// slot, unicast, multicast, unknown, unassigned, signalling, OAM and
// policed cells, with and without a free buffer, and with output queues
// that accept or refuse. For each slot the testbench predicts the PDUs in
// the port's window (call numbers, kept header bits, buffer address),
// valid_cell with the destination count at VQ_END, the reported fate and
// the control-cell hand-off, and checks the header-processing latency
// (HP during bit 43, three bits after RS).
module tb_vr_input_controller;
  import vr_pkg::*;
  localparam int N = 4, B = 7, PORT = 1;
  logic pclk = 1'b0, reset = 1'b1;
  logic [KW-1:0] k;
  logic hclk, rst, rs, c_sig;
  logic d_in = 1'b0;
  logic rt_we = 1'b0, upc_we = 1'b0;
  logic [3:0] rt_idx = '0;
  logic [2:0] upc_idx = '0;
  rt_entry_t rt_entry = '0;
  upc_entry_t upc_entry = '0;
  logic buf_ok = 1'b0;
  logic [2:0] buf_addr = '0;
  logic vq_valid;
  logic [3:0] s_bus_data;
  logic [11:0] header_data;
  logic [4:0] add_data;
  logic [2:0] vq_ack_cnt = '0;
  logic hp, valid_cell;
  logic [2:0] cnt;
  logic [2:0] cell_addr;
  fate_e fate;
  logic ctrl_valid;
  cell_type_e ctrl_type;
  logic [39:0] ctrl_head;
  int checks = 0, failures = 0;
  int seen [fate_e];

  vr_slot_timer u_t (.pclk, .reset, .k, .hclk, .rst, .rs, .c_sig);
  vr_input_controller #(.N(N), .B(B), .PORT(PORT)) dut (.pclk, .reset, .k, .d_in,
    .rt_we, .rt_idx, .rt_entry, .upc_we, .upc_idx, .upc_entry, .buf_ok, .buf_addr,
    .vq_valid, .s_bus_data, .header_data, .add_data, .vq_ack_cnt, .hp, .valid_cell, .cnt,
    .cell_addr, .fate, .ctrl_valid, .ctrl_type, .ctrl_head);

  always #5 pclk = ~pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] hdr(input int vpi, vci, pt, clp);
    return {4'd0, 8'(vpi), 16'(vci), 3'(pt), 1'(clp), 8'hA5};
  endfunction

  localparam logic [27:0] H_UNI = {4'd0, 8'd1, 16'd100};
  localparam logic [27:0] H_MC  = {4'd0, 8'd2, 16'd200};
  localparam logic [27:0] H_POL = {4'd0, 8'd3, 16'd300};

  // One slot with header h; ok: buffer available; acc: acks per PDU.
  task automatic slot(input logic [39:0] h, input bit ok, input int acc,
                      input int ncalls, input logic [3:0] calls [4], input fate_e exp_fate,
                      input bit exp_clp);
    int pdus, ack_total, hp_at;
    logic [2:0] ba;
    pdus = 0; ack_total = 0; hp_at = -1;
    ba = 3'($urandom_range(0, B - 1));
    do begin
      d_in = (k < 40) ? h[39 - k] : ((k < 424) ? 1'($urandom) : 1'b0);
      buf_ok = ok; buf_addr = ba;
      #1;
      if (hp) hp_at = k;
      vq_ack_cnt = '0;
      if (vq_valid) begin
        check(int'(k) >= VQ_START + PORT * N && int'(k) < VQ_START + (PORT + 1) * N, "PDU in own window");
        check(pdus < ncalls, "no extra PDU");
        if (pdus < ncalls) check(s_bus_data == calls[pdus], $sformatf("call %0d", pdus));
        check(header_data == {h[11:9], exp_clp, h[7:0]}, "kept header bits");
        check(add_data == {2'(PORT), ba}, "buffer address");
        pdus++;
        vq_ack_cnt = 3'(acc);
        ack_total += acc;
      end
      if (int'(k) == VQ_START + N * N) begin
        check(fate == exp_fate, $sformatf("fate %s expected %s", fate.name(), exp_fate.name()));
        check(valid_cell == (exp_fate == FATE_ROUTED), "valid_cell");
        if (valid_cell) begin
          check(int'(cnt) == ack_total, "destination count");
          check(cell_addr == ba, "cell address");
        end
        seen[fate]++;
      end else begin
        check(!valid_cell && fate == FATE_NONE, "no report outside VQ_END");
      end
      if (ctrl_valid) check(ctrl_head == h && exp_fate == FATE_CONTROL, "control hand-off");
      @(negedge pclk);
    end while (k != 0);
    check(hp_at == K_HP + 1, $sformatf("HP at bit %0d", hp_at));
    if (exp_fate == FATE_ROUTED || exp_fate == FATE_QUEUE_FULL)
      check(pdus == ncalls, $sformatf("%0d PDUs expected %0d", pdus, ncalls));
    else check(pdus == 0, "no PDU for a dropped cell");
  endtask

  initial begin
    logic [3:0] c_uni [4], c_mc [4], c_none [4];
    c_uni = '{4'd3, 4'd0, 4'd0, 4'd0};
    c_mc  = '{4'd5, 4'd6, 4'd7, 4'd0};
    c_none = '{default: 4'd0};
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    // route table: unicast, 3-way multicast, policed unicast
    begin
      rt_entry_t es [5];
      es[0] = '{valid: 1'b1, head: H_UNI, call: 4'd3};
      es[1] = '{valid: 1'b1, head: H_MC,  call: 4'd5};
      es[2] = '{valid: 1'b1, head: H_MC,  call: 4'd6};
      es[3] = '{valid: 1'b1, head: H_MC,  call: 4'd7};
      es[4] = '{valid: 1'b1, head: H_POL, call: 4'd9};
      foreach (es[i]) begin
        @(negedge pclk); rt_we = 1'b1; rt_idx = 4'(i); rt_entry = es[i];
      end
      @(negedge pclk); rt_we = 1'b0;
      upc_we = 1'b1; upc_idx = 3'd0;
      upc_entry = '{valid: 1'b1, head: H_POL, period: 8'd200, depth: 8'd1, tag: 1'b0};
      @(negedge pclk); upc_we = 1'b0;
      upc_we = 1'b1; upc_idx = 3'd1;
      upc_entry = '{valid: 1'b1, head: H_MC, period: 8'd200, depth: 8'd2, tag: 1'b1};
      @(negedge pclk); upc_we = 1'b0;
    end
    while (k != 0) @(negedge pclk);
    slot(hdr(1, 100, 0, 0), 1, 1, 1, c_uni, FATE_ROUTED, 0);
    slot(hdr(2, 200, 1, 0), 1, 1, 3, c_mc, FATE_ROUTED, 0);
    slot(hdr(2, 200, 2, 0), 1, 1, 3, c_mc, FATE_ROUTED, 0);
    slot(hdr(2, 200, 0, 0), 1, 1, 3, c_mc, FATE_ROUTED, 1);      // bucket empty: tagged
    slot(hdr(1, 100, 0, 1), 1, 0, 1, c_uni, FATE_QUEUE_FULL, 1);  // queue refuses
    slot(hdr(1, 100, 0, 0), 0, 1, 1, c_uni, FATE_NO_BUFFER, 0);
    slot(hdr(9, 999, 0, 0), 1, 1, 0, c_none, FATE_TABLE_MISS, 0);
    slot(hdr(0, 0, 0, 0), 1, 1, 0, c_none, FATE_UNASSIGNED, 0);
    slot(hdr(0, 5, 0, 0), 1, 1, 0, c_none, FATE_CONTROL, 0);
    slot(hdr(4, 3, 0, 0), 1, 1, 0, c_none, FATE_CONTROL, 0);
    slot(hdr(3, 300, 0, 0), 1, 1, 1, '{4'd9, 4'd0, 4'd0, 4'd0}, FATE_ROUTED, 0);
    slot(hdr(3, 300, 0, 0), 1, 1, 1, c_none, FATE_UPC_DISCARD, 0);
    slot(hdr(1, 100, 0, 0), 1, 2, 1, c_uni, FATE_ROUTED, 0);      // two outputs took it
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
