// tb_vr_input_port: self-checking test of one input port (port 2 of 4,
// 3 buffers) with the testbench acting as the four output ports.
//
// Route table: VPI 10 / VCI 100+j -> output j (call j); VPI 20 / VCI 500 ->
// outputs 0 and 3 (calls 4 and 7, a multicast); anything else is a miss.
// Each slot a random cell (or an unassigned cell) arrives. In the port's
// queue-update window (k = 48 + 2*4 + w) the testbench checks each PDU
// (valid, call number, kept header bits, address = this port and the
// lowest idle buffer) and answers with a random acknowledge count; it
// checks the fate reported at VQ_END against its own model of the buffers
// (NO_BUFFER when all three are busy, QUEUE_FULL when no output accepted).
// Accepted copies wait in per-output lists; in the connection phase
// (k = 432 + j) output j takes the oldest one with probability 8/10 or,
// in alternate phases of 50 slots, 3/10, so buffers fill up and multicast copies leave in different slots. In the
// next slot column j must carry that cell's payload, bit for bit, with
// drive[j] high; a column with no connection must be idle. The testbench
// drives c_sig from a slot timer as the switch does.
module tb_vr_input_port;
  import vr_pkg::*;

  localparam int N = 4, B = 3, PORT = 2, PW = 2, BW = 2, CW = 3;
  localparam int WIN = VQ_START + PORT * N;
  localparam int VQEND = VQ_START + N * N;

  logic pclk = 1'b0, reset = 1'b1;
  logic [KW-1:0] k;
  logic hclk, rst, rs, c_sig;
  logic d_in = 1'b0;
  logic rt_we = 1'b0, upc_we = 1'b0;
  logic [3:0] rt_idx = '0;
  logic [2:0] upc_idx = '0;
  rt_entry_t rt_entry = '0;
  upc_entry_t upc_entry = '0;
  logic vq_valid;
  logic [CALL_W-1:0] s_bus_data;
  logic [KEEP_W-1:0] header_data;
  logic [PW+BW-1:0] add_data;
  logic [CW-1:0] vq_ack_cnt = '0;
  logic conn_valid = 1'b0;
  logic [PW+BW-1:0] conn_addr = '0;
  logic [PW-1:0] conn_out = '0;
  logic [N-1:0] col, drive;
  fate_e fate;
  logic ctrl_valid;
  cell_type_e ctrl_type;
  logic [HDR_BITS-1:0] ctrl_head;
  logic [B-1:0] idle_map;

  always #5 pclk = ~pclk;

  vr_slot_timer u_t (.pclk, .reset, .k, .hclk, .rst, .rs, .c_sig);
  vr_input_port #(.N(N), .B(B), .PORT(PORT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t k=%0d: %s", $time, k, what);
    end
  endtask

  initial begin
    #(400 * 512 * 10);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic [HDR_BITS-1:0] hdr;
  logic [PAY_BITS-1:0] pay;
  int dests [$];
  logic [PAY_BITS-1:0] stored [B];
  int remaining [B];
  int waiting [N][$];          // buffer numbers queued at each output
  int reading [N];             // buffer read on column j this slot (-1 none)
  logic [PAY_BITS-1:0] read_pay [N];  // its payload, taken when connected
  int lowest, acks, n_routed = 0, n_nobuf = 0, n_qfull = 0, n_multi_later = 0;
  int first_slot [B];

  function automatic int lowest_idle();
    for (int b = 0; b < B; b++) if (remaining[b] == 0) return b;
    return -1;
  endfunction

  initial begin
    int kind, e;
    for (int b = 0; b < B; b++) remaining[b] = 0;
    for (int j = 0; j < N; j++) reading[j] = -1;
    repeat (3) @(negedge pclk);
    reset = 1'b0;
    for (int j = 0; j < N; j++) begin
      rt_we = 1; rt_idx = 4'(j);
      rt_entry = '{valid: 1'b1, head: {4'd0, 8'd10, 16'(100 + j)}, call: 4'(j)};
      @(negedge pclk);
    end
    rt_idx = 4'd4; rt_entry = '{valid: 1'b1, head: {4'd0, 8'd20, 16'd500}, call: 4'd4}; @(negedge pclk);
    rt_idx = 4'd5; rt_entry = '{valid: 1'b1, head: {4'd0, 8'd20, 16'd500}, call: 4'd7}; @(negedge pclk);
    rt_we = 0;
    while (k != 0) @(negedge pclk);
    for (int slot = 0; slot < 300; slot++) begin
      kind = $urandom_range(0, 9);
      dests = {};
      hdr = '0;
      if (kind < 6) begin
        e = $urandom_range(0, N - 1);
        hdr[39:12] = {4'd0, 8'd10, 16'(100 + e)};
        dests = '{e};
      end else if (kind < 8) begin
        hdr[39:12] = {4'd0, 8'd20, 16'd500};
        dests = '{0, 3};
      end else if (kind == 8) hdr[39:12] = {4'd0, 8'd30, 16'd7};
      hdr[11:0] = (kind == 9) ? 12'd0 : {1'b0, 11'($urandom)};  // PT[2] = 0: user cell
      for (int w = 0; w < PAY_BITS / 32; w++) pay[w * 32 +: 32] = $urandom;
      lowest = lowest_idle();
      acks = 0;
      do begin
        d_in = (k < HDR_BITS) ? hdr[HDR_BITS - 1 - k]
             : (k < CELL_BITS) ? pay[PAY_BITS - 1 - (k - HDR_BITS)] : 1'b0;
        #1;
        // columns: payload of the buffer connected in the previous slot
        if (k >= HDR_BITS && k < CELL_BITS)
          for (int j = 0; j < N; j++) begin
            check(drive[j] == (reading[j] >= 0), "drive");
            if (reading[j] >= 0)
              check(col[j] == read_pay[j][PAY_BITS - 1 - (k - HDR_BITS)], "column bit");
            else check(col[j] == 1'b0, "idle column");
          end
        if (int'(k) >= WIN && int'(k) < WIN + N) begin
          automatic int w = int'(k) - WIN;
          if (lowest >= 0 && w < dests.size()) begin
            automatic int call = (dests.size() > 1) ? ((dests[w] == 0) ? 4 : 7) : dests[w];
            check(vq_valid, "PDU valid");
            check(s_bus_data == CALL_W'(call), "PDU call number");
            check(header_data == hdr[11:0], "PDU kept header bits");
            check(add_data == {PW'(PORT), BW'(lowest)}, "PDU address");
            vq_ack_cnt = 3'($urandom_range(0, 4) != 0);
            if (vq_ack_cnt != 0) begin
              waiting[dests[w]].push_back(lowest);
              acks++;
            end
          end else begin
            check(!vq_valid, "no PDU");
            vq_ack_cnt = '0;
          end
        end else vq_ack_cnt = '0;
        if (k == KW'(VQEND)) begin
          automatic fate_e f = (kind == 9) ? FATE_UNASSIGNED : (kind == 8) ? FATE_TABLE_MISS
                             : (lowest < 0) ? FATE_NO_BUFFER : (acks == 0) ? FATE_QUEUE_FULL
                             : FATE_ROUTED;
          check(fate == f, $sformatf("fate %s expected %s", fate.name(), f.name()));
          if (f == FATE_ROUTED) begin
            stored[lowest] = pay;
            remaining[lowest] = acks;
            first_slot[lowest] = -1;
            n_routed++;
          end
          if (f == FATE_NO_BUFFER) n_nobuf++;
          if (f == FATE_QUEUE_FULL) n_qfull++;
        end
        if (k == KW'(K_CSIG)) for (int j = 0; j < N; j++) reading[j] = -1;
        conn_valid = 1'b0;
        if (int'(k) >= CONN_START && int'(k) < CONN_START + N) begin
          automatic int j = int'(k) - CONN_START;
          if (waiting[j].size() > 0 && $urandom_range(0, 9) < ((slot / 50) % 2 ? 3 : 8)) begin
            automatic int b = waiting[j].pop_front();
            conn_valid = 1'b1;
            conn_addr = {PW'(PORT), BW'(b)};
            conn_out = PW'(j);
            reading[j] = b;
            read_pay[j] = stored[b];
            if (first_slot[b] >= 0 && first_slot[b] != slot) n_multi_later++;
            first_slot[b] = slot;
            remaining[b]--;
          end else if ($urandom_range(0, 1)) begin
            // another input port's buffer: must be ignored here
            conn_valid = 1'b1;
            conn_addr = {PW'(PORT + 1), BW'(0)};
            conn_out = PW'(j);
          end
        end
        @(negedge pclk);
      end while (k != 0);
    end
    $display("routed %0d, no buffer %0d, all refused %0d, later multicast reads %0d",
             n_routed, n_nobuf, n_qfull, n_multi_later);
    check(n_routed > 0 && n_nobuf > 0 && n_qfull > 0 && n_multi_later > 0, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
