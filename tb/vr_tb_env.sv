// vr_tb_env: stimulus and scoreboard for end-to-end tests of vr_switch
// (4 ports). Used by tb_vr_switch (small queues) and tb_vr_switch_full
// (every parameter at its default).
//
// Set-up written through the configuration ports:
//   input i, header VPI 10 / VCI 100+j : unicast to output j (call j)
//   input i, header VPI 20 / VCI 500   : multicast to outputs 0, 2, 3
//                                        (calls 4+j)
//   input i, header VPI 21 / VCI 600   : broadcast to all outputs (calls 8+j)
//   VPI 30 / VCI 700                   : no route (dropped)
//   VPI 0 / VCI 5, VCI 3               : signalling and VP OAM cells
//   output j, key (i, call)            : new header VPI 100+i,
//                                        VCI call*256+j, class (i+j) % NCLASS
//   contracts: input 0 unicast to 1 is tagged beyond 1 cell per 6 slots,
//              input 1 unicast to 2 is discarded beyond 1 cell per 8 slots
// Traffic: Bernoulli arrivals with load LOAD_PCT, then a hot-spot phase in
// which every input sends to output 0 (fills input buffers and queues),
// then a drain phase with no arrivals. Slot-free time is filled with
// unassigned cells. The HEC octet of every cell carries an 8-bit tag that
// the switch passes through untouched, so each delivered copy is matched
// to the cell it came from.
//
// The scoreboard keeps its own model: occupied input buffers per port,
// per (output, class) queue contents in order, token buckets for the two
// contracts. It predicts every fate (routed, lost for lack of buffer or
// queue space, dropped as unassigned / no route / policed, control), every
// queue refusal, the order of delivery within each queue, each outgoing
// header and payload bit, that a port with queued cells never idles, and
// that no cell leaves in the slot it arrived in (minimum delay one slot).
// At the end every accepted copy must have left. Each mechanism counted
// below must have happened at least once.
module vr_tb_env
  import vr_pkg::*;
#(
  parameter int N          = 4,
  parameter int B          = 7,
  parameter int DEPTH      = N * B,
  parameter int NCLASS     = 4,
  parameter int LOAD_SLOTS = 150,
  parameter int HOT_SLOTS  = 60,
  parameter int DRAIN_SLOTS = 200,
  parameter int LOAD_PCT   = 80,
  parameter bit NEED_QFULL = 1'b0
) (
  input  logic                       pclk,
  output logic                       reset,
  input  logic [KW-1:0]              k,
  input  logic                       hclk,
  output logic [N-1:0]               rx,
  input  logic [N-1:0]               tx,
  input  logic [N-1:0]               tx_valid,
  output logic [N-1:0]               rt_we,
  output logic [3:0]                 rt_idx,
  output rt_entry_t                  rt_entry,
  output logic [N-1:0]               upc_we,
  output logic [2:0]                 upc_idx,
  output upc_entry_t                 upc_entry,
  output logic [N-1:0]               oc_we,
  output logic [3:0]                 oc_idx,
  output oc_entry_t                  oc_entry,
  input  fate_e [N-1:0]              fate,
  input  logic [N-1:0]               ctrl_valid,
  input  cell_type_e [N-1:0]         ctrl_type,
  input  logic [N-1:0][HDR_BITS-1:0] ctrl_head,
  input  logic [N-1:0]               queue_loss,
  input  logic [N-1:0]               lent,
  input  logic [N-1:0]               collision
);

  localparam int VQEND = VQ_START + N * N;

  typedef enum int {
    K_UNI, K_MULTI, K_BCAST, K_MISS, K_SIG, K_OAM, K_IDLE
  } kind_e;

  typedef struct {
    int                  src;
    int                  tag;
    kind_e               kind;
    int                  dests [$];
    logic [HDR_BITS-1:0] hdr;
    logic [PAY_BITS-1:0] pay;
    int                  remaining;
    int                  slot;
    int                  first_out;
  } cell_t;

  int checks = 0, failures = 0;
  int slot_no = 0;
  cell_t cells [int];          // key src*256 + tag
  int    q [N][NCLASS][$];     // keys queued per output and class
  int    occupied [N];         // input buffers in use
  int    tagc [N];
  int    tokens [2], pcnt [2];
  cell_t cur [N];              // cell arriving in this slot
  bit    routable [N];
  fate_e exp_fate [N];
  bit    exp_clp [N];
  int    accepted [N];
  logic [HDR_BITS-1:0] out_hdr [N];
  logic [CELL_BITS-1:0] out_cell [N];
  int    out_key [N];
  bit    pend [N];
  int    total_cells = 0;

  // mechanisms
  int n_uni = 0, n_multi = 0, n_bcast = 0, n_recirc = 0, n_nobuf = 0, n_qfull = 0;
  int n_tag = 0, n_disc = 0, n_unass = 0, n_miss = 0, n_ctrl = 0, n_idle_out = 0;
  int n_lent = 0, n_delay1 = 0, n_refuse = 0, n_delivered = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL slot %0d k %0d: %s", slot_no, k, what);
    end
  endtask

  function automatic int cls_of(input int i, input int j);
    return (i + j) % NCLASS;
  endfunction

  function automatic logic [27:0] new_head(input int i, input int call, input int j);
    return {4'd0, 8'(100 + i), 16'(call * 256 + j)};
  endfunction

  function automatic int call_of(input kind_e kd, input int j);
    return (kd == K_UNI) ? j : (kd == K_MULTI) ? 4 + j : 8 + j;
  endfunction

  initial begin : watchdog
    repeat ((LOAD_SLOTS + HOT_SLOTS + DRAIN_SLOTS + 20) * SLOT_BITS) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- set-up
  task automatic configure();
    int e;
    for (int i = 0; i < N; i++) begin
      e = 0;
      for (int j = 0; j < N; j++) begin
        rt_we = '0; rt_we[i] = 1'b1; rt_idx = 4'(e++);
        rt_entry = '{valid: 1'b1, head: {4'd0, 8'd10, 16'(100 + j)}, call: 4'(j)};
        @(negedge pclk);
      end
      for (int j = 0; j < N; j++) if (j != 1) begin
        rt_we = '0; rt_we[i] = 1'b1; rt_idx = 4'(e++);
        rt_entry = '{valid: 1'b1, head: {4'd0, 8'd20, 16'd500}, call: 4'(4 + j)};
        @(negedge pclk);
      end
      for (int j = 0; j < N; j++) begin
        rt_we = '0; rt_we[i] = 1'b1; rt_idx = 4'(e++);
        rt_entry = '{valid: 1'b1, head: {4'd0, 8'd21, 16'd600}, call: 4'(8 + j)};
        @(negedge pclk);
      end
    end
    rt_we = '0;
    for (int j = 0; j < N; j++) begin
      e = 0;
      for (int i = 0; i < N; i++)
        for (int c = 0; c < 12; c++) begin
          if (c >= 4 && c < 8 && (c - 4) != j) continue;
          if (c >= 8 && (c - 8) != j) continue;
          if (c < 4 && c != j) continue;
          if (c == 5) continue;              // output 1 is not in the multicast group
          oc_we = '0; oc_we[j] = 1'b1; oc_idx = 4'(e++);
          oc_entry = '{valid: 1'b1, in_port: 8'(i), call: 4'(c), cls: 2'(cls_of(i, j)),
                       new_head: new_head(i, c, j)};
          @(negedge pclk);
        end
    end
    oc_we = '0;
    upc_we = 4'b0001; upc_idx = 3'd0;
    upc_entry = '{valid: 1'b1, head: {4'd0, 8'd10, 16'd101}, period: 8'd5, depth: 8'd1, tag: 1'b1};
    @(negedge pclk);
    upc_we = 4'b0010; upc_idx = 3'd0;
    upc_entry = '{valid: 1'b1, head: {4'd0, 8'd10, 16'd102}, period: 8'd7, depth: 8'd1, tag: 1'b0};
    @(negedge pclk);
    upc_we = '0;
    tokens[0] = 1; pcnt[0] = 0;
    tokens[1] = 1; pcnt[1] = 0;
  endtask

  // ------------------------------------------------------------- traffic
  function automatic cell_t make_cell(input int i, input int phase);
    cell_t c;
    int r;
    c.src = i;
    c.slot = slot_no;
    c.dests = {};
    c.remaining = 0;
    c.first_out = -1;
    c.tag = tagc[i];
    for (int w = 0; w < PAY_BITS / 32; w++) c.pay[w * 32 +: 32] = $urandom;
    r = $urandom_range(0, 99);
    if (phase == 2 || (phase == 0 && r >= LOAD_PCT)) c.kind = K_IDLE;
    else if (phase == 1) c.kind = K_UNI;
    else begin
      r = $urandom_range(0, 99);
      c.kind = (r < 68) ? K_UNI : (r < 80) ? K_MULTI : (r < 88) ? K_BCAST :
               (r < 92) ? K_MISS : (r < 96) ? K_SIG : K_OAM;
    end
    c.hdr = '0;
    unique case (c.kind)
      K_UNI: begin
        automatic int j = (phase == 1) ? 0 : $urandom_range(0, N - 1);
        c.hdr[39:12] = {4'd0, 8'd10, 16'(100 + j)};
        c.dests = '{j};
      end
      K_MULTI: begin c.hdr[39:12] = {4'd0, 8'd20, 16'd500}; c.dests = '{0, 2, 3}; end
      K_BCAST: begin c.hdr[39:12] = {4'd0, 8'd21, 16'd600}; c.dests = '{0, 1, 2, 3}; end
      K_MISS:  c.hdr[39:12] = {4'd0, 8'd30, 16'd700};
      K_SIG:   c.hdr[39:12] = {4'd0, 8'd0, 16'd5};
      K_OAM:   c.hdr[39:12] = {4'd0, 8'd10, 16'd3};
      default: c.hdr[39:12] = '0;
    endcase
    c.hdr[11:9] = (c.kind == K_IDLE) ? 3'd0 : 3'($urandom_range(0, 3));
    c.hdr[8]    = (c.kind == K_IDLE) ? 1'b0 : 1'($urandom);
    c.hdr[7:0]  = 8'(c.tag);
    return c;
  endfunction

  // --------------------------------------------------------------- main
  initial begin
    int phase;
    reset = 1'b1; rx = '0; rt_we = '0; upc_we = '0; oc_we = '0;
    rt_idx = '0; upc_idx = '0; oc_idx = '0; rt_entry = '0; upc_entry = '0; oc_entry = '0;
    foreach (occupied[i]) begin occupied[i] = 0; tagc[i] = 0; pend[i] = 0; end
    repeat (4) @(posedge pclk);
    @(negedge pclk);
    reset = 1'b0;
    configure();
    while (k != 0) @(negedge pclk);
    for (slot_no = 0; slot_no < LOAD_SLOTS + HOT_SLOTS + DRAIN_SLOTS; slot_no++) begin
      phase = (slot_no < LOAD_SLOTS) ? 0 : (slot_no < LOAD_SLOTS + HOT_SLOTS) ? 1 : 2;
      for (int i = 0; i < N; i++) begin
        cur[i] = make_cell(i, phase);
        tagc[i] = (tagc[i] + 1) % 256;
      end
      do begin
        step();
        @(negedge pclk);
      end while (k != 0);
    end
    finish_up();
  end

  // One pclk: drive the lines and check what the switch shows at bit k.
  task automatic step();
    for (int i = 0; i < N; i++)
      rx[i] = (k < CELL_BITS) ? ((k < HDR_BITS) ? cur[i].hdr[HDR_BITS - 1 - k]
                                               : cur[i].pay[PAY_BITS - 1 - (k - HDR_BITS)])
                              : 1'b0;
    #1;
    check(collision == '0, "fabric collision");
    for (int j = 0; j < N; j++) begin
      if (lent[j]) n_lent++;
      if (k < CELL_BITS) begin
        if (tx_valid[j]) out_cell[j][CELL_BITS - 1 - k] = tx[j];
      end else check(!tx_valid[j], "tx_valid outside the cell");
    end
    if (k == KW'(HDR_BITS)) at_header_done();
    if (int'(k) >= VQ_START && int'(k) < VQEND) at_window();
    if (k == KW'(VQEND)) at_vq_end();
    if (k == KW'(CELL_BITS)) at_cell_done();
    for (int i = 0; i < N; i++)
      if (ctrl_valid[i]) begin
        check(cur[i].kind == K_SIG || cur[i].kind == K_OAM, "control hand-off kind");
        check(ctrl_head[i] == cur[i].hdr, "control header");
        check(ctrl_type[i] == ((cur[i].kind == K_SIG) ? CELL_SIGNALLING : CELL_OAM), "control type");
      end
  endtask

  // k = 40: the outgoing headers are complete; retire the copies leaving
  // now, then predict buffer space and policing for the arriving cells.
  task automatic at_header_done();
    for (int j = 0; j < N; j++) begin
      check(tx_valid[j] == pend[j], $sformatf("output %0d busy %0d expected %0d", j, tx_valid[j], pend[j]));
      out_key[j] = -1;
      if (!tx_valid[j]) begin n_idle_out++; continue; end
      out_hdr[j] = out_cell[j][CELL_BITS - 1 -: HDR_BITS];
      begin
        automatic int src = int'(out_hdr[j][35:28]) - 100;
        automatic int key = src * 256 + int'(out_hdr[j][7:0]);
        if (src < 0 || src >= N || !cells.exists(key)) begin
          check(0, $sformatf("output %0d: unknown cell header %h", j, out_hdr[j]));
          continue;
        end
        begin
          automatic int c = cls_of(src, j);
          check(q[j][c].size() > 0 && q[j][c][0] == key,
                $sformatf("output %0d class %0d: out of order", j, c));
          if (q[j][c].size() > 0 && q[j][c][0] == key) void'(q[j][c].pop_front());
          else foreach (q[j][c][x]) if (q[j][c][x] == key) begin q[j][c].delete(x); break; end
        end
        out_key[j] = key;
        check(cells[key].slot < slot_no, "cell left in its arrival slot");
        if (cells[key].slot == slot_no - 1) n_delay1++;
        if (cells[key].first_out < 0) cells[key].first_out = slot_no;
        else if (cells[key].first_out < slot_no) n_recirc++;
        cells[key].remaining--;
        if (cells[key].remaining == 0) occupied[src]--;
      end
    end
    for (int t = 0; t < 2; t++) begin
      if (pcnt[t] >= ((t == 0) ? 5 : 7)) begin
        pcnt[t] = 0;
        if (tokens[t] < 1) tokens[t]++;
      end else pcnt[t]++;
    end
    for (int i = 0; i < N; i++) begin
      automatic int t = -1;
      routable[i] = 0;
      accepted[i] = 0;
      exp_clp[i]  = cur[i].hdr[8];
      if (cur[i].kind == K_UNI && i == 0 && cur[i].dests[0] == 1) t = 0;
      if (cur[i].kind == K_UNI && i == 1 && cur[i].dests[0] == 2) t = 1;
      unique case (cur[i].kind)
        K_IDLE: exp_fate[i] = FATE_UNASSIGNED;
        K_MISS: exp_fate[i] = FATE_TABLE_MISS;
        K_SIG, K_OAM: exp_fate[i] = FATE_CONTROL;
        default: begin
          exp_fate[i] = FATE_ROUTED;
          if (t >= 0) begin
            if (tokens[t] > 0) tokens[t]--;
            else if (t == 0) begin exp_clp[i] = 1'b1; n_tag++; end
            else exp_fate[i] = FATE_UPC_DISCARD;
          end
          if (exp_fate[i] == FATE_ROUTED) begin
            if (occupied[i] >= B) exp_fate[i] = FATE_NO_BUFFER;
            else routable[i] = 1;
          end
        end
      endcase
    end
  endtask

  // Queue-update windows: input i, destination number w.
  task automatic at_window();
    automatic int i = (int'(k) - VQ_START) / N;
    automatic int w = (int'(k) - VQ_START) % N;
    for (int j = 0; j < N; j++) begin
      automatic bit exp_refuse = 0;
      automatic bit is_dest = routable[i] && w < cur[i].dests.size() && cur[i].dests[w] == j;
      if (is_dest) exp_refuse = (q[j][cls_of(i, j)].size() >= DEPTH);
      check(queue_loss[j] == exp_refuse, $sformatf("queue refusal at output %0d", j));
      if (is_dest && !exp_refuse) begin
        q[j][cls_of(i, j)].push_back(i * 256 + cur[i].tag);
        accepted[i]++;
      end
      if (exp_refuse) n_refuse++;
    end
  endtask

  task automatic at_vq_end();
    for (int i = 0; i < N; i++) begin
      automatic fate_e e = exp_fate[i];
      if (routable[i] && accepted[i] == 0) e = FATE_QUEUE_FULL;
      check(fate[i] == e, $sformatf("input %0d fate %s expected %s", i, fate[i].name(), e.name()));
      unique case (e)
        FATE_ROUTED: begin
          cell_t c = cur[i];
          c.remaining = accepted[i];
          c.hdr[8] = exp_clp[i];
          check(!cells.exists(i * 256 + c.tag), "tag still in use");
          cells[i * 256 + c.tag] = c;
          occupied[i]++;
          total_cells++;
          if (c.kind == K_UNI) n_uni++;
          if (c.kind == K_MULTI) n_multi++;
          if (c.kind == K_BCAST) n_bcast++;
        end
        FATE_NO_BUFFER:   n_nobuf++;
        FATE_QUEUE_FULL:  n_qfull++;
        FATE_UPC_DISCARD: n_disc++;
        FATE_UNASSIGNED:  n_unass++;
        FATE_TABLE_MISS:  n_miss++;
        FATE_CONTROL:     n_ctrl++;
        default: ;
      endcase
    end
    // Each non-empty port must send a cell in the next slot.
    for (int j = 0; j < N; j++) begin
      pend[j] = 0;
      for (int c = 0; c < NCLASS; c++) if (q[j][c].size() > 0) pend[j] = 1;
    end
  endtask

  // k = 424: whole outgoing cells are in; compare header and payload.
  task automatic at_cell_done();
    cell_t c;
    logic [HDR_BITS-1:0] eh;
    for (int j = 0; j < N; j++) begin
      if (out_key[j] < 0 || !cells.exists(out_key[j])) continue;
      begin
        c = cells[out_key[j]];
        eh = {new_head(c.src, call_of(c.kind, j), j), c.hdr[11:0]};
        check(out_cell[j][CELL_BITS - 1 -: HDR_BITS] == eh,
              $sformatf("output %0d header %h expected %h", j, out_cell[j][CELL_BITS - 1 -: HDR_BITS], eh));
        check(out_cell[j][PAY_BITS - 1:0] == c.pay, $sformatf("output %0d payload", j));
        n_delivered++;
      end
    end
    for (int j = 0; j < N; j++)
      if (out_key[j] >= 0 && cells.exists(out_key[j]) && cells[out_key[j]].remaining == 0)
        cells.delete(out_key[j]);
  endtask

  task automatic finish_up();
    int left, held;
    left = 0;
    for (int j = 0; j < N; j++) for (int c = 0; c < NCLASS; c++) left += q[j][c].size();
    check(left == 0, $sformatf("%0d copies never left", left));
    held = 0;
    foreach (cells[x]) if (cells[x].remaining > 0) held++;
    check(held == 0, $sformatf("%0d cells still held", held));
    $display("cells routed %0d, copies delivered %0d", total_cells, n_delivered);
    $display("unicast %0d multicast %0d broadcast %0d recirculated reads %0d", n_uni, n_multi, n_bcast, n_recirc);
    $display("lost: no buffer %0d, queue full %0d (refused PDUs %0d); policed: tagged %0d discarded %0d",
             n_nobuf, n_qfull, n_refuse, n_tag, n_disc);
    $display("dropped: unassigned %0d no route %0d; control cells %0d", n_unass, n_miss, n_ctrl);
    $display("idle output slots %0d, lent scheduler slots %0d, one-slot delays %0d", n_idle_out, n_lent, n_delay1);
    check(n_uni > 0, "unicast happened");
    check(n_multi > 0, "multicast happened");
    check(n_bcast > 0, "broadcast happened");
    check(n_recirc > 0, "recirculated read happened");
    check(n_nobuf > 0, "input buffer full happened");
    check(n_refuse > 0 || !NEED_QFULL, "output queue full happened");
    check(n_tag > 0, "UPC tagging happened");
    check(n_disc > 0, "UPC discard happened");
    check(n_unass > 0, "unassigned cell dropped");
    check(n_miss > 0, "route table miss happened");
    check(n_ctrl > 0, "control cell handed off");
    check(n_idle_out > 0, "idle output slot happened");
    check(n_lent > 0, "window lending happened");
    check(n_delay1 > 0, "one-slot delay happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
