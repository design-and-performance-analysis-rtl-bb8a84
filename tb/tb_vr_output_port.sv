// tb_vr_output_port: self-checking test of one output port (port 1 of 4,
// four classes, class queues 3 cells deep) with the testbench acting as the
// input ports and the cell fabric.
//
// Lookup table: key (input i, call 1) -> class (i+1)%4, key (i, call 9) ->
// class (i+9)%4, new header VPI 50+i / VCI call*16+i; call 3 has no entry.
// In the queue-update phase random PDUs arrive; accept must be high when
// the key is known and its class queue has room, queue_loss when the key
// is known and the queue is full, neither for an unknown key. In the
// connection phase (k = 432 + 1) the port must offer an address whenever a
// queue holds one, and it must be the oldest entry of one of the class
// queues. In the next slot tx must carry the translated header
// (new 28 bits + the PDU's 12 kept bits) at k = 0..39 and then the bits
// the testbench drives on the fabric line; tx_valid marks exactly these
// slots. Arrival rates alternate between overload (queues fill, window
// order decides) and light load (owners empty, slots are lent). Under
// overload class 0 (8 of 15 window slots) must be served more often than
// class 3 (1 of 15).
module tb_vr_output_port;
  import vr_pkg::*;

  localparam int N = 4, B = 7, PORT = 1, NCLASS = 4, DEPTH = 3, PW = 2, BW = 3;

  logic pclk = 1'b0, reset = 1'b1;
  logic [KW-1:0] k;
  logic hclk, rst, rs, c_sig;
  logic oc_we = 1'b0;
  logic [3:0] oc_idx = '0;
  oc_entry_t oc_entry = '0;
  logic vq_valid = 1'b0;
  logic [CALL_W-1:0] sel_bus = '0;
  logic [KEEP_W-1:0] hdr_bus = '0;
  logic [PW+BW-1:0] add_bus = '0;
  logic accept, queue_loss, conn_valid, tx, tx_valid, served_lent;
  logic [PW+BW-1:0] conn_addr;
  logic line = 1'b0;

  always #5 pclk = ~pclk;

  vr_slot_timer u_t (.pclk, .reset, .k, .hclk, .rst, .rs, .c_sig);
  vr_output_port #(.N(N), .B(B), .PORT(PORT), .NCLASS(NCLASS), .DEPTH(DEPTH)) dut (.*);

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

  typedef struct { logic [PW+BW-1:0] addr; logic [HDR_BITS-1:0] hdr; } ent_t;
  ent_t q [NCLASS][$];
  logic [HDR_BITS-1:0] out_hdr;
  bit   sending = 0;
  int   n_acc = 0, n_loss = 0, n_miss = 0, n_lent = 0, n_idle = 0;
  int   served [NCLASS];

  initial begin
    int e, pct, i, call, c;
    foreach (served[x]) served[x] = 0;
    repeat (3) @(negedge pclk);
    reset = 1'b0;
    e = 0;
    for (int ii = 0; ii < N; ii++)
      for (int x = 0; x < 2; x++) begin
        automatic int cc = x ? 9 : 1;
        oc_we = 1; oc_idx = 4'(e++);
        oc_entry = '{valid: 1'b1, in_port: 8'(ii), call: 4'(cc), cls: 2'((ii + cc) % NCLASS),
                     new_head: {4'd0, 8'(50 + ii), 16'(cc * 16 + ii)}};
        @(negedge pclk);
      end
    oc_we = 0;
    while (k != 0) @(negedge pclk);
    for (int slot = 0; slot < 300; slot++) begin
      pct = ((slot / 40) % 2) ? 5 : 60;
      do begin
        line = (k >= HDR_BITS && k < CELL_BITS) ? 1'($urandom) : 1'b0;
        vq_valid = 1'b0;
        if (k >= VQ_START && k < VQ_START + N * N && $urandom_range(0, 99) < pct) begin
          i = $urandom_range(0, N - 1);
          call = ($urandom_range(0, 9) == 0) ? 3 : ($urandom_range(0, 1) ? 9 : 1);
          vq_valid = 1'b1;
          sel_bus = CALL_W'(call);
          hdr_bus = KEEP_W'($urandom);
          add_bus = {PW'(i), BW'($urandom_range(0, B - 1))};
        end
        #1;
        if (k < CELL_BITS) begin
          check(tx_valid == sending, "tx_valid");
          if (sending)
            check(tx == ((k < HDR_BITS) ? out_hdr[HDR_BITS - 1 - k] : line), "tx bit");
        end else check(!tx_valid, "tx_valid after the cell");
        if (k == KW'(K_CSIG)) begin
          if (!sending) n_idle++;
          sending = 0;
        end
        if (vq_valid) begin
          c = (i + call) % NCLASS;
          if (call == 3) begin
            check(!accept && !queue_loss, "unknown key ignored");
            n_miss++;
          end else if (q[c].size() >= DEPTH) begin
            check(!accept && queue_loss, "queue full");
            n_loss++;
          end else begin
            check(accept && !queue_loss, "accept");
            q[c].push_back('{add_bus, {4'd0, 8'(50 + i), 16'(call * 16 + i), hdr_bus}});
            n_acc++;
          end
        end else check(!accept && !queue_loss, "no PDU, no answer");
        if (served_lent) n_lent++;
        if (k == KW'(CONN_START + PORT)) begin
          automatic int found = -1;
          automatic bit any = 0;
          for (int cc = 0; cc < NCLASS; cc++) if (q[cc].size() > 0) any = 1;
          check(conn_valid == any, "offers an address when a queue holds one");
          if (conn_valid)
            for (int cc = 0; cc < NCLASS; cc++)
              if (found < 0 && q[cc].size() > 0 && q[cc][0].addr == conn_addr) found = cc;
          if (conn_valid) begin
            check(found >= 0, "address is the head of a class queue");
            if (found >= 0) begin
              out_hdr = q[found][0].hdr;
              void'(q[found].pop_front());
              sending = 1;
              if (pct > 50) served[found]++;
            end
          end
        end else check(!conn_valid, "address only in its own connection cycle");
        @(negedge pclk);
      end while (k != 0);
    end
    $display("accepted %0d, queue full %0d, unknown %0d, lent %0d, idle slots %0d, served per class under load %0d %0d %0d %0d",
             n_acc, n_loss, n_miss, n_lent, n_idle, served[0], served[1], served[2], served[3]);
    check(n_loss > 0 && n_miss > 0 && n_lent > 0 && n_idle > 0, "all mechanisms seen");
    check(served[0] > served[3], "class 0 served more often than class 3 under load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
