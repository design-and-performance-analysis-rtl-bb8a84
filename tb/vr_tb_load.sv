// vr_tb_load: uniform Bernoulli traffic source and monitor for load tests
// of vr_switch (the traffic model of the switch's performance study).
//
// Every input has one unicast connection to every output (VPI 10 / VCI
// 100+j -> call j -> new header VPI 1 / VCI 16*i+j, class 0). In each slot
// each input receives a cell with probability P_PERMIL/1000, addressed to
// an output chosen uniformly; otherwise it receives an unassigned cell. The
// payload carries the input, the arrival slot and a sequence number, with
// a check word. The monitor counts offered, lost (input buffer full or
// queue full, from the fate reports) and delivered cells, and the delay of
// every delivered cell in slots. It checks that every delivered cell is
// intact, came through the right connection, in order per connection,
// waited at least one slot, and that after a drain phase nothing is lost
// without a report. Results are left in the outputs for the testbench to
// compare with expected figures.
module vr_tb_load
  import vr_pkg::*;
#(
  parameter int N        = 2,
  parameter int SLOTS    = 1000,
  parameter int DRAIN    = 100,
  parameter int P_PERMIL = 500
) (
  input  logic                       pclk,
  input  logic                       reset,
  input  logic [KW-1:0]              k,
  input  logic                       start,
  output logic                       done,
  output logic [N-1:0]               rx,
  input  logic [N-1:0]               tx,
  input  logic [N-1:0]               tx_valid,
  output logic [N-1:0]               rt_we,
  output logic [3:0]                 rt_idx,
  output rt_entry_t                  rt_entry,
  output logic [N-1:0]               oc_we,
  output logic [3:0]                 oc_idx,
  output oc_entry_t                  oc_entry,
  input  fate_e [N-1:0]              fate,
  output int                         offered,
  output int                         lost,
  output int                         delivered,
  output longint                     delay_sum,
  output int                         min_delay,
  output int                         errors
);

  logic [HDR_BITS-1:0]  hdr [N];
  logic [PAY_BITS-1:0]  pay [N];
  logic [CELL_BITS-1:0] cap [N];
  bit                   busy [N];
  int                   last_seq [N][N];
  int                   seq [N];
  int                   slot;

  initial begin
    done = 1'b0; rx = '0; rt_we = '0; oc_we = '0; rt_idx = '0; oc_idx = '0;
    rt_entry = '0; oc_entry = '0;
    offered = 0; lost = 0; delivered = 0; delay_sum = 0; min_delay = 1 << 30; errors = 0;
    foreach (seq[i]) seq[i] = 0;
    foreach (last_seq[i, j]) last_seq[i][j] = -1;
    wait (start);
    @(negedge pclk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        rt_we = '0; rt_we[i] = 1'b1; rt_idx = 4'(j);
        rt_entry = '{valid: 1'b1, head: {4'd0, 8'd10, 16'(100 + j)}, call: 4'(j)};
        oc_we = '0; oc_we[j] = 1'b1; oc_idx = 4'(i);
        oc_entry = '{valid: 1'b1, in_port: 8'(i), call: 4'(j), cls: 2'd0,
                     new_head: {4'd0, 8'd1, 16'(16 * i + j)}};
        @(negedge pclk);
      end
    rt_we = '0; oc_we = '0;
    while (k != 0) @(negedge pclk);
    for (slot = 0; slot < SLOTS + DRAIN; slot++) begin
      for (int i = 0; i < N; i++) begin
        hdr[i] = '0;
        pay[i] = '0;
        if (slot < SLOTS && $urandom_range(0, 999) < P_PERMIL) begin
          automatic int j = $urandom_range(0, N - 1);
          hdr[i][39:12] = {4'd0, 8'd10, 16'(100 + j)};
          hdr[i][7:0] = 8'(seq[i]);
          pay[i][383:352] = 32'(slot);
          pay[i][351:336] = 16'(i);
          pay[i][335:320] = 16'(seq[i]);
          pay[i][319:288] = ~{32'(slot)} ^ {16'(i), 16'(seq[i])};
          for (int w = 0; w < 9; w++) pay[i][w * 32 +: 32] = $urandom;
          seq[i]++;
          offered++;
        end
      end
      do begin
        for (int i = 0; i < N; i++)
          rx[i] = (k < HDR_BITS) ? hdr[i][HDR_BITS - 1 - k]
                : (k < CELL_BITS) ? pay[i][PAY_BITS - 1 - (k - HDR_BITS)] : 1'b0;
        #1;
        for (int j = 0; j < N; j++) begin
          if (k == 0) busy[j] = tx_valid[j];
          if (k < CELL_BITS && tx_valid[j]) cap[j][CELL_BITS - 1 - k] = tx[j];
        end
        if (k == KW'(VQ_START + N * N))
          for (int i = 0; i < N; i++)
            if (fate[i] == FATE_NO_BUFFER || fate[i] == FATE_QUEUE_FULL) lost++;
        if (k == KW'(CELL_BITS))
          for (int j = 0; j < N; j++) if (busy[j]) monitor(j);
        @(negedge pclk);
      end while (k != 0);
    end
    done = 1'b1;
  end

  task automatic monitor(input int j);
    int src, s, arr, d;
    logic [PAY_BITS-1:0] p;
    p   = cap[j][PAY_BITS-1:0];
    arr = int'(p[383:352]);
    src = int'(p[351:336]);
    s   = int'(p[335:320]);
    if (p[319:288] != (~{32'(arr)} ^ {16'(src), 16'(s)}) || src >= N
        || cap[j][CELL_BITS-1 -: 28] != {4'd0, 8'd1, 16'(16 * src + j)}
        || cap[j][PAY_BITS +: 8] != 8'(s)) begin
      errors++;
      return;
    end
    if (s <= last_seq[src][j]) errors++;
    last_seq[src][j] = s;
    d = slot - arr;
    if (d < 1) errors++;
    delivered++;
    delay_sum += d;
    if (d < min_delay) min_delay = d;
  endtask

endmodule
