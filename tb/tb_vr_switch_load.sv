// tb_vr_switch_load: the switch under the uniform Bernoulli traffic of its
// performance study, with the cell loss measured against published figures.
//
// Four 2x2 switches with two buffers per input port run side by side at
// loads 0.3, 0.5, 0.7 and 0.9. Their output queues hold N*b = 4 entries, so
// every loss is an input buffer being full. Their cell loss probability
// (cells lost / cells offered) must not exceed the simulated values
// published for this configuration (0.00785, 0.03789, 0.09950, 0.18391),
// allowing 4 standard deviations of the estimate plus 15%. Those figures
// come from a queue model in which a buffer whose cell leaves in a slot
// cannot take the cell arriving in that same slot. This switch frees a
// buffer when its last copy is claimed, one slot earlier, and writes the
// new cell in as the old one shifts out. Its loss is therefore lower:
// about half at load 0.9.
// An 8x8 switch with 8 buffers per port runs at load 0.9 beside them, for
// throughput and delay. For every switch the testbench checks:
//   - every delivered cell is intact and arrived in order;
//   - offered = delivered + lost after a drain phase;
//   - the minimum delay is one slot.
// The measured figures are printed.
module tb_vr_switch_load;
  import vr_pkg::*;

  localparam int SLOTS = 20000, DRAIN = 60;
  localparam int NL = 4;
  localparam int LOADS [NL] = '{300, 500, 700, 900};
  localparam real REF [NL] = '{0.00785, 0.03789, 0.09950, 0.18391};

  logic pclk = 1'b0, reset = 1'b1, start = 1'b0;
  always #5 pclk = ~pclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat ((SLOTS + DRAIN + 4) * SLOT_BITS) @(posedge pclk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---- four 2x2, b = 2 switches
  logic   [NL-1:0] done2;
  int     off2 [NL], lost2 [NL], del2 [NL], mind2 [NL], err2 [NL];
  longint dsum2 [NL];
  for (genvar g = 0; g < NL; g++) begin : g2
    logic [KW-1:0] k;
    logic hclk;
    logic [1:0] rx, tx, tx_valid, rt_we, oc_we, upc_we, q_loss, lent, coll, ctrl_valid;
    logic [3:0] rt_idx, oc_idx;
    rt_entry_t rt_entry;
    oc_entry_t oc_entry;
    fate_e [1:0] fate;
    cell_type_e [1:0] ctrl_type;
    logic [1:0][HDR_BITS-1:0] ctrl_head;
    assign upc_we = '0;
    vr_switch #(.N(2), .B(2)) dut (
      .pclk, .reset, .k, .hclk, .rx, .tx, .tx_valid, .rt_we, .rt_idx, .rt_entry,
      .upc_we, .upc_idx('0), .upc_entry('0), .oc_we, .oc_idx, .oc_entry, .fate,
      .ctrl_valid, .ctrl_type, .ctrl_head, .queue_loss(q_loss), .lent, .collision(coll)
    );
    vr_tb_load #(.N(2), .SLOTS(SLOTS), .DRAIN(DRAIN), .P_PERMIL(LOADS[g])) src (
      .pclk, .reset, .k, .start, .done(done2[g]), .rx, .tx, .tx_valid, .rt_we, .rt_idx,
      .rt_entry, .oc_we, .oc_idx, .oc_entry, .fate, .offered(off2[g]), .lost(lost2[g]),
      .delivered(del2[g]), .delay_sum(dsum2[g]), .min_delay(mind2[g]), .errors(err2[g])
    );
  end

  // ---- one 8x8, b = 8 switch at load 0.9
  localparam int N8 = 8;
  logic done8;
  int off8, lost8, del8, mind8, err8;
  longint dsum8;
  logic [KW-1:0] k8;
  logic hclk8;
  logic [N8-1:0] rx8, tx8, txv8, rt_we8, oc_we8, ql8, lent8, coll8, cv8;
  logic [3:0] rt_idx8, oc_idx8;
  rt_entry_t rt_entry8;
  oc_entry_t oc_entry8;
  fate_e [N8-1:0] fate8;
  cell_type_e [N8-1:0] ct8;
  logic [N8-1:0][HDR_BITS-1:0] ch8;
  vr_switch #(.N(N8), .B(8)) dut8 (
    .pclk, .reset, .k(k8), .hclk(hclk8), .rx(rx8), .tx(tx8), .tx_valid(txv8), .rt_we(rt_we8),
    .rt_idx(rt_idx8), .rt_entry(rt_entry8), .upc_we('0), .upc_idx('0), .upc_entry('0),
    .oc_we(oc_we8), .oc_idx(oc_idx8), .oc_entry(oc_entry8), .fate(fate8), .ctrl_valid(cv8),
    .ctrl_type(ct8), .ctrl_head(ch8), .queue_loss(ql8), .lent(lent8), .collision(coll8)
  );
  vr_tb_load #(.N(N8), .SLOTS(SLOTS / 4), .DRAIN(DRAIN), .P_PERMIL(900)) src8 (
    .pclk, .reset, .k(k8), .start, .done(done8), .rx(rx8), .tx(tx8), .tx_valid(txv8),
    .rt_we(rt_we8), .rt_idx(rt_idx8), .rt_entry(rt_entry8), .oc_we(oc_we8), .oc_idx(oc_idx8),
    .oc_entry(oc_entry8), .fate(fate8), .offered(off8), .lost(lost8), .delivered(del8),
    .delay_sum(dsum8), .min_delay(mind8), .errors(err8)
  );

  initial begin
    repeat (4) @(posedge pclk);
    @(negedge pclk);
    reset = 1'b0;
    start = 1'b1;
    wait (&done2 && done8);
    for (int g = 0; g < NL; g++) begin
      automatic real clp = real'(lost2[g]) / real'(off2[g]);
      automatic real sd = $sqrt(REF[g] * (1.0 - REF[g]) / real'(off2[g]));
      $display("2x2 b=2 load %0.1f: offered %0d lost %0d CLP %0.5f (published %0.5f), mean delay %0.3f slots, min %0d",
               LOADS[g] / 1000.0, off2[g], lost2[g], clp, REF[g], real'(dsum2[g]) / real'(del2[g]), mind2[g]);
      check(err2[g] == 0, "2x2: delivered cells intact and in order");
      check(off2[g] == del2[g] + lost2[g], "2x2: offered = delivered + lost");
      check(mind2[g] == 1, "2x2: minimum delay one slot");
      check(clp <= REF[g] * 1.15 + 4.0 * sd, "2x2: cell loss probability no worse than published");
    end
    $display("8x8 b=8 load 0.9: offered %0d lost %0d CLP %0.5f, throughput %0.4f, mean delay %0.3f slots, min %0d",
             off8, lost8, real'(lost8) / real'(off8), real'(del8) / real'(N8 * SLOTS / 4),
             real'(dsum8) / real'(del8), mind8);
    check(err8 == 0, "8x8: delivered cells intact and in order");
    check(off8 == del8 + lost8, "8x8: offered = delivered + lost");
    check(mind8 == 1, "8x8: minimum delay one slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
