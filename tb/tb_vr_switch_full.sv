// tb_vr_switch_full: end-to-end test of the VR switch at its full size
// (every parameter at its default: 4x4, 7 input buffers per port, four
// service classes, output queues N*B = 28 cells deep).
//
// Uses the same stimulus and scoreboard as tb_vr_switch (vr_tb_env). With
// queues as deep as all input buffers together an output queue can never
// overflow, so that mechanism is not required here; everything else
// (unicast, multicast, broadcast, recirculated reads, input buffer loss,
// policing, drops, control hand-off, window lending, minimum delay, work
// conservation, per-queue order, every header and payload bit) is checked.
module tb_vr_switch_full;
  import vr_pkg::*;

  localparam int N = 4;

  logic                       pclk = 1'b0;
  logic                       reset;
  logic [KW-1:0]              k;
  logic                       hclk;
  logic [N-1:0]               rx, tx, tx_valid;
  logic [N-1:0]               rt_we, upc_we, oc_we;
  logic [3:0]                 rt_idx, oc_idx;
  logic [2:0]                 upc_idx;
  rt_entry_t                  rt_entry;
  upc_entry_t                 upc_entry;
  oc_entry_t                  oc_entry;
  fate_e [N-1:0]              fate;
  logic [N-1:0]               ctrl_valid;
  cell_type_e [N-1:0]         ctrl_type;
  logic [N-1:0][HDR_BITS-1:0] ctrl_head;
  logic [N-1:0]               queue_loss, lent, collision;

  always #5 pclk = ~pclk;

  vr_switch dut (.*);

  vr_tb_env env (.*);
endmodule
