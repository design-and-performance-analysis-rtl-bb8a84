// tb_vr_switch: end-to-end test of the VR switch with 4 ports, 4 input
// buffers per port and output queues only 3 cells deep, so that both loss
// mechanisms (input buffers full, output queue full) occur often.
//
// The stimulus and the scoreboard are in vr_tb_env (see there): random
// unicast, multicast and broadcast traffic, control, unassigned and
// unroutable cells, two policed connections, a hot-spot phase and a drain
// phase. Every header and payload bit, every fate report, every queue
// refusal and the per-queue delivery order are checked against the
// environment's own model; every mechanism must occur at least once.
module tb_vr_switch;
  import vr_pkg::*;

  localparam int N = 4, B = 4, DEPTH = 3, NCLASS = 4;

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

  vr_switch #(.N(N), .B(B), .DEPTH(DEPTH), .NCLASS(NCLASS)) dut (.*);

  vr_tb_env #(.N(N), .B(B), .DEPTH(DEPTH), .NCLASS(NCLASS), .LOAD_SLOTS(160),
              .HOT_SLOTS(60), .DRAIN_SLOTS(150), .LOAD_PCT(85), .NEED_QFULL(1'b1)) env (.*);
endmodule
