// vr_vroute_fabric: switching fabric for virtual address routing.
//
// Three shared buses used in time division: the selection bus (call
// number), the address bus ({input port, buffer}) and the header bus (12
// kept header bits). Two directions share them:
//   queue update (input driven): in the window of input port i only that
//     port drives; every output port compares the PDU with its lookup table
//     and says whether it stored it (vq_accept); ack_cnt, the number of
//     output ports that stored it, goes back to the inputs.
//   connection set-up (output driven): in the slot of output port j only
//     that port drives the address bus with the address at the head of its
//     queue; conn_out tells the input ports which output column it is for.
// Bus drivers are ORed; the slot schedule makes at most one driver active
// at a time, which the assertions check. Pure combinational.
module vr_vroute_fabric
  import vr_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned B  = 7,
  parameter int unsigned PW = clog2_min1(N),
  parameter int unsigned BW = clog2_min1(B),
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic                            pclk,
  input  logic                            reset,  // only disables the checks below
  // from the input ports
  input  logic [N-1:0]                    in_valid,
  input  logic [N-1:0][CALL_W-1:0]        in_call,
  input  logic [N-1:0][KEEP_W-1:0]        in_head,
  input  logic [N-1:0][PW+BW-1:0]         in_add,
  // to the output ports
  output logic                            vq_valid,
  output logic [CALL_W-1:0]               sel_bus,
  output logic [KEEP_W-1:0]               hdr_bus,
  output logic [PW+BW-1:0]                add_bus,
  input  logic [N-1:0]                    vq_accept,
  output logic [CW-1:0]                   ack_cnt,
  // connection set-up, from the output ports
  input  logic [N-1:0]                    out_valid,
  input  logic [N-1:0][PW+BW-1:0]         out_add,
  output logic                            conn_valid,
  output logic [PW-1:0]                   conn_out
);

  always_comb begin
    vq_valid   = |in_valid;
    conn_valid = |out_valid;
    sel_bus    = '0;
    hdr_bus    = '0;
    add_bus    = '0;
    conn_out   = '0;
    ack_cnt    = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (in_valid[i]) begin
        sel_bus |= in_call[i];
        hdr_bus |= in_head[i];
        add_bus |= in_add[i];
      end
      if (out_valid[i]) begin
        add_bus  |= out_add[i];
        conn_out |= PW'(i);
      end
      ack_cnt += CW'(vq_accept[i]);
    end
  end

  // Time division: one driver per cycle, never both directions at once.
  assert property (@(posedge pclk) disable iff (reset) $onehot0(in_valid));
  assert property (@(posedge pclk) disable iff (reset) $onehot0(out_valid));
  assert property (@(posedge pclk) disable iff (reset) !(vq_valid && conn_valid));

endmodule
