// tb_vr_vroute_fabric: one input port at a time drives a PDU; the buses
// must carry exactly that PDU and ack_cnt the number of accepting outputs.
// One output port at a time drives a connection address; the address bus
// and conn_out must carry it and its index.
module tb_vr_vroute_fabric;
  localparam int N = 4;
  logic pclk = 1'b0;
  logic reset = 1'b0;  // the checks inside the fabric stay armed
  logic [N-1:0] in_valid = '0, vq_accept = '0, out_valid = '0;
  logic [N-1:0][3:0] in_call = '0;
  logic [N-1:0][11:0] in_head = '0;
  logic [N-1:0][4:0] in_add = '0, out_add = '0;
  logic vq_valid, conn_valid;
  logic [3:0] sel_bus;
  logic [11:0] hdr_bus;
  logic [4:0] add_bus;
  logic [2:0] ack_cnt;
  logic [1:0] conn_out;
  int checks = 0, failures = 0;

  vr_vroute_fabric #(.N(N), .B(7)) dut (.pclk, .reset, .in_valid, .in_call, .in_head, .in_add,
    .vq_valid, .sel_bus, .hdr_bus, .add_bus, .vq_accept, .ack_cnt, .out_valid, .out_add,
    .conn_valid, .conn_out);

  always #5 pclk = ~pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      automatic int p = $urandom_range(0, N - 1);
      @(negedge pclk);
      in_call = {$urandom}; in_head = {$urandom, $urandom}; in_add = {$urandom};
      out_add = {$urandom};
      in_valid = '0; out_valid = '0;
      vq_accept = N'($urandom);
      if (t % 2 == 0) in_valid[p] = 1'b1; else out_valid[p] = 1'b1;
      #1;
      if (t % 2 == 0) begin
        check(vq_valid && !conn_valid, "queue-update direction");
        check(sel_bus == in_call[p] && hdr_bus == in_head[p] && add_bus == in_add[p], "PDU");
        check(int'(ack_cnt) == $countones(vq_accept), "ack count");
      end else begin
        check(conn_valid && !vq_valid, "connection direction");
        check(add_bus == out_add[p] && int'(conn_out) == p, "connection address");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
