// tb_vr_output_buffer: loads a header in the connection slot and checks
// the next slot bit by bit: 28 translated bits, 12 kept bits, then the
// fabric line for the payload, tx_valid for exactly 424 bits; a load
// without a cell must give a slot with tx_valid low.
module tb_vr_output_buffer;
  import vr_pkg::*;
  logic pclk = 1'b0, reset = 1'b1;
  logic [KW-1:0] k;
  logic hclk, rst, rs, c_sig;
  logic load = 1'b0, valid = 1'b0, line = 1'b0, tx, tx_valid;
  logic [27:0] new_head = '0;
  logic [11:0] keep = '0;
  int checks = 0, failures = 0;

  vr_slot_timer u_t (.pclk, .reset, .k, .hclk, .rst, .rs, .c_sig);
  vr_output_buffer dut (.pclk, .reset, .k, .load, .valid, .new_head, .keep, .line, .tx,
                        .tx_valid);

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
    logic [39:0] exp_h;
    bit exp_v;
    int nvalid;
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    @(negedge pclk);
    exp_v = 0; exp_h = '0;
    for (int s = 0; s < 8; s++) begin
      logic [27:0] nh; logic [11:0] kp; bit v;
      nh = 28'($urandom); kp = 12'($urandom); v = (s % 3 != 2);
      nvalid = 0;
      do begin
        line = 1'($urandom);
        load = (k == 10'(CONN_START + 2));
        valid = v; new_head = nh; keep = kp;
        #1;
        if (tx_valid) nvalid++;
        if (s > 0) begin
          check(tx_valid == (exp_v && k < 424), $sformatf("slot %0d bit %0d tx_valid", s, k));
          if (exp_v && k < 40) check(tx == exp_h[39 - k], "header bit");
          else if (exp_v && k < 424) check(tx == line, "payload bit");
          else check(tx == 1'b0, "idle line");
        end
        @(negedge pclk);
      end while (k != 0);
      if (s > 0) check(nvalid == (exp_v ? 424 : 0), "424 cell bits");
      exp_v = v; exp_h = {nh, kp};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
