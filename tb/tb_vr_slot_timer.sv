// tb_vr_slot_timer: checks the slot counter against the slot format:
// 512 pclk periods per slot, hclk high for exactly 424 of them, RS at bit
// 40, c_sig at bit 424 and rst at bit 0, over three slots after reset.
module tb_vr_slot_timer;
  import vr_pkg::*;
  logic pclk = 1'b0, reset = 1'b1;
  logic [KW-1:0] k;
  logic hclk, rst, rs, c_sig;
  int checks = 0, failures = 0;

  vr_slot_timer dut (.pclk, .reset, .k, .hclk, .rst, .rs, .c_sig);

  always #5 pclk = ~pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi, rs_at, cs_at, rst_n_seen, exp_k;
    repeat (3) @(posedge pclk);
    reset <= 1'b0;
    @(negedge pclk);
    exp_k = 0;
    for (int s = 0; s < 3; s++) begin
      hi = 0; rs_at = -1; cs_at = -1; rst_n_seen = 0;
      for (int b = 0; b < 512; b++) begin
        check(int'(k) == b, $sformatf("k=%0d expected %0d", k, b));
        if (hclk) hi++;
        if (rs) rs_at = b;
        if (c_sig) cs_at = b;
        if (rst) rst_n_seen++;
        check(hclk == (b < 424), "hclk level");
        @(negedge pclk);
      end
      check(hi == 424, $sformatf("hclk high %0d periods", hi));
      check(rs_at == 40, "RS at bit 40");
      check(cs_at == 424, "c_sig at bit 424");
      check(rst_n_seen == 1, "one rst per slot");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
