// tb_vr_header_buffer: sends random 424-bit cells bit serially and checks
// that from bit 40 to the end of the slot h_bus holds exactly the 40 header
// bits, first bit most significant, and that payload bits do not disturb it.
module tb_vr_header_buffer;
  import vr_pkg::*;
  logic pclk = 1'b0, reset = 1'b1, d_in = 1'b0;
  logic [KW-1:0] k;
  logic hclk, rst, rs, c_sig;
  logic [HDR_BITS-1:0] h_bus, hdr;
  int checks = 0, failures = 0;

  vr_slot_timer u_t (.pclk, .reset, .k, .hclk, .rst, .rs, .c_sig);
  vr_header_buffer dut (.pclk, .reset, .k, .d_in, .h_bus);

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
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    @(negedge pclk);
    for (int s = 0; s < 5; s++) begin
      hdr = {$urandom, $urandom};
      do begin
        if (k >= 40) check(h_bus == hdr, $sformatf("slot %0d bit %0d header", s, k));
        d_in = (k < 40) ? hdr[39 - k] : ((k < 424) ? 1'($urandom) : 1'b0);
        @(negedge pclk);
      end while (k != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
