// tb_vr_output_controller: writes lookup entries for several (input port,
// call number) keys and checks write_signal, the translated header and the
// class for every key, including keys that differ only in the port.
module tb_vr_output_controller;
  import vr_pkg::*;
  logic pclk = 1'b0, reset = 1'b1, cfg_we = 1'b0;
  logic [3:0] cfg_idx = '0;
  oc_entry_t cfg_entry = '0;
  logic [1:0] in_port = '0;
  logic [3:0] call = '0;
  logic write_signal;
  logic [27:0] data_out;
  logic [1:0] cls;
  oc_entry_t m [16];
  int checks = 0, failures = 0;

  vr_output_controller #(.N(4), .OC_DEPTH(16), .NCLASS(4)) dut (.pclk, .reset, .cfg_we,
    .cfg_idx, .cfg_entry, .in_port, .call, .write_signal, .data_out, .cls);

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
    for (int e = 0; e < 16; e++) begin
      m[e] = '{valid: (e % 5 != 4), in_port: 8'(e % 4), call: 4'(e / 2),
               cls: 2'($urandom), new_head: 28'($urandom)};
      @(negedge pclk);
      cfg_we = 1'b1; cfg_idx = 4'(e); cfg_entry = m[e];
    end
    @(negedge pclk);
    cfg_we = 1'b0;
    for (int p = 0; p < 4; p++)
      for (int c = 0; c < 16; c++) begin
        automatic int hit = -1;
        for (int e = 15; e >= 0; e--)
          if (m[e].valid && m[e].in_port == 8'(p) && m[e].call == 4'(c)) hit = e;
        in_port = 2'(p); call = 4'(c);
        #1;
        check(write_signal == (hit >= 0), $sformatf("write_signal port %0d call %0d", p, c));
        if (hit >= 0) begin
          check(data_out == m[hit].new_head, "new header");
          check(cls == m[hit].cls, "class");
        end
        @(negedge pclk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
