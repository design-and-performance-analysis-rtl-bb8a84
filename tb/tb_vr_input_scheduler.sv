// tb_vr_input_scheduler: random sequences of "cell stored" and "buffer
// freed" events; after each the idle address must be the lowest-numbered
// buffer that a reference bitmap says is empty, and idle_valid must be low
// only when every buffer is full.
module tb_vr_input_scheduler;
  localparam int B = 7;
  logic pclk = 1'b0, reset = 1'b1;
  logic free_valid = 1'b0, valid_cell = 1'b0;
  logic [2:0] free_addr = '0, cell_addr = '0;
  logic idle_valid;
  logic [2:0] idle_addr;
  logic [B-1:0] iar;
  bit   model [B];
  int checks = 0, failures = 0;

  vr_input_scheduler #(.B(B)) dut (.pclk, .reset, .free_valid, .free_addr,
    .valid_cell, .cell_addr, .idle_valid, .idle_addr, .iar);

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
    int lowest, full_seen;
    full_seen = 0;
    foreach (model[i]) model[i] = 1;
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge pclk);
      lowest = -1;
      for (int i = B - 1; i >= 0; i--) if (model[i]) lowest = i;
      check(idle_valid == (lowest >= 0), "idle_valid");
      if (lowest >= 0) check(int'(idle_addr) == lowest,
                             $sformatf("idle %0d expected %0d", idle_addr, lowest));
      else full_seen++;
      free_valid = 1'b0; valid_cell = 1'b0;
      // store into the idle buffer (like the input port does) or free one
      if (lowest >= 0 && ($urandom_range(0, 99) < 60)) begin
        valid_cell = 1'b1; cell_addr = idle_addr; model[lowest] = 0;
      end else begin
        automatic int f = $urandom_range(0, B - 1);
        if (!model[f]) begin free_valid = 1'b1; free_addr = 3'(f); model[f] = 1; end
      end
    end
    check(full_seen > 0, "all buffers full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
