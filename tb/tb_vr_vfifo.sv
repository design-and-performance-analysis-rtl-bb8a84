// tb_vr_vfifo: random writes and reads against a reference queue, with
// the queue driven both full and empty; checks head, empty, full and level.
module tb_vr_vfifo;
  localparam int W = 7, D = 28;
  logic pclk = 1'b0, reset = 1'b1, w = 1'b0, r = 1'b0;
  logic [W-1:0] add_in = '0, add_out;
  logic empty, full;
  logic [5:0] level;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  vr_vfifo #(.W(W), .DEPTH(D)) dut (.pclk, .reset, .w, .r, .add_in, .add_out, .empty,
                                    .full, .level);

  always #5 pclk = ~pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge pclk);
      check(int'(level) == q.size(), "level");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      if (q.size() > 0) check(add_out == q[0], "head");
      if (full) fulls++;
      bias = ((t / 300) % 2 == 0) ? 70 : 30;
      w = (q.size() < D) && ($urandom_range(0, 99) < bias);
      r = (q.size() > 0) && ($urandom_range(0, 99) < 100 - bias);
      add_in = W'($urandom);
      if (r) void'(q.pop_front());
      if (w) q.push_back(add_in);
    end
    check(fulls > 0, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
