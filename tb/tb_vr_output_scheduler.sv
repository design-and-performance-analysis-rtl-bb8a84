// tb_vr_output_scheduler: random queue occupancy. A reference model of the
// window-based discipline (queue i owns WINDOW[i] slots; an empty owner
// lends its slot to the next non-empty queue for one cell) predicts which
// queue is popped and whether the slot was lent. Also checks the served
// shares when all queues stay busy: they must equal the window lengths.
module tb_vr_output_scheduler;
  localparam int NC = 4;
  localparam logic [NC-1:0][7:0] WIN = {8'd1, 8'd2, 8'd4, 8'd8};
  logic pclk = 1'b0, reset = 1'b1, serve = 1'b0;
  logic [NC-1:0] nonempty = '0, pop;
  logic any, lent;
  logic [1:0] sel, cur;
  int checks = 0, failures = 0, lents = 0;
  int served [NC];

  vr_output_scheduler #(.NCLASS(NC), .WINDOW(WIN)) dut (.pclk, .reset, .serve, .nonempty,
    .pop, .any, .sel, .lent, .cur);

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
    int owner, used, exp_q;
    bit exp_lent;
    owner = 0; used = 0;
    foreach (served[i]) served[i] = 0;
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge pclk);
      nonempty = (t < 1500) ? NC'($urandom) : '1;
      serve = 1'b1;
      exp_q = -1; exp_lent = 0;
      if (nonempty[owner]) exp_q = owner;
      else
        for (int s = 1; s < NC; s++)
          if (exp_q < 0 && nonempty[(owner + s) % NC]) begin
            exp_q = (owner + s) % NC; exp_lent = 1;
          end
      #1;
      check(any == (exp_q >= 0), "any");
      if (exp_q >= 0) begin
        check(pop == NC'(1 << exp_q), $sformatf("t=%0d pop %b expected queue %0d", t, pop, exp_q));
        check(lent == exp_lent, "lent");
        if (lent) lents++;
        if (t >= 1500) served[exp_q]++;
      end else check(pop == '0, "no pop");
      used++;
      if (used >= WIN[owner]) begin owner = (owner + 1) % NC; used = 0; end
    end
    check(lents > 0, "lending happened");
    for (int i = 0; i < NC; i++)
      check(served[i] * 15 == 1500 * WIN[i], $sformatf("share of queue %0d: %0d", i, served[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
