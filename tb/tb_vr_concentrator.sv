// tb_vr_concentrator: sets random crosspoints (several columns per buffer
// included), drives random buffer bits and compares every column with a
// reference crossbar; c_sig must clear all crosspoints.
module tb_vr_concentrator;
  localparam int N = 4, B = 7;
  logic pclk = 1'b0, reset = 1'b1, c_sig = 1'b0, rd = 1'b0;
  logic [2:0] rd_buf = '0;
  logic [1:0] rd_out = '0;
  logic [B-1:0] buf_out = '0;
  logic [N-1:0] col;
  logic [B-1:0][N-1:0] xp;
  bit m [B][N];
  int checks = 0, failures = 0;

  vr_concentrator #(.N(N), .B(B)) dut (.pclk, .reset, .c_sig, .rd, .rd_buf, .rd_out,
                                       .buf_out, .col, .xp);

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
    for (int round = 0; round < 50; round++) begin
      @(negedge pclk);
      c_sig = 1'b1;
      foreach (m[i, j]) m[i][j] = 0;
      @(negedge pclk);
      c_sig = 1'b0;
      check(xp == '0, "c_sig clears");
      repeat ($urandom_range(1, N)) begin
        rd = 1'b1; rd_buf = 3'($urandom_range(0, B - 1)); rd_out = 2'($urandom_range(0, N - 1));
        m[rd_buf][rd_out] = 1;
        @(negedge pclk);
      end
      rd = 1'b0;
      repeat (20) begin
        buf_out = B'($urandom);
        #1;
        for (int j = 0; j < N; j++) begin
          automatic bit e = 0;
          for (int i = 0; i < B; i++) e |= m[i][j] & buf_out[i];
          check(col[j] == e, $sformatf("column %0d", j));
        end
        @(negedge pclk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
