// tb_vr_cell_fabric: random crossbar set-ups with at most one driver per
// line must deliver the driving concentrator's column bit on every line;
// set-ups with two drivers on a line must raise collision on that line.
module tb_vr_cell_fabric;
  localparam int N = 4;
  logic pclk = 1'b0;
  logic reset = 1'b0;  // the checks inside the fabric stay armed
  logic [N-1:0][N-1:0] col, drive;
  logic [N-1:0] line, collision;
  int checks = 0, failures = 0;

  vr_cell_fabric #(.N(N)) dut (.pclk, .reset, .col, .drive, .line, .collision);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int owner [N];
      col = '0; drive = '0;
      for (int j = 0; j < N; j++) begin
        owner[j] = $urandom_range(0, N);   // N: line idle
        if (owner[j] < N) drive[owner[j]][j] = 1'b1;
      end
      col = {$urandom};
      #1;
      for (int j = 0; j < N; j++) begin
        check(line[j] == ((owner[j] < N) ? col[owner[j]][j] : 1'b0), $sformatf("line %0d", j));
        check(!collision[j], "no collision");
      end
    end
    // deliberate double driver on line 2 (collision expected, no assertion
    // clock edge is given so the check is purely the flag)
    drive = '0; drive[0][2] = 1'b1; drive[3][2] = 1'b1;
    #1;
    check(collision == 4'b0100, "collision on line 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
