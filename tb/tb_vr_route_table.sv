// tb_vr_route_table: fills the table with unicast and multicast entries
// (one incoming header appearing in several entries) and checks, for each
// searched header, table_error, the match count, the listed call numbers in
// entry order and the one-cycle table_done, against a reference list.
module tb_vr_route_table;
  import vr_pkg::*;
  localparam int D = 16, NO = 4;
  logic pclk = 1'b0, reset = 1'b1;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_idx = '0;
  rt_entry_t cfg_entry = '0;
  logic [27:0] table_bus = '0;
  logic table_search = 1'b0, table_done, table_error;
  logic [2:0] count;
  logic [NO-1:0][3:0] table_out;
  rt_entry_t ref_t [D];
  int checks = 0, failures = 0;

  vr_route_table #(.RT_DEPTH(D), .NOUT(NO)) dut (.pclk, .reset, .cfg_we, .cfg_idx,
    .cfg_entry, .table_bus, .table_search, .table_done, .table_error, .count, .table_out);

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

  task automatic search(input logic [27:0] h);
    int n; logic [3:0] exp [$];
    exp = {};
    for (int e = 0; e < D; e++)
      if (ref_t[e].valid && ref_t[e].head == h && exp.size() < NO) exp.push_back(ref_t[e].call);
    @(negedge pclk);
    table_bus = h; table_search = 1'b1;
    @(negedge pclk);
    table_search = 1'b0;
    check(table_done, "table_done");
    check(table_error == (exp.size() == 0), $sformatf("table_error for %h", h));
    check(int'(count) == exp.size(), $sformatf("count %0d expected %0d", count, exp.size()));
    for (int i = 0; i < exp.size(); i++)
      check(table_out[i] == exp[i], $sformatf("call %0d: %h expected %h", i, table_out[i], exp[i]));
    @(negedge pclk);
    check(!table_done, "table_done one cycle");
  endtask

  initial begin
    logic [27:0] heads [6];
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    foreach (ref_t[e]) ref_t[e] = '0;
    foreach (heads[i]) heads[i] = 28'($urandom);
    // entries: heads[0] unicast, heads[1] multicast to 3, heads[2] to 5 (capped)
    for (int e = 0; e < D; e++) begin
      rt_entry_t en;
      en.valid = (e != 15);
      en.call  = 4'(15 - e);
      en.head  = (e == 0) ? heads[0] : (e < 4) ? heads[1] : (e < 9) ? heads[2] : heads[3 + e % 3];
      @(negedge pclk);
      cfg_we = 1'b1; cfg_idx = 4'(e); cfg_entry = en; ref_t[e] = en;
    end
    @(negedge pclk);
    cfg_we = 1'b0;
    foreach (heads[i]) search(heads[i]);
    for (int i = 0; i < 20; i++) search(28'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
