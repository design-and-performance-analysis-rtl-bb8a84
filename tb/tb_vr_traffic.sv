// tb_vr_traffic: two contracts, one tagging and one discarding, plus
// headers without a contract. A reference token bucket per contract is
// advanced with the same slot starts; every search is checked for
// cell_discard, CLP and traffic_done.
module tb_vr_traffic;
  import vr_pkg::*;
  logic pclk = 1'b0, reset = 1'b1;
  logic slot_start = 1'b0, cfg_we = 1'b0, clp_in = 1'b0, traffic_search = 1'b0;
  logic [2:0] cfg_idx = '0;
  upc_entry_t cfg_entry = '0;
  logic [27:0] table_bus = '0;
  logic traffic_done, cell_discard, clp;
  int checks = 0, failures = 0;
  int tok [2], pc [2], per [2], dep [2];
  bit tagm [2];
  logic [27:0] hd [2];
  int n_tag = 0, n_disc = 0, n_pass = 0;

  vr_traffic #(.UPC_DEPTH(8)) dut (.pclk, .reset, .slot_start, .cfg_we, .cfg_idx,
    .cfg_entry, .table_bus, .clp_in, .traffic_search, .traffic_done, .cell_discard, .clp);

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
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    hd[0] = 28'h1234567; hd[1] = 28'h0abcdef;
    per[0] = 2; dep[0] = 2; tagm[0] = 1;
    per[1] = 0; dep[1] = 1; tagm[1] = 0;
    for (int c = 0; c < 2; c++) begin
      @(negedge pclk);
      cfg_we = 1'b1; cfg_idx = 3'(c);
      cfg_entry = '{valid: 1'b1, head: hd[c], period: 8'(per[c]), depth: 8'(dep[c]), tag: tagm[c]};
      tok[c] = dep[c]; pc[c] = 0;
    end
    @(negedge pclk);
    cfg_we = 1'b0;
    for (int s = 0; s < 300; s++) begin
      // slot start: refill
      slot_start = 1'b1;
      @(negedge pclk);
      slot_start = 1'b0;
      for (int c = 0; c < 2; c++) begin
        if (pc[c] >= per[c]) begin pc[c] = 0; if (tok[c] < dep[c]) tok[c]++; end
        else pc[c]++;
      end
      // zero to three cells in this slot
      repeat ($urandom_range(0, 3)) begin
        automatic int c = $urandom_range(0, 2);
        automatic bit cin = 1'($urandom);
        bit exp_disc, exp_clp;
        table_bus = (c < 2) ? hd[c] : 28'h7777777;
        clp_in = cin; traffic_search = 1'b1;
        if (c == 2 || tok[c] > 0) begin
          exp_disc = 0; exp_clp = cin; n_pass++;
          if (c < 2) tok[c]--;
        end else if (tagm[c]) begin
          exp_disc = 0; exp_clp = 1; n_tag++;
        end else begin
          exp_disc = 1; exp_clp = cin; n_disc++;
        end
        @(negedge pclk);
        traffic_search = 1'b0;
        check(traffic_done, "traffic_done");
        check(cell_discard == exp_disc, $sformatf("slot %0d discard", s));
        check(clp == exp_clp, $sformatf("slot %0d clp", s));
      end
    end
    check(n_tag > 0 && n_disc > 0 && n_pass > 0, "tag, discard and pass all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
