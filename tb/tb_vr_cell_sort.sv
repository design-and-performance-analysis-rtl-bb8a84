// tb_vr_cell_sort: presents headers built from the pre-assigned UNI values
// (unassigned, signalling, segment and end-to-end VP OAM, ILMI), VC OAM
// payload types and ordinary user headers, and checks the class and the
// table_search / traffic_search / unassigned_cell strobes one bit after RS.
module tb_vr_cell_sort;
  import vr_pkg::*;
  logic pclk = 1'b0, reset = 1'b1;
  logic [KW-1:0] k;
  logic hclk, rst, rs, c_sig;
  logic [31:0] h_bus = '0;
  cell_type_e cell_type;
  logic done, unassigned_cell, table_search, traffic_search;
  int checks = 0, failures = 0;

  vr_slot_timer u_t (.pclk, .reset, .k, .hclk, .rst, .rs, .c_sig);
  vr_cell_sort dut (.pclk, .reset, .k, .h_bus, .cell_type, .done, .unassigned_cell,
                    .table_search, .traffic_search);

  always #5 pclk = ~pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mk(input int gfc, vpi, vci, pt, clp);
    return {4'(gfc), 8'(vpi), 16'(vci), 3'(pt), 1'(clp)};
  endfunction

  task automatic run(input logic [31:0] h, input cell_type_e exp);
    while (k != KW'(K_RS)) @(negedge pclk);
    h_bus = h;
    @(negedge pclk);
    check(done, "done");
    check(cell_type == exp, $sformatf("header %h: type %s expected %s", h, cell_type.name(), exp.name()));
    check(table_search == (exp == CELL_USER || exp == CELL_OAM), "table_search");
    check(traffic_search == (exp == CELL_USER), "traffic_search");
    check(unassigned_cell == (exp == CELL_UNASSIGNED), "unassigned_cell");
    @(negedge pclk);
    check(!done && !table_search && !traffic_search, "strobes last one bit");
  endtask

  initial begin
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    @(negedge pclk);
    run(mk(0, 0, 0, 0, 0), CELL_UNASSIGNED);
    run(mk(0, 0, 0, 5, 0), CELL_UNASSIGNED);       // xxx bits
    run(mk(0, 0, 5, 2, 0), CELL_SIGNALLING);
    run(mk(0, 0, 5, 1, 1), CELL_SIGNALLING);
    run(mk(0, 8'h5a, 3, 2, 1), CELL_OAM);          // segment VP OAM
    run(mk(0, 8'h33, 4, 0, 0), CELL_OAM);          // end-to-end VP OAM
    run(mk(0, 0, 16, 6, 0), CELL_OAM);             // ILMI
    run(mk(0, 7, 100, 4, 0), CELL_OAM);            // segment VC OAM
    run(mk(0, 7, 100, 5, 0), CELL_OAM);            // end-to-end VC OAM
    run(mk(0, 7, 100, 0, 0), CELL_USER);
    run(mk(3, 7, 100, 3, 1), CELL_USER);
    run(mk(0, 1, 5, 0, 0), CELL_USER);             // VCI 5 on VPI 1 is user
    run(mk(0, 2, 16, 0, 0), CELL_USER);            // VCI 16 on VPI 2 is user
    for (int i = 0; i < 60; i++) begin
      automatic int vpi = $urandom_range(1, 255), vci = $urandom_range(32, 65535), pt = $urandom_range(0, 3);
      run(mk($urandom_range(0, 15), vpi, vci, pt, $urandom_range(0, 1)), CELL_USER);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
