// tb_vr_payload_buffer: writes a random payload, reads it in two later
// slots (multicast: the ring shift must keep it), frees the buffer with the
// last read while a new payload is written into it in the same slot, and
// reads the new payload back. Checks every output bit, the copy counter and
// the free pulse.
module tb_vr_payload_buffer;
  import vr_pkg::*;
  logic pclk = 1'b0, reset = 1'b1;
  logic [KW-1:0] k;
  logic hclk, rst, rs, c_sig;
  logic d_in = 1'b0, wsel = 1'b0, cnt_load = 1'b0, r = 1'b0;
  logic [2:0] cnt_in = '0;
  logic dout, reading, free;
  logic [2:0] count;
  logic [PAY_BITS-1:0] p0, p1;
  int checks = 0, failures = 0, frees = 0;

  vr_slot_timer u_t (.pclk, .reset, .k, .hclk, .rst, .rs, .c_sig);
  vr_payload_buffer #(.CW(3)) dut (.pclk, .reset, .k, .d_in, .wsel, .cnt_load, .cnt_in,
    .r, .c_sig, .dout, .reading, .count, .free);

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

  always @(posedge pclk) if (free) frees++;

  // One slot. wr: write payload wp; rd: expect payload ep on dout;
  // load: load cnt at bit 100; req: read request at bit 432.
  task automatic slot(input bit wr, input logic [PAY_BITS-1:0] wp, input bit rd,
                      input logic [PAY_BITS-1:0] ep, input int load, input bit req,
                      input bit exp_free);
    do begin
      wsel = wr;
      d_in = (k >= 40 && k < 424) ? wp[PAY_BITS - 1 - (k - 40)] : 1'b0;
      if (rd && k >= 40 && k < 424)
        check(dout == ep[PAY_BITS - 1 - (k - 40)], $sformatf("dout bit %0d", k - 40));
      if (k >= 40 && k < 424) check(reading == rd, "reading flag");
      cnt_load = (k == 100) && (load > 0);
      cnt_in   = 3'(load);
      r        = req && (k == 432);
      #1;
      if (r) check(free == exp_free, "free pulse");
      @(negedge pclk);
    end while (k != 0);
  endtask

  initial begin
    p0 = '0; p1 = '0;
    for (int i = 0; i < PAY_BITS / 32; i++) begin
      p0 = (p0 << 32) | PAY_BITS'($urandom);
      p1 = (p1 << 32) | PAY_BITS'($urandom);
    end
    repeat (2) @(posedge pclk);
    reset <= 1'b0;
    @(negedge pclk);
    slot(1, p0, 0, '0, 3, 1, 0);      // write, 3 copies, first read request
    check(count == 2, "count after one request");
    slot(0, '0, 1, p0, 0, 1, 0);      // copy 1 out, second request
    slot(0, '0, 1, p0, 0, 0, 0);      // copy 2 out, no request
    slot(0, '0, 0, '0, 0, 1, 1);      // idle, last request frees
    check(count == 0, "count zero");
    slot(1, p1, 1, p0, 1, 1, 1);      // copy 3 out while p1 is written
    slot(0, '0, 1, p1, 0, 0, 0);      // p1 out
    check(frees == 2, "two frees");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
