// vr_vfifo: one virtual FIFO queue of an output port.
//
// Stores add_in when w is high and drops the head when r is high; add_out
// always shows the head (first-word fall-through). Used as Add_FIFO (input
// port and buffer address), Call_no_FIFO (call number) and Header_FIFO (12
// kept header bits). DEPTH defaults to N*B, the number of cells the input
// buffers can hold, so a queue of that depth never overflows. A write to a
// full queue and a read of an empty one are ignored (and flagged by an
// assertion); the user checks full/empty first.
module vr_vfifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 28,
  parameter int unsigned AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic         pclk,
  input  logic         reset,
  input  logic         w,
  input  logic         r,
  input  logic [W-1:0] add_in,
  output logic [W-1:0] add_out,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  level
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_w, do_r;

  always_comb begin
    empty   = (level == '0);
    full    = (level == (AW + 1)'(DEPTH));
    do_w    = w && !full;
    do_r    = r && !empty;
    add_out = mem[rp];
  end

  always_ff @(posedge pclk) begin
    if (do_w) mem[wp] <= add_in;
  end

  always_ff @(posedge pclk) begin
    if (reset) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (do_w) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_r) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (AW + 1)'(do_w) - (AW + 1)'(do_r);
    end
  end

  assert property (@(posedge pclk) disable iff (reset) !(w && full));
  assert property (@(posedge pclk) disable iff (reset) !(r && empty));

endmodule
