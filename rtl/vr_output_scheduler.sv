// vr_output_scheduler: chooses which virtual queue of an output port sends
// its head cell in the next slot (window-based priority control).
//
// The port keeps one queue per service class, class 0 the highest. Queue
// i owns a window of WINDOW[i] consecutive slots. In a slot of its window
// the queue sends its head cell if it has one; if it is empty the slot is
// lent to the next non-empty queue after it (in cyclic class order), which
// sends exactly one cell, and the window continues with queue i in the next
// slot. When the window ends, the next class's window starts. So a queue
// that runs short of cells loses no share of its window to a full round of
// the other queues, which is the weakness of weighted round robin that the
// window-based algorithm avoids.
// The decision is taken once per slot, in this port's connection slot
// (serve high, k = CONN_START + PORT, driven by the output port): pop[q]
// then reads queue q and the window state advances. Window lengths are this
// design's choice.
module vr_output_scheduler #(
  parameter int unsigned NCLASS = 4,
  parameter logic [NCLASS-1:0][7:0] WINDOW = {8'd1, 8'd2, 8'd4, 8'd8},
  parameter int unsigned QW = (NCLASS <= 2) ? 1 : $clog2(NCLASS)
) (
  input  logic              pclk,
  input  logic              reset,
  input  logic              serve,
  input  logic [NCLASS-1:0] nonempty,
  output logic [NCLASS-1:0] pop,
  output logic              any,
  output logic [QW-1:0]     sel,
  output logic              lent,
  output logic [QW-1:0]     cur
);

  logic [7:0] used;

  function automatic logic [QW-1:0] nxt(input logic [QW-1:0] q);
    return (q == QW'(NCLASS - 1)) ? '0 : q + 1'b1;
  endfunction

  always_comb begin
    logic [QW-1:0] q;
    q    = cur;
    any  = 1'b0;
    sel  = cur;
    lent = 1'b0;
    if (nonempty[cur]) begin
      any = 1'b1;
    end else begin
      q = cur;
      for (int unsigned s = 1; s < NCLASS; s++) begin
        q = nxt(q);
        if (!any && nonempty[q]) begin
          any  = 1'b1;
          sel  = q;
          lent = 1'b1;
        end
      end
    end
    pop = '0;
    if (serve && any) pop[sel] = 1'b1;
  end

  always_ff @(posedge pclk) begin
    if (reset) begin
      cur  <= '0;
      used <= '0;
    end else if (serve) begin
      if (used + 8'd1 >= WINDOW[cur]) begin
        cur  <= nxt(cur);
        used <= '0;
      end else begin
        used <= used + 8'd1;
      end
    end
  end

endmodule
