// sync_fifo: synchronous first-word-fall-through FIFO.
//
// Used for the per-channel FIFOs of the input channels and for the 32 x 256 main FIFO of the
// MDC. In silicon these memories are generated low-leakage SRAM macros; here the storage is a
// plain register array, so the module is portable and synthesizable anywhere.
// Interface: push with wr_en/din, pop with rd_en; dout always shows the oldest word while
// empty is low (first-word-fall-through), so a pop takes effect in the same cycle the word is
// consumed. level counts stored words, 0..DEPTH. A push into a full FIFO or a pop from an empty
// one is ignored (the assertions flag it in simulation). Push and pop in the same cycle are
// allowed. Timing: a word pushed in cycle n is visible at dout in cycle n+1.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign empty = (level == '0);
  assign full  = (level == (AW+1)'(DEPTH));
  assign dout  = mem[rptr];

  always_ff @(posedge clk) if (do_wr) mem[wptr] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

`ifndef SYNTHESIS
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("sync_fifo: push into full FIFO");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("sync_fifo: pop from empty FIFO");
`endif
endmodule
