// toast_link_model: behavioural stand-in for one serial data link of a ToASt front-end chip.
//
// Sends 32-bit words most significant bit first, one bit per clock, changing on the falling
// clock edge. Words pushed through push/word are queued and sent in order; when the queue is
// empty the idle pattern is sent. SKEW sets how many bits of the first word are left out, so the
// receiver starts at an arbitrary bit position and has to align. With en low the line stays
// quiet (a disabled link). busy is high while queued words remain.
module toast_link_model
  import mdc_pkg::*;
#(
  parameter int SKEW = 0
) (
  input  logic        clk,
  input  logic        en,
  input  logic        push,
  input  logic [31:0] word,
  output logic        sdo,
  output logic        busy
);
  logic [31:0] q[$];
  logic [31:0] cur = TOAST_IDLE;
  int          bidx = 31 - SKEW;

  assign busy = (q.size() != 0);
  initial sdo = 1'b0;

  always @(posedge clk) if (push) q.push_back(word);

  always @(negedge clk) begin
    if (!en) sdo <= 1'b0;
    else begin
      sdo <= cur[bidx];
      if (bidx == 0) begin
        bidx = 31;
        cur  = (q.size() != 0) ? q.pop_front() : TOAST_IDLE;
      end else bidx = bidx - 1;
    end
  end
endmodule
