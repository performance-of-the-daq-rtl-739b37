// tmr_reg: register protected against single event upsets by triple modular redundancy.
//
// Three copies hold the value; q is their bitwise majority. Every cycle each copy is reloaded
// with the voted value (or with d when we is high), so a flipped bit in one copy is outvoted at
// once and repaired at the next clock edge. mismatch is high while the copies disagree.
// seu_flip lets a test invert chosen bits of chosen copies at a clock edge, to show the
// correction; it is tied to zero in normal use. Timing: a write appears on q one cycle later.
// Triple modular redundancy for critical logic is named in the published design; applying it to
// the global registers in this form is this design's own choice.
module tmr_reg #(
  parameter int unsigned W   = 16,
  parameter logic [W-1:0] RST = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [W-1:0]      d,
  input  logic [2:0][W-1:0] seu_flip,
  output logic [W-1:0]      q,
  output logic              mismatch
);
  logic [2:0][W-1:0] r;

  assign q        = (r[0] & r[1]) | (r[1] & r[2]) | (r[0] & r[2]);
  assign mismatch = (r[0] != r[1]) || (r[1] != r[2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= {3{RST}};
    else for (int i = 0; i < 3; i++) r[i] <= (we ? d : q) ^ seu_flip[i];
  end
endmodule
