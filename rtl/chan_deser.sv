// chan_deser: serial-to-parallel converter (SERDES) of one ToASt input link.
//
// The ToASt link runs at 160 Mb/s, one bit per 160 MHz clock, most significant bit first.
// Bits are shifted into a 32-bit register; every 32 bits a word is presented with word_valid for
// one cycle. A bitslip request (one-cycle pulse) moves the word boundary by one bit: the bit
// counter is held for one cycle, so the next word is taken one bit later. The aligner drives
// bitslip until the word boundary matches the link's idle pattern. en low holds the block
// (power-saving state of an inactive link). The bitslip mechanism follows the published channel
// diagram; the counting scheme is this design's own.
module chan_deser (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        sdin,
  input  logic        bitslip,
  output logic [31:0] word,
  output logic        word_valid
);
  logic [31:0] shreg;
  logic [4:0]  bitcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      bitcnt     <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (en) begin
        shreg <= {shreg[30:0], sdin};
        if (!bitslip) begin
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 5'd31) begin
            word       <= {shreg[30:0], sdin};
            word_valid <= 1'b1;
          end
        end
      end else begin
        bitcnt <= '0;
      end
    end
  end
endmodule
