// elink_rx_model: behavioural receiver for one upstream e-link, as the lpGBT and the
// off-detector card would see it.
//
// Collects the two bits per clock (din[1] first), finds the symbol boundary on the K28.5
// comma, decodes every 10-bit symbol with the reference tables and assembles each run of four
// data symbols into a 32-bit word (first byte = most significant). Every decoded word is
// appended to the queue words; symbols that decode to nothing count in bad_symbols, and a word
// cut short by a comma counts in bad_words. locked rises at the first comma.
module elink_rx_model
  import ref8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] din
);
  logic [31:0] words[$];
  int          word_cycle[$];
  int          bad_symbols = 0, bad_words = 0, ncommas = 0;
  logic        locked = 1'b0;
  logic [19:0] hist = '0;
  int          nbits = 0, cyc = 0, nbytes = 0;
  logic [31:0] acc;

  task automatic take_bit(input logic b);
    logic [9:0] d;
    hist = {hist[18:0], b};
    if (!locked) begin
      if (hist[9:0] == 10'b0011111010 || hist[9:0] == 10'b1100000101) begin
        locked = 1'b1;
        nbits  = 0;
        ncommas++;
      end
      return;
    end
    nbits++;
    if (nbits == 10) begin
      nbits = 0;
      d = dec(hist[9:0]);
      if (!d[9]) bad_symbols++;
      else if (d[8]) begin
        ncommas++;
        if (nbytes != 0) bad_words++;
        nbytes = 0;
      end else begin
        acc = {acc[23:0], d[7:0]};
        nbytes++;
        if (nbytes == 4) begin
          words.push_back(acc);
          word_cycle.push_back(cyc);
          nbytes = 0;
        end
      end
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      take_bit(din[1]);
      take_bit(din[0]);
    end
  end
endmodule
