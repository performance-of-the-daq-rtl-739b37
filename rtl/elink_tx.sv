// elink_tx: upstream e-link transmitter (DDR parallel-to-serial logic with 8b/10b encoding).
//
// Accepts 32-bit words (valid/ready), sends each as four bytes, most significant byte first,
// each byte 8b/10b-encoded. While no word is waiting the comma K28.5 is sent, so a receiver can
// find the symbol boundary; every word is exactly four data symbols, so after a comma the word
// boundary is known too. The 10-bit symbols are shifted out two bits per 160 MHz clock: dout[1]
// is meant for the rising and dout[0] for the falling clock edge of a DDR output cell, giving the
// 320 Mb/s line rate of an lpGBT upstream e-link. One symbol takes 5 clocks, one word 20 clocks
// (256 Mb/s of payload after 8b/10b coding). ready is high when the word buffer is
// empty; a word accepted while the last byte of the previous one is on the line follows it
// without a gap. The line rate, DDR scheme and 8b/10b coding follow the published design; the
// byte order, the idle comma and the buffer scheme are this design's own.
module elink_tx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic [31:0] word,
  output logic        ready,
  output logic [1:0]  dout
);
  logic [31:0] wbuf;
  logic [2:0]  nbytes;
  logic [2:0]  phase;
  logic [9:0]  sh;
  logic        load;
  logic        k;
  logic [7:0]  byte_in;
  logic [9:0]  code;
  logic        rd;

  assign ready   = (nbytes == 3'd0);
  assign load    = (phase == 3'd4);
  assign k       = (nbytes == 3'd0);
  assign byte_in = k ? 8'hBC : wbuf[31:24];     // 8'hBC = K28.5
  assign dout    = sh[9:8];

  enc8b10b u_enc (.clk, .rst_n, .en(load), .k, .din(byte_in), .code, .rd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbuf   <= '0;
      nbytes <= '0;
      phase  <= '0;
      sh     <= '0;
    end else begin
      if (load) begin
        sh    <= code;
        phase <= '0;
      end else begin
        sh    <= {sh[7:0], 2'b00};
        phase <= phase + 1'b1;
      end
      if (valid && ready) begin
        wbuf   <= word;
        nbytes <= 3'd4;
      end else if (load && nbytes != 3'd0) begin
        wbuf   <= {wbuf[23:0], 8'h00};
        nbytes <= nbytes - 1'b1;
      end
    end
  end
endmodule
