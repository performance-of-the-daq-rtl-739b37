// elink_rx_down: downstream e-link receiver (commands from the counting room via the lpGBT).
//
// The downstream line is sampled once per 160 MHz clock. It rests low; a command is a start bit
// (1), 32 command bits, most significant first, and one even-parity bit over the 32 bits.
// A complete command appears on cmd with cmd_valid for one cycle, two cycles after its parity
// bit entered the block; a parity failure raises par_err instead, so the command logic can flag the
// transmission error to the counting room. The line format is this design's own choice: the
// published design names the downstream e-link logic but not its framing.
module elink_rx_down (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sdin,
  output logic [31:0] cmd,
  output logic        cmd_valid,
  output logic        par_err
);
  logic        s_q;
  logic        busy;
  logic [5:0]  nbit;
  logic [32:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q       <= 1'b0;
      busy      <= 1'b0;
      nbit      <= '0;
      sh        <= '0;
      cmd       <= '0;
      cmd_valid <= 1'b0;
      par_err   <= 1'b0;
    end else begin
      s_q       <= sdin;
      cmd_valid <= 1'b0;
      par_err   <= 1'b0;
      if (!busy) begin
        if (s_q) begin
          busy <= 1'b1;
          nbit <= '0;
        end
      end else begin
        sh   <= {sh[31:0], s_q};
        nbit <= nbit + 1'b1;
        if (nbit == 6'd32) begin
          busy <= 1'b0;
          if (^{sh[31:0], s_q}) par_err <= 1'b1;
          else begin
            cmd       <= sh[31:0];
            cmd_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
