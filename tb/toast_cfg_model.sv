// toast_cfg_model: behavioural stand-in for the configuration interface of several ToASt chips
// sharing one configuration line.
//
// Receives frames start(1), rw, chip[3:0], addr[7:0], data[15:0] on cfg_tx (one bit per DIV
// clocks, sampled mid-bit). A write to chip 4'hF is taken by every present chip. A read makes the
// addressed chip answer on cfg_rx, two bit periods after the frame: start(1) and 16 data bits.
// Chips not set in PRESENT never answer. For tests, bad_writes[c] makes the next writes to chip c
// store a corrupted value (one per count), which the read-back must catch.
module toast_cfg_model #(
  parameter int          DIV     = 16,
  parameter logic [15:0] PRESENT = 16'h0003
) (
  input  logic clk,
  input  logic cfg_tx,
  output logic cfg_rx
);
  logic [15:0] regs[16][256];
  int          bad_writes[16];
  int          nwrites = 0, nreads = 0;

  initial begin
    cfg_rx = 1'b0;
    for (int c = 0; c < 16; c++) begin
      bad_writes[c] = 0;
      for (int a = 0; a < 256; a++) regs[c][a] = 16'h0000;
    end
  end

  task automatic store(input int c, input logic [7:0] a, input logic [15:0] d);
    if (!PRESENT[c]) return;
    if (bad_writes[c] > 0) begin
      bad_writes[c]--;
      regs[c][a] = d ^ 16'h0100;
    end else regs[c][a] = d;
  endtask

  // clocked receiver / responder
  typedef enum {M_IDLE, M_RX, M_GAP, M_TX} mst_e;
  mst_e        mst = M_IDLE;
  int          cnt = 0, nb = 0;
  logic [28:0] f;
  logic [16:0] r;

  always @(posedge clk) begin
    case (mst)
      M_IDLE: if (cfg_tx) begin mst <= M_RX; cnt <= 0; nb <= 0; end
      M_RX: begin
        cnt <= cnt + 1;
        // sample bit k (k = 1..29 after the start bit) in its middle
        if (cnt == DIV / 2 + DIV * (nb + 1) - 1) begin
          f  = {f[27:0], cfg_tx};
          nb <= nb + 1;
          if (nb == 28) begin
            if (f[28]) begin
              nwrites++;
              if (f[27:24] == 4'hF) for (int c = 0; c < 16; c++) store(c, f[23:16], f[15:0]);
              else store(int'(f[27:24]), f[23:16], f[15:0]);
              mst <= M_GAP;
              cnt <= 0;
              r   <= '0;
            end else begin
              nreads++;
              r   <= PRESENT[f[27:24]] ? {1'b1, regs[f[27:24]][f[23:16]]} : 17'h0;
              mst <= M_GAP;
              cnt <= 0;
            end
          end
        end
      end
      M_GAP: begin    // rest of the last bit, then two bit periods for a read answer
        cnt <= cnt + 1;
        if (r[16] == 1'b0 && cnt == DIV / 2) mst <= M_IDLE;
        else if (r[16] && cnt == DIV / 2 + 2 * DIV) begin mst <= M_TX; cnt <= 0; nb <= 0; end
      end
      M_TX: begin
        cfg_rx <= r[16 - nb];
        cnt    <= cnt + 1;
        if (cnt == DIV - 1) begin
          cnt <= 0;
          nb  <= nb + 1;
          if (nb == 16) begin mst <= M_IDLE; cfg_rx <= 1'b0; end
        end
      end
    endcase
  end
endmodule
