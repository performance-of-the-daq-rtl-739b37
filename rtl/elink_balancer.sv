// elink_balancer: upstream e-link logic with data balancing.
//
// Takes complete frames out of the main FIFO and hands their words to the two upstream e-link
// transmitters. Per frame it decides the mode from the main FIFO level at the frame's start:
// * level below split_th (little data): the whole frame goes out on link 0 alone, so header and
//   trailer are sent only once;
// * level at or above split_th (high occupancy): the MDC header and MDC trailer are sent on both
//   links, and each ToASt block (ToASt header .. ToASt trailer) goes to the link that has so far
//   carried fewer words of this frame, which splits the payload evenly.
// split_th = 0 therefore always splits; split_th above the FIFO depth never does.
// Between frames, pending slow-control readback words (sc_*) are sent on link 0; they take
// precedence over the next frame.
// frame_done from the readout FSM counts complete frames in the main FIFO; a frame is started
// when one is complete, or when the main FIFO is full: a frame larger than the FIFO is then
// streamed out while the readout FSM is still writing it (its level, the full FIFO, selects
// split mode unless split_th exceeds the FIFO depth). Word streams use valid/ready; a word moves when both are high.
// Main FIFO reads are first-word-fall-through (mf_rd pops the word shown on mf_dout).
// The two modes follow the published description; the threshold rule and block-wise greedy split
// are this design's own choices.
module elink_balancer
  import mdc_pkg::*;
#(
  parameter int unsigned LW = 9      // width of the main FIFO level
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      mf_dout,
  input  logic             mf_empty,
  input  logic [LW-1:0]    mf_level,
  input  logic             mf_full,
  output logic             mf_rd,
  input  logic             frame_done,
  input  logic [15:0]      split_th,
  input  logic             sc_valid,
  input  logic [31:0]      sc_word,
  output logic             sc_ready,
  output logic [1:0]       tx_valid,
  output logic [1:0][31:0] tx_word,
  input  logic [1:0]       tx_ready,
  output logic             split_mode,
  output logic             frame_sent
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_BODY} st_e;
  st_e          st;
  logic [15:0]  nfr;
  logic [15:0]  cnt0, cnt1;
  logic         cur;
  logic         head_thdr, head_mtrl;
  logic         pick;
  logic         go_both, go_one;
  logic         both_rdy;

  assign head_thdr = mf_dout[31:28] == U_TST_HDR;
  assign head_mtrl = mf_dout[31:28] == U_MDC_TRL;
  assign pick      = split_mode && (cnt1 < cnt0);
  assign both_rdy  = split_mode ? (tx_ready == 2'b11) : tx_ready[0];

  always_comb begin
    tx_valid   = '0;
    tx_word    = '{default: '0};
    mf_rd      = 1'b0;
    sc_ready   = 1'b0;
    go_both    = 1'b0;
    go_one     = 1'b0;
    frame_sent = 1'b0;
    unique case (st)
      S_IDLE: if (sc_valid) begin
        tx_valid[0] = 1'b1;
        tx_word[0]  = sc_word;
        sc_ready    = tx_ready[0];
      end
      S_HDR: if (!mf_empty && both_rdy) go_both = 1'b1;
      S_BODY: if (!mf_empty) begin
        if (head_mtrl) begin
          go_both    = both_rdy;
          frame_sent = both_rdy;
        end else if (head_thdr) begin
          go_one = tx_ready[pick];
        end else begin
          go_one = tx_ready[cur];
        end
      end
      default: ;
    endcase
    if (go_both) begin
      tx_valid[0] = 1'b1;
      tx_word[0]  = mf_dout;
      tx_valid[1] = split_mode;
      tx_word[1]  = mf_dout;
      mf_rd       = 1'b1;
    end
    if (go_one) begin
      tx_valid[head_thdr ? pick : cur] = 1'b1;
      tx_word[head_thdr ? pick : cur]  = mf_dout;
      mf_rd = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      nfr        <= '0;
      cnt0       <= '0;
      cnt1       <= '0;
      cur        <= 1'b0;
      split_mode <= 1'b0;
    end else begin
      nfr <= nfr + 16'(frame_done) - 16'(frame_sent);
      unique case (st)
        S_IDLE: if (!sc_valid && (nfr != '0 || mf_full)) begin
          split_mode <= (32'(mf_level) >= 32'(split_th));
          cnt0       <= '0;
          cnt1       <= '0;
          cur        <= 1'b0;
          st         <= S_HDR;
        end
        S_HDR: if (go_both) st <= S_BODY;
        S_BODY: begin
          if (frame_sent) st <= S_IDLE;
          else if (go_one) begin
            if (head_thdr) cur <= pick;
            if ((head_thdr ? pick : cur) == 1'b1) cnt1 <= cnt1 + 1'b1;
            else cnt0 <= cnt0 + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
