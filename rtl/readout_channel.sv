// readout_channel: one input channel of the MDC.
//
// Chain: activity detector -> SERDES (chan_deser) -> word alignment (chan_align) -> control FSM
// -> channel FIFO (sync_fifo) -> readout port.
// * Activity detection: the link is taken as enabled when its serial line toggles; after
//   ACT_TIMEOUT cycles without a transition (and whenever ch_en is low) the channel drops to a
//   power-saving state in which SERDES and aligner are held.
// * Control FSM: once locked, idle words are discarded and only event data are stored: the
//   frame header, the hits and the frame trailer. A frame header is stored only if at least two
//   entries are free, otherwise the whole frame is dropped. A hit is stored only if at least two
//   entries are free, so the trailer always fits; a dropped hit sets ovf for one cycle. The trailer
//   keeps the hit count sent by the front-end, so the readout logic detects the loss.
// * Readout port: first-word-fall-through dout/empty/rd_en; frame_ready is high while at least
//   one complete frame (trailer stored) is waiting.
// The chain of blocks and the "event data only" rule follow the published architecture; the
// activity timeout, the drop policy and the FIFO depth are this design's own choices.
module readout_channel
  import mdc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 64,
  parameter int unsigned ACT_TIMEOUT = 256,
  localparam int unsigned AW = $clog2(FIFO_DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ch_en,
  input  logic        sdin,
  output logic        active,
  output logic        locked,
  output logic        ovf,
  input  logic        rd_en,
  output logic [31:0] dout,
  output logic        empty,
  output logic        frame_ready
);
  // ---------------- activity detector ----------------
  logic                          sdin_q;
  logic [$clog2(ACT_TIMEOUT):0]  idle_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sdin_q   <= 1'b0;
      idle_cnt <= '0;
      active   <= 1'b0;
    end else begin
      sdin_q <= sdin;
      if (!ch_en) begin
        active   <= 1'b0;
        idle_cnt <= '0;
      end else if (sdin != sdin_q) begin
        active   <= 1'b1;
        idle_cnt <= '0;
      end else if (idle_cnt == ($clog2(ACT_TIMEOUT)+1)'(ACT_TIMEOUT)) begin
        active <= 1'b0;
      end else begin
        idle_cnt <= idle_cnt + 1'b1;
      end
    end
  end

  // ---------------- SERDES and alignment ----------------
  logic [31:0] word;
  logic        word_valid, bitslip;

  chan_deser u_deser (
    .clk, .rst_n, .en(active), .sdin(sdin_q), .bitslip, .word, .word_valid
  );
  chan_align u_align (
    .clk, .rst_n, .en(active), .word, .word_valid, .bitslip, .locked
  );

  // ---------------- control FSM ----------------
  logic          in_frame;
  logic          wr_en;
  logic [AW:0]   level;
  logic          full;
  logic          is_hdr, is_hit, is_trl;
  logic          room2;
  logic [AW:0]   nframes;
  logic          push_trl, pop_trl;

  assign is_hdr = (word[31:28] == T_FHDR) && (word[27:16] == 12'h000);
  assign is_trl = (word[31:28] == T_FTRL) && (word[27:16] == 12'h000);
  assign is_hit = (word[31:30] == T_HIT);
  assign room2  = (level <= (AW+1)'(FIFO_DEPTH - 2));

  always_comb begin
    wr_en = 1'b0;
    ovf   = 1'b0;
    if (locked && word_valid) begin
      if (is_hdr)                  wr_en = room2;
      else if (is_hit && in_frame) begin
        wr_en = room2;
        ovf   = !room2;
      end
      else if (is_trl && in_frame) wr_en = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_frame <= 1'b0;
    else if (!locked) in_frame <= 1'b0;
    else if (word_valid) begin
      if (is_hdr)      in_frame <= room2;
      else if (is_trl) in_frame <= 1'b0;
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en, .din(word), .rd_en, .dout, .empty, .full, .level
  );

  // ---------------- readout FSM: complete-frame bookkeeping ----------------
  assign push_trl = wr_en && is_trl;
  assign pop_trl  = rd_en && !empty && (dout[31:28] == T_FTRL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nframes <= '0;
    else nframes <= nframes + (AW+1)'(push_trl) - (AW+1)'(pop_trl);
  end
  assign frame_ready = (nframes != '0);
endmodule
