// readout_mux: readout FSM and "intelligent" multiplexer of the MDC.
//
// Builds one output frame per front-end frame and writes it into the main FIFO:
//   MDC header, then for every channel that has hits: ToASt header (channel, frame), the hits,
//   ToASt trailer (hit count, CRC-8 of the hits), and finally the MDC trailer with status.
// A frame is started when every active channel holds a complete frame, or when TIMEOUT cycles
// have passed since the first channel became ready (the missing channels are skipped and the
// timeout bit is set). Channels are visited in round-robin order; the starting channel advances
// by one every frame so that no channel is always served first or last. Channels whose frame
// holds no hits are not written at all (zero suppression). A full main FIFO stalls the FSM.
// One word moves per clock cycle; a skipped channel costs one cycle.
// Status bits of the MDC trailer: [0] frame number mismatch, [1] hit count mismatch (hits were
// lost), [2] channel FIFO overflow during this frame, [3] timeout, [11:4] channels with hits.
// The frame layout and round-robin order follow the published description; the start rule,
// timeout, status layout, word encodings and CRC polynomial are this design's own choices.
module readout_mux
  import mdc_pkg::*;
#(
  parameter int unsigned NCH     = 16,
  parameter int unsigned TIMEOUT = 8192,
  localparam int unsigned CW = $clog2(NCH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sync_rst,      // restart frame numbering
  input  logic [NCH-1:0]        ch_active,     // enabled, active and locked channels
  input  logic [NCH-1:0]        ch_ready,      // channel holds a complete frame
  input  logic [NCH-1:0]        ch_empty,
  input  logic [NCH-1:0][31:0]  ch_dout,
  input  logic [NCH-1:0]        ch_ovf,
  output logic [NCH-1:0]        ch_rd_en,
  output logic                  mf_wr,
  output logic [31:0]           mf_din,
  input  logic                  mf_full,
  output logic                  frame_done,    // MDC trailer written
  input  logic                  sticky_clr,
  output logic [NCH-1:0]        err_mask,
  output logic [15:0]           frame_no
);
  typedef enum logic [2:0] {S_WAIT, S_MHDR, S_SCAN, S_PEEK, S_HITS, S_MTRL} st_e;
  st_e                  st;
  logic [NCH-1:0]       sel;
  logic [CW-1:0]        idx, rr_start;
  logic [CW:0]          nvisit;
  logic [$clog2(TIMEOUT+1)-1:0] tmo;
  logic                 tmo_flag, ovf_flag;
  logic [7:0]           nwith;
  logic [7:0]           crc;
  logic [15:0]          nhits;
  logic [31:0]          head;
  logic                 head_hdr, head_hit, head_trl;
  logic                 clr_chk, hdr_chk, trl_chk;
  logic                 frame_err, count_err;
  logic [NCH-1:0]       ready_act;

  assign head      = ch_dout[idx];
  assign head_hdr  = head[31:28] == T_FHDR;
  assign head_trl  = head[31:28] == T_FTRL;
  assign head_hit  = head[31:30] == T_HIT;
  assign ready_act = ch_ready & ch_active;

  // combinational outputs of the FSM
  always_comb begin
    mf_wr    = 1'b0;
    mf_din   = '0;
    ch_rd_en = '0;
    hdr_chk  = 1'b0;
    trl_chk  = 1'b0;
    unique case (st)
      S_MHDR: begin
        mf_wr  = !mf_full;
        mf_din = {U_MDC_HDR, 12'h000, frame_no};
      end
      S_SCAN: if (sel[idx] && !ch_empty[idx]) begin
        ch_rd_en[idx] = 1'b1;              // consume the channel's frame header
        hdr_chk       = 1'b1;
      end
      S_PEEK: if (!ch_empty[idx]) begin
        if (head_trl) begin                // no hits: zero suppression
          ch_rd_en[idx] = 1'b1;
          trl_chk       = 1'b1;
        end else if (head_hit) begin       // open the ToASt block
          mf_wr  = !mf_full;
          mf_din = {U_TST_HDR, 8'h00, 4'(idx), frame_no};
        end else begin
          ch_rd_en[idx] = 1'b1;            // stray header: drop it
        end
      end
      S_HITS: if (!ch_empty[idx] && !mf_full) begin
        if (head_hit) begin
          mf_wr         = 1'b1;
          mf_din        = head;
          ch_rd_en[idx] = 1'b1;
        end else if (head_trl) begin
          mf_wr         = 1'b1;
          mf_din        = {U_TST_TRL, 4'h0, crc, nhits};
          ch_rd_en[idx] = 1'b1;
          trl_chk       = 1'b1;
        end else begin
          ch_rd_en[idx] = 1'b1;            // stray header: drop it
        end
      end
      S_MTRL: begin
        mf_wr  = !mf_full;
        mf_din = {U_MDC_TRL, nwith, tmo_flag, ovf_flag, count_err, frame_err, frame_no};
      end
      default: ;
    endcase
  end

  assign clr_chk    = (st == S_WAIT);
  assign frame_done = (st == S_MTRL) && !mf_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_WAIT;
      sel      <= '0;
      idx      <= '0;
      rr_start <= '0;
      nvisit   <= '0;
      tmo      <= '0;
      tmo_flag <= 1'b0;
      ovf_flag <= 1'b0;
      nwith    <= '0;
      crc      <= '0;
      nhits    <= '0;
      frame_no <= '0;
    end else begin
      if (|ch_ovf) ovf_flag <= 1'b1;
      unique case (st)
        S_WAIT: begin
          if (sync_rst) frame_no <= '0;
          if (ready_act == '0) tmo <= '0;
          else if (ready_act == ch_active || tmo == ($bits(tmo))'(TIMEOUT)) begin
            sel      <= ready_act;
            tmo_flag <= (ready_act != ch_active);
            nwith    <= '0;
            st       <= S_MHDR;
          end else tmo <= tmo + 1'b1;
        end
        S_MHDR: if (!mf_full) begin
          idx    <= rr_start;
          nvisit <= '0;
          st     <= S_SCAN;
        end
        S_SCAN: begin
          if (sel[idx] && !ch_empty[idx]) begin
            crc   <= '0;
            nhits <= '0;
            st    <= S_PEEK;
          end else if (nvisit == (CW+1)'(NCH - 1)) st <= S_MTRL;
          else begin
            idx    <= idx + 1'b1;
            nvisit <= nvisit + 1'b1;
          end
        end
        S_PEEK: if (!ch_empty[idx]) begin
          if (head_trl) begin
            if (nvisit == (CW+1)'(NCH - 1)) st <= S_MTRL;
            else begin
              idx    <= idx + 1'b1;
              nvisit <= nvisit + 1'b1;
              st     <= S_SCAN;
            end
          end else if (head_hit && !mf_full) begin
            nwith <= nwith + 1'b1;
            st    <= S_HITS;
          end
        end
        S_HITS: if (!ch_empty[idx] && !mf_full) begin
          if (head_hit) begin
            crc   <= crc8_word(crc, head);
            nhits <= nhits + 1'b1;
          end else if (head_trl) begin
            if (nvisit == (CW+1)'(NCH - 1)) st <= S_MTRL;
            else begin
              idx    <= idx + 1'b1;
              nvisit <= nvisit + 1'b1;
              st     <= S_SCAN;
            end
          end
        end
        S_MTRL: if (!mf_full) begin
          frame_no <= frame_no + 1'b1;
          rr_start <= rr_start + 1'b1;
          ovf_flag <= |ch_ovf;
          tmo      <= '0;
          st       <= S_WAIT;
        end
        default: st <= S_WAIT;
      endcase
    end
  end

  frame_check #(.NCH(NCH)) u_check (
    .clk, .rst_n, .clr(clr_chk), .sticky_clr, .chan(idx),
    .hdr_chk, .hdr_frame(head[15:0]), .exp_frame(frame_no),
    .trl_chk, .trl_nhits(head[15:0]), .cnt_nhits(nhits),
    .frame_err, .count_err, .err_mask
  );
endmodule
