// frame_check: frame alignment and data consistency check.
//
// Watches the frames the readout FSM takes out of the channel FIFOs. When a channel's frame
// header is read (hdr_chk), its frame number must equal the frame the MDC is building
// (exp_frame); when the channel's trailer is read (trl_chk), the hit count the front-end wrote
// into it must equal the number of hits actually received (cnt_nhits). Mismatches set the
// per-frame flags frame_err / count_err (cleared by clr at the start of each frame, reported in
// the MDC trailer) and the sticky per-channel mask err_mask (cleared by sticky_clr, readable as
// a status register). Flags are registered: they show the result one cycle after the check.
// The block's existence and purpose follow the published architecture; what it compares is this
// design's own reading of "frame alignment and data consistency".
module frame_check #(
  parameter int unsigned NCH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   sticky_clr,
  input  logic [$clog2(NCH)-1:0] chan,
  input  logic                   hdr_chk,
  input  logic [15:0]            hdr_frame,
  input  logic [15:0]            exp_frame,
  input  logic                   trl_chk,
  input  logic [15:0]            trl_nhits,
  input  logic [15:0]            cnt_nhits,
  output logic                   frame_err,
  output logic                   count_err,
  output logic [NCH-1:0]         err_mask
);
  logic bad_hdr, bad_trl;
  assign bad_hdr = hdr_chk && (hdr_frame != exp_frame);
  assign bad_trl = trl_chk && (trl_nhits != cnt_nhits);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_err <= 1'b0;
      count_err <= 1'b0;
      err_mask  <= '0;
    end else begin
      if (clr) begin
        frame_err <= 1'b0;
        count_err <= 1'b0;
      end else begin
        if (bad_hdr) frame_err <= 1'b1;
        if (bad_trl) count_err <= 1'b1;
      end
      if (sticky_clr) err_mask <= '0;
      else if (bad_hdr || bad_trl) err_mask[chan] <= 1'b1;
    end
  end
endmodule
