// mdc_top: Module Data Concentrator (MDC) of a double-sided microstrip detector module.
//
// The MDC sits on the detector module between up to 16 serial links of ToASt front-end chips
// and an lpGBT transceiver. Each input channel deserializes and aligns its 160 Mb/s link and
// keeps only event data in its channel FIFO. The readout FSM visits the channels round-robin and
// builds one frame per front-end frame in the 32 x 256 main FIFO (MDC header, a header/hits/
// trailer block per channel with hits, MDC trailer). The e-link upstream logic sends frames over
// one or, at high occupancy, both 320 Mb/s DDR upstream e-links, 8b/10b coded; a 64-word FIFO in
// front of each transmitter lets both links send at once. A frame larger than the main FIFO is
// streamed out while it is still being built. Commands arrive
// over the downstream e-link; the command block holds the global registers, answers reads,
// flags bad commands, and hands verified configuration sequences to the ToASt configuration
// block, which writes, reads back and rewrites front-end registers. The calibration block
// sends programmable test pulse trains to all front-end chips.
// Ports: clk is the 160 MHz lpGBT clock, rst_n the power-on reset (active low, asynchronous
// assert). ch_rx are the serial front-end links, elink_down the downstream command line,
// elink_up[i] the two bits per clock of upstream link i ([1] for the rising, [0] for the
// falling edge of the DDR output cell). cfg_tx/cfg_rx form the shared front-end configuration
// line, sync_reset and test_pulse go to all front-end chips. clk_skew carries the programmed
// skew setting for the clock outputs; the delay cells that apply it, the sLVS pads and the
// DDR output cells are outside this RTL.
// The block structure follows the published MDC architecture; the word formats, command set,
// the per-link FIFOs and all sizes that are not the 16 channels, the 32 x 256 main FIFO and the
// link rates are this design's own choices.
module mdc_top
  import mdc_pkg::*;
#(
  parameter int unsigned NCH             = 16,
  parameter int unsigned CH_FIFO_DEPTH   = 64,
  parameter int unsigned MAIN_FIFO_DEPTH = 256,
  parameter int unsigned ACT_TIMEOUT     = 256,
  parameter int unsigned FRAME_TIMEOUT   = 8192,
  parameter int unsigned TP_PERIOD       = 4096,
  parameter int unsigned CFG_DIV         = 16,
  parameter int unsigned LINK_FIFO_DEPTH = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NCH-1:0]  ch_rx,
  input  logic            elink_down,
  output logic [1:0][1:0] elink_up,
  output logic            cfg_tx,
  input  logic            cfg_rx,
  output logic            sync_reset,
  output logic            test_pulse,
  output logic [15:0]     clk_skew,
  output logic [NCH-1:0]  ch_locked,
  output logic [NCH-1:0]  ch_active
);
  localparam int unsigned MLW = $clog2(MAIN_FIFO_DEPTH) + 1;

  gregs_t regs;

  // ---------------- input channels ----------------
  logic [NCH-1:0]       ch_ready, ch_empty, ch_ovf, ch_rd_en;
  logic [NCH-1:0][31:0] ch_dout;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    readout_channel #(.FIFO_DEPTH(CH_FIFO_DEPTH), .ACT_TIMEOUT(ACT_TIMEOUT)) u_ch (
      .clk, .rst_n, .ch_en(regs.ch_en[i]), .sdin(ch_rx[i]),
      .active(ch_active[i]), .locked(ch_locked[i]), .ovf(ch_ovf[i]),
      .rd_en(ch_rd_en[i]), .dout(ch_dout[i]), .empty(ch_empty[i]), .frame_ready(ch_ready[i])
    );
  end

  // ---------------- readout FSM and main FIFO ----------------
  logic           mf_wr, mf_rd, mf_full, mf_empty, frame_done, err_clr;
  logic [31:0]    mf_din, mf_dout;
  logic [MLW-1:0] mf_level;
  logic [NCH-1:0] err_mask;
  logic [15:0]    frame_no;

  readout_mux #(.NCH(NCH), .TIMEOUT(FRAME_TIMEOUT)) u_mux (
    .clk, .rst_n, .sync_rst(sync_reset),
    .ch_active(ch_active & ch_locked & regs.ch_en[NCH-1:0]),
    .ch_ready, .ch_empty, .ch_dout, .ch_ovf, .ch_rd_en,
    .mf_wr, .mf_din, .mf_full, .frame_done, .sticky_clr(err_clr), .err_mask, .frame_no
  );

  sync_fifo #(.WIDTH(32), .DEPTH(MAIN_FIFO_DEPTH)) u_main_fifo (
    .clk, .rst_n, .wr_en(mf_wr), .din(mf_din), .rd_en(mf_rd), .dout(mf_dout),
    .empty(mf_empty), .full(mf_full), .level(mf_level)
  );

  // ---------------- upstream e-links ----------------
  logic             rb_valid, rb_ready;
  logic [31:0]      rb_word;
  logic [1:0]       tx_valid, tx_ready;
  logic [1:0][31:0] tx_word;

  elink_balancer #(.LW(MLW)) u_bal (
    .clk, .rst_n, .mf_dout, .mf_empty, .mf_level, .mf_full, .mf_rd, .frame_done,
    .split_th(regs.split_th), .sc_valid(rb_valid), .sc_word(rb_word), .sc_ready(rb_ready),
    .tx_valid, .tx_word, .tx_ready, .split_mode(), .frame_sent()
  );

  // A small FIFO in front of each transmitter lets the balancer hand a ToASt block to one link
  // while the other link is still sending the previous block, so both links run at full rate.
  for (genvar l = 0; l < 2; l++) begin : g_up
    logic        lf_full, lf_empty, lf_rd, tx_free;
    logic [31:0] lf_dout;
    assign tx_ready[l] = !lf_full;
    assign lf_rd       = tx_free && !lf_empty;
    sync_fifo #(.WIDTH(32), .DEPTH(LINK_FIFO_DEPTH)) u_link_fifo (
      .clk, .rst_n, .wr_en(tx_valid[l]), .din(tx_word[l]), .rd_en(lf_rd), .dout(lf_dout),
      .empty(lf_empty), .full(lf_full), .level()
    );
    elink_tx u_tx (
      .clk, .rst_n, .valid(!lf_empty), .word(lf_dout), .ready(tx_free),
      .dout(elink_up[l])
    );
  end

  // ---------------- downstream, commands and configuration ----------------
  logic        cmd_valid, par_err;
  logic [31:0] cmd;
  logic        cfg_valid, cfg_ready, resp_valid, resp_ok, resp_ready;
  cfg_req_t    cfg_req, resp_req;
  logic [7:0]  resp_retries;
  logic        tp_start, tp_stop;

  elink_rx_down u_down (.clk, .rst_n, .sdin(elink_down), .cmd, .cmd_valid, .par_err);

  cmd_config #(.NCH(NCH)) u_cmd (
    .clk, .rst_n, .cmd_valid, .cmd, .par_err,
    .st_locked(ch_locked), .st_active(ch_active), .st_err(err_mask), .err_clr,
    .regs, .cfg_valid, .cfg_req, .cfg_ready,
    .resp_valid, .resp_ok, .resp_req, .resp_retries, .resp_ready,
    .sync_rst(sync_reset), .tp_start, .tp_stop,
    .rb_valid, .rb_word, .rb_ready
  );

  toast_config #(.DIV(CFG_DIV)) u_tcfg (
    .clk, .rst_n, .chip_mask(regs.chip_mask),
    .req_valid(cfg_valid), .req(cfg_req), .req_ready(cfg_ready),
    .resp_valid, .resp_ok, .resp_req, .resp_retries, .resp_ready,
    .cfg_tx, .cfg_rx
  );

  // ---------------- calibration and test pulse ----------------
  tp_gen #(.PERIOD(TP_PERIOD)) u_tp (
    .clk, .rst_n, .start(tp_start), .stop(tp_stop),
    .count(regs.tp_count), .delay(regs.tp_delay), .width(regs.tp_ctrl[7:0]),
    .polarity(regs.tp_ctrl[8]), .tp_out(test_pulse), .ref_tick(), .busy(), .pulses()
  );

  assign clk_skew = regs.clk_skew;
endmodule
