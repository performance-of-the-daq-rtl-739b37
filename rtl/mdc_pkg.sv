// mdc_pkg: constants and word formats shared by the Module Data Concentrator (MDC).
//
// The MDC concentrates the data of up to 16 serial ToASt front-end links into two upstream
// e-links. All blocks run on the 160 MHz lpGBT clock (6.25 ns period). Every data word is 32 bits,
// matching the 32 bits per hit of the ToASt data. The channel count, the 32-bit hit width, the
// 32 x 256 main FIFO and the frame layout (MDC header, ToASt header, payload, ToASt trailer with hit
// count and CRC, MDC trailer with status) follow the published architecture; the exact bit
// encodings below are this design's own choice.
//
// Input link (ToASt -> MDC) words:
//   IDLE          fixed pattern TOAST_IDLE, sent between frames, used for word alignment
//   frame header  {4'hA, 12'h000, frame[15:0]}
//   hit           {2'b01, payload[29:0]}            (opaque to the MDC)
//   frame trailer {4'hE, 12'h000, nhits[15:0]}
// Upstream (MDC -> lpGBT) words:
//   MDC header    {4'h8, 12'h000, frame[15:0]}
//   ToASt header  {4'h9, 8'h00, channel[3:0], frame[15:0]}
//   hit           copied unchanged
//   ToASt trailer {4'hC, 4'h0, crc8[7:0], nhits[15:0]}
//   MDC trailer   {4'hD, status[11:0], frame[15:0]}
//   readback      {4'hF, code[3:0], addr[7:0], data[15:0]}
package mdc_pkg;

  // Alignment pattern: not equal to any of its own rotations, so a word boundary is unique.
  localparam logic [31:0] TOAST_IDLE = 32'h3C5A_0F96;

  localparam logic [3:0] T_FHDR = 4'hA;   // ToASt frame header (input link)
  localparam logic [3:0] T_FTRL = 4'hE;   // ToASt frame trailer (input link)
  localparam logic [1:0] T_HIT  = 2'b01;  // hit word (both directions)

  localparam logic [3:0] U_MDC_HDR = 4'h8;
  localparam logic [3:0] U_TST_HDR = 4'h9;
  localparam logic [3:0] U_TST_TRL = 4'hC;
  localparam logic [3:0] U_MDC_TRL = 4'hD;
  localparam logic [3:0] U_RDBK    = 4'hF;

  // Readback codes
  typedef enum logic [3:0] {
    RB_REG     = 4'h1,   // register read answer
    RB_CFG_OK  = 4'h2,   // ToASt configuration written and verified
    RB_CFG_ERR = 4'h3,   // ToASt configuration could not be verified
    RB_ERR     = 4'hE    // command error flag
  } rb_code_e;

  // Error causes carried in the data field of an RB_ERR readback word
  typedef enum logic [3:0] {
    ERR_UNKNOWN_CMD = 4'h1,
    ERR_SEQUENCE    = 4'h2,
    ERR_PARITY      = 4'h3,
    ERR_CFG_FULL    = 4'h4,
    ERR_BAD_ADDR    = 4'h5
  } err_e;

  // Downstream command opcodes, cmd[31:28]
  typedef enum logic [3:0] {
    OP_WR_REG   = 4'h1,
    OP_RD_REG   = 4'h2,
    OP_CFG_BEGIN= 4'h3,
    OP_CFG_WRITE= 4'h4,
    OP_CFG_END  = 4'h5,
    OP_SYNC_RST = 4'h6,
    OP_TP_START = 4'h7,
    OP_TP_STOP  = 4'h8
  } opcode_e;

  // Global register addresses
  localparam logic [7:0] REG_CH_EN      = 8'h00;  // input channel enable mask
  localparam logic [7:0] REG_SPLIT_TH   = 8'h01;  // main FIFO level that selects split mode
  localparam logic [7:0] REG_TP_COUNT   = 8'h02;  // number of test pulses
  localparam logic [7:0] REG_TP_DELAY   = 8'h03;  // delay after reference, 6.25 ns steps
  localparam logic [7:0] REG_TP_CTRL    = 8'h04;  // {polarity, width[7:0]}
  localparam logic [7:0] REG_CHIP_MASK  = 8'h05;  // ToASt chips present (read-back targets)
  localparam logic [7:0] REG_CLK_SKEW   = 8'h06;  // clock output skew setting (to pads)
  localparam logic [7:0] REG_STATUS_LCK = 8'h10;  // read only: locked channels
  localparam logic [7:0] REG_STATUS_ACT = 8'h11;  // read only: active channels
  localparam logic [7:0] REG_STATUS_ERR = 8'h12;  // read only: sticky frame error channels
  localparam int unsigned NREGS = 7;

  typedef struct packed {
    logic [15:0] ch_en;
    logic [15:0] split_th;
    logic [15:0] tp_count;
    logic [15:0] tp_delay;
    logic [15:0] tp_ctrl;
    logic [15:0] chip_mask;
    logic [15:0] clk_skew;
  } gregs_t;

  // Reset values of the global registers
  localparam gregs_t GREGS_RST = '{ch_en: 16'hFFFF, split_th: 16'd32, tp_count: 16'd100,
                                   tp_delay: 16'd0, tp_ctrl: 16'h0010, chip_mask: 16'h0003,
                                   clk_skew: 16'h0000};

  // A ToASt configuration write request
  typedef struct packed {
    logic [3:0]  chip;   // 4'hF = broadcast
    logic [7:0]  addr;
    logic [15:0] data;
  } cfg_req_t;

  localparam logic [3:0] CHIP_BCAST = 4'hF;

  // CRC-8, polynomial x^8+x^2+x+1 (0x07), MSB first, over one 32-bit word
  function automatic logic [7:0] crc8_word(input logic [7:0] crc_in, input logic [31:0] w);
    logic [7:0] c;
    c = crc_in;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ w[i];
      c  = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

endpackage
