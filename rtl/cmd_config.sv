// cmd_config: command decoder, configuration checker and global registers of the MDC.
//
// Commands arrive as 32-bit words {opcode[3:0], chip[3:0], addr[7:0], data[15:0]} from the
// downstream e-link. The block
// * writes and reads the global registers (held in triple-redundant tmr_reg storage); reads and
//   all results are answered with readback words {4'hF, code, addr, data} queued for link 0;
// * rejects unknown opcodes, bad register addresses and downstream parity errors with an error
//   readback word (code RB_ERR, data = cause);
// * checks ToASt configuration sequences: CFG_BEGIN, one or more CFG_WRITE, CFG_END. The writes
//   are buffered and only issued to the ToASt configuration block after a complete, correct
//   sequence; a CFG_WRITE or CFG_END outside a sequence, a second CFG_BEGIN, a sequence started
//   while the previous one is still being issued, a CFG_END with no writes or a buffer overflow
//   discards the sequence and sends a sequence error. The outcome of each issued write (verified,
//   or failed after retries) is sent back as RB_CFG_OK / RB_CFG_ERR;
// * pulses sync_rst (front-end synchronous reset), tp_start and tp_stop.
// Error flagging for unknown commands and wrong sequences and the check-before-issue rule follow
// the published design; the command word, opcodes, register map and buffer depth are this
// design's own choices. Timing: register writes take effect one cycle after cmd_valid; readback
// words are queued in the same cycle.
module cmd_config
  import mdc_pkg::*;
#(
  parameter int unsigned NCH       = 16,
  parameter int unsigned CFG_DEPTH = 16,
  parameter int unsigned RB_DEPTH  = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cmd_valid,
  input  logic [31:0]    cmd,
  input  logic           par_err,
  // status inputs
  input  logic [NCH-1:0] st_locked,
  input  logic [NCH-1:0] st_active,
  input  logic [NCH-1:0] st_err,
  output logic           err_clr,
  // global registers
  output gregs_t         regs,
  // ToASt configuration requests and results
  output logic           cfg_valid,
  output cfg_req_t       cfg_req,
  input  logic           cfg_ready,
  input  logic           resp_valid,
  input  logic           resp_ok,
  input  cfg_req_t       resp_req,
  input  logic [7:0]     resp_retries,
  output logic           resp_ready,
  // control pulses
  output logic           sync_rst,
  output logic           tp_start,
  output logic           tp_stop,
  // readback words towards the upstream link
  output logic           rb_valid,
  output logic [31:0]    rb_word,
  input  logic           rb_ready
);
  localparam int unsigned BW = $clog2(CFG_DEPTH);

  opcode_e     op;
  logic [7:0]  addr;
  logic [15:0] data;
  assign op   = opcode_e'(cmd[31:28]);
  assign addr = cmd[23:16];
  assign data = cmd[15:0];

  // ---------------- global registers (TMR) ----------------
  logic                 reg_we;
  gregs_t               regs_d;
  logic [15:0]          rd_val;
  logic                 addr_ok;

  always_comb begin
    regs_d = regs;
    unique case (addr)
      REG_CH_EN:     regs_d.ch_en     = data;
      REG_SPLIT_TH:  regs_d.split_th  = data;
      REG_TP_COUNT:  regs_d.tp_count  = data;
      REG_TP_DELAY:  regs_d.tp_delay  = data;
      REG_TP_CTRL:   regs_d.tp_ctrl   = data;
      REG_CHIP_MASK: regs_d.chip_mask = data;
      REG_CLK_SKEW:  regs_d.clk_skew  = data;
      default: ;
    endcase
    addr_ok = 1'b1;
    unique case (addr)
      REG_CH_EN:      rd_val = regs.ch_en;
      REG_SPLIT_TH:   rd_val = regs.split_th;
      REG_TP_COUNT:   rd_val = regs.tp_count;
      REG_TP_DELAY:   rd_val = regs.tp_delay;
      REG_TP_CTRL:    rd_val = regs.tp_ctrl;
      REG_CHIP_MASK:  rd_val = regs.chip_mask;
      REG_CLK_SKEW:   rd_val = regs.clk_skew;
      REG_STATUS_LCK: rd_val = 16'(st_locked);
      REG_STATUS_ACT: rd_val = 16'(st_active);
      REG_STATUS_ERR: rd_val = 16'(st_err);
      default: begin
        rd_val  = '0;
        addr_ok = 1'b0;
      end
    endcase
  end

  tmr_reg #(.W($bits(gregs_t)), .RST(GREGS_RST)) u_regs (
    .clk, .rst_n, .we(reg_we), .d(regs_d), .seu_flip('0), .q(regs), .mismatch()
  );

  // ---------------- configuration sequence buffer ----------------
  typedef enum logic [1:0] {C_IDLE, C_SEQ, C_ISSUE} cst_e;
  cst_e         cst;
  cfg_req_t     cbuf [CFG_DEPTH];
  logic [BW:0]  nbuf, nsent, ndone;
  logic         seq_err, full_err;
  logic         cbuf_we;

  assign cfg_valid = (cst == C_ISSUE) && (nsent < nbuf);
  assign cfg_req   = cbuf[nsent[BW-1:0]];

  // ---------------- command decode ----------------
  logic        rb_push;
  logic [31:0] rb_din;
  logic        rb_full, rb_empty;
  logic        unknown;

  always_comb begin
    reg_we   = 1'b0;
    rb_push  = 1'b0;
    rb_din   = '0;
    sync_rst = 1'b0;
    tp_start = 1'b0;
    tp_stop  = 1'b0;
    err_clr  = 1'b0;
    seq_err  = 1'b0;
    full_err = 1'b0;
    cbuf_we  = 1'b0;
    unknown  = 1'b0;
    if (par_err) begin
      rb_push = 1'b1;
      rb_din  = {U_RDBK, RB_ERR, 8'h00, 12'h000, ERR_PARITY};
    end else if (cmd_valid) begin
      unique case (op)
        OP_WR_REG: begin
          if (addr == REG_STATUS_ERR) err_clr = 1'b1;
          else if (addr < 8'(NREGS)) reg_we = 1'b1;
          else begin
            rb_push = 1'b1;
            rb_din  = {U_RDBK, RB_ERR, cmd[31:24], 12'h000, ERR_BAD_ADDR};
          end
        end
        OP_RD_REG: begin
          rb_push = 1'b1;
          rb_din  = addr_ok ? {U_RDBK, RB_REG, addr, rd_val}
                            : {U_RDBK, RB_ERR, cmd[31:24], 12'h000, ERR_BAD_ADDR};
        end
        OP_CFG_BEGIN: seq_err = (cst != C_IDLE);
        OP_CFG_WRITE: begin
          if (cst != C_SEQ) seq_err = 1'b1;
          else if (nbuf == (BW+1)'(CFG_DEPTH)) full_err = 1'b1;
          else cbuf_we = 1'b1;
        end
        OP_CFG_END:   seq_err = (cst != C_SEQ) || (nbuf == '0);
        OP_SYNC_RST:  sync_rst = 1'b1;
        OP_TP_START:  tp_start = 1'b1;
        OP_TP_STOP:   tp_stop  = 1'b1;
        default:      unknown  = 1'b1;
      endcase
      if (unknown || seq_err || full_err) begin
        rb_push = 1'b1;
        rb_din  = {U_RDBK, RB_ERR, cmd[31:24], 12'h000,
                   unknown ? ERR_UNKNOWN_CMD : (seq_err ? ERR_SEQUENCE : ERR_CFG_FULL)};
      end
    end
  end

  // results of issued configuration writes share the readback queue with lower priority
  assign resp_ready = !rb_push && !rb_full;

  always_ff @(posedge clk) if (cbuf_we) cbuf[nbuf[BW-1:0]] <= '{chip: cmd[27:24], addr: addr, data: data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst   <= C_IDLE;
      nbuf  <= '0;
      nsent <= '0;
      ndone <= '0;
    end else begin
      if (cfg_valid && cfg_ready) nsent <= nsent + 1'b1;
      if (resp_valid && resp_ready) ndone <= ndone + 1'b1;
      unique case (cst)
        C_IDLE: if (cmd_valid && !par_err && op == OP_CFG_BEGIN) begin
          cst  <= C_SEQ;
          nbuf <= '0;
        end
        C_SEQ: begin
          if (cbuf_we) nbuf <= nbuf + 1'b1;
          if (seq_err || full_err) begin
            cst  <= C_IDLE;           // discard the sequence
            nbuf <= '0;
          end else if (cmd_valid && !par_err && op == OP_CFG_END) begin
            cst   <= C_ISSUE;
            nsent <= '0;
            ndone <= '0;
          end
        end
        C_ISSUE: if (ndone == nbuf) cst <= C_IDLE;
        default: cst <= C_IDLE;
      endcase
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(RB_DEPTH)) u_rb (
    .clk, .rst_n,
    .wr_en(rb_push || (resp_valid && resp_ready)),
    .din(rb_push ? rb_din : {U_RDBK, resp_ok ? RB_CFG_OK : RB_CFG_ERR, resp_req.addr,
                             resp_req.chip, 4'h0, resp_retries}),
    .rd_en(rb_ready && !rb_empty), .dout(rb_word), .empty(rb_empty), .full(rb_full), .level()
  );
  assign rb_valid = !rb_empty;
endmodule
