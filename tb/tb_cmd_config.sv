// tb_cmd_config: checks the command decoder, global registers and configuration sequencing.
// Commands are applied directly (one per few cycles); a model of the configuration block
// accepts requests and answers them. Checks: register write/read-back for every register and
// the status registers; unknown opcode, bad address and parity error each give an error word
// with the right cause; CFG_WRITE or CFG_END outside a sequence, a second CFG_BEGIN and a
// buffer overflow give sequence errors and issue nothing; a correct sequence is issued complete
// and in order only after CFG_END, and its results come back as readback words; a BEGIN while a
// sequence is being issued is refused; sync reset and test pulse commands give one-cycle pulses.
module tb_cmd_config;
  import mdc_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0, par_err = 0, cfg_ready = 1, resp_valid = 0;
  logic resp_ok = 0, rb_ready = 1, err_clr, cfg_valid, resp_ready, sync_rst, tp_start, tp_stop, rb_valid;
  logic [31:0] cmd = 0, rb_word;
  logic [15:0] st_locked = 16'h00F3, st_active = 16'h00FF, st_err = 16'h0010;
  gregs_t regs;
  cfg_req_t cfg_req, resp_req = '0;
  logic [7:0] resp_retries = 0;
  int checks = 0, failures = 0;
  logic [31:0] rbq[$];
  cfg_req_t issued[$];
  int nsync = 0, nstart = 0, nstop = 0;

  cmd_config dut (.clk, .rst_n, .cmd_valid, .cmd, .par_err, .st_locked,
    .st_active, .st_err, .err_clr, .regs, .cfg_valid, .cfg_req, .cfg_ready, .resp_valid, .resp_ok,
    .resp_req, .resp_retries, .resp_ready, .sync_rst, .tp_start, .tp_stop, .rb_valid, .rb_word,
    .rb_ready);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // sinks and a configuration block model that answers each request 10 cycles later
  always @(posedge clk) if (rst_n) begin
    if (rb_valid && rb_ready) rbq.push_back(rb_word);
    if (cfg_valid && cfg_ready) issued.push_back(cfg_req);
    if (sync_rst) nsync++;
    if (tp_start) nstart++;
    if (tp_stop) nstop++;
  end
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && cfg_valid && cfg_ready) begin
        cfg_req_t r;
        r = cfg_req;
        cfg_ready <= 0;
        repeat (10) @(posedge clk);
        resp_valid <= 1; resp_ok <= (r.data != 16'hDEAD); resp_req <= r; resp_retries <= 8'd1;
        @(posedge clk iff resp_ready);
        resp_valid <= 0; cfg_ready <= 1;
      end
    end
  end

  task automatic send(input logic [3:0] op, input logic [3:0] chip, input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); cmd = {op, chip, a, d}; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_rb(input logic [31:0] w, input string msg);
    repeat (3) @(negedge clk);
    chk(rbq.size() == 1 && rbq[0] == w, $sformatf("%s: got %0d words, first %h, want %h", msg, rbq.size(), rbq.size() ? rbq[0] : 0, w));
    rbq.delete();
  endtask

  task automatic expect_err(input logic [7:0] opchip, input err_e e, input string msg);
    expect_rb({U_RDBK, RB_ERR, opchip, 12'h000, 4'(e)}, msg);
  endtask

  initial begin
    logic [15:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    chk(regs == GREGS_RST, "register reset values");
    // registers
    for (int a = 0; a < NREGS; a++) begin
      v = 16'($urandom);
      send(OP_WR_REG, 0, 8'(a), v);
      send(OP_RD_REG, 0, 8'(a), 0);
      expect_rb({U_RDBK, RB_REG, 8'(a), v}, $sformatf("register %0d", a));
    end
    send(OP_WR_REG, 0, REG_CH_EN, 16'h0F0F);
    chk(regs.ch_en == 16'h0F0F, "channel enable register drives its output");
    send(OP_RD_REG, 0, REG_STATUS_LCK, 0); expect_rb({U_RDBK, RB_REG, REG_STATUS_LCK, 16'h00F3}, "locked status");
    send(OP_RD_REG, 0, REG_STATUS_ACT, 0); expect_rb({U_RDBK, RB_REG, REG_STATUS_ACT, 16'h00FF}, "active status");
    send(OP_RD_REG, 0, REG_STATUS_ERR, 0); expect_rb({U_RDBK, RB_REG, REG_STATUS_ERR, 16'h0010}, "error status");
    // errors
    send(4'h0, 0, 0, 0);          expect_err(8'h00, ERR_UNKNOWN_CMD, "opcode 0");
    send(4'hC, 3, 0, 0);          expect_err(8'hC3, ERR_UNKNOWN_CMD, "opcode C");
    send(OP_WR_REG, 0, 8'h40, 0); expect_err({OP_WR_REG, 4'h0}, ERR_BAD_ADDR, "write bad address");
    send(OP_RD_REG, 0, 8'h40, 0); expect_err({OP_RD_REG, 4'h0}, ERR_BAD_ADDR, "read bad address");
    @(negedge clk); par_err = 1; @(negedge clk); par_err = 0;
    expect_err(8'h00, ERR_PARITY, "parity error");
    // sequence errors
    send(OP_CFG_WRITE, 1, 8'h10, 16'h1111); expect_err({OP_CFG_WRITE, 4'h1}, ERR_SEQUENCE, "write outside sequence");
    send(OP_CFG_END, 0, 0, 0);              expect_err({OP_CFG_END, 4'h0}, ERR_SEQUENCE, "end outside sequence");
    send(OP_CFG_BEGIN, 0, 0, 0);
    send(OP_CFG_END, 0, 0, 0);              expect_err({OP_CFG_END, 4'h0}, ERR_SEQUENCE, "empty sequence");
    send(OP_CFG_BEGIN, 0, 0, 0);
    send(OP_CFG_WRITE, 1, 8'h10, 16'h1111);
    send(OP_CFG_BEGIN, 0, 0, 0);            expect_err({OP_CFG_BEGIN, 4'h0}, ERR_SEQUENCE, "second begin");
    send(OP_CFG_END, 0, 0, 0);              expect_err({OP_CFG_END, 4'h0}, ERR_SEQUENCE, "aborted sequence stays closed");
    send(OP_CFG_BEGIN, 0, 0, 0);
    for (int i = 0; i < 16; i++) send(OP_CFG_WRITE, 1, 8'(i), 16'(i));
    send(OP_CFG_WRITE, 1, 8'h9, 16'h9);     expect_err({OP_CFG_WRITE, 4'h1}, ERR_CFG_FULL, "buffer overflow");
    repeat (30) @(negedge clk);
    chk(issued.size() == 0, "nothing issued from a rejected sequence");
    // a good sequence
    send(OP_CFG_BEGIN, 0, 0, 0);
    send(OP_CFG_WRITE, 4'hF, 8'h20, 16'hAAAA);
    send(OP_CFG_WRITE, 4'h1, 8'h21, 16'hDEAD);
    send(OP_CFG_WRITE, 4'h0, 8'h22, 16'h5555);
    chk(issued.size() == 0, "writes held until the sequence is complete");
    send(OP_CFG_END, 0, 0, 0);
    send(OP_CFG_BEGIN, 0, 0, 0);            // refused while issuing
    repeat (100) @(negedge clk);
    chk(issued.size() == 3, $sformatf("issued %0d of 3", issued.size()));
    if (issued.size() == 3) begin
      chk(issued[0] == '{chip: 4'hF, addr: 8'h20, data: 16'hAAAA}, "first request");
      chk(issued[1] == '{chip: 4'h1, addr: 8'h21, data: 16'hDEAD}, "second request");
      chk(issued[2] == '{chip: 4'h0, addr: 8'h22, data: 16'h5555}, "third request");
    end
    chk(rbq.size() == 4, $sformatf("readback words %0d", rbq.size()));
    if (rbq.size() == 4) begin
      chk(rbq[0] == {U_RDBK, RB_ERR, OP_CFG_BEGIN, 4'h0, 12'h000, 4'(ERR_SEQUENCE)}, "begin while issuing refused");
      chk(rbq[1] == {U_RDBK, RB_CFG_OK, 8'h20, 4'hF, 4'h0, 8'd1}, $sformatf("result 1 %h", rbq[1]));
      chk(rbq[2] == {U_RDBK, RB_CFG_ERR, 8'h21, 4'h1, 4'h0, 8'd1}, "result 2 failed");
      chk(rbq[3] == {U_RDBK, RB_CFG_OK, 8'h22, 4'h0, 4'h0, 8'd1}, "result 3");
    end
    rbq.delete();
    // control pulses and error clear
    send(OP_SYNC_RST, 0, 0, 0);
    send(OP_TP_START, 0, 0, 0);
    send(OP_TP_STOP, 0, 0, 0);
    chk(nsync == 1 && nstart == 1 && nstop == 1, "one pulse per control command");
    @(negedge clk); cmd = {OP_WR_REG, 4'h0, REG_STATUS_ERR, 16'h0}; cmd_valid = 1; #1;
    chk(err_clr, "writing the error status register clears it");
    @(negedge clk); cmd_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
