// tb_toast_config: checks front-end configuration with read-back verification.
// Two chips (0 and 1) are present on the shared line. Checks: a single-chip write is verified
// with no rewrite; a broadcast write reaches both chips and is read back from each; a corrupted
// write is caught and rewritten (retry count reported, final value correct); a chip that keeps
// failing ends the request as failed after MAX_RETRY rewrites; a chip that never answers
// fails too; and the number of frames on the line matches the write/read-back sequence.
module tb_toast_config;
  import mdc_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, req_valid = 0, resp_ready = 1;
  cfg_req_t req = '0, resp_req;
  logic req_ready, resp_valid, resp_ok, cfg_tx, cfg_rx;
  logic [7:0] resp_retries;
  logic [15:0] chip_mask = 16'h0003;
  int checks = 0, failures = 0;

  toast_config dut (
    .clk, .rst_n, .chip_mask, .req_valid, .req, .req_ready, .resp_valid, .resp_ok, .resp_req,
    .resp_retries, .resp_ready, .cfg_tx, .cfg_rx);
  toast_cfg_model #(.DIV(DIV), .PRESENT(16'h0003)) u_chips (.clk, .cfg_tx, .cfg_rx);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic issue(input logic [3:0] chip, input logic [7:0] a, input logic [15:0] d,
                       input logic exp_ok, input int exp_retries, input int exp_w, input int exp_r);
    int w0, r0;
    w0 = u_chips.nwrites; r0 = u_chips.nreads;
    @(negedge clk);
    req = '{chip: chip, addr: a, data: d}; req_valid = 1;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    chk(resp_ok == exp_ok, $sformatf("result ok=%0d", resp_ok));
    chk(int'(resp_retries) == exp_retries, $sformatf("retries %0d expected %0d", resp_retries, exp_retries));
    chk(resp_req.addr == a && resp_req.chip == chip, "result names the request");
    repeat (4 * DIV) @(negedge clk);
    chk(u_chips.nwrites - w0 == exp_w, $sformatf("write frames %0d expected %0d", u_chips.nwrites - w0, exp_w));
    chk(u_chips.nreads - r0 == exp_r, $sformatf("read frames %0d expected %0d", u_chips.nreads - r0, exp_r));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    issue(4'd0, 8'h10, 16'h1234, 1, 0, 1, 1);
    chk(u_chips.regs[0][8'h10] == 16'h1234 && u_chips.regs[1][8'h10] == 16'h0000, "single-chip write");
    issue(CHIP_BCAST, 8'h20, 16'hCAFE, 1, 0, 1, 2);
    chk(u_chips.regs[0][8'h20] == 16'hCAFE && u_chips.regs[1][8'h20] == 16'hCAFE, "broadcast write");
    u_chips.bad_writes[1] = 1;
    issue(CHIP_BCAST, 8'h21, 16'h00FF, 1, 1, 2, 3);
    chk(u_chips.regs[1][8'h21] == 16'h00FF, "chip 1 rewritten after a bad read-back");
    u_chips.bad_writes[0] = 2;
    issue(4'd0, 8'h22, 16'h5555, 1, 2, 3, 3);
    chk(u_chips.regs[0][8'h22] == 16'h5555, "two rewrites");
    u_chips.bad_writes[0] = 10;
    issue(4'd0, 8'h23, 16'hAAAA, 0, 3, 4, 4);
    u_chips.bad_writes[0] = 0;
    // chip 2 is absent: no answer
    chip_mask = 16'h0007;
    issue(CHIP_BCAST, 8'h24, 16'h0F0F, 0, 3, 4, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
