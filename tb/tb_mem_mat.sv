// tb_mem_mat: self-checking test of one memory mat in all four roles.
// Scratch: plain load/store and the safe-operation lock rules. FIFO: order,
// empty/full limits with one 1024-word FIFO and independence of two 512-word
// FIFOs. Tag: fill, hit, miss on wrong tag and on invalid entry. Data: read
// gated by hit_in. Every response is checked one cycle after its request.
module tb_mem_mat;
  import sm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mat_mode_e         cfg_mode;
  logic              cfg_two_fifo;
  logic              req_valid;
  mat_op_e           req_op;
  logic [MAT_AW-1:0] req_addr;
  logic [WORD_W-1:0] req_wdata;
  logic              hit_in;
  logic              rsp_valid, rsp_ok, hit_out, safe_evt;
  logic [WORD_W-1:0] rsp_rdata;
  logic [META_W-1:0] rsp_meta;
  logic [MAT_AW-1:0] safe_evt_addr;
  logic [1:0]        fifo_empty, fifo_full;

  mem_mat dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue one op, check response next cycle
  task automatic op(input mat_op_e o, input int a, input logic [31:0] d,
                    input bit exp_ok, input bit chk_d = 0, input logic [31:0] exp_d = 0,
                    input bit hin = 0, input bit exp_evt = 0);
    @(negedge clk);
    req_valid = 1; req_op = o; req_addr = MAT_AW'(a); req_wdata = d;
    @(negedge clk);
    req_valid = 0; hit_in = hin;
    #1;
    chk(rsp_valid, "rsp_valid");
    chk(rsp_ok == exp_ok, $sformatf("ok op=%s a=%0d got %0b", o.name(), a, rsp_ok));
    if (chk_d) chk(rsp_rdata == exp_d, $sformatf("data op=%s a=%0d got %h exp %h", o.name(), a, rsp_rdata, exp_d));
    chk(safe_evt == exp_evt, $sformatf("safe_evt op=%s", o.name()));
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg_mode = MAT_SRAM; cfg_two_fifo = 0; req_valid = 0; req_op = OP_RD;
    req_addr = '0; req_wdata = '0; hit_in = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // scratch
    op(OP_WR, 5, 32'hdead_beef, 1);
    op(OP_RD, 5, 0, 1, 1, 32'hdead_beef);
    op(OP_SAFE_LD, 9, 0, 0);                           // lock clear: stall
    op(OP_SAFE_ST, 9, 32'h1234, 1, 0, 0, 0, 1);        // sets lock
    op(OP_SAFE_ST, 9, 32'h9999, 0);                    // lock set: stall
    op(OP_RD, 9, 0, 1, 1, 32'h1234);                   // failed store did not write
    op(OP_SAFE_LD, 9, 0, 1, 1, 32'h1234, 0, 1);        // consumes lock
    op(OP_SAFE_LD, 9, 0, 0);                           // empty again
    op(OP_ASAFE_ST, 9, 32'h7777, 1, 0, 0, 0, 1);       // sets
    op(OP_ASAFE_ST, 9, 32'h8888, 1, 0, 0, 0, 0);       // dropped but ok
    op(OP_SAFE_LD, 9, 0, 1, 1, 32'h7777, 0, 1);
    chk(safe_evt_addr == 9, "safe_evt_addr");
    // single FIFO
    cfg_mode = MAT_FIFO;
    op(OP_POP, 0, 0, 0);
    for (int i = 0; i < 3; i++) op(OP_PUSH, 0, 32'h100 + i, 1);
    for (int i = 0; i < 3; i++) op(OP_POP, 0, 0, 1, 1, 32'h100 + i);
    chk(fifo_empty[0], "fifo empty after drain");
    for (int i = 0; i < 1024; i++) op(OP_PUSH, 0, i, 1);
    chk(fifo_full[0], "fifo full at 1024");
    op(OP_PUSH, 0, 32'hffff, 0);
    for (int i = 0; i < 1024; i++) op(OP_POP, 0, 0, 1, 1, i);
    op(OP_POP, 0, 0, 0);
    // two FIFOs of 512 (after reset of pointers the previous FIFO is empty)
    cfg_two_fifo = 1;
    for (int i = 0; i < 512; i++) op(OP_PUSH, 0, 32'ha000 + i, 1);
    chk(fifo_full[0] && fifo_empty[1], "fifo0 full at 512, fifo1 empty");
    op(OP_PUSH, 0, 0, 0);
    op(OP_PUSH, 512, 32'hb000, 1);
    op(OP_PUSH, 512, 32'hb001, 1);
    op(OP_POP, 512, 0, 1, 1, 32'hb000);
    op(OP_POP, 0, 0, 1, 1, 32'ha000);
    op(OP_POP, 512, 0, 1, 1, 32'hb001);
    op(OP_POP, 512, 0, 0);
    // tag
    cfg_mode = MAT_TAG;
    op(OP_TAG_LK, 17, 32'h55, 0);                      // invalid entry
    op(OP_TAG_WR, 17, 32'h55, 1);
    op(OP_TAG_LK, 17, 32'h55, 1);
    chk(hit_out, "hit_out on match");
    op(OP_TAG_LK, 17, 32'h56, 0);
    chk(!hit_out, "no hit on mismatch");
    op(OP_WR, 17, 32'h55, 1);                          // invalidate
    op(OP_TAG_LK, 17, 32'h55, 0);
    // data
    cfg_mode = MAT_DATA;
    op(OP_WR, 17, 32'hcafe, 1);
    op(OP_RD, 17, 0, 1, 1, 32'hcafe, 1);
    op(OP_RD, 17, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
