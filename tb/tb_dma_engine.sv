// tb_dma_engine: self-checking test of the DMA engine.
// A tile-memory model (random ready, one-cycle response) and an outside-memory
// model (random ready, random read latency, out-of-order across channels)
// surround the engine. Block, strided and indexed transfers in both
// directions run on two channels at once; the moved data, the completion
// writes and the interleaving of the channels on the network port are checked
// against values computed here.
module tb_dma_engine;
  import sm_pkg::*;
  localparam int NCH = 2, EAW = 32, LAW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we; logic [0:0] cfg_ch; dma_reg_e cfg_reg; logic [31:0] cfg_wdata;
  logic [NCH-1:0] ch_busy, ch_done;
  logic loc_req_valid, loc_req_ready, loc_rsp_valid;
  mat_op_e loc_req_op; logic [LAW-1:0] loc_req_addr; logic [31:0] loc_req_wdata, loc_rsp_rdata;
  logic ext_req_valid, ext_req_ready, ext_req_we, ext_rsp_valid;
  logic [EAW-1:0] ext_req_addr; logic [31:0] ext_req_wdata, ext_rsp_rdata;
  logic [0:0] ext_req_id, ext_rsp_id;

  dma_engine #(.NCH(NCH), .EAW(EAW), .LAW(LAW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---------------- memory models ----------------
  logic [31:0] lmem [1 << LAW];
  logic [31:0] emem [8192];
  // completion writes seen
  int n_done_wr = 0; mat_op_e last_done_op; logic [LAW-1:0] last_done_addr; logic [31:0] last_done_data;

  always_ff @(posedge clk) begin
    loc_rsp_valid <= 1'b0;
    if (loc_req_valid && loc_req_ready) begin
      if (loc_req_op == OP_RD) begin
        loc_rsp_valid <= 1'b1;
        loc_rsp_rdata <= lmem[loc_req_addr];
      end else if (loc_req_op == OP_WR && loc_req_addr < LAW'(16'h3f00)) begin
        lmem[loc_req_addr] <= loc_req_wdata;
      end else begin
        n_done_wr      <= n_done_wr + 1;
        last_done_op   <= loc_req_op;
        last_done_addr <= loc_req_addr;
        last_done_data <= loc_req_wdata;
      end
    end
  end
  always_ff @(negedge clk) loc_req_ready <= ($urandom_range(0, 3) != 0);

  // outside memory: reads wait 1..6 cycles in one of two queues (per id)
  int unsigned q_dly [2][$];
  logic [31:0] q_dat [2][$];
  int both_busy_cycles = 0, switches = 0;
  logic [0:0] last_id = 0;
  always_ff @(negedge clk) ext_req_ready <= ($urandom_range(0, 4) != 0);
  always @(posedge clk) begin
    ext_rsp_valid <= 1'b0;
    // answer one ready read per cycle
    for (int i = 0; i < 2; i++) if (q_dly[i].size() > 0 && q_dly[i][0] > 0) q_dly[i][0]--;
    begin
      int pick; pick = -1;
      for (int i = 0; i < 2; i++) if (pick < 0 && q_dly[i].size() > 0 && q_dly[i][0] == 0) pick = i;
      if (pick >= 0) begin
        ext_rsp_valid <= 1'b1; ext_rsp_id <= 1'(pick);
        ext_rsp_rdata <= q_dat[pick].pop_front(); void'(q_dly[pick].pop_front());
      end
    end
    if (ext_req_valid && ext_req_ready) begin
      if (ext_req_we) emem[ext_req_addr[12:0]] <= ext_req_wdata;
      else begin
        q_dly[ext_req_id].push_back($urandom_range(1, 6));
        q_dat[ext_req_id].push_back(emem[ext_req_addr[12:0]]);
      end
      if (ext_req_id != last_id) switches++;
      last_id <= ext_req_id;
    end
    if (ch_busy == 2'b11) both_busy_cycles++;
  end

  task automatic wreg(input int ch, input dma_reg_e r, input logic [31:0] v);
    @(negedge clk); cfg_we = 1; cfg_ch = 1'(ch); cfg_reg = r; cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic setup(input int ch, input int ext, input int loc, input int recw, input int stride,
                       input int nrec, input int idx, input int dadr, input int ddat,
                       input dma_mode_e mode, input bit to_ext, input mat_op_e dop, input bit den);
    dma_ctrl_t c;
    wreg(ch, DREG_EXT_ADDR, ext); wreg(ch, DREG_LOC_ADDR, loc); wreg(ch, DREG_REC_WORDS, recw);
    wreg(ch, DREG_STRIDE, stride); wreg(ch, DREG_NUM_RECS, nrec); wreg(ch, DREG_IDX_ADDR, idx);
    wreg(ch, DREG_DONE_ADDR, dadr); wreg(ch, DREG_DONE_DATA, ddat);
    c = '0; c.start = 1; c.mode = 2'(mode); c.to_ext = to_ext; c.done_op = 4'(dop); c.done_en = den;
    wreg(ch, DREG_CTRL, 32'(c));
  endtask

  task automatic wait_idle();
    int n; n = 0;
    @(negedge clk);
    while (ch_busy != 0 && n < 20000) begin @(negedge clk); n++; end
  endtask

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int idx_list [3] = '{7, 0, 20};
  initial begin
    cfg_we = 0; cfg_ch = 0; cfg_reg = DREG_EXT_ADDR; cfg_wdata = 0;
    loc_rsp_valid = 0; ext_rsp_valid = 0; loc_rsp_rdata = 0; ext_rsp_rdata = 0; ext_rsp_id = 0;
    for (int i = 0; i < 8192; i++) emem[i] = 32'h5000_0000 + i;
    for (int i = 0; i < (1 << LAW); i++) lmem[i] = 32'h0;
    repeat (3) @(negedge clk); rst_n = 1;

    // 1+2: block load on ch0 and strided load on ch1 at the same time
    setup(0, 100, 16'h100, 64, 0, 1, 0, 16'h3f10, 32'hd0e0, DMA_BLOCK, 0, OP_ASAFE_ST, 1);
    setup(1, 1000, 16'h200, 2, 10, 8, 0, 16'h3f20, 32'hd1e1, DMA_STRIDED, 0, OP_PUSH, 1);
    wait_idle();
    for (int i = 0; i < 64; i++) chk(lmem[16'h100 + i] == 32'h5000_0000 + 100 + i, $sformatf("block word %0d", i));
    for (int r = 0; r < 8; r++) for (int w = 0; w < 2; w++)
      chk(lmem[16'h200 + 2*r + w] == 32'h5000_0000 + 1000 + 10*r + w, $sformatf("stride r%0d w%0d", r, w));
    chk(n_done_wr == 2, "two completion writes");
    chk(both_busy_cycles > 20, "channels overlapped");
    chk(switches > 10, $sformatf("network port interleaved channels (%0d switches)", switches));

    // 3: indexed store (scatter) on ch1
    for (int i = 0; i < 3; i++) lmem[16'h300 + i] = idx_list[i];
    for (int i = 0; i < 9; i++) lmem[16'h400 + i] = 32'hc000_0000 + i;
    setup(1, 2000, 16'h400, 3, 0, 3, 16'h300, 16'h3f30, 32'hd2e2, DMA_INDEXED, 1, OP_SAFE_ST, 1);
    wait_idle();
    for (int r = 0; r < 3; r++) for (int w = 0; w < 3; w++)
      chk(emem[2000 + idx_list[r] + w] == 32'hc000_0000 + 3*r + w, $sformatf("scatter r%0d w%0d", r, w));
    chk(n_done_wr == 3 && last_done_op == OP_SAFE_ST && last_done_addr == 14'h3f30 && last_done_data == 32'hd2e2,
        "completion write type/address/data");

    // 4: indexed load (gather) on ch0, strided store on ch1, no completion write
    setup(0, 3000, 16'h500, 3, 0, 3, 16'h300, 0, 0, DMA_INDEXED, 0, OP_WR, 0);
    for (int i = 0; i < 12; i++) lmem[16'h600 + i] = 32'he000_0000 + i;
    setup(1, 4000, 16'h600, 4, 16, 3, 0, 0, 0, DMA_STRIDED, 1, OP_WR, 0);
    wait_idle();
    for (int r = 0; r < 3; r++) for (int w = 0; w < 3; w++)
      chk(lmem[16'h500 + 3*r + w] == 32'h5000_0000 + 3000 + idx_list[r] + w, $sformatf("gather r%0d w%0d", r, w));
    for (int r = 0; r < 3; r++) for (int w = 0; w < 4; w++)
      chk(emem[4000 + 16*r + w] == 32'he000_0000 + 4*r + w, $sformatf("stride store r%0d w%0d", r, w));
    chk(n_done_wr == 3, "no completion write when disabled");
    // block store of 8 words, check the block is exact and the word after untouched
    for (int i = 0; i < 8; i++) lmem[16'h700 + i] = 32'hf000_0000 + i;
    emem[5008] = 32'h1234;
    setup(0, 5000, 16'h700, 8, 0, 1, 0, 16'h3f40, 32'h77, DMA_BLOCK, 1, OP_WR, 1);
    wait_idle();
    for (int i = 0; i < 8; i++) chk(emem[5000 + i] == 32'hf000_0000 + i, "block store");
    chk(emem[5008] == 32'h1234, "block store length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
