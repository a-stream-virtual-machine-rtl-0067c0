// tb_sm_stream_tile: end-to-end test of the stream tile at its default size.
//
// The testbench plays the parts that live outside the tile: main memory
// behind the network port, the cache controller behind the three caches, and
// the programs of the two processors. It runs one double-buffered SVM step:
//   * the stream processor pushes two DMA requests into the request FIFO
//     (mat 15, lower half) and raises the wake-up word with always-safe
//     stores;
//   * the control processor, acting as DMA manager, sleeps on the wake-up word
//     with a safe-load, pops the requests and launches a strided load and an
//     indexed gather on the two DMA channels; each transfer ends with an
//     always-safe store to a sync word;
//   * the stream processor sleeps on those sync words, runs the kernel
//     y = 3x + 1 on each buffer in stream SRAM and requests two block stores,
//     whose completion writes push the channel's code into the completion FIFO
//     (mat 15, upper half) that the manager drains;
//   * meanwhile both processors fetch code through their I-caches and the
//     control processor uses its D-cache.
// The results in main memory are compared with values computed here, and
// every mechanism (each DMA mode, channel interleaving, safe-op stall and
// wake-up, dropped always-safe store, crossbar conflict, FIFO push/pop and
// empty pop, cache hits and misses) is counted and must occur.
module tb_sm_stream_tile;
  import sm_pkg::*;
  localparam int AW = 30, EAW = 32, LAW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  function automatic logic [LAW-1:0] la(input int mat, input int word);
    return {4'(mat), 10'(word)};
  endfunction

  // ---------------- DUT ----------------
  mat_mode_e cfg_stack_mode; logic cfg_stack_two_fifo;
  logic cp_i_req_valid, cp_i_req_ready, cp_i_rsp_valid, cp_i_mem_req_valid, cp_i_mem_req_ready, cp_i_mem_rsp_valid;
  logic [AW-1:0] cp_i_req_addr, cp_i_mem_req_addr; logic [63:0] cp_i_rsp_data, cp_i_mem_rsp_data;
  logic cp_d_req_valid, cp_d_req_ready, cp_d_req_we, cp_d_rsp_valid, cp_d_mem_req_valid, cp_d_mem_req_ready,
        cp_d_mem_req_we, cp_d_mem_rsp_valid;
  logic [AW-1:0] cp_d_req_addr, cp_d_mem_req_addr;
  logic [31:0] cp_d_req_wdata, cp_d_rsp_data, cp_d_mem_req_wdata, cp_d_mem_rsp_data;
  logic cp_l_req_valid, cp_l_req_ready, cp_l_rsp_valid, cp_l_rsp_ok, cp_wake;
  mat_op_e cp_l_req_op; logic [LAW-1:0] cp_l_req_addr; logic [31:0] cp_l_req_wdata, cp_l_rsp_rdata;
  logic sp_i_req_valid, sp_i_req_ready, sp_i_rsp_valid, sp_i_mem_req_valid, sp_i_mem_req_ready, sp_i_mem_rsp_valid;
  logic [AW-1:0] sp_i_req_addr, sp_i_mem_req_addr; logic [63:0] sp_i_rsp_data, sp_i_mem_rsp_data;
  logic sp_l_req_valid, sp_l_req_ready, sp_l_rsp_valid, sp_l_rsp_ok, sp_wake;
  mat_op_e sp_l_req_op; logic [LAW-1:0] sp_l_req_addr; logic [31:0] sp_l_req_wdata, sp_l_rsp_rdata;
  logic dma_cfg_we; logic [0:0] dma_cfg_ch; dma_reg_e dma_cfg_reg; logic [31:0] dma_cfg_wdata;
  logic [1:0] dma_ch_busy, dma_ch_done;
  logic net_req_valid, net_req_ready, net_req_we, net_rsp_valid;
  logic [EAW-1:0] net_req_addr; logic [31:0] net_req_wdata, net_rsp_rdata; logic [0:0] net_req_id, net_rsp_id;
  logic [1:0] stack_fifo_empty, stack_fifo_full;
  logic [2:0] cache_hit, cache_miss;

  sm_stream_tile dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---------------- main memory behind the network port ----------------
  logic [31:0] emem [1 << 16];
  int unsigned nq_dly [2][$];
  logic [31:0] nq_dat [2][$];
  always @(negedge clk) net_req_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    net_rsp_valid <= 1'b0;
    for (int i = 0; i < 2; i++) if (nq_dly[i].size() > 0 && nq_dly[i][0] > 0) nq_dly[i][0]--;
    begin
      int pick; pick = -1;
      for (int i = 0; i < 2; i++) if (pick < 0 && nq_dly[i].size() > 0 && nq_dly[i][0] == 0) pick = i;
      if (pick >= 0) begin
        net_rsp_valid <= 1'b1; net_rsp_id <= 1'(pick);
        net_rsp_rdata <= nq_dat[pick].pop_front(); void'(nq_dly[pick].pop_front());
      end
    end
    if (net_req_valid && net_req_ready) begin
      if (net_req_we) emem[net_req_addr[15:0]] <= net_req_wdata;
      else begin
        nq_dly[net_req_id].push_back($urandom_range(2, 8));
        nq_dat[net_req_id].push_back(emem[net_req_addr[15:0]]);
      end
    end
  end

  // ---------------- cache controller models ----------------
  function automatic logic [63:0] code_line(input logic [AW-1:0] a);
    return {2'b01, a, 2'b10, ~a};
  endfunction
  logic [31:0] dmem [1 << 12];
  int cil = 0, sil = 0, cdl = 0;
  logic [AW-1:0] cia, sia, cda;
  always @(negedge clk) begin
    cp_i_mem_req_ready <= $urandom_range(0, 1);
    sp_i_mem_req_ready <= $urandom_range(0, 1);
    cp_d_mem_req_ready <= $urandom_range(0, 1);
  end
  always @(posedge clk) begin
    cp_i_mem_rsp_valid <= 0; sp_i_mem_rsp_valid <= 0; cp_d_mem_rsp_valid <= 0;
    if (cp_i_mem_req_valid && cp_i_mem_req_ready) begin cil <= $urandom_range(3, 10); cia <= cp_i_mem_req_addr; end
    else if (cil > 0) begin cil <= cil - 1; if (cil == 1) begin cp_i_mem_rsp_valid <= 1; cp_i_mem_rsp_data <= code_line(cia); end end
    if (sp_i_mem_req_valid && sp_i_mem_req_ready) begin sil <= $urandom_range(3, 10); sia <= sp_i_mem_req_addr; end
    else if (sil > 0) begin sil <= sil - 1; if (sil == 1) begin sp_i_mem_rsp_valid <= 1; sp_i_mem_rsp_data <= code_line(sia); end end
    if (cp_d_mem_req_valid && cp_d_mem_req_ready) begin
      if (cp_d_mem_req_we) dmem[cp_d_mem_req_addr[11:0]] <= cp_d_mem_req_wdata;
      else begin cdl <= $urandom_range(3, 10); cda <= cp_d_mem_req_addr; end
    end else if (cdl > 0) begin cdl <= cdl - 1; if (cdl == 1) begin cp_d_mem_rsp_valid <= 1; cp_d_mem_rsp_data <= dmem[cda[11:0]]; end end
  end

  // ---------------- mechanism counters ----------------
  int n_strided = 0, n_indexed = 0, n_block = 0, n_both_busy = 0, n_net_switch = 0;
  int n_safe_stall = 0, n_wake = 0, n_asafe_drop = 0, n_xbar_stall = 0;
  int n_fifo_pop = 0, n_fifo_push = 0, n_fifo_empty = 0;
  int n_hit [3] = '{0, 0, 0}, n_miss [3] = '{0, 0, 0};
  logic [0:0] last_id = 0;
  bit cp_woke = 0, sp_woke = 0;
  always @(posedge clk) if (rst_n) begin
    if (dma_ch_busy == 2'b11) n_both_busy++;
    if (net_req_valid && net_req_ready) begin
      if (net_req_id != last_id) n_net_switch++;
      last_id = net_req_id;
    end
    if (sp_l_req_valid && !sp_l_req_ready) n_xbar_stall++;
    if (cp_l_req_valid && !cp_l_req_ready) n_xbar_stall++;
    if (cp_wake) begin n_wake++; cp_woke = 1; end
    if (sp_wake) begin n_wake++; sp_woke = 1; end
    for (int i = 0; i < 3; i++) begin n_hit[i] += int'(cache_hit[i]); n_miss[i] += int'(cache_miss[i]); end
  end

  // ---------------- processor port helpers ----------------
  task automatic cp_acc(input mat_op_e op, input logic [LAW-1:0] a, input logic [31:0] d,
                        output bit ok, output logic [31:0] r);
    @(negedge clk); cp_l_req_valid = 1; cp_l_req_op = op; cp_l_req_addr = a; cp_l_req_wdata = d;
    #1; while (!cp_l_req_ready) begin @(negedge clk); #1; end
    @(negedge clk); cp_l_req_valid = 0;
    ok = cp_l_rsp_ok; r = cp_l_rsp_rdata;
  endtask
  task automatic sp_acc(input mat_op_e op, input logic [LAW-1:0] a, input logic [31:0] d,
                        output bit ok, output logic [31:0] r);
    @(negedge clk); sp_l_req_valid = 1; sp_l_req_op = op; sp_l_req_addr = a; sp_l_req_wdata = d;
    #1; while (!sp_l_req_ready) begin @(negedge clk); #1; end
    @(negedge clk); sp_l_req_valid = 0;
    ok = sp_l_rsp_ok; r = sp_l_rsp_rdata;
  endtask
  // blocking safe-load: stall, sleep until woken, re-issue
  task automatic cp_safe_ld(input logic [LAW-1:0] a, output logic [31:0] r);
    bit ok;
    forever begin
      cp_woke = 0;
      cp_acc(OP_SAFE_LD, a, 0, ok, r);
      if (ok) break;
      n_safe_stall++;
      while (!cp_woke) @(negedge clk);
    end
  endtask
  task automatic sp_safe_ld(input logic [LAW-1:0] a, output logic [31:0] r);
    bit ok;
    forever begin
      sp_woke = 0;
      sp_acc(OP_SAFE_LD, a, 0, ok, r);
      if (ok) break;
      n_safe_stall++;
      while (!sp_woke) @(negedge clk);
    end
  endtask

  task automatic dma_w(input int ch, input dma_reg_e r, input logic [31:0] v);
    @(negedge clk); dma_cfg_we = 1; dma_cfg_ch = 1'(ch); dma_cfg_reg = r; dma_cfg_wdata = v;
    @(negedge clk); dma_cfg_we = 0;
  endtask
  task automatic dma_launch(input int ch, input int ext, input int loc, input int recw, input int stride,
                            input int nrec, input int idx, input int dadr, input int ddat,
                            input dma_mode_e mode, input bit to_ext, input mat_op_e dop);
    dma_ctrl_t c;
    while (dma_ch_busy[ch]) @(negedge clk);
    dma_w(ch, DREG_EXT_ADDR, ext); dma_w(ch, DREG_LOC_ADDR, loc); dma_w(ch, DREG_REC_WORDS, recw);
    dma_w(ch, DREG_STRIDE, stride); dma_w(ch, DREG_NUM_RECS, nrec); dma_w(ch, DREG_IDX_ADDR, idx);
    dma_w(ch, DREG_DONE_ADDR, dadr); dma_w(ch, DREG_DONE_DATA, ddat);
    c = '0; c.start = 1; c.mode = 2'(mode); c.to_ext = to_ext; c.done_op = 4'(dop); c.done_en = 1;
    dma_w(ch, DREG_CTRL, 32'(c));
    case (mode) DMA_STRIDED: n_strided++; DMA_INDEXED: n_indexed++; default: n_block++; endcase
  endtask

  // ---------------- the SVM step ----------------
  localparam int NA = 16, RA = 4, SA = 64;       // strided load: 16 records of 4 words, stride 64
  localparam int NB = 8,  RB = 8;                 // gather: 8 records of 8 words
  localparam int EXT_A = 16'h1000, EXT_B = 16'h4000, OUT_C = 16'h8000, OUT_D = 16'h9000;
  int idx_b [NB] = '{40, 0, 96, 8, 200, 16, 72, 128};
  logic [LAW-1:0] WAKE, SYNC_A, SYNC_B, REQ_Q, DONE_Q, IDX;
  int served = 0, completions = 0;
  bit sp_done = 0;

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    WAKE = la(7, 16); SYNC_A = la(7, 0); SYNC_B = la(7, 1); IDX = la(7, 256);
    REQ_Q = la(15, 0); DONE_Q = la(15, 512);
    cfg_stack_mode = MAT_FIFO; cfg_stack_two_fifo = 1;
    cp_i_req_valid = 0; cp_i_req_addr = 0; cp_d_req_valid = 0; cp_d_req_we = 0; cp_d_req_addr = 0; cp_d_req_wdata = 0;
    cp_l_req_valid = 0; cp_l_req_op = OP_RD; cp_l_req_addr = 0; cp_l_req_wdata = 0;
    sp_i_req_valid = 0; sp_i_req_addr = 0;
    sp_l_req_valid = 0; sp_l_req_op = OP_RD; sp_l_req_addr = 0; sp_l_req_wdata = 0;
    dma_cfg_we = 0; dma_cfg_ch = 0; dma_cfg_reg = DREG_EXT_ADDR; dma_cfg_wdata = 0;
    net_rsp_valid = 0; net_rsp_id = 0; net_rsp_rdata = 0;
    cp_i_mem_rsp_valid = 0; sp_i_mem_rsp_valid = 0; cp_d_mem_rsp_valid = 0;
    for (int i = 0; i < (1 << 16); i++) emem[i] = 32'(i * 7 + 3);
    for (int i = 0; i < (1 << 12); i++) dmem[i] = 32'h00d0_0000 + i;
    repeat (4) @(negedge clk); rst_n = 1;

    fork
      // ===== control processor: DMA manager =====
      begin : manager
        bit ok; logic [31:0] r;
        // index list for the gather, in the sync SRAM
        for (int i = 0; i < NB; i++) cp_acc(OP_WR, IDX + LAW'(i), idx_b[i], ok, r);
        // always-safe store onto a word whose lock is already set is dropped
        cp_acc(OP_ASAFE_ST, la(7, 32), 5, ok, r);
        cp_acc(OP_ASAFE_ST, la(7, 32), 6, ok, r);
        chk(ok, "always-safe store reported successful");
        cp_acc(OP_RD, la(7, 32), 0, ok, r);
        chk(r == 5, "second always-safe store dropped");
        if (r == 5) n_asafe_drop++;
        // service loop
        while (served < 4 || completions < 2) begin
          logic [31:0] code;
          if (served < 4) cp_safe_ld(WAKE, r);          // sleep until work arrives
          forever begin                                 // drain request FIFO
            cp_acc(OP_RD, REQ_Q, 0, ok, code);
            if (!ok) begin n_fifo_empty++; break; end
            n_fifo_pop++; served++;
            case (code)
              0: dma_launch(0, EXT_A, la(11, 0), RA, SA, NA, 0, SYNC_A, 1, DMA_STRIDED, 0, OP_ASAFE_ST);
              1: dma_launch(1, EXT_B, la(12, 0), RB, 0, NB, IDX, SYNC_B, 1, DMA_INDEXED, 0, OP_ASAFE_ST);
              2: dma_launch(0, OUT_C, la(13, 0), NA*RA, 0, 1, 0, DONE_Q, 32'hc0de_0002, DMA_BLOCK, 1, OP_WR);
              3: dma_launch(1, OUT_D, la(14, 0), NB*RB, 0, 1, 0, DONE_Q, 32'hc0de_0003, DMA_BLOCK, 1, OP_WR);
              default: chk(0, "unknown request code");
            endcase
          end
          forever begin                                 // drain completion FIFO
            cp_acc(OP_RD, DONE_Q, 0, ok, code);
            if (!ok) break;
            n_fifo_pop++; completions++;
            chk(code == 32'hc0de_0002 || code == 32'hc0de_0003, "completion code");
          end
          if (served == 4) repeat (20) @(negedge clk);
        end
      end
      // ===== stream processor: kernels =====
      begin : stream
        bit ok; logic [31:0] r, x;
        sp_acc(OP_WR, REQ_Q, 0, ok, r); chk(ok, "push request 0"); n_fifo_push++;
        sp_acc(OP_WR, REQ_Q, 1, ok, r); chk(ok, "push request 1"); n_fifo_push++;
        sp_acc(OP_ASAFE_ST, WAKE, 1, ok, r);
        sp_safe_ld(SYNC_A, r);                            // wait for the strided load
        for (int i = 0; i < NA*RA; i++) begin
          sp_acc(OP_RD, la(11, i), 0, ok, x);
          sp_acc(OP_WR, la(13, i), 3*x + 1, ok, r);
        end
        sp_safe_ld(SYNC_B, r);                            // wait for the gather
        for (int i = 0; i < NB*RB; i++) begin
          sp_acc(OP_RD, la(12, i), 0, ok, x);
          sp_acc(OP_WR, la(14, i), 3*x + 1, ok, r);
        end
        sp_acc(OP_WR, REQ_Q, 2, ok, r); n_fifo_push++;
        sp_acc(OP_WR, REQ_Q, 3, ok, r); n_fifo_push++;
        sp_acc(OP_ASAFE_ST, WAKE, 2, ok, r);
        sp_done = 1;
      end
      // ===== instruction fetch of both processors =====
      begin : ifetch
        for (int pass = 0; pass < 3; pass++)
          for (int k = 0; k < 24; k++) begin
            @(negedge clk); cp_i_req_valid = 1; cp_i_req_addr = AW'(k);
            sp_i_req_valid = 1; sp_i_req_addr = AW'(k + 32'h100);
            fork
              begin @(negedge clk); cp_i_req_valid = 0; while (!cp_i_rsp_valid) @(negedge clk);
                    chk(cp_i_rsp_data == code_line(AW'(k)), "cp instruction line"); end
              begin @(negedge clk); sp_i_req_valid = 0; while (!sp_i_rsp_valid) @(negedge clk);
                    chk(sp_i_rsp_data == code_line(AW'(k + 32'h100)), "sp instruction line"); end
            join
          end
      end
      // ===== control processor data through the D-cache =====
      begin : dcache
        for (int k = 0; k < 60; k++) begin
          logic [AW-1:0] a; bit we;
          a = AW'({$urandom_range(0, 3), 10'($urandom_range(0, 7))});
          we = ($urandom_range(0, 3) == 0);
          @(negedge clk); cp_d_req_valid = 1; cp_d_req_we = we; cp_d_req_addr = a; cp_d_req_wdata = 32'(k);
          @(negedge clk); cp_d_req_valid = 0;
          while (!cp_d_rsp_valid) @(negedge clk);
          if (!we) chk(cp_d_rsp_data == dmem[a[11:0]], "D-cache load");
          repeat (2) @(negedge clk);
        end
      end
    join

    // ---------------- results ----------------
    for (int r = 0; r < NA; r++) for (int w = 0; w < RA; w++)
      chk(emem[OUT_C + r*RA + w] == 3 * emem[EXT_A + r*SA + w] + 1, $sformatf("C r%0d w%0d", r, w));
    for (int r = 0; r < NB; r++) for (int w = 0; w < RB; w++)
      chk(emem[OUT_D + r*RB + w] == 3 * emem[EXT_B + idx_b[r] + w] + 1, $sformatf("D r%0d w%0d", r, w));
    chk(stack_fifo_empty == 2'b11, "both FIFOs drained");
    // every mechanism happened
    chk(n_strided > 0, "strided DMA");   chk(n_indexed > 0, "indexed DMA");   chk(n_block > 0, "block DMA");
    chk(n_both_busy > 0, "two channels active together");
    chk(n_net_switch > 0, "channels interleaved on the network port");
    chk(n_safe_stall > 0, "safe-load stall"); chk(n_wake > 0, "wake-up");
    chk(n_asafe_drop > 0, "dropped always-safe store");
    chk(n_xbar_stall > 0, "crossbar conflict stall");
    chk(n_fifo_push > 0 && n_fifo_pop > 0 && n_fifo_empty > 0, "FIFO push/pop/empty");
    for (int i = 0; i < 3; i++) chk(n_hit[i] > 0 && n_miss[i] > 0, $sformatf("cache %0d hits and misses", i));
    $display("mechanisms: strided=%0d indexed=%0d block=%0d both_busy=%0d net_switch=%0d safe_stall=%0d wake=%0d asafe_drop=%0d xbar_stall=%0d fifo_push=%0d fifo_pop=%0d fifo_empty=%0d",
             n_strided, n_indexed, n_block, n_both_busy, n_net_switch, n_safe_stall, n_wake, n_asafe_drop,
             n_xbar_stall, n_fifo_push, n_fifo_pop, n_fifo_empty);
    $display("cache hits %0d/%0d/%0d misses %0d/%0d/%0d", n_hit[0], n_hit[1], n_hit[2], n_miss[0], n_miss[1], n_miss[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
