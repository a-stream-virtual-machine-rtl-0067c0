// tb_gmti_tde: the time-delay-equalisation stage of GMTI streamed through the
// stream tile, at the small and medium data-set sizes.
//
// The radar data cube (Nch channels x Npri pulses, each a row of Nrg range
// gates) sits in main memory. The stream processor filters every row with an
// Ntaps-tap FIR along range, y[n] = sum_k h[k] * x[n-k], in blocks of ROWS
// rows, double-buffered in the stream SRAM: input buffers in mats 11 and 12,
// output buffers in mats 13 and 14. For block b it sleeps on the input sync
// word of buffer b%2, filters, asks the DMA manager (the control processor,
// through the request FIFO and the wake-up word) to store the output and to
// load block b+2 into the freed input buffer, and sleeps on the output sync
// word before reusing an output buffer. Samples are one 32-bit integer word
// each here, the filter is integer, and the testbench plays both processors.
// The small and medium data sets are run; the large one (2691-gate rows) does
// not fit a row per 1024-word buffer and would need rows split with overlap.
// Checked: every output word against a reference filter computed here, and
// that DMA transfers overlapped the kernel (the point of double-buffering).
module tb_gmti_tde;
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
  logic [31:0] emem [1 << 19];
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
      if (net_req_we) emem[net_req_addr[18:0]] <= net_req_wdata;
      else begin
        nq_dly[net_req_id].push_back($urandom_range(2, 8));
        nq_dat[net_req_id].push_back(emem[net_req_addr[18:0]]);
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

  // ---------------- one TDE pass over a data cube ----------------
  logic [LAW-1:0] WAKE, REQ_Q, DONE_Q;
  logic [LAW-1:0] SYNC_IN [2], SYNC_OUT [2];
  bit sp_busy = 0;
  int n_overlap = 0;
  always @(posedge clk) if (sp_busy && dma_ch_busy != 0) n_overlap++;

  initial begin
    #200000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // nch x npri rows of nrg gates, ntap-tap filter, rows grouped into blocks
  // that fit one 1024-word mat per buffer
  task automatic run_tde(input string name, input int nch, input int nrg, input int npri,
                         input int ntap, input int ext_in, input int ext_out);
    int nrows, rows, bw, nblk, total_req, served, t0, t1, ov0;
    int h [];
    nrows = nch * npri;
    rows  = 1024 / nrg; if (rows > 16) rows = 16;
    bw    = rows * nrg;
    nblk  = (nrows + rows - 1) / rows;
    total_req = 2 * nblk - 2;                          // stores, and loads after the first two
    served = 0;
    h = new [ntap];
    for (int k = 0; k < ntap; k++) h[k] = k + 1 - ntap / 2;
    for (int i = 0; i < nrows * nrg; i++) emem[ext_in + i] = 32'($urandom_range(0, 65535)) - 32768;
    t0 = $time; ov0 = n_overlap;
    fork
      begin : manager
        bit ok; logic [31:0] r, code;
        dma_launch(0, ext_in, la(11, 0), (nblk > 1 ? bw : nrows * nrg), 0, 1, 0, SYNC_IN[0], 1, DMA_BLOCK, 0, OP_ASAFE_ST);
        if (nblk > 1)
          dma_launch(1, ext_in + bw, la(12, 0), (nblk == 2 ? nrows * nrg - bw : bw), 0, 1, 0, SYNC_IN[1], 1, DMA_BLOCK, 0, OP_ASAFE_ST);
        while (served < total_req) begin
          cp_safe_ld(WAKE, r);                          // sleep until requests arrive
          forever begin
            int b, ch, n;
            cp_acc(OP_RD, REQ_Q, 0, ok, code);
            if (!ok) break;
            served++;
            b = int'(code[15:0]); ch = b % 2;
            n = (b == nblk - 1) ? (nrows - b * rows) * nrg : bw;
            if (code[16])   // store output block b
              dma_launch(ch, ext_out + b * bw, la(13 + ch, 0), n, 0, 1, 0,
                         SYNC_OUT[ch], 1, DMA_BLOCK, 1, OP_ASAFE_ST);
            else            // load input block b
              dma_launch(ch, ext_in + b * bw, la(11 + ch, 0), n, 0, 1, 0,
                         SYNC_IN[ch], 1, DMA_BLOCK, 0, OP_ASAFE_ST);
          end
        end
      end
      begin : stream
        bit ok; logic [31:0] r;
        int x [];
        x = new [bw];
        for (int b = 0; b < nblk; b++) begin
          int ch, n;
          ch = b % 2;
          n = (b == nblk - 1) ? (nrows - b * rows) * nrg : bw;
          sp_safe_ld(SYNC_IN[ch], r);                   // input block has arrived
          if (b >= 2) sp_safe_ld(SYNC_OUT[ch], r);      // output buffer is free again
          sp_busy = 1;
          for (int i = 0; i < n; i++) begin
            logic [31:0] v;
            sp_acc(OP_RD, la(11 + ch, i), 0, ok, v);
            x[i] = int'(v);
          end
          for (int i = 0; i < n; i++) begin
            int acc, g;
            g = i % nrg; acc = 0;
            for (int k = 0; k < ntap; k++) if (g - k >= 0) acc += h[k] * x[i - k];
            sp_acc(OP_WR, la(13 + ch, i), 32'(acc), ok, r);
          end
          sp_busy = 0;
          sp_acc(OP_WR, REQ_Q, 32'h1_0000 | 32'(b), ok, r);           // store block b
          if (b + 2 < nblk) sp_acc(OP_WR, REQ_Q, 32'(b + 2), ok, r);  // load block b+2
          sp_acc(OP_ASAFE_ST, WAKE, 1, ok, r);
        end
        for (int b = (nblk >= 2 ? nblk - 2 : 0); b < nblk; b++) sp_safe_ld(SYNC_OUT[b % 2], r);
      end
    join
    t1 = $time;
    for (int row = 0; row < nrows; row++)
      for (int g = 0; g < nrg; g++) begin
        int acc;
        acc = 0;
        for (int k = 0; k < ntap; k++) if (g - k >= 0) acc += h[k] * int'(emem[ext_in + row * nrg + g - k]);
        chk(emem[ext_out + row * nrg + g] == 32'(acc), $sformatf("%s row %0d gate %0d", name, row, g));
      end
    chk(n_overlap > ov0, {name, ": DMA overlapped the kernel"});
    $display("TDE %s: %0d rows x %0d gates, %0d taps, %0d blocks, %0d cycles, %0d cycles of DMA/kernel overlap",
             name, nrows, nrg, ntap, nblk, (t1 - t0) / 10, n_overlap - ov0);
  endtask

  initial begin
    WAKE = la(7, 16); REQ_Q = la(15, 0); DONE_Q = la(15, 512);
    SYNC_IN[0] = la(7, 0); SYNC_IN[1] = la(7, 1); SYNC_OUT[0] = la(7, 2); SYNC_OUT[1] = la(7, 3);
    cfg_stack_mode = MAT_FIFO; cfg_stack_two_fifo = 1;
    cp_i_req_valid = 0; cp_i_req_addr = 0; cp_d_req_valid = 0; cp_d_req_we = 0; cp_d_req_addr = 0; cp_d_req_wdata = 0;
    cp_l_req_valid = 0; cp_l_req_op = OP_RD; cp_l_req_addr = 0; cp_l_req_wdata = 0;
    sp_i_req_valid = 0; sp_i_req_addr = 0;
    sp_l_req_valid = 0; sp_l_req_op = OP_RD; sp_l_req_addr = 0; sp_l_req_wdata = 0;
    dma_cfg_we = 0; dma_cfg_ch = 0; dma_cfg_reg = DREG_EXT_ADDR; dma_cfg_wdata = 0;
    net_rsp_valid = 0; net_rsp_id = 0; net_rsp_rdata = 0;
    cp_i_mem_rsp_valid = 0; sp_i_mem_rsp_valid = 0; cp_d_mem_rsp_valid = 0;
    repeat (4) @(negedge clk); rst_n = 1;
    // Table 5.3: small (6 ch, 36 gates, 15 PRI, 12 taps), medium (8, 450, 48, 32)
    run_tde("small",  6,  36, 15, 12, 32'h00000, 32'h10000);
    run_tde("medium", 8, 450, 48, 32, 32'h20000, 32'h50000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
