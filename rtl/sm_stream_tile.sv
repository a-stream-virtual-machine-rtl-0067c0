// sm_stream_tile: one Smart Memories tile configured as the simplest Stream
// Virtual Machine (SVM) system: a control processor, one stream processor, a
// DMA engine and sixteen memory mats.
//
// The SVM sees a stream machine as three threads of control: a control
// processor that issues work, a stream processor that runs kernels out of a
// local stream memory, and a DMA engine that moves blocks between main memory
// and that stream memory. Here the sixteen 4 kB mats of the tile are split as
//   mats 0-2   control processor 8 kB direct-mapped I-cache (2 data + 1 tag,
//              64-bit lines for the 64-bit instruction port)
//   mats 3-6   control processor 8 kB two-way D-cache (2 data + 2 tag)
//   mat  7     4 kB sync SRAM, where safe loads/stores implement the locks
//              that order kernels and DMA transfers
//   mats 8-10  stream processor 8 kB direct-mapped I-cache
//   mats 11-14 16 kB stream SRAM (the SVM local stream memory)
//   mat  15    4 kB stack SRAM; its configuration inputs can turn it into
//              one or two FIFOs, e.g. the DMA request and completion queues
//              used when a processor of the tile acts as DMA manager
// The processors (configurable VLIW cores) and the quad cache controller are
// outside this module: their ports are brought out. Each processor has an
// instruction-cache port and a tile-local load/store port (xbar masters 0 and
// 1); the control processor also has a D-cache port. The DMA engine's tile
// port is xbar master 2; its registers are written through dma_cfg_* (by
// whichever processor manages DMA) and its outside traffic leaves through the
// single net_* port. Local addresses are word addresses {mat[3:0], word[9:0]}.
// When a processor's safe-load or safe-store fails (rsp_ok low) the
// processor stalls; the safe_wake_unit remembers it and raises cp_wake or
// sp_wake when a successful safe operation touches the same word, after which
// the processor re-issues the operation.
// The mat allocation follows the stream configuration of the tile given for
// Smart Memories; the port split, address map and DMA register port are this
// design's choices.
module sm_stream_tile
  import sm_pkg::*;
#(
  parameter int unsigned NCH            = 2,        // DMA channels
  parameter int unsigned AW             = 30,       // cache line address width
  parameter int unsigned EAW            = 32,       // outside word address width
  localparam int unsigned LAW = MAT_AW + 4,
  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration of mat 15: MAT_SRAM (stack) or MAT_FIFO
  input  mat_mode_e         cfg_stack_mode,
  input  logic              cfg_stack_two_fifo,
  // control processor instruction port (64-bit lines)
  input  logic              cp_i_req_valid,
  output logic              cp_i_req_ready,
  input  logic [AW-1:0]     cp_i_req_addr,
  output logic              cp_i_rsp_valid,
  output logic [63:0]       cp_i_rsp_data,
  output logic              cp_i_mem_req_valid,
  input  logic              cp_i_mem_req_ready,
  output logic [AW-1:0]     cp_i_mem_req_addr,
  input  logic              cp_i_mem_rsp_valid,
  input  logic [63:0]       cp_i_mem_rsp_data,
  // control processor cached data port
  input  logic              cp_d_req_valid,
  output logic              cp_d_req_ready,
  input  logic              cp_d_req_we,
  input  logic [AW-1:0]     cp_d_req_addr,
  input  logic [WORD_W-1:0] cp_d_req_wdata,
  output logic              cp_d_rsp_valid,
  output logic [WORD_W-1:0] cp_d_rsp_data,
  output logic              cp_d_mem_req_valid,
  input  logic              cp_d_mem_req_ready,
  output logic              cp_d_mem_req_we,
  output logic [AW-1:0]     cp_d_mem_req_addr,
  output logic [WORD_W-1:0] cp_d_mem_req_wdata,
  input  logic              cp_d_mem_rsp_valid,
  input  logic [WORD_W-1:0] cp_d_mem_rsp_data,
  // control processor tile-local port
  input  logic              cp_l_req_valid,
  output logic              cp_l_req_ready,
  input  mat_op_e           cp_l_req_op,
  input  logic [LAW-1:0]    cp_l_req_addr,
  input  logic [WORD_W-1:0] cp_l_req_wdata,
  output logic              cp_l_rsp_valid,
  output logic              cp_l_rsp_ok,
  output logic [WORD_W-1:0] cp_l_rsp_rdata,
  output logic              cp_wake,
  // stream processor instruction port
  input  logic              sp_i_req_valid,
  output logic              sp_i_req_ready,
  input  logic [AW-1:0]     sp_i_req_addr,
  output logic              sp_i_rsp_valid,
  output logic [63:0]       sp_i_rsp_data,
  output logic              sp_i_mem_req_valid,
  input  logic              sp_i_mem_req_ready,
  output logic [AW-1:0]     sp_i_mem_req_addr,
  input  logic              sp_i_mem_rsp_valid,
  input  logic [63:0]       sp_i_mem_rsp_data,
  // stream processor tile-local port
  input  logic              sp_l_req_valid,
  output logic              sp_l_req_ready,
  input  mat_op_e           sp_l_req_op,
  input  logic [LAW-1:0]    sp_l_req_addr,
  input  logic [WORD_W-1:0] sp_l_req_wdata,
  output logic              sp_l_rsp_valid,
  output logic              sp_l_rsp_ok,
  output logic [WORD_W-1:0] sp_l_rsp_rdata,
  output logic              sp_wake,
  // DMA registers
  input  logic              dma_cfg_we,
  input  logic [CHW-1:0]    dma_cfg_ch,
  input  dma_reg_e          dma_cfg_reg,
  input  logic [WORD_W-1:0] dma_cfg_wdata,
  output logic [NCH-1:0]    dma_ch_busy,
  output logic [NCH-1:0]    dma_ch_done,
  // network interface (DMA traffic)
  output logic              net_req_valid,
  input  logic              net_req_ready,
  output logic              net_req_we,
  output logic [EAW-1:0]    net_req_addr,
  output logic [WORD_W-1:0] net_req_wdata,
  output logic [CHW-1:0]    net_req_id,
  input  logic              net_rsp_valid,
  input  logic [CHW-1:0]    net_rsp_id,
  input  logic [WORD_W-1:0] net_rsp_rdata,
  // FIFO status of mat 15 when it is configured as FIFOs
  output logic [1:0]        stack_fifo_empty,
  output logic [1:0]        stack_fifo_full,
  // cache events, one bit per cache {sp_i, cp_d, cp_i}, for counters
  output logic [2:0]        cache_hit,
  output logic [2:0]        cache_miss
);

  localparam int unsigned NM = 3;
  // mats reachable through the crossbar: sync, stream SRAM, stack
  localparam logic [NUM_MATS-1:0] SCRATCH = 16'b1111_1000_1000_0000;
  localparam int unsigned MAT_SYNC  = 7;
  localparam int unsigned MAT_STACK = 15;

  // ---------------- caches ----------------
  logic        cp_i_mem_we_unused, sp_i_mem_we_unused;
  logic [63:0] cp_i_mem_wd_unused, sp_i_mem_wd_unused;
  logic        cp_i_hit, cp_i_miss, sp_i_hit, sp_i_miss, cp_d_hit, cp_d_miss;
  assign cache_hit  = {sp_i_hit, cp_d_hit, cp_i_hit};
  assign cache_miss = {sp_i_miss, cp_d_miss, cp_i_miss};

  mat_cache #(.WAYS(1), .LINE_MATS(2), .AW(AW)) u_cp_icache (
    .clk, .rst_n,
    .req_valid(cp_i_req_valid), .req_ready(cp_i_req_ready), .req_we(1'b0),
    .req_addr(cp_i_req_addr), .req_wdata(64'h0),
    .rsp_valid(cp_i_rsp_valid), .rsp_rdata(cp_i_rsp_data),
    .mem_req_valid(cp_i_mem_req_valid), .mem_req_ready(cp_i_mem_req_ready),
    .mem_req_we(cp_i_mem_we_unused), .mem_req_addr(cp_i_mem_req_addr),
    .mem_req_wdata(cp_i_mem_wd_unused),
    .mem_rsp_valid(cp_i_mem_rsp_valid), .mem_rsp_rdata(cp_i_mem_rsp_data),
    .hit_evt(cp_i_hit), .miss_evt(cp_i_miss));

  mat_cache #(.WAYS(2), .LINE_MATS(1), .AW(AW)) u_cp_dcache (
    .clk, .rst_n,
    .req_valid(cp_d_req_valid), .req_ready(cp_d_req_ready), .req_we(cp_d_req_we),
    .req_addr(cp_d_req_addr), .req_wdata(cp_d_req_wdata),
    .rsp_valid(cp_d_rsp_valid), .rsp_rdata(cp_d_rsp_data),
    .mem_req_valid(cp_d_mem_req_valid), .mem_req_ready(cp_d_mem_req_ready),
    .mem_req_we(cp_d_mem_req_we), .mem_req_addr(cp_d_mem_req_addr),
    .mem_req_wdata(cp_d_mem_req_wdata),
    .mem_rsp_valid(cp_d_mem_rsp_valid), .mem_rsp_rdata(cp_d_mem_rsp_data),
    .hit_evt(cp_d_hit), .miss_evt(cp_d_miss));

  mat_cache #(.WAYS(1), .LINE_MATS(2), .AW(AW)) u_sp_icache (
    .clk, .rst_n,
    .req_valid(sp_i_req_valid), .req_ready(sp_i_req_ready), .req_we(1'b0),
    .req_addr(sp_i_req_addr), .req_wdata(64'h0),
    .rsp_valid(sp_i_rsp_valid), .rsp_rdata(sp_i_rsp_data),
    .mem_req_valid(sp_i_mem_req_valid), .mem_req_ready(sp_i_mem_req_ready),
    .mem_req_we(sp_i_mem_we_unused), .mem_req_addr(sp_i_mem_req_addr),
    .mem_req_wdata(sp_i_mem_wd_unused),
    .mem_rsp_valid(sp_i_mem_rsp_valid), .mem_rsp_rdata(sp_i_mem_rsp_data),
    .hit_evt(sp_i_hit), .miss_evt(sp_i_miss));

  // ---------------- DMA engine ----------------
  logic              dma_l_valid, dma_l_ready;
  mat_op_e           dma_l_op;
  logic [LAW-1:0]    dma_l_addr;
  logic [WORD_W-1:0] dma_l_wdata;

  // ---------------- crossbar ----------------
  mat_mode_e         tgt_mode    [NUM_MATS];
  logic              m_req_valid [NM];
  logic              m_req_ready [NM];
  mat_op_e           m_req_op    [NM];
  logic [LAW-1:0]    m_req_addr  [NM];
  logic [WORD_W-1:0] m_req_wdata [NM];
  logic              m_rsp_valid [NM];
  logic              m_rsp_ok    [NM];
  logic [WORD_W-1:0] m_rsp_rdata [NM];
  logic              t_req_valid [NUM_MATS];
  mat_op_e           t_req_op    [NUM_MATS];
  logic [MAT_AW-1:0] t_req_addr  [NUM_MATS];
  logic [WORD_W-1:0] t_req_wdata [NUM_MATS];
  logic              t_rsp_ok    [NUM_MATS];
  logic [WORD_W-1:0] t_rsp_rdata [NUM_MATS];

  dma_engine #(.NCH(NCH), .EAW(EAW), .LAW(LAW)) u_dma (
    .clk, .rst_n,
    .cfg_we(dma_cfg_we), .cfg_ch(dma_cfg_ch), .cfg_reg(dma_cfg_reg), .cfg_wdata(dma_cfg_wdata),
    .ch_busy(dma_ch_busy), .ch_done(dma_ch_done),
    .loc_req_valid(dma_l_valid), .loc_req_ready(dma_l_ready), .loc_req_op(dma_l_op),
    .loc_req_addr(dma_l_addr), .loc_req_wdata(dma_l_wdata),
    .loc_rsp_valid(m_rsp_valid[2]), .loc_rsp_rdata(m_rsp_rdata[2]),
    .ext_req_valid(net_req_valid), .ext_req_ready(net_req_ready), .ext_req_we(net_req_we),
    .ext_req_addr(net_req_addr), .ext_req_wdata(net_req_wdata), .ext_req_id(net_req_id),
    .ext_rsp_valid(net_rsp_valid), .ext_rsp_id(net_rsp_id), .ext_rsp_rdata(net_rsp_rdata));

  always_comb begin
    m_req_valid[0] = cp_l_req_valid; m_req_op[0] = cp_l_req_op;
    m_req_addr[0]  = cp_l_req_addr;  m_req_wdata[0] = cp_l_req_wdata;
    m_req_valid[1] = sp_l_req_valid; m_req_op[1] = sp_l_req_op;
    m_req_addr[1]  = sp_l_req_addr;  m_req_wdata[1] = sp_l_req_wdata;
    m_req_valid[2] = dma_l_valid;    m_req_op[2] = dma_l_op;
    m_req_addr[2]  = dma_l_addr;     m_req_wdata[2] = dma_l_wdata;
    for (int t = 0; t < NUM_MATS; t++)
      tgt_mode[t] = (t == MAT_STACK) ? cfg_stack_mode : MAT_SRAM;
  end
  assign cp_l_req_ready = m_req_ready[0];
  assign cp_l_rsp_valid = m_rsp_valid[0];
  assign cp_l_rsp_ok    = m_rsp_ok[0];
  assign cp_l_rsp_rdata = m_rsp_rdata[0];
  assign sp_l_req_ready = m_req_ready[1];
  assign sp_l_rsp_valid = m_rsp_valid[1];
  assign sp_l_rsp_ok    = m_rsp_ok[1];
  assign sp_l_rsp_rdata = m_rsp_rdata[1];
  assign dma_l_ready    = m_req_ready[2];

  tile_xbar #(.NM(NM), .NT(NUM_MATS), .TGT_EN(SCRATCH)) u_xbar (
    .clk, .rst_n, .tgt_mode,
    .m_req_valid, .m_req_ready, .m_req_op, .m_req_addr, .m_req_wdata,
    .m_rsp_valid, .m_rsp_ok, .m_rsp_rdata,
    .t_req_valid, .t_req_op, .t_req_addr, .t_req_wdata, .t_rsp_ok, .t_rsp_rdata);

  // ---------------- scratch mats ----------------
  logic [NUM_MATS-1:0] s_evt;
  logic [MAT_AW-1:0]   s_evt_addr [NUM_MATS];

  for (genvar t = 0; t < NUM_MATS; t++) begin : g_mat
    if (SCRATCH[t]) begin : g_scr
      logic              rv, hit;
      logic [META_W-1:0] meta;
      logic [1:0]        fe, ff;
      mem_mat u_mat (
        .clk, .rst_n, .cfg_mode(tgt_mode[t]),
        .cfg_two_fifo((t == MAT_STACK) ? cfg_stack_two_fifo : 1'b0),
        .req_valid(t_req_valid[t]), .req_op(t_req_op[t]), .req_addr(t_req_addr[t]),
        .req_wdata(t_req_wdata[t]), .hit_in(1'b0),
        .rsp_valid(rv), .rsp_ok(t_rsp_ok[t]), .rsp_rdata(t_rsp_rdata[t]), .rsp_meta(meta),
        .hit_out(hit), .safe_evt(s_evt[t]), .safe_evt_addr(s_evt_addr[t]),
        .fifo_empty(fe), .fifo_full(ff));
      if (t == MAT_STACK) begin : g_st
        assign stack_fifo_empty = fe;
        assign stack_fifo_full  = ff;
      end
    end else begin : g_none
      // mats 0-6 and 8-10 belong to the caches
      assign t_rsp_ok[t]    = 1'b0;
      assign t_rsp_rdata[t] = '0;
      assign s_evt[t]       = 1'b0;
      assign s_evt_addr[t]  = '0;
    end
  end

  // ---------------- safe-operation stalls and wake-up ----------------
  logic [1:0]     pend_safe;
  logic [LAW-1:0] pend_addr [2];
  logic [1:0]     blk_valid;
  logic [LAW-1:0] evt_addr  [NUM_MATS];
  logic [1:0]     wake, waiting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_safe <= '0;
      pend_addr[0] <= '0; pend_addr[1] <= '0;
    end else begin
      for (int m = 0; m < 2; m++) begin
        pend_safe[m] <= m_req_valid[m] && m_req_ready[m] &&
                        (m_req_op[m] == OP_SAFE_LD || m_req_op[m] == OP_SAFE_ST);
        pend_addr[m] <= m_req_addr[m];
      end
    end
  end

  always_comb begin
    for (int m = 0; m < 2; m++)
      blk_valid[m] = pend_safe[m] && m_rsp_valid[m] && !m_rsp_ok[m];
    for (int t = 0; t < NUM_MATS; t++)
      evt_addr[t] = {4'(t), s_evt_addr[t]};
  end

  safe_wake_unit #(.NREQ(2), .AW(LAW), .NEVT(NUM_MATS)) u_wake (
    .clk, .rst_n, .blk_valid, .blk_addr(pend_addr), .evt_valid(s_evt), .evt_addr,
    .wake, .waiting);

  assign cp_wake = wake[0];
  assign sp_wake = wake[1];

endmodule
