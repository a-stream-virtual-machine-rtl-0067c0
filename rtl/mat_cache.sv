// mat_cache: a cache assembled from memory mats, as Smart Memories builds its
// instruction and data caches.
//
// Each of the WAYS ways has one mat configured as a tag mat (MAT_TAG) and
// LINE_MATS mats configured as data mats (MAT_DATA) side by side; a line is
// LINE_MATS 32-bit words, one per data mat, and each mat holds 1024 lines, so
// a way stores LINE_MATS*4 kB. A lookup sends the line index to every mat of
// every way in the same cycle: the tag mats compare the stored tag with the
// request's tag and check the valid meta bit, and each tag mat's hit output
// gates the data mats of its way, so only the hitting way returns data. When
// no way hits, the line is requested from the cache controller on the mem_*
// port and written into the victim way (an invalid way if the tag mats'
// meta-data show one, otherwise the ways in turn).
// Stores are written through to mem_* and update the line on a hit; a store
// miss does not allocate.
// Interface: req_addr is a line address (word address / LINE_MATS) and
// req_wdata/rsp_rdata are whole lines, so with LINE_MATS=2 the port is the
// 64-bit instruction port. One request at a time; req_ready is high when
// idle. Timing: a load hit answers 2 cycles after acceptance; a miss adds the
// cache controller's latency plus one cycle.
// Tag/data mats accessed in parallel and gated by the tag hit follow the
// Smart Memories description; the write-through no-allocate store policy and
// the victim choice are this design's (the document does not give them).
module mat_cache
  import sm_pkg::*;
#(
  parameter int unsigned WAYS      = 2,   // tag mats
  parameter int unsigned LINE_MATS = 1,   // data mats per way = words per line
  parameter int unsigned AW        = 30,  // line address width
  localparam int unsigned LW = LINE_MATS * WORD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic [LW-1:0] req_wdata,
  output logic          rsp_valid,
  output logic [LW-1:0] rsp_rdata,
  // cache controller side
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output logic          mem_req_we,
  output logic [AW-1:0] mem_req_addr,
  output logic [LW-1:0] mem_req_wdata,
  input  logic          mem_rsp_valid,
  input  logic [LW-1:0] mem_rsp_rdata,
  output logic          hit_evt,     // pulses on a lookup hit
  output logic          miss_evt     // pulses on a lookup miss
);
  localparam int unsigned WB = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef enum logic [2:0] { C_IDLE, C_LOOK, C_MISS, C_FILL, C_WT } cstate_e;
  cstate_e st;

  logic [AW-1:0] a_q;
  logic          we_q;
  logic [LW-1:0] wd_q;
  logic [WB-1:0] victim_q, rr_q;

  logic [MAT_AW-1:0] idx;
  logic [WORD_W-1:0] tag;

  // per-mat request bundle
  logic              tv, dv;            // tag / data mats valid
  mat_op_e           top_op, dop;
  logic [MAT_AW-1:0] maddr;
  logic [WORD_W-1:0] twdata;
  logic [WAYS-1:0]   way_sel;           // which ways are written
  logic [LW-1:0]     dwdata;

  logic [WAYS-1:0]   way_hit;
  logic [WAYS-1:0]   way_valid;
  logic [LW-1:0]     way_data [WAYS];
  logic [LINE_MATS-1:0] dok [WAYS];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic              t_rv, t_ok, t_se;
    logic [WORD_W-1:0] t_rd;
    logic [META_W-1:0] t_meta;
    logic [MAT_AW-1:0] t_sea;
    logic [1:0]        t_fe, t_ff;
    mem_mat u_tag (
      .clk, .rst_n, .cfg_mode(MAT_TAG), .cfg_two_fifo(1'b0),
      .req_valid(tv && way_sel[w]), .req_op(top_op), .req_addr(maddr), .req_wdata(twdata),
      .hit_in(1'b0), .rsp_valid(t_rv), .rsp_ok(t_ok), .rsp_rdata(t_rd), .rsp_meta(t_meta),
      .hit_out(way_hit[w]), .safe_evt(t_se), .safe_evt_addr(t_sea),
      .fifo_empty(t_fe), .fifo_full(t_ff));
    assign way_valid[w] = t_meta[META_VALID];
    for (genvar d = 0; d < LINE_MATS; d++) begin : g_dat
      logic              d_rv, d_hit, d_se;
      logic [META_W-1:0] d_meta;
      logic [MAT_AW-1:0] d_sea;
      logic [1:0]        d_fe, d_ff;
      mem_mat u_data (
        .clk, .rst_n, .cfg_mode(MAT_DATA), .cfg_two_fifo(1'b0),
        .req_valid(dv && way_sel[w]), .req_op(dop), .req_addr(maddr),
        .req_wdata(dwdata[d*WORD_W +: WORD_W]),
        .hit_in(way_hit[w]), .rsp_valid(d_rv), .rsp_ok(dok[w][d]),
        .rsp_rdata(way_data[w][d*WORD_W +: WORD_W]), .rsp_meta(d_meta),
        .hit_out(d_hit), .safe_evt(d_se), .safe_evt_addr(d_sea),
        .fifo_empty(d_fe), .fifo_full(d_ff));
    end
  end

  assign idx = req_valid && st == C_IDLE ? req_addr[MAT_AW-1:0] : a_q[MAT_AW-1:0];
  assign tag = WORD_W'(a_q >> MAT_AW);

  // mat requests for the current state
  always_comb begin
    tv = 1'b0; dv = 1'b0;
    top_op = OP_TAG_LK; dop = OP_RD;
    maddr  = idx;
    twdata = WORD_W'(req_addr >> MAT_AW);
    dwdata = req_wdata;
    way_sel = '1;
    unique case (st)
      C_IDLE: if (req_valid) begin tv = 1'b1; dv = 1'b1; end
      C_LOOK: if (we_q && |way_hit) begin   // store hit: update the line
        dv = 1'b1; dop = OP_WR; dwdata = wd_q; way_sel = way_hit;
      end
      C_FILL: if (mem_rsp_valid) begin      // refill the victim way
        tv = 1'b1; dv = 1'b1; top_op = OP_TAG_WR; dop = OP_WR;
        twdata = tag; dwdata = mem_rsp_rdata;
        way_sel = '0; way_sel[victim_q] = 1'b1;
      end
      default: ;
    endcase
  end

  // hit data
  logic [LW-1:0] hit_data;
  always_comb begin
    hit_data = '0;
    for (int w = 0; w < WAYS; w++)
      if (&dok[w]) hit_data = hit_data | way_data[w];
  end

  // victim: first invalid way, else round robin
  logic [WB-1:0] victim;
  always_comb begin
    victim = rr_q;
    for (int w = WAYS-1; w >= 0; w--)
      if (!way_valid[w]) victim = WB'(w);
  end

  assign req_ready = (st == C_IDLE);
  assign mem_req_valid = (st == C_MISS) || (st == C_WT);
  assign mem_req_we    = (st == C_WT);
  assign mem_req_addr  = a_q;
  assign mem_req_wdata = wd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; a_q <= '0; we_q <= 1'b0; wd_q <= '0;
      victim_q <= '0; rr_q <= '0;
      rsp_valid <= 1'b0; rsp_rdata <= '0; hit_evt <= 1'b0; miss_evt <= 1'b0;
    end else begin
      rsp_valid <= 1'b0; hit_evt <= 1'b0; miss_evt <= 1'b0;
      unique case (st)
        C_IDLE: if (req_valid) begin
          a_q <= req_addr; we_q <= req_we; wd_q <= req_wdata;
          st  <= C_LOOK;
        end
        C_LOOK: begin
          hit_evt  <= |way_hit;
          miss_evt <= ~|way_hit;
          if (we_q) begin
            st <= C_WT;
          end else if (|way_hit) begin
            rsp_valid <= 1'b1; rsp_rdata <= hit_data; st <= C_IDLE;
          end else begin
            victim_q <= victim; st <= C_MISS;
          end
        end
        C_MISS: if (mem_req_ready) st <= C_FILL;
        C_FILL: if (mem_rsp_valid) begin
          rsp_valid <= 1'b1; rsp_rdata <= mem_rsp_rdata;
          rr_q <= (rr_q == WB'(WAYS-1)) ? '0 : rr_q + 1'b1;
          st <= C_IDLE;
        end
        C_WT: if (mem_req_ready) begin
          rsp_valid <= 1'b1; rsp_rdata <= '0; st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  // at most one way may hit
  a_one_way: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(way_hit));

endmodule
