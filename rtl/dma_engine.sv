// dma_engine: multi-channel DMA engine of a Smart Memories quad.
//
// The engine moves data between a tile's local memory mats and the outside
// memory system. It has NCH independent channels and no request queue: a
// channel is set up by writing its memory-mapped registers (dma_reg_e in
// sm_pkg) and launched by a final write of the control register with start=1.
// The tile side of a transfer is always contiguous; the outside side follows
// one of three addressing modes:
//   DMA_BLOCK    records follow each other: record r starts at EXT + r*REC
//   DMA_STRIDED  record r starts at EXT + r*STRIDE (e.g. a matrix column)
//   DMA_INDEXED  record r starts at EXT + idx[r], where idx[] is a list of word
//                offsets read from tile memory at IDX_ADDR (gather/scatter)
// to_ext selects the direction. When the last word has moved, a channel with
// done_en issues one completion write to DONE_ADDR with DONE_DATA using the
// memory operation done_op (plain store, FIFO push, safe or always-safe
// store), which is how a waiting processor or the DMA manager is notified
// without polling; ch_done also pulses.
// Interfaces: cfg_* register writes; loc_* port to the tile crossbar (request
// valid/ready, response loc_rsp_valid one cycle after acceptance, in order);
// ext_* port to the network interface, which accepts one message per cycle.
// Reads on ext carry the channel number in ext_req_id and are answered in any
// order by ext_rsp_* with the same id; ext writes are posted.
// Timing: each channel keeps one word in flight (read source, then write
// destination); channels that are active at the same time are interleaved on
// both ports by round-robin arbitration, so two channels keep the network
// busy while one waits for a read.
// The three modes, the register-based launch, the programmable completion
// write, named channels and the one-message-per-cycle network port follow the
// Smart Memories description; the register map, word-granular addresses, the
// index format (word offsets) and the one-word-in-flight channel are this
// design's choices.
module dma_engine
  import sm_pkg::*;
#(
  parameter int unsigned NCH = 2,    // DMA channels
  parameter int unsigned EAW = 32,   // outside word address width
  parameter int unsigned LAW = 14,   // tile word address width
  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration registers
  input  logic              cfg_we,
  input  logic [CHW-1:0]    cfg_ch,
  input  dma_reg_e          cfg_reg,
  input  logic [WORD_W-1:0] cfg_wdata,
  output logic [NCH-1:0]    ch_busy,
  output logic [NCH-1:0]    ch_done,
  // tile side
  output logic              loc_req_valid,
  input  logic              loc_req_ready,
  output mat_op_e           loc_req_op,
  output logic [LAW-1:0]    loc_req_addr,
  output logic [WORD_W-1:0] loc_req_wdata,
  input  logic              loc_rsp_valid,
  input  logic [WORD_W-1:0] loc_rsp_rdata,
  // network side
  output logic              ext_req_valid,
  input  logic              ext_req_ready,
  output logic              ext_req_we,
  output logic [EAW-1:0]    ext_req_addr,
  output logic [WORD_W-1:0] ext_req_wdata,
  output logic [CHW-1:0]    ext_req_id,
  input  logic              ext_rsp_valid,
  input  logic [CHW-1:0]    ext_rsp_id,
  input  logic [WORD_W-1:0] ext_rsp_rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_IDX, S_IDX_W, S_RD, S_RD_W, S_WR, S_DONE
  } ch_state_e;

  typedef struct packed {
    logic [EAW-1:0]    ext_addr;
    logic [LAW-1:0]    loc_addr;
    logic [15:0]       rec_words;
    logic [EAW-1:0]    stride;
    logic [15:0]       num_recs;
    logic [LAW-1:0]    idx_addr;
    logic [LAW-1:0]    done_addr;
    logic [WORD_W-1:0] done_data;
    dma_ctrl_t         ctrl;
  } ch_cfg_t;

  ch_cfg_t           cfg   [NCH];
  ch_state_e         st    [NCH];
  logic [15:0]       rec   [NCH];   // current record
  logic [15:0]       wrd   [NCH];   // word inside record
  logic [EAW-1:0]    rbase [NCH];   // outside address of record start
  logic [LAW-1:0]    lptr  [NCH];   // tile address of current word
  logic [WORD_W-1:0] buf_q [NCH];   // word in flight

  // which ports each channel wants this cycle
  logic [NCH-1:0] want_loc, want_ext, gnt_loc, gnt_ext;

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      want_loc[c] = (st[c] == S_IDX) || (st[c] == S_DONE && cfg[c].ctrl.done_en) ||
                    (st[c] == S_RD && cfg[c].ctrl.to_ext) ||
                    (st[c] == S_WR && !cfg[c].ctrl.to_ext);
      want_ext[c] = (st[c] == S_RD && !cfg[c].ctrl.to_ext) ||
                    (st[c] == S_WR && cfg[c].ctrl.to_ext);
      ch_busy[c]  = (st[c] != S_IDLE);
    end
  end

  rr_arbiter #(.N(NCH)) u_arb_loc (.clk, .rst_n, .req(want_loc), .advance(loc_req_ready), .gnt(gnt_loc));
  rr_arbiter #(.N(NCH)) u_arb_ext (.clk, .rst_n, .req(want_ext), .advance(ext_req_ready), .gnt(gnt_ext));

  // request multiplexers
  always_comb begin
    loc_req_valid = |want_loc;
    loc_req_op    = OP_RD;
    loc_req_addr  = '0;
    loc_req_wdata = '0;
    ext_req_valid = |want_ext;
    ext_req_we    = 1'b0;
    ext_req_addr  = '0;
    ext_req_wdata = '0;
    ext_req_id    = '0;
    for (int c = 0; c < NCH; c++) begin
      if (gnt_loc[c]) begin
        unique case (st[c])
          S_IDX:  begin loc_req_op = OP_RD; loc_req_addr = cfg[c].idx_addr + LAW'(rec[c]); end
          S_DONE: begin
            loc_req_op    = mat_op_e'(cfg[c].ctrl.done_op);
            loc_req_addr  = cfg[c].done_addr;
            loc_req_wdata = cfg[c].done_data;
          end
          S_RD:   begin loc_req_op = OP_RD; loc_req_addr = lptr[c]; end
          default: begin
            loc_req_op = OP_WR; loc_req_addr = lptr[c]; loc_req_wdata = buf_q[c];
          end
        endcase
      end
      if (gnt_ext[c]) begin
        ext_req_we    = (st[c] == S_WR);
        ext_req_addr  = rbase[c] + EAW'(wrd[c]);
        ext_req_wdata = buf_q[c];
        ext_req_id    = CHW'(c);
      end
    end
  end

  // which channel owns the local response (one-cycle latency)
  logic           loc_pend;
  logic [CHW-1:0] loc_pend_ch;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loc_pend    <= 1'b0;
      loc_pend_ch <= '0;
    end else begin
      loc_pend <= 1'b0;
      for (int c = 0; c < NCH; c++)
        if (gnt_loc[c] && loc_req_ready && (st[c] == S_IDX || st[c] == S_RD)) begin
          loc_pend    <= 1'b1;
          loc_pend_ch <= CHW'(c);
        end
    end
  end

  // channel state machines
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        cfg[c]   <= '0;
        st[c]    <= S_IDLE;
        rec[c]   <= '0;
        wrd[c]   <= '0;
        rbase[c] <= '0;
        lptr[c]  <= '0;
        buf_q[c] <= '0;
      end
      ch_done <= '0;
    end else begin
      ch_done <= '0;
      for (int c = 0; c < NCH; c++) begin
        logic lgo, ego, last_w, last_r;
        lgo    = gnt_loc[c] && loc_req_ready;
        ego    = gnt_ext[c] && ext_req_ready;
        last_w = (wrd[c] + 16'd1 == cfg[c].rec_words);
        last_r = (rec[c] + 16'd1 == cfg[c].num_recs);
        // register writes, accepted while the channel is idle
        if (cfg_we && cfg_ch == CHW'(c) && st[c] == S_IDLE) begin
          unique case (cfg_reg)
            DREG_EXT_ADDR:  cfg[c].ext_addr  <= EAW'(cfg_wdata);
            DREG_LOC_ADDR:  cfg[c].loc_addr  <= LAW'(cfg_wdata);
            DREG_REC_WORDS: cfg[c].rec_words <= cfg_wdata[15:0];
            DREG_STRIDE:    cfg[c].stride    <= EAW'(cfg_wdata);
            DREG_NUM_RECS:  cfg[c].num_recs  <= cfg_wdata[15:0];
            DREG_IDX_ADDR:  cfg[c].idx_addr  <= LAW'(cfg_wdata);
            DREG_DONE_ADDR: cfg[c].done_addr <= LAW'(cfg_wdata);
            DREG_DONE_DATA: cfg[c].done_data <= cfg_wdata;
            DREG_CTRL: begin
              cfg[c].ctrl <= dma_ctrl_t'(cfg_wdata);
              if (cfg_wdata[0]) begin
                rec[c]   <= '0;
                wrd[c]   <= '0;
                rbase[c] <= cfg[c].ext_addr;
                lptr[c]  <= cfg[c].loc_addr;
                if (cfg[c].num_recs == '0 || cfg[c].rec_words == '0)
                  st[c] <= S_DONE;
                else if (dma_mode_e'(cfg_wdata[5:4]) == DMA_INDEXED)
                  st[c] <= S_IDX;
                else
                  st[c] <= S_RD;
              end
            end
            default: ;
          endcase
        end
        unique case (st[c])
          S_IDX:   if (lgo) st[c] <= S_IDX_W;
          S_IDX_W: if (loc_pend && loc_pend_ch == CHW'(c) && loc_rsp_valid) begin
                     rbase[c] <= cfg[c].ext_addr + EAW'(loc_rsp_rdata);
                     st[c]    <= S_RD;
                   end
          S_RD:    if (lgo || ego) st[c] <= S_RD_W;
          S_RD_W: begin
            if (cfg[c].ctrl.to_ext) begin
              if (loc_pend && loc_pend_ch == CHW'(c) && loc_rsp_valid) begin
                buf_q[c] <= loc_rsp_rdata;
                st[c]    <= S_WR;
              end
            end else if (ext_rsp_valid && ext_rsp_id == CHW'(c)) begin
              buf_q[c] <= ext_rsp_rdata;
              st[c]    <= S_WR;
            end
          end
          S_WR: if (lgo || ego) begin
            lptr[c] <= lptr[c] + 1'b1;
            if (!last_w) begin
              wrd[c] <= wrd[c] + 16'd1;
              st[c]  <= S_RD;
            end else begin
              wrd[c] <= '0;
              rec[c] <= rec[c] + 16'd1;
              unique case (dma_mode_e'(cfg[c].ctrl.mode))
                DMA_STRIDED: rbase[c] <= rbase[c] + cfg[c].stride;
                default:     rbase[c] <= rbase[c] + EAW'(cfg[c].rec_words);
              endcase
              if (last_r)
                st[c] <= S_DONE;
              else if (dma_mode_e'(cfg[c].ctrl.mode) == DMA_INDEXED)
                st[c] <= S_IDX;
              else
                st[c] <= S_RD;
            end
          end
          S_DONE: if (!cfg[c].ctrl.done_en || lgo) begin
            st[c]      <= S_IDLE;
            ch_done[c] <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // valid/ready rules: a request is held until it is taken
  a_loc_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               loc_req_valid && !loc_req_ready |=> loc_req_valid);
  a_ext_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               ext_req_valid && !ext_req_ready |=> ext_req_valid);

endmodule
