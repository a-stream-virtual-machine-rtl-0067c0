// mem_mat: one configurable Smart Memories memory mat.
//
// A mat is a 1024 x 32-bit SRAM (4 kB) plus META_W meta-data bits per word and
// a little peripheral logic that lets it play one of four roles, chosen by
// cfg_mode:
//   MAT_SRAM  scratch memory. Plain loads/stores, plus the three safe
//             operations that use meta bit META_SAFE as a single-word lock:
//             safe-load fails (the requester stalls) unless the bit is set,
//             and clears it; safe-store fails while the bit is set, else sets
//             it and writes; always-safe-store never fails: it sets the bit and
//             writes when the bit was clear, and is dropped but still reported
//             successful when the bit was already set.
//   MAT_FIFO  pointer logic keeps head/tail/count for one 1024-word FIFO or,
//             with cfg_two_fifo, two 512-word FIFOs (FIFO 1 is chosen by
//             address bit 9). Push fails when full, pop when empty.
//   MAT_TAG   tag array of a cache: OP_TAG_LK compares the stored word with
//             req_wdata; hit_out is raised when they match and the valid
//             meta bit is set. OP_TAG_WR writes a tag and sets valid.
//   MAT_DATA  data array of a cache: a read returns rsp_ok only when the
//             associated tag mat's hit_out (wired to hit_in) is high.
// Timing: one request per cycle, always accepted; the response (rsp_valid,
// rsp_ok, rsp_rdata, hit_out) appears the following cycle. rsp_ok = 0 means
// the operation did not take effect (stalled safe op, FIFO full/empty, tag
// miss). safe_evt pulses with the response of every successful safe operation
// that changed the lock bit, so stalled requesters can be woken.
// The mat size, the roles, the FIFO split and the safe-operation rules follow
// the Smart Memories description; the operation encoding, the one-cycle
// latency and the FIFO-select bit are this design's choices. When the two
// descriptions of always-safe-store differ, the one used by the DMA manager
// (drop the write if the bit is already set) is followed.
module mem_mat
  import sm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  mat_mode_e            cfg_mode,
  input  logic                 cfg_two_fifo,
  input  logic                 req_valid,
  input  mat_op_e              req_op,
  input  logic [MAT_AW-1:0]    req_addr,
  input  logic [WORD_W-1:0]    req_wdata,
  input  logic                 hit_in,
  output logic                 rsp_valid,
  output logic                 rsp_ok,
  output logic [WORD_W-1:0]    rsp_rdata,
  output logic [META_W-1:0]    rsp_meta,
  output logic                 hit_out,
  output logic                 safe_evt,
  output logic [MAT_AW-1:0]    safe_evt_addr,
  output logic [1:0]           fifo_empty,
  output logic [1:0]           fifo_full
);

  logic [WORD_W-1:0] mem  [MAT_WORDS];
  logic [META_W-1:0] meta [MAT_WORDS];

  // FIFO pointer logic
  logic [MAT_AW-1:0] head  [2];
  logic [MAT_AW-1:0] tail  [2];
  logic [MAT_AW:0]   count [2];
  logic [MAT_AW:0]   depth;
  logic              fsel;

  assign depth = cfg_two_fifo ? (MAT_AW+1)'(MAT_WORDS/2) : (MAT_AW+1)'(MAT_WORDS);
  assign fsel  = cfg_two_fifo & req_addr[MAT_AW-1];

  always_comb begin
    for (int f = 0; f < 2; f++) begin
      fifo_empty[f] = (count[f] == '0);
      fifo_full[f]  = (count[f] == depth);
    end
    if (!cfg_two_fifo) begin
      fifo_empty[1] = 1'b1;
      fifo_full[1]  = 1'b1;
    end
  end

  // Decode of the request
  logic [MAT_AW-1:0] ea;         // effective word address
  logic              do_wr;      // write mem
  logic              ok;         // operation succeeds
  logic [META_W-1:0] meta_cur;
  logic [META_W-1:0] meta_nxt;
  logic              meta_we;
  logic              is_safe;
  logic [MAT_AW-1:0] fbase;

  assign meta_cur = meta[req_addr];
  assign fbase    = fsel ? MAT_AW'(MAT_WORDS/2) : '0;

  always_comb begin
    ea       = req_addr;
    do_wr    = 1'b0;
    ok       = 1'b1;
    meta_nxt = meta_cur;
    meta_we  = 1'b0;
    is_safe  = 1'b0;
    unique case (cfg_mode)
      MAT_FIFO: begin
        if (req_op == OP_PUSH || req_op == OP_WR) begin
          ok    = !fifo_full[fsel];
          ea    = fbase + tail[fsel];
          do_wr = ok;
        end else begin
          ok    = !fifo_empty[fsel];
          ea    = fbase + head[fsel];
        end
      end
      MAT_TAG: begin
        if (req_op == OP_TAG_WR) begin
          do_wr    = 1'b1;
          meta_nxt[META_VALID] = 1'b1;
          meta_nxt[META_USED]  = 1'b1;
          meta_we  = 1'b1;
        end else if (req_op == OP_WR) begin
          // plain write to a tag entry invalidates it
          do_wr    = 1'b1;
          meta_nxt = '0;
          meta_we  = 1'b1;
        end
      end
      default: begin  // MAT_SRAM and MAT_DATA
        unique case (req_op)
          OP_WR: do_wr = 1'b1;
          OP_SAFE_LD: begin
            is_safe = 1'b1;
            ok      = meta_cur[META_SAFE];
            meta_nxt[META_SAFE] = 1'b0;
            meta_we = ok;
          end
          OP_SAFE_ST: begin
            is_safe = 1'b1;
            ok      = !meta_cur[META_SAFE];
            meta_nxt[META_SAFE] = 1'b1;
            meta_we = ok;
            do_wr   = ok;
          end
          OP_ASAFE_ST: begin
            // reported successful either way; only takes effect when clear
            is_safe = !meta_cur[META_SAFE];
            meta_nxt[META_SAFE] = 1'b1;
            meta_we = !meta_cur[META_SAFE];
            do_wr   = !meta_cur[META_SAFE];
          end
          default: ;
        endcase
      end
    endcase
  end

  // Storage
  always_ff @(posedge clk) begin
    if (req_valid) begin
      if (do_wr) mem[ea] <= req_wdata;
      rsp_rdata <= mem[ea];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAT_WORDS; i++) meta[i] <= '0;
    end else if (req_valid && meta_we) begin
      meta[req_addr] <= meta_nxt;
    end
  end

  // FIFO pointers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < 2; f++) begin
        head[f]  <= '0;
        tail[f]  <= '0;
        count[f] <= '0;
      end
    end else if (req_valid && cfg_mode == MAT_FIFO && ok) begin
      if (req_op == OP_PUSH || req_op == OP_WR) begin
        tail[fsel]  <= (tail[fsel] == MAT_AW'(depth - 1)) ? '0 : tail[fsel] + 1'b1;
        count[fsel] <= count[fsel] + 1'b1;
      end else begin
        head[fsel]  <= (head[fsel] == MAT_AW'(depth - 1)) ? '0 : head[fsel] + 1'b1;
        count[fsel] <= count[fsel] - 1'b1;
      end
    end
  end

  // Response
  logic              ok_q, lk_q, tlk_q;
  logic [WORD_W-1:0] cmp_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid     <= 1'b0;
      ok_q          <= 1'b0;
      lk_q          <= 1'b0;
      tlk_q         <= 1'b0;
      cmp_q         <= '0;
      rsp_meta      <= '0;
      safe_evt      <= 1'b0;
      safe_evt_addr <= '0;
    end else begin
      rsp_valid     <= req_valid;
      ok_q          <= ok;
      lk_q          <= req_valid && cfg_mode == MAT_DATA && req_op == OP_RD;
      tlk_q         <= req_valid && cfg_mode == MAT_TAG && req_op == OP_TAG_LK;
      cmp_q         <= req_wdata;
      rsp_meta      <= meta_cur;
      safe_evt      <= req_valid && is_safe && ok &&
                       (cfg_mode == MAT_SRAM || cfg_mode == MAT_DATA);
      safe_evt_addr <= req_addr;
    end
  end

  // tag compare on the word read out of the array
  assign hit_out = tlk_q && rsp_meta[META_VALID] && (rsp_rdata == cmp_q);
  assign rsp_ok  = lk_q ? hit_in : (tlk_q ? hit_out : ok_q);

endmodule
