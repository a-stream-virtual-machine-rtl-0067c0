// tile_xbar: crossbar between the masters of a tile and its memory mats.
//
// NM masters (processor load/store ports, the DMA engine's tile port) reach
// NT mats. The upper bits of a master's word address select the mat, the low
// MAT_AW bits the word inside it. Each mat serves one access per cycle; when
// several masters want the same mat a round-robin arbiter picks one and the
// others see req_ready low and hold their request (a stall). A plain load or
// store to a mat configured as a FIFO becomes a pop or push, so software
// reaches a FIFO through an ordinary address. Mats whose TGT_EN bit is clear
// (for example mats that belong to a cache) are not reachable: such a request
// is accepted and answered with rsp_ok low.
// Timing: the response (rsp_valid, rsp_ok, rsp_rdata) reaches the master one
// cycle after its request is accepted, the mat's own latency.
// The crossbar's existence and the one-access-per-cycle stall come from the
// Smart Memories tile description; address decoding, round-robin arbitration
// and the FIFO operation mapping are this design's choices.
module tile_xbar
  import sm_pkg::*;
#(
  parameter int unsigned NM = 3,
  parameter int unsigned NT = NUM_MATS,
  parameter logic [NT-1:0] TGT_EN = '1,
  localparam int unsigned LAW = MAT_AW + $clog2(NT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mat_mode_e         tgt_mode  [NT],
  // masters
  input  logic              m_req_valid [NM],
  output logic              m_req_ready [NM],
  input  mat_op_e           m_req_op    [NM],
  input  logic [LAW-1:0]    m_req_addr  [NM],
  input  logic [WORD_W-1:0] m_req_wdata [NM],
  output logic              m_rsp_valid [NM],
  output logic              m_rsp_ok    [NM],
  output logic [WORD_W-1:0] m_rsp_rdata [NM],
  // mats
  output logic              t_req_valid [NT],
  output mat_op_e           t_req_op    [NT],
  output logic [MAT_AW-1:0] t_req_addr  [NT],
  output logic [WORD_W-1:0] t_req_wdata [NT],
  input  logic              t_rsp_ok    [NT],
  input  logic [WORD_W-1:0] t_rsp_rdata [NT]
);
  localparam int unsigned TW = $clog2(NT);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [TW-1:0]  m_tgt [NM];
  logic [NM-1:0]  want  [NT];
  logic [NM-1:0]  gnt   [NT];

  always_comb
    for (int m = 0; m < NM; m++) m_tgt[m] = m_req_addr[m][LAW-1:MAT_AW];

  for (genvar t = 0; t < NT; t++) begin : g_tgt
    always_comb
      for (int m = 0; m < NM; m++)
        want[t][m] = m_req_valid[m] && m_tgt[m] == TW'(t);
    rr_arbiter #(.N(NM)) u_arb (.clk, .rst_n, .req(want[t]), .advance(1'b1), .gnt(gnt[t]));
  end

  // mat side requests
  always_comb begin
    for (int t = 0; t < NT; t++) begin
      t_req_valid[t] = 1'b0;
      t_req_op[t]    = OP_RD;
      t_req_addr[t]  = '0;
      t_req_wdata[t] = '0;
      for (int m = 0; m < NM; m++) begin
        if (gnt[t][m] && TGT_EN[t]) begin
          t_req_valid[t] = 1'b1;
          t_req_addr[t]  = m_req_addr[m][MAT_AW-1:0];
          t_req_wdata[t] = m_req_wdata[m];
          t_req_op[t]    = m_req_op[m];
          if (tgt_mode[t] == MAT_FIFO) begin
            if (m_req_op[m] == OP_RD) t_req_op[t] = OP_POP;
            if (m_req_op[m] == OP_WR) t_req_op[t] = OP_PUSH;
          end
        end
      end
    end
    for (int m = 0; m < NM; m++) begin
      m_req_ready[m] = 1'b0;
      for (int t = 0; t < NT; t++)
        if (gnt[t][m]) m_req_ready[m] = 1'b1;
    end
  end

  // response routing: remember which mat each master was granted
  logic          pend    [NM];
  logic [TW-1:0] pend_t  [NM];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NM; m++) begin pend[m] <= 1'b0; pend_t[m] <= '0; end
    end else begin
      for (int m = 0; m < NM; m++) begin
        pend[m]   <= m_req_valid[m] && m_req_ready[m];
        pend_t[m] <= m_tgt[m];
      end
    end
  end

  always_comb
    for (int m = 0; m < NM; m++) begin
      m_rsp_valid[m] = pend[m];
      m_rsp_ok[m]    = pend[m] && TGT_EN[pend_t[m]] && t_rsp_ok[pend_t[m]];
      m_rsp_rdata[m] = t_rsp_rdata[pend_t[m]];
    end

  // a mat never receives two requests in one cycle
  for (genvar t = 0; t < NT; t++) begin : g_chk
    a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt[t]));
  end

endmodule
