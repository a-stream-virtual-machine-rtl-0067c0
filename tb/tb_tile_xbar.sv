// tb_tile_xbar: self-checking test of the tile crossbar.
// Three masters issue random loads and stores to four targets (one FIFO-mode,
// one disabled) modelled here as one-cycle memories. Checked: read data
// against a reference memory updated in acceptance order, FIFO op mapping,
// rejection of the disabled target, stalls under conflict and the bound on
// how long a master can wait for a mat under round-robin arbitration.
module tb_tile_xbar;
  import sm_pkg::*;
  localparam int NM = 3, NT = 4, LAW = MAT_AW + 2;
  localparam logic [NT-1:0] EN = 4'b1011;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mat_mode_e tgt_mode [NT];
  logic m_req_valid [NM], m_req_ready [NM], m_rsp_valid [NM], m_rsp_ok [NM];
  mat_op_e m_req_op [NM];
  logic [LAW-1:0] m_req_addr [NM];
  logic [31:0] m_req_wdata [NM], m_rsp_rdata [NM];
  logic t_req_valid [NT], t_rsp_ok [NT];
  mat_op_e t_req_op [NT];
  logic [MAT_AW-1:0] t_req_addr [NT];
  logic [31:0] t_req_wdata [NT], t_rsp_rdata [NT];

  tile_xbar #(.NM(NM), .NT(NT), .TGT_EN(EN)) dut (.*);

  int checks = 0, failures = 0, stalls = 0, fifo_ops = 0, rejects = 0;
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // target models: one-cycle memories; target 1 records FIFO ops
  logic [31:0] tm [NT][16];
  always_ff @(posedge clk)
    for (int t = 0; t < NT; t++) begin
      t_rsp_ok[t] <= 1'b1;
      if (t_req_valid[t]) begin
        t_rsp_rdata[t] <= tm[t][t_req_addr[t][3:0]];
        if (t_req_op[t] == OP_WR || t_req_op[t] == OP_PUSH) tm[t][t_req_addr[t][3:0]] <= t_req_wdata[t];
      end
    end

  // reference
  logic [31:0] ref_m [NT][16];
  logic [31:0] exp_d [NM];
  bit          exp_rd [NM], exp_ok [NM], exp_v [NM];
  int          waitc [NM];

  initial begin
    #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) begin
      tgt_mode[t] = (t == 1) ? MAT_FIFO : MAT_SRAM;
      for (int i = 0; i < 16; i++) begin tm[t][i] = 32'(t*100 + i); ref_m[t][i] = 32'(t*100 + i); end
    end
    for (int m = 0; m < NM; m++) begin
      m_req_valid[m] = 0; m_req_op[m] = OP_RD; m_req_addr[m] = 0; m_req_wdata[m] = 0;
      exp_v[m] = 0; waitc[m] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // new requests for masters that are idle
      for (int m = 0; m < NM; m++)
        if (!m_req_valid[m] && $urandom_range(0, 3) != 0) begin
          int t;
          t = (cyc < 200) ? 0 : $urandom_range(0, NT-1);   // start with a hot spot
          m_req_valid[m] = 1;
          m_req_op[m]    = $urandom_range(0, 1) ? OP_WR : OP_RD;
          m_req_addr[m]  = {2'(t), MAT_AW'($urandom_range(0, 15))};
          m_req_wdata[m] = $urandom;
          waitc[m] = 0;
        end
      #1;
      // check mat-side translation before the edge
      for (int t = 0; t < NT; t++) if (t_req_valid[t]) begin
        chk(EN[t], "disabled target never driven");
        if (t == 1) begin
          chk(t_req_op[t] == OP_PUSH || t_req_op[t] == OP_POP, "FIFO target gets push/pop");
          fifo_ops++;
        end
      end
      // acceptance, evaluated on the values before the clock edge
      for (int m = 0; m < NM; m++) begin
        exp_v[m] = 0;
        if (m_req_valid[m]) begin
          if (m_req_ready[m]) begin
            int t, a;
            t = int'(m_req_addr[m][LAW-1:MAT_AW]); a = int'(m_req_addr[m][3:0]);
            exp_v[m] = 1; exp_ok[m] = EN[t]; exp_rd[m] = (m_req_op[m] == OP_RD);
            exp_d[m] = ref_m[t][a];
            if (!EN[t]) rejects++;
            else if (m_req_op[m] == OP_WR) ref_m[t][a] = m_req_wdata[m];
          end else begin
            stalls++; waitc[m]++;
            chk(waitc[m] < NM, "waited at most NM-1 cycles");
          end
        end
      end
      @(posedge clk); #1;
      for (int m = 0; m < NM; m++) begin
        if (exp_v[m]) begin
          m_req_valid[m] = 0;
          chk(m_rsp_valid[m], "response valid");
          chk(m_rsp_ok[m] == exp_ok[m], "response ok");
          if (exp_rd[m] && exp_ok[m]) chk(m_rsp_rdata[m] == exp_d[m], $sformatf("read data m%0d", m));
        end else chk(!m_rsp_valid[m], "no spurious response");
      end
    end
    chk(stalls > 100, "conflict stalls happened");
    chk(fifo_ops > 100, "FIFO target used");
    chk(rejects > 100, "disabled target rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
