// tb_safe_wake_unit: self-checking test of the stalled-processor tracker.
// Random stalls and events are applied; a reference model in the testbench
// predicts which processors must be woken each cycle. Two event inputs are
// used so that simultaneous events from different mats are covered.
module tb_safe_wake_unit;
  localparam int NREQ = 8, AW = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NREQ-1:0] blk_valid;
  logic [1:0] evt_valid;
  logic [AW-1:0] blk_addr [NREQ];
  logic [AW-1:0] evt_addr [2];
  logic [NREQ-1:0] wake, waiting;

  safe_wake_unit #(.NREQ(NREQ), .AW(AW), .NEVT(2)) dut (.*);

  int checks = 0, failures = 0, wakes = 0;
  bit m_wait [NREQ];
  logic [AW-1:0] m_addr [NREQ];
  logic [NREQ-1:0] exp_wake;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    blk_valid = 0; evt_valid = 0; foreach (blk_addr[i]) blk_addr[i] = 0; evt_addr[0] = 0; evt_addr[1] = 0;
    foreach (m_wait[i]) begin m_wait[i] = 0; m_addr[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // choose inputs: only stall a processor that is not waiting
      for (int i = 0; i < NREQ; i++) begin
        blk_valid[i] = !m_wait[i] && $urandom_range(0, 5) == 0;
        blk_addr[i]  = AW'($urandom_range(0, 7));      // few addresses: many matches
      end
      for (int e = 0; e < 2; e++) begin
        evt_valid[e] = ($urandom_range(0, 3) == 0);
        evt_addr[e]  = AW'($urandom_range(0, 7));
      end
      // reference
      exp_wake = '0;
      for (int i = 0; i < NREQ; i++) begin
        bit nb, h;
        nb = blk_valid[i];
        h = 0;
        for (int e = 0; e < 2; e++)
          if (evt_valid[e] && (nb ? blk_addr[i] == evt_addr[e] : m_wait[i] && m_addr[i] == evt_addr[e])) h = 1;
        if (h) begin
          exp_wake[i] = 1; m_wait[i] = 0;
        end else if (nb) begin
          m_wait[i] = 1; m_addr[i] = blk_addr[i];
        end
      end
      @(posedge clk); #1;
      checks++;
      if (wake !== exp_wake) begin
        failures++; $display("FAIL cyc %0d wake %b exp %b", cyc, wake, exp_wake);
      end
      for (int i = 0; i < NREQ; i++) begin
        checks++;
        if (waiting[i] != m_wait[i]) begin failures++; $display("FAIL waiting[%0d]", i); end
      end
      wakes += $countones(wake);
    end
    checks++;
    if (wakes < 50) begin failures++; $display("FAIL too few wakes %0d", wakes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
