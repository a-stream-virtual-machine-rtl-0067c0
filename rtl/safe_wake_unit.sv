// safe_wake_unit: wake-up tracking for processors stalled on safe operations.
//
// A safe-load or safe-store that finds the lock bit in the wrong state does
// not complete; the requesting processor stalls. This unit remembers, for each
// of NREQ processors, whether it is stalled and on which word (blk_* input,
// driven when a mat reports a failed safe operation). Every successful safe
// operation (evt_* inputs, one per mat that can hold locks, so NEVT events
// may arrive in one cycle; from the mats' safe_evt outputs) is compared with
// all stalled entries; each matching processor gets a one-cycle wake pulse and
// its entry is freed. The woken processor simply re-issues its instruction,
// which may stall it again. A stall and a matching event in the same cycle
// wake the processor at once, so no wake-up is lost.
// Timing: wake is registered, one cycle after the event.
// Tracking stalled processors and waking them by re-issue follows the Smart
// Memories description; the one-entry-per-processor table and the exact-word
// match are this design's choices.
module safe_wake_unit #(
  parameter int unsigned NREQ = 8,   // processors of a quad
  parameter int unsigned AW   = 14,  // word address width of a tile
  parameter int unsigned NEVT = 1    // event inputs per cycle
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] blk_valid,
  input  logic [AW-1:0]   blk_addr [NREQ],
  input  logic [NEVT-1:0] evt_valid,
  input  logic [AW-1:0]   evt_addr [NEVT],
  output logic [NREQ-1:0] wake,
  output logic [NREQ-1:0] waiting
);

  logic [AW-1:0] wait_addr [NREQ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting <= '0;
      wake    <= '0;
      for (int i = 0; i < NREQ; i++) wait_addr[i] <= '0;
    end else begin
      for (int i = 0; i < NREQ; i++) begin
        logic new_blk, hit;
        new_blk = blk_valid[i];
        hit     = 1'b0;
        for (int e = 0; e < NEVT; e++)
          if (evt_valid[e] && (new_blk ? blk_addr[i] == evt_addr[e]
                                       : waiting[i] && wait_addr[i] == evt_addr[e]))
            hit = 1'b1;
        wake[i] <= hit;
        if (hit) begin
          waiting[i] <= 1'b0;
        end else if (new_blk) begin
          waiting[i]   <= 1'b1;
          wait_addr[i] <= blk_addr[i];
        end
      end
    end
  end

  // A processor cannot stall twice without being woken in between.
  for (genvar i = 0; i < NREQ; i++) begin : g_chk
    a_no_double_block: assert property (@(posedge clk) disable iff (!rst_n)
                                        blk_valid[i] |-> !waiting[i] || wake[i]);
  end

endmodule
