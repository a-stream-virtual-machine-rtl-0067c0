// rr_arbiter: round-robin arbiter for N requesters.
// gnt is one-hot among req (combinational). When advance is high the
// priority pointer moves to the requester after the one granted, so every
// requester is served within N grants. Used to interleave DMA channels on
// the single network port and to share memory mats between tile masters.
module rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  logic [PW-1:0] ptr;

  always_comb begin
    gnt = '0;
    for (int k = 0; k < N; k++) begin
      logic [PW-1:0] idx;
      idx = PW'((int'(ptr) + k) % N);
      if (gnt == '0 && req[idx]) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt != '0) begin
      for (int i = 0; i < N; i++)
        if (gnt[i]) ptr <= (i == N-1) ? '0 : PW'(i + 1);
    end
  end
endmodule
