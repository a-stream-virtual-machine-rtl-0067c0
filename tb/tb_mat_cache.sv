// tb_mat_cache: self-checking test of caches built from memory mats.
// Two configurations run side by side: the two-way data cache with one-word
// lines and the direct-mapped instruction cache with two-word (64-bit) lines.
// A directed sequence checks hits, misses, victim choice and the 2-cycle hit
// latency; a random phase checks every load against a reference memory that
// also receives the write-through stores.
module tb_mat_cache;
  localparam int AW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---------- D-cache: 2 ways, 1 word lines ----------
  logic dreq_v, dreq_r, dreq_we, drsp_v, dm_v, dm_r, dm_we, dm_rv, dhit, dmiss;
  logic [AW-1:0] dreq_a, dm_a;
  logic [31:0] dreq_wd, drsp_d, dm_wd, dm_rd;
  mat_cache #(.WAYS(2), .LINE_MATS(1), .AW(AW)) u_d (
    .clk, .rst_n, .req_valid(dreq_v), .req_ready(dreq_r), .req_we(dreq_we), .req_addr(dreq_a),
    .req_wdata(dreq_wd), .rsp_valid(drsp_v), .rsp_rdata(drsp_d),
    .mem_req_valid(dm_v), .mem_req_ready(dm_r), .mem_req_we(dm_we), .mem_req_addr(dm_a),
    .mem_req_wdata(dm_wd), .mem_rsp_valid(dm_rv), .mem_rsp_rdata(dm_rd), .hit_evt(dhit), .miss_evt(dmiss));

  // ---------- I-cache: 1 way, 2 word lines ----------
  logic ireq_v, ireq_r, irsp_v, im_v, im_r, im_we, im_rv, ihit, imiss;
  logic [AW-1:0] ireq_a, im_a;
  logic [63:0] irsp_d, im_wd, im_rd;
  mat_cache #(.WAYS(1), .LINE_MATS(2), .AW(AW)) u_i (
    .clk, .rst_n, .req_valid(ireq_v), .req_ready(ireq_r), .req_we(1'b0), .req_addr(ireq_a),
    .req_wdata(64'h0), .rsp_valid(irsp_v), .rsp_rdata(irsp_d),
    .mem_req_valid(im_v), .mem_req_ready(im_r), .mem_req_we(im_we), .mem_req_addr(im_a),
    .mem_req_wdata(im_wd), .mem_rsp_valid(im_rv), .mem_rsp_rdata(im_rd), .hit_evt(ihit), .miss_evt(imiss));

  // ---------- memory models (random latency) ----------
  logic [31:0] dmem [1 << AW];
  function automatic logic [63:0] iline(input logic [AW-1:0] a);
    return {16'hface, a, 16'hbeef, ~a};
  endfunction
  int dlat = 0, ilat = 0;
  logic [AW-1:0] dpend_a, ipend_a;
  always @(posedge clk) begin
    dm_rv <= 0; im_rv <= 0;
    if (dm_v && dm_r) begin
      if (dm_we) dmem[dm_a] <= dm_wd;
      else begin dlat <= $urandom_range(1, 5); dpend_a <= dm_a; end
    end else if (dlat > 0) begin
      dlat <= dlat - 1;
      if (dlat == 1) begin dm_rv <= 1; dm_rd <= dmem[dpend_a]; end
    end
    if (im_v && im_r) begin ilat <= $urandom_range(1, 5); ipend_a <= im_a; end
    else if (ilat > 0) begin
      ilat <= ilat - 1;
      if (ilat == 1) begin im_rv <= 1; im_rd <= iline(ipend_a); end
    end
  end
  always @(negedge clk) begin dm_r <= $urandom_range(0, 1); im_r <= $urandom_range(0, 1); end

  int nhit = 0, nmiss = 0;
  always @(posedge clk) begin nhit += dhit; nmiss += dmiss; end

  task automatic dload(input logic [AW-1:0] a, output logic [31:0] d, output int lat);
    @(negedge clk); dreq_v = 1; dreq_we = 0; dreq_a = a;
    @(negedge clk); dreq_v = 0; lat = 1;
    while (!drsp_v) begin @(negedge clk); lat++; end
    d = drsp_d;
  endtask
  task automatic dstore(input logic [AW-1:0] a, input logic [31:0] v);
    @(negedge clk); dreq_v = 1; dreq_we = 1; dreq_a = a; dreq_wd = v;
    @(negedge clk); dreq_v = 0;
    while (!drsp_v) @(negedge clk);
  endtask
  task automatic expect_d(input logic [AW-1:0] a, input bit hit, input string s);
    logic [31:0] d; int lat, h0;
    h0 = nhit;
    dload(a, d, lat);
    @(posedge clk); #1;
    chk(d == dmem[a], {s, " data"});
    chk((nhit != h0) == hit, $sformatf("%s hit=%0b", s, hit));
    if (hit) chk(lat == 2, $sformatf("%s hit latency %0d", s, lat));
  endtask

  initial begin
    #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dreq_v = 0; dreq_we = 0; dreq_a = 0; dreq_wd = 0; ireq_v = 0; ireq_a = 0;
    for (int i = 0; i < (1 << AW); i++) dmem[i] = 32'h7000_0000 ^ (i * 32'h9e37);
    repeat (3) @(negedge clk); rst_n = 1;
    // A, B, C share index 5
    expect_d(16'h0005, 0, "A first");
    expect_d(16'h0005, 1, "A again");
    expect_d(16'h0405, 0, "B first (fills invalid way 1)");
    expect_d(16'h0005, 1, "A kept in way 0");
    expect_d(16'h0405, 1, "B hit");
    expect_d(16'h0805, 0, "C evicts a way");
    expect_d(16'h0805, 1, "C hit");
    // store hit updates line and memory; store miss does not allocate
    dstore(16'h0805, 32'h1111_2222);
    repeat (2) @(negedge clk);
    expect_d(16'h0805, 1, "C after store");
    dstore(16'h0123, 32'h3333_4444);
    repeat (2) @(negedge clk);
    expect_d(16'h0123, 0, "store miss did not allocate");
    // random phase
    for (int k = 0; k < 1500; k++) begin
      logic [AW-1:0] a;
      a = AW'({$urandom_range(0, 7), 10'($urandom_range(0, 15))});
      if ($urandom_range(0, 3) == 0) begin
        logic [31:0] v; v = $urandom; dstore(a, v);
        repeat (2) @(negedge clk);
      end else begin
        logic [31:0] d; int lat;
        dload(a, d, lat);
        chk(d == dmem[a], $sformatf("random load %h", a));
      end
    end
    chk(nhit > 300 && nmiss > 300, $sformatf("random phase hits %0d misses %0d", nhit, nmiss));
    // I-cache: 64-bit lines
    for (int k = 0; k < 200; k++) begin
      logic [AW-1:0] a; int lat;
      a = AW'({$urandom_range(0, 3), 10'($urandom_range(0, 7))});
      @(negedge clk); ireq_v = 1; ireq_a = a;
      @(negedge clk); ireq_v = 0;
      lat = 1;
      while (!irsp_v) begin @(negedge clk); lat++; end
      chk(irsp_d == iline(a), "I-cache 64-bit line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
