// tb_tile_cache: small cache (20x20x12 window, 6x6x3 tiles, 2x2 slots) in
// front of the DDR model. Random stencil reads and centre writes, held until
// accepted, are checked against a shadow copy of the volume: every stencil
// must equal the shadow (with the centre value standing in for points outside
// the volume) one cycle after acceptance. A flush at the end must leave DDR
// equal to the shadow. Misses and write-backs of dirty tiles must occur.
// The behaviour checked follows the reconstruction method; the stimulus,
// sizes and reference models are this testbench's own.
module tb_tile_cache;
  import ct_pkg::*;
  localparam int NX = 20, NY = 20, L = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready, flush_req, flush_done;
  vox_t rd_vox; stencil_t rsp_data; cache_wr_t wr_data;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid, ev_miss, ev_evict;
  vox_t mem_req_vox; logic [23:0] mem_req_wdata, mem_rsp_rdata;
  logic [31:0] addr;
  int checks = 0, failures = 0, misses = 0, evicts = 0, reads = 0;

  tile_cache #(.NX(NX), .NY(NY), .L(L), .TILE_XY(6), .TILE_Z(3), .SLOTS_XY(2)) dut (.*);
  assign addr = (32'(mem_req_vox.z) * NY + 32'(mem_req_vox.y)) * NX + 32'(mem_req_vox.x);
  ddr_model #(.RD_LAT(2)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_we(mem_req_we), .req_addr(addr), .req_wdata(mem_req_wdata),
    .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));

  logic [23:0] shadow [L][NY][NX];
  stencil_t expq; logic expv;

  function automatic stencil_t expect_st(vox_t c);
    stencil_t s;
    for (int p = 0; p < 5; p++) begin
      int x, y;
      x = int'(c.x) + ((p == 1) ? 1 : (p == 2) ? -1 : 0);
      y = int'(c.y) + ((p == 3) ? 1 : (p == 4) ? -1 : 0);
      if (x < 0 || x >= NX || y < 0 || y >= NY) begin x = c.x; y = c.y; end
      s.f[p] = shadow[c.z][y][x][23:8];
      s.v[p] = shadow[c.z][y][x][7:0];
    end
    return s;
  endfunction

  // mostly a short random walk (as along a beam), sometimes a jump
  vox_t last_v = '0;
  function automatic vox_t rand_vox();
    vox_t v;
    int x, y;
    if ($urandom_range(19, 0) == 0) begin
      v.x = X_W'($urandom_range(NX - 1, 0));
      v.y = X_W'($urandom_range(NY - 1, 0));
      v.z = Z_W'($urandom_range(L - 1, 0));
    end else begin
      x = int'(last_v.x) + int'($urandom_range(2, 0)) - 1;
      y = int'(last_v.y) + int'($urandom_range(2, 0)) - 1;
      v = last_v;
      v.x = X_W'((x < 0) ? 0 : (x >= NX) ? NX - 1 : x);
      v.y = X_W'((y < 0) ? 0 : (y >= NY) ? NY - 1 : y);
    end
    last_v = v;
    return v;
  endfunction

  logic rd_acc = 0, wr_acc = 0;
  always @(posedge clk) begin
    rd_acc <= rd_valid && rd_ready;
    wr_acc <= wr_valid && wr_ready;
    if (ev_miss) misses++;
    if (ev_evict) evicts++;
    if (expv) begin
      checks++;
      if (!rsp_valid || rsp_data !== expq) begin
        failures++;
        $display("FAIL stencil got %h exp %h valid %b", rsp_data, expq, rsp_valid);
      end
    end
    expv <= 1'b0;
    if (rst_n && rd_valid && rd_ready) begin
      expq <= expect_st(rd_vox);
      expv <= 1'b1;
      reads++;
    end
    if (rst_n && wr_valid && wr_ready)
      shadow[wr_data.vox.z][wr_data.vox.y][wr_data.vox.x] <= {wr_data.f, wr_data.v};
    if (rst_n && rsp_valid && !expv) begin
      failures++; $display("FAIL unexpected response");
    end
  end

  initial begin
    for (int z = 0; z < L; z++) for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++)
      shadow[z][y][x] = 24'h000080;
    expv = 0; rd_valid = 0; wr_valid = 0; flush_req = 0; rd_vox = '0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30000; n++) begin
      @(negedge clk);
      if (rd_acc) rd_valid = 0;
      if (wr_acc) wr_valid = 0;
      if (!rd_valid && $urandom_range(1, 0) == 1) begin rd_valid = 1; rd_vox = rand_vox(); end
      if (!wr_valid && $urandom_range(2, 0) == 0) begin
        wr_valid = 1; wr_data.vox = rand_vox();
        wr_data.f = F_W'($urandom); wr_data.v = V_W'($urandom);
      end
    end
    @(negedge clk);
    while (rd_valid || wr_valid) begin
      if (rd_acc) rd_valid = 0;
      if (wr_acc) wr_valid = 0;
      @(negedge clk);
    end
    repeat (2) @(negedge clk);
    flush_req = 1;
    while (!flush_done) @(posedge clk);
    #1 flush_req = 0;
    for (int z = 0; z < L; z++) for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) begin
      checks++;
      if (mem.peek((32'(z) * NY + 32'(y)) * NX + 32'(x)) !== shadow[z][y][x]) begin
        failures++;
        if (failures < 10) $display("FAIL flush (%0d,%0d,%0d)", x, y, z);
      end
    end
    checks++; if (misses < 10) begin failures++; $display("FAIL too few misses %0d", misses); end
    checks++; if (evicts < 5) begin failures++; $display("FAIL too few evictions %0d", evicts); end
    checks++; if (reads < 100) begin failures++; $display("FAIL too few reads %0d", reads); end
    $display("reads=%0d misses=%0d evictions=%0d", reads, misses, evicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
