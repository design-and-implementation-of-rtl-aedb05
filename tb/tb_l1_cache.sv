// Self-checking testbench of l1_cache, as a DL1 (16-byte lines, write
// through). A bus slave model returns 32-byte blocks of a reference memory
// after a random delay and applies write-throughs to it; physical addresses
// differ from virtual ones in their top bits so the physical tags are used.
// Checks: every read returns the reference data; a read of a line just
// filled hits in the same cycle without a bus request; with random modulo a
// whole 16KB region (four pages, 1024 lines) fits without a single conflict;
// a snooped write invalidates
// the line; freeze prevents allocation; flush empties the cache; a
// speculative miss waits while no_spec_miss is set; write-through updates
// both cache and memory without allocating on a miss.
module tb_l1_cache;
  logic clk = 0, rst_n = 0;
  logic rm_en, freeze, flush, no_spec_miss, req, we, pa_ok, spec, ready, miss, breq, bdone;
  logic [31:0] seed, vaddr, paddr, wdata, rdata, snp_addr;
  logic [1:0] rnd;
  logic [3:0] wstrb;
  logic [255:0] brdata;
  logic snp_valid;
  leopard_pkg::bus_req_t bus;
  int checks = 0, failures = 0;
  logic [31:0] mem [logic [31:0]];

  l1_cache dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rnd <= 2'($urandom);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rd_mem(input logic [31:0] a);
    a = {a[31:2], 2'b00};
    return mem.exists(a) ? mem[a] : (a * 32'h9E3779B1) ^ 32'h5A5A0F0F;
  endfunction

  // bus slave
  int bus_reads = 0;
  initial begin
    bdone = 0; brdata = '0;
    forever begin
      @(posedge clk); #1;
      bdone = 0;
      if (breq) begin
        repeat ($urandom % 4) @(posedge clk);
        #1;
        if (bus.we) begin
          logic [31:0] w;
          w = rd_mem(bus.addr);
          for (int b = 0; b < 4; b++) if (bus.wstrb[b]) w[b*8 +: 8] = bus.wdata[b*8 +: 8];
          mem[{bus.addr[31:2], 2'b00}] = w;
        end else begin
          bus_reads++;
          for (int i = 0; i < 8; i++) brdata[i*32 +: 32] = rd_mem(bus.addr + 32'(i * 4));
        end
        bdone = 1;
        @(posedge clk); #1 bdone = 0;
      end
    end
  end

  function automatic logic [31:0] v2p(input logic [31:0] v);
    return v ^ 32'h4000_0000;
  endfunction

  // one access; returns 1 if it hit (answered in the request cycle)
  task automatic access(input logic w, input logic [31:0] a, input logic [31:0] d, output bit was_hit);
    int n;
    @(negedge clk);
    req = 1; we = w; vaddr = a; paddr = v2p(a); wdata = d; wstrb = 4'hF;
    n = 0;
    #1;
    while (!ready) begin @(posedge clk); #3; n++; end
    was_hit = (n == 0) && !w;
    if (!w) begin
      checks++;
      if (rdata !== rd_mem(v2p(a))) begin
        failures++; $display("FAIL read %h: %h exp %h", a, rdata, rd_mem(v2p(a)));
      end
    end
    @(posedge clk); #1 req = 0;
  endtask

  task automatic expect_hit(input logic [31:0] a, input bit exp, input string what);
    bit h;
    access(0, a, 0, h);
    checks++;
    if (h != exp) begin failures++; $display("FAIL %s: addr %h hit=%0d", what, a, h); end
  endtask

  initial begin
    bit h;
    int conflicts;
    rm_en = 1; seed = 32'h1234_5678; freeze = 0; flush = 0; no_spec_miss = 0;
    req = 0; we = 0; pa_ok = 1; spec = 0; vaddr = 0; paddr = 0; wdata = 0; wstrb = 0;
    snp_valid = 0; snp_addr = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // fill then re-read a 16KB region made of four pages far apart
    for (int p = 0; p < 4; p++)
      for (int l = 0; l < 256; l++) expect_hit(32'h0010_0000 * p + 32'h2000 + l * 16, 0, "cold miss");
    conflicts = 0;
    for (int p = 0; p < 4; p++)
      for (int l = 0; l < 256; l++) begin
        access(0, 32'h0010_0000 * p + 32'h2000 + l * 16 + 32'(($urandom % 4) * 4), 0, h);
        if (!h) conflicts++;
      end
    checks++;
    if (conflicts != 0) begin failures++; $display("FAIL %0d conflicts in a 16KB region", conflicts); end

    // snoop invalidation through the physical tags
    flush = 1; @(posedge clk); #1 flush = 0;
    expect_hit(32'h0000_3450, 0, "after flush");
    expect_hit(32'h0000_3454, 1, "same line");
    @(negedge clk); snp_valid = 1; snp_addr = v2p(32'h0000_3458);
    @(negedge clk); snp_valid = 0;
    expect_hit(32'h0000_3450, 0, "after snoop");
    expect_hit(32'h0000_3450, 1, "refilled");

    // freeze: misses are served but not allocated
    freeze = 1;
    expect_hit(32'h0007_7700, 0, "frozen miss");
    expect_hit(32'h0007_7700, 0, "frozen no allocate");
    expect_hit(32'h0000_3450, 1, "frozen hit");
    freeze = 0;

    // write-through: hit updates cache and memory, miss does not allocate
    access(1, 32'h0000_3450, 32'hCAFE_F00D, h);
    expect_hit(32'h0000_3450, 1, "write hit keeps line");
    access(1, 32'h0009_0000, 32'h1111_2222, h);
    expect_hit(32'h0009_0000, 0, "no write allocate");

    // no miss under speculation
    no_spec_miss = 1;
    @(negedge clk);
    req = 1; we = 0; vaddr = 32'h000A_0000; paddr = v2p(vaddr); spec = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (breq) begin failures++; $display("FAIL speculative miss went to the bus"); end
    #1 spec = 0;
    while (!ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 req = 0;
    no_spec_miss = 0;

    // random traffic against the reference memory
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] a;
      a = {12'h000, 4'($urandom % 3), 4'($urandom), 12'($urandom)} & 32'hFFFF_FFFC;
      if ($urandom % 4 == 0) access(1, a, $urandom, h);
      else access(0, a, 0, h);
      if ($urandom % 500 == 0) begin seed = $urandom; flush = 1; @(posedge clk); #1 flush = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
