// Self-checking testbench of l2_cache (4 ways of 32KB, 64-byte lines). A
// memory model answers line reads and writes after a fixed delay and keeps
// the reference contents; a word-level reference model tracks the writes.
// Checks: read data of both 32-byte halves; write-allocate and write-back of
// dirty lines (the memory gets the written data); hit latency (HIT_LAT + 1
// cycles from request to done); per-way partitioning (a master streaming
// through the whole cache cannot evict another master's line); with modulo
// placement two lines 32KB apart always collide in a one-way partition, with
// hash-based random placement they rarely do; flush writes every dirty line
// back (the memory then matches the reference) and leaves the cache empty.
module tb_l2_cache;
  logic clk = 0, rst_n = 0;
  logic part_en, hrp_en, flush, flushing, req, done, hit_o, wb_o, mreq, mwe, mdone;
  logic [31:0] seed, maddr;
  logic [1:0] rnd, master;
  leopard_pkg::bus_req_t bus;
  logic [255:0] rdata;
  logic [511:0] mwdata, mrdata;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [logic [31:0]];
  int wbs = 0;

  l2_cache dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rnd <= 2'($urandom);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rw(input logic [31:0] a);
    a = {a[31:2], 2'b0};
    return ref_mem.exists(a) ? ref_mem[a] : ~(a * 32'h0100_0193);
  endfunction

  // memory: answers after 6 cycles
  logic [31:0] dram [logic [31:0]];
  function automatic logic [31:0] dw(input logic [31:0] a);
    return dram.exists(a) ? dram[a] : ~(a * 32'h0100_0193);
  endfunction
  initial begin
    mdone = 0; mrdata = '0;
    forever begin
      @(posedge clk); #1 mdone = 0;
      if (mreq) begin
        repeat (5) @(posedge clk);
        #1;
        if (mwe) begin
          wbs++;
          for (int i = 0; i < 16; i++) dram[maddr + 32'(4 * i)] = mwdata[i*32 +: 32];
        end else
          for (int i = 0; i < 16; i++) mrdata[i*32 +: 32] = dw(maddr + 32'(4 * i));
        mdone = 1;
        @(posedge clk); #1 mdone = 0;
      end
    end
  end

  task automatic access(input logic [1:0] m, input logic w, input logic [31:0] a, input logic [31:0] d,
                        output bit was_hit, output int lat);
    @(negedge clk);
    req = 1; master = m; bus.we = w; bus.addr = a; bus.wdata = d; bus.wstrb = 4'hF;
    lat = 0;
    @(posedge clk); #2 lat = 1;
    while (!done) begin @(posedge clk); #2 lat++; end
    was_hit = hit_o;
    if (!w) begin
      checks++;
      for (int i = 0; i < 8; i++)
        if (rdata[i*32 +: 32] != rw({a[31:5], 5'h0} + 32'(4 * i))) begin
          failures++; $display("FAIL read %h word %0d: %h exp %h", a, i, rdata[i*32 +: 32], rw({a[31:5], 5'h0} + 32'(4 * i)));
          break;
        end
    end else ref_mem[{a[31:2], 2'b0}] = d;
    @(posedge clk); #1 req = 0;
  endtask

  initial begin
    bit h;
    int lat, coll_mod, coll_hrp;
    part_en = 0; hrp_en = 0; flush = 0; seed = 32'h1357_9BDF; req = 0; master = 0; bus = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // basic miss, hit latency, both halves
    access(0, 0, 32'h0000_1000, 0, h, lat);
    checks++; if (h) begin failures++; $display("FAIL cold hit"); end
    access(0, 0, 32'h0000_1020, 0, h, lat);
    checks++; if (!h || lat != 4) begin failures++; $display("FAIL hit %0d latency %0d", h, lat); end
    // write allocate, then eviction writes the dirty line back
    access(1, 1, 32'h0000_2004, 32'hA5A5_0001, h, lat);
    access(1, 0, 32'h0000_2000, 0, h, lat);
    checks++; if (!h) begin failures++; $display("FAIL write not allocated"); end
    part_en = 1;
    access(0, 0, 32'h0000_2000 + 32'h8000, 0, h, lat);   // same modulo set, master 0 owns way 0
    checks++; if (!wb_o || dw(32'h0000_2004) != 32'hA5A5_0001) begin
      failures++; $display("FAIL write-back wb=%0d mem=%h", wb_o, dw(32'h0000_2004)); end
    // partitioning: master 2 streams 600 lines, master 3's line survives
    access(3, 0, 32'h0004_0040, 0, h, lat);
    for (int i = 0; i < 600; i++) access(2, 0, 32'h0010_0000 + 32'(i * 64), 0, h, lat);
    access(3, 0, 32'h0004_0040, 0, h, lat);
    checks++; if (!h) begin failures++; $display("FAIL partition violated"); end
    // placement: A and A+32KB in master 0's single way
    coll_mod = 0; coll_hrp = 0;
    for (int s = 0; s < 16; s++) begin
      logic [31:0] a;
      a = 32'h0020_0000 + 32'(($urandom % 512) * 64);
      hrp_en = 0;
      access(0, 0, a, 0, h, lat); access(0, 0, a + 32'h8000, 0, h, lat); access(0, 0, a, 0, h, lat);
      if (!h) coll_mod++;
      hrp_en = 1; seed = $urandom;
      access(0, 0, a + 32'h0100_0000, 0, h, lat); access(0, 0, a + 32'h0100_8000, 0, h, lat);
      access(0, 0, a + 32'h0100_0000, 0, h, lat);
      if (!h) coll_hrp++;
    end
    $display("collisions: modulo %0d/16, hash %0d/16, write-backs %0d", coll_mod, coll_hrp, wbs);
    checks++; if (coll_mod != 16 || coll_hrp > 3) begin failures++; $display("FAIL placement"); end
    // random traffic, shared ways
    part_en = 0; hrp_en = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] a;
      a = {14'h0, 18'($urandom)} & 32'hFFFF_FFFC;
      access(2'($urandom), 1'($urandom % 3 == 0), a, $urandom, h, lat);
    end
    // flush: all written words reach the memory, then everything misses
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    checks++; if (!flushing) begin failures++; $display("FAIL flush not started"); end
    while (flushing) @(negedge clk);
    foreach (ref_mem[a]) begin
      checks++;
      if (dw(a) != ref_mem[a]) begin failures++; $display("FAIL flush lost %h", a); end
    end
    access(2, 0, 32'h0000_2000, 0, h, lat);
    checks++; if (h) begin failures++; $display("FAIL hit after flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
