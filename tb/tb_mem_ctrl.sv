// Self-checking testbench of mem_ctrl. A DRAM model answers after a random
// 3 to 17 cycles and keeps the written lines. Checks: data of reads and
// writes; with const_en every read completes exactly LAT_RD cycles and every
// write exactly LAT_WR cycles after the request whatever the DRAM delay;
// without it the latency follows the DRAM (and varies); a DRAM slower than
// the fixed latency raises `late`.
module tb_mem_ctrl;
  localparam int LR = 24, LWR = 20;
  logic clk = 0, rst_n = 0;
  logic const_en, req, we, done, late, dreq, dwe, ddone;
  logic [31:0] addr, daddr;
  logic [511:0] wdata, rdata, dwdata, drdata;
  int checks = 0, failures = 0;
  logic [511:0] dram [logic [31:0]];
  int dram_delay = -1;

  mem_ctrl #(.LAT_RD(LR), .LAT_WR(LWR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ddone = 0; drdata = '0;
    forever begin
      @(posedge clk); #1 ddone = 0;
      if (dreq) begin
        repeat ((dram_delay >= 0 ? dram_delay : 3 + $urandom % 15) - 1) @(posedge clk);
        #1;
        if (dwe) dram[daddr] = dwdata;
        else drdata = dram.exists(daddr) ? dram[daddr] : {16{daddr}};
        ddone = 1;
        @(posedge clk); #1 ddone = 0;
      end
    end
  end

  task automatic op(input logic w, input logic [31:0] a, input logic [511:0] d, output int lat,
                    output logic [511:0] q);
    @(negedge clk); req = 1; we = w; addr = a; wdata = d;
    @(posedge clk); #2 lat = 1;
    while (!done) begin @(posedge clk); #2 lat++; end
    q = rdata;
    @(posedge clk); #1 req = 0;
  endtask

  initial begin
    int lat, lmin, lmax;
    logic [511:0] q, d;
    logic [511:0] shadow [logic [31:0]];
    const_en = 1; req = 0; we = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic [31:0] a;
      a = 32'(($urandom % 64) * 64);
      if ($urandom % 2) begin
        d = {16{$urandom}};
        op(1, a, d, lat, q);
        shadow[a] = d;
        checks++; if (lat != LWR) begin failures++; $display("FAIL write latency %0d", lat); end
      end else begin
        op(0, a, 0, lat, q);
        checks++; if (lat != LR) begin failures++; $display("FAIL read latency %0d", lat); end
        checks++;
        if (q != (shadow.exists(a) ? shadow[a] : {16{a}})) begin failures++; $display("FAIL read data %h", a); end
      end
    end
    // baseline: latency follows the DRAM
    const_en = 0; lmin = 1000; lmax = 0;
    for (int i = 0; i < 100; i++) begin
      op(0, 32'h40, 0, lat, q);
      if (lat < lmin) lmin = lat;
      if (lat > lmax) lmax = lat;
    end
    checks++;
    if (lmin >= LR || lmax == lmin) begin failures++; $display("FAIL baseline latency %0d..%0d", lmin, lmax); end
    // DRAM slower than the fixed latency
    const_en = 1; dram_delay = 30;
    @(negedge clk); req = 1; we = 0; addr = 0;
    @(posedge clk); #2;
    while (!done) begin @(posedge clk); #2; end
    checks++; if (!late) begin failures++; $display("FAIL late not flagged"); end
    @(posedge clk); #1 req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
