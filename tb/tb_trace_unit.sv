// Self-checking testbench of trace_unit with four cores. Cores emit trace
// records at random rates; a trace-region model accepts DRAM writes after a
// random delay and a trace-controller model advances rd_ptr. Checks: every
// record reaches the region exactly once, in order per core, at
// consecutive 16-byte addresses from the base; records carry the core's pc,
// instruction and data address; records are never lost (a full buffer stalls
// its core instead); a small region that the controller does not drain
// fills up, stops the writes and then stalls the cores.
module tb_trace_unit;
  localparam int NC = 4, RECS = 64, PW = $clog2(RECS) + 1;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] trace_en, tr_valid, stall;
  logic [NC*32-1:0] tr_pc, tr_inst, tr_daddr;
  logic twreq, twdone;
  logic [31:0] twaddr;
  logic [127:0] twdata;
  logic [PW-1:0] rd_ptr, wr_ptr;
  int checks = 0, failures = 0;
  int sent [NC], got [NC];
  int nwrites = 0, stalls = 0;
  bit drain = 1;

  trace_unit #(.NCORES(NC), .REGION_RECS(RECS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cores: record n of core c has pc = c<<24 | n
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NC; c++) sent[c] = 0;
    end else begin
      for (int c = 0; c < NC; c++) begin
        if (tr_valid[c] && !stall[c]) sent[c]++;
        if (stall[c]) stalls++;
      end
    end
  end
  always @(negedge clk)
    for (int c = 0; c < NC; c++) begin
      if (!(tr_valid[c] && stall[c])) tr_valid[c] = ($urandom % 4 == 0) && sent[c] < 200;
      tr_pc[c*32 +: 32]    = (c << 24) | sent[c];
      tr_inst[c*32 +: 32]  = ~((c << 24) | sent[c]);
      tr_daddr[c*32 +: 32] = 32'h1000 * c + sent[c];
    end

  // trace region
  initial begin
    twdone = 0;
    forever begin
      @(posedge clk); #1 twdone = 0;
      if (twreq) begin
        int c, n;
        repeat ($urandom % 3) @(posedge clk);
        #1;
        c = int'(twdata[95:64] >> 24); n = int'(twdata[95:64] & 32'hFFFFFF);
        checks++;
        if (twaddr != 32'h8000_0000 + 32'((nwrites % RECS) * 16) || c >= NC || n != got[c] ||
            twdata[63:32] != ~twdata[95:64] || twdata[31:0] != 32'(32'h1000 * c + n)) begin
          failures++; $display("FAIL record %h at %h (core %0d n %0d exp %0d)", twdata, twaddr, c, n, got[c]);
        end
        if (c < NC) got[c]++;
        nwrites++;
        twdone = 1;
        @(posedge clk); #1 twdone = 0;
      end
    end
  end

  // trace controller: follows the writer when draining
  always @(posedge clk)
    if (!rst_n) rd_ptr <= '0;
    else if (drain && rd_ptr != wr_ptr && $urandom % 2 == 0) rd_ptr <= rd_ptr + 1'b1;

  initial begin
    for (int c = 0; c < NC; c++) got[c] = 0;
    trace_en = '1; tr_valid = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (got[c] != 200 || sent[c] != 200) begin failures++; $display("FAIL core %0d sent %0d got %0d", c, sent[c], got[c]); end
    end
    // region not drained: it fills, then cores stall
    drain = 0;
    for (int c = 0; c < NC; c++) begin sent[c] = 0; got[c] = 0; end
    nwrites = 0; stalls = 0;
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    repeat (3000) @(posedge clk);
    checks++;
    if (nwrites != RECS || stalls == 0) begin failures++; $display("FAIL full region: %0d writes, %0d stalls", nwrites, stalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
