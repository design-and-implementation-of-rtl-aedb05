// End-to-end testbench of leopard_top at its default parameters (four
// cores, 16KB L1s, 128KB L2). Behavioural models stand in for what lies
// outside the subsystem: four core models issuing instruction fetches,
// loads, stores, FP divisions/square roots and trace records; a page-table
// walker answering TLB misses (physical = virtual XOR 0x4000_0000); a DRAM
// with a random 3-17 cycle delay; a trace-region port (slowed down in phase 2) and a trace
// controller draining it.
// Three phases run the same traffic: (1) baseline, every feature off;
// (2) all time-predictability features on, non-TC mode; (3) TC mode, core 0
// alone with the other three emulated as worst-case contenders and FP
// operations at their worst latency.
// Checks: every load and fetch returns the reference memory contents (for
// data another core writes, the value before or after the latest write);
// FP results match the simulator's IEEE arithmetic; with constant memory
// latency every L2 miss without write-back holds the bus exactly 28 cycles;
// no bus hold ever exceeds MaxL (56); in TC mode core 0 never waits for the
// bus longer than MaxL*(2*4-1) cycles; in worst-latency mode every FDIVD
// takes 18 cycles and every FSQRTD 26. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_leopard_top;
  import leopard_pkg::*;
  localparam int NC = 4, MAXL = 56, TPW = 21;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [31:0] l1_seed [NC];
  logic [31:0] l2_seed;
  logic prng_seed_we = 0;
  logic [3:0] prng_seed_sel = 0;
  logic [31:0] prng_seed_data = 0;
  logic [NC-1:0] l1_freeze, l1_flush;
  logic l2_flush = 0, l2_flushing;
  logic [NC-1:0] if_req, if_spec, if_ready, ld_req, ld_we, ld_ready;
  logic [31:0] if_vaddr [NC], if_rdata [NC], ld_vaddr [NC], ld_wdata [NC], ld_rdata [NC];
  logic [3:0] ld_wstrb [NC];
  logic [NC-1:0] itlb_miss, dtlb_miss, itlb_fill, dtlb_fill;
  logic [19:0] tlb_fill_vpn [NC], tlb_fill_ppn [NC];
  logic [NC-1:0] fp_start, fp_op, fp_busy, fp_done, fp_early;
  logic [63:0] fp_a [NC], fp_b [NC], fp_result [NC];
  logic [NC-1:0] trace_en, tr_valid, tr_stall;
  logic [31:0] tr_pc [NC], tr_inst [NC], tr_daddr [NC];
  logic dram_req, dram_we, dram_done;
  logic [31:0] dram_addr;
  logic [511:0] dram_wdata, dram_rdata;
  logic trace_wreq, trace_wdone;
  logic [31:0] trace_waddr;
  logic [127:0] trace_wdata;
  logic [TPW-1:0] trace_rd_ptr, trace_wr_ptr;
  logic [NC-1:0] bus_gnt, il1_miss, dl1_miss;
  logic [NC*8-1:0] bus_budgets;
  logic bus_phantom, bus_busy, l2_done, l2_hit, l2_wb, mem_late;

  leopard_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_il1_miss, n_dl1_miss, n_l1_hit, n_itlb, n_dtlb, n_fp_early, n_fp_long, n_fp_wc;
  int n_l2_hit, n_l2_miss, n_l2_wb, n_phantom, n_cba_idle, n_spec_hold, n_trace_wr, n_trace_stall;
  int n_stores, n_shared_new, n_frozen, n_const_miss;
  bit trace_slow = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endfunction

  // ---- reference memory (physical, word granular) ------------------------
  logic [31:0] mem [logic [31:0]];
  logic [31:0] prev [logic [31:0]];
  time         prev_t [logic [31:0]];   // when each shared word was last written
  function automatic logic [31:0] rd(input logic [31:0] a);
    a = {a[31:2], 2'b00};
    return mem.exists(a) ? mem[a] : (a * 32'h9E37_79B1) ^ 32'hA5A5_A5A5;
  endfunction
  function automatic logic [31:0] v2p(input logic [31:0] v);
    return v ^ 32'h4000_0000;
  endfunction

  // ---- DRAM model: 64-byte lines, random delay ----------------------------
  logic [31:0] dmem [logic [31:0]];
  function automatic logic [31:0] drd(input logic [31:0] a);
    return dmem.exists(a) ? dmem[a] : (a * 32'h9E37_79B1) ^ 32'hA5A5_A5A5;
  endfunction
  initial begin
    dram_done = 0; dram_rdata = '0;
    forever begin
      @(posedge clk); #1 dram_done = 0;
      if (dram_req) begin
        repeat (2 + $urandom % 15) @(posedge clk);
        #1;
        for (int i = 0; i < 16; i++)
          if (dram_we) dmem[dram_addr + 32'(4 * i)] = dram_wdata[i*32 +: 32];
          else dram_rdata[i*32 +: 32] = drd(dram_addr + 32'(4 * i));
        dram_done = 1;
        @(posedge clk); #1 dram_done = 0;
      end
    end
  end

  // ---- trace region port (slow) and trace controller -----------------------
  initial begin
    trace_wdone = 0;
    forever begin
      @(posedge clk); #1 trace_wdone = 0;
      if (trace_wreq) begin
        repeat (trace_slow ? 40 : 6) @(posedge clk);
        #1 trace_wdone = 1; n_trace_wr++;
        checks++;
        if (trace_waddr[3:0] != 0 || trace_waddr < 32'h8000_0000) fail("trace address");
        @(posedge clk); #1 trace_wdone = 0;
      end
    end
  end
  always_ff @(posedge clk)
    if (!rst_n) trace_rd_ptr <= '0;
    else if (trace_rd_ptr != trace_wr_ptr) trace_rd_ptr <= trace_rd_ptr + 1'b1;

  // ---- page-table walker: one refill at a time per core --------------------
  for (genvar c = 0; c < NC; c++) begin : g_walk
    initial begin
      itlb_fill[c] = 0; dtlb_fill[c] = 0; tlb_fill_vpn[c] = 0; tlb_fill_ppn[c] = 0;
      forever begin
        @(posedge clk); #1;
        itlb_fill[c] = 0; dtlb_fill[c] = 0;
        if (itlb_miss[c] || dtlb_miss[c]) begin
          logic i;
          i = itlb_miss[c];
          repeat (3) @(posedge clk);
          #1;
          tlb_fill_vpn[c] = i ? if_vaddr[c][31:12] : ld_vaddr[c][31:12];
          tlb_fill_ppn[c] = tlb_fill_vpn[c] ^ 20'h40000;
          if (i) begin itlb_fill[c] = 1; n_itlb++; end
          else begin dtlb_fill[c] = 1; n_dtlb++; end
          @(posedge clk); #1 itlb_fill[c] = 0; dtlb_fill[c] = 0;
        end
      end
    end
  end

  // ---- observation of the bus ------------------------------------------------
  int hold = 0;
  logic phantom_q = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (bus_gnt != 0) hold++;
      if (l2_done) begin
        checks++;
        if (hold > MAXL) fail($sformatf("bus held %0d cycles", hold));
        if (l2_hit) n_l2_hit++; else n_l2_miss++;
        if (l2_wb) n_l2_wb++;
        if (!l2_hit && !l2_wb && cfg.mem_const_en) begin
          n_const_miss++; checks++;
          if (hold != 28) fail($sformatf("L2 miss held the bus %0d cycles with constant latency", hold));
        end
        hold = 0;
      end
      if (bus_phantom && !phantom_q) n_phantom++;
      phantom_q <= bus_phantom;
      if (mem_late) fail("memory response later than its fixed latency");
      if (bus_busy != (bus_gnt != 0 || bus_phantom)) fail("bus busy flag");
      for (int c = 0; c < NC; c++) begin
        if (il1_miss[c] && !$past(il1_miss[c])) n_il1_miss++;
        if (dl1_miss[c] && !$past(dl1_miss[c])) n_dl1_miss++;
        if (tr_stall[c]) n_trace_stall++;
        if (if_req[c] && if_spec[c] && !if_ready[c] && cfg.no_spec_miss) n_spec_hold++;
      end
    end
  end

  // ---- core models ------------------------------------------------------------
  int core_done [NC];
  int tc_wait_max = 0;

  task automatic fetch(input int c, input logic [31:0] va, input bit spec);
    int n = 0;
    @(negedge clk);
    if_req[c] = 1; if_vaddr[c] = va; if_spec[c] = spec;
    #1;
    while (!if_ready[c]) begin
      @(posedge clk); #3; n++;
      if (spec && n == 6) if_spec[c] = 0;     // branch resolved
    end
    if (n == 0) n_l1_hit++;
    checks++;
    if (if_rdata[c] !== rd(v2p(va))) fail($sformatf("core %0d fetch %h: %h exp %h", c, va, if_rdata[c], rd(v2p(va))));
    @(posedge clk); #1 if_req[c] = 0; if_spec[c] = 0;
  endtask

  task automatic load(input int c, input logic [31:0] va, input bit shared);
    int n = 0;
    logic [31:0] pa;
    time t0;
    pa = v2p(va);
    @(negedge clk);
    t0 = $time;
    ld_req[c] = 1; ld_we[c] = 0; ld_vaddr[c] = va;
    #1;
    while (!ld_ready[c]) begin @(posedge clk); #3; n++; end
    if (n == 0) n_l1_hit++;
    if (c == 0 && cfg.tc_mode && n > tc_wait_max) tc_wait_max = n;
    checks++;
    if (ld_rdata[c] !== rd(pa)) begin
      // the old value is right only if the store ended while this load ran
      if (shared && prev.exists({pa[31:2], 2'b0}) && ld_rdata[c] === prev[{pa[31:2], 2'b0}]
          && prev_t[{pa[31:2], 2'b0}] >= t0) ;
      else fail($sformatf("core %0d load %h: %h exp %h", c, va, ld_rdata[c], rd(pa)));
    end else if (shared && c != 0 && prev.exists({pa[31:2], 2'b0})) n_shared_new++;
    @(posedge clk); #1 ld_req[c] = 0;
  endtask

  task automatic store(input int c, input logic [31:0] va, input logic [31:0] d);
    logic [31:0] pa;
    pa = v2p(va);
    @(negedge clk);
    ld_req[c] = 1; ld_we[c] = 1; ld_vaddr[c] = va; ld_wdata[c] = d; ld_wstrb[c] = 4'hF;
    #1;
    while (!ld_ready[c]) begin @(posedge clk); #3; end
    prev[{pa[31:2], 2'b0}] = rd(pa);
    prev_t[{pa[31:2], 2'b0}] = $time;
    mem[{pa[31:2], 2'b0}] = d;
    n_stores++;
    @(posedge clk); #1 ld_req[c] = 0; ld_we[c] = 0;
  endtask

  task automatic fpop(input int c, input bit op, input logic [63:0] a, input logic [63:0] b);
    logic [63:0] r;
    int lat = 0;
    r = op ? $realtobits($sqrt($bitstoreal(a))) : $realtobits($bitstoreal(a) / $bitstoreal(b));
    @(negedge clk);
    fp_start[c] = 1; fp_op[c] = op; fp_a[c] = a; fp_b[c] = b;
    @(posedge clk); #1 fp_start[c] = 0; lat = 1;
    while (!fp_done[c]) begin @(posedge clk); #1; lat++; end
    checks++;
    if (fp_result[c] !== r) fail($sformatf("core %0d fp %0d %h %h: %h exp %h", c, op, a, b, fp_result[c], r));
    if (fp_early[c]) n_fp_early++; else n_fp_long++;
    if (cfg.fpu_wc) begin
      n_fp_wc++; checks++;
      if (lat != (op ? 26 : 18)) fail($sformatf("worst-latency fp op took %0d", lat));
    end
    @(posedge clk);
  endtask

  task automatic trace(input int c, input logic [31:0] pc);
    @(negedge clk);
    tr_valid[c] = 1; tr_pc[c] = pc; tr_inst[c] = rd(v2p(pc)); tr_daddr[c] = ld_vaddr[c];
    #1;
    while (tr_stall[c]) begin @(posedge clk); #3; end
    @(posedge clk); #1 tr_valid[c] = 0;
  endtask

  task automatic run_core(input int c, input int nops);
    logic [31:0] pc;
    pc = 32'h0000_0000 + 32'(c) * 32'h0001_0000;
    for (int i = 0; i < nops; i++) begin
      int k;
      k = $urandom % 16;
      pc = 32'(c) * 32'h0001_0000 + ((pc + 4 + ((k == 0) ? 32'h1000 : 0)) & 32'h7FFC);
      fetch(c, pc, k == 1);
      if (k < 6)
        load(c, 32'h0100_0000 + 32'(c) * 32'h0010_0000 + (($urandom % 32'h10000) & 32'hFFFC), 0);
      else if (k < 9)
        store(c, 32'h0100_0000 + 32'(c) * 32'h0010_0000 + (($urandom % 32'h10000) & 32'hFFFC), $urandom);
      else if (k < 11) begin
        if (c == 0) store(c, 32'h0200_0000 + (($urandom % 256) * 4), $urandom);
        else load(c, 32'h0200_0000 + (($urandom % 256) * 4), 1);
      end else if (k == 11)
        fpop(c, 0, 64'h4022000000000000 + 64'(($urandom % 4) << 50), 64'h4008000000000000);
      else if (k == 12)
        fpop(c, 1, {2'b01, 10'h200 + 10'($urandom % 16), 52'($urandom)}, 0);
      else if (k == 13)
        fpop(c, 1, 64'h4059000000000000, 0);
      trace(c, pc);
    end
    core_done[c] = 1;
  endtask

  task automatic phase(input int nops, input logic [NC-1:0] active);
    for (int c = 0; c < NC; c++) core_done[c] = active[c] ? 0 : 1;
    fork
      if (active[0]) run_core(0, nops);
      if (active[1]) run_core(1, nops);
      if (active[2]) run_core(2, nops);
      if (active[3]) run_core(3, nops);
    join
  endtask

  task automatic flush_all();
    @(negedge clk); l1_flush = '1; l2_flush = 1; @(negedge clk); l1_flush = '0; l2_flush = 0;
    #1;
    while (l2_flushing) begin @(posedge clk); #3; end
  endtask

  initial begin
    cfg = '0;
    for (int c = 0; c < NC; c++) begin
      l1_seed[c] = $urandom; if_vaddr[c] = 0; ld_vaddr[c] = 0; ld_wdata[c] = 0; ld_wstrb[c] = 0;
      fp_a[c] = 0; fp_b[c] = 0; tr_pc[c] = 0; tr_inst[c] = 0; tr_daddr[c] = 0;
    end
    l2_seed = $urandom;
    l1_freeze = 0; l1_flush = 0; if_req = 0; if_spec = 0; ld_req = 0; ld_we = 0;
    fp_start = 0; fp_op = 0; trace_en = '1; tr_valid = 0;
    {n_il1_miss, n_dl1_miss, n_l1_hit, n_itlb, n_dtlb, n_fp_early, n_fp_long, n_fp_wc} = '0;
    {n_l2_hit, n_l2_miss, n_l2_wb, n_phantom, n_cba_idle, n_spec_hold, n_trace_wr, n_trace_stall} = '0;
    {n_stores, n_shared_new, n_frozen, n_const_miss} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // (1) baseline
    phase(600, 4'hF);
    $display("phase 1 (baseline) done at %0t", $time);
    // (2) all features, non-TC mode; core 3 runs with its L1s frozen part of
    // the time; the trace region port slows down so trace buffers fill
    flush_all();
    trace_slow = 1;
    cfg.rm_en = 1; cfg.tlb_rnd_en = 1; cfg.no_spec_miss = 1; cfg.arb_mode = ARB_CBA;
    cfg.l2_part_en = 1; cfg.l2_hrp_en = 1; cfg.mem_const_en = 1;
    fork
      phase(600, 4'hF);
      begin repeat (2000) @(posedge clk); l1_freeze[3] = 1; repeat (3000) @(posedge clk); l1_freeze[3] = 0; n_frozen++; end
    join
    $display("phase 2 (LEOPARD, non-TC) done at %0t", $time);
    // (3) TC mode: core 0 alone, three emulated contenders, FP worst latency
    flush_all();
    cfg.tc_mode = 1; cfg.tc_mask = 4'hE; cfg.fpu_wc = 1; trace_slow = 0;
    phase(300, 4'h1);
    $display("phase 3 (TC mode) done at %0t, core 0 max wait %0d", $time, tc_wait_max);
    checks++;
    if (tc_wait_max > MAXL * (2 * NC - 1) + MAXL) fail($sformatf("TC-mode wait %0d", tc_wait_max));

    $display("mechanisms: IL1 misses %0d, DL1 misses %0d, L1 hits %0d, ITLB refills %0d, DTLB refills %0d",
             n_il1_miss, n_dl1_miss, n_l1_hit, n_itlb, n_dtlb);
    $display("  FP early %0d, FP long %0d, FP worst-latency %0d, L2 hits %0d, L2 misses %0d, write-backs %0d",
             n_fp_early, n_fp_long, n_fp_wc, n_l2_hit, n_l2_miss, n_l2_wb);
    $display("  constant-latency misses %0d, TC contender holds %0d, speculative holds %0d, stores %0d, fresh shared reads %0d",
             n_const_miss, n_phantom, n_spec_hold, n_stores, n_shared_new);
    $display("  trace writes %0d, trace stall cycles %0d, freeze windows %0d",
             n_trace_wr, n_trace_stall, n_frozen);
    begin
      int counts [18];
      counts = '{n_il1_miss, n_dl1_miss, n_l1_hit, n_itlb, n_dtlb, n_fp_early, n_fp_long, n_fp_wc,
                 n_l2_hit, n_l2_miss, n_l2_wb, n_const_miss, n_phantom, n_spec_hold, n_shared_new,
                 n_trace_wr, n_trace_stall, n_frozen};
      for (int i = 0; i < 18; i++) begin
        checks++;
        if (counts[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
