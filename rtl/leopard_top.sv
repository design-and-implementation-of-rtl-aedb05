// leopard_top: four-core time-predictable memory subsystem (LEOPARD).
// Each core slice has an ITLB and DTLB (64 entries, random replacement), an
// IL1 (32-byte lines) and a DL1 (16-byte lines, write-through), both 16KB,
// 4-way, with random modulo placement and snoop invalidation, and a
// double-precision divide/square-root unit with a worst-latency mode. The two
// caches of a core share one bus master port (DL1 first, held until the
// transfer ends). The shared bus is granted by the credit-based random
// permutation arbiter and leads to the way-partitioned, hash-placed L2, whose
// misses go through the constant-latency memory controller to the DRAM port.
// A write on the bus is snooped by every other L1. A PRNG feeds all random
// choices. The trace unit collects per-core instruction records and writes
// them to a separate DRAM trace port, away from the shared bus.
// The integer pipelines, the MMU table walker, the DRAM and the Ethernet trace
// controller are outside: their connections are ports of this module.
// Every time-predictability feature is switched by the cfg input (see
// leopard_pkg::cfg_t); all of them off gives the baseline behaviour.
// Timing: L1 read hits answer in the request cycle; an L2 hit holds the bus 5
// cycles, an L2 miss 28, a miss with a dirty write-back 50 (with the default
// HIT_LAT, LAT_RD and LAT_WR), within the arbiter's MAXL of 56.
// Lint note: rst_n resets flops asynchronously and also disables the
// assertions of the submodules (disable iff), which a linter may report as a
// reset used both synchronously and asynchronously; no logic uses it so.
module leopard_top #(
  parameter int unsigned NCORES = 4,
  parameter int unsigned MAXL   = 56,
  parameter int unsigned LAT_RD = 22,
  parameter int unsigned LAT_WR = 22,
  parameter int unsigned L2_WAY_BYTES = 32768,
  parameter int unsigned TRACE_RECS   = 1 << 20,
  localparam int unsigned TPW = $clog2(TRACE_RECS) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  leopard_pkg::cfg_t   cfg,
  input  logic [31:0]         l1_seed [NCORES],   // per-run placement seeds
  input  logic [31:0]         l2_seed,
  input  logic                prng_seed_we,
  input  logic [3:0]          prng_seed_sel,
  input  logic [31:0]         prng_seed_data,
  input  logic [NCORES-1:0]   l1_freeze,
  input  logic [NCORES-1:0]   l1_flush,           // flush on context switch
  input  logic                l2_flush,           // write back and empty the L2
  output logic                l2_flushing,
  output logic                bus_busy,           // bus held by a core or an emulated contender
  // instruction fetch side of each core
  input  logic [NCORES-1:0]   if_req,
  input  logic [31:0]         if_vaddr [NCORES],
  input  logic [NCORES-1:0]   if_spec,
  output logic [NCORES-1:0]   if_ready,
  output logic [31:0]         if_rdata [NCORES],
  // data side of each core
  input  logic [NCORES-1:0]   ld_req,
  input  logic [NCORES-1:0]   ld_we,
  input  logic [31:0]         ld_vaddr [NCORES],
  input  logic [31:0]         ld_wdata [NCORES],
  input  logic [3:0]          ld_wstrb [NCORES],
  output logic [NCORES-1:0]   ld_ready,
  output logic [31:0]         ld_rdata [NCORES],
  // TLB misses and refills from the table walker
  output logic [NCORES-1:0]   itlb_miss,
  output logic [NCORES-1:0]   dtlb_miss,
  input  logic [NCORES-1:0]   itlb_fill,
  input  logic [NCORES-1:0]   dtlb_fill,
  input  logic [19:0]         tlb_fill_vpn [NCORES],
  input  logic [19:0]         tlb_fill_ppn [NCORES],
  // floating-point divide / square root of each core
  input  logic [NCORES-1:0]   fp_start,
  input  logic [NCORES-1:0]   fp_op,
  input  logic [63:0]         fp_a [NCORES],
  input  logic [63:0]         fp_b [NCORES],
  output logic [NCORES-1:0]   fp_busy,
  output logic [NCORES-1:0]   fp_done,
  output logic [NCORES-1:0]   fp_early,
  output logic [63:0]         fp_result [NCORES],
  // instruction trace of each core
  input  logic [NCORES-1:0]   trace_en,
  input  logic [NCORES-1:0]   tr_valid,
  input  logic [31:0]         tr_pc [NCORES],
  input  logic [31:0]         tr_inst [NCORES],
  input  logic [31:0]         tr_daddr [NCORES],
  output logic [NCORES-1:0]   tr_stall,
  // DRAM (through the DDR2 back end)
  output logic                dram_req,
  output logic                dram_we,
  output logic [31:0]         dram_addr,
  output logic [511:0]        dram_wdata,
  input  logic                dram_done,
  input  logic [511:0]        dram_rdata,
  // DRAM trace region port and trace controller
  output logic                trace_wreq,
  output logic [31:0]         trace_waddr,
  output logic [127:0]        trace_wdata,
  input  logic                trace_wdone,
  input  logic [TPW-1:0]      trace_rd_ptr,
  output logic [TPW-1:0]      trace_wr_ptr,
  // observation
  output logic [NCORES-1:0]   bus_gnt,
  output logic [NCORES*$clog2(MAXL*NCORES+1)-1:0] bus_budgets,
  output logic [NCORES-1:0]   il1_miss,
  output logic [NCORES-1:0]   dl1_miss,
  output logic                bus_phantom,
  output logic                l2_done,
  output logic                l2_hit,
  output logic                l2_wb,
  output logic                mem_late
);
  localparam int unsigned CW = (NCORES > 1) ? $clog2(NCORES) : 1;
  localparam int unsigned RW = 8 * (NCORES - 1);

  // ---- random numbers ----------------------------------------------------------
  logic [NCORES*16-1:0] core_rnd;
  logic [RW+1:0]        arb_rnd;
  prng #(.NCORES(NCORES), .ARB_BITS(RW + 2)) u_prng (
    .clk, .rst_n, .seed_we(prng_seed_we), .seed_sel(prng_seed_sel),
    .seed_data(prng_seed_data), .core_rnd, .arb_rnd);

  // ---- shared bus signals --------------------------------------------------
  logic [NCORES-1:0]     core_breq;
  leopard_pkg::bus_req_t core_bus [NCORES];
  logic [CW-1:0]         owner;
  leopard_pkg::bus_req_t l2_bus;
  logic [255:0]          l2_rdata;
  logic                  snp_valid;
  logic [31:0]           snp_addr;

  assign snp_valid = l2_done && l2_bus.we;
  assign snp_addr  = l2_bus.addr;

  // ---- core slices ------------------------------------------------------------
  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic [15:0] rnd;
    logic        ihit, dhit;
    logic [31:0] ipa, dpa;
    logic        il1_breq, dl1_breq, il1_bdone, dl1_bdone;
    leopard_pkg::bus_req_t il1_bus, dl1_bus;
    logic        lock_q, sel_d_q, sel_d;

    assign rnd = core_rnd[c*16 +: 16];

    tlb #(.ENTRIES(64)) u_itlb (
      .clk, .rst_n, .flush(l1_flush[c]), .rnd_en(cfg.tlb_rnd_en), .rnd(rnd[15:10]),
      .vaddr(if_vaddr[c]), .hit(ihit), .paddr(ipa),
      .fill_valid(itlb_fill[c]), .fill_vpn(tlb_fill_vpn[c]), .fill_ppn(tlb_fill_ppn[c]));
    tlb #(.ENTRIES(64)) u_dtlb (
      .clk, .rst_n, .flush(l1_flush[c]), .rnd_en(cfg.tlb_rnd_en), .rnd(rnd[9:4]),
      .vaddr(ld_vaddr[c]), .hit(dhit), .paddr(dpa),
      .fill_valid(dtlb_fill[c]), .fill_vpn(tlb_fill_vpn[c]), .fill_ppn(tlb_fill_ppn[c]));
    assign itlb_miss[c] = if_req[c] && !ihit;
    assign dtlb_miss[c] = ld_req[c] && !dhit;

    l1_cache #(.SIZE_BYTES(16384), .WAYS(4), .LINE_BYTES(32), .WRITE_THROUGH(1'b0)) u_il1 (
      .clk, .rst_n, .rm_en(cfg.rm_en), .seed(l1_seed[c]), .rnd(rnd[3:2]),
      .freeze(l1_freeze[c]), .flush(l1_flush[c]), .no_spec_miss(cfg.no_spec_miss),
      .req(if_req[c]), .we(1'b0), .vaddr(if_vaddr[c]), .paddr(ipa), .pa_ok(ihit),
      .spec(if_spec[c]), .wdata(32'h0), .wstrb(4'h0), .ready(if_ready[c]), .rdata(if_rdata[c]),
      .miss(il1_miss[c]), .breq(il1_breq), .bus(il1_bus), .bdone(il1_bdone), .brdata(l2_rdata),
      .snp_valid(snp_valid), .snp_addr(snp_addr));

    l1_cache #(.SIZE_BYTES(16384), .WAYS(4), .LINE_BYTES(16), .WRITE_THROUGH(1'b1)) u_dl1 (
      .clk, .rst_n, .rm_en(cfg.rm_en), .seed(l1_seed[c] ^ 32'h5bd1_e995), .rnd(rnd[1:0]),
      .freeze(l1_freeze[c]), .flush(l1_flush[c]), .no_spec_miss(cfg.no_spec_miss),
      .req(ld_req[c]), .we(ld_we[c]), .vaddr(ld_vaddr[c]), .paddr(dpa), .pa_ok(dhit),
      .spec(1'b0), .wdata(ld_wdata[c]), .wstrb(ld_wstrb[c]), .ready(ld_ready[c]), .rdata(ld_rdata[c]),
      .miss(dl1_miss[c]), .breq(dl1_breq), .bus(dl1_bus), .bdone(dl1_bdone), .brdata(l2_rdata),
      .snp_valid(snp_valid && !(bus_gnt[c] && l2_bus.we)), .snp_addr(snp_addr));

    // one bus master port per core: DL1 first, choice held during a transfer
    assign sel_d = lock_q ? sel_d_q : dl1_breq;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lock_q <= 1'b0; sel_d_q <= 1'b0;
      end else if (!lock_q && bus_gnt[c] && !l2_done) begin
        lock_q <= 1'b1; sel_d_q <= sel_d;
      end else if (l2_done && bus_gnt[c]) begin
        lock_q <= 1'b0;
      end
    end
    assign core_breq[c] = sel_d ? dl1_breq : il1_breq;
    assign core_bus[c]  = sel_d ? dl1_bus : il1_bus;
    assign dl1_bdone    = l2_done && bus_gnt[c] && sel_d;
    assign il1_bdone    = l2_done && bus_gnt[c] && !sel_d;

    fpu_divsqrt u_fpu (
      .clk, .rst_n, .wc_mode(cfg.fpu_wc), .start(fp_start[c]), .op(fp_op[c]),
      .a(fp_a[c]), .b(fp_b[c]), .busy(fp_busy[c]), .done(fp_done[c]),
      .early(fp_early[c]), .result(fp_result[c]));
  end

  // ---- arbitration -------------------------------------------------------------
  cba_arbiter #(.NCORES(NCORES), .MAXL(MAXL)) u_arb (
    .clk, .rst_n, .mode(cfg.arb_mode), .tc_mode(cfg.tc_mode), .tc_mask(cfg.tc_mask),
    .rnd(arb_rnd[RW-1:0]), .req(core_breq), .done(l2_done), .gnt(bus_gnt),
    .busy(bus_busy), .owner(owner), .phantom(bus_phantom), .budgets(bus_budgets));

  assign l2_bus = core_bus[owner];

  // ---- shared L2 and memory ------------------------------------------------------
  logic         m_req, m_we, m_done;
  logic [31:0]  m_addr;
  logic [511:0] m_wdata, m_rdata;

  l2_cache #(.WAY_BYTES(L2_WAY_BYTES), .WAYS(4), .LINE_BYTES(64)) u_l2 (
    .clk, .rst_n, .part_en(cfg.l2_part_en), .hrp_en(cfg.l2_hrp_en), .seed(l2_seed),
    .rnd(arb_rnd[RW+1:RW]), .flush(l2_flush), .flushing(l2_flushing), .req(|bus_gnt), .bus(l2_bus), .master(2'(owner)),
    .done(l2_done), .rdata(l2_rdata), .hit_o(l2_hit), .wb_o(l2_wb),
    .mreq(m_req), .mwe(m_we), .maddr(m_addr), .mwdata(m_wdata), .mdone(m_done), .mrdata(m_rdata));

  mem_ctrl #(.LW(512), .LAT_RD(LAT_RD), .LAT_WR(LAT_WR)) u_mem (
    .clk, .rst_n, .const_en(cfg.mem_const_en), .req(m_req), .we(m_we), .addr(m_addr),
    .wdata(m_wdata), .done(m_done), .rdata(m_rdata), .late(mem_late),
    .dreq(dram_req), .dwe(dram_we), .daddr(dram_addr), .dwdata(dram_wdata),
    .ddone(dram_done), .drdata(dram_rdata));

  // ---- tracing ---------------------------------------------------------------------
  logic [NCORES*32-1:0] tpc, tinst, tdaddr;
  always_comb
    for (int c = 0; c < NCORES; c++) begin
      tpc[c*32 +: 32]    = tr_pc[c];
      tinst[c*32 +: 32]  = tr_inst[c];
      tdaddr[c*32 +: 32] = tr_daddr[c];
    end

  trace_unit #(.NCORES(NCORES), .DEPTH(16), .REGION_RECS(TRACE_RECS)) u_trace (
    .clk, .rst_n, .trace_en, .tr_valid, .tr_pc(tpc), .tr_inst(tinst), .tr_daddr(tdaddr),
    .stall(tr_stall), .twreq(trace_wreq), .twaddr(trace_waddr), .twdata(trace_wdata),
    .twdone(trace_wdone), .rd_ptr(trace_rd_ptr), .wr_ptr(trace_wr_ptr));
endmodule
