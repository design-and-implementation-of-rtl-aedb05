// l1_cache: randomised first-level cache (IL1 or DL1) of one core.
// Virtually indexed and virtually tagged, SIZE_BYTES in WAYS ways of 4KB (one
// page per way). The set of a line is chosen by random modulo placement
// (rm_index) from the virtual modulo index, the virtual tag and a per-run seed;
// the victim way is the first invalid one, else the one given by two PRNG bits
// (random replacement). A second tag array holds physical tags, indexed by the
// physical modulo index (equal to the virtual one, as a way is a page); each
// entry also keeps the randomised set the line went to, so that a snooped
// write by another master can invalidate the virtual copy although the
// physical address alone cannot reproduce the random placement. The DL1
// (WRITE_THROUGH=1) writes through without allocating on a write miss; the
// IL1 (WRITE_THROUGH=0) is read only. freeze serves misses without
// allocating (used while an interrupt handler runs), flush invalidates all
// lines, and with no_spec_miss a miss flagged spec (under a predicted branch)
// waits until spec drops instead of going to the bus.
// From the document: geometry, random modulo placement, random replacement,
// write-through/no-write-allocate, physical tags extended with the random
// index, freeze and no miss under speculation. This design's own choices: a
// read hit answers in the cycle of the request; the bus returns 32 bytes in
// one beat; the physical tag slot of a way holds one line, so filling a line
// whose slot is taken invalidates the older line (so snoops stay exact);
// LRU of the baseline is not built.
// Interface: the core holds req (with vaddr, the translated paddr and pa_ok
// from the TLB) until ready pulses. The bus request (breq and its fields) is
// held until bdone. snp_valid/snp_addr is a physical write seen on the bus.
// Unused bits (lint notes): vaddr[1:0] and the line offset of snp_addr do not
// select anything (word accesses, whole-line invalidation); of the victim's
// virtual tag entry only the stored random set is needed, to free its old
// physical-tag slot.
// Lint note: rst_n is an asynchronous reset; it also disables the assertion
// below (disable iff), which a linter reports as a reset used both ways.
// The bus write data, byte enables and address of a store are the core's
// store data and physical address, passed on as they are (write-through).
module l1_cache #(
  parameter int unsigned SIZE_BYTES    = 16384,
  parameter int unsigned WAYS          = 4,
  parameter int unsigned LINE_BYTES    = 16,
  parameter bit          WRITE_THROUGH = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        rm_en,
  input  logic [31:0] seed,
  input  logic [1:0]  rnd,
  input  logic        freeze,
  input  logic        flush,
  input  logic        no_spec_miss,
  // core side
  input  logic        req,
  input  logic        we,
  input  logic [31:0] vaddr,
  input  logic [31:0] paddr,
  input  logic        pa_ok,
  input  logic        spec,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  output logic        ready,
  output logic [31:0] rdata,
  output logic        miss,      // pulses when a read miss goes to the bus
  // bus master side
  output logic        breq,
  output leopard_pkg::bus_req_t bus,
  input  logic        bdone,
  input  logic [255:0] brdata,
  // snoop
  input  logic        snp_valid,
  input  logic [31:0] snp_addr
);
  localparam int unsigned WAY_BYTES = SIZE_BYTES / WAYS;
  localparam int unsigned SETS      = WAY_BYTES / LINE_BYTES;
  localparam int unsigned OFF       = $clog2(LINE_BYTES);
  localparam int unsigned IB        = $clog2(SETS);
  localparam int unsigned TB        = 32 - OFF - IB;
  localparam int unsigned LW        = LINE_BYTES * 8;
  localparam int unsigned WPL       = LINE_BYTES / 4;

  typedef struct packed {
    logic [TB-1:0] tag;
    logic [IB-1:0] midx;   // modulo index, to find the physical slot on eviction
  } vtag_t;
  typedef struct packed {
    logic [TB-1:0] tag;
    logic [IB-1:0] ridx;   // randomised set holding the line
  } ptag_t;

  // Storage is split into one single-ported memory per way (and per word
  // for the data) so that each maps onto a plain RAM.
  vtag_t         vtag_rd  [WAYS];   // virtual tag of each way at `set`
  vtag_t         vtag_vic;          // virtual tag of the victim way at `set`
  ptag_t         ptag_rd  [WAYS];   // physical tag of each way at `midx`
  ptag_t         ptag_snp [WAYS];   // physical tag of each way at the snooped index
  logic [31:0]   word_rd  [WAYS];   // addressed word of each way at `set`
  logic [SETS-1:0] vvalid [WAYS];
  logic [SETS-1:0] pvalid [WAYS];

  typedef enum logic [1:0] {S_IDLE, S_MISS, S_WRITE} state_e;
  state_e state;

  // --- lookup ----------------------------------------------------------------
  logic [IB-1:0] midx, set;
  logic [TB-1:0] vt;
  logic [WAYS-1:0] hitv;
  logic          hit;
  logic [$clog2(WAYS)-1:0] hway;
  assign midx = vaddr[OFF +: IB];
  assign vt   = vaddr[31 -: TB];

  rm_index #(.IDX_BITS(IB), .TAG_BITS(TB)) u_rm (
    .rm_en(rm_en), .seed(seed), .tag(vt), .idx(midx), .set(set));

  always_comb begin
    hit  = 1'b0;
    hway = '0;
    for (int w = 0; w < WAYS; w++) begin
      hitv[w] = vvalid[w][set] && vtag_rd[w].tag == vt;
      if (hitv[w]) begin hit = 1'b1; hway = $clog2(WAYS)'(w); end
    end
  end

  // --- victim ------------------------------------------------------------
  logic [$clog2(WAYS)-1:0] victim;
  always_comb begin
    victim = rnd[$clog2(WAYS)-1:0];
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vvalid[w][set]) victim = $clog2(WAYS)'(w);
  end

  // --- line from the 32-byte bus beat ---------------------------------------
  logic [LW-1:0] fill_line;
  always_comb begin
    fill_line = LW'(brdata >> (LW * 32'(paddr[4:0] >> OFF)));
  end

  logic [31:0] hit_word;
  assign hit_word = word_rd[hway];
  assign vtag_vic = vtag_rd[victim];

  // --- core / bus outputs -----------------------------------------------------
  logic do_write;
  assign do_write = WRITE_THROUGH && we;

  always_comb begin
    ready = 1'b0;
    rdata = hit_word;
    miss  = 1'b0;
    case (state)
      S_IDLE:  if (req && pa_ok && !do_write && hit) ready = 1'b1;
      S_MISS:  if (bdone) begin
                 ready = 1'b1;
                 rdata = fill_line[vaddr[OFF-1:2] * 32 +: 32];
               end
      S_WRITE: ready = bdone;
      default: ;
    endcase
    if (state == S_IDLE && req && pa_ok && !do_write && !hit && !(spec && no_spec_miss))
      miss = 1'b1;
  end

  assign breq       = (state != S_IDLE);
  assign bus.we     = (state == S_WRITE);
  assign bus.addr   = (state == S_WRITE) ? paddr : {paddr[31:5], 5'b0};
  assign bus.wdata  = wdata;
  assign bus.wstrb  = wstrb;

  // --- state and arrays -------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int w = 0; w < WAYS; w++) begin vvalid[w] <= '0; pvalid[w] <= '0; end
    end else begin
      case (state)
        S_IDLE: if (req && pa_ok) begin
          if (do_write)    state <= S_WRITE;
          else if (miss)   state <= S_MISS;
        end
        S_MISS: if (bdone) begin
          state <= S_IDLE;
          if (!freeze) begin
            // the line leaving the victim slot gives up its physical slot
            if (vvalid[victim][set])
              pvalid[victim][vtag_vic.midx] <= 1'b0;
            // a line already owning the new physical slot leaves the cache
            if (pvalid[victim][midx])
              vvalid[victim][ptag_rd[victim].ridx] <= 1'b0;
            vvalid[victim][set]  <= 1'b1;
            pvalid[victim][midx] <= 1'b1;
          end
        end
        S_WRITE: if (bdone) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      // snooped write of another master: invalidate through the physical tags
      if (snp_valid) begin
        for (int w = 0; w < WAYS; w++) begin
          if (pvalid[w][snp_addr[OFF +: IB]] && ptag_snp[w].tag == snp_addr[31 -: TB]) begin
            pvalid[w][snp_addr[OFF +: IB]] <= 1'b0;
            vvalid[w][ptag_snp[w].ridx] <= 1'b0;
          end
        end
      end
      if (flush)
        for (int w = 0; w < WAYS; w++) begin vvalid[w] <= '0; pvalid[w] <= '0; end
    end
  end

  logic fill_we, wt_we;
  assign fill_we = (state == S_MISS) && bdone && !freeze;
  assign wt_we   = (state == S_IDLE) && req && pa_ok && do_write && hit;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    vtag_t vtag_mem [SETS];
    ptag_t ptag_mem [SETS];
    always_ff @(posedge clk) begin
      if (fill_we && victim == $clog2(WAYS)'(w)) begin
        vtag_mem[set]  <= '{tag: vt, midx: midx};
        ptag_mem[midx] <= '{tag: paddr[31 -: TB], ridx: set};
      end
    end
    assign vtag_rd[w]  = vtag_mem[set];
    assign ptag_rd[w]  = ptag_mem[midx];
    assign ptag_snp[w] = ptag_mem[snp_addr[OFF +: IB]];

    logic [31:0] words [WPL];
    for (genvar k = 0; k < WPL; k++) begin : g_word
      logic [31:0] dmem [SETS];
      logic [31:0] merged;
      // write-through hit: merge the written bytes into the cached word
      always_comb
        for (int b = 0; b < 4; b++)
          merged[b*8 +: 8] = wstrb[b] ? wdata[b*8 +: 8] : dmem[set][b*8 +: 8];
      always_ff @(posedge clk) begin
        if (fill_we && victim == $clog2(WAYS)'(w))
          dmem[set] <= fill_line[k*32 +: 32];
        else if (wt_we && hway == $clog2(WAYS)'(w) && vaddr[OFF-1:2] == (OFF-2)'(k))
          dmem[set] <= merged;
      end
      assign words[k] = dmem[set];
    end
    assign word_rd[w] = words[vaddr[OFF-1:2]];
  end

  // a line is never held by more than one way of its set
  a_onehot_hit: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hitv));
endmodule
