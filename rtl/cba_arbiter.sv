// cba_arbiter: arbiter of the shared AHB bus between the cores.
// ARB_RR is the baseline policy: round-robin, the priority rotating after every
// transfer. ARB_CBA is the time-predictable policy: random permutations with
// credit-based arbitration. Each core has a budget; in integer form (the
// document's Equation 1 multiplied by NCORES) it saturates at MAXL*NCORES,
// grows by 1 every cycle and shrinks by NCORES every cycle the core holds the
// bus. Only a core with a pending request and a full budget may be granted.
// Candidates are taken from a stream of random permutations of the core ids:
// the stream is searched from its current position for the first eligible
// core, which is granted; it and the entries skipped before it are consumed.
// Two permutations are kept (current and next), so every core is always
// within reach of the search. tc_mode (time-composable mode) makes each core
// in tc_mask that is not requesting behave as a contender that always has a
// MAXL-cycle request pending: when it wins, the bus is held idle for MAXL
// cycles, so a measured core sees the worst contention the policy allows.
// The budgets, the permutation search and MAXL follow the document; the
// permutation generator, the two-permutation look-ahead and the way TC mode
// emulates contenders are this design's choices.
// Timing: a grant is registered (gnt rises the cycle after req is seen with
// the bus free) and held until the slave's done pulse, after which the bus is
// free in the next cycle.
// Lint note: rst_n is an asynchronous reset; it also disables the assertion
// below (disable iff), which a linter reports as a reset used both ways.
module cba_arbiter #(
  parameter int unsigned NCORES = 4,
  parameter int unsigned MAXL   = 56,
  parameter int unsigned RW     = 8 * (NCORES - 1),
  localparam int unsigned IW    = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned BW    = $clog2(MAXL * NCORES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  leopard_pkg::arb_mode_e mode,
  input  logic              tc_mode,
  input  logic [NCORES-1:0] tc_mask,
  input  logic [RW-1:0]     rnd,
  input  logic [NCORES-1:0] req,
  input  logic              done,      // slave finished the granted transfer
  output logic [NCORES-1:0] gnt,       // real grant, held for the whole transfer
  output logic              busy,
  output logic [IW-1:0]     owner,
  output logic              phantom,   // bus held by an emulated TC-mode contender
  output logic [NCORES*BW-1:0] budgets
);
  localparam logic [BW-1:0] BMAX = BW'(MAXL * NCORES);

  logic [BW-1:0] budget [NCORES];
  logic [IW-1:0] cur [NCORES];
  logic [IW-1:0] nxt [NCORES];
  logic [IW-1:0] perm [NCORES];
  logic [IW-1:0] ptr;
  logic [IW-1:0] rr_last;
  logic [$clog2(MAXL+1)-1:0] ph_cnt;

  // --- random permutation of the core ids (Fisher-Yates on 8-bit chunks) ----
  logic [IW-1:0] j, t;
  always_comb begin
    j = '0;
    t = '0;
    for (int i = 0; i < NCORES; i++) perm[i] = IW'(i);
    for (int i = NCORES - 1; i > 0; i--) begin
      j = IW'((32'(rnd[(i - 1) * 8 +: 8]) * 32'(i + 1)) >> 8);
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
  end

  // --- selection ---------------------------------------------------------
  logic [NCORES-1:0] want, elig;
  logic              found;
  logic [IW-1:0]     sel;
  int unsigned       sel_pos;
  logic [IW-1:0]     id;
  always_comb begin
    id      = '0;
    want = req | ((tc_mode && mode == leopard_pkg::ARB_CBA) ? tc_mask : '0);
    for (int i = 0; i < NCORES; i++)
      elig[i] = want[i] && (mode == leopard_pkg::ARB_RR || budget[i] == BMAX);
    found   = 1'b0;
    sel     = '0;
    sel_pos = '0;
    if (mode == leopard_pkg::ARB_CBA) begin
      for (int p = 2 * NCORES - 1; p >= 0; p--) begin
        id = (p < NCORES) ? cur[p] : nxt[p - NCORES];
        if (p >= 32'(ptr) && elig[id]) begin
          found = 1'b1; sel = id; sel_pos = 32'(p);
        end
      end
    end else begin
      for (int k = NCORES; k >= 1; k--) begin
        id = IW'((32'(rr_last) + k) % NCORES);
        if (elig[id]) begin found = 1'b1; sel = id; end
      end
    end
  end

  // --- state ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      owner   <= '0;
      phantom <= 1'b0;
      ph_cnt  <= '0;
      ptr     <= '0;
      rr_last <= IW'(NCORES - 1);
      for (int i = 0; i < NCORES; i++) begin
        budget[i] <= BMAX;
        cur[i]    <= IW'(i);
        nxt[i]    <= IW'(i);
      end
    end else begin
      // Equation 1 in integer form: +1 per cycle, -NCORES while holding the bus
      for (int i = 0; i < NCORES; i++) begin
        logic [BW:0] b;
        b = {1'b0, budget[i]} + 1'b1;
        if (busy && owner == IW'(i))
          b = (b > (BW + 1)'(NCORES)) ? b - (BW + 1)'(NCORES) : '0;
        budget[i] <= (b > {1'b0, BMAX}) ? BMAX : b[BW-1:0];
      end
      if (busy) begin
        if (phantom) begin
          ph_cnt <= ph_cnt + 1'b1;
          if (32'(ph_cnt) == MAXL - 1) begin busy <= 1'b0; phantom <= 1'b0; end
        end else if (done) begin
          busy <= 1'b0;
        end
      end else if (found) begin
        busy    <= 1'b1;
        owner   <= sel;
        phantom <= !req[sel];
        ph_cnt  <= '0;
        rr_last <= sel;
        if (mode == leopard_pkg::ARB_CBA) begin
          if (sel_pos + 1 >= NCORES) begin
            ptr <= IW'(sel_pos + 1 - NCORES);
            cur <= nxt;
            nxt <= perm;
            if (sel_pos + 1 >= 2 * NCORES) begin
              cur <= perm;   // whole look-ahead consumed
              ptr <= '0;
            end
          end else begin
            ptr <= IW'(sel_pos + 1);
          end
        end
      end
    end
  end

  always_comb begin
    gnt = '0;
    if (busy && !phantom) gnt[owner] = 1'b1;
    for (int i = 0; i < NCORES; i++) budgets[i*BW +: BW] = budget[i];
  end

  // A request must not hold the bus longer than the budget allows.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n)
      (mode == leopard_pkg::ARB_CBA && busy && !phantom) |-> budget[owner] >= BW'(NCORES - 1);
  endproperty
  a_no_overrun: assert property (p_no_overrun);
endmodule
