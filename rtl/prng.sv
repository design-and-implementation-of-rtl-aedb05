// prng: pseudo-random number source of the processor.
// A pool of NPOOL independent 32-bit Galois LFSRs (maximal-length polynomial
// x^32+x^22+x^2+x+1), each seeded through a programming port, is advanced every
// cycle. Every core receives a 16-bit word per cycle split as the document
// allocates it: 2 bits for DL1 replacement, 2 for IL1, 6 for the DTLB and 6 for
// the ITLB; a further ARB_BITS bits feed the bus arbiter's permutations.
// The LFSR structure and polynomial, and one LFSR per consumer, are this
// design's choices; the document only says the generator is LFSR based and
// holds a pool of programmable random numbers.
// Interface: seed_we/seed_sel/seed_data program one LFSR (a zero seed is
// replaced by a fixed non-zero constant); outputs change every cycle.
module prng #(
  parameter int unsigned NCORES   = 4,
  parameter int unsigned ARB_BITS = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  seed_we,
  input  logic [3:0]            seed_sel,
  input  logic [31:0]           seed_data,
  output logic [NCORES*16-1:0]  core_rnd,   // per core: [15:10] ITLB [9:4] DTLB [3:2] IL1 [1:0] DL1
  output logic [ARB_BITS-1:0]   arb_rnd
);
  localparam int unsigned NPOOL = NCORES + 1;
  localparam logic [31:0] POLY  = 32'h8020_0003;  // taps 32,22,2,1 (Galois form)

  logic [31:0] lfsr [NPOOL];

  function automatic logic [31:0] step(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ POLY) : (s >> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPOOL; i++) lfsr[i] <= 32'hACE1_0001 + 32'h9E37_79B9 * i;
    end else begin
      for (int i = 0; i < NPOOL; i++) begin
        if (seed_we && seed_sel == 4'(i))
          lfsr[i] <= (seed_data == '0) ? 32'h1 : seed_data;
        else
          lfsr[i] <= step(lfsr[i]);
      end
    end
  end

  always_comb begin
    for (int c = 0; c < NCORES; c++) core_rnd[c*16 +: 16] = lfsr[c][15:0] ^ lfsr[c][31:16];
    arb_rnd = ARB_BITS'(lfsr[NCORES]);
  end
endmodule
