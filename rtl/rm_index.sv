// rm_index: random modulo (RM) set-index function of the first-level caches.
// The IDX_BITS index bits of an address are first XORed with a mask and then
// sent through an odd-even transposition network of conditional bit swaps
// (IDX_BITS stages, enough to reach every permutation of the bit positions).
// Mask and swap controls are taken from the tag bits XORed with the seed, so
// for one seed and one segment (one tag, i.e. one way-sized block of memory)
// the map from modulo index to set is a bijection: lines of the same segment
// never collide, as random modulo requires, while different seeds or segments
// get different placements. With rm_en low the modulo index passes unchanged.
// The document gives the principle (a seeded permutation of the index bits,
// with an XOR of address and seed on the critical path); the exact network and
// the mixing of tag and seed bits are this design's choices. Combinational.
module rm_index #(
  parameter int unsigned IDX_BITS = 8,
  parameter int unsigned TAG_BITS = 20
) (
  input  logic                rm_en,
  input  logic [31:0]         seed,
  input  logic [TAG_BITS-1:0] tag,
  input  logic [IDX_BITS-1:0] idx,
  output logic [IDX_BITS-1:0] set
);
  localparam int unsigned NCTL = IDX_BITS * (IDX_BITS / 2);
  localparam int unsigned NRND = IDX_BITS + NCTL;

  logic [31:0]         key;
  logic [NRND-1:0]     rnd;
  logic [IDX_BITS-1:0] v;

  // Fold tag^seed into enough control bits by rotating and XORing the 32-bit key.
  always_comb begin
    key = seed ^ 32'(tag);
    for (int i = 0; i < NRND; i++)
      rnd[i] = key[i % 32] ^ key[(i * 7 + 13) % 32];
  end

  always_comb begin
    v = idx ^ rnd[IDX_BITS-1:0];
    for (int s = 0; s < IDX_BITS; s++) begin
      for (int k = 0; k < IDX_BITS / 2; k++) begin
        if (2 * k + (s % 2) + 1 < IDX_BITS && rnd[IDX_BITS + s * (IDX_BITS / 2) + k])
          {v[2 * k + (s % 2)], v[2 * k + (s % 2) + 1]} = {v[2 * k + (s % 2) + 1], v[2 * k + (s % 2)]};
      end
    end
    set = rm_en ? v : idx;
  end
endmodule
