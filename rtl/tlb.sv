// tlb: fully associative translation lookaside buffer (ITLB or DTLB).
// ENTRIES entries map a 20-bit virtual page number to a 20-bit physical page
// number (4KB pages). Lookup is combinational: hit and paddr are valid in the
// cycle vaddr is presented. On a miss the page-table walker, outside this
// block, returns the translation through fill_valid/fill_vpn/fill_ppn; it goes
// to the first free entry, else to the entry chosen by the 6 random bits from
// the PRNG (random replacement). With rnd_en low the victim is picked by a
// FIFO pointer instead. flush invalidates every entry.
// The size and random replacement follow the document (64 entries, 6 random
// bits); the fill interface, the FIFO fallback and the absence of context and
// permission bits are this design's simplifications.
module tlb #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned RBITS   = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             rnd_en,
  input  logic [RBITS-1:0] rnd,
  input  logic [31:0]      vaddr,
  output logic             hit,
  output logic [31:0]      paddr,
  input  logic             fill_valid,
  input  logic [19:0]      fill_vpn,
  input  logic [19:0]      fill_ppn
);
  logic [ENTRIES-1:0] valid;
  logic [19:0]        vpn [ENTRIES];
  logic [19:0]        ppn [ENTRIES];
  logic [RBITS-1:0]   fifo_ptr, victim;
  logic               have_free;
  logic [RBITS-1:0]   free_idx;

  always_comb begin
    hit   = 1'b0;
    paddr = {20'h0, vaddr[11:0]};
    for (int i = 0; i < ENTRIES; i++)
      if (valid[i] && vpn[i] == vaddr[31:12]) begin
        hit   = 1'b1;
        paddr = {ppn[i], vaddr[11:0]};
      end
  end

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid[i]) begin
        have_free = 1'b1;
        free_idx  = RBITS'(i);
      end
    victim = have_free ? free_idx : (rnd_en ? rnd : fifo_ptr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      fifo_ptr <= '0;
    end else if (flush) begin
      valid    <= '0;
    end else if (fill_valid) begin
      valid[victim] <= 1'b1;
      if (!have_free && !rnd_en) fifo_ptr <= fifo_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      vpn[victim] <= fill_vpn;
      ppn[victim] <= fill_ppn;
    end
  end
endmodule
