// Self-checking testbench of prng. The testbench runs its own model of the
// Galois LFSRs and checks every output bit of every cycle against it, after
// reset and after reseeding; it also checks that a zero seed does not lock up
// a generator and that each 2-bit replacement field is balanced over 4000
// cycles.
module tb_prng;
  localparam int NC = 4, AB = 26;
  logic clk = 0, rst_n = 0;
  logic seed_we;
  logic [3:0] seed_sel;
  logic [31:0] seed_data;
  logic [NC*16-1:0] core_rnd;
  logic [AB-1:0] arb_rnd;
  int checks = 0, failures = 0;
  logic [31:0] m [NC+1];
  int hist [4];

  prng #(.NCORES(NC), .ARB_BITS(AB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] nxt(input logic [31:0] s);
    logic fb;
    fb = s[0];
    s = s >> 1;
    if (fb) s = s ^ 32'h8020_0003;
    return s;
  endfunction

  task automatic compare();
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (core_rnd[c*16 +: 16] != (m[c][15:0] ^ m[c][31:16])) begin
        failures++; $display("FAIL core %0d rnd %h", c, core_rnd[c*16 +: 16]);
      end
    end
    checks++;
    if (arb_rnd != m[NC][AB-1:0]) begin failures++; $display("FAIL arb rnd"); end
  endtask

  initial begin
    seed_we = 0; seed_sel = 0; seed_data = 0;
    for (int i = 0; i <= NC; i++) m[i] = 32'hACE1_0001 + 32'h9E37_79B9 * i;
    for (int i = 0; i < 4; i++) hist[i] = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      compare();
      hist[core_rnd[1:0]]++;
      if (t == 2000) begin seed_we = 1; seed_sel = 4'd2; seed_data = 32'h0; end
      else if (t == 2001) begin seed_we = 1; seed_sel = 4'd4; seed_data = 32'hDEAD_BEEF; end
      else seed_we = 0;
      @(posedge clk);
      for (int i = 0; i <= NC; i++)
        if (seed_we && seed_sel == 4'(i)) m[i] = (seed_data == 0) ? 32'h1 : seed_data;
        else m[i] = nxt(m[i]);
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (hist[i] < 800 || hist[i] > 1200) begin failures++; $display("FAIL DL1 field value %0d seen %0d times", i, hist[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
