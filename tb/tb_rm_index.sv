// Self-checking testbench of rm_index (random modulo placement), with the
// DL1 geometry (8 index bits). Checks, for many random seeds and segments,
// that the index-to-set map of one segment is a permutation (no two lines of a
// way-sized segment share a set), that rm_en low gives plain modulo, and
// that one address is spread over the sets as the seed changes: over 12800
// seeds every one of the 256 sets is used and none more than twice as often
// as the mean. A second instance with the IL1 geometry (7 index bits, 128
// sets) repeats the spread test over 10,000 runs, each with a new seed: every
// set is used and the most used one gets under twice the mean (78).
module tb_rm_index;
  localparam int IB = 8, TB = 20;
  logic rm_en;
  logic [31:0] seed;
  logic [TB-1:0] tag;
  logic [IB-1:0] idx, set;
  int checks = 0, failures = 0;
  int cnt [256];

  rm_index #(.IDX_BITS(IB), .TAG_BITS(TB)) dut (.*);

  logic [6:0] idx_i, set_i;
  int cnt_i [128];
  rm_index #(.IDX_BITS(7), .TAG_BITS(TB)) dut_il1 (.rm_en(rm_en), .seed(seed), .tag(tag), .idx(idx_i), .set(set_i));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit used [256];
    int dup, maxc, minc;
    rm_en = 1; idx_i = '0;
    for (int t = 0; t < 200; t++) begin
      seed = $urandom; tag = TB'($urandom);
      for (int i = 0; i < 256; i++) used[i] = 0;
      dup = 0;
      for (int i = 0; i < 256; i++) begin
        idx = IB'(i); #1;
        if (used[set]) dup++;
        used[set] = 1;
      end
      checks++;
      if (dup != 0) begin failures++; $display("FAIL seed %h tag %h: %0d collisions", seed, tag, dup); end
    end
    rm_en = 0;
    for (int i = 0; i < 256; i++) begin
      seed = $urandom; tag = TB'($urandom); idx = IB'(i); #1;
      checks++;
      if (set != idx) begin failures++; $display("FAIL modulo idx %0d -> %0d", i, set); end
    end
    rm_en = 1; tag = 20'h00045; idx = 8'h67;
    for (int i = 0; i < 256; i++) cnt[i] = 0;
    for (int s = 0; s < 12800; s++) begin seed = $urandom; #1; cnt[set]++; end
    maxc = 0; minc = 1 << 30;
    for (int i = 0; i < 256; i++) begin
      if (cnt[i] > maxc) maxc = cnt[i];
      if (cnt[i] < minc) minc = cnt[i];
    end
    $display("set usage over seeds: min %0d max %0d (mean 50)", minc, maxc);
    checks++;
    if (minc == 0 || maxc > 100) begin failures++; $display("FAIL placement not spread"); end
    // IL1: one instruction address over 10,000 runs
    tag = 20'h40001; idx_i = 7'h2B;
    for (int i = 0; i < 128; i++) cnt_i[i] = 0;
    for (int s = 0; s < 10000; s++) begin seed = $urandom; #1; cnt_i[set_i]++; end
    maxc = 0; minc = 1 << 30;
    for (int i = 0; i < 128; i++) begin
      if (cnt_i[i] > maxc) maxc = cnt_i[i];
      if (cnt_i[i] < minc) minc = cnt_i[i];
    end
    $display("IL1 set usage over 10000 runs: min %0d max %0d (mean 78)", minc, maxc);
    checks++;
    if (minc == 0 || maxc > 156) begin failures++; $display("FAIL IL1 placement not spread"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
