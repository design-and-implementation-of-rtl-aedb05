// Self-checking testbench of fpu_divsqrt. Reference results come from the
// simulator's own IEEE double arithmetic ($realtobits of a/b and $sqrt(a));
// the latency of every operation is measured in cycles and compared with the
// short/long latencies (15/18 for division, 23/26 for square root), in both
// operation and analysis (worst-latency) mode. Operands include those of the
// document's latency examples and random normal numbers.
module tb_fpu_divsqrt;
  logic clk = 0, rst_n = 0;
  logic wc_mode, start, op, busy, done, early;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  fpu_divsqrt dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic o, input logic [63:0] x, input logic [63:0] y,
                     input logic wc, input int exp_lat);
    logic [63:0] ref_bits;
    int lat;
    ref_bits = o ? $realtobits($sqrt($bitstoreal(x))) : $realtobits($bitstoreal(x) / $bitstoreal(y));
    @(negedge clk);
    op = o; a = x; b = y; wc_mode = wc; start = 1;
    @(posedge clk); #1 start = 0;
    lat = 1;
    while (!done) begin @(posedge clk); #1; lat++; end
    checks++;
    if (result !== ref_bits) begin
      failures++;
      $display("FAIL value op=%0d a=%h b=%h got %h exp %h", o, x, y, result, ref_bits);
    end
    if (exp_lat > 0) begin
      checks++;
      if (lat != exp_lat) begin
        failures++;
        $display("FAIL latency op=%0d a=%h b=%h wc=%0d got %0d exp %0d", o, x, y, wc, lat, exp_lat);
      end
    end
    @(posedge clk);
  endtask

  function automatic logic [63:0] rnd_double(input bit pos);
    logic [63:0] r;
    r = {$urandom, $urandom};
    r[62:52] = 11'(700 + ($urandom % 600));
    if (pos) r[63] = 1'b0;
    return r;
  endfunction

  initial begin
    wc_mode = 0; start = 0; op = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // document's examples: short and long divisions and square roots
    run(0, 64'hBFF0000000000000, 64'h4000000000000000, 0, 15);
    run(0, 64'h001ABC0000000010, 64'h3FF000400A07610C, 0, 18);
    run(1, 64'h4030000000000000, 64'h0, 0, 23);
    run(1, 64'h4008000000000000, 64'h0, 0, 26);
    // analysis mode: every operation at its worst latency
    run(0, 64'hBFF0000000000000, 64'h4000000000000000, 1, 18);
    run(0, 64'h001ABC0000000010, 64'h3FF000400A07610C, 1, 18);
    run(1, 64'h4030000000000000, 64'h0, 1, 26);
    run(1, 64'h4008000000000000, 64'h0, 1, 26);
    for (int i = 0; i < 300; i++) begin
      logic [63:0] x, y;
      x = rnd_double(0); y = rnd_double(0);
      run(0, x, y, 1'(i % 2), (i % 2 == 1) ? 18 : 0);
      x = rnd_double(1);
      run(1, x, 64'h0, 1'(i % 2), (i % 2 == 1) ? 26 : 0);
    end
    // exact results terminate early in operation mode
    run(0, 64'h4022000000000000, 64'h4008000000000000, 0, 15);   // 9/3
    run(1, 64'h4059000000000000, 64'h0, 0, 23);                  // sqrt(100)
    run(1, 64'h4000000000000000, 64'h0, 0, 26);                  // sqrt(2)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
