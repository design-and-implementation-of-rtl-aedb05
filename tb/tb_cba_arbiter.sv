// Self-checking testbench of cba_arbiter. A slave model holds each grant for
// a per-core number of cycles. The testbench keeps its own copy of the
// budgets (Equation 1 scaled by the core count) and checks every cycle that
// the arbiter's budgets match it and that every CBA grant goes to a requesting
// core with a full budget. It then replays the document's CBA example (cores
// A-C issue 28-cycle requests, D 6-cycle ones, all always pending, MaxL = 28):
// in the first 336 cycles round-robin serves D 3 times and CBA serves it more
// often (the document's run of the example gives 7). Finally time-composable
// mode with one real requester checks that emulated contenders hold the bus for
// MaxL cycles and that the waiting time stays below MaxL*(2*Nc-1).
module tb_cba_arbiter;
  localparam int NC = 4, MAXL = 28, BW = $clog2(MAXL * NC + 1);
  logic clk = 0, rst_n = 0;
  leopard_pkg::arb_mode_e mode;
  logic tc_mode;
  logic [NC-1:0] tc_mask, req, gnt;
  logic [8*(NC-1)-1:0] rnd;
  logic done, busy, phantom;
  logic [1:0] owner;
  logic [NC*BW-1:0] budgets;
  int checks = 0, failures = 0;
  int dur [NC];
  int hold = 0;
  int model [NC];
  int served [NC];
  int ph_len = 0, ph_seen = 0;

  cba_arbiter #(.NCORES(NC), .MAXL(MAXL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) rnd <= 24'($urandom);

  // slave: finish a real transfer after dur[owner] cycles
  assign done = (gnt != 0) && (hold == dur[owner] - 1);
  always @(posedge clk) begin
    if (!rst_n) hold <= 0;
    else if (gnt != 0) hold <= done ? 0 : hold + 1;
  end

  // independent budget model and grant checks
  logic busy_q = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NC; i++) begin model[i] = MAXL * NC; served[i] = 0; end
    end else begin
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (int'(budgets[i*BW +: BW]) != model[i]) begin
          failures++;
          $display("FAIL budget core %0d: %0d, model %0d", i, budgets[i*BW +: BW], model[i]);
        end
      end
      // new grant this cycle?
      if (busy && !busy_q && mode == leopard_pkg::ARB_CBA) begin
        checks++;
        if (model[owner] != MAXL * NC) begin
          failures++; $display("FAIL grant to core %0d with budget %0d", owner, model[owner]);
        end
      end
      if (done) served[owner]++;
      if (phantom) ph_len++;
      if (!phantom && ph_len > 0) begin
        ph_seen++; checks++;
        if (ph_len != MAXL) begin failures++; $display("FAIL phantom hold %0d", ph_len); end
        ph_len = 0;
      end
      for (int i = 0; i < NC; i++) begin
        model[i] = model[i] + 1 - ((busy && owner == 2'(i)) ? NC : 0);
        if (model[i] > MAXL * NC) model[i] = MAXL * NC;
        if (model[i] < 0) model[i] = 0;
      end
    end
    busy_q <= busy;
  end

  task automatic reset_run();
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
  endtask

  initial begin
    int d_rr, d_cba, wait_c, max_wait;
    mode = leopard_pkg::ARB_RR; tc_mode = 0; tc_mask = '0; req = '0;
    dur[0] = 28; dur[1] = 28; dur[2] = 28; dur[3] = 6;
    // document's example with round-robin
    reset_run();
    req = 4'hF;
    repeat (336) @(posedge clk);
    d_rr = served[3];
    checks++;
    if (d_rr != 3) begin failures++; $display("FAIL RR served D %0d times, expected 3", d_rr); end
    // round-robin order A,B,C,D: no core gets ahead of the one before it
    checks++;
    if (!(served[0] >= served[1] && served[1] >= served[2] && served[2] >= served[3] &&
          served[0] - served[3] <= 1)) begin
      failures++; $display("FAIL RR served %0d %0d %0d", served[0], served[1], served[2]);
    end
    // same with CBA
    req = '0; mode = leopard_pkg::ARB_CBA;
    reset_run();
    req = 4'hF;
    repeat (336) @(posedge clk);
    d_cba = served[3];
    $display("D served in 336 cycles: round-robin %0d, CBA %0d", d_rr, d_cba);
    checks++;
    if (d_cba < 6 || d_cba > 8) begin failures++; $display("FAIL CBA served D %0d times", d_cba); end
    // time-composable mode: core 0 alone, others emulated
    req = '0; tc_mode = 1; tc_mask = 4'hE; dur[0] = 5;
    reset_run();
    max_wait = 0;
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom % 30) @(posedge clk);
      req[0] = 1; wait_c = 0;
      while (!gnt[0]) begin @(posedge clk); #1; wait_c++; end
      if (wait_c > max_wait) max_wait = wait_c;
      while (gnt[0]) begin @(posedge clk); #1; end
      req[0] = 0;
    end
    $display("TC mode: max wait %0d cycles, %0d emulated contender holds", max_wait, ph_seen);
    checks++;
    if (max_wait >= MAXL * (2 * NC - 1) || ph_seen < 20) begin
      failures++; $display("FAIL TC mode wait %0d holds %0d", max_wait, ph_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
