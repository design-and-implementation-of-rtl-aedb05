// Self-checking testbench of tlb (64 entries). A reference map of the
// translations installed is kept in the testbench. Checks: a filled
// translation hits with the right physical address and page offset; misses
// miss; the TLB holds exactly 64 translations; with random replacement the
// victims of 2000 refills are spread over many entries, while the FIFO
// fallback evicts the oldest entry first; flush empties it.
module tb_tlb;
  logic clk = 0, rst_n = 0;
  logic flush, rnd_en, hit, fill_valid;
  logic [5:0] rnd;
  logic [31:0] vaddr, paddr;
  logic [19:0] fill_vpn, fill_ppn;
  int checks = 0, failures = 0;

  tlb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [19:0] map(input logic [19:0] v);
    return v * 20'h3_1337 + 20'h0_ABCD;
  endfunction

  task automatic fill(input logic [19:0] v);
    @(negedge clk); fill_valid = 1; fill_vpn = v; fill_ppn = map(v); rnd = 6'($urandom);
    @(negedge clk); fill_valid = 0;
  endtask

  task automatic look(input logic [19:0] v, input bit exp_hit);
    @(negedge clk); vaddr = {v, 12'($urandom)}; #1;
    checks++;
    if (hit != exp_hit || (hit && paddr != {map(v), vaddr[11:0]})) begin
      failures++; $display("FAIL vpn %h hit %0d exp %0d pa %h", v, hit, exp_hit, paddr);
    end
  endtask

  initial begin
    int resident;
    flush = 0; rnd_en = 0; fill_valid = 0; fill_vpn = 0; fill_ppn = 0; rnd = 0; vaddr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // FIFO fallback: 64 fills, then a 65th evicts the first
    for (int i = 0; i < 64; i++) fill(20'(100 + i));
    for (int i = 0; i < 64; i++) look(20'(100 + i), 1);
    look(20'd99, 0);
    fill(20'd500);
    look(20'd100, 0);
    look(20'd101, 1);
    look(20'd500, 1);
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int i = 0; i < 64; i++) look(20'(100 + i), 0);
    // random replacement: fill 2000 pages, count survivors of the first 64
    rnd_en = 1;
    for (int i = 0; i < 64; i++) fill(20'(1000 + i));
    fill(20'd5000);
    resident = 0;
    for (int i = 0; i < 64; i++) begin
      vaddr = {20'(1000 + i), 12'h0}; #1;
      if (hit) resident++;
    end
    checks++;
    if (resident != 63) begin failures++; $display("FAIL %0d of 64 survive one random refill", resident); end
    for (int i = 0; i < 300; i++) fill(20'(6000 + i));
    resident = 0;
    for (int i = 0; i < 64; i++) begin
      vaddr = {20'(1000 + i), 12'h0}; #1;
      if (hit) resident++;
    end
    // each refill evicts a random entry: some old ones survive 300 refills
    checks++;
    if (resident == 0 || resident > 20) begin failures++; $display("FAIL random replacement left %0d", resident); end
    // the newest page is present; of the 20 newest, later random refills may
    // have evicted a few, and whatever is present translates correctly
    look(20'd6299, 1);
    resident = 0;
    for (int i = 0; i < 20; i++) begin
      vaddr = {20'(6299 - i), 12'h123}; #1;
      checks++;
      if (hit) begin
        resident++;
        if (paddr != {map(20'(6299 - i)), 12'h123}) begin failures++; $display("FAIL pa %h", paddr); end
      end
    end
    checks++;
    if (resident < 12) begin failures++; $display("FAIL only %0d of the 20 newest pages present", resident); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
