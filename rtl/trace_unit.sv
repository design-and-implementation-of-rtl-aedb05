// trace_unit: high-speed instruction tracing path.
// Every traced core pushes one record per executed instruction (program
// counter, instruction word, data address, plus a cycle time stamp added
// here) into its own FIFO trace buffer of DEPTH records. A round-robin
// drainer writes the records, one per DRAM write, into a circular trace
// region of REGION_RECS 16-byte records starting at BASE, through a port
// reserved for tracing, so the AMBA bus used by the caches sees no traffic.
// The trace controller that ships the region to the host reads from rd_ptr
// (its read position, in records) and sees wr_ptr. When the region is full
// the drainer waits; once a core's buffer is full too, stall[core] asks that
// core to wait: only then does tracing alter execution timing.
// From the document: per-core trace buffers, a dedicated DRAM region and
// memory path, no use of the AMBA bus, interference only when the region
// fills up. This design's choices: the record layout, DEPTH, the round-robin
// drain, the pointer interface and the default region size (scaled from the
// 512MB used in the document's experiments to 2^20 records = 16MB).
// Timing: a record is accepted in the cycle tr_valid is high and stall low.
// A DRAM write is held (twreq and its fields) until twdone.
module trace_unit #(
  parameter int unsigned NCORES      = 4,
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned REGION_RECS = 1 << 20,
  parameter logic [31:0] BASE        = 32'h8000_0000,
  localparam int unsigned PW         = $clog2(REGION_RECS) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NCORES-1:0]    trace_en,
  input  logic [NCORES-1:0]    tr_valid,
  input  logic [NCORES*32-1:0] tr_pc,
  input  logic [NCORES*32-1:0] tr_inst,
  input  logic [NCORES*32-1:0] tr_daddr,
  output logic [NCORES-1:0]    stall,
  // dedicated DRAM write port
  output logic                 twreq,
  output logic [31:0]          twaddr,
  output logic [127:0]         twdata,
  input  logic                 twdone,
  // trace controller (Ethernet side)
  input  logic [PW-1:0]        rd_ptr,
  output logic [PW-1:0]        wr_ptr
);
  localparam int unsigned AWD = $clog2(DEPTH);
  localparam int unsigned CW  = (NCORES > 1) ? $clog2(NCORES) : 1;

  logic [31:0] tstamp;
  logic [NCORES-1:0] empty, full, pop;
  logic [127:0] head [NCORES];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tstamp <= '0; else tstamp <= tstamp + 1'b1;

  for (genvar c = 0; c < NCORES; c++) begin : g_buf
    logic [127:0] mem [DEPTH];
    logic [AWD:0] wp, rp;
    logic         push;
    assign empty[c] = (wp == rp);
    assign full[c]  = (wp[AWD-1:0] == rp[AWD-1:0]) && (wp[AWD] != rp[AWD]);
    assign stall[c] = trace_en[c] && tr_valid[c] && full[c];
    assign push     = trace_en[c] && tr_valid[c] && !full[c];
    assign head[c]  = mem[rp[AWD-1:0]];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp <= '0; rp <= '0;
      end else begin
        if (push)   wp <= wp + 1'b1;
        if (pop[c]) rp <= rp + 1'b1;
      end
    end
    always_ff @(posedge clk)
      if (push) mem[wp[AWD-1:0]] <= {tstamp, tr_pc[c*32 +: 32], tr_inst[c*32 +: 32], tr_daddr[c*32 +: 32]};
  end

  // --- round-robin drain into the circular region --------------------------
  logic          busy;
  logic [CW-1:0] cur, last;
  logic          region_full, found;
  logic [CW-1:0] pick;
  assign region_full = (wr_ptr[PW-2:0] == rd_ptr[PW-2:0]) && (wr_ptr[PW-1] != rd_ptr[PW-1]);

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = NCORES; k >= 1; k--)
      if (!empty[CW'((32'(last) + k) % NCORES)]) begin
        found = 1'b1;
        pick  = CW'((32'(last) + k) % NCORES);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cur <= '0; last <= CW'(NCORES - 1); wr_ptr <= '0;
    end else if (busy) begin
      if (twdone) begin
        busy   <= 1'b0;
        wr_ptr <= wr_ptr + 1'b1;
      end
    end else if (found && !region_full) begin
      busy <= 1'b1;
      cur  <= pick;
      last <= pick;
    end
  end

  always_comb begin
    pop = '0;
    if (busy && twdone) pop[cur] = 1'b1;
  end

  assign twreq  = busy;
  assign twaddr = BASE + 32'({wr_ptr[PW-2:0], 4'h0});
  assign twdata = head[cur];
endmodule
