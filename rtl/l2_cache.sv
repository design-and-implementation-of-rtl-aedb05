// l2_cache: shared second-level cache, the slave behind the on-chip bus.
// WAYS ways of WAY_BYTES with LINE_BYTES lines, write-back and write-allocate.
// One request is served at a time (the bus stays locked until done).
// Placement: with hrp_en the set comes from hash-based random placement -
// the line address XORed with the seed, rotated by a seed-selected amount
// and folded into the index with XOR gates - otherwise from the modulo
// index. Tags hold the whole line address, so either placement works.
// Replacement: with part_en each master owns one way (master-index
// partitioning: master i only allocates, and so only evicts, in way i);
// otherwise the victim is the first invalid way, else a random way (2 PRNG
// bits). Lookups hit in every way, so shared data stays coherent.
// flush (accepted when idle) walks every line, writes back the dirty ones
// and invalidates all; flushing is high meanwhile (used when the placement
// seed or mode changes, as a line can no longer be found after that).
// A hit completes HIT_LAT cycles after the request; a miss first writes back
// a dirty victim, then reads the line through the memory port.
// From the document: 4 ways of 32KB, 64-byte lines, per-way partitioning,
// hash-based random placement, random replacement, one request at a time.
// This design's own choices: the hash itself, HIT_LAT, write-allocate, the
// 32-byte read beat returned to the bus, and the memory port handshake.
// Interface: req is high for one request (bus fields and master id stable)
// until done pulses; rdata is valid with done. mreq/mwe/maddr/mwdata are held
// until mdone, mrdata is valid with mdone.
// Lint note: rst_n is an asynchronous reset; it also disables the assertion
// below (disable iff), which a linter reports as a reset used both ways.
module l2_cache #(
  parameter int unsigned WAY_BYTES  = 32768,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned HIT_LAT    = 3,
  localparam int unsigned MW        = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     part_en,
  input  logic                     hrp_en,
  input  logic [31:0]              seed,
  input  logic [1:0]               rnd,
  input  logic                     flush,      // write back and invalidate everything
  output logic                     flushing,
  // bus slave
  input  logic                     req,
  input  leopard_pkg::bus_req_t    bus,
  input  logic [MW-1:0]            master,
  output logic                     done,
  output logic [255:0]             rdata,
  output logic                     hit_o,      // with done: the request hit
  output logic                     wb_o,       // with done: a dirty line was written back
  // memory port
  output logic                     mreq,
  output logic                     mwe,
  output logic [31:0]              maddr,
  output logic [LINE_BYTES*8-1:0]  mwdata,
  input  logic                     mdone,
  input  logic [LINE_BYTES*8-1:0]  mrdata
);
  localparam int unsigned SETS = WAY_BYTES / LINE_BYTES;
  localparam int unsigned OFF  = $clog2(LINE_BYTES);
  localparam int unsigned IB   = $clog2(SETS);
  localparam int unsigned TB   = 32 - OFF;          // whole line address
  localparam int unsigned LW   = LINE_BYTES * 8;

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WB, S_FILL, S_DONE, S_FLUSH, S_FWB} state_e;
  state_e state;

  logic [SETS-1:0] valid [WAYS];
  logic [SETS-1:0] dirty [WAYS];
  logic [IB-1:0]   f_set;            // flush walk position
  logic [MW-1:0]   f_way;
  logic [IB-1:0]   aset;             // set addressed in the memories
  logic [TB-1:0]   tag_rd  [WAYS];
  logic [LW-1:0]   line_rd [WAYS];

  // --- placement -------------------------------------------------------------
  logic [TB-1:0] la;
  logic [IB-1:0] set;
  assign la = bus.addr[31:OFF];
  always_comb begin
    logic [TB-1:0] x;
    logic [4:0]    r;
    x = la ^ TB'(seed);
    r = 5'(seed[31:26] % TB);
    x = (x << r) | (x >> (TB - 32'(r)));
    set = '0;
    for (int i = 0; i < TB; i += IB) set = set ^ IB'(x >> i);
    if (!hrp_en) set = la[IB-1:0];
  end

  // --- lookup --------------------------------------------------------------
  logic [WAYS-1:0] hitv;
  logic            hit;
  logic [MW-1:0]   hway, victim, way_q;
  always_comb begin
    hit = 1'b0; hway = '0;
    for (int w = 0; w < WAYS; w++) begin
      hitv[w] = valid[w][set] && tag_rd[w] == la;
      if (hitv[w]) begin hit = 1'b1; hway = MW'(w); end
    end
    if (part_en) victim = master;
    else begin
      victim = MW'(rnd);
      for (int w = WAYS - 1; w >= 0; w--) if (!valid[w][set]) victim = MW'(w);
    end
  end

  // --- control ---------------------------------------------------------------
  logic [$clog2(HIT_LAT+1)-1:0] cnt;
  logic was_hit, did_wb;
  logic [LW-1:0] cur_line, new_line;
  assign cur_line = line_rd[(state == S_LOOK) ? hway : way_q];

  // write of one word into the line (read-modify-write)
  always_comb begin
    new_line = (state == S_FILL) ? mrdata : cur_line;
    if (bus.we)
      for (int b = 0; b < 4; b++)
        if (bus.wstrb[b]) new_line[32'(bus.addr[OFF-1:2]) * 32 + b * 8 +: 8] = bus.wdata[b*8 +: 8];
  end

  logic line_we;
  assign line_we = (state == S_FILL && mdone) || (state == S_LOOK && cnt == 0 && hit && bus.we);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; way_q <= '0; was_hit <= 1'b0; did_wb <= 1'b0;
      f_set <= '0; f_way <= '0;
      for (int w = 0; w < WAYS; w++) begin valid[w] <= '0; dirty[w] <= '0; end
    end else begin
      case (state)
        S_IDLE: if (flush) begin
          state <= S_FLUSH; f_set <= '0; f_way <= '0;
        end else if (req) begin
          state <= S_LOOK;
          cnt   <= ($clog2(HIT_LAT+1))'(HIT_LAT - 1);
        end
        S_LOOK: if (cnt != 0) cnt <= cnt - 1'b1;
          else if (hit) begin
            way_q   <= hway;
            was_hit <= 1'b1;
            did_wb  <= 1'b0;
            state   <= S_DONE;
            if (bus.we) dirty[hway][set] <= 1'b1;
          end else begin
            way_q   <= victim;
            was_hit <= 1'b0;
            did_wb  <= valid[victim][set] && dirty[victim][set];
            state   <= (valid[victim][set] && dirty[victim][set]) ? S_WB : S_FILL;
          end
        S_WB:   if (mdone) state <= S_FILL;
        S_FILL: if (mdone) begin
          valid[way_q][set] <= 1'b1;
          dirty[way_q][set] <= bus.we;
          state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        S_FLUSH, S_FWB: begin
          if (state == S_FLUSH && valid[f_way][f_set] && dirty[f_way][f_set]) begin
            state <= S_FWB;
            way_q <= f_way;
          end else if (state == S_FLUSH || mdone) begin
            state <= S_FLUSH;
            valid[f_way][f_set] <= 1'b0;
            dirty[f_way][f_set] <= 1'b0;
            f_way <= f_way + 1'b1;
            if (32'(f_way) == WAYS - 1) begin
              f_way <= '0;
              f_set <= f_set + 1'b1;
              if (32'(f_set) == SETS - 1) state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // --- storage: one tag and one data memory per way -------------------------
  logic [MW-1:0] wr_way;
  assign wr_way = (state == S_LOOK) ? hway : way_q;
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [TB-1:0] tag_mem  [SETS];
    logic [LW-1:0] data_mem [SETS];
    always_ff @(posedge clk) begin
      if (line_we && wr_way == MW'(w)) data_mem[set] <= new_line;
      if (state == S_FILL && mdone && way_q == MW'(w)) tag_mem[set] <= la;
    end
    assign tag_rd[w]  = tag_mem[aset];
    assign line_rd[w] = data_mem[aset];
  end

  // --- outputs ------------------------------------------------------------------
  assign done  = (state == S_DONE);
  assign hit_o = was_hit;
  assign wb_o  = did_wb;
  assign rdata = bus.addr[5] ? cur_line[511:256] : cur_line[255:0];
  assign aset     = (state == S_FLUSH || state == S_FWB) ? f_set : set;
  assign flushing = (state == S_FLUSH || state == S_FWB);
  assign mreq  = (state == S_WB) || (state == S_FILL) || (state == S_FWB);
  assign mwe   = (state == S_WB) || (state == S_FWB);
  assign maddr = (state == S_FILL) ? {la, {OFF{1'b0}}} : {tag_rd[way_q], {OFF{1'b0}}};
  assign mwdata = cur_line;

  a_one_way: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hitv));
endmodule
