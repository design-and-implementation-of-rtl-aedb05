// fpu_divsqrt: double-precision FDIVD / FSQRTD unit with a worst-latency mode.
// The unit is non-pipelined and iterative: a restoring divider or a
// digit-by-digit square root produces 4 result bits per cycle (14 iterations
// give the 53-bit significand, a guard bit and two more bits that, with the
// remainder, form the sticky bit) and rounds to nearest even. When the partial
// remainder becomes zero the remaining result bits are known to be zero,
// which raises an early termination: in operation mode (wc_mode low) an
// exact operation then completes after the short latency, any other after
// the long one. In analysis
// mode (wc_mode high) early termination is inhibited and every operation takes
// the long latency, so measurements see the worst case whatever the operands.
// Latencies: FDIVD 15/18 cycles as in the document; FSQRTD 26 cycles long
// (from the document) and 23 short (this design's choice, by analogy with the
// 3-cycle FDIVD gap). Which operands terminate early, and the iteration
// radix, are this design's choices. Denormal operands are treated as zero and
// denormal results are flushed to zero; NaN/infinity operands are not handled.
// Interface: start, with op (0 div, 1 sqrt), a and b, is accepted when busy
// is low. done pulses for one cycle, with result and early valid, LAT clock
// edges after the edge that sampled start, LAT being the short latency when
// early is high and the long one otherwise.
module fpu_divsqrt #(
  parameter int unsigned DIV_LAT_MIN  = 15,
  parameter int unsigned DIV_LAT_MAX  = 18,
  parameter int unsigned SQRT_LAT_MIN = 23,
  parameter int unsigned SQRT_LAT_MAX = 26
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wc_mode,
  input  logic        start,
  input  logic        op,       // 0: a / b, 1: sqrt(a)
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        busy,
  output logic        done,
  output logic        early,    // this result used the short latency
  output logic [63:0] result
);
  localparam int unsigned BPC = 4;        // result bits per iteration
  localparam int unsigned NIT = 14;       // iterations
  localparam int unsigned QB  = BPC * NIT; // 56 result bits

  logic         op_q, sign_q, zero_q, inf_q, nan_q;
  logic [12:0]  exp_q;                    // signed biased exponent
  logic [54:0]  rem_q;                    // divider remainder (< 2*divisor)
  logic [52:0]  dvs_q;                    // divisor significand
  logic [59:0]  srem_q;                   // square-root remainder
  logic [111:0] rad_q;                    // radicand bits still to consume
  logic [QB-1:0] q_q;
  logic [4:0]   it_q;
  logic [5:0]   cnt_q;

  // ---- one iteration (3 bits) --------------------------------------------
  logic [54:0]  rem_n;
  logic [59:0]  srem_n;
  logic [111:0] rad_n;
  logic [QB-1:0] q_n;
  logic [59:0]  trial;
  always_comb begin
    trial  = '0;
    rem_n  = rem_q;
    srem_n = srem_q;
    rad_n  = rad_q;
    q_n    = q_q;
    for (int k = 0; k < BPC; k++) begin
      if (!op_q) begin
        if (rem_n >= {2'b00, dvs_q}) begin
          rem_n = rem_n - {2'b00, dvs_q};
          q_n   = {q_n[QB-2:0], 1'b1};
        end else begin
          q_n   = {q_n[QB-2:0], 1'b0};
        end
        rem_n = {rem_n[53:0], 1'b0};
      end else begin
        srem_n = {srem_n[57:0], rad_n[111:110]};
        rad_n  = {rad_n[109:0], 2'b00};
        trial  = {2'b00, q_n, 2'b01};
        if (srem_n >= trial) begin
          srem_n = srem_n - trial;
          q_n    = {q_n[QB-2:0], 1'b1};
        end else begin
          q_n    = {q_n[QB-2:0], 1'b0};
        end
      end
    end
  end

  // Exact so far: nothing left in the remainder (and, for sqrt, the radicand).
  logic exact;
  assign exact = op_q ? (srem_q == '0 && rad_q == '0) : (rem_q == '0);

  logic [5:0] lat_min, lat_max;
  assign lat_min = op_q ? 6'(SQRT_LAT_MIN) : 6'(DIV_LAT_MIN);
  assign lat_max = op_q ? 6'(SQRT_LAT_MAX) : 6'(DIV_LAT_MAX);

  logic take_short;
  assign take_short = !wc_mode && exact && cnt_q == lat_min;
  assign done  = busy && (take_short || cnt_q == lat_max);
  assign early = done && take_short;

  // ---- rounding and packing --------------------------------------------
  logic [QB-1:0] qa;
  logic          sticky, rup;
  logic [53:0]   mant;
  logic [12:0]   e_fin;
  always_comb begin
    qa     = q_q << (BPC * (NIT - 32'(it_q)));   // bits not yet produced are zero
    sticky = !exact || (qa[1:0] != 2'b00);
    rup    = qa[2] && (sticky || qa[3]);
    mant   = {1'b0, qa[QB-1:3]} + 54'(rup);
    e_fin  = exp_q;
    if (mant[53]) begin
      mant  = mant >> 1;
      e_fin = e_fin + 1'b1;
    end
    if (nan_q)                   result = 64'h7FF8_0000_0000_0000;
    else if (inf_q)              result = {sign_q, 11'h7FF, 52'h0};
    else if (zero_q)             result = {sign_q, 63'h0};
    else if ($signed(e_fin) <= 0)    result = {sign_q, 63'h0};
    else if ($signed(e_fin) >= 2047) result = {sign_q, 11'h7FF, 52'h0};
    else                         result = {sign_q, e_fin[10:0], mant[51:0]};
  end

  // ---- operand set-up -----------------------------------------------------
  logic        sa, sb;
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;
  logic        za, zb;
  always_comb begin
    sa = a[63]; ea = a[62:52]; ma = {1'b1, a[51:0]}; za = (ea == '0);
    sb = b[63]; eb = b[62:52]; mb = {1'b1, b[51:0]}; zb = (eb == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; op_q <= 1'b0; sign_q <= 1'b0; zero_q <= 1'b0; inf_q <= 1'b0;
      nan_q <= 1'b0; exp_q <= '0; rem_q <= '0; dvs_q <= '0; srem_q <= '0;
      rad_q <= '0; q_q <= '0; it_q <= '0; cnt_q <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        op_q   <= op;
        cnt_q  <= 6'd1;
        it_q   <= '0;
        q_q    <= '0;
        srem_q <= '0;
        rem_q  <= '0;
        rad_q  <= '0;
        dvs_q  <= mb;
        inf_q  <= 1'b0;
        nan_q  <= 1'b0;
        if (!op) begin
          sign_q <= sa ^ sb;
          zero_q <= za;
          inf_q  <= !za && zb;
          if (!za && !zb) begin
            if (ma < mb) begin
              rem_q <= {1'b0, ma, 1'b0};
              exp_q <= 13'(ea) - 13'(eb) + 13'd1022;
            end else begin
              rem_q <= {2'b00, ma};
              exp_q <= 13'(ea) - 13'(eb) + 13'd1023;
            end
          end
        end else begin
          sign_q <= 1'b0;
          zero_q <= za;
          nan_q  <= !za && sa;
          if (!za && !sa) begin
            // unbiased exponent e = ea - 1023; make it even, then halve it
            if (ea[0] == 1'b0) begin          // e odd: use 2*significand
              rad_q <= {ma, 59'h0};
              exp_q <= 13'(($signed({2'b00, ea}) - 13'sd1024) >>> 1) + 13'd1023;
            end else begin
              rad_q <= {1'b0, ma, 58'h0};
              exp_q <= 13'(($signed({2'b00, ea}) - 13'sd1023) >>> 1) + 13'd1023;
            end
          end
        end
      end
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (it_q < 5'(NIT) && !exact) begin
        it_q   <= it_q + 1'b1;
        rem_q  <= rem_n;
        srem_q <= srem_n;
        rad_q  <= rad_n;
        q_q    <= q_n;
      end
      if (done) busy <= 1'b0;
    end
  end
endmodule
