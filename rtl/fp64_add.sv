// fp64_add: pipelined IEEE-754 binary64 (double precision) adder.
//
// y = a + b, rounded to nearest, ties to even. Subnormal inputs are read as
// zero and results below the normal range are flushed to zero with the sign
// of the exact result; overflow gives infinity; a NaN input, or the sum of
// opposite infinities, gives the quiet NaN 0x7FF8000000000000. An exact
// cancellation gives +0, and (-0) + (-0) gives -0.
//
// The work is split into three steps: align (order the operands by
// magnitude and shift the smaller one right, keeping guard, round and
// sticky bits), add or subtract the 56-bit significands, then normalise
// and round. With LAT >= 3 a register follows each step and LAT - 3 more
// registers delay the result; with LAT < 3 the steps are chained without
// registers and LAT registers follow (left to the synthesis tool to
// retime). in_valid travels alongside as out_valid. The pipeline never
// stalls: inputs are taken every cycle and the result of the inputs of
// cycle t appears in cycle t + LAT.
//
// The accumulation example this design follows uses a deep float64 adder
// from the synthesis tool's library; its insides, the subnormal flushing
// and the special-value rules here are this design's choices.
module fp64_add #(
  parameter int unsigned LAT = 15
) (
  input  logic        clk,
  input  logic        in_valid,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        out_valid,
  output logic [63:0] y
);
  import cs_pkg::*;

  // after the align step
  typedef struct packed {
    logic        valid;
    logic        special;    // result fixed by a special value
    logic [63:0] special_y;
    logic        sign;       // sign of the larger operand
    logic        sub;        // operand signs differ
    logic        both_neg;   // sign of a zero result of an addition
    logic [10:0] exp;        // exponent of the larger operand
    logic [55:0] big;        // 1.frac, then guard, round, sticky
    logic [55:0] lesser;     // aligned smaller significand, sticky in bit 0
  } align_t;

  // after the add step
  typedef struct packed {
    logic        valid;
    logic        special;
    logic [63:0] special_y;
    logic        sign;
    logic        sub;
    logic        both_neg;
    logic [10:0] exp;
    logic [56:0] sum;
  } sum_t;

  typedef struct packed {
    logic        valid;
    logic [63:0] y;
  } res_t;

  function automatic align_t f_align(logic v, logic [63:0] x, logic [63:0] z);
    f64_fields_t fx, fz, fb, fs;
    logic x_zero, z_zero, x_inf, z_inf, x_nan, z_nan, x_big;
    logic [62:0] mag_x, mag_z;
    logic [55:0] m_small, shifted, lost;
    logic [10:0] d;
    align_t r;
    fx = x;
    fz = z;
    x_zero = (fx.exp == '0);
    z_zero = (fz.exp == '0);
    x_inf  = (fx.exp == F64_EXP_MAX) && (fx.frac == '0);
    z_inf  = (fz.exp == F64_EXP_MAX) && (fz.frac == '0);
    x_nan  = (fx.exp == F64_EXP_MAX) && (fx.frac != '0);
    z_nan  = (fz.exp == F64_EXP_MAX) && (fz.frac != '0);
    mag_x  = x_zero ? '0 : x[62:0];
    mag_z  = z_zero ? '0 : z[62:0];
    x_big  = (mag_x >= mag_z);
    fb     = x_big ? fx : fz;
    fs     = x_big ? fz : fx;

    r = '0;
    r.valid    = v;
    r.special  = x_nan || z_nan || x_inf || z_inf;
    if (x_nan || z_nan || (x_inf && z_inf && (fx.sign != fz.sign)))
      r.special_y = F64_QNAN;
    else if (x_inf)
      r.special_y = {fx.sign, F64_EXP_MAX, 52'd0};
    else
      r.special_y = {fz.sign, F64_EXP_MAX, 52'd0};
    r.sign     = fb.sign;
    r.sub      = fx.sign ^ fz.sign;
    r.both_neg = fx.sign & fz.sign;
    r.exp      = fb.exp;
    r.big      = (fb.exp == '0) ? '0 : {1'b1, fb.frac, 3'b000};
    m_small    = (fs.exp == '0) ? '0 : {1'b1, fs.frac, 3'b000};
    d          = fb.exp - fs.exp;
    if (d >= 11'd56) begin
      shifted = '0;
      lost    = m_small;
    end else begin
      shifted = m_small >> d;
      lost    = m_small & ~({56{1'b1}} << d);
    end
    r.lesser = {shifted[55:1], shifted[0] | (|lost)};
    return r;
  endfunction

  function automatic sum_t f_add(align_t s);
    sum_t r;
    r.valid     = s.valid;
    r.special   = s.special;
    r.special_y = s.special_y;
    r.sign      = s.sign;
    r.sub       = s.sub;
    r.both_neg  = s.both_neg;
    r.exp       = s.exp;
    r.sum       = s.sub ? {1'b0, s.big - s.lesser} : {1'b0, s.big} + {1'b0, s.lesser};
    return r;
  endfunction

  function automatic res_t f_round(sum_t s);
    res_t        r;
    logic [55:0] m;
    logic [5:0]  lz;
    logic        found;
    logic signed [12:0] e;
    logic        up;
    logic [52:0] frac_r;   // carry and 52 fraction bits
    r.valid = s.valid;
    m  = '0;
    lz = '0;
    e  = '0;
    if (s.special) begin
      r.y = s.special_y;
    end else if (s.sum == '0) begin
      r.y = {s.sub ? 1'b0 : s.both_neg, 63'd0};
    end else begin
      if (s.sum[56]) begin
        m = {s.sum[56:2], s.sum[1] | s.sum[0]};
        e = $signed({2'b00, s.exp}) + 13'sd1;
      end else begin
        found = 1'b0;
        for (int i = 55; i >= 0; i--) begin
          if (!found && s.sum[i]) begin
            found = 1'b1;
            lz    = 6'(55 - i);
          end
        end
        m = s.sum[55:0] << lz;
        e = $signed({2'b00, s.exp}) - $signed({7'd0, lz});
      end
      up     = m[2] && (m[1] || m[0] || m[3]);
      frac_r = {1'b0, m[54:3]} + 53'(up);
      if (frac_r[52]) e = e + 13'sd1;
      if (e <= 0)
        r.y = {s.sign, 63'd0};
      else if (e >= 13'sd2047)
        r.y = {s.sign, F64_EXP_MAX, 52'd0};
      else
        r.y = {s.sign, e[10:0], frac_r[51:0]};
    end
    return r;
  endfunction

  res_t res;

  if (LAT >= 3) begin : g_staged
    align_t s1_q;
    sum_t   s2_q;
    res_t   s3_q;
    always_ff @(posedge clk) begin
      s1_q <= f_align(in_valid, a, b);
      s2_q <= f_add(s1_q);
      s3_q <= f_round(s2_q);
    end
    assign res = s3_q;
  end else begin : g_chained
    assign res = f_round(f_add(f_align(in_valid, a, b)));
  end

  localparam int unsigned EXTRA = (LAT >= 3) ? LAT - 3 : LAT;

  if (EXTRA == 0) begin : g_nodelay
    assign out_valid = res.valid;
    assign y         = res.y;
  end else begin : g_delay
    res_t dly_q [EXTRA];
    always_ff @(posedge clk) begin
      dly_q[0] <= res;
      for (int i = 1; i < EXTRA; i++) dly_q[i] <= dly_q[i-1];
    end
    assign out_valid = dly_q[EXTRA-1].valid;
    assign y         = dly_q[EXTRA-1].y;
  end

  initial assert (LAT >= 1) else $fatal(1, "fp64_add needs LAT >= 1");

endmodule
