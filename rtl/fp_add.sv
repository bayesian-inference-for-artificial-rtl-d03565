// fp_add: pipelined IEEE-754 adder for non-negative operands.
//
// The inference kernel adds only probabilities (the iteration update
// y <- y + y*L), so this adder handles operands whose sign bit is clear; an
// assertion flags any other use. Double precision by default, single with
// EXP_W=8, FRAC_W=23.
//
// How it works: stage 1 orders the operands by magnitude and aligns the smaller
// significand to the larger exponent, keeping a guard bit, a round bit and a
// sticky bit for everything shifted out. Stage 2 adds the significands, shifts
// right by one on a carry, rounds to nearest with ties to even and packs.
// NaN in gives a quiet NaN, infinity gives infinity, subnormal inputs read as
// zero (this design's choice, as in fp_mul), overflow gives infinity.
//
// Interface and timing: a and b are sampled with in_valid; y and out_valid
// appear LATENCY=2 cycles later. One new operation may start every cycle.
module fp_add #(
  parameter int EXP_W  = 11,
  parameter int FRAC_W = 52,
  localparam int W     = 1 + EXP_W + FRAC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         out_valid,
  output logic [W-1:0] y
);
  localparam int MW  = FRAC_W + 1;      // significand with hidden one
  localparam int EXT = FRAC_W + 4;      // bits kept below the significand while shifting
  localparam int SW  = MW + EXT;
  localparam logic [EXP_W-1:0] EMAX = '1;

  // ---------------- stage 1: order and align ----------------
  logic [W-2:0]      mag_a, mag_b, greater, lesser;
  logic [EXP_W-1:0]  e_big, e_small;
  logic [MW-1:0]     m_big, m_small;
  logic [EXP_W-1:0]  diff;
  logic [SW-1:0]     shifted;
  logic              any_nan, any_inf;

  always_comb begin
    mag_a = a[W-2:0];
    mag_b = b[W-2:0];
    if (mag_a >= mag_b) begin
      greater = mag_a; lesser = mag_b;
    end else begin
      greater = mag_b; lesser = mag_a;
    end
    e_big   = greater[W-2 -: EXP_W];
    e_small = lesser[W-2 -: EXP_W];
    m_big   = (e_big   == '0) ? '0 : {1'b1, greater[FRAC_W-1:0]};
    m_small = (e_small == '0) ? '0 : {1'b1, lesser[FRAC_W-1:0]};
    diff    = e_big - e_small;
    if (32'(diff) >= SW) shifted = '0;
    else                 shifted = {m_small, {EXT{1'b0}}} >> diff;
    any_nan = ((a[W-2 -: EXP_W] == EMAX) && (a[FRAC_W-1:0] != '0)) ||
              ((b[W-2 -: EXP_W] == EMAX) && (b[FRAC_W-1:0] != '0));
    any_inf = (e_big == EMAX);
  end

  logic              s1_valid, s1_nan, s1_inf, s1_zero;
  logic [EXP_W-1:0]  s1_exp;
  logic [MW-1:0]     s1_mbig;
  logic [MW+1:0]     s1_msmall;   // aligned significand, guard, round
  logic              s1_sticky;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_nan    <= 1'b0;
      s1_inf    <= 1'b0;
      s1_zero   <= 1'b0;
      s1_exp    <= '0;
      s1_mbig   <= '0;
      s1_msmall <= '0;
      s1_sticky <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_nan    <= any_nan;
        s1_inf    <= any_inf;
        s1_zero   <= (e_big == '0);
        s1_exp    <= e_big;
        s1_mbig   <= m_big;
        s1_msmall <= shifted[SW-1 -: MW+2];
        s1_sticky <= |shifted[EXT-3:0];
      end
    end
  end

  // ---------------- stage 2: add, normalise, round, pack ----------------
  logic [MW+2:0]  sum;
  logic [MW-1:0]  mant;
  logic           guard, sticky, round_up;
  logic [MW:0]    mant_r;
  logic [EXP_W:0] exp_n, exp_r;
  logic [W-1:0]   y_next;

  always_comb begin
    sum = {1'b0, s1_mbig, 2'b00} + {1'b0, s1_msmall};
    if (sum[MW+2]) begin
      mant   = sum[MW+2 -: MW];
      guard  = sum[2];
      sticky = sum[1] | sum[0] | s1_sticky;
      exp_n  = {1'b0, s1_exp} + (EXP_W+1)'(1);
    end else begin
      mant   = sum[MW+1 -: MW];
      guard  = sum[1];
      sticky = sum[0] | s1_sticky;
      exp_n  = {1'b0, s1_exp};
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + (MW+1)'(round_up);
    exp_r    = mant_r[MW] ? exp_n + (EXP_W+1)'(1) : exp_n;

    if (s1_nan)
      y_next = {1'b0, EMAX, 1'b1, {(FRAC_W-1){1'b0}}};
    else if (s1_inf || exp_r >= {1'b0, EMAX})
      y_next = {1'b0, EMAX, {FRAC_W{1'b0}}};
    else if (s1_zero)
      y_next = '0;
    else if (mant_r[MW])
      y_next = {1'b0, exp_r[EXP_W-1:0], {FRAC_W{1'b0}}};
    else
      y_next = {1'b0, exp_r[EXP_W-1:0], mant_r[FRAC_W-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) y <= y_next;
    end
  end

  // Only probabilities are added: both signs must be clear.
  a_non_negative: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (!a[W-1] && !b[W-1]));

endmodule
