// fp_mul: pipelined IEEE-754 floating-point multiplier.
//
// This is the multiplier of the inference kernel: every likelihood fetched from
// the look-up tables is multiplied into the running product, and the product
// into the cell's prior. The format is double precision by default (1 sign,
// 11 exponent, 52 fraction bits); EXP_W=8, FRAC_W=23 gives single precision.
//
// How it works: stage 1 unpacks both operands, multiplies the two (FRAC_W+1)-bit
// significands and adds the exponents; stage 2 normalises the product (it lies in
// [1,4)), rounds to nearest with ties to even, and packs the result.
// Special values: NaN in, or infinity times zero, gives a quiet NaN; infinity
// gives infinity; zero gives a signed zero. Subnormal inputs are read as zero and
// results below the normal range are flushed to zero (this design's choice; the
// probabilities the kernel multiplies stay far above that range). Overflow gives
// infinity.
//
// Interface and timing: a and b are sampled with in_valid; y and out_valid
// appear LATENCY=2 cycles later. One new operation may start every cycle.
module fp_mul #(
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
  localparam int MW   = FRAC_W + 1;           // significand with hidden one
  localparam int PW   = 2 * MW;               // significand product
  localparam int EW   = EXP_W + 2;            // signed exponent workspace
  localparam logic [EXP_W-1:0] EMAX = '1;
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;

  // ---------------- stage 1: unpack and multiply ----------------
  logic            s1_valid, s1_sign, s1_nan, s1_inf, s1_zero;
  logic [PW-1:0]   s1_prod;
  logic signed [EW-1:0] s1_exp;

  logic [EXP_W-1:0] ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    ea = a[W-2 -: EXP_W];
    eb = b[W-2 -: EXP_W];
    fa = a[FRAC_W-1:0];
    fb = b[FRAC_W-1:0];
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == EMAX) && (fa == '0);
    b_inf  = (eb == EMAX) && (fb == '0);
    a_nan  = (ea == EMAX) && (fa != '0);
    b_nan  = (eb == EMAX) && (fb != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_sign  <= 1'b0;
      s1_nan   <= 1'b0;
      s1_inf   <= 1'b0;
      s1_zero  <= 1'b0;
      s1_prod  <= '0;
      s1_exp   <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_sign <= a[W-1] ^ b[W-1];
        s1_nan  <= a_nan | b_nan | (a_inf & b_zero) | (b_inf & a_zero);
        s1_inf  <= a_inf | b_inf;
        s1_zero <= a_zero | b_zero;
        s1_prod <= PW'({1'b1, fa}) * PW'({1'b1, fb});
        s1_exp  <= EW'(ea) + EW'(eb) - EW'(BIAS);
      end
    end
  end

  // ---------------- stage 2: normalise, round, pack ----------------
  logic [MW-1:0]   mant;
  logic            guard, sticky, round_up;
  logic [MW:0]     mant_r;
  logic signed [EW-1:0] exp_n, exp_r;
  logic [W-1:0]    y_next;

  always_comb begin
    if (s1_prod[PW-1]) begin
      mant   = s1_prod[PW-1 -: MW];
      guard  = s1_prod[FRAC_W];
      sticky = |s1_prod[FRAC_W-1:0];
      exp_n  = s1_exp + EW'(1);
    end else begin
      mant   = s1_prod[PW-2 -: MW];
      guard  = s1_prod[FRAC_W-1];
      sticky = |s1_prod[FRAC_W-2:0];
      exp_n  = s1_exp;
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + (MW+1)'(round_up);
    exp_r    = mant_r[MW] ? exp_n + EW'(1) : exp_n;

    if (s1_nan)
      y_next = {1'b0, EMAX, 1'b1, {(FRAC_W-1){1'b0}}};
    else if (s1_inf)
      y_next = {s1_sign, EMAX, {FRAC_W{1'b0}}};
    else if (s1_zero)
      y_next = {s1_sign, {(W-1){1'b0}}};
    else if (exp_r >= EW'(EMAX))
      y_next = {s1_sign, EMAX, {FRAC_W{1'b0}}};
    else if (exp_r <= EW'(0))
      y_next = {s1_sign, {(W-1){1'b0}}};
    else if (mant_r[MW])
      y_next = {s1_sign, exp_r[EXP_W-1:0], {FRAC_W{1'b0}}};
    else
      y_next = {s1_sign, exp_r[EXP_W-1:0], mant_r[FRAC_W-1:0]};
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

endmodule
