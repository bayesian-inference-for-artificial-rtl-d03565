// tb_fp_mul: checks fp_mul (double precision, and a single-precision instance)
// against the simulator's IEEE arithmetic, bit for bit, with round to nearest
// even. Covers random normal operands, rounding ties and carries, overflow to
// infinity, flush of tiny results, zeros, infinities and NaNs, and the 2-cycle
// latency with one operation per cycle.
module tb_fp_mul;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        in_valid = 0, out_valid;
  logic [63:0] a = '0, b = '0, y;
  fp_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  logic        s_valid = 0, s_out_valid;
  logic [31:0] sa = '0, sb = '0, sy;
  fp_mul #(.EXP_W(8), .FRAC_W(23)) dut_s (.clk, .rst_n, .in_valid(s_valid), .a(sa), .b(sb),
                                          .out_valid(s_out_valid), .y(sy));

  // expected values travel along a 2-deep queue
  logic [63:0] exp_q [$];
  logic [31:0] sexp_q [$];
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [63:0] ref_mul(logic [63:0] x, logic [63:0] z);
    logic [63:0] r;
    logic [10:0] ex, ez;
    ex = x[62:52]; ez = z[62:52];
    // subnormal inputs count as zero
    if (ex == 0) x = {x[63], 63'd0};
    if (ez == 0) z = {z[63], 63'd0};
    r = $realtobits($bitstoreal(x) * $bitstoreal(z));
    if (r[62:52] == 11'h7ff && r[51:0] != 0) return 64'h7ff8_0000_0000_0000;
    if (r[62:52] == 0) return {r[63], 63'd0};   // flush to zero
    return r;
  endfunction

  function automatic logic [63:0] rnd_normal();
    logic [10:0] e;
    e = 11'(1023 - 40 + int'($urandom_range(80)));
    return {1'($urandom), e, $urandom, 20'($urandom)};
  endfunction

  task automatic issue(logic [63:0] x, logic [63:0] z);
    a <= x; b <= z; in_valid <= 1;
    exp_q.push_back(ref_mul(x, z));
    @(posedge clk);
    in_valid <= 0;
  endtask

  int unsigned t_q [$];
  always @(posedge clk) begin
    if (rst_n && in_valid) t_q.push_back(cyc);
    if (rst_n && out_valid) begin
      int unsigned t;
      t = t_q.pop_front();
      checks++;
      if (cyc - t != 2) begin
        failures++;
        $display("MUL latency %0d, expected 2", cyc - t);
      end
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
    e  = exp_q.pop_front();
    checks++;
    if (y !== e) begin
      failures++;
      $display("MUL mismatch: got %h expected %h", y, e);
    end
  end

  always @(posedge clk) if (rst_n && s_out_valid) begin
    logic [31:0] e;
    e = sexp_q.pop_front();
    checks++;
    if (sy !== e) begin
      failures++;
      $display("single MUL mismatch: got %h expected %h", sy, e);
    end
  end

  // single-precision reference: the exact product fits a double; rounding it
  // once to single with ties to even is done here by hand.
  function automatic logic [31:0] ref_mul_s(logic [31:0] x, logic [31:0] z);
    logic [63:0] d;
    logic [52:0] m;
    logic [23:0] keep;
    logic        g, st;
    logic [24:0] r;
    int e;
    // convert the two singles to doubles exactly
    d = $realtobits(s2d(x) * s2d(z));
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    keep = m[52:29];
    g = m[28];
    st = |m[27:0];
    r = {1'b0, keep} + 25'(g & (st | keep[0]));
    if (r[24]) begin e++; r = r >> 1; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), r[22:0]};
  endfunction

  function automatic real s2d(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 0) return 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // special values
    issue(64'h3ff0_0000_0000_0000, 64'h4000_0000_0000_0000);      // 1*2
    issue(64'h0000_0000_0000_0000, 64'h4000_0000_0000_0000);      // 0*2
    issue(64'h7ff0_0000_0000_0000, 64'h3fe0_0000_0000_0000);      // inf*0.5
    issue(64'h7ff0_0000_0000_0000, 64'h0000_0000_0000_0000);      // inf*0 = NaN
    issue(64'h7ff8_0000_0000_0001, 64'h3ff0_0000_0000_0000);      // NaN
    issue(64'h7fe0_0000_0000_0000, 64'h7fe0_0000_0000_0000);      // overflow
    issue(64'h0010_0000_0000_0000, 64'h3fe0_0000_0000_0000);      // tiny -> flush
    issue(64'h3ff0_0000_0000_0001, 64'h3ff0_0000_0000_0001);      // 1+2^-52 squared
    issue(64'h3fff_ffff_ffff_ffff, 64'h3fff_ffff_ffff_ffff);      // carry on rounding
    issue(64'hbff8_0000_0000_0000, 64'h3ff8_0000_0000_0000);      // negative
    // random, back to back
    for (int i = 0; i < 3000; i++) begin : g_random
      logic [63:0] x, z;
      x = rnd_normal();
      z = rnd_normal();
      a <= x; b <= z; in_valid <= 1;
      exp_q.push_back(ref_mul(x, z));
      @(posedge clk);
    end
    in_valid <= 0;
    // single precision
    for (int i = 0; i < 2000; i++) begin : g_single
      logic [31:0] x, z;
      x = {1'b0, 8'(127 - 20 + int'($urandom_range(40))), 23'($urandom)};
      z = {1'b0, 8'(127 - 20 + int'($urandom_range(40))), 23'($urandom)};
      if (i < 4) z = 32'h3f80_0001;
      sa <= x; sb <= z; s_valid <= 1;
      sexp_q.push_back(ref_mul_s(x, z));
      @(posedge clk);
    end
    s_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || sexp_q.size() != 0) begin
      failures++;
      $display("results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
