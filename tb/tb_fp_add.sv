// tb_fp_add: checks fp_add against the simulator's IEEE double addition, bit
// for bit, for non-negative operands: random operands with exponent gaps from 0
// to beyond the significand width, rounding ties, carry into the next binade,
// overflow, zeros, infinities and NaNs, and the 2-cycle latency.
module tb_fp_add;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  logic        in_valid = 0, out_valid;
  logic [63:0] a = '0, b = '0, y;
  fp_add dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  logic [63:0] exp_q [$];
  int unsigned t_q [$];

  function automatic logic [63:0] ref_add(logic [63:0] x, logic [63:0] z);
    logic [63:0] r;
    if (x[62:52] == 0) x = 64'd0;
    if (z[62:52] == 0) z = 64'd0;
    r = $realtobits($bitstoreal(x) + $bitstoreal(z));
    if (r[62:52] == 11'h7ff && r[51:0] != 0) return 64'h7ff8_0000_0000_0000;
    return r;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) t_q.push_back(cyc);
    if (rst_n && out_valid) begin
      logic [63:0] e;
      int unsigned t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      checks += 2;
      if (y !== e) begin
        failures++;
        $display("ADD mismatch: got %h expected %h", y, e);
      end
      if (cyc - t != 2) begin
        failures++;
        $display("ADD latency %0d, expected 2", cyc - t);
      end
    end
  end

  logic [63:0] sx [12] = '{
    64'h3ff0_0000_0000_0000, 64'h3ff0_0000_0000_0000, 64'h3ff0_0000_0000_0001,
    64'h3fff_ffff_ffff_ffff, 64'h7fef_ffff_ffff_ffff, 64'h0000_0000_0000_0000,
    64'h7ff0_0000_0000_0000, 64'h7ff8_0000_0000_0001, 64'h3ff0_0000_0000_0000,
    64'h3ff0_0000_0000_0003, 64'h0000_0000_0000_0000, 64'h4340_0000_0000_0000};
  logic [63:0] sz [12] = '{
    64'h3ca0_0000_0000_0000, 64'h3ca8_0000_0000_0000, 64'h3ca0_0000_0000_0000,
    64'h3cb0_0000_0000_0000, 64'h7fef_ffff_ffff_ffff, 64'h3ff8_0000_0000_0000,
    64'h3ff0_0000_0000_0000, 64'h3ff0_0000_0000_0000, 64'h3ff0_0000_0000_0000,
    64'h3ff0_0000_0000_0001, 64'h0000_0000_0000_0000, 64'h3ff0_0000_0000_0000};

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 12; i++) begin
      a <= sx[i]; b <= sz[i]; in_valid <= 1;
      exp_q.push_back(ref_add(sx[i], sz[i]));
      @(posedge clk);
    end
    for (int i = 0; i < 4000; i++) begin : g_random
      logic [63:0] x, z;
      logic [10:0] ex;
      ex = 11'(900 + int'($urandom_range(200)));
      x = {1'b0, ex, $urandom, 20'($urandom)};
      z = {1'b0, 11'(int'(ex) - int'($urandom_range((i % 2 != 0) ? 60 : 3))), $urandom, 20'($urandom)};
      if (i % 7 == 0) z[20:0] = '0;   // short fractions give exact ties
      if (i % 3 == 0) {x, z} = {z, x};
      a <= x; b <= z; in_valid <= 1;
      exp_q.push_back(ref_add(x, z));
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
