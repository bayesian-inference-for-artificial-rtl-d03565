// tb_lut_pkg: test data and reference model for the inference testbenches.
//
// Table contents are not stored: lut_value(addr) derives a double in [2^-8, 1)
// from a hash of the word address, so any grid size can be simulated without a
// table file, and a wrong address almost surely gives a wrong value. The
// reference functions redo the kernel's arithmetic with the simulator's own
// IEEE double arithmetic, independently of the RTL.
package tb_lut_pkg;

  function automatic logic [63:0] mix(logic [63:0] x);
    logic [63:0] h;
    h = x * 64'h9E3779B97F4A7C15;
    h = h ^ (h >> 29);
    h = h * 64'hBF58476D1CE4E5B9;
    h = h ^ (h >> 32);
    return h;
  endfunction

  // Likelihood-table word: exponent 1022-k (k = 0..7), hashed fraction.
  function automatic logic [63:0] lut_value(logic [31:0] addr);
    logic [63:0] h;
    h = mix({32'h0, addr});
    return {1'b0, 11'(1022 - int'(h[2:0])), h[63:12]};
  endfunction

  // Prior of a cell, from a different hash.
  function automatic logic [63:0] prior_value(int unsigned cidx);
    logic [63:0] h;
    h = mix({32'h5a5a_0000, cidx} ^ 64'h1234_5678_9abc_def0);
    return {1'b0, 11'(1020 - int'(h[2:0])), h[63:12]};
  endfunction

  // Table index of Algorithm "Bayesian Inference Kernel", lines 7 and 10.
  function automatic logic [31:0] table_addr(logic [31:0] base, int unsigned cidx,
                                             int unsigned s, int unsigned maxv,
                                             int unsigned value);
    return base + 32'(cidx * 3 * (maxv + 1) + s * (maxv + 1) + value);
  endfunction

  // Unnormalised posterior of one cell after n_iter passes.
  function automatic logic [63:0] ref_posterior(
      int unsigned cidx, logic [63:0] prior, int unsigned n_iter,
      logic [31:0] base_dist, logic [31:0] base_bear,
      int unsigned max_dist, int unsigned max_bear, int unsigned sens [6]);
    real l, y;
    if (n_iter == 0) return 64'd0;
    l = 1.0;
    for (int s = 0; s < 3; s++)
      l = l * $bitstoreal(lut_value(table_addr(base_dist, cidx, s, max_dist, sens[s])));
    for (int s = 3; s < 6; s++)
      l = l * $bitstoreal(lut_value(table_addr(base_bear, cidx, s - 3, max_bear, sens[s])));
    y = $bitstoreal(prior) * l;
    for (int unsigned c = 1; c < n_iter; c++) y = y + y * l;
    return $realtobits(y);
  endfunction

endpackage
