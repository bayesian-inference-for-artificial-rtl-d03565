// tb_bayes_single: the accelerator built for single precision (EXP_W = 8,
// FRAC_W = 23), running 16x16 grids with 1, 10 and 100 passes and 32x32 grids
// with 1, 10, 100 and 1000 passes. A single value sits in the low 32 bits of
// a memory word. The testbench writes single-precision priors and, for the
// sensor readings of each run, the six table words every cell reads; any other
// address returns a double pattern and would almost surely show as a wrong
// result.
//
// The reference performs each operation in IEEE double and rounds the result
// to single (nearest, ties to even). A product of two singles is exact in
// double, and for a sum the double rounding cannot change the result because
// double carries more than twice single's precision plus two bits.
module tb_bayes_single;
  import bayes_pkg::*;
  import tb_lut_pkg::*;

  localparam logic [31:0] BV = 32'h0000_0000, BD = 32'h0100_0000, BB = 32'h0400_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        csr_wr_en = 0;
  logic [3:0]  csr_addr = '0;
  logic [31:0] csr_wdata = '0, csr_rdata;
  logic        irq;
  logic        mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t    mem_req;
  mem_rsp_t    mem_rsp;

  bayes_accel_top #(.EXP_W(8), .FRAC_W(23)) dut (.*);
  ddr_model #(.LATENCY(6), .STALL_PCT(10), .REORDER(1'b1)) mem (.clk, .rst_n,
    .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp));

  // Round a (normal-range) double to single, nearest even.
  function automatic logic [31:0] to_single(real r);
    logic [63:0] b;
    logic [23:0] m;
    logic [7:0]  e;
    logic        up;
    b  = $realtobits(r);
    e  = 8'(int'(b[62:52]) - 1023 + 127);
    m  = {1'b1, b[51:29]};
    up = b[28] & ((|b[27:0]) | b[29]);
    {e, m} = {e, m} + 32'(up);
    if (m == 24'd0) m = 24'h800000;
    return {b[63], e, m[22:0]};
  endfunction

  function automatic real from_single(logic [31:0] f);
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  // Single-precision table word and prior, made from the double test data.
  function automatic logic [31:0] sp_lut(logic [31:0] a);
    return to_single($bitstoreal(lut_value(a)));
  endfunction

  function automatic logic [31:0] sp_prior(int unsigned c);
    return to_single($bitstoreal(prior_value(c)));
  endfunction

  function automatic logic [31:0] sp_ref(int unsigned c, int unsigned n_iter,
                                         int unsigned md, int unsigned mb, int sv [6]);
    real l, y;
    if (n_iter == 0) return 32'd0;
    l = 1.0;
    for (int s = 0; s < 6; s++) begin
      logic [31:0] a;
      a = (s < 3) ? table_addr(BD, c, s, md, sv[s]) : table_addr(BB, c, s - 3, mb, sv[s]);
      l = from_single(to_single(l * from_single(sp_lut(a))));
    end
    y = from_single(to_single(from_single(sp_prior(c)) * l));
    for (int unsigned p = 1; p < n_iter; p++)
      y = from_single(to_single(y + from_single(to_single(y * l))));
    return to_single(y);
  endfunction

  task automatic wr(logic [3:0] a, logic [31:0] d);
    @(negedge clk);
    csr_addr = a; csr_wdata = d; csr_wr_en = 1;
    @(negedge clk);
    csr_wr_en = 0;
  endtask

  task automatic rd(logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    csr_addr = a;
    #1 d = csr_rdata;
  endtask

  task automatic run(int bits, int iters);
    int n, md, mb, sv [6];
    logic [31:0] st;
    n  = 1 << (2 * bits);
    md = (1 << (bits + 1)) - 1;
    mb = (1 << (bits + 2)) - 1;
    for (int s = 0; s < 6; s++) sv[s] = (s < 3) ? $urandom_range(md) : $urandom_range(mb);
    for (int c = 0; c < n; c++) begin
      mem.poke(BV + c, {32'h0, sp_prior(c)});
      for (int s = 0; s < 6; s++) begin
        logic [31:0] a;
        a = (s < 3) ? table_addr(BD, c, s, md, sv[s]) : table_addr(BB, c, s - 3, mb, sv[s]);
        mem.poke(a, {32'h0, sp_lut(a)});
      end
    end
    wr(4'h1, n); wr(4'h2, md); wr(4'h3, mb); wr(4'h4, iters);
    wr(4'h5, BV); wr(4'h6, BD); wr(4'h7, BB);
    for (int s = 0; s < 6; s++) wr(4'(8 + s), 32'(sv[s]));
    wr(4'h0, 1);
    do rd(4'h0, st); while (st[1] !== 1'b1);
    for (int c = 0; c < n; c++) begin
      logic [63:0] got;
      logic [31:0] e;
      e = sp_ref(c, iters, md, mb, sv);
      got = mem.peek(BV + c);
      checks++;
      if (got !== {32'h0, e}) begin
        failures++;
        if (failures < 10) $display("%0dx%0d, %0d passes, cell %0d: got %h expected %h",
                                    1 << bits, 1 << bits, iters, c, got, e);
      end
    end
    rd(4'hE, st);
    $display("  %4dx%-4d %4d passes (single): %8d cycles", 1 << bits, 1 << bits, iters, st);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(4, 1); run(4, 10); run(4, 100);
    run(5, 1); run(5, 10); run(5, 100); run(5, 1000);
    checks++;
    if (mem.stalls == 0 || mem.reorders == 0) begin
      failures++;
      $display("memory stalls %0d, reorders %0d: both should occur", mem.stalls, mem.reorders);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
