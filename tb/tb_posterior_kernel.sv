// tb_posterior_kernel: the kernel's four compute units behind the global
// interconnect, on a memory that stalls and reorders. Runs whole grids (8x8 and
// 16x16, one and two iterations, and an empty grid) and checks every cell's
// posterior against the reference, that every cell is written exactly once,
// that every compute unit receives work, and the busy/done protocol.
module tb_posterior_kernel;
  import bayes_pkg::*;
  import tb_lut_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  kernel_args_t args;
  logic start = 0, busy, done;
  logic    [N-1:0] req_valid, req_ready, rsp_valid;
  cu_req_t [N-1:0] req;
  cu_rsp_t [N-1:0] rsp;
  logic     mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;

  posterior_kernel #(.NUM_CU(N)) dut (.clk, .rst_n, .args, .start, .busy, .done,
    .req_valid, .req, .req_ready, .rsp_valid, .rsp);
  global_interconnect #(.NUM_CU(N)) gic (.clk, .rst_n,
    .cu_req_valid(req_valid), .cu_req(req), .cu_req_ready(req_ready),
    .cu_rsp_valid(rsp_valid), .cu_rsp(rsp),
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp);
  ddr_model #(.LATENCY(3), .STALL_PCT(20), .REORDER(1'b1)) mem (.clk, .rst_n,
    .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp));

  int writes_to [int];
  int cells_per_cu [N];
  int done_pulses = 0;
  always @(posedge clk) if (rst_n) begin
    if (mem_req_valid && mem_req_ready && mem_req.we) begin
      int a;
      a = int'(mem_req.addr);
      writes_to[a] = writes_to.exists(a) ? writes_to[a] + 1 : 1;
    end
    for (int i = 0; i < N; i++)
      if (req_valid[i] && req_ready[i] && req[i].we) cells_per_cu[i]++;
    if (done) done_pulses++;
  end

  task automatic run_grid(int bits, int iters);
    int md, mb, n, sv [6];
    logic [63:0] exp_v [];
    md = (1 << (bits + 1)) - 1;
    mb = (1 << (bits + 2)) - 1;
    n  = (bits == 0) ? 0 : 1 << (2 * bits);
    args.n_cells   = 32'(n);
    args.max_dist  = 16'(md);
    args.max_bear  = 16'(mb);
    args.n_iter    = 32'(iters);
    args.base_vec  = 32'h0000_2000;
    args.base_dist = 32'h0020_0000;
    args.base_bear = 32'h0200_0000;
    for (int s = 0; s < 6; s++) begin
      sv[s] = (s < 3) ? $urandom_range(md) : $urandom_range(mb);
      args.sensor[s] = 16'(sv[s]);
    end
    exp_v = new[n];
    for (int c = 0; c < n; c++) begin
      logic [63:0] pr;
      pr = prior_value(c + bits * 1000);
      mem.poke(32'h2000 + c, pr);
      exp_v[c] = ref_posterior(c, pr, iters, 32'h0020_0000, 32'h0200_0000, md, mb, sv);
    end
    writes_to.delete();
    done_pulses = 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    checks++;
    if (!busy && n > 0) begin
      failures++;
      $display("busy not raised");
    end
    while (!done) @(posedge clk);
    @(posedge clk);
    checks++;
    if (busy || done_pulses != 1) begin
      failures++;
      $display("done/busy protocol wrong");
    end
    for (int c = 0; c < n; c++) begin
      logic [63:0] got;
      got = mem.peek(32'h2000 + c);
      checks++;
      if (got !== exp_v[c] || !writes_to.exists(32'h2000 + c) || writes_to[32'h2000 + c] != 1) begin
        failures++;
        $display("bits=%0d cell %0d: got %h expected %h", bits, c, got, exp_v[c]);
      end
    end
    checks++;
    if (writes_to.size() != n) begin
      failures++;
      $display("%0d words written, expected %0d", writes_to.size(), n);
    end
  endtask

  initial begin
    args = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_grid(3, 1);
    run_grid(4, 1);
    run_grid(3, 2);
    run_grid(0, 1);     // empty grid
    for (int i = 0; i < N; i++) begin
      checks++;
      if (cells_per_cu[i] == 0) begin
        failures++;
        $display("compute unit %0d never got a cell", i);
      end
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
