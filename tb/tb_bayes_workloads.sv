// tb_bayes_workloads: the evaluated workloads, grid size by number of passes,
// on the accelerator at its default parameters (4 compute units, double
// precision): 16x16, 32x32, 64x64 and 128x128 grids with 1 and 10 passes, and
// 100 and 1000 passes on the smaller grids (the longest combinations are left
// out to keep the simulation short). The memory answers after 8 cycles and never
// stalls. Every posterior is checked against the reference, and the run's cycle
// count against two lower bounds: the compute units' own time per cell, and one
// memory request per cycle. The cycle counts are printed as a table.
module tb_bayes_workloads;
  import bayes_pkg::*;
  import tb_lut_pkg::*;

  localparam int R = 8;
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

  bayes_accel_top dut (.*);
  ddr_model #(.LATENCY(R)) mem (.clk, .rst_n,
    .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp));

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
    longint lb_cu, lb_mem;
    logic [31:0] st;
    n  = 1 << (2 * bits);
    md = (1 << (bits + 1)) - 1;
    mb = (1 << (bits + 2)) - 1;
    for (int c = 0; c < n; c++) mem.poke(BV + c, prior_value(c));
    wr(4'h1, n); wr(4'h2, md); wr(4'h3, mb); wr(4'h4, iters);
    wr(4'h5, BV); wr(4'h6, BD); wr(4'h7, BB);
    for (int s = 0; s < 6; s++) begin
      sv[s] = (s < 3) ? $urandom_range(md) : $urandom_range(mb);
      wr(4'(8 + s), 32'(sv[s]));
    end
    wr(4'h0, 1);
    do rd(4'h0, st); while (st[1] !== 1'b1);
    for (int c = 0; c < n; c++) begin
      logic [63:0] e, got;
      e = ref_posterior(c, prior_value(c), iters, BD, BB, md, mb, sv);
      got = mem.peek(BV + c);
      checks++;
      if (got !== e) begin
        failures++;
        if (failures < 10) $display("%0dx%0d, %0d passes, cell %0d: got %h expected %h",
                                    1 << bits, 1 << bits, iters, c, got, e);
      end
    end
    rd(4'hE, st);
    lb_cu  = longint'((n + 3) / 4) * (32 + 2 * R + longint'(iters - 1) * (29 + R));
    lb_mem = longint'(n) * (8 + 6 * longint'(iters - 1));
    checks++;
    if (longint'(st) < lb_cu || longint'(st) < lb_mem) begin
      failures++;
      $display("cycle count %0d below a lower bound (%0d, %0d)", st, lb_cu, lb_mem);
    end
    $display("  %4dx%-4d %5d passes: %9d cycles, %6.2f cycles per cell and pass",
             1 << bits, 1 << bits, iters, st, real'(st) / (real'(n) * iters));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    $display("grid        passes    cycles");
    for (int b = 4; b <= 7; b++) run(b, 1);
    for (int b = 4; b <= 7; b++) run(b, 10);
    for (int b = 4; b <= 6; b++) run(b, 100);
    run(4, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
