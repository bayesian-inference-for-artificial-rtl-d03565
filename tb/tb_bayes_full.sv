// tb_bayes_full: one complete inference on the largest grid evaluated, 128x128
// cells (maxDist = 255, maxBear = 511, double precision), with the accelerator
// at its default parameters. The likelihood tables (about 37.7 M words) are
// generated from their addresses by the memory model, the 16384 priors are
// stored. Every posterior is compared with the reference; the run's cycle
// count is printed and checked against the CYCLES register.
module tb_bayes_full;
  import bayes_pkg::*;
  import tb_lut_pkg::*;

  localparam int BITS = 7;
  localparam int NC   = 1 << (2 * BITS);
  localparam int MD   = (1 << (BITS + 1)) - 1;
  localparam int MB   = (1 << (BITS + 2)) - 1;
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
  ddr_model #(.LATENCY(8), .STALL_PCT(5)) mem (.clk, .rst_n,
    .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp));

  int busy_cycles = 0;
  always @(posedge clk) if (rst_n && dut.u_csr.busy) busy_cycles++;

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

  initial begin
    int sv [6];
    logic [31:0] st;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) mem.poke(BV + c, prior_value(c));
    wr(4'h1, NC); wr(4'h2, MD); wr(4'h3, MB); wr(4'h4, 1);
    wr(4'h5, BV); wr(4'h6, BD); wr(4'h7, BB);
    for (int s = 0; s < 6; s++) begin
      sv[s] = (s < 3) ? $urandom_range(MD) : $urandom_range(MB);
      wr(4'(8 + s), 32'(sv[s]));
    end
    wr(4'h0, 1);
    do rd(4'h0, st); while (st[1] !== 1'b1);
    for (int c = 0; c < NC; c++) begin
      logic [63:0] e, got;
      e = ref_posterior(c, prior_value(c), 1, BD, BB, MD, MB, sv);
      got = mem.peek(BV + c);
      checks++;
      if (got !== e) begin
        failures++;
        if (failures < 10) $display("cell %0d: got %h expected %h", c, got, e);
      end
    end
    rd(4'hE, st);
    checks++;
    if (st != 32'(busy_cycles)) begin failures++; $display("CYCLES mismatch"); end
    $display("128x128 grid, 1 iteration: %0d cycles, %0d loads, %0d stores", st, mem.reads, mem.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
