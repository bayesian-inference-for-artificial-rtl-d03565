// tb_bayes_accel_top: end-to-end test of the accelerator at its default
// parameters, driven like a host through the register bus, on a global memory
// that stalls and reorders responses.
//   run A  16x16 grid, one iteration, every register programmed
//   run B  only the sensor registers rewritten: run A's posteriors are the
//          priors; an argument write during the run must be ignored
//   run C  8x8 grid in other buffers, three iterations
//   run D  8x8 grid, zero iterations (every entry becomes 0)
// Every posterior is compared bit for bit with the reference. Each mechanism is
// counted and must occur: memory stall, reordered response, two or more compute
// units requesting at once, an iteration after the first, a zero-iteration run,
// an argument write ignored while busy, a run reusing the last posteriors.
module tb_bayes_accel_top;
  import bayes_pkg::*;
  import tb_lut_pkg::*;

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
  ddr_model #(.LATENCY(5), .STALL_PCT(15), .REORDER(1'b1)) mem (.clk, .rst_n,
    .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp));

  // mechanism counters
  int n_conflict = 0, n_later_pass = 0, n_zero_iter = 0, n_ignored = 0, n_reuse = 0;
  int busy_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.req_valid) > 1) n_conflict++;
    if (dut.u_csr.busy) busy_cycles++;
    // y + y*L additions happen only on passes after the first
    n_later_pass += int'(dut.u_kernel.g_cu[0].u_cu.add_done) + int'(dut.u_kernel.g_cu[1].u_cu.add_done)
                  + int'(dut.u_kernel.g_cu[2].u_cu.add_done) + int'(dut.u_kernel.g_cu[3].u_cu.add_done);
    if (mem_req_valid && mem_req_ready && mem_req.we && dut.u_csr.args.n_iter == 0) n_zero_iter++;
  end

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

  task automatic launch_and_wait(input bit poke_during_run);
    logic [31:0] st, nc_before, nc_after;
    busy_cycles = 0;
    rd(4'h1, nc_before);
    wr(4'h0, 32'h1);
    if (poke_during_run) begin
      wr(4'h1, 32'h0000_0007);
      rd(4'h1, nc_after);
      checks++;
      if (nc_after !== nc_before) begin
        failures++;
        $display("argument write while busy took effect");
      end else n_ignored++;
    end
    do rd(4'h0, st); while (st[1] !== 1'b1);
    checks++;
    if (st[0] !== 1'b0) begin failures++; $display("busy still set with done"); end
    rd(4'hE, st);
    checks++;
    if (st != 32'(busy_cycles)) begin
      failures++;
      $display("CYCLES %0d, busy for %0d", st, busy_cycles);
    end
  endtask

  task automatic check_grid(int n, logic [31:0] base, logic [63:0] e [], string name);
    for (int c = 0; c < n; c++) begin
      logic [63:0] got;
      got = mem.peek(base + c);
      checks++;
      if (got !== e[c]) begin
        failures++;
        if (failures < 10) $display("%s cell %0d: got %h expected %h", name, c, got, e[c]);
      end
    end
  endtask

  int sv [6];
  task automatic program_grid(int bits, int iters, logic [31:0] bv, logic [31:0] bd, logic [31:0] bb);
    int md, mb;
    md = (1 << (bits + 1)) - 1;
    mb = (1 << (bits + 2)) - 1;
    wr(4'h1, 32'(1 << (2 * bits)));
    wr(4'h2, 32'(md));
    wr(4'h3, 32'(mb));
    wr(4'h4, 32'(iters));
    wr(4'h5, bv);
    wr(4'h6, bd);
    wr(4'h7, bb);
    new_sensors(bits);
  endtask

  task automatic new_sensors(int bits);
    for (int s = 0; s < 6; s++) begin
      sv[s] = (s < 3) ? $urandom_range((1 << (bits + 1)) - 1) : $urandom_range((1 << (bits + 2)) - 1);
      wr(4'(8 + s), 32'(sv[s]));
    end
  endtask

  initial begin
    logic [63:0] e [];
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- run A: 16x16, one iteration
    n = 256;
    e = new[n];
    for (int c = 0; c < n; c++) mem.poke(32'h0000_1000 + c, prior_value(c));
    program_grid(4, 1, 32'h0000_1000, 32'h0010_0000, 32'h0100_0000);
    for (int c = 0; c < n; c++)
      e[c] = ref_posterior(c, prior_value(c), 1, 32'h0010_0000, 32'h0100_0000, 31, 63, sv);
    launch_and_wait(0);
    check_grid(n, 32'h1000, e, "run A");

    // ---- run B: new sensor values only, posteriors of A become priors
    new_sensors(4);
    for (int c = 0; c < n; c++)
      e[c] = ref_posterior(c, e[c], 1, 32'h0010_0000, 32'h0100_0000, 31, 63, sv);
    launch_and_wait(1);
    check_grid(n, 32'h1000, e, "run B");
    n_reuse++;

    // ---- run C: 8x8, three iterations
    n = 64;
    e = new[n];
    for (int c = 0; c < n; c++) mem.poke(32'h0000_8000 + c, prior_value(c + 777));
    program_grid(3, 3, 32'h0000_8000, 32'h0200_0000, 32'h0300_0000);
    for (int c = 0; c < n; c++)
      e[c] = ref_posterior(c, prior_value(c + 777), 3, 32'h0200_0000, 32'h0300_0000, 15, 31, sv);
    launch_and_wait(0);
    check_grid(n, 32'h8000, e, "run C");

    // ---- run D: zero iterations
    wr(4'h4, 32'd0);
    for (int c = 0; c < n; c++) e[c] = 64'd0;
    launch_and_wait(0);
    check_grid(n, 32'h8000, e, "run D");

    $display("mechanisms: stalls=%0d reorders=%0d conflicts=%0d later_passes=%0d zero_iter=%0d ignored_writes=%0d reuse=%0d",
             mem.stalls, mem.reorders, n_conflict, n_later_pass, n_zero_iter, n_ignored, n_reuse);
    if (mem.stalls == 0)   begin failures++; $display("no memory stall"); end
    if (mem.reorders == 0) begin failures++; $display("no reordered response"); end
    if (n_conflict == 0)   begin failures++; $display("no arbitration conflict"); end
    if (n_later_pass != 2 * 64) begin failures++; $display("%0d later passes, expected 128", n_later_pass); end
    if (n_zero_iter == 0)  begin failures++; $display("no zero-iteration run"); end
    if (n_ignored == 0)    begin failures++; $display("no ignored write"); end
    if (n_reuse == 0)      begin failures++; $display("no posterior reuse"); end
    checks += 7;
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
