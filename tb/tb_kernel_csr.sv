// tb_kernel_csr: writes and reads back every argument register, launches a run
// and checks the one-cycle start pulse, the busy and done status bits, the
// cycle counter, and that argument writes are ignored while the kernel is busy.
module tb_kernel_csr;
  import bayes_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr_en = 0;
  logic [3:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  kernel_args_t args;
  logic start, busy = 0, done = 0;

  kernel_csr dut (.*);

  // the bus is driven at the falling edge and sampled at the rising edge
  task automatic wr(logic [3:0] a, logic [31:0] d);
    @(negedge clk);
    addr = a; wdata = d; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic expect_rd(logic [3:0] a, logic [31:0] e, string what);
    @(negedge clk);
    addr = a;
    #1;
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("%s: read %h expected %h", what, rdata, e);
    end
  endtask

  logic [31:0] vals [16];
  int starts = 0;
  always @(posedge clk) if (rst_n && start) starts++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 1; a <= 13; a++) begin
      vals[a] = $urandom;
      if (a == 2 || a == 3 || a >= 8) vals[a] = vals[a] & 32'hffff;
      wr(4'(a), vals[a]);
    end
    for (int a = 1; a <= 13; a++) expect_rd(4'(a), vals[a], "register");
    checks++;
    if (args.n_cells !== vals[1] || args.max_dist !== 16'(vals[2]) || args.max_bear !== 16'(vals[3]) ||
        args.n_iter !== vals[4] || args.base_vec !== vals[5] || args.base_dist !== vals[6] ||
        args.base_bear !== vals[7] || args.sensor[0] !== 16'(vals[8]) || args.sensor[5] !== 16'(vals[13])) begin
      failures++;
      $display("argument outputs do not match the registers");
    end
    // launch
    @(negedge clk);
    addr = 4'h0; wdata = 32'h1; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
    checks++;
    if (start !== 1'b1) begin failures++; $display("no start pulse"); end
    busy = 1;
    @(negedge clk);
    checks++;
    if (start !== 1'b0) begin failures++; $display("start longer than one cycle"); end
    // writes while busy are ignored, and a second start is refused
    wr(4'h1, 32'hdead_beef);
    wr(4'h8, 32'h0000_0042);
    wr(4'h0, 32'h1);
    expect_rd(4'h1, vals[1], "N_CELLS while busy");
    expect_rd(4'h8, vals[8], "SENSOR0 while busy");
    expect_rd(4'h0, 32'h1, "CTRL while busy");
    repeat (10) @(negedge clk);
    busy = 0; done = 1;
    @(negedge clk);
    done = 0;
    expect_rd(4'h0, 32'h2, "CTRL after done");
    expect_rd(4'hE, 32'd20, "CYCLES");   // busy held for 20 rising edges
    checks++;
    if (starts != 1) begin failures++; $display("%0d start pulses, expected 1", starts); end
    // new sensor value then second launch clears done
    wr(4'h9, 32'h0000_0033);
    expect_rd(4'h9, 32'h33, "SENSOR1");
    wr(4'h0, 32'h1);
    expect_rd(4'h0, 32'h0, "CTRL after second start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
