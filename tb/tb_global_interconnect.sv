// tb_global_interconnect: four request sources with random traffic against a
// memory that stalls and reorders. Checks that every request reaches memory
// exactly once and unchanged, that every response reaches the unit that asked
// with its own tag and data, and that round robin never lets a waiting unit be
// passed over more than NUM_CU-1 times.
module tb_global_interconnect;
  import bayes_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic    [N-1:0] cu_req_valid = '0, cu_req_ready, cu_rsp_valid;
  cu_req_t [N-1:0] cu_req = '0;
  cu_rsp_t [N-1:0] cu_rsp;
  logic     mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;

  global_interconnect #(.NUM_CU(N)) dut (.*);
  ddr_model #(.LATENCY(3), .STALL_PCT(25), .REORDER(1'b1)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp));

  // each unit: random loads with address = unit*2^20 + sequence, tag = seq % 7
  int issued [N], answered [N], passed [N], max_passed = 0;
  logic [ADDR_W-1:0] outstanding [N][$];

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      // skipped while waiting?
      if (cu_req_valid[i] && !cu_req_ready[i] && mem_req_valid && mem_req_ready) begin
        passed[i]++;
        if (passed[i] > max_passed) max_passed = passed[i];
      end
      if (cu_req_valid[i] && cu_req_ready[i]) begin
        passed[i] = 0;
        checks++;
        if (mem_req.addr !== cu_req[i].addr || mem_req.tag !== {CUID_W'(i), cu_req[i].tag}) begin
          failures++;
          $display("unit %0d request altered", i);
        end
        outstanding[i].push_back(cu_req[i].addr);
        issued[i]++;
        cu_req_valid[i] <= 1'b0;
      end
      if (cu_rsp_valid[i]) begin
        int hit;
        hit = -1;
        foreach (outstanding[i][k])
          if (hit < 0 && 3'(outstanding[i][k] % 7) == cu_rsp[i].tag &&
              tb_lut_pkg::lut_value(outstanding[i][k]) == cu_rsp[i].rdata) hit = k;
        checks++;
        if (hit < 0) begin
          failures++;
          $display("unit %0d got a response it did not ask for", i);
        end else outstanding[i].delete(hit);
        answered[i]++;
      end
      if ((!cu_req_valid[i] || cu_req_ready[i]) && issued[i] < 300 && $urandom_range(3) != 0) begin
        cu_req_valid[i]    <= 1'b1;
        cu_req[i].we       <= 1'b0;
        cu_req[i].addr     <= ADDR_W'(i << 20) + ADDR_W'(issued[i] + (cu_req_valid[i] ? 1 : 0));
        cu_req[i].tag      <= 3'((ADDR_W'(i << 20) + ADDR_W'(issued[i] + (cu_req_valid[i] ? 1 : 0))) % 7);
        cu_req[i].wdata    <= '0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (answered[0] == 300 && answered[1] == 300 && answered[2] == 300 && answered[3] == 300);
    repeat (10) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (outstanding[i].size() != 0) begin
        failures++;
        $display("unit %0d left without response", i);
      end
    end
    checks++;
    if (max_passed > N - 1) begin
      failures++;
      $display("a waiting unit was passed over %0d times", max_passed);
    end
    checks++;
    if (mem.stalls == 0 || mem.reorders == 0) begin
      failures++;
      $display("memory never stalled (%0d) or reordered (%0d)", mem.stalls, mem.reorders);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
