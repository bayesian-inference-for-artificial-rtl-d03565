// tb_posterior_cu: runs single cells through one compute unit and compares the
// stored posterior with the reference, bit for bit. Two units run side by side:
// one on an ideal memory (fixed latency, never stalls) where the cycles per cell
// are checked as well, one on a memory that stalls and returns responses out of
// order. Grid sizes 8x8 to 128x128, 0 to 3 iterations.
module tb_posterior_cu;
  import bayes_pkg::*;
  import tb_lut_pkg::*;

  localparam int LAT = 4;
  // cycles from hand-over to cell_done on the ideal memory, worked out from the
  // state machine: a later pass is 6 issue cycles, LAT+2 until the last load is
  // in, 5 products at 3 cycles, y*L (3) and y+y*L (3): 33. The first pass issues
  // 7 loads, and its prior product (3) and the store round trip follow: 40.
  localparam int T_FIRST = 40;
  localparam int T_PASS  = 33;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  kernel_args_t args;
  logic [ADDR_W-1:0] cell_id;
  logic [1:0] cell_valid = '0, cell_ready, cell_done;
  logic [1:0] req_valid, req_ready, rsp_valid;
  cu_req_t [1:0] req;
  cu_rsp_t [1:0] rsp;
  mem_req_t [1:0] mreq;
  mem_rsp_t [1:0] mrsp;

  for (genvar u = 0; u < 2; u++) begin : g_u
    posterior_cu dut (.clk, .rst_n, .args, .cell_valid(cell_valid[u]), .cell_id,
      .cell_ready(cell_ready[u]), .cell_done(cell_done[u]),
      .req_valid(req_valid[u]), .req(req[u]), .req_ready(req_ready[u]),
      .rsp_valid(rsp_valid[u]), .rsp(rsp[u]));
    assign mreq[u] = '{we: req[u].we, addr: req[u].addr, wdata: req[u].wdata,
                       tag: {CUID_W'(0), req[u].tag}};
    assign rsp[u]  = '{rdata: mrsp[u].rdata, tag: mrsp[u].tag[SLOT_W-1:0]};
  end
  ddr_model #(.LATENCY(LAT)) mem0 (.clk, .rst_n, .req_valid(req_valid[0]), .req(mreq[0]),
    .req_ready(req_ready[0]), .rsp_valid(rsp_valid[0]), .rsp(mrsp[0]));
  ddr_model #(.LATENCY(3), .STALL_PCT(30), .REORDER(1'b1)) mem1 (.clk, .rst_n,
    .req_valid(req_valid[1]), .req(mreq[1]), .req_ready(req_ready[1]),
    .rsp_valid(rsp_valid[1]), .rsp(mrsp[1]));

  initial begin
    args = '0;
    cell_id = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 60; t++) begin : g_case
      int bits, md, mb, c, iters, sv [6];
      int unsigned t0, dt [2];
      logic [63:0] pr, e;
      bits  = 3 + t % 5;
      md    = (1 << (bits + 1)) - 1;
      mb    = (1 << (bits + 2)) - 1;
      c     = $urandom_range((1 << (2 * bits)) - 1);
      iters = t % 4;
      args.n_cells   <= 32'(1 << (2 * bits));
      args.max_dist  <= 16'(md);
      args.max_bear  <= 16'(mb);
      args.n_iter    <= 32'(iters);
      args.base_vec  <= 32'h0000_1000;
      args.base_dist <= 32'h0010_0000;
      args.base_bear <= 32'h0400_0000;
      for (int s = 0; s < 6; s++) begin
        sv[s] = (s < 3) ? $urandom_range(md) : $urandom_range(mb);
        args.sensor[s] <= 16'(sv[s]);
      end
      pr = prior_value(c);
      mem0.poke(32'h1000 + c, pr);
      mem1.poke(32'h1000 + c, pr);
      e = ref_posterior(c, pr, iters, 32'h0010_0000, 32'h0400_0000, md, mb, sv);
      @(posedge clk);
      cell_id    <= c;
      cell_valid <= 2'b11;
      t0 = cyc;
      @(posedge clk);
      cell_valid <= 2'b00;
      dt = '{0, 0};
      while (dt[0] == 0 || dt[1] == 0) begin
        @(posedge clk);
        if (cell_done[0] && dt[0] == 0) dt[0] = cyc - t0;
        if (cell_done[1] && dt[1] == 0) dt[1] = cyc - t0;
      end
      for (int u = 0; u < 2; u++) begin
        logic [63:0] got;
        got = (u == 0) ? mem0.peek(32'h1000 + c) : mem1.peek(32'h1000 + c);
        checks++;
        if (got !== e) begin
          failures++;
          $display("unit %0d bits=%0d cell=%0d iters=%0d: got %h expected %h", u, bits, c, iters, got, e);
        end
      end
      checks++;
      if (iters > 0 && dt[0] != T_FIRST + (iters - 1) * T_PASS) begin
        failures++;
        $display("iters=%0d took %0d cycles, expected %0d", iters, dt[0], T_FIRST + (iters - 1) * T_PASS);
      end
    end
    checks++;
    if (mem1.stalls == 0 || mem1.reorders == 0) begin
      failures++;
      $display("stalls or reordering never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
