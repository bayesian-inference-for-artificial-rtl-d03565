// kernel_csr: the host's view of the inference kernel: kernel arguments,
// start, status and a cycle counter.
//
// The host writes the control variables of a run (number of cells, the sensor
// ranges maxDist and maxBear, the number of iterations, the buffer addresses of
// the likelihood vector and of the two likelihood tables, and the six sensor
// values) and then writes 1 to bit 0 of CTRL to launch the kernel. Between runs
// only the sensor registers need rewriting: the tables stay in global memory and
// the posterior of one run is the prior of the next. Argument writes that arrive
// while the kernel is busy are ignored, so a run always sees stable arguments.
// The register map, the 32-bit bus and the cycle counter are this design's own.
//
// Register map (word addresses, 32-bit data):
//   0x0 CTRL      write: bit0 start.  read: bit0 busy, bit1 done (set at the end
//                 of a run, cleared by the next start)
//   0x1 N_CELLS   0x2 MAX_DIST  0x3 MAX_BEAR  0x4 N_ITER
//   0x5 BASE_VEC  0x6 BASE_DIST 0x7 BASE_BEAR
//   0x8..0xD SENSOR0..5  (D1, D2, D3, B1, B2, B3)
//   0xE CYCLES    read only: clock cycles of the last (or running) run
// Timing: writes take effect at the clock edge; reads are combinational.
module kernel_csr
  import bayes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // host bus
  input  logic         wr_en,
  input  logic [3:0]   addr,
  input  logic [31:0]  wdata,
  output logic [31:0]  rdata,
  // kernel side
  output kernel_args_t args,
  output logic         start,
  input  logic         busy,
  input  logic         done
);
  typedef enum logic [3:0] {
    R_CTRL = 4'h0, R_N_CELLS = 4'h1, R_MAX_DIST = 4'h2, R_MAX_BEAR = 4'h3,
    R_N_ITER = 4'h4, R_BASE_VEC = 4'h5, R_BASE_DIST = 4'h6, R_BASE_BEAR = 4'h7,
    R_CYCLES = 4'hE
  } reg_t;

  logic        done_flag;
  logic [31:0] cycles;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      args      <= '0;
      start     <= 1'b0;
      done_flag <= 1'b0;
      cycles    <= '0;
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (busy) cycles <= cycles + 32'd1;
      if (wr_en && addr == R_CTRL && wdata[0] && !busy) begin
        start     <= 1'b1;
        done_flag <= 1'b0;
        cycles    <= '0;
      end
      if (wr_en && !busy) begin
        unique case (addr)
          R_N_CELLS:   args.n_cells   <= ADDR_W'(wdata);
          R_MAX_DIST:  args.max_dist  <= SVAL_W'(wdata);
          R_MAX_BEAR:  args.max_bear  <= SVAL_W'(wdata);
          R_N_ITER:    args.n_iter    <= wdata;
          R_BASE_VEC:  args.base_vec  <= ADDR_W'(wdata);
          R_BASE_DIST: args.base_dist <= ADDR_W'(wdata);
          R_BASE_BEAR: args.base_bear <= ADDR_W'(wdata);
          default:
            if (addr >= 4'h8 && addr <= 4'hD)
              args.sensor[addr - 4'h8] <= SVAL_W'(wdata);
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      R_CTRL:      rdata = {30'd0, done_flag, busy};
      R_N_CELLS:   rdata = 32'(args.n_cells);
      R_MAX_DIST:  rdata = 32'(args.max_dist);
      R_MAX_BEAR:  rdata = 32'(args.max_bear);
      R_N_ITER:    rdata = args.n_iter;
      R_BASE_VEC:  rdata = 32'(args.base_vec);
      R_BASE_DIST: rdata = 32'(args.base_dist);
      R_BASE_BEAR: rdata = 32'(args.base_bear);
      R_CYCLES:    rdata = cycles;
      default:     rdata = (addr >= 4'h8 && addr <= 4'hD) ? 32'(args.sensor[addr - 4'h8]) : 32'd0;
    endcase
  end

endmodule
