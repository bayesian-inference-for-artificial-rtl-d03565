// posterior_kernel: the ComputePosteriorUnnormalized kernel, NUM_CU compute
// units fed with grid cells.
//
// The kernel is data parallel: every grid cell is an independent work item whose
// global ID is the cell index, and no unit needs to synchronise with another.
// Since there are far fewer compute units than cells, the dispatcher hands out
// cell indices 0, 1, 2, ... in order, each to the lowest-numbered idle unit, one
// per cycle, until all N cells are handed out; the run is over once every cell's
// store has been acknowledged. The number of units (4) and the in-order dispatch
// are this design's choices.
//
// Interface: start (one-cycle pulse) begins a run with the arguments in args,
// which must stay stable until done; busy is high during the run; done pulses
// for one cycle at its end. Each unit's memory port is brought out for the
// global interconnect.
module posterior_kernel
  import bayes_pkg::*;
#(
  parameter int NUM_CU = 4,
  parameter int EXP_W  = DP_EXP_W,
  parameter int FRAC_W = DP_FRAC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  kernel_args_t         args,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [NUM_CU-1:0]    req_valid,
  output cu_req_t [NUM_CU-1:0] req,
  input  logic [NUM_CU-1:0]    req_ready,
  input  logic [NUM_CU-1:0]    rsp_valid,
  input  cu_rsp_t [NUM_CU-1:0] rsp
);
  logic [ADDR_W-1:0] next_cell;   // next global ID to hand out
  logic [ADDR_W-1:0] finished;    // cells whose result is stored
  logic [NUM_CU-1:0] cu_ready, cu_done, cu_valid;

  for (genvar i = 0; i < NUM_CU; i++) begin : g_cu
    posterior_cu #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_cu (
      .clk, .rst_n, .args,
      .cell_valid(cu_valid[i]), .cell_id(next_cell),
      .cell_ready(cu_ready[i]), .cell_done(cu_done[i]),
      .req_valid(req_valid[i]), .req(req[i]), .req_ready(req_ready[i]),
      .rsp_valid(rsp_valid[i]), .rsp(rsp[i]));
  end

  // lowest idle unit gets the next cell
  always_comb begin
    cu_valid = '0;
    if (busy && next_cell < args.n_cells) begin
      for (int i = NUM_CU - 1; i >= 0; i--)
        if (cu_ready[i]) cu_valid = NUM_CU'(1) << i;
    end
  end

  logic [ADDR_W-1:0] n_done_now;
  always_comb begin
    n_done_now = '0;
    for (int i = 0; i < NUM_CU; i++) n_done_now += ADDR_W'(cu_done[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      next_cell <= '0;
      finished  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        next_cell <= '0;
        finished  <= '0;
      end else if (busy) begin
        if (cu_valid != '0) next_cell <= next_cell + ADDR_W'(1);
        finished <= finished + n_done_now;
        if (finished + n_done_now >= args.n_cells) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  one_cell_per_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(cu_valid));

endmodule
