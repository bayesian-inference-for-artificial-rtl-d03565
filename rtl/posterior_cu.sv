// posterior_cu: one compute unit of the ComputePosteriorUnnormalized kernel.
//
// A compute unit takes one grid cell (an OpenCL work item, its global ID) at a
// time and runs the kernel loop for it:
//   repeat nClocks times:
//     L <- product of the six likelihoods selected by the sensor values
//     first pass : y <- prior * L        (prior = likelihoodsVector[i])
//     later passes: y <- y + y * L
//   likelihoodsVector[i] <- y
// The posterior is left unnormalised; the normalisation runs on the host.
// With nClocks = 0 the loop does not run and 0 is stored, as the kernel does.
//
// How it works: a small state machine issues the loads of one pass back to back
// (sensor slots 0..5, plus the prior in slot 6 on the first pass), collects the
// responses in a register per slot in whatever order they return, then walks
// the product through one shared fp_mul (L starts as slot 0's likelihood, which
// equals 1.0 times it), updates y with fp_mul and fp_add, and finally stores y
// and waits for the store's acknowledgement. The likelihoods are fetched again on
// every pass, as the kernel loop does. The issue order, the single multiplier
// and the wait for all loads are this design's choices.
//
// Interface: cell_ready is high while the unit is idle; cell_valid & cell_ready
// hands it cell_id. req_*/rsp_* speak to global memory (valid/ready requests,
// one tagged response per request, responses are always accepted). cell_done
// pulses for one cycle when the store of a cell has been acknowledged.
// Timing, with a memory that never stalls and answers every request R cycles
// after accepting it: a later pass takes 29 + R cycles (6 issue cycles, R + 2 to
// gather, five multiplies for the product, one for y*L and one add, each 3
// cycles including the hand-over); a cell of one pass takes 32 + 2R from
// hand-over to cell_done, store included. Each extra pass adds 29 + R.
module posterior_cu
  import bayes_pkg::*;
#(
  parameter int EXP_W  = DP_EXP_W,
  parameter int FRAC_W = DP_FRAC_W,
  localparam int W     = 1 + EXP_W + FRAC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  kernel_args_t      args,
  // work distribution
  input  logic              cell_valid,
  input  logic [ADDR_W-1:0] cell_id,
  output logic              cell_ready,
  output logic              cell_done,
  // global memory
  output logic              req_valid,
  output cu_req_t           req,
  input  logic              req_ready,
  input  logic              rsp_valid,
  input  cu_rsp_t           rsp
);
  typedef enum logic [3:0] {
    S_IDLE, S_ISSUE, S_WAIT, S_MUL_GO, S_MUL_WAIT,
    S_UPD_GO, S_UPD_WAIT, S_ADD_GO, S_ADD_WAIT, S_STORE, S_STORE_WAIT
  } state_t;

  state_t            state;
  logic [ADDR_W-1:0] cell_idx;
  logic [31:0]       iter;
  logic [SLOT_W-1:0] slot, last_slot;
  logic [6:0]        got;
  logic [W-1:0]      val [7];
  logic [W-1:0]      acc;       // running likelihood product L
  logic [W-1:0]      y;         // cell posterior
  logic [W-1:0]      prod_yl;   // y * L on later passes
  logic [2:0]        k;         // product index

  logic [ADDR_W-1:0] ld_addr;
  lut_addr_gen u_addr (.args(args), .cell_idx(cell_idx), .slot(slot), .addr(ld_addr));

  // shared arithmetic
  logic         mul_go, mul_done, add_go, add_done;
  logic [W-1:0] mul_a, mul_b, mul_y, add_y;

  fp_mul #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_mul (
    .clk, .rst_n, .in_valid(mul_go), .a(mul_a), .b(mul_b),
    .out_valid(mul_done), .y(mul_y));

  fp_add #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_add (
    .clk, .rst_n, .in_valid(add_go), .a(y), .b(prod_yl),
    .out_valid(add_done), .y(add_y));

  always_comb begin
    mul_go = (state == S_MUL_GO) || (state == S_UPD_GO);
    mul_a  = acc;
    mul_b  = val[k];
    if (state == S_UPD_GO) begin
      mul_a = (iter == '0) ? val[PRIOR_SLOT] : y;
      mul_b = acc;
    end
    add_go = (state == S_ADD_GO);
  end

  always_comb begin
    cell_ready = (state == S_IDLE);
    req_valid  = (state == S_ISSUE) || (state == S_STORE);
    req.we     = (state == S_STORE);
    req.addr   = ld_addr;
    req.wdata  = MEM_DW'(y);
    req.tag    = slot;
  end

  logic [6:0] need;
  assign need = (iter == '0) ? 7'h7f : 7'h3f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cell_idx      <= '0;
      iter      <= '0;
      slot      <= '0;
      last_slot <= '0;
      got       <= '0;
      acc       <= '0;
      y         <= '0;
      prod_yl   <= '0;
      k         <= '0;
      cell_done <= 1'b0;
      for (int i = 0; i < 7; i++) val[i] <= '0;
    end else begin
      cell_done <= 1'b0;
      // load responses may arrive while loads are still being issued
      if (rsp_valid && (state == S_ISSUE || state == S_WAIT)) begin
        val[rsp.tag] <= rsp.rdata[W-1:0];
        got[rsp.tag] <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (cell_valid) begin
          cell_idx <= cell_id;
          iter <= '0;
          got  <= '0;
          slot <= '0;
          last_slot <= PRIOR_SLOT;
          if (args.n_iter == '0) begin
            y     <= '0;
            slot  <= PRIOR_SLOT;
            state <= S_STORE;
          end else begin
            state <= S_ISSUE;
          end
        end
        S_ISSUE: if (req_ready) begin
          if (slot == last_slot) state <= S_WAIT;
          else slot <= slot + SLOT_W'(1);
        end
        S_WAIT: if ((got & need) == need) begin
          acc   <= val[0];
          k     <= 3'd1;
          state <= S_MUL_GO;
        end
        S_MUL_GO:   state <= S_MUL_WAIT;
        S_MUL_WAIT: if (mul_done) begin
          acc <= mul_y;
          if (k == 3'(NSENS - 1)) state <= S_UPD_GO;
          else begin
            k     <= k + 3'd1;
            state <= S_MUL_GO;
          end
        end
        S_UPD_GO:   state <= S_UPD_WAIT;
        S_UPD_WAIT: if (mul_done) begin
          if (iter == '0) begin
            y <= mul_y;
            state <= S_ADD_WAIT;   // no add on the first pass
          end else begin
            prod_yl <= mul_y;
            state   <= S_ADD_GO;
          end
        end
        S_ADD_GO:   state <= S_ADD_WAIT;
        S_ADD_WAIT: if (add_done || iter == '0) begin
          if (iter != '0) y <= add_y;
          got <= '0;
          if (iter + 32'd1 >= args.n_iter) begin
            slot  <= PRIOR_SLOT;
            state <= S_STORE;
          end else begin
            slot      <= '0;
            last_slot <= SLOT_W'(NSENS - 1);
            state     <= S_ISSUE;
          end
          iter <= iter + 32'd1;
        end
        S_STORE: if (req_ready) state <= S_STORE_WAIT;
        S_STORE_WAIT: if (rsp_valid) begin
          cell_done <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A cell is only handed over while the unit is idle.
  cell_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (cell_valid && cell_ready) |-> state == S_IDLE);

endmodule
