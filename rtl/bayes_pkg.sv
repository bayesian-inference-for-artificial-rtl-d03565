// bayes_pkg: types and constants shared by the Bayesian-inference accelerator.
//
// The accelerator computes, for every cell m of a square grid, the unnormalised
// posterior y_m = P(M_m) * prod_k P(E_k | M_m) from six pre-computed likelihood
// tables (three distance and three bearing sensors). All values are IEEE-754
// floating point; double precision is the default format, single precision is a
// parameter option.
//
// Global memory is word addressed: one word holds one floating-point value
// (MEM_DW bits, a single-precision value sits in the low 32 bits). Every request,
// load or store, is answered by exactly one response carrying the request's tag;
// a store's response is its completion acknowledgement.
//
// The six sensor slots follow the order of the kernel loop: slots 0..2 are the
// distance sensors D1..D3, slots 3..5 the bearing sensors B1..B3. Slot 6 is used
// for the prior (the likelihood-vector entry of the cell). Widths below are this
// design's own choice; they cover the largest grid evaluated (128x128, whose double
// tables hold about 37.7 M words) with room to spare.
package bayes_pkg;

  localparam int ADDR_W    = 32;   // global-memory word address
  localparam int MEM_DW    = 64;   // global-memory word
  localparam int SLOT_W    = 3;    // sensor slot 0..5, prior slot 6
  localparam int CUID_W    = 5;    // compute-unit index carried in memory tags
  localparam int MEM_TAG_W = CUID_W + SLOT_W;
  localparam int SVAL_W    = 16;   // one discrete sensor value
  localparam int NSENS     = 6;    // 3 distance + 3 bearing sensors
  localparam int NDIST     = 3;
  localparam logic [SLOT_W-1:0] PRIOR_SLOT = 3'd6;

  // IEEE-754 formats (sign, exponent, fraction).
  localparam int DP_EXP_W  = 11;
  localparam int DP_FRAC_W = 52;
  localparam int SP_EXP_W  = 8;
  localparam int SP_FRAC_W = 23;

  // Request from a compute unit towards global memory.
  typedef struct packed {
    logic                we;
    logic [ADDR_W-1:0]   addr;
    logic [MEM_DW-1:0]   wdata;
    logic [SLOT_W-1:0]   tag;
  } cu_req_t;

  // Response to a compute unit.
  typedef struct packed {
    logic [MEM_DW-1:0]   rdata;
    logic [SLOT_W-1:0]   tag;
  } cu_rsp_t;

  // Request on the single global-memory port.
  typedef struct packed {
    logic                we;
    logic [ADDR_W-1:0]   addr;
    logic [MEM_DW-1:0]   wdata;
    logic [MEM_TAG_W-1:0] tag;
  } mem_req_t;

  typedef struct packed {
    logic [MEM_DW-1:0]    rdata;
    logic [MEM_TAG_W-1:0] tag;
  } mem_rsp_t;

  // Kernel arguments (Algorithm "Bayesian Inference Kernel" inputs).
  typedef struct packed {
    logic [ADDR_W-1:0]            n_cells;    // N: cells in the grid
    logic [SVAL_W-1:0]            max_dist;   // maxDist
    logic [SVAL_W-1:0]            max_bear;   // maxBear
    logic [31:0]                  n_iter;     // nClocks: iterations
    logic [ADDR_W-1:0]            base_vec;   // likelihoodsVector[] (priors in, posteriors out)
    logic [ADDR_W-1:0]            base_dist;  // distanceLikelihoodsTable[]
    logic [ADDR_W-1:0]            base_bear;  // bearingLikelihoodsTable[]
    logic [NSENS-1:0][SVAL_W-1:0] sensor;     // sensor values, slot order
  } kernel_args_t;

endpackage
