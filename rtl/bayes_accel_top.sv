// bayes_accel_top: FPGA-side engine for exact Bayesian inference on a grid.
//
// The host loads, once, the likelihood tables of six sensors (three landmark
// distances, three bearings) and a prior per grid cell into global memory. For
// each new set of sensor readings it writes the six sensor values and starts the
// kernel; the kernel replaces every cell's prior by its unnormalised posterior
// prior * prod_k P(E_k | cell), after which the host normalises the vector.
//
// Structure: kernel_csr (host registers) -> posterior_kernel (NUM_CU compute
// units, each with a double-precision multiplier and adder) -> global_interconnect
// -> one global-memory port. The board logic behind that port (PCIe, DDR3
// controller) is not part of this design: the port is brought out as is.
//
// Interface: csr_* is a 32-bit register bus (see kernel_csr); mem_* is a
// valid/ready request port with tagged responses (see bayes_pkg); irq pulses
// for one cycle when a run ends.
module bayes_accel_top
  import bayes_pkg::*;
#(
  parameter int NUM_CU = 4,
  parameter int EXP_W  = DP_EXP_W,
  parameter int FRAC_W = DP_FRAC_W
) (
  input  logic        clk,
  input  logic        rst_n,
  // host register bus
  input  logic        csr_wr_en,
  input  logic [3:0]  csr_addr,
  input  logic [31:0] csr_wdata,
  output logic [31:0] csr_rdata,
  output logic        irq,
  // global memory
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_rsp_valid,
  input  mem_rsp_t    mem_rsp
);
  kernel_args_t args;
  logic         start, busy;

  logic    [NUM_CU-1:0] req_valid, req_ready, rsp_valid;
  cu_req_t [NUM_CU-1:0] req;
  cu_rsp_t [NUM_CU-1:0] rsp;

  kernel_csr u_csr (
    .clk, .rst_n,
    .wr_en(csr_wr_en), .addr(csr_addr), .wdata(csr_wdata), .rdata(csr_rdata),
    .args, .start, .busy, .done(irq));

  posterior_kernel #(.NUM_CU(NUM_CU), .EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_kernel (
    .clk, .rst_n, .args, .start, .busy, .done(irq),
    .req_valid, .req, .req_ready, .rsp_valid, .rsp);

  global_interconnect #(.NUM_CU(NUM_CU)) u_gic (
    .clk, .rst_n,
    .cu_req_valid(req_valid), .cu_req(req), .cu_req_ready(req_ready),
    .cu_rsp_valid(rsp_valid), .cu_rsp(rsp),
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp);

endmodule
