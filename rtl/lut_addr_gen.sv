// lut_addr_gen: global-memory address of one operand of the inference kernel.
//
// The likelihood tables are laid out cell by cell: for every cell i there are
// three rows of (maxDist+1) distance likelihoods, one row per distance sensor,
// and likewise three rows of (maxBear+1) bearing likelihoods in the bearing
// table. The entry for cell i, sensor s and sensor value v is therefore
//   distance, s = 0..2 : base_dist + i*3*(maxDist+1) + s*(maxDist+1)     + v
//   bearing,  s = 3..5 : base_bear + i*3*(maxBear+1) + (s-3)*(maxBear+1) + v
// which is computed here as (3*i + s') * stride + v. Slot 6 addresses the cell's
// entry of the likelihood (prior / posterior) vector: base_vec + i.
// The separate bearing base follows the kernel's argument list, which names a
// bearing table of its own.
//
// Purely combinational; addresses wrap modulo 2^ADDR_W.
module lut_addr_gen
  import bayes_pkg::*;
(
  input  kernel_args_t      args,
  input  logic [ADDR_W-1:0] cell_idx,
  input  logic [SLOT_W-1:0] slot,
  output logic [ADDR_W-1:0] addr
);
  logic [ADDR_W-1:0] row;
  logic [ADDR_W-1:0] stride;
  logic [ADDR_W-1:0] base;
  logic [SVAL_W-1:0] value;

  always_comb begin
    row    = '0;
    stride = '0;
    base   = args.base_vec;
    value  = '0;
    if (slot < SLOT_W'(NDIST)) begin
      row    = cell_idx * ADDR_W'(3) + ADDR_W'(slot);
      stride = ADDR_W'(args.max_dist) + ADDR_W'(1);
      base   = args.base_dist;
      value  = args.sensor[slot];
    end else if (slot < SLOT_W'(NSENS)) begin
      row    = cell_idx * ADDR_W'(3) + ADDR_W'(slot - SLOT_W'(NDIST));
      stride = ADDR_W'(args.max_bear) + ADDR_W'(1);
      base   = args.base_bear;
      value  = args.sensor[slot];
    end
    if (slot < SLOT_W'(NSENS))
      addr = base + row * stride + ADDR_W'(value);
    else
      addr = args.base_vec + cell_idx;
  end

endmodule
