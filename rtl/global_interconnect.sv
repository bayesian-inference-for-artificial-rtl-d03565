// global_interconnect: joins the compute units' memory ports onto the single
// global-memory port of the board.
//
// Requests (loads and stores) from NUM_CU compute units are arbitrated round
// robin: the unit after the one granted last has the highest priority, so no unit
// waits more than NUM_CU-1 grants. The granted request goes out with its compute
// unit's index prepended to its tag; responses come back in any order and are
// steered to the unit named in their tag, the tag's low bits returned unchanged.
// Only the name and the resource figures of this block are known; the
// round-robin policy and the tag routing are this design's choices.
//
// Interface: per unit cu_req_valid/cu_req/cu_req_ready (valid/ready; a request
// must stay valid and unchanged until accepted) and cu_rsp_valid/cu_rsp (no
// backpressure). mem_* is the same on the memory side. Purely combinational from
// request to memory port, one register for the round-robin pointer; responses
// pass through without delay.
module global_interconnect
  import bayes_pkg::*;
#(
  parameter int NUM_CU = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // compute-unit side
  input  logic    [NUM_CU-1:0]    cu_req_valid,
  input  cu_req_t [NUM_CU-1:0]    cu_req,
  output logic    [NUM_CU-1:0]    cu_req_ready,
  output logic    [NUM_CU-1:0]    cu_rsp_valid,
  output cu_rsp_t [NUM_CU-1:0]    cu_rsp,
  // global-memory side
  output logic                    mem_req_valid,
  output mem_req_t                mem_req,
  input  logic                    mem_req_ready,
  input  logic                    mem_rsp_valid,
  input  mem_rsp_t                mem_rsp
);
  localparam int IDX_W = (NUM_CU > 1) ? $clog2(NUM_CU) : 1;

  logic [IDX_W-1:0] last;      // unit granted most recently
  logic [IDX_W-1:0] grant;
  logic             any;

  logic [IDX_W:0] cand;

  always_comb begin
    grant = last;
    any   = 1'b0;
    cand  = '0;
    // search from last+1 upwards, wrapping
    for (int n = 1; n <= NUM_CU; n++) begin
      cand = (IDX_W+1)'(last) + (IDX_W+1)'(n);
      if (cand >= (IDX_W+1)'(NUM_CU)) cand = cand - (IDX_W+1)'(NUM_CU);
      if (!any && cu_req_valid[cand[IDX_W-1:0]]) begin
        any   = 1'b1;
        grant = cand[IDX_W-1:0];
      end
    end
  end

  always_comb begin
    mem_req_valid = any;
    mem_req.we    = cu_req[grant].we;
    mem_req.addr  = cu_req[grant].addr;
    mem_req.wdata = cu_req[grant].wdata;
    mem_req.tag   = {CUID_W'(grant), cu_req[grant].tag};
    cu_req_ready  = '0;
    cu_req_ready[grant] = any && mem_req_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IDX_W'(NUM_CU - 1);
    else if (any && mem_req_ready) last <= grant;
  end

  logic [CUID_W-1:0] rsp_cu;
  assign rsp_cu = mem_rsp.tag[MEM_TAG_W-1 -: CUID_W];

  always_comb begin
    for (int i = 0; i < NUM_CU; i++) begin
      cu_rsp_valid[i]  = mem_rsp_valid && (rsp_cu == CUID_W'(i));
      cu_rsp[i].rdata  = mem_rsp.rdata;
      cu_rsp[i].tag    = mem_rsp.tag[SLOT_W-1:0];
    end
  end

  // Rules of the handshakes.
  for (genvar i = 0; i < NUM_CU; i++) begin : g_rules
    req_held: assert property (@(posedge clk) disable iff (!rst_n)
      (cu_req_valid[i] && !cu_req_ready[i]) |=> (cu_req_valid[i] && $stable(cu_req[i])));
  end
  rsp_to_existing_cu: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> (32'(rsp_cu) < NUM_CU));

endmodule
