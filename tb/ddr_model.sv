// ddr_model: behavioural model of the board's global memory, for testbenches.
//
// Accepts valid/ready requests (refusing a random STALL_PCT percent of cycles),
// answers each one after at least LATENCY cycles with its tag. With REORDER set
// it returns ready responses in random order. Reads of words never written come
// from tb_lut_pkg::lut_value, i.e. the likelihood tables; written words are kept
// in an associative array. A store's response is its acknowledgement.
// Counters: stalls (cycles a request waited), reorders (responses that overtook
// an older one), reads, writes.
module ddr_model
  import bayes_pkg::*;
#(
  parameter int LATENCY   = 4,
  parameter int STALL_PCT = 0,
  parameter bit REORDER   = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_ready,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);
  typedef struct {
    longint          due;
    logic [MEM_DW-1:0] data;
    logic [MEM_TAG_W-1:0] tag;
  } pend_t;

  logic [MEM_DW-1:0] store [logic [ADDR_W-1:0]];
  pend_t  pend [$];
  longint now = 0;
  int     stalls = 0, reorders = 0, reads = 0, writes = 0;

  function automatic logic [MEM_DW-1:0] peek(logic [ADDR_W-1:0] a);
    if (store.exists(a)) return store[a];
    return tb_lut_pkg::lut_value(a);
  endfunction

  function automatic void poke(logic [ADDR_W-1:0] a, logic [MEM_DW-1:0] d);
    store[a] = d;
  endfunction

  initial req_ready = 1'b1;

  always @(posedge clk) begin
    now <= now + 1;
    rsp_valid <= 1'b0;
    if (!rst_n) begin
      pend.delete();
    end else begin
      // respond
      begin
        int pick;
        int nready;
        pick = -1;
        nready = 0;
        for (int i = 0; i < pend.size(); i++)
          if (pend[i].due <= now) nready++;
        if (nready > 0) begin
          if (REORDER) begin
            int want;
            want = int'($urandom_range(nready - 1));
            for (int i = 0; i < pend.size(); i++)
              if (pend[i].due <= now) begin
                if (want == 0 && pick < 0) pick = i;
                want--;
              end
          end else if (pend[0].due <= now) pick = 0;
        end
        if (pick >= 0) begin
          rsp_valid <= 1'b1;
          rsp.rdata <= pend[pick].data;
          rsp.tag   <= pend[pick].tag;
          if (pick > 0) reorders++;
          pend.delete(pick);
        end
      end
      // accept
      if (req_valid && req_ready) begin
        pend_t p;
        p.due  = now + longint'(LATENCY) + (REORDER ? longint'($urandom_range(2 * LATENCY)) : 64'sd0);
        p.tag  = req.tag;
        if (req.we) begin
          store[req.addr] = req.wdata;
          p.data = '0;
          writes++;
        end else begin
          p.data = peek(req.addr);
          reads++;
        end
        pend.push_back(p);
      end else if (req_valid) stalls++;
      req_ready <= (STALL_PCT == 0) || (int'($urandom_range(99)) >= STALL_PCT);
    end
  end

endmodule
