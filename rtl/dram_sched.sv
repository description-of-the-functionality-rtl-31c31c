// dram_sched: DRAM scheduler.
//
// Collects DRAM transactions from NPORT requesters (the MCache, the MTLB and
// the shadow controllers' indirection-vector fetches), orders them and issues
// them one per cycle on the DRAM port, and routes read data back to the
// requester that asked for it.
//
// Ordering is round robin among requesters with a valid request: after a
// grant the search starts at the next port. This is the simplest policy that
// keeps every requester moving; scheduling for DRAM bank/row locality is not
// done (a design choice: no policy is specified). The requester's number is
// carried in the upper bits of the DRAM tag (dram_tag = {port, tag}) and
// selects the port on which the returned data appears; reads may return in
// any order. Writes return nothing.
//
// Timing: combinational grant; a request is issued in the cycle it is
// granted when dram_ready is high.
module dram_sched
  import impulse_pkg::*;
#(
  parameter int NPORT = 3,
  localparam int IW   = (NPORT > 1) ? $clog2(NPORT) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // requesters
  input  logic [NPORT-1:0]       req_valid,
  output logic [NPORT-1:0]       req_ready,
  input  dram_req_t              req [NPORT],
  output logic [NPORT-1:0]       resp_valid,
  output dram_resp_t             resp,
  // DRAM port
  output logic                   dram_valid,
  input  logic                   dram_ready,
  output logic                   dram_write,
  output logic [LA_W-1:0]        dram_line,
  output logic [LINE_BYTES-1:0]  dram_wmask,
  output logic [LINE_W-1:0]      dram_wdata,
  output logic [IW+DTAG_W-1:0]   dram_tag,
  input  logic                   dram_rvalid,
  input  logic [IW+DTAG_W-1:0]   dram_rtag,
  input  logic [LINE_W-1:0]      dram_rdata
);

  logic [IW-1:0] rr;      // port with the highest priority this cycle
  logic [IW-1:0] gnt;
  logic          any;

  always_comb begin
    any = 1'b0;
    gnt = '0;
    for (int i = 0; i < NPORT; i++) begin
      logic [IW-1:0] p;
      p = IW'((32'(rr) + i) % NPORT);
      if (!any && req_valid[p]) begin
        any = 1'b1;
        gnt = p;
      end
    end
  end

  always_comb begin
    req_ready = '0;
    req_ready[gnt] = any && dram_ready;
  end

  assign dram_valid = any;
  assign dram_write = req[gnt].write;
  assign dram_line  = req[gnt].line;
  assign dram_wmask = req[gnt].wmask;
  assign dram_wdata = req[gnt].wdata;
  assign dram_tag   = {gnt, req[gnt].tag};

  always_comb begin
    resp_valid = '0;
    if (dram_rvalid && 32'(dram_rtag[IW+DTAG_W-1:DTAG_W]) < NPORT)
      resp_valid[dram_rtag[IW+DTAG_W-1:DTAG_W]] = 1'b1;
  end
  assign resp.tag  = dram_rtag[DTAG_W-1:0];
  assign resp.data = dram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (any && dram_ready) rr <= IW'((32'(gnt) + 1) % NPORT);
  end

endmodule
