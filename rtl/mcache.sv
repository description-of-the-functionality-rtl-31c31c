// mcache: memory controller cache (MCache) with next-line prefetching.
//
// A small SRAM cache of 128-byte lines in front of DRAM, physically indexed
// and tagged, SETS x WAYS, FIFO replacement. Each line holds {used, state
// (Fetching/Valid), pref, tag, data}. Writes invalidate a matching line and go
// on to DRAM (write-invalidate), so lines are never dirty and victims are
// simply dropped.
//
// Operation, one request at a time:
//   * LOOK: the request's line is compared in its set.
//       read hit   - the line may still be Fetching; the access then waits for
//                    its data (WAIT). If the line's pref bit is set (a
//                    prefetched line never used), the bit is cleared and the
//                    next line is prefetched.
//       read miss  - a line is reserved: its tag is set and its state is
//                    Fetching before the DRAM read is issued, so a later
//                    access to the same line hits and waits instead of
//                    issuing a duplicate read. Then the next line is
//                    prefetched. If every way of the set is Fetching, the
//                    request stalls until one returns.
//       write      - waits if the matching line is Fetching, then clears its
//                    used bit and sends the masked write to DRAM.
//   * Prefetch (when pref_en): the next sequential line is looked up; if it is
//     absent a line is reserved with pref=1 and a DRAM read issued. If every
//     usable way is Fetching the prefetch is discarded.
//   * FIFO victim: a per-set pointer; the first way from the pointer that is
//     not Fetching is taken, and the pointer moves past it.
//   * DRAM reads return out of order, tagged with {set, way}; returned data
//     makes the line Valid at any time.
// Requests carrying `req_err` (a failed translation) are answered at once
// with an all-zero line and resp_err, or dropped if they are writes. Writes
// carry a byte mask (a whole line from the bus, one object when a shadow
// controller scatters) and are not answered; a partial write invalidates the
// whole cached line.
//
// Timing: a read hit to a Valid line answers 2 cycles after acceptance (LOOK,
// RESP); a hit on a prefetched line spends 2 more cycles issuing the next
// prefetch. The cache answers one request at a time (this design's choice).
module mcache
  import impulse_pkg::*;
#(
  parameter int SETS = 8,
  parameter int WAYS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pref_en,
  // physical requests (from the MTLB or the system interface)
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [PA_W-1:0]   req_paddr,
  input  logic              req_write,
  input  logic [LINE_W-1:0] req_wdata,
  input  logic [LINE_BYTES-1:0] req_wmask,
  input  req_tag_t          req_tag,
  input  logic              req_err,
  // read data back to the requester
  output logic              resp_valid,
  input  logic              resp_ready,
  output req_tag_t          resp_tag,
  output logic [LINE_W-1:0] resp_data,
  output logic              resp_err,
  output logic [LA_W-1:0]   resp_line,
  // DRAM scheduler
  output logic              dreq_valid,
  input  logic              dreq_ready,
  output dram_req_t         dreq,
  input  logic              dresp_valid,
  input  dram_resp_t        dresp,
  // event pulses
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_pref_issue,
  output logic              ev_pref_hit,
  output logic              ev_pref_drop,
  output logic              ev_stall,
  output logic              ev_inval
);

  localparam int SW = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int WW = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int TW = LA_W - SW;

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_DEMAND, S_PLOOK, S_PISSUE, S_WAIT, S_RESP, S_WR}
    state_e;
  state_e state;

  logic              l_used  [SETS][WAYS];
  logic              l_valid [SETS][WAYS];   // state bit: 1 = Valid, 0 = Fetching
  logic              l_pref  [SETS][WAYS];
  logic [TW-1:0]     l_tag   [SETS][WAYS];
  logic [LINE_W-1:0] l_data  [SETS][WAYS];
  logic [WW-1:0]     fifo_ptr [SETS];

  // current request
  logic [LA_W-1:0]   c_line;
  logic              c_write;
  logic [LINE_W-1:0] c_wdata;
  logic [LINE_BYTES-1:0] c_wmask;
  req_tag_t          c_tag;
  logic              c_err;
  logic [SW-1:0]     c_set;
  logic [WW-1:0]     c_way;

  // prefetch target
  logic [LA_W-1:0]   p_line;
  logic [SW-1:0]     p_set;
  logic [WW-1:0]     p_way;

  // lookup of line `lk_line`
  logic [LA_W-1:0]   lk_line;
  logic [SW-1:0]     lk_set;
  logic              lk_hit;
  logic [WW-1:0]     lk_way;
  logic              lk_vfound;
  logic [WW-1:0]     lk_victim;

  assign lk_line = (state == S_PLOOK) ? c_line + 1'b1 : c_line;

  always_comb begin
    lk_set = SW'(lk_line);
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (l_used[lk_set][w] && l_tag[lk_set][w] == lk_line[LA_W-1:SW]) begin
        lk_hit = 1'b1;
        lk_way = WW'(w);
      end
    // FIFO victim, skipping lines being fetched and the demand line
    lk_vfound = 1'b0;
    lk_victim = '0;
    for (int i = 0; i < WAYS; i++) begin
      logic [WW-1:0] w;
      w = WW'((32'(fifo_ptr[lk_set]) + i) % WAYS);
      if (!lk_vfound && !(l_used[lk_set][w] && !l_valid[lk_set][w]) &&
          !(state == S_PLOOK && lk_set == c_set && w == c_way)) begin
        lk_vfound = 1'b1;
        lk_victim = w;
      end
    end
  end

  assign req_ready  = (state == S_IDLE);
  assign resp_valid = (state == S_RESP);
  assign resp_tag   = c_tag;
  assign resp_err   = c_err;
  assign resp_line  = c_line;
  assign resp_data  = c_err ? '0 : l_data[c_set][c_way];

  always_comb begin
    dreq = '0;
    unique case (state)
      S_WR: begin
        dreq.write = 1'b1;
        dreq.line  = c_line;
        dreq.wmask = c_wmask;
        dreq.wdata = c_wdata;
      end
      S_PISSUE: begin
        dreq.line = p_line;
        dreq.tag  = DTAG_W'({p_set, p_way});
      end
      default: begin
        dreq.line = c_line;
        dreq.tag  = DTAG_W'({c_set, c_way});
      end
    endcase
  end
  assign dreq_valid = (state == S_DEMAND) || (state == S_PISSUE) || (state == S_WR);

  logic look_rd, look_wr;
  assign look_rd = (state == S_LOOK) && !c_err && !c_write;
  assign look_wr = (state == S_LOOK) && !c_err && c_write;

  assign ev_hit        = look_rd && lk_hit;
  assign ev_miss       = look_rd && !lk_hit && lk_vfound;
  assign ev_pref_hit   = look_rd && lk_hit && l_pref[lk_set][lk_way];
  assign ev_stall      = (look_rd && !lk_hit && !lk_vfound) ||
                         (look_wr && lk_hit && !l_valid[lk_set][lk_way]);
  assign ev_inval      = look_wr && lk_hit && l_valid[lk_set][lk_way];
  assign ev_pref_issue = (state == S_PISSUE) && dreq_ready;
  assign ev_pref_drop  = (state == S_PLOOK) && !lk_hit && !lk_vfound;

  // fill from DRAM
  logic [SW-1:0] f_set;
  logic [WW-1:0] f_way;
  assign {f_set, f_way} = (SW+WW)'(dresp.tag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      c_line  <= '0;
      c_write <= 1'b0;
      c_tag   <= '0;
      c_err   <= 1'b0;
      c_set   <= '0;
      c_way   <= '0;
      p_line  <= '0;
      p_set   <= '0;
      p_way   <= '0;
      for (int s = 0; s < SETS; s++) begin
        fifo_ptr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          l_used[s][w]  <= 1'b0;
          l_valid[s][w] <= 1'b0;
          l_pref[s][w]  <= 1'b0;
        end
      end
    end else begin
      if (dresp_valid) begin
        l_data[f_set][f_way]  <= dresp.data;
        l_valid[f_set][f_way] <= 1'b1;
      end

      unique case (state)
        S_IDLE: if (req_valid) begin
          c_line  <= req_paddr[PA_W-1:OFF_W];
          c_write <= req_write;
          c_wdata <= req_wdata;
          c_wmask <= req_wmask;
          c_tag   <= req_tag;
          c_err   <= req_err;
          state   <= S_LOOK;
        end
        S_LOOK: begin
          c_set <= lk_set;
          if (c_err) begin
            state <= c_write ? S_IDLE : S_RESP;
          end else if (c_write) begin
            if (!lk_hit) begin
              state <= S_WR;
            end else if (l_valid[lk_set][lk_way]) begin
              l_used[lk_set][lk_way] <= 1'b0;
              state <= S_WR;
            end
          end else if (lk_hit) begin
            c_way   <= lk_way;
            l_pref[lk_set][lk_way] <= 1'b0;
            if (l_pref[lk_set][lk_way] && pref_en) state <= S_PLOOK;
            else if (l_valid[lk_set][lk_way])      state <= S_RESP;
            else                                   state <= S_WAIT;
          end else if (lk_vfound) begin
            c_way                     <= lk_victim;
            l_used[lk_set][lk_victim]  <= 1'b1;
            l_valid[lk_set][lk_victim] <= 1'b0;
            l_pref[lk_set][lk_victim]  <= 1'b0;
            l_tag[lk_set][lk_victim]   <= lk_line[LA_W-1:SW];
            fifo_ptr[lk_set]          <= WW'((32'(lk_victim) + 1) % WAYS);
            state                     <= S_DEMAND;
          end
        end
        S_DEMAND: if (dreq_ready) state <= pref_en ? S_PLOOK : S_WAIT;
        S_PLOOK: begin
          if (lk_hit || !lk_vfound) begin
            state <= S_WAIT;
          end else begin
            p_line <= lk_line;
            p_set  <= lk_set;
            p_way  <= lk_victim;
            l_used[lk_set][lk_victim]  <= 1'b1;
            l_valid[lk_set][lk_victim] <= 1'b0;
            l_pref[lk_set][lk_victim]  <= 1'b1;
            l_tag[lk_set][lk_victim]   <= lk_line[LA_W-1:SW];
            fifo_ptr[lk_set]          <= WW'((32'(lk_victim) + 1) % WAYS);
            state                     <= S_PISSUE;
          end
        end
        S_PISSUE: if (dreq_ready) state <= S_WAIT;
        S_WAIT: if (l_valid[c_set][c_way]) state <= S_RESP;
        S_RESP: if (resp_ready) state <= S_IDLE;
        S_WR:   if (dreq_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
