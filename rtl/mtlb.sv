// mtlb: memory controller TLB.
//
// Maps pseudo-virtual (pv) addresses from the shadow controllers to physical
// DRAM addresses using the memory controller page table, a dense table of
// 4-byte entries (valid, ref, modify, fault, 28-bit frame; bit 31 down to 0)
// starting at physical page ptable_ptr of the requesting controller.
//
// Organisation: SETS x WAYS entries, each {valid, locked, tag, refcount, PTE}.
// The tag is the shadow controller index plus the 22-bit pv page number; the
// set index is the low bits of the page number. Replacement is not-recently-
// used driven by the per-entry reference counter (RC_W bits): a hit increments
// it; when it would saturate, every counter of the set is cleared and the hit
// entry set to 1 (this aging rule is this design's choice). The victim is an
// invalid entry, else the unlocked entry with the smallest counter. A small
// buffer of PBUF lines caches 128-byte lines of page table entries read from
// DRAM.
//
// Flow, after the MTLB flow model:
//   * New accesses enter the waiting queue (QDEPTH) and are served in order.
//   * LOOK (the 1-cycle MTLB access, buffer looked up in parallel):
//       hit         -> OUT
//       buffer hit  -> LOAD (1 extra cycle) -> OUT
//       buffer miss -> reserve a buffer line, read the PTE line from DRAM
//                      (FILL, FWAIT) -> LOAD -> OUT
//   * OUT forms the physical address {frame, pv[11:0]} and sends it on. The
//     ref bit is set on the first miss for a page, the modify bit on the first
//     write; when either changes the entry is locked and the PTE is written
//     back to DRAM (WB, a 4-byte masked write), then unlocked.
//   * A PTE that is not valid or has its fault bit set is not loaded; the
//     access is sent on with `out_err` set.
// Misses are handled one at a time: the MTLB stalls while its single
// outstanding fill is in flight (this design's choice; the flow model lets
// later accesses proceed under a pending miss).
//
// Timing: a hit leaves on out_* 2 cycles after the request is accepted into
// an empty queue; a miss that hits in the buffer, 3 cycles.
module mtlb
  import impulse_pkg::*;
#(
  parameter int SETS   = 16,
  parameter int WAYS   = 2,
  parameter int RC_W   = 2,
  parameter int PBUF   = 2,
  parameter int QDEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // pv requests from the shadow controllers
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [PV_W-1:0]    req_pv,
  input  logic [SCIDX_W-1:0] req_sc,
  input  logic [FRAME_W-1:0] req_ptable_ptr,
  input  logic               req_write,
  input  req_tag_t           req_tag,
  // translated requests to the MCache
  output logic               out_valid,
  input  logic               out_ready,
  output logic [PA_W-1:0]    out_paddr,
  output logic               out_write,
  output req_tag_t           out_tag,
  output logic               out_err,
  // page table reads / write-backs to the DRAM scheduler
  output logic               dreq_valid,
  input  logic               dreq_ready,
  output dram_req_t          dreq,
  input  logic               dresp_valid,
  input  dram_resp_t         dresp,
  // event pulses
  output logic               ev_hit,
  output logic               ev_buf_hit,
  output logic               ev_fill,
  output logic               ev_wb,
  output logic               ev_queued
);

  localparam int SW = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int WW = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int PW = (PBUF > 1) ? $clog2(PBUF) : 1;
  localparam int QW = $clog2(QDEPTH);
  localparam int TAG_W = SCIDX_W + VPN_W;

  typedef struct packed {
    logic [PV_W-1:0]    pv;
    logic [SCIDX_W-1:0] sc;
    logic [FRAME_W-1:0] ptp;
    logic               write;
    req_tag_t           tag;
  } qent_t;

  typedef enum logic [2:0] {S_LOOK, S_LOAD, S_FILL, S_FWAIT, S_OUT, S_WB} state_e;
  state_e state;

  // waiting queue
  qent_t         q_mem [QDEPTH];
  logic [QW:0]   q_cnt;
  logic [QW-1:0] q_rd, q_wr;
  logic          q_push, q_pop;
  qent_t         head;

  assign req_ready = (q_cnt != (QW+1)'(QDEPTH));
  assign q_push    = req_valid && req_ready;
  assign head      = q_mem[q_rd];
  assign ev_queued = q_push && (q_cnt != 0 || state != S_LOOK);

  // TLB arrays
  logic              e_valid  [SETS][WAYS];
  logic              e_locked [SETS][WAYS];
  logic [TAG_W-1:0]  e_tag    [SETS][WAYS];
  logic [RC_W-1:0]   e_rc     [SETS][WAYS];
  pte_t              e_pte    [SETS][WAYS];

  // PTE buffer
  logic              b_valid [PBUF];
  logic              b_fetch [PBUF];
  logic [LA_W-1:0]   b_line  [PBUF];
  logic [LINE_W-1:0] b_data  [PBUF];
  logic [PW-1:0]     b_victim, b_sel;

  // lookup of the queue head
  logic [VPN_W-1:0]  vpn;
  logic [SW-1:0]     set;
  logic [TAG_W-1:0]  tag;
  logic [PA_W-1:0]   pte_addr;
  logic [LA_W-1:0]   pte_line;
  logic [4:0]        pte_word;
  logic              hit;
  logic [WW-1:0]     hit_way;
  logic              bhit;
  logic [PW-1:0]     bhit_idx;
  pte_t              buf_pte;
  logic [WW-1:0]     victim;

  always_comb begin
    vpn      = head.pv[PV_W-1:PAGE_W];
    set      = SW'(vpn);
    tag      = {head.sc, vpn};
    pte_addr = {head.ptp, {PAGE_W{1'b0}}} + {{(PA_W-VPN_W-2){1'b0}}, vpn, 2'b00};
    pte_line = pte_addr[PA_W-1:OFF_W];
    pte_word = pte_addr[OFF_W-1:2];

    hit = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (e_valid[set][w] && e_tag[set][w] == tag) begin
        hit = 1'b1;
        hit_way = WW'(w);
      end

    bhit = 1'b0;
    bhit_idx = '0;
    for (int b = 0; b < PBUF; b++)
      if (b_valid[b] && b_line[b] == pte_line) begin
        bhit = 1'b1;
        bhit_idx = PW'(b);
      end
    buf_pte = pte_t'(b_data[bhit_idx][{pte_word, 5'b00000} +: 32]);

    // NRU victim: first invalid way, else unlocked way with the lowest count
    victim = '0;
    begin
      logic found;
      logic [RC_W:0] best;
      found = 1'b0;
      best  = {1'b1, {RC_W{1'b0}}};
      for (int w = 0; w < WAYS; w++)
        if (!found && !e_valid[set][w]) begin
          found  = 1'b1;
          victim = WW'(w);
        end
      if (!found)
        for (int w = 0; w < WAYS; w++)
          if (!e_locked[set][w] && {1'b0, e_rc[set][w]} < best) begin
            best   = {1'b0, e_rc[set][w]};
            victim = WW'(w);
          end
    end
  end

  // translation being sent
  pte_t        cur_pte;
  logic        cur_err;
  logic        wb_pend;
  logic [WW-1:0] cur_way;
  logic [SW-1:0] cur_set;
  logic [LA_W-1:0] cur_line;           // PTE location, kept for the write-back
  logic [4:0]      cur_word;

  assign out_valid = (state == S_OUT);
  assign out_paddr = {cur_pte.frame, head.pv[PAGE_W-1:0]};
  assign out_write = head.write;
  assign out_tag   = head.tag;
  assign out_err   = cur_err;
  assign q_pop     = out_valid && out_ready;

  always_comb begin
    dreq       = '0;
    dreq.line  = cur_line;
    dreq.tag   = DTAG_W'(b_sel);
    dreq.write = (state == S_WB);
    dreq.wmask = LINE_BYTES'(4'hF) << {cur_word, 2'b00};
    dreq.wdata = LINE_W'(cur_pte) << {cur_word, 5'b00000};
  end
  assign dreq_valid = (state == S_FILL) || (state == S_WB);

  assign ev_hit     = (state == S_LOOK) && q_cnt != 0 && hit;
  assign ev_buf_hit = (state == S_LOOK) && q_cnt != 0 && !hit && bhit && !b_fetch[bhit_idx];
  assign ev_fill    = (state == S_FILL) && dreq_ready;
  assign ev_wb      = (state == S_WB) && dreq_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOOK;
      q_cnt    <= '0;
      q_rd     <= '0;
      q_wr     <= '0;
      b_victim <= '0;
      b_sel    <= '0;
      cur_pte  <= '0;
      cur_err  <= 1'b0;
      wb_pend  <= 1'b0;
      cur_way  <= '0;
      cur_set  <= '0;
      cur_line <= '0;
      cur_word <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          e_valid[s][w]  <= 1'b0;
          e_locked[s][w] <= 1'b0;
          e_rc[s][w]     <= '0;
        end
      for (int b = 0; b < PBUF; b++) begin
        b_valid[b] <= 1'b0;
        b_fetch[b] <= 1'b0;
      end
    end else begin
      if (q_push) begin
        q_mem[q_wr] <= qent_t'{pv: req_pv, sc: req_sc, ptp: req_ptable_ptr,
                               write: req_write, tag: req_tag};
        q_wr <= (q_wr == QW'(QDEPTH-1)) ? '0 : q_wr + 1'b1;
      end
      if (q_pop) q_rd <= (q_rd == QW'(QDEPTH-1)) ? '0 : q_rd + 1'b1;
      q_cnt <= q_cnt + (QW+1)'(q_push) - (QW+1)'(q_pop);

      unique case (state)
        S_LOOK: if (q_cnt != 0) begin
          cur_set  <= set;
          cur_line <= pte_line;
          cur_word <= pte_word;
          if (hit) begin
            cur_way <= hit_way;
            cur_pte <= e_pte[set][hit_way];
            cur_err <= 1'b0;
            wb_pend <= 1'b0;
            if (e_rc[set][hit_way] == {RC_W{1'b1}}) begin
              for (int w = 0; w < WAYS; w++) e_rc[set][w] <= '0;
              e_rc[set][hit_way] <= RC_W'(1);
            end else begin
              e_rc[set][hit_way] <= e_rc[set][hit_way] + 1'b1;
            end
            if (head.write && !e_pte[set][hit_way].modify) begin
              e_pte[set][hit_way].modify  <= 1'b1;
              e_locked[set][hit_way]      <= 1'b1;
              cur_pte.modify              <= 1'b1;
              wb_pend                     <= 1'b1;
              for (int b = 0; b < PBUF; b++)
                if (b_valid[b] && b_line[b] == pte_line)
                  b_data[b][{pte_word, 5'b11101}] <= 1'b1;  // bit 29: modify
            end
            state <= S_OUT;
          end else if (bhit) begin
            b_sel <= bhit_idx;
            if (!b_fetch[bhit_idx]) state <= S_LOAD;    // else: stall
          end else begin
            b_sel              <= b_victim;
            b_valid[b_victim]  <= 1'b1;
            b_fetch[b_victim]  <= 1'b1;
            b_line[b_victim]   <= pte_line;
            b_victim           <= (b_victim == PW'(PBUF-1)) ? '0 : b_victim + 1'b1;
            state              <= S_FILL;
          end
        end
        S_FILL: if (dreq_ready) state <= S_FWAIT;
        S_FWAIT: if (dresp_valid) begin
          b_data[b_sel]  <= dresp.data;
          b_fetch[b_sel] <= 1'b0;
          state          <= S_LOOK;     // re-access: now a buffer hit
        end
        S_LOAD: begin
          if (!buf_pte.valid || buf_pte.fault) begin
            cur_pte <= buf_pte;
            cur_err <= 1'b1;
            wb_pend <= 1'b0;
          end else begin
            pte_t np;
            np        = buf_pte;
            np.ref_b  = 1'b1;
            if (head.write) np.modify = 1'b1;
            cur_pte   <= np;
            cur_err   <= 1'b0;
            cur_way   <= victim;
            wb_pend   <= (np != buf_pte);
            e_valid[set][victim]  <= 1'b1;
            e_locked[set][victim] <= (np != buf_pte);
            e_tag[set][victim]    <= tag;
            e_rc[set][victim]     <= RC_W'(1);
            e_pte[set][victim]    <= np;
            b_data[b_sel][{pte_word, 5'b00000} +: 32] <= np;
          end
          state <= S_OUT;
        end
        S_OUT: if (out_ready) state <= wb_pend ? S_WB : S_LOOK;
        S_WB: if (dreq_ready) begin
          e_locked[cur_set][cur_way] <= 1'b0;
          wb_pend <= 1'b0;
          state   <= S_LOOK;
        end
        default: state <= S_LOOK;
      endcase
    end
  end

endmodule
