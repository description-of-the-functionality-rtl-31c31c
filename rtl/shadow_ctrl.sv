// shadow_ctrl: one shadow controller (SCtrl).
//
// It turns a read of one cache line of shadow address space into the
// pseudo-virtual (pv) addresses of the objects that make up that line, sends
// them one per cycle to the MTLB, gathers the returned objects into a
// line-sized block of its SRAM buffer and hands the assembled line back to
// the system interface; a shadow write is scattered the same way, object by
// object. It contains the control registers (shadow_regs), the
// AddrCalc ALU (addr_calc), the SRAM buffer of SBUF_LINES blocks, a
// cache-line-sized SRAM holding the current line of the indirection vector,
// and the control FSM.
//
// Control flow, after the shadow controller flow model:
//   * A new access enters the waiting queue (QDEPTH entries); while the
//     controller is busy it waits there. IDLE takes the head of the queue.
//   * CHECK: the line is looked up in the SRAM buffer.
//       hit on a complete block   - the block is marked for return.
//       hit on a block being filled (a prefetch or an earlier miss) - the
//                                   block is marked for return and goes out
//                                   once its last object has arrived.
//       miss - the controller reserves a free block (round robin; a block
//              being filled or waiting to be returned is never taken) and
//              generates addresses. With no free block a demand access waits
//              in CHECK.
//     An offset outside [saddr_start, saddr_start + saddr_size) or an unknown
//     map_type is answered with an all-zero line and `err` (ERR).
//   * ISSUE: first pv address, then next pv addresses, one per accepted MTLB
//     request, tagged {block, slot}, until all objects of the line are
//     generated. For the indirection-vector mapping each address needs
//     iv[index]: if the element's line is not in the indirection-vector SRAM
//     the controller fetches it from DRAM first (IVREQ/IVWAIT).
//   * Once all pv addresses are generated the controller is free: it does not
//     wait for the data. Returned lines arrive tagged with block and slot; the
//     object (object size bytes at the pv's offset within the line) is put at
//     slot * object size of its block. A block whose last object arrived and
//     that is marked for return is presented on resp_*; several complete
//     blocks go out lowest block number first.
//   * PREF: after each demand access, if pref_info asks for it, the line
//     pref_count bytes after (forward) or before (backward) is fetched into
//     the SRAM buffer the same way, but not returned. It is dropped when it is
//     outside the region, already buffered, or no block is free.
//   * Scatter (a shadow write): CHECK waits until a buffered copy of the line
//     is neither being filled nor waiting to be returned, drops it, and
//     reserves a block for the write data; ISSUE then sends the pv addresses
//     with tlb_write set. When the memory side takes object {blk, slot} it
//     reads wobj_data/wobj_mask (the object moved to its offset in the
//     physical line, with its byte mask) and pulses wr_ack; the block is free
//     once every object is acknowledged. Writes are not answered, and a write
//     outside the region is dropped.
// Objects are 4..128 bytes, a power of two, and do not cross a line; direct
// and page-color mapping move one whole 128-byte line.
//
// Design choices where the flow model is silent: the whole scatter path
// (the flow model shows reads); pref_info is 1 = forward, 2 = backward, 0 or
// 3 = no prefetch; a prefetch follows every demand read; a second access to
// a line that is still waiting to be returned waits in CHECK; any write to
// the control registers invalidates the buffer (blocks in flight still
// complete). A line with any failed object is returned with `err` and then
// dropped.
//
// Stage latencies: the flow model marks its stages as taking a configurable
// number of cycles without giving numbers. LAT_HIT is the length of CHECK
// (buffer lookup and block reservation) and LAT_PV the number of cycles per
// pv address in ISSUE (first and next address); a counter holds the FSM for
// the extra cycles. Both default to 1. The queue, return and IV stages take
// one cycle.
//
// Interfaces are valid/ready handshakes; obj_* and iv_resp_* have no ready
// and are always accepted. Latency for an SRAM-buffer hit on a complete block:
// 2 + LAT_HIT cycles from req acceptance to resp_valid (IDLE, CHECK, then the
// return flag is set); consecutive pv addresses of a line are at least LAT_PV
// cycles apart. SBUF_LINES is at most 2**BLK_W.
module shadow_ctrl
  import impulse_pkg::*;
#(
  parameter int QDEPTH     = 4,
  parameter int SBUF_LINES = 4,
  parameter int LAT_HIT    = 1,   // cycles of the buffer lookup / block reservation (CHECK)
  parameter int LAT_PV     = 1    // cycles to produce each pv address (ISSUE)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control register port (uncached stores from the processor)
  input  logic               cfg_we,
  input  logic [4:0]         cfg_waddr,
  input  logic [31:0]        cfg_wdata,
  input  logic [4:0]         cfg_raddr,
  output logic [31:0]        cfg_rdata,
  // shadow access from the system interface (offset in shadow region)
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [31:0]        req_saddr,
  input  logic               req_write,
  input  logic [LINE_W-1:0]  req_wdata,
  // assembled line back to the system interface
  output logic               resp_valid,
  input  logic               resp_ready,
  output logic [LINE_W-1:0]  resp_data,
  output logic               resp_err,
  output logic [31:0]        resp_saddr,
  // pv address to the MTLB
  output logic               tlb_valid,
  input  logic               tlb_ready,
  output logic [PV_W-1:0]    tlb_pv,
  output logic               tlb_write,
  output logic [BLK_W-1:0]   tlb_blk,
  output logic [SLOT_W-1:0]  tlb_slot,
  output logic [FRAME_W-1:0] tlb_ptable_ptr,
  // physical line holding a requested object
  input  logic               obj_valid,
  input  logic [BLK_W-1:0]   obj_blk,
  input  logic [SLOT_W-1:0]  obj_slot,
  input  logic [LINE_W-1:0]  obj_data,
  input  logic               obj_err,
  // scatter: the object of {wsel_blk, wsel_slot} to be written, placed at its
  // offset in the physical line, and the acknowledge once it is taken
  input  logic [BLK_W-1:0]   wsel_blk,
  input  logic [SLOT_W-1:0]  wsel_slot,
  output logic [LINE_W-1:0]  wobj_data,
  output logic [LINE_BYTES-1:0] wobj_mask,
  input  logic               wr_ack_valid,
  input  logic [BLK_W-1:0]   wr_ack_blk,
  // indirection-vector line fetch from DRAM
  output logic               iv_req_valid,
  input  logic               iv_req_ready,
  output logic [LA_W-1:0]    iv_req_line,
  input  logic               iv_resp_valid,
  input  logic [LINE_W-1:0]  iv_resp_data,
  // status and event pulses (for statistics)
  output logic               busy,
  output logic               ev_queued_busy,
  output logic               ev_sbuf_hit,
  output logic               ev_pref_wait,
  output logic               ev_pref,
  output logic               ev_scatter,
  output logic               ev_iv_fetch
);

  localparam int QW = $clog2(QDEPTH);
  localparam int BW = BLK_W;
  localparam int NB = SBUF_LINES;
  localparam logic [7:0] LAT_HIT_M1 = 8'(LAT_HIT - 1);
  localparam logic [7:0] LAT_PV_M1  = 8'(LAT_PV - 1);

  // extra cycles still to spend in the current stage
  logic [7:0] stg_wait;
  logic       stg_go;
  assign stg_go = (stg_wait == '0);

  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_IVCHK, S_IVREQ, S_IVWAIT, S_ISSUE, S_PREF, S_ERR
  } state_e;

  state_e state;

  sc_cfg_t cfg;
  logic    cfg_changed;

  shadow_regs u_regs (
    .clk, .rst_n,
    .we(cfg_we), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .raddr(cfg_raddr), .rdata(cfg_rdata),
    .cfg, .cfg_changed
  );

  // ---------------- waiting queue ----------------
  logic [31:0] q_mem [QDEPTH];
  logic        q_wflag [QDEPTH];
  logic [LINE_W-1:0] q_data [QDEPTH];
  logic [QW:0] q_cnt;
  logic [QW-1:0] q_rd, q_wr;
  logic        q_push, q_pop;

  assign req_ready = (q_cnt != (QW+1)'(QDEPTH));
  assign q_push    = req_valid && req_ready;

  // line being worked on: a demand access or a prefetch
  logic [31:0] cur;
  logic        cur_pref;
  logic        cur_write;
  logic [LINE_W-1:0] cur_wdata;

  // ---------------- SRAM buffer ----------------
  // b_valid: tag is valid; b_cnt/b_need: objects returned/expected (the block
  // is being filled while they differ); b_ret: marked for return.
  logic [LINE_W-1:0]      sb_data  [NB];
  logic [31-OFF_W:0]      b_tag    [NB];
  logic [NB-1:0]          b_valid, b_ret, b_err, b_fill;
  logic [SLOT_W:0]        b_cnt    [NB];
  logic [SLOT_W:0]        b_need   [NB];
  logic [OFF_W-1:0]       b_objm1  [NB];
  logic [OFF_W-1:0]       offs     [NB][MAX_OBJS];
  logic [BW-1:0]          sb_ptr, rb;

  for (genvar b = 0; b < NB; b++) begin : g_fill
    assign b_fill[b] = (b_cnt[b] != b_need[b]);
  end

  // ---------------- indirection vector SRAM ----------------
  logic [LINE_W-1:0]      iv_line;
  logic [LA_W-1:0]        iv_tag;
  logic                   iv_valid;
  logic [31:0]            iv_idx;
  logic [31:0]            iv_elem;

  // ---------------- address generation ----------------
  logic                   in_range;
  logic [PV_W-1:0]        first_pv, step, iv_pv, pv;
  logic [SLOT_W:0]        n_objs, nobj, k;
  logic [OFF_W-1:0]       obj_m1;
  logic [31:0]            iv_first_idx;
  logic [PA_W-1:0]        iv_eaddr;
  logic                   is_iv, map_ok;

  addr_calc u_calc (
    .cfg, .saddr(cur), .iv_idx, .iv_elem,
    .in_range, .first_pv, .step, .n_objs, .obj_bytes_m1(obj_m1),
    .iv_first_idx, .iv_eaddr, .iv_pv
  );

  assign is_iv  = (map_type_e'(cfg.map_type) == INDIRVECTOR_MAPPING);
  assign map_ok = cfg.map_type inside {DIRECT_MAPPING, PAGECOLOR_MAPPING, STRIDE_MAPPING,
                                       INDIRVECTOR_MAPPING, TRANSPOSE_MAPPING};

  // element iv[iv_idx] from the indirection-vector SRAM
  always_comb begin
    logic [LINE_W-1:0] sh;
    sh = iv_line >> {iv_eaddr[OFF_W-1:0], 3'b000};
    unique case (cfg.iv_elemsize)
      3'd1:    iv_elem = {24'd0, sh[7:0]};
      3'd2:    iv_elem = {16'd0, sh[15:0]};
      default: iv_elem = sh[31:0];
    endcase
  end

  logic iv_hit;
  assign iv_hit = iv_valid && (iv_tag == iv_eaddr[PA_W-1:OFF_W]);

  // SRAM buffer lookup of `cur`, and the free block for a reservation
  logic          sb_hit, free_found;
  logic [BW-1:0] sb_hit_idx, free_idx;
  always_comb begin
    sb_hit     = 1'b0;
    sb_hit_idx = '0;
    for (int i = 0; i < NB; i++)
      if (b_valid[i] && b_tag[i] == cur[31:OFF_W]) begin
        sb_hit     = 1'b1;
        sb_hit_idx = BW'(i);
      end
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = 0; i < NB; i++) begin
      logic [BW-1:0] b;
      b = BW'((32'(sb_ptr) + i) % NB);
      if (!free_found && !b_fill[b] && !b_ret[b]) begin
        free_found = 1'b1;
        free_idx   = b;
      end
    end
  end

  // prefetch target: pref_count bytes forward or backward of the demand line
  logic        pref_on;
  logic [31:0] pref_addr;
  assign pref_on   = (cfg.pref_info == 2'd1) || (cfg.pref_info == 2'd2);
  assign pref_addr = (cfg.pref_info == 2'd2) ? cur - 32'(cfg.pref_count)
                                             : cur + 32'(cfg.pref_count);

  // object extraction: obj_bytes at offs[blk][slot] of the returned line,
  // placed at slot * obj_bytes of the block
  logic [LINE_W-1:0] obj_mask, obj_shifted, obj_place, obj_pmask;
  logic [10:0]       obj_bits;
  always_comb begin
    obj_bits    = 11'({4'd0, b_objm1[obj_blk]} + 11'd1) << 3;
    obj_mask    = {LINE_W{1'b1}} >> (11'(LINE_W) - obj_bits);
    obj_shifted = (obj_data >> {offs[obj_blk][obj_slot], 3'b000}) & obj_mask;
    obj_place   = obj_shifted << (obj_bits * 11'(obj_slot));
    obj_pmask   = obj_mask << (obj_bits * 11'(obj_slot));
  end

  // scatter: object of a write block, moved to its offset in the target line
  always_comb begin
    logic [10:0]       wbits;
    logic [LINE_W-1:0] wmask_b;
    logic [LINE_BYTES-1:0] bmask;
    wbits     = 11'({4'd0, b_objm1[wsel_blk]} + 11'd1) << 3;
    wmask_b   = {LINE_W{1'b1}} >> (11'(LINE_W) - wbits);
    bmask     = {LINE_BYTES{1'b1}} >> (8'(LINE_BYTES - 1) - 8'(b_objm1[wsel_blk]));
    wobj_data = ((sb_data[wsel_blk] >> (wbits * 11'(wsel_slot))) & wmask_b)
                << {offs[wsel_blk][wsel_slot], 3'b000};
    wobj_mask = bmask << offs[wsel_blk][wsel_slot];
  end

  // return: an error answer first, else the lowest complete marked block
  logic          ret_any;
  logic [BW-1:0] ret_sel;
  always_comb begin
    ret_any = 1'b0;
    ret_sel = '0;
    for (int i = 0; i < NB; i++)
      if (!ret_any && b_ret[i] && !b_fill[i]) begin
        ret_any = 1'b1;
        ret_sel = BW'(i);
      end
  end

  logic resp_blk;
  assign resp_blk   = (state != S_ERR) && ret_any;
  assign resp_valid = (state == S_ERR) || ret_any;
  assign resp_err   = (state == S_ERR) || b_err[ret_sel];
  assign resp_saddr = (state == S_ERR) ? {cur[31:OFF_W], {OFF_W{1'b0}}}
                                       : {b_tag[ret_sel], {OFF_W{1'b0}}};
  assign resp_data  = resp_err ? '0 : sb_data[ret_sel];

  assign tlb_valid      = (state == S_ISSUE) && stg_go;
  assign tlb_pv         = pv;
  assign tlb_write      = cur_write;
  assign tlb_blk        = rb;
  assign tlb_slot       = k[SLOT_W-1:0];
  assign tlb_ptable_ptr = cfg.ptable_ptr;

  assign iv_req_valid   = (state == S_IVREQ);
  assign iv_req_line    = iv_eaddr[PA_W-1:OFF_W];

  logic chk_ok;
  assign chk_ok = (state == S_CHECK) && stg_go && in_range && map_ok;

  assign busy           = (state != S_IDLE);
  assign q_pop          = (state == S_IDLE) && stg_go && (q_cnt != 0);
  assign ev_queued_busy = q_push && (busy || q_cnt != 0);
  assign ev_sbuf_hit    = chk_ok && !cur_pref && !cur_write && sb_hit && !b_ret[sb_hit_idx];
  assign ev_pref_wait   = ev_sbuf_hit && b_fill[sb_hit_idx];
  assign ev_pref        = chk_ok && cur_pref && !sb_hit && free_found;
  assign ev_scatter     = chk_ok && cur_write && free_found &&
                          !(sb_hit && (b_fill[sb_hit_idx] || b_ret[sb_hit_idx]));
  assign ev_iv_fetch    = iv_req_valid && iv_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      q_cnt    <= '0;
      q_rd     <= '0;
      q_wr     <= '0;
      cur      <= '0;
      cur_pref <= 1'b0;
      cur_write <= 1'b0;
      stg_wait <= '0;
      b_valid  <= '0;
      b_ret    <= '0;
      b_err    <= '0;
      sb_ptr   <= '0;
      rb       <= '0;
      iv_valid <= 1'b0;
      iv_idx   <= '0;
      pv       <= '0;
      k        <= '0;
      nobj     <= '0;
      for (int b = 0; b < NB; b++) begin
        b_cnt[b]   <= '0;
        b_need[b]  <= '0;
        b_objm1[b] <= '0;
      end
    end else begin
      // waiting queue
      if (q_push) begin
        q_mem[q_wr]   <= req_saddr;
        q_wflag[q_wr] <= req_write;
        q_data[q_wr]  <= req_wdata;
        q_wr <= (q_wr == QW'(QDEPTH-1)) ? '0 : q_wr + 1'b1;
      end
      if (q_pop) q_rd <= (q_rd == QW'(QDEPTH-1)) ? '0 : q_rd + 1'b1;
      q_cnt <= q_cnt + (QW+1)'(q_push) - (QW+1)'(q_pop);

      // returned objects
      if (obj_valid) begin
        sb_data[obj_blk] <= (sb_data[obj_blk] & ~obj_pmask) | obj_place;
        b_cnt[obj_blk]   <= b_cnt[obj_blk] + 1'b1;
        if (obj_err) b_err[obj_blk] <= 1'b1;
      end
      if (wr_ack_valid) b_cnt[wr_ack_blk] <= b_cnt[wr_ack_blk] + 1'b1;

      // a returned block; a failed line is not kept
      if (resp_blk && resp_ready) begin
        b_ret[ret_sel] <= 1'b0;
        if (b_err[ret_sel]) b_valid[ret_sel] <= 1'b0;
      end

      // a stage with a longer latency holds the FSM for its extra cycles
      if (!stg_go) stg_wait <= stg_wait - 1'b1;
      else unique case (state)
        S_IDLE: if (q_cnt != 0) begin
          stg_wait  <= LAT_HIT_M1;
          cur       <= q_mem[q_rd];
          cur_write <= q_wflag[q_rd];
          cur_wdata <= q_data[q_rd];
          cur_pref  <= 1'b0;
          state    <= S_CHECK;
        end
        S_CHECK: begin
          if (!in_range || !map_ok) begin
            state <= (cur_pref || cur_write) ? S_IDLE : S_ERR;
          end else if (cur_write) begin
            // scatter: wait until a buffered copy of the line is idle, drop
            // it, and put the data in a write block
            if (!(sb_hit && (b_fill[sb_hit_idx] || b_ret[sb_hit_idx])) && free_found) begin
              if (sb_hit) b_valid[sb_hit_idx] <= 1'b0;
              rb                <= free_idx;
              sb_ptr            <= BW'((32'(free_idx) + 1) % NB);
              b_valid[free_idx] <= 1'b0;
              b_ret[free_idx]   <= 1'b0;
              b_err[free_idx]   <= 1'b0;
              b_cnt[free_idx]   <= '0;
              b_need[free_idx]  <= n_objs;
              b_objm1[free_idx] <= obj_m1;
              sb_data[free_idx] <= cur_wdata;
              nobj              <= n_objs;
              k                 <= '0;
              iv_idx            <= iv_first_idx;
              pv                <= first_pv;
              stg_wait          <= LAT_PV_M1;
              state             <= is_iv ? S_IVCHK : S_ISSUE;
            end
          end else if (sb_hit) begin
            if (cur_pref) begin
              state <= S_IDLE;
            end else if (!b_ret[sb_hit_idx]) begin
              b_ret[sb_hit_idx] <= 1'b1;
              state             <= S_PREF;
            end
          end else if (free_found) begin
            rb                <= free_idx;
            sb_ptr            <= BW'((32'(free_idx) + 1) % NB);
            b_valid[free_idx] <= 1'b1;
            b_tag[free_idx]   <= cur[31:OFF_W];
            b_ret[free_idx]   <= !cur_pref;
            b_err[free_idx]   <= 1'b0;
            b_cnt[free_idx]   <= '0;
            b_need[free_idx]  <= n_objs;
            b_objm1[free_idx] <= obj_m1;
            nobj              <= n_objs;
            k                 <= '0;
            iv_idx            <= iv_first_idx;
            pv                <= first_pv;
            stg_wait          <= LAT_PV_M1;
            state             <= is_iv ? S_IVCHK : S_ISSUE;
          end else if (cur_pref) begin
            state <= S_IDLE;
          end
        end
        S_IVCHK: begin
          if (iv_hit) begin
            pv    <= iv_pv;
            state <= S_ISSUE;
          end else begin
            state <= S_IVREQ;
          end
        end
        S_IVREQ: if (iv_req_ready) state <= S_IVWAIT;
        S_IVWAIT: if (iv_resp_valid) begin
          iv_line  <= iv_resp_data;
          iv_tag   <= iv_eaddr[PA_W-1:OFF_W];
          iv_valid <= 1'b1;
          state    <= S_IVCHK;
        end
        S_ISSUE: if (tlb_ready) begin
          offs[rb][k[SLOT_W-1:0]] <= pv[OFF_W-1:0];
          k <= k + 1'b1;
          if (k + 1'b1 != nobj) stg_wait <= LAT_PV_M1;
          if (k + 1'b1 == nobj) begin
            state <= (cur_pref || cur_write) ? S_IDLE : S_PREF;
          end else if (is_iv) begin
            iv_idx <= iv_idx + 32'd1;
            state  <= S_IVCHK;
          end else begin
            pv <= pv + step;
          end
        end
        S_PREF: begin
          if (pref_on && cfg.pref_count[17:OFF_W] != '0) begin
            cur      <= pref_addr;
            cur_pref <= 1'b1;
            stg_wait <= LAT_HIT_M1;
            state    <= S_CHECK;
          end else begin
            state <= S_IDLE;
          end
        end
        S_ERR: if (resp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      if (cfg_changed) begin
        b_valid  <= '0;
        iv_valid <= 1'b0;
      end
    end
  end

endmodule
