// impulse_mmc: the Impulse main memory controller.
//
// Impulse adds a level of address translation inside the memory controller.
// Besides ordinary physical addresses, the system bus may carry shadow
// addresses (bits 39:38 = 2'b11): addresses that no DRAM backs and that the
// operating system has configured a shadow controller to remap, so that a
// cache line read from shadow space is gathered from scattered data (a
// strided column, a transposed matrix, elements chosen by an indirection
// vector, a superpage built from disjoint pages, a page-colored region).
//
// Data path, one cache line read:
//   physical:  bus -> MCache -> (miss) DRAM scheduler -> DRAM -> MCache -> bus
//   shadow:    bus -> shadow controller[addr 37:32] -> pv addresses -> MTLB
//              (pv -> physical via the MC page table) -> MCache -> DRAM
//              scheduler; returned lines go back to the shadow controller,
//              which assembles the line and returns it to the bus.
//   shadow write: the controller keeps the written line in its SRAM buffer
//              and issues one pv address per object as a write; when the
//              MCache accepts such a write, the object's bytes and byte mask
//              are read from the controller's buffer (selected by the
//              request tag) and the controller is told the object is done.
// Blocks: NUM_SC shadow_ctrl (each with shadow_regs and addr_calc), one mtlb,
// one mcache, one dram_sched. Arbitration between the shadow controllers for
// the MTLB and between the MTLB and the bus for the MCache is round robin;
// bus responses give the MCache priority over the shadow controllers. These
// arbiters, the number of shadow controllers and the plain request/response
// bus and DRAM ports are this design's choices.
//
// Bus port: a request is a line address with an optional write of a full
// line. Reads are answered on bus_resp_* with the line address, in any order
// between the MCache and the shadow controllers. Writes to physical memory
// are not answered. Shadow writes are scattered and not answered. Shadow
// reads and writes of a controller index >= NUM_SC are accepted and dropped.
// Control registers are written through a separate register port (cfg_*)
// that stands for the processor's uncached stores.
// Status: sc_busy shows each shadow controller's busy bit, and ev pulses
// once per mechanism event (for statistics counters).
// DRAM port: a line read or a byte-masked line write per handshake; reads
// return later, in any order, with the tag they were issued with.
module impulse_mmc
  import impulse_pkg::*;
#(
  parameter int NUM_SC     = 4,
  parameter int SC_QDEPTH  = 4,
  parameter int SBUF_LINES = 4,
  parameter int SC_LAT_HIT = 1,
  parameter int SC_LAT_PV  = 1,
  parameter int TLB_SETS   = 16,
  parameter int TLB_WAYS   = 2,
  parameter int TLB_RC_W   = 2,
  parameter int TLB_PBUF   = 2,
  parameter int MC_SETS    = 8,
  parameter int MC_WAYS    = 4,
  localparam int NPORT     = 2 + NUM_SC,
  localparam int IW        = $clog2(NPORT),
  localparam int DT_W      = IW + DTAG_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pref_en,      // MC-based prefetching on
  // system bus requests
  input  logic                  bus_req_valid,
  output logic                  bus_req_ready,
  input  logic [PA_W-1:0]       bus_req_addr,
  input  logic                  bus_req_write,
  input  logic [LINE_W-1:0]     bus_req_wdata,
  // system bus read data
  output logic                  bus_resp_valid,
  input  logic                  bus_resp_ready,
  output logic [PA_W-1:0]       bus_resp_addr,
  output logic [LINE_W-1:0]     bus_resp_data,
  output logic                  bus_resp_err,
  // shadow controller control registers
  input  logic                  cfg_we,
  input  logic [SCIDX_W-1:0]    cfg_sc,
  input  logic [4:0]            cfg_waddr,
  input  logic [31:0]           cfg_wdata,
  input  logic [4:0]            cfg_raddr,
  output logic [31:0]           cfg_rdata,
  // DRAM
  output logic                  dram_valid,
  input  logic                  dram_ready,
  output logic                  dram_write,
  output logic [LA_W-1:0]       dram_line,
  output logic [LINE_BYTES-1:0] dram_wmask,
  output logic [LINE_W-1:0]     dram_wdata,
  output logic [DT_W-1:0]       dram_tag,
  input  logic                  dram_rvalid,
  input  logic [DT_W-1:0]       dram_rtag,
  input  logic [LINE_W-1:0]     dram_rdata,
  // statistics
  output mmc_events_t           ev,
  output logic [NUM_SC-1:0]     sc_busy       // busy bit of each shadow controller
);

  localparam int SIW = (NUM_SC > 1) ? $clog2(NUM_SC) : 1;

  // ---------------- address decode ----------------
  logic               is_shadow;
  logic [SCIDX_W-1:0] sc_idx;
  logic               sc_exists;
  assign is_shadow = (bus_req_addr[39:38] == 2'b11);
  assign sc_idx    = bus_req_addr[37:32];
  assign sc_exists = (32'(sc_idx) < NUM_SC);

  // ---------------- shadow controllers ----------------
  logic [NUM_SC-1:0]        sc_req_valid, sc_req_ready;
  logic [NUM_SC-1:0]        sc_resp_valid, sc_resp_ready, sc_resp_err;
  logic [LINE_W-1:0]        sc_resp_data  [NUM_SC];
  logic [31:0]              sc_resp_saddr [NUM_SC];
  logic [NUM_SC-1:0]        sc_tlb_valid, sc_tlb_ready;
  logic [PV_W-1:0]          sc_tlb_pv     [NUM_SC];
  logic [SLOT_W-1:0]        sc_tlb_slot   [NUM_SC];
  logic [BLK_W-1:0]         sc_tlb_blk    [NUM_SC];
  logic [NUM_SC-1:0]        sc_tlb_write;
  logic [LINE_W-1:0]        sc_wobj_data  [NUM_SC];
  logic [LINE_BYTES-1:0]    sc_wobj_mask  [NUM_SC];
  logic [NUM_SC-1:0]        sc_wr_ack;
  logic [FRAME_W-1:0]       sc_tlb_ptp    [NUM_SC];
  logic [NUM_SC-1:0]        sc_obj_valid;
  logic [NUM_SC-1:0]        sc_iv_valid, sc_iv_ready;
  logic [LA_W-1:0]          sc_iv_line    [NUM_SC];
  logic [31:0]              sc_cfg_rdata  [NUM_SC];
  logic [NUM_SC-1:0]        sc_ev_q, sc_ev_sb, sc_ev_iv, sc_ev_pf, sc_ev_pw, sc_ev_sct;

  // MTLB output and MCache input selection
  logic                     tlb_out_valid, tlb_out_ready, tlb_out_write, tlb_out_err;
  logic [PA_W-1:0]          tlb_out_paddr;
  req_tag_t                 tlb_out_tag;
  logic                     mc_req_ready;
  logic                     sel_bus, last_bus;

  // MCache response (shared by all destinations)
  logic                     mc_resp_valid, mc_resp_ready, mc_resp_err;
  req_tag_t                 mc_resp_tag;
  logic [LINE_W-1:0]        mc_resp_data;
  logic [LA_W-1:0]          mc_resp_line;

  // DRAM scheduler ports
  logic [NPORT-1:0]         ds_req_valid, ds_req_ready, ds_resp_valid;
  dram_req_t                ds_req [NPORT];
  dram_resp_t               ds_resp;

  for (genvar i = 0; i < NUM_SC; i++) begin : g_sc
    shadow_ctrl #(.QDEPTH(SC_QDEPTH), .SBUF_LINES(SBUF_LINES),
                  .LAT_HIT(SC_LAT_HIT), .LAT_PV(SC_LAT_PV)) u_sc (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_sc == SCIDX_W'(i)), .cfg_waddr, .cfg_wdata,
      .cfg_raddr, .cfg_rdata(sc_cfg_rdata[i]),
      .req_valid(sc_req_valid[i]), .req_ready(sc_req_ready[i]),
      .req_saddr(bus_req_addr[31:0]), .req_write(bus_req_write), .req_wdata(bus_req_wdata),
      .resp_valid(sc_resp_valid[i]), .resp_ready(sc_resp_ready[i]),
      .resp_data(sc_resp_data[i]), .resp_err(sc_resp_err[i]),
      .resp_saddr(sc_resp_saddr[i]),
      .tlb_valid(sc_tlb_valid[i]), .tlb_ready(sc_tlb_ready[i]),
      .tlb_pv(sc_tlb_pv[i]), .tlb_write(sc_tlb_write[i]), .tlb_blk(sc_tlb_blk[i]), .tlb_slot(sc_tlb_slot[i]), .tlb_ptable_ptr(sc_tlb_ptp[i]),
      .obj_valid(sc_obj_valid[i]), .obj_blk(mc_resp_tag.blk), .obj_slot(mc_resp_tag.slot),
      .obj_data(mc_resp_data), .obj_err(mc_resp_err),
      .iv_req_valid(sc_iv_valid[i]), .iv_req_ready(sc_iv_ready[i]),
      .iv_req_line(sc_iv_line[i]),
      .iv_resp_valid(ds_resp_valid[2+i]), .iv_resp_data(ds_resp.data),
      .busy(sc_busy[i]), .ev_queued_busy(sc_ev_q[i]), .ev_sbuf_hit(sc_ev_sb[i]),
      .wsel_blk(tlb_out_tag.blk), .wsel_slot(tlb_out_tag.slot),
      .wobj_data(sc_wobj_data[i]), .wobj_mask(sc_wobj_mask[i]),
      .wr_ack_valid(sc_wr_ack[i]), .wr_ack_blk(tlb_out_tag.blk),
      .ev_pref_wait(sc_ev_pw[i]), .ev_pref(sc_ev_pf[i]), .ev_scatter(sc_ev_sct[i]),
      .ev_iv_fetch(sc_ev_iv[i])
    );

    always_comb begin
      ds_req[2+i]      = '0;
      ds_req[2+i].line = sc_iv_line[i];
    end
    assign ds_req_valid[2+i] = sc_iv_valid[i];
    assign sc_iv_ready[i]    = ds_req_ready[2+i];
    assign sc_req_valid[i]   = bus_req_valid && is_shadow && sc_idx == SCIDX_W'(i);
    // a scattered object is taken by the MCache
    assign sc_wr_ack[i]      = mc_req_ready && tlb_out_valid && !sel_bus && tlb_out_write &&
                               tlb_out_tag.sc == SCIDX_W'(i);
    assign sc_obj_valid[i]   = mc_resp_valid && !mc_resp_tag.sysif &&
                               mc_resp_tag.sc == SCIDX_W'(i);
  end

  assign cfg_rdata = (32'(cfg_sc) < NUM_SC) ? sc_cfg_rdata[SIW'(cfg_sc)] : '0;

  // ---------------- shadow controllers -> MTLB ----------------
  logic [SIW-1:0] tlb_rr, tlb_gnt;
  logic           tlb_any;
  always_comb begin
    tlb_any = 1'b0;
    tlb_gnt = '0;
    for (int i = 0; i < NUM_SC; i++) begin
      logic [SIW-1:0] p;
      p = SIW'((32'(tlb_rr) + i) % NUM_SC);
      if (!tlb_any && sc_tlb_valid[p]) begin
        tlb_any = 1'b1;
        tlb_gnt = p;
      end
    end
  end

  logic      tlb_req_ready;
  logic      tlb_ev_hit, tlb_ev_buf_hit, tlb_ev_fill, tlb_ev_wb, tlb_ev_queued;

  always_comb begin
    sc_tlb_ready = '0;
    sc_tlb_ready[tlb_gnt] = tlb_any && tlb_req_ready;
  end

  mtlb #(.SETS(TLB_SETS), .WAYS(TLB_WAYS), .RC_W(TLB_RC_W), .PBUF(TLB_PBUF)) u_mtlb (
    .clk, .rst_n,
    .req_valid(tlb_any), .req_ready(tlb_req_ready),
    .req_pv(sc_tlb_pv[tlb_gnt]), .req_sc(SCIDX_W'(tlb_gnt)),
    .req_ptable_ptr(sc_tlb_ptp[tlb_gnt]), .req_write(sc_tlb_write[tlb_gnt]),
    .req_tag(req_tag_t'{sysif: 1'b0, sc: SCIDX_W'(tlb_gnt), blk: sc_tlb_blk[tlb_gnt],
                          slot: sc_tlb_slot[tlb_gnt]}),
    .out_valid(tlb_out_valid), .out_ready(tlb_out_ready), .out_paddr(tlb_out_paddr),
    .out_write(tlb_out_write), .out_tag(tlb_out_tag), .out_err(tlb_out_err),
    .dreq_valid(ds_req_valid[1]), .dreq_ready(ds_req_ready[1]), .dreq(ds_req[1]),
    .dresp_valid(ds_resp_valid[1]), .dresp(ds_resp),
    .ev_hit(tlb_ev_hit), .ev_buf_hit(tlb_ev_buf_hit), .ev_fill(tlb_ev_fill),
    .ev_wb(tlb_ev_wb), .ev_queued(tlb_ev_queued)
  );

  // ---------------- MTLB / bus -> MCache ----------------
  logic phys_valid;
  assign phys_valid = bus_req_valid && !is_shadow;
  // alternate between the two sources when both are waiting
  assign sel_bus = phys_valid && (!tlb_out_valid || !last_bus);

  logic mc_ev_hit, mc_ev_miss, mc_ev_pi, mc_ev_ph, mc_ev_pd, mc_ev_stall, mc_ev_inval;

  mcache #(.SETS(MC_SETS), .WAYS(MC_WAYS)) u_mcache (
    .clk, .rst_n, .pref_en,
    .req_valid(phys_valid || tlb_out_valid), .req_ready(mc_req_ready),
    .req_paddr(sel_bus ? bus_req_addr : tlb_out_paddr),
    .req_write(sel_bus ? bus_req_write : tlb_out_write),
    .req_wdata(sel_bus ? bus_req_wdata : sc_wobj_data[SIW'(tlb_out_tag.sc)]),
    .req_wmask(sel_bus ? {LINE_BYTES{1'b1}} : sc_wobj_mask[SIW'(tlb_out_tag.sc)]),
    .req_tag(sel_bus ? req_tag_t'{sysif: 1'b1, sc: '0, blk: '0, slot: '0} : tlb_out_tag),
    .req_err(sel_bus ? 1'b0 : tlb_out_err),
    .resp_valid(mc_resp_valid), .resp_ready(mc_resp_ready), .resp_tag(mc_resp_tag),
    .resp_data(mc_resp_data), .resp_err(mc_resp_err), .resp_line(mc_resp_line),
    .dreq_valid(ds_req_valid[0]), .dreq_ready(ds_req_ready[0]), .dreq(ds_req[0]),
    .dresp_valid(ds_resp_valid[0]), .dresp(ds_resp),
    .ev_hit(mc_ev_hit), .ev_miss(mc_ev_miss), .ev_pref_issue(mc_ev_pi),
    .ev_pref_hit(mc_ev_ph), .ev_pref_drop(mc_ev_pd), .ev_stall(mc_ev_stall),
    .ev_inval(mc_ev_inval)
  );

  assign tlb_out_ready = mc_req_ready && !sel_bus;

  // bus request acceptance
  always_comb begin
    if (!is_shadow)
      bus_req_ready = mc_req_ready && sel_bus;
    else if (sc_exists)
      bus_req_ready = sc_req_ready[SIW'(sc_idx)];
    else
      bus_req_ready = 1'b1;           // dropped
  end

  // ---------------- responses to the bus ----------------
  logic           resp_from_mc;
  logic [SIW-1:0] sc_sel;
  logic           sc_any;
  always_comb begin
    sc_any = 1'b0;
    sc_sel = '0;
    for (int i = NUM_SC-1; i >= 0; i--)
      if (sc_resp_valid[i]) begin
        sc_any = 1'b1;
        sc_sel = SIW'(i);
      end
  end
  assign resp_from_mc   = mc_resp_valid && mc_resp_tag.sysif;
  assign bus_resp_valid = resp_from_mc || sc_any;
  assign bus_resp_addr  = resp_from_mc ? {mc_resp_line, {OFF_W{1'b0}}} :
                          {2'b11, SCIDX_W'(sc_sel), sc_resp_saddr[sc_sel]};
  assign bus_resp_data  = resp_from_mc ? mc_resp_data : sc_resp_data[sc_sel];
  assign bus_resp_err   = resp_from_mc ? mc_resp_err : sc_resp_err[sc_sel];
  assign mc_resp_ready  = mc_resp_tag.sysif ? bus_resp_ready : 1'b1;
  always_comb begin
    sc_resp_ready = '0;
    sc_resp_ready[sc_sel] = sc_any && !resp_from_mc && bus_resp_ready;
  end

  // ---------------- DRAM scheduler ----------------
  dram_sched #(.NPORT(NPORT)) u_sched (
    .clk, .rst_n,
    .req_valid(ds_req_valid), .req_ready(ds_req_ready), .req(ds_req),
    .resp_valid(ds_resp_valid), .resp(ds_resp),
    .dram_valid, .dram_ready, .dram_write, .dram_line, .dram_wmask, .dram_wdata,
    .dram_tag, .dram_rvalid, .dram_rtag, .dram_rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tlb_rr   <= '0;
      last_bus <= 1'b0;
    end else begin
      if (tlb_any && tlb_req_ready) tlb_rr <= SIW'((32'(tlb_gnt) + 1) % NUM_SC);
      if (mc_req_ready && (phys_valid || tlb_out_valid)) last_bus <= sel_bus;
    end
  end

  // ---------------- statistics ----------------
  always_comb begin
    ev               = '0;
    ev.shadow_req    = bus_req_valid && bus_req_ready && is_shadow && !bus_req_write && sc_exists;
    ev.phys_req      = bus_req_valid && bus_req_ready && !is_shadow;
    ev.sc_queued     = |sc_ev_q;
    ev.sc_sbuf_hit   = |sc_ev_sb;
    ev.sc_iv_fetch   = |sc_ev_iv;
    ev.sc_pref       = |sc_ev_pf;
    ev.sc_pref_wait  = |sc_ev_pw;
    ev.sc_scatter    = |sc_ev_sct;
    ev.tlb_hit       = tlb_ev_hit;
    ev.tlb_buf_hit   = tlb_ev_buf_hit;
    ev.tlb_fill      = tlb_ev_fill;
    ev.tlb_wb        = tlb_ev_wb;
    ev.tlb_queued    = tlb_ev_queued;
    ev.mc_hit        = mc_ev_hit;
    ev.mc_miss       = mc_ev_miss;
    ev.mc_pref_issue = mc_ev_pi;
    ev.mc_pref_hit   = mc_ev_ph;
    ev.mc_pref_drop  = mc_ev_pd;
    ev.mc_stall      = mc_ev_stall;
    ev.mc_inval      = mc_ev_inval;
  end

endmodule
