// tb_impulse_mmc: end-to-end test of the whole memory controller at its
// default parameters, with the DRAM model behind the DRAM port.
// Memory holds a page table per shadow controller (pv page v of controller s
// maps to a scattered frame, frame_of(s, v)) and an indirection vector.
// Controller 0 does direct mapping (no-copy superpage over disjoint frames),
// 1 stride mapping, 2 transpose mapping, 3 scatter/gather through the
// indirection vector. Every line returned on the bus is compared with a line
// built here from the mapping formulas, the page tables and the memory
// contents. Phases:
//   1. physical reads and writes: miss, hit (2-cycle answer), write
//      invalidation, read-after-write data;
//   2. one shadow read per controller;
//   3. a random mix of shadow and physical reads with bus back-pressure;
//   4. a mode switch: controller 0 is reconfigured to page-color mapping;
//   5. prefetches that find every way of a set being fetched (dropped) and
//      a demand read that must stall for a free way;
//   6. shadow-side prefetching: controller 1 reads a run of lines with
//      forward prefetching on, so reads find their line in the SRAM buffer,
//      complete or still being filled;
//   7. shadow writes: lines written through controllers 1 and 3 are
//      scattered to memory object by object (checked in DRAM, neighbours
//      untouched) and read back through the controller.
// It counts how often each mechanism occurred and fails if one never did.
module tb_impulse_mmc;
  import impulse_pkg::*;
  import tb_util_pkg::*;

  localparam int DT_W = 3 + DTAG_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  bus_req_valid = 0, bus_req_ready, bus_req_write = 0;
  logic [PA_W-1:0]       bus_req_addr = 0;
  logic [LINE_W-1:0]     bus_req_wdata = 0;
  logic                  bus_resp_valid, bus_resp_ready, bus_resp_err;
  logic [PA_W-1:0]       bus_resp_addr;
  logic [LINE_W-1:0]     bus_resp_data;
  logic                  cfg_we = 0;
  logic [SCIDX_W-1:0]    cfg_sc = 0;
  logic [4:0]            cfg_waddr = 0, cfg_raddr = 0;
  logic [31:0]           cfg_wdata = 0, cfg_rdata;
  logic                  dram_valid, dram_ready, dram_write, dram_rvalid;
  logic [LA_W-1:0]       dram_line;
  logic [LINE_BYTES-1:0] dram_wmask;
  logic [LINE_W-1:0]     dram_wdata, dram_rdata;
  logic [DT_W-1:0]       dram_tag, dram_rtag;
  mmc_events_t           ev;
  logic [3:0]            sc_busy;

  impulse_mmc dut (.clk, .rst_n, .pref_en(1'b1),
    .bus_req_valid, .bus_req_ready, .bus_req_addr, .bus_req_write, .bus_req_wdata,
    .bus_resp_valid, .bus_resp_ready, .bus_resp_addr, .bus_resp_data, .bus_resp_err,
    .cfg_we, .cfg_sc, .cfg_waddr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
    .dram_valid, .dram_ready, .dram_write, .dram_line, .dram_wmask, .dram_wdata, .dram_tag,
    .dram_rvalid, .dram_rtag, .dram_rdata, .ev, .sc_busy);

  dram_model #(.TAG_W(DT_W), .LAT(6), .JITTER(10), .SLOW_LAT(400)) u_dram (.clk, .rst_n,
    .valid(dram_valid), .ready(dram_ready), .write(dram_write), .line(dram_line),
    .wmask(dram_wmask), .wdata(dram_wdata), .tag(dram_tag), .rvalid(dram_rvalid),
    .rtag(dram_rtag), .rdata(dram_rdata));

  // ---------------- memory image ----------------
  localparam logic [FRAME_W-1:0] IV_PAGE = 28'h0000500;
  function automatic logic [FRAME_W-1:0] pt_page(input int s);
    return FRAME_W'(28'h0000100 + s * 16);
  endfunction
  function automatic logic [FRAME_W-1:0] frame_of(input int s, input longint v);
    return FRAME_W'(28'h0020000 + s * 28'h1000 + (v * 5) % 28'h1000);
  endfunction
  function automatic logic [31:0] iv_val(input longint i);
    return 32'((i * 37 + 5) % 4000);
  endfunction

  function automatic logic [7:0] mem_byte(input logic [PA_W-1:0] a);
    logic [31:0] w;
    w = u_dram.peek_word({a[PA_W-1:2], 2'b00});
    return w[a[1:0]*8 +: 8];
  endfunction

  // ---------------- expected shadow lines ----------------
  sc_cfg_t cfgs [4];

  function automatic logic [LINE_W-1:0] expected(input int s, input longint off);
    logic [LINE_W-1:0] d;
    longint n, sz, pv, o;
    sc_cfg_t c;
    c = cfgs[s];
    d = '0;
    unique case (map_type_e'(c.map_type))
      DIRECT_MAPPING, PAGECOLOR_MAPPING: begin n = 1; sz = 128; end
      STRIDE_MAPPING, INDIRVECTOR_MAPPING: begin sz = c.object_size; n = 128 / sz; end
      default: begin sz = c.elem_size; n = 128 / sz; end
    endcase
    for (longint k = 0; k < n; k++) begin
      unique case (map_type_e'(c.map_type))
        DIRECT_MAPPING: pv = off;
        PAGECOLOR_MAPPING:
          pv = (off / c.way_size) * c.color_size + (off % c.way_size) - c.color_offset;
        STRIDE_MAPPING: pv = (off / sz) * c.stride_size + c.object_offset + k * c.stride_size;
        INDIRVECTOR_MAPPING: pv = (longint'(iv_val(off / sz + k)) - c.fortran_sub) * sz;
        default: begin
          o  = off / sz;
          pv = (o % c.row_num) * c.row_size + (o / c.row_num) * sz + k * c.row_size;
        end
      endcase
      for (longint b = 0; b < sz; b++) begin
        longint p;
        p = pv + b;
        d[(k * sz + b) * 8 +: 8] = mem_byte({frame_of(s, p / 4096), 12'(p % 4096)});
      end
    end
    return d;
  endfunction

  // ---------------- checking of bus answers ----------------
  int checks = 0, failures = 0;
  logic [LINE_W-1:0] exp_data [logic [PA_W-1:0]];
  bit                exp_err  [logic [PA_W-1:0]];
  int                outstanding = 0;
  int                n_err_answers = 0;
  bit                bp_random = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) bus_resp_ready = bp_random ? ($urandom_range(3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && bus_resp_valid && bus_resp_ready) begin
    checks++;
    if (!exp_data.exists(bus_resp_addr)) begin
      failures++;
      $display("FAIL unexpected answer for %0h", bus_resp_addr);
    end else begin
      if (bus_resp_err !== exp_err[bus_resp_addr] ||
          (!exp_err[bus_resp_addr] && bus_resp_data !== exp_data[bus_resp_addr])) begin
        failures++;
        $display("FAIL answer for %0h (err %0d)", bus_resp_addr, bus_resp_err);
      end
      n_err_answers += int'(bus_resp_err);
      exp_data.delete(bus_resp_addr);
      exp_err.delete(bus_resp_addr);
      outstanding--;
    end
  end

  // ---------------- mechanism counters ----------------
  int c_shadow, c_phys, c_scq, c_sbuf, c_iv, c_thit, c_tbuf, c_tfill, c_twb, c_tq;
  int c_mhit, c_mmiss, c_mpi, c_mph, c_mpd, c_mstall, c_minval, c_switch;
  int c_scpf, c_scpw, c_sct;
  logic [3:0] seen_busy = '0;   // controllers whose busy bit was seen
  always @(posedge clk) if (rst_n) begin
    c_shadow += int'(ev.shadow_req); c_phys += int'(ev.phys_req);
    c_scq += int'(ev.sc_queued); c_sbuf += int'(ev.sc_sbuf_hit); c_iv += int'(ev.sc_iv_fetch);
    c_thit += int'(ev.tlb_hit); c_tbuf += int'(ev.tlb_buf_hit); c_tfill += int'(ev.tlb_fill);
    c_twb += int'(ev.tlb_wb); c_tq += int'(ev.tlb_queued);
    c_mhit += int'(ev.mc_hit); c_mmiss += int'(ev.mc_miss); c_mpi += int'(ev.mc_pref_issue);
    c_mph += int'(ev.mc_pref_hit); c_mpd += int'(ev.mc_pref_drop);
    c_mstall += int'(ev.mc_stall); c_minval += int'(ev.mc_inval);
    seen_busy |= sc_busy;
    c_scpf += int'(ev.sc_pref); c_scpw += int'(ev.sc_pref_wait);
    c_sct += int'(ev.sc_scatter);
  end

  // ---------------- drivers ----------------
  task automatic send(input logic [PA_W-1:0] a, input bit wr, input logic [LINE_W-1:0] wd);
    @(negedge clk);
    bus_req_valid = 1; bus_req_addr = a; bus_req_write = wr; bus_req_wdata = wd;
    do @(posedge clk); while (!bus_req_ready);
    #1 bus_req_valid = 0;
  endtask

  task automatic phys_read(input logic [LA_W-1:0] l);
    logic [PA_W-1:0] a;
    a = {l, 7'd0};
    if (exp_data.exists(a)) return;       // already outstanding
    exp_data[a] = u_dram.read_line(l);
    exp_err[a]  = 0;
    outstanding++;
    send(a, 0, '0);
  endtask

  task automatic shadow_read(input int s, input longint off, input bit err);
    logic [PA_W-1:0] a;
    a = {2'b11, 6'(s), 32'(longint'(cfgs[s].saddr_start) + off)};
    if (exp_data.exists(a)) return;       // already outstanding
    exp_data[a] = err ? '0 : expected(s, off);
    exp_err[a]  = err;
    outstanding++;
    send(a, 0, '0);
  endtask

  task automatic drain();
    int t;
    t = 0;
    while (outstanding > 0 && t < 20000) begin @(posedge clk); t++; end
    check("all answers arrived", outstanding == 0);
  endtask

  task automatic wr(input int s, input cfg_reg_e r, input logic [31:0] v);
    @(negedge clk);
    cfg_we = 1; cfg_sc = 6'(s); cfg_waddr = r; cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic configure(input int s, input sc_cfg_t n);
    cfgs[s] = n;
    wr(s, R_MAP_TYPE, n.map_type);        wr(s, R_SADDR_START, n.saddr_start);
    wr(s, R_SADDR_SIZE, n.saddr_size);    wr(s, R_PTABLE_PTR, n.ptable_ptr);
    wr(s, R_COLOR_SIZE, n.color_size);    wr(s, R_WAY_SIZE, n.way_size);
    wr(s, R_COLOR_OFF, n.color_offset);   wr(s, R_STRIDE_SIZE, 32'(n.stride_size));
    wr(s, R_OBJECT_SIZE, 32'(n.object_size)); wr(s, R_OBJECT_OFF, 32'(n.object_offset));
    wr(s, R_IV_PADDR, 32'(n.iv_paddr));   wr(s, R_IV_ELEMSIZE, 32'(n.iv_elemsize));
    wr(s, R_FORTRAN_SUB, 32'(n.fortran_sub)); wr(s, R_ELEM_SIZE, 32'(n.elem_size));
    wr(s, R_ROW_SIZE, n.row_size);        wr(s, R_ROW_NUM, n.row_num);
    wr(s, R_PREF_INFO, 32'(n.pref_info)); wr(s, R_PREF_COUNT, 32'(n.pref_count));
  endtask

  function automatic longint rand_off(input int s);
    unique case (s)
      0: return longint'($urandom_range(8191)) * 128;       // 1 MiB region
      1: return longint'($urandom_range(127)) * 128;        // 2048 objects of 8 bytes
      2: return longint'($urandom_range(8191)) * 128;       // 512 x 512 matrix of 4 bytes
      default: return longint'($urandom_range(127)) * 128; // 1024 objects of 16 bytes
    endcase
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sc_cfg_t n;
  int lat;
  logic [LINE_W-1:0] wd;

  initial begin
    // page tables and indirection vector
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 512; v++)
        u_dram.poke_word({pt_page(s), 12'h000} + PA_W'(v * 4), {4'b1000, frame_of(s, v)});
    for (int i = 0; i < 1100; i++)
      u_dram.poke_word({IV_PAGE, 12'h000} + PA_W'(i * 4), iv_val(i));
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. physical accesses ----
    phys_read(33'h8000);
    drain();
    repeat (30) @(posedge clk);
    exp_data[{33'h8000, 7'd0}] = u_dram.read_line(33'h8000);
    exp_err[{33'h8000, 7'd0}] = 0;
    outstanding++;
    send({33'h8000, 7'd0}, 0, '0);
    lat = 0;
    do begin @(negedge clk); lat++; end
    while (!(bus_resp_valid && bus_resp_addr == {33'h8000, 7'd0}));
    check($sformatf("physical hit answered after %0d cycles", lat), lat == 2);
    drain();
    wd = {32{$urandom}};
    send({33'h8000, 7'd0}, 1, wd);
    repeat (5) @(posedge clk);
    check("write reached DRAM", u_dram.read_line(33'h8000) == wd);
    phys_read(33'h8000);
    drain();

    // ---- 2. shadow controllers ----
    n = '0;
    n.saddr_size = 32'h0010_0000;
    n.map_type = DIRECT_MAPPING;     n.saddr_start = 32'h0000_0000; n.ptable_ptr = pt_page(0);
    configure(0, n);
    n = '0;
    n.saddr_size = 32'h0010_0000;
    n.map_type = STRIDE_MAPPING;     n.saddr_start = 32'h1000_0000; n.ptable_ptr = pt_page(1);
    n.object_size = 12'd8; n.stride_size = 16'd1024; n.object_offset = 12'd16;
    configure(1, n);
    n = '0;
    n.saddr_size = 32'h0010_0000;
    n.map_type = TRANSPOSE_MAPPING;  n.saddr_start = 32'h2000_0000; n.ptable_ptr = pt_page(2);
    n.elem_size = 12'd4; n.row_num = 32'd512; n.row_size = 32'd2048;
    configure(2, n);
    n = '0;
    n.saddr_size = 32'h0010_0000;
    n.map_type = INDIRVECTOR_MAPPING; n.saddr_start = 32'h3000_0000; n.ptable_ptr = pt_page(3);
    n.object_size = 12'd16; n.iv_paddr = IV_PAGE; n.iv_elemsize = 3'd4; n.fortran_sub = 1'b1;
    configure(3, n);
    cfg_sc = 6'd2; cfg_raddr = R_ROW_NUM;
    #1 check("register read back", cfg_rdata == 32'd512);
    for (int s = 0; s < 4; s++) begin
      shadow_read(s, 128 * (s + 1), 0);
      drain();
    end
    shadow_read(0, 128 * 1, 0);            // SRAM buffer hit
    shadow_read(1, 32'h0010_0000, 1);      // outside the region
    drain();

    // ---- 3. random mix ----
    bp_random = 1;
    for (int i = 0; i < 400; i++) begin
      int k;
      k = $urandom_range(9);
      if (k < 2) phys_read(LA_W'(33'h8100 + $urandom_range(63)));
      else begin
        int s;
        s = $urandom_range(3);
        shadow_read(s, rand_off(s), 0);
      end
      if ($urandom_range(7) == 0) repeat ($urandom_range(40)) @(posedge clk);
    end
    drain();
    bp_random = 0;

    // ---- 4. mode switch: controller 0 to page coloring ----
    n = cfgs[0];
    n.map_type = PAGECOLOR_MAPPING;
    n.way_size = 32'h1_0000; n.color_size = 32'h4000; n.color_offset = 32'h8000;
    n.saddr_size = 32'h0040_0000;
    configure(0, n);
    c_switch++;
    for (int i = 0; i < 20; i++)
      shadow_read(0, longint'($urandom_range(20)) * 32'h1_0000 + 32'h8000 +
                     longint'($urandom_range(127)) * 128, 0);
    drain();

    // ---- 5. full sets: dropped prefetches and a stalled demand ----
    // lines 0x40001 + 8*i all fall in MCache set 1 and are slow to fetch
    for (int i = 0; i < 6; i++) u_dram.set_slow(LA_W'(33'h4_0001 + 8 * i));
    for (int i = 0; i < 5; i++) begin
      phys_read(LA_W'(33'h4_0000 + 8 * i));   // each miss prefetches a slow line
      drain();
    end
    phys_read(LA_W'(33'h4_0031));             // set 1 full of lines being fetched
    drain();

    // ---- 6. shadow-side prefetching on controller 1 ----
    n = cfgs[1];
    n.pref_info = 2'd1; n.pref_count = 18'd128;
    configure(1, n);
    for (int i = 0; i < 12; i++) begin
      shadow_read(1, 128 * (40 + i), 0);
      drain();
      if (i % 2 == 0) repeat (300) @(posedge clk);
    end

    // ---- 7. shadow writes (scatter) ----
    for (int i = 0; i < 8; i++) begin
      int s;
      longint off;
      logic [LINE_W-1:0] d, nbr;
      s   = (i % 2 == 0) ? 1 : 3;
      off = rand_off(s);
      if (off == 127 * 128) off = 0;
      shadow_read(s, off, 0);               // buffer the line first
      drain();
      nbr = expected(s, off + 128);
      d   = {32{$urandom}};
      send({2'b11, 6'(s), 32'(longint'(cfgs[s].saddr_start) + off)}, 1, d);
      repeat (2000) @(posedge clk);
      check($sformatf("controller %0d scattered line in memory", s), expected(s, off) == d);
      check("neighbouring line untouched", expected(s, off + 128) == nbr);
      shadow_read(s, off, 0);
      drain();
    end

    $display("shadow %0d phys %0d | SC queued %0d sbuf-hit %0d iv-fetch %0d | MTLB hit %0d buf-hit %0d fill %0d wb %0d queued %0d",
             c_shadow, c_phys, c_scq, c_sbuf, c_iv, c_thit, c_tbuf, c_tfill, c_twb, c_tq);
    $display("MCache hit %0d miss %0d pref %0d pref-hit %0d pref-drop %0d stall %0d inval %0d | errors %0d switches %0d | SC prefetch %0d wait-on-fill %0d scatter %0d",
             c_mhit, c_mmiss, c_mpi, c_mph, c_mpd, c_mstall, c_minval, n_err_answers, c_switch,
             c_scpf, c_scpw, c_sct);
    check("shadow requests",         c_shadow > 0);
    check("physical requests",       c_phys > 0);
    check("SC waiting queue used",   c_scq > 0);
    check("SC SRAM buffer hit",      c_sbuf > 0);
    check("indirection vector fetch", c_iv > 0);
    check("MTLB hit",                c_thit > 0);
    check("MTLB buffer hit",         c_tbuf > 0);
    check("MTLB fill",               c_tfill > 0);
    check("PTE write-back",          c_twb > 0);
    check("MTLB waiting queue used", c_tq > 0);
    check("MCache hit",              c_mhit > 0);
    check("MCache miss",             c_mmiss > 0);
    check("next-line prefetch",      c_mpi > 0);
    check("prefetched line hit",     c_mph > 0);
    check("prefetch discarded",      c_mpd > 0);
    check("stall on full set",       c_mstall > 0);
    check("write invalidation",      c_minval > 0);
    check("out-of-region error",     n_err_answers > 0);
    check("mode switch",             c_switch > 0);
    check("every controller busy",   seen_busy == 4'hF);
    check("SC prefetch",             c_scpf > 0);
    check("SC scatter",              c_sct > 0);
    check("SC read of a block being filled", c_scpw > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
