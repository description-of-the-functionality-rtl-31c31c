// tb_shadow_ctrl: one shadow controller with a behavioural stand-in for the
// MTLB, MCache and DRAM: a pv address p is translated to physical address
// p + PV_BASE and the line holding it is returned after a random delay,
// possibly out of order. Indirection-vector lines are served from a vector
// iv[i] = (i * 37 + 5) % 4000.
// For each remapping type the controller is configured through its register
// port and several shadow lines are read; each assembled line is compared
// with one built here from the address formulas of that mapping. Also
// checked: SRAM-buffer hits (answered 3 cycles after acceptance, no memory
// traffic), accesses queued behind a busy controller, indirection-vector
// fetches, the error answer for an offset outside the shadow region, that
// the controller is free again while the data of its last line is still
// outstanding, and forward/backward prefetching into the SRAM buffer (a
// later read of the prefetched line needs no new memory request), and
// shadow writes: each object lands at its mapped address with its byte mask,
// neighbouring data is untouched, a buffered copy of the line is dropped, and
// writes outside the region are ignored.
// The controller runs with stage latencies other than its defaults
// (LAT_HIT, LAT_PV below); the buffer-hit latency must be 2 + LAT_HIT cycles
// and consecutive pv addresses of a line must be LAT_PV cycles apart or more,
// exactly LAT_PV when the MTLB is ready.
module tb_shadow_ctrl;
  import impulse_pkg::*;
  import tb_util_pkg::*;

  localparam int LAT_HIT = 2;
  localparam int LAT_PV  = 3;
  localparam logic [PA_W-1:0] PV_BASE = 40'h10_0000_0000;
  localparam logic [FRAME_W-1:0] IV_PAGE = 28'h0077000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               cfg_we = 0;
  logic [4:0]         cfg_waddr = 0, cfg_raddr = 0;
  logic [31:0]        cfg_wdata = 0, cfg_rdata;
  logic               req_valid = 0, req_ready;
  logic [31:0]        req_saddr = 0;
  logic               req_write = 0;
  logic [LINE_W-1:0]  req_wdata = 0;
  logic               resp_valid, resp_ready = 1, resp_err;
  logic [LINE_W-1:0]  resp_data;
  logic [31:0]        resp_saddr;
  logic               tlb_valid, tlb_ready;
  logic [PV_W-1:0]    tlb_pv;
  logic [SLOT_W-1:0]  tlb_slot;
  logic [BLK_W-1:0]   tlb_blk;
  logic               tlb_write;
  logic [BLK_W-1:0]   wsel_blk = 0, wr_ack_blk = 0;
  logic [SLOT_W-1:0]  wsel_slot = 0;
  logic [LINE_W-1:0]  wobj_data;
  logic [LINE_BYTES-1:0] wobj_mask;
  logic               wr_ack_valid = 0;
  logic [FRAME_W-1:0] tlb_ptable_ptr;
  logic               obj_valid = 0, obj_err = 0;
  logic [SLOT_W-1:0]  obj_slot = 0;
  logic [BLK_W-1:0]   obj_blk = 0;
  logic [LINE_W-1:0]  obj_data = 0;
  logic               iv_req_valid, iv_req_ready = 1, iv_resp_valid = 0;
  logic [LA_W-1:0]    iv_req_line;
  logic [LINE_W-1:0]  iv_resp_data = 0;
  logic               busy, ev_queued_busy, ev_sbuf_hit, ev_iv_fetch, ev_pref, ev_pref_wait, ev_scatter;

  shadow_ctrl #(.LAT_HIT(LAT_HIT), .LAT_PV(LAT_PV)) dut (.clk, .rst_n, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
    .req_valid, .req_ready, .req_saddr, .req_write, .req_wdata, .resp_valid, .resp_ready, .resp_data, .resp_err,
    .resp_saddr, .tlb_valid, .tlb_ready, .tlb_pv, .tlb_write, .tlb_blk, .tlb_slot, .tlb_ptable_ptr,
    .obj_valid, .obj_blk, .obj_slot, .obj_data, .obj_err,
    .wsel_blk, .wsel_slot, .wobj_data, .wobj_mask, .wr_ack_valid, .wr_ack_blk,
    .iv_req_valid, .iv_req_ready, .iv_req_line, .iv_resp_valid, .iv_resp_data,
    .busy, .ev_queued_busy, .ev_sbuf_hit, .ev_pref_wait, .ev_pref, .ev_scatter, .ev_iv_fetch);

  int checks = 0, failures = 0;
  int gap_min = 1000, gap_bad = 0, last_hs = -1000;
  logic [SLOT_W-1:0] last_slot = '0;
  logic [BLK_W-1:0]  last_blk = '0;
  int n_q, n_sb, n_iv, n_tlb, n_pf, n_pw, n_free_early, n_sct, n_wobj;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] iv_val(input longint i);
    return 32'((i * 37 + 5) % 4000);
  endfunction

  // memory: the initial image plus the bytes scattered into it
  logic [7:0] written [logic [PA_W-1:0]];
  function automatic logic [7:0] mem_byte(input logic [PA_W-1:0] a);
    logic [31:0] w;
    if (written.exists(a)) return written[a];
    w = init_word({a[PA_W-1:2], 2'b00});
    return w[a[1:0]*8 +: 8];
  endfunction
  function automatic logic [LINE_W-1:0] mem_line(input logic [LA_W-1:0] l);
    logic [LINE_W-1:0] d;
    for (int b = 0; b < LINE_BYTES; b++) d[b*8 +: 8] = mem_byte({l, 7'(b)});
    return d;
  endfunction

  // ---------------- memory-side stand-in ----------------
  typedef struct { int due; bit wr; logic [BLK_W-1:0] blk; logic [SLOT_W-1:0] slot; logic [LA_W-1:0] line; } pend_t;
  pend_t pend[$];
  pend_t wq[$];      // scattered objects waiting to be taken
  int    now = 0;
  int    iv_due = -1;
  logic [LA_W-1:0] iv_line_req;

  always @(negedge clk) tlb_ready = ($urandom_range(3) != 0);

  always @(posedge clk) begin
    now <= now + 1;
    obj_valid <= 0;
    iv_resp_valid <= 0;
    if (rst_n) begin
      n_q  += int'(ev_queued_busy);
      n_sb += int'(ev_sbuf_hit);
      n_iv += int'(ev_iv_fetch);
      n_pf += int'(ev_pref);
      n_pw += int'(ev_pref_wait);
      n_sct += int'(ev_scatter);
      n_free_early += int'(!busy && pend.size() != 0);
      if (tlb_valid && tlb_ready) begin
        pend_t p;
        logic [PA_W-1:0] pa;
        pa = PV_BASE + PA_W'(tlb_pv);
        p.due  = now + 2 + $urandom_range(12);
        p.slot = tlb_slot;
        p.blk  = tlb_blk;
        p.line = pa[PA_W-1:7];
        p.wr   = tlb_write;
        if (tlb_slot == last_slot + 1'b1 && tlb_blk == last_blk) begin
          if (now - last_hs < LAT_PV) gap_bad++;
          if (now - last_hs < gap_min) gap_min = now - last_hs;
        end
        last_hs   = now;
        last_slot = tlb_slot;
        last_blk  = tlb_blk;
        if (tlb_write) wq.push_back(p);
        else pend.push_back(p);
        n_tlb++;
        checks++;
        if (tlb_ptable_ptr !== 28'h0000ABC) begin
          failures++;
          $display("FAIL ptable_ptr not passed");
        end
      end
      for (int i = 0; i < pend.size(); i++)
        if (pend[i].due <= now) begin
          obj_valid <= 1;
          obj_slot  <= pend[i].slot;
          obj_blk   <= pend[i].blk;
          obj_data  <= mem_line(pend[i].line);
          pend.delete(i);
          break;
        end
      if (iv_req_valid && iv_req_ready) begin
        iv_due <= now + 6;
        iv_line_req <= iv_req_line;
      end
      if (iv_due == now) begin
        logic [LINE_W-1:0] d;
        longint first;
        first = (longint'({iv_line_req, 7'd0}) - longint'({IV_PAGE, 12'd0})) / 4;
        for (int j = 0; j < 32; j++) d[j*32 +: 32] = iv_val(first + j);
        iv_resp_valid <= 1;
        iv_resp_data  <= d;
      end
    end
  end

  // scattered objects are taken at random times: select the object, apply
  // its bytes to memory, acknowledge
  always @(negedge clk) begin
    wr_ack_valid <= 0;
    if (rst_n && wq.size() != 0 && $urandom_range(2) == 0) begin
      wsel_blk  = wq[0].blk;
      wsel_slot = wq[0].slot;
      #1;
      for (int b = 0; b < LINE_BYTES; b++)
        if (wobj_mask[b]) written[{wq[0].line, 7'(b)}] = wobj_data[b*8 +: 8];
      n_wobj++;
      wr_ack_valid <= 1;
      wr_ack_blk   <= wq[0].blk;
      void'(wq.pop_front());
    end
  end

  // ---------------- helpers ----------------
  task automatic wr(input cfg_reg_e r, input logic [31:0] v);
    @(negedge clk);
    cfg_we = 1; cfg_waddr = r; cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  sc_cfg_t c;   // what the testbench configured

  // expected line for shadow offset off (line aligned)
  function automatic logic [LINE_W-1:0] expected(input longint off);
    logic [LINE_W-1:0] d;
    longint n, sz, pv, idx, o;
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
        INDIRVECTOR_MAPPING: begin
          idx = off / sz + k;
          pv  = (longint'(iv_val(idx)) - c.fortran_sub) * sz;
        end
        default: begin
          o  = off / sz;
          pv = (o % c.row_num) * c.row_size + (o / c.row_num) * sz + k * c.row_size;
        end
      endcase
      for (longint b = 0; b < sz; b++)
        d[(k * sz + b) * 8 +: 8] = mem_byte(PV_BASE + PA_W'(pv + b));
    end
    return d;
  endfunction

  // read one shadow line and check it; returns the latency
  task automatic read_check(input longint off, input bit expect_err, output int lat);
    @(negedge clk);
    req_valid = 1;
    req_saddr = 32'(longint'(c.saddr_start) + off);
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    if (expect_err) check("error answer", resp_err && resp_data == '0);
    else check($sformatf("map %0d offset %0h data", c.map_type, off),
               !resp_err && resp_data == expected(off));
    check("answer address", resp_saddr == 32'(longint'(c.saddr_start) + off));
    @(posedge clk);
  endtask

  // write one shadow line (not answered)
  task automatic write_line(input longint off, input logic [LINE_W-1:0] d);
    @(negedge clk);
    req_valid = 1;
    req_write = 1;
    req_wdata = d;
    req_saddr = 32'(longint'(c.saddr_start) + off);
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    req_write = 0;
  endtask

  task automatic configure(input sc_cfg_t n);
    c = n;
    wr(R_MAP_TYPE, n.map_type);        wr(R_SADDR_START, n.saddr_start);
    wr(R_SADDR_SIZE, n.saddr_size);    wr(R_PTABLE_PTR, n.ptable_ptr);
    wr(R_COLOR_SIZE, n.color_size);    wr(R_WAY_SIZE, n.way_size);
    wr(R_COLOR_OFF, n.color_offset);   wr(R_STRIDE_SIZE, 32'(n.stride_size));
    wr(R_OBJECT_SIZE, 32'(n.object_size)); wr(R_OBJECT_OFF, 32'(n.object_offset));
    wr(R_IV_PADDR, 32'(n.iv_paddr));   wr(R_IV_ELEMSIZE, 32'(n.iv_elemsize));
    wr(R_FORTRAN_SUB, 32'(n.fortran_sub)); wr(R_ELEM_SIZE, 32'(n.elem_size));
    wr(R_ROW_SIZE, n.row_size);        wr(R_ROW_NUM, n.row_num);
    wr(R_PREF_INFO, 32'(n.pref_info)); wr(R_PREF_COUNT, 32'(n.pref_count));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat, tlb_before, pf0_end;
  sc_cfg_t n;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = '0;
    n.saddr_start = 32'h4000_0000;
    n.saddr_size  = 32'h0100_0000;
    n.ptable_ptr  = 28'h0000ABC;

    // direct mapping
    n.map_type = DIRECT_MAPPING;
    configure(n);
    cfg_raddr = R_SADDR_START;
    #1 check("register read back", cfg_rdata == 32'h4000_0000);
    for (int i = 0; i < 4; i++) read_check(longint'($urandom_range(4000)) * 128, 0, lat);
    read_check(longint'(32'h0100_0000), 1, lat);          // just past the region
    // SRAM buffer hit
    read_check(128 * 5, 0, lat);
    tlb_before = n_tlb;
    read_check(128 * 5, 0, lat);
    check($sformatf("buffer hit latency %0d", lat), lat == 2 + LAT_HIT && n_tlb == tlb_before && n_sb >= 1);

    // page color: way 64 KiB, color 16 KiB, third quarter
    n.map_type = PAGECOLOR_MAPPING;
    n.way_size = 32'h1_0000; n.color_size = 32'h4000; n.color_offset = 32'h8000;
    configure(n);
    for (int i = 0; i < 6; i++) begin
      longint way, inq;
      way = $urandom_range(50);
      inq = 32'h8000 + longint'($urandom_range(127)) * 128;
      read_check(way * 32'h1_0000 + inq, 0, lat);
    end

    // stride mapping, objects of 4..128 bytes
    for (int lo = 2; lo <= 7; lo++) begin
      n.map_type = STRIDE_MAPPING;
      n.object_size = 12'(1 << lo);
      n.stride_size = 16'(128 * (1 + $urandom_range(40)));
      n.object_offset = 12'(4 * $urandom_range(31));
      if (n.object_offset + n.object_size > 128) n.object_offset = 0;
      configure(n);
      for (int i = 0; i < 3; i++) read_check(longint'($urandom_range(300)) * 128, 0, lat);
    end

    // transpose mapping
    for (int le = 2; le <= 4; le++) begin
      n.map_type = TRANSPOSE_MAPPING;
      n.elem_size = 12'(1 << le);
      n.row_num = 32'd256;
      n.row_size = 32'(n.elem_size) * 300;
      configure(n);
      for (int i = 0; i < 3; i++) read_check(longint'($urandom_range(300)) * 128, 0, lat);
    end

    // indirection vector, 4-byte elements, C and Fortran subscripts
    for (int fs = 0; fs < 2; fs++)
      for (int lo = 2; lo <= 5; lo++) begin
        n.map_type = INDIRVECTOR_MAPPING;
        n.object_size = 12'(1 << lo);
        n.iv_paddr = IV_PAGE;
        n.iv_elemsize = 3'd4;
        n.fortran_sub = 1'(fs);
        configure(n);
        for (int i = 0; i < 3; i++) read_check(longint'($urandom_range(200)) * 128, 0, lat);
      end
    check("indirection vector lines fetched", n_iv > 0);

    // several requests back to back: they wait in the queue
    n.map_type = STRIDE_MAPPING;
    n.object_size = 12'd8;
    n.stride_size = 16'd1024;
    n.object_offset = 12'd0;
    configure(n);
    fork
      begin
        for (int i = 0; i < 4; i++) begin
          @(negedge clk);
          req_valid = 1;
          req_saddr = 32'(longint'(c.saddr_start) + (i + 10) * 128);
          do @(posedge clk); while (!req_ready);
        end
        @(negedge clk);
        req_valid = 0;
      end
      begin
        bit seen[4];
        for (int i = 0; i < 4; i++) begin
          int j;
          @(negedge clk);
          while (!resp_valid) @(negedge clk);
          j = int'((longint'(resp_saddr) - longint'(c.saddr_start)) / 128) - 10;
          check("queued access answered once", j >= 0 && j < 4 && !seen[j]);
          if (j >= 0 && j < 4) begin
            seen[j] = 1;
            check("queued access data", resp_data == expected((j + 10) * 128));
          end
          @(posedge clk);
        end
      end
    join
    check("accesses waited behind a busy controller", n_q > 0);
    check("controller free while data outstanding", n_free_early > 0);

    // prefetching: forward 3 lines, then backward 2 lines
    for (int dir = 1; dir <= 2; dir++) begin
      longint base, d;
      int pf0;
      n.map_type   = (dir == 1) ? STRIDE_MAPPING : DIRECT_MAPPING;
      n.pref_info  = 2'(dir);
      n.pref_count = (dir == 1) ? 18'(3 * 128) : 18'(2 * 128);
      d = (dir == 1) ? 3 * 128 : -2 * 128;
      configure(n);
      base = 128 * 200;
      pf0 = n_pf;
      read_check(base, 0, lat);
      check("prefetch issued", n_pf == pf0 + 1);
      repeat (200) @(posedge clk);
      tlb_before = n_tlb;
      read_check(base + d, 0, lat);
      repeat (200) @(posedge clk);
      // only the next prefetch (one line) goes to memory
      check($sformatf("prefetched line served from the buffer (%0d requests)",
                      n_tlb - tlb_before),
            n_tlb - tlb_before == ((dir == 1) ? 16 : 1));
      // the line after it is read at once: it is still being filled
      read_check(base + 2 * d, 0, lat);
      read_check(base + 3 * d, 0, lat);
    end
    check("access waited for a block being prefetched", n_pw > 0);
    // prefetch beyond the end of the region is dropped
    n.pref_info = 2'd1;
    n.pref_count = 18'd128;
    configure(n);
    pf0_end = n_pf;
    read_check(longint'(c.saddr_size) - 128, 0, lat);
    check("prefetch outside the region dropped", n_pf == pf0_end);
    // scatter: write shadow lines, then read them back through the
    // controller and check the scattered bytes in memory
    for (int m = 0; m < 3; m++) begin
      logic [LINE_W-1:0] d, nbr_old;
      longint off;
      int sct0;
      n = '0;
      n.saddr_start = 32'h4000_0000;
      n.saddr_size  = 32'h0100_0000;
      n.ptable_ptr  = 28'h0000ABC;
      n.map_type    = (m == 0) ? STRIDE_MAPPING : (m == 1) ? TRANSPOSE_MAPPING : INDIRVECTOR_MAPPING;
      n.object_size = 12'd8; n.stride_size = 16'd640; n.object_offset = 12'd24;
      n.elem_size = 12'd4; n.row_num = 32'd64; n.row_size = 32'd1024;
      n.iv_paddr = IV_PAGE; n.iv_elemsize = 3'd4;
      configure(n);
      off = longint'($urandom_range(100)) * 128;
      read_check(off, 0, lat);                 // the line is now buffered
      nbr_old = expected(off + 128);            // a neighbour must not change
      d = {32{$urandom}};
      sct0 = n_sct;
      write_line(off, d);
      repeat (300) @(posedge clk);
      check($sformatf("map %0d scatter started", m), n_sct == sct0 + 1);
      check($sformatf("map %0d scattered bytes in memory", m), expected(off) == d);
      check($sformatf("map %0d neighbour line untouched", m), expected(off + 128) == nbr_old);
      read_check(off, 0, lat);                 // buffered copy was dropped
      // a write outside the region is dropped
      sct0 = n_sct;
      write_line(longint'(c.saddr_size), d);
      repeat (10) @(posedge clk);
      check("write outside the region dropped", n_sct == sct0 && resp_valid == 0);
    end
    check("scattered objects taken", n_wobj > 0);
    check($sformatf("pv address spacing: shortest %0d, too short %0d", gap_min, gap_bad),
          gap_min == LAT_PV && gap_bad == 0);
    $display("tlb requests %0d buffer hits %0d queued %0d iv fetches %0d prefetches %0d", n_tlb, n_sb, n_q, n_iv, n_pf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
