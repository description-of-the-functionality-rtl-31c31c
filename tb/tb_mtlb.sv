// tb_mtlb: the MTLB with the DRAM model holding two memory controller page
// tables (one per shadow controller).
// Directed part: the first access to a page misses, fills the PTE buffer
// from DRAM, sets the PTE's ref bit and writes it back; a second access to
// the page hits and leaves 2 cycles after acceptance; another page in the
// same PTE line hits in the buffer and leaves after 3 cycles (the filled
// access itself is counted as a buffer hit when it re-accesses); the first write
// to a page sets and writes back the modify bit; an invalid PTE gives out_err.
// Random part: back-to-back accesses over many pages of both tables with
// random output back-pressure; each result is checked in order against the
// page tables.
module tb_mtlb;
  import impulse_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               req_valid = 0, req_ready, req_write = 0;
  logic [PV_W-1:0]    req_pv = 0;
  logic [SCIDX_W-1:0] req_sc = 0;
  logic [FRAME_W-1:0] req_ptable_ptr = 0;
  req_tag_t           req_tag = '0;
  logic               out_valid, out_ready = 1, out_write, out_err;
  logic [PA_W-1:0]    out_paddr;
  req_tag_t           out_tag;
  logic               dreq_valid, dreq_ready, dresp_valid;
  dram_req_t          dreq;
  dram_resp_t         dresp;
  logic ev_hit, ev_buf_hit, ev_fill, ev_wb, ev_queued;

  mtlb dut (.clk, .rst_n, .req_valid, .req_ready, .req_pv, .req_sc, .req_ptable_ptr,
    .req_write, .req_tag, .out_valid, .out_ready, .out_paddr, .out_write, .out_tag, .out_err,
    .dreq_valid, .dreq_ready, .dreq, .dresp_valid, .dresp,
    .ev_hit, .ev_buf_hit, .ev_fill, .ev_wb, .ev_queued);

  dram_model #(.TAG_W(DTAG_W), .LAT(10), .JITTER(3)) u_dram (.clk, .rst_n,
    .valid(dreq_valid), .ready(dreq_ready), .write(dreq.write), .line(dreq.line),
    .wmask(dreq.wmask), .wdata(dreq.wdata), .tag(dreq.tag), .rvalid(dresp_valid),
    .rtag(dresp.tag), .rdata(dresp.data));

  localparam logic [FRAME_W-1:0] PT0 = 28'h00100, PT1 = 28'h00230;

  function automatic logic [FRAME_W-1:0] frame_of(input int sc, input int vpn);
    return FRAME_W'(28'h0050000 + sc * 28'h10000 + vpn * 3);
  endfunction
  function automatic logic [PA_W-1:0] pte_addr(input int sc, input int vpn);
    return {(sc == 0) ? PT0 : PT1, 12'h000} + PA_W'(vpn * 4);
  endfunction

  int checks = 0, failures = 0;
  int n_hit, n_bhit, n_fill, n_wb, n_q;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev_hit); n_bhit += int'(ev_buf_hit); n_fill += int'(ev_fill);
    n_wb += int'(ev_wb); n_q += int'(ev_queued);
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // single access, waits for the translation, returns latency
  task automatic one(input int sc, input int vpn, input int off, input bit wr,
                     output logic [PA_W-1:0] pa, output bit err, output int lat);
    @(negedge clk);
    req_valid = 1; req_sc = 6'(sc); req_pv = {22'(vpn), 12'(off)}; req_write = wr;
    req_ptable_ptr = (sc == 0) ? PT0 : PT1;
    req_tag = req_tag_t'{sysif: 1'b0, sc: 6'(sc), blk: '0, slot: 5'(vpn)};
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    pa = out_paddr;
    err = out_err;
    check("tag passes through", out_tag == req_tag_t'{sysif: 1'b0, sc: 6'(sc), blk: '0, slot: 5'(vpn)});
    check("write flag passes through", out_write == wr);
    @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // in-order expectations for the random phase
  typedef struct { logic [PA_W-1:0] pa; req_tag_t tag; } exp_t;
  exp_t exp_q[$];
  bit   random_phase = 0;
  int   random_seen = 0;
  always @(posedge clk) if (rst_n && random_phase && out_valid && out_ready) begin
    exp_t x;
    x = exp_q.pop_front();
    checks++;
    random_seen++;
    if (out_paddr !== x.pa || out_tag !== x.tag || out_err) begin
      failures++;
      $display("FAIL random: paddr %0h expected %0h", out_paddr, x.pa);
    end
  end
  always @(negedge clk) out_ready = random_phase ? ($urandom_range(2) != 0) : 1'b1;

  logic [PA_W-1:0] pa;
  bit err;
  int lat;
  pte_t p;

  initial begin
    for (int s = 0; s < 2; s++)
      for (int v = 0; v < 256; v++)
        u_dram.poke_word(pte_addr(s, v), {1'b1, 1'b0, 1'b0, 1'b0, frame_of(s, v)});
    u_dram.poke_word(pte_addr(0, 7), {1'b0, 3'b000, frame_of(0, 7)});       // not valid
    u_dram.poke_word(pte_addr(0, 9), {1'b1, 1'b1, 2'b00, frame_of(0, 9)});  // already referenced
    repeat (3) @(posedge clk);
    rst_n = 1;

    one(0, 5, 12'h123, 0, pa, err, lat);
    check("miss translation", pa == {frame_of(0, 5), 12'h123} && !err);
    check("miss filled from DRAM", n_fill == 1);
    repeat (4) @(posedge clk);
    p = pte_t'(u_dram.peek_word(pte_addr(0, 5)));
    check("ref bit written back", p.ref_b && !p.modify && p.valid && n_wb == 1);

    one(0, 5, 12'hFFC, 0, pa, err, lat);
    check("hit translation", pa == {frame_of(0, 5), 12'hFFC});
    check($sformatf("hit latency %0d", lat), lat == 2 && n_hit == 1);

    one(0, 6, 12'h040, 0, pa, err, lat);
    check("buffer hit translation", pa == {frame_of(0, 6), 12'h040});
    check($sformatf("buffer hit latency %0d bhit %0d fill %0d", lat, n_bhit, n_fill),
          lat == 3 && n_bhit == 2 && n_fill == 1);

    one(0, 9, 12'h000, 0, pa, err, lat);
    repeat (4) @(posedge clk);
    check("no write-back for a referenced page", n_wb == 2);

    one(0, 5, 12'h010, 1, pa, err, lat);
    repeat (4) @(posedge clk);
    p = pte_t'(u_dram.peek_word(pte_addr(0, 5)));
    check("modify bit written back", p.modify && p.ref_b && n_wb == 3);

    one(0, 7, 12'h000, 0, pa, err, lat);
    check("invalid PTE flagged", err);

    // random, back to back
    @(negedge clk);
    random_phase = 1;
    for (int i = 0; i < 1500; i++) begin
      int s, v, o;
      exp_t x;
      s = $urandom_range(1);
      v = (i < 750) ? $urandom_range(40) : $urandom_range(255);
      if (s == 0 && v == 7) v = 8;
      o = $urandom_range(4095);
      x.pa  = {frame_of(s, v), 12'(o)};
      x.tag = req_tag_t'{sysif: 1'b0, sc: 6'(s), blk: '0, slot: 5'(i)};
      exp_q.push_back(x);
      @(negedge clk);
      req_valid = 1; req_sc = 6'(s); req_pv = {22'(v), 12'(o)}; req_write = 0;
      req_ptable_ptr = (s == 0) ? PT0 : PT1;
      req_tag = x.tag;
      do @(posedge clk); while (!req_ready);
    end
    @(negedge clk);
    req_valid = 0;
    while (exp_q.size() > 0) @(posedge clk);
    check("all random results seen", random_seen == 1500);
    check("accesses waited in the queue", n_q > 0);
    $display("hits %0d buffer hits %0d fills %0d write-backs %0d queued %0d",
             n_hit, n_bhit, n_fill, n_wb, n_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
