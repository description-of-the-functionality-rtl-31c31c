// tb_mcache: the MCache in front of the DRAM model.
// Directed part: a miss returns the line and prefetches the next one; a
// repeated read hits and answers 2 cycles after acceptance; a read of the
// prefetched line is a prefetch hit and prefetches the line after it; a
// write (whole line or byte-masked) invalidates the cached line and reaches
// DRAM; a write with a failed translation is dropped; an erroneous request
// is answered with zeros and resp_err.
// Random part: reads and writes over a few lines with widely varying DRAM
// latency; every read must return the latest written data (reference model
// kept here), and stalls, dropped prefetches and invalidations must occur.
module tb_mcache;
  import impulse_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              req_valid = 0, req_ready, req_write = 0, req_err = 0;
  logic [PA_W-1:0]   req_paddr = 0;
  logic [LINE_W-1:0] req_wdata = 0;
  logic [LINE_BYTES-1:0] req_wmask = '1;
  req_tag_t          req_tag = '0;
  logic              resp_valid, resp_ready = 1, resp_err;
  req_tag_t          resp_tag;
  logic [LINE_W-1:0] resp_data;
  logic [LA_W-1:0]   resp_line;
  logic              dreq_valid, dreq_ready, dresp_valid;
  dram_req_t         dreq;
  dram_resp_t        dresp;
  logic ev_hit, ev_miss, ev_pref_issue, ev_pref_hit, ev_pref_drop, ev_stall, ev_inval;

  mcache #(.SETS(2), .WAYS(2)) dut (.clk, .rst_n, .pref_en(1'b1),
    .req_valid, .req_ready, .req_paddr, .req_write, .req_wdata, .req_wmask, .req_tag, .req_err,
    .resp_valid, .resp_ready, .resp_tag, .resp_data, .resp_err, .resp_line,
    .dreq_valid, .dreq_ready, .dreq, .dresp_valid, .dresp,
    .ev_hit, .ev_miss, .ev_pref_issue, .ev_pref_hit, .ev_pref_drop, .ev_stall, .ev_inval);

  dram_model #(.TAG_W(DTAG_W), .LAT(4), .JITTER(40)) u_dram (.clk, .rst_n,
    .valid(dreq_valid), .ready(dreq_ready), .write(dreq.write), .line(dreq.line),
    .wmask(dreq.wmask), .wdata(dreq.wdata), .tag(dreq.tag), .rvalid(dresp_valid),
    .rtag(dresp.tag), .rdata(dresp.data));

  int checks = 0, failures = 0;
  int n_hit, n_miss, n_pi, n_ph, n_pd, n_stall, n_inval;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev_hit); n_miss += int'(ev_miss); n_pi += int'(ev_pref_issue);
    n_ph += int'(ev_pref_hit); n_pd += int'(ev_pref_drop); n_stall += int'(ev_stall);
    n_inval += int'(ev_inval);
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [LINE_W-1:0] ref_mem [logic [LA_W-1:0]];
  function automatic logic [LINE_W-1:0] ref_line(input logic [LA_W-1:0] l);
    if (ref_mem.exists(l)) return ref_mem[l];
    return init_line(l);
  endfunction

  // issue one request; for a read wait for the answer and return its latency
  task automatic access(input bit wr, input logic [LA_W-1:0] l, input bit err,
                        output logic [LINE_W-1:0] data, output int lat, output bit rerr);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_paddr = {l, 7'd0}; req_err = err;
    req_tag = req_tag_t'{sysif: 1'b1, sc: 6'(l), blk: '0, slot: 5'(l)};
    req_wdata = {32{$urandom}};
    // half of the writes are byte-masked (as when an object is scattered)
    req_wmask = ($urandom_range(1) == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
    if (wr && !err) begin
      logic [LINE_W-1:0] m;
      m = ref_line(l);
      for (int b = 0; b < LINE_BYTES; b++) if (req_wmask[b]) m[b*8 +: 8] = req_wdata[b*8 +: 8];
      ref_mem[l] = m;
    end
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    data = '0;
    rerr = 0;
    if (!wr) begin
      while (!resp_valid) begin @(negedge clk); lat++; end
      data = resp_data;
      rerr = resp_err;
      check("response tag", resp_tag == req_tag_t'{sysif: 1'b1, sc: 6'(l), blk: '0, slot: 5'(l)});
      check("response line", resp_line == l);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [LINE_W-1:0] d;
  int lat;
  bit e;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // miss, then prefetch of the next line
    access(0, 33'h100, 0, d, lat, e);
    check("miss data", d == ref_line(33'h100));
    check("miss counted", n_miss == 1);
    repeat (60) @(posedge clk);
    check("next line prefetched", n_pi == 1);
    // hit: 2 cycles
    access(0, 33'h100, 0, d, lat, e);
    check("hit data", d == ref_line(33'h100));
    check($sformatf("hit latency %0d", lat), lat == 2);
    // prefetched line: prefetch hit, next prefetch
    access(0, 33'h101, 0, d, lat, e);
    check("prefetched data", d == ref_line(33'h101));
    check("prefetch hit", n_ph == 1);
    check("no second miss", n_miss == 1);
    repeat (60) @(posedge clk);
    check("prefetch after prefetch hit", n_pi == 2);
    // write invalidates
    access(1, 33'h101, 0, d, lat, e);
    repeat (3) @(posedge clk);
    check("invalidate", n_inval == 1);
    access(0, 33'h101, 0, d, lat, e);
    check("read after write", d == ref_line(33'h101));
    check("miss after invalidate", n_miss == 2);
    // failed translation
    access(0, 33'h200, 1, d, lat, e);
    check("error response", e == 1 && d == '0);
    // a write with a failed translation is dropped
    access(1, 33'h201, 1, d, lat, e);
    repeat (10) @(posedge clk);
    check("failed write dropped", u_dram.read_line(33'h201) == init_line(33'h201));
    // random traffic
    for (int i = 0; i < 600; i++) begin
      logic [LA_W-1:0] l;
      bit wr;
      l  = LA_W'(33'h300 + $urandom_range(11));
      wr = ($urandom_range(4) == 0);
      access(wr, l, 0, d, lat, e);
      if (!wr) check($sformatf("random read %0h", l), d == ref_line(l) && !e);
      if ($urandom_range(3) == 0) repeat ($urandom_range(30)) @(posedge clk);
    end
    $display("hits %0d misses %0d prefetches %0d prefetch hits %0d dropped %0d stalls %0d invalidations %0d",
             n_hit, n_miss, n_pi, n_ph, n_pd, n_stall, n_inval);
    check("stall happened", n_stall > 0);
    check("prefetch dropped", n_pd > 0);
    check("prefetch hits", n_ph > 1);
    check("invalidations", n_inval > 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
