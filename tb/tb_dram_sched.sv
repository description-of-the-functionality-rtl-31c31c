// tb_dram_sched: three requesters issue random reads and writes through the
// scheduler into the DRAM model. Checks that every read returns the line's
// expected data on the port that issued it with its own tag, that writes
// land in memory, and that round robin grants each of several always-busy
// requesters in turn.
module tb_dram_sched;
  import impulse_pkg::*;
  import tb_util_pkg::*;

  localparam int NP = 3;
  localparam int IW = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] req_valid, req_ready, resp_valid;
  dram_req_t     req [NP];
  dram_resp_t    resp;
  logic                  dram_valid, dram_ready, dram_write, dram_rvalid;
  logic [LA_W-1:0]       dram_line;
  logic [LINE_BYTES-1:0] dram_wmask;
  logic [LINE_W-1:0]     dram_wdata, dram_rdata;
  logic [IW+DTAG_W-1:0]  dram_tag, dram_rtag;

  dram_sched #(.NPORT(NP)) dut (.clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp,
    .dram_valid, .dram_ready, .dram_write, .dram_line, .dram_wmask, .dram_wdata, .dram_tag,
    .dram_rvalid, .dram_rtag, .dram_rdata);

  dram_model #(.TAG_W(IW+DTAG_W), .LAT(6), .JITTER(5), .STALLS(1'b1)) u_dram (.clk, .rst_n,
    .valid(dram_valid), .ready(dram_ready), .write(dram_write), .line(dram_line),
    .wmask(dram_wmask), .wdata(dram_wdata), .tag(dram_tag), .rvalid(dram_rvalid),
    .rtag(dram_rtag), .rdata(dram_rdata));

  int checks = 0, failures = 0;
  // expected data per (port, tag)
  logic [LINE_W-1:0] exp_data [NP][256];
  bit                exp_busy [NP][256];
  int                outstanding = 0;
  int                grants [NP];
  int                last_gnt = -1, rr_ok = 0, rr_bad = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // written lines: known data
  logic [LINE_W-1:0] written [logic [LA_W-1:0]];

  function automatic logic [LINE_W-1:0] expect_line(input logic [LA_W-1:0] l);
    if (written.exists(l)) return written[l];
    return init_line(l);
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++)
      if (resp_valid[p]) begin
        checks++;
        if (!exp_busy[p][resp.tag] || resp.data !== exp_data[p][resp.tag]) begin
          failures++;
          $display("FAIL port %0d tag %0d data mismatch", p, resp.tag);
        end
        exp_busy[p][resp.tag] = 0;
        outstanding--;
      end
    if (|req_valid && dram_ready) begin
      int g;
      g = -1;
      for (int p = 0; p < NP; p++) if (req_ready[p]) g = p;
      if (g >= 0) begin
        grants[g]++;
        if (req_valid == '1 && last_gnt >= 0) begin
          if (g == (last_gnt + 1) % NP) rr_ok++; else rr_bad++;
        end
        last_gnt = g;
      end
    end
  end

  task automatic issue(input int p, input bit wr, input logic [LA_W-1:0] l, input int t);
    req[p]       = '0;
    req[p].write = wr;
    req[p].line  = l;
    req[p].wmask = '1;
    req[p].wdata = {32{$urandom}};
    req[p].tag   = DTAG_W'(t);
    if (wr) written[l] = req[p].wdata;
    else begin
      exp_data[p][t] = expect_line(l);
      exp_busy[p][t] = 1;
      outstanding++;
    end
    req_valid[p] = 1;
    do @(posedge clk); while (!req_ready[p]);
    #1 req_valid[p] = 0;
  endtask

  initial begin
    req_valid = '0;
    for (int p = 0; p < NP; p++) req[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      for (int i = 0; i < 60; i++) issue(0, ($urandom_range(3) == 0), LA_W'($urandom_range(40)), i);
      for (int i = 0; i < 60; i++) issue(1, ($urandom_range(3) == 0), LA_W'($urandom_range(40)), i);
      for (int i = 0; i < 60; i++) issue(2, 1'b0, LA_W'(100 + $urandom_range(40)), i);
    join
    while (outstanding > 0) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (grants[p] != 60) begin
        failures++;
        $display("FAIL port %0d granted %0d times", p, grants[p]);
      end
    end
    checks++;
    if (rr_bad != 0 || rr_ok == 0) begin
      failures++;
      $display("FAIL round robin order: %0d in turn, %0d out of turn", rr_ok, rr_bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
