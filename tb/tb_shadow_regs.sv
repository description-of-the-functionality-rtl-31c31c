// tb_shadow_regs: writes every control register with random data and checks
// the read-back value (truncated to the field width), the configuration
// struct fields and the one-cycle cfg_changed pulse.
module tb_shadow_regs;
  import impulse_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        we = 0;
  logic [4:0]  waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  sc_cfg_t     cfg;
  logic        cfg_changed;

  shadow_regs dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .cfg, .cfg_changed);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int widths [20] = '{8, 2, 18, 32, 32, 28, 32, 32, 32, 16, 12, 32, 12, 28, 3, 32, 1, 12, 32, 32};
  logic [31:0] shadow [20];

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      raddr = 5'(r);
      #1 check("reset value", rdata, 0);
    end
    for (int pass = 0; pass < 4; pass++)
      for (int r = 0; r < 20; r++) begin
        logic [31:0] v;
        v = $urandom;
        @(negedge clk);
        we = 1; waddr = 5'(r); wdata = v;
        shadow[r] = (widths[r] == 32) ? v : (v & ((32'd1 << widths[r]) - 1));
        @(negedge clk);
        we = 0;
        check("cfg_changed", 32'(cfg_changed), 1);
        raddr = 5'(r);
        #1 check($sformatf("readback r%0d", r), rdata, shadow[r]);
        @(negedge clk);
        check("cfg_changed low", 32'(cfg_changed), 0);
      end
    check("map_type",    32'(cfg.map_type),    shadow[0]);
    check("pref_count",  32'(cfg.pref_count),  shadow[2]);
    check("saddr_start", cfg.saddr_start,      shadow[3]);
    check("ptable_ptr",  32'(cfg.ptable_ptr),  shadow[5]);
    check("stride_size", 32'(cfg.stride_size), shadow[9]);
    check("iv_elemsize", 32'(cfg.iv_elemsize), shadow[14]);
    check("fortran_sub", 32'(cfg.fortran_sub), shadow[16]);
    check("row_num",     cfg.row_num,          shadow[19]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
