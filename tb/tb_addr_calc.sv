// tb_addr_calc: checks the AddrCalc ALU against the address formulas of each
// remapping type, written with plain division, remainder and multiplication
// on wide integers, for random configurations and shadow offsets.
module tb_addr_calc;
  import impulse_pkg::*;

  sc_cfg_t          cfg;
  logic [31:0]      saddr, iv_idx, iv_elem;
  logic             in_range;
  logic [PV_W-1:0]  first_pv, step, iv_pv;
  logic [SLOT_W:0]  n_objs;
  logic [OFF_W-1:0] obj_m1;
  logic [31:0]      iv_first_idx;
  logic [PA_W-1:0]  iv_eaddr;

  addr_calc dut (.cfg, .saddr, .iv_idx, .iv_elem, .in_range, .first_pv, .step, .n_objs,
                 .obj_bytes_m1(obj_m1), .iv_first_idx, .iv_eaddr, .iv_pv);

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (map %0d)", what, got, exp, cfg.map_type);
    end
  endtask

  function automatic logic [31:0] pow2(input int n);
    return 32'd1 << n;
  endfunction

  longint off, e, pv_exp;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      cfg = '0;
      cfg.saddr_start = {$urandom_range(16'hFFFF), 16'h0000} & 32'h7FFF_F000;
      cfg.saddr_size  = 32'h1000_0000;
      // offset inside the region, line aligned
      off   = longint'({$urandom_range(32'h00FF_FFFF)} & 32'hFFFF_FF80);
      saddr = 32'(longint'(cfg.saddr_start) + off);
      iv_idx  = 0;
      iv_elem = 0;
      unique case (t % 5)
        0: begin
          cfg.map_type = DIRECT_MAPPING;
          #1;
          check("direct pv", first_pv, off);
          check("direct n", n_objs, 1);
          check("direct size", obj_m1, 127);
        end
        1: begin
          int lc, lw;
          cfg.map_type     = PAGECOLOR_MAPPING;
          lc               = 12 + $urandom_range(2);
          lw               = lc + $urandom_range(4);
          cfg.color_size   = pow2(lc);
          cfg.way_size     = pow2(lw);
          cfg.color_offset = pow2(lc) * $urandom_range((1 << (lw - lc)) - 1);
          #1;
          pv_exp = (off / cfg.way_size) * cfg.color_size + (off % cfg.way_size) - cfg.color_offset;
          check("color pv", first_pv, pv_exp & ((64'd1 << 32) - 1));
          check("color n", n_objs, 1);
        end
        2: begin
          int lo;
          cfg.map_type      = STRIDE_MAPPING;
          lo                = 2 + $urandom_range(5);
          cfg.object_size   = 12'(pow2(lo));
          cfg.stride_size   = 16'(128 * (1 + $urandom_range(200)));
          cfg.object_offset = 12'(4 * $urandom_range(31));
          #1;
          pv_exp = (off / cfg.object_size) * cfg.stride_size + cfg.object_offset;
          check("stride pv", first_pv, pv_exp & ((64'd1 << PV_W) - 1));
          check("stride step", step, cfg.stride_size);
          check("stride n", n_objs, 128 / cfg.object_size);
          check("stride size", obj_m1, cfg.object_size - 1);
        end
        3: begin
          int lo, le;
          cfg.map_type    = INDIRVECTOR_MAPPING;
          lo              = 2 + $urandom_range(5);
          le              = $urandom_range(2);
          cfg.object_size = 12'(pow2(lo));
          cfg.iv_elemsize = 3'(pow2(le));
          cfg.iv_paddr    = 28'($urandom);
          cfg.fortran_sub = 1'($urandom);
          iv_idx          = $urandom_range(100000);
          iv_elem         = 1 + $urandom_range(1000000);
          #1;
          check("iv index", iv_first_idx, off / cfg.object_size);
          e = longint'(cfg.iv_paddr) * 4096 + longint'(iv_idx) * cfg.iv_elemsize;
          check("iv eaddr", iv_eaddr, e & ((64'd1 << PA_W) - 1));
          check("iv pv", iv_pv, ((longint'(iv_elem) - cfg.fortran_sub) * cfg.object_size)
                                 & ((64'd1 << PV_W) - 1));
          check("iv n", n_objs, 128 / cfg.object_size);
        end
        default: begin
          int le, lr;
          longint o;
          cfg.map_type  = TRANSPOSE_MAPPING;
          le            = 2 + $urandom_range(3);
          lr            = 5 + $urandom_range(5);
          cfg.elem_size = 12'(pow2(le));
          cfg.row_num   = pow2(lr);
          cfg.row_size  = cfg.elem_size * (1 + $urandom_range(500));
          #1;
          o      = off / cfg.elem_size;
          pv_exp = (o % cfg.row_num) * cfg.row_size + (o / cfg.row_num) * cfg.elem_size;
          check("transpose pv", first_pv, pv_exp & ((64'd1 << PV_W) - 1));
          check("transpose step", step, cfg.row_size);
          check("transpose n", n_objs, 128 / cfg.elem_size);
        end
      endcase
      // region bounds (subtraction with overflow detection)
      check("in range", in_range, 1);
    end
    // below the region and beyond its size
    cfg.map_type = DIRECT_MAPPING;
    cfg.saddr_start = 32'h0010_0000;
    cfg.saddr_size  = 32'h0000_1000;
    saddr = 32'h000F_FF80; #1; check("below start", in_range, 0);
    saddr = 32'h0010_1000; #1; check("past size", in_range, 0);
    saddr = 32'h0010_0F80; #1; check("last line", in_range, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
