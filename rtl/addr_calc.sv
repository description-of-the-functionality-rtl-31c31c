// addr_calc: the AddrCalc ALU of a shadow controller.
//
// Purely combinational. From a line-aligned shadow offset (bits 31:0 of the
// shadow address) and the controller's configuration it computes the first
// pseudo-virtual (pv) address of the line, the amount added to obtain each
// next pv address, and how many objects make up the line. The datapaths follow
// the computation diagrams of each remapping type:
//   direct      pv = saddr - saddr_start
//   page color  pv = (off & ~(way-1)) >> log2(way/color) + (off & (way-1)) - color_offset
//   stride      pv = ((off >> log2(object_size)) * stride/4 + object_offset/4) << 2
//   transpose   o  = off >> log2(elem_size);
//               pv = ((o % row_num) * (row_size/elem_size) + o / row_num) << log2(elem_size)
//   ind. vector index = off >> log2(object_size);
//               element address = iv_paddr:000 + index * iv_elemsize;
//               pv = (iv[index] - fortran_sub) << log2(object_size)
// Only add, subtract, multiply, shift and mask are used, as in the ALU
// description. Divisions and remainders by powers of two are shifts and masks;
// their log2 values are derived here from the size registers (a design
// choice: the register set stores sizes, not their logarithms).
// The subtraction saddr - saddr_start has overflow detection: `in_range` is
// low when the offset lies below saddr_start or at/after saddr_size.
// The indirection-vector path takes the element value `iv_elem` read by the
// controller and the running element index `iv_idx` as inputs.
module addr_calc
  import impulse_pkg::*;
(
  input  sc_cfg_t           cfg,
  input  logic [31:0]       saddr,      // bits 31:0 of the shadow address
  input  logic [31:0]       iv_idx,     // indirection-vector element index
  input  logic [31:0]       iv_elem,    // value of iv[iv_idx]
  output logic              in_range,   // offset lies inside the shadow region
  output logic [PV_W-1:0]   first_pv,   // first pv address (not for indirection vector)
  output logic [PV_W-1:0]   step,       // next pv = previous + step (stride, transpose)
  output logic [SLOT_W:0]   n_objs,     // objects per line (1 .. 32)
  output logic [OFF_W-1:0]  obj_bytes_m1, // object size - 1, in bytes
  output logic [31:0]       iv_first_idx, // index of the first indirection-vector element
  output logic [PA_W-1:0]   iv_eaddr,   // byte address of iv[iv_idx]
  output logic [PV_W-1:0]   iv_pv       // pv address obtained from iv_elem
);

  logic [31:0] sa_line, off;
  logic        borrow;
  logic [4:0]  lg_obj, lg_way, lg_color, lg_elem, lg_rownum, lg_ivel;
  logic [31:0] pc_hi, pc_lo;
  logic [31:0] st_prod;
  logic [31:0] tr_o, tr_row, tr_col, tr_prod;
  logic [31:0] iv_scaled;
  logic [31:0] iv_val;
  logic [4:0]  lg_line_objs;

  always_comb begin
    sa_line  = {saddr[31:OFF_W], {OFF_W{1'b0}}};
    {borrow, off} = {1'b0, sa_line} - {1'b0, cfg.saddr_start};
    in_range = !borrow && (off < cfg.saddr_size);

    lg_obj    = log2_pow2({20'd0, cfg.object_size});
    lg_way    = log2_pow2(cfg.way_size);
    lg_color  = log2_pow2(cfg.color_size);
    lg_elem   = log2_pow2({20'd0, cfg.elem_size});
    lg_rownum = log2_pow2(cfg.row_num);
    lg_ivel   = log2_pow2({29'd0, cfg.iv_elemsize});

    // page color
    pc_hi = (off & ~(cfg.way_size - 32'd1)) >> (lg_way - lg_color);
    pc_lo = (off & (cfg.way_size - 32'd1)) - cfg.color_offset;

    // stride: 30-bit * 16-bit product on word (4-byte) units
    st_prod = (off >> lg_obj) * {16'd0, 2'b00, cfg.stride_size[15:2]};

    // transpose
    tr_o    = off >> lg_elem;
    tr_row  = tr_o & (cfg.row_num - 32'd1);
    tr_col  = tr_o >> lg_rownum;
    tr_prod = tr_row * (cfg.row_size >> lg_elem);

    // indirection vector
    iv_first_idx = off >> lg_obj;
    iv_scaled    = iv_idx << lg_ivel;
    iv_eaddr     = {cfg.iv_paddr, {PAGE_W{1'b0}}} + {8'd0, iv_scaled};
    iv_val       = iv_elem - {31'd0, cfg.fortran_sub};
    iv_pv        = {2'b00, iv_val} << lg_obj;

    first_pv     = '0;
    step         = '0;
    lg_line_objs = 5'd0;                      // log2(objects per line)
    unique case (map_type_e'(cfg.map_type))
      DIRECT_MAPPING: begin
        first_pv = {2'b00, off};
      end
      PAGECOLOR_MAPPING: begin
        first_pv = {2'b00, pc_hi + pc_lo};
      end
      STRIDE_MAPPING: begin
        first_pv     = {st_prod + {20'd0, 2'b00, cfg.object_offset[11:2]}, 2'b00};
        step         = {18'd0, cfg.stride_size};
        lg_line_objs = 5'(OFF_W) - lg_obj;
      end
      INDIRVECTOR_MAPPING: begin
        first_pv     = iv_pv;
        lg_line_objs = 5'(OFF_W) - lg_obj;
      end
      TRANSPOSE_MAPPING: begin
        first_pv     = {2'b00, tr_prod + tr_col} << lg_elem;
        step         = {2'b00, cfg.row_size};
        lg_line_objs = 5'(OFF_W) - lg_elem;
      end
      default: ;
    endcase
    n_objs       = (SLOT_W + 1)'(1) << lg_line_objs;
    obj_bytes_m1 = OFF_W'((LINE_BYTES >> lg_line_objs) - 1);
  end

endmodule
