// shadow_regs: control registers of one shadow controller.
//
// The processor sets these registers with uncached stores before any shadow
// access reaches the controller. Each configuration field of the remapping
// tables has its own 32-bit register slot (numbering in impulse_pkg::cfg_reg_e,
// this design's choice); a write keeps only the field's width, so the
// read-back value shows the implemented bits. The field widths follow the
// configuration tables. pref_count is 18 bits: the tables disagree (16 or 18
// bits) and the wider one holds both.
//
// Interface: one write port (we/waddr/wdata, takes effect at the next clock
// edge), one combinational read port, the whole configuration as a struct,
// and `cfg_changed`, a one-cycle pulse after any write that lets the
// controller discard data assembled under the old configuration.
// Reset clears every register (map_type 0 is no valid mapping).
module shadow_regs
  import impulse_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [4:0]  raddr,
  output logic [31:0] rdata,
  output sc_cfg_t     cfg,
  output logic        cfg_changed
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg         <= '0;
      cfg_changed <= 1'b0;
    end else begin
      cfg_changed <= we;
      if (we) begin
        unique case (cfg_reg_e'(waddr))
          R_MAP_TYPE:    cfg.map_type      <= wdata[7:0];
          R_PREF_INFO:   cfg.pref_info     <= wdata[1:0];
          R_PREF_COUNT:  cfg.pref_count    <= wdata[17:0];
          R_SADDR_START: cfg.saddr_start   <= wdata;
          R_SADDR_SIZE:  cfg.saddr_size    <= wdata;
          R_PTABLE_PTR:  cfg.ptable_ptr    <= wdata[FRAME_W-1:0];
          R_COLOR_SIZE:  cfg.color_size    <= wdata;
          R_WAY_SIZE:    cfg.way_size      <= wdata;
          R_COLOR_OFF:   cfg.color_offset  <= wdata;
          R_STRIDE_SIZE: cfg.stride_size   <= wdata[15:0];
          R_OBJECT_SIZE: cfg.object_size   <= wdata[11:0];
          R_OBJECT_CNT:  cfg.object_count  <= wdata;
          R_OBJECT_OFF:  cfg.object_offset <= wdata[11:0];
          R_IV_PADDR:    cfg.iv_paddr      <= wdata[FRAME_W-1:0];
          R_IV_ELEMSIZE: cfg.iv_elemsize   <= wdata[2:0];
          R_IV_OBJCOUNT: cfg.iv_objcount   <= wdata;
          R_FORTRAN_SUB: cfg.fortran_sub   <= wdata[0];
          R_ELEM_SIZE:   cfg.elem_size     <= wdata[11:0];
          R_ROW_SIZE:    cfg.row_size      <= wdata;
          R_ROW_NUM:     cfg.row_num       <= wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata = '0;
    unique case (cfg_reg_e'(raddr))
      R_MAP_TYPE:    rdata = {24'd0, cfg.map_type};
      R_PREF_INFO:   rdata = {30'd0, cfg.pref_info};
      R_PREF_COUNT:  rdata = {14'd0, cfg.pref_count};
      R_SADDR_START: rdata = cfg.saddr_start;
      R_SADDR_SIZE:  rdata = cfg.saddr_size;
      R_PTABLE_PTR:  rdata = {4'd0, cfg.ptable_ptr};
      R_COLOR_SIZE:  rdata = cfg.color_size;
      R_WAY_SIZE:    rdata = cfg.way_size;
      R_COLOR_OFF:   rdata = cfg.color_offset;
      R_STRIDE_SIZE: rdata = {16'd0, cfg.stride_size};
      R_OBJECT_SIZE: rdata = {20'd0, cfg.object_size};
      R_OBJECT_CNT:  rdata = cfg.object_count;
      R_OBJECT_OFF:  rdata = {20'd0, cfg.object_offset};
      R_IV_PADDR:    rdata = {4'd0, cfg.iv_paddr};
      R_IV_ELEMSIZE: rdata = {29'd0, cfg.iv_elemsize};
      R_IV_OBJCOUNT: rdata = cfg.iv_objcount;
      R_FORTRAN_SUB: rdata = {31'd0, cfg.fortran_sub};
      R_ELEM_SIZE:   rdata = {20'd0, cfg.elem_size};
      R_ROW_SIZE:    rdata = cfg.row_size;
      R_ROW_NUM:     rdata = cfg.row_num;
      default:       rdata = '0;
    endcase
  end

endmodule
