// impulse_pkg: widths, encodings and shared types of the Impulse memory
// controller.
//
// System assumptions that fix the widths: 40-bit physical addresses, 4 KiB
// base pages (28-bit frame numbers), 128-byte cache lines and 34-bit
// pseudo-virtual (pv) addresses (a remapped region is at most 16 GiB).
// A shadow address has bits 39:38 = 2'b11, the shadow controller index in
// bits 37:32 and the offset inside the shadow region in bits 31:0.
//
// The register numbering of the control registers and the numeric codes of
// the mapping types are this design's own choice; the field names and field
// widths are the ones of the configuration tables of each remapping type.
package impulse_pkg;

  localparam int PA_W       = 40;               // physical address
  localparam int LINE_BYTES = 128;              // L2 / bus line
  localparam int LINE_W     = LINE_BYTES * 8;   // line data bits
  localparam int OFF_W      = 7;                // byte offset in a line
  localparam int LA_W       = PA_W - OFF_W;     // line address
  localparam int PAGE_W     = 12;               // 4 KiB page offset
  localparam int FRAME_W    = PA_W - PAGE_W;    // 28-bit frame number
  localparam int PV_W       = 34;               // pseudo-virtual address
  localparam int VPN_W      = PV_W - PAGE_W;    // 22-bit pv page number
  localparam int SCIDX_W    = 6;                // shadow controller index
  localparam int SLOT_W     = 5;                // object slot in a line (<=32 objects)
  localparam int MAX_OBJS   = LINE_BYTES / 4;   // objects are at least 4 bytes
  localparam int BLK_W      = 2;                // SRAM buffer block number (<=4 blocks)

  // Numeric codes of map_type (8-bit field).
  typedef enum logic [7:0] {
    DIRECT_MAPPING      = 8'd1,
    PAGECOLOR_MAPPING   = 8'd2,
    STRIDE_MAPPING      = 8'd3,
    INDIRVECTOR_MAPPING = 8'd4,
    TRANSPOSE_MAPPING   = 8'd5
  } map_type_e;

  // Register numbers of the memory-mapped control registers.
  typedef enum logic [4:0] {
    R_MAP_TYPE    = 5'd0,
    R_PREF_INFO   = 5'd1,
    R_PREF_COUNT  = 5'd2,
    R_SADDR_START = 5'd3,
    R_SADDR_SIZE  = 5'd4,
    R_PTABLE_PTR  = 5'd5,
    R_COLOR_SIZE  = 5'd6,
    R_WAY_SIZE    = 5'd7,
    R_COLOR_OFF   = 5'd8,
    R_STRIDE_SIZE = 5'd9,
    R_OBJECT_SIZE = 5'd10,
    R_OBJECT_CNT  = 5'd11,
    R_OBJECT_OFF  = 5'd12,
    R_IV_PADDR    = 5'd13,
    R_IV_ELEMSIZE = 5'd14,
    R_IV_OBJCOUNT = 5'd15,
    R_FORTRAN_SUB = 5'd16,
    R_ELEM_SIZE   = 5'd17,
    R_ROW_SIZE    = 5'd18,
    R_ROW_NUM     = 5'd19
  } cfg_reg_e;

  // Configuration of one shadow controller (union of all mapping types).
  typedef struct packed {
    logic [7:0]         map_type;
    logic [1:0]         pref_info;
    logic [17:0]        pref_count;
    logic [31:0]        saddr_start;
    logic [31:0]        saddr_size;
    logic [FRAME_W-1:0] ptable_ptr;
    logic [31:0]        color_size;
    logic [31:0]        way_size;
    logic [31:0]        color_offset;
    logic [15:0]        stride_size;
    logic [11:0]        object_size;
    logic [31:0]        object_count;
    logic [11:0]        object_offset;
    logic [FRAME_W-1:0] iv_paddr;
    logic [2:0]         iv_elemsize;
    logic [31:0]        iv_objcount;
    logic               fortran_sub;
    logic [11:0]        elem_size;
    logic [31:0]        row_size;
    logic [31:0]        row_num;
  } sc_cfg_t;

  // Identifies who a translated/physical request belongs to, so that the
  // returned line can be routed back: the system interface, or object slot
  // `slot` of SRAM buffer block `blk` of shadow controller `sc`.
  typedef struct packed {
    logic               sysif;
    logic [SCIDX_W-1:0] sc;
    logic [BLK_W-1:0]   blk;
    logic [SLOT_W-1:0]  slot;
  } req_tag_t;

  // A DRAM transaction as seen by the DRAM scheduler: a line read, or a
  // byte-masked line write. `tag` is returned with read data.
  localparam int DTAG_W = 8;
  typedef struct packed {
    logic                  write;
    logic [LA_W-1:0]       line;
    logic [LINE_BYTES-1:0] wmask;
    logic [LINE_W-1:0]     wdata;
    logic [DTAG_W-1:0]     tag;
  } dram_req_t;

  typedef struct packed {
    logic [DTAG_W-1:0]     tag;
    logic [LINE_W-1:0]     data;
  } dram_resp_t;

  // Memory controller page table entry (4 bytes).
  typedef struct packed {
    logic               valid;
    logic               ref_b;
    logic               modify;
    logic               fault;
    logic [FRAME_W-1:0] frame;
  } pte_t;

  // One-cycle event pulses of the whole controller, for statistics.
  typedef struct packed {
    logic shadow_req;     // shadow read accepted from the bus
    logic phys_req;       // physical access accepted from the bus
    logic sc_queued;      // access waited in a busy shadow controller's queue
    logic sc_sbuf_hit;    // shadow line returned from a controller's SRAM buffer
    logic sc_iv_fetch;    // indirection-vector line fetched from DRAM
    logic sc_pref;        // shadow line prefetched into a controller's SRAM buffer
    logic sc_pref_wait;   // shadow access hit a buffer block still being filled
    logic sc_scatter;     // shadow write scattered by a controller
    logic tlb_hit;
    logic tlb_buf_hit;    // MTLB miss served by the PTE buffer
    logic tlb_fill;       // PTE line read from DRAM
    logic tlb_wb;         // PTE written back (ref/modify bit set)
    logic tlb_queued;     // access waited in the MTLB queue
    logic mc_hit;
    logic mc_miss;
    logic mc_pref_issue;  // next-line prefetch sent to DRAM
    logic mc_pref_hit;    // demand access hit a prefetched, unused line
    logic mc_pref_drop;   // prefetch discarded, no free line
    logic mc_stall;       // request waited for a line being fetched
    logic mc_inval;       // write invalidated a cached line
  } mmc_events_t;

  // log2 of a power of two (index of the highest set bit); 0 for 0.
  function automatic logic [4:0] log2_pow2(input logic [31:0] v);
    logic [4:0] r;
    r = '0;
    for (int i = 0; i < 32; i++) if (v[i]) r = 5'(i);
    return r;
  endfunction

endpackage
