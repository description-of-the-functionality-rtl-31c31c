// dram_model: behavioural model of the DRAM behind the DRAM scheduler.
//
// Not synthesizable; testbench use only. Accepts one line read or
// byte-masked line write per cycle (ready may be withheld at random when
// STALLS is set). Each read returns after LAT to LAT+JITTER cycles, so reads
// may complete out of order; at most one read returns per cycle. Memory holds
// only written lines; every other line reads as tb_util_pkg::init_line().
// poke_word()/peek_word() give the testbench direct access; set_slow() makes
// reads of one line take SLOW_LAT cycles instead.
module dram_model
  import impulse_pkg::*;
#(
  parameter int TAG_W  = 8,
  parameter int LAT    = 8,
  parameter int JITTER = 4,
  parameter bit STALLS = 1'b0,
  parameter int SLOW_LAT = 400
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid,
  output logic                  ready,
  input  logic                  write,
  input  logic [LA_W-1:0]       line,
  input  logic [LINE_BYTES-1:0] wmask,
  input  logic [LINE_W-1:0]     wdata,
  input  logic [TAG_W-1:0]      tag,
  output logic                  rvalid,
  output logic [TAG_W-1:0]      rtag,
  output logic [LINE_W-1:0]     rdata
);
  import tb_util_pkg::*;

  logic [LINE_W-1:0] mem [logic [LA_W-1:0]];
  bit                slow [logic [LA_W-1:0]];

  function automatic void set_slow(input logic [LA_W-1:0] l);
    slow[l] = 1'b1;
  endfunction

  typedef struct {
    longint            due;
    logic [TAG_W-1:0]  tag;
    logic [LINE_W-1:0] data;
  } pend_t;
  pend_t  pend[$];
  longint now;
  int     n_reads, n_writes;

  function automatic logic [LINE_W-1:0] read_line(input logic [LA_W-1:0] l);
    if (mem.exists(l)) return mem[l];
    return init_line(l);
  endfunction

  function automatic void poke_word(input logic [PA_W-1:0] a, input logic [31:0] v);
    logic [LINE_W-1:0] d;
    d = read_line(a[PA_W-1:7]);
    d[{a[6:2], 5'b0} +: 32] = v;
    mem[a[PA_W-1:7]] = d;
  endfunction

  function automatic logic [31:0] peek_word(input logic [PA_W-1:0] a);
    logic [LINE_W-1:0] d;
    d = read_line(a[PA_W-1:7]);
    return d[{a[6:2], 5'b0} +: 32];
  endfunction

  initial begin
    ready = 1'b1;
    rvalid = 1'b0;
    rtag = '0;
    rdata = '0;
    now = 0;
    n_reads = 0;
    n_writes = 0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    rvalid <= 1'b0;
    if (rst_n) begin
      if (valid && ready) begin
        if (write) begin
          logic [LINE_W-1:0] d;
          d = read_line(line);
          for (int b = 0; b < LINE_BYTES; b++)
            if (wmask[b]) d[b*8 +: 8] = wdata[b*8 +: 8];
          mem[line] = d;
          n_writes++;
        end else begin
          pend_t p;
          p.due  = now + LAT + ((JITTER > 0) ? longint'($urandom_range(JITTER)) : 0);
          if (slow.exists(line)) p.due = now + SLOW_LAT;
          p.tag  = tag;
          p.data = read_line(line);
          pend.push_back(p);
          n_reads++;
        end
      end
      for (int i = 0; i < pend.size(); i++)
        if (pend[i].due <= now) begin
          rvalid <= 1'b1;
          rtag   <= pend[i].tag;
          rdata  <= pend[i].data;
          pend.delete(i);
          break;
        end
      ready <= STALLS ? ($urandom_range(3) != 0) : 1'b1;
    end
  end
endmodule
