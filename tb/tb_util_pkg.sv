// tb_util_pkg: helpers shared by the testbenches.
//
// init_word() is the content every DRAM word has until it is written: a hash
// of its byte address, so that every word of memory is distinct and a
// testbench can predict any line without reading the model.
package tb_util_pkg;
  import impulse_pkg::*;

  function automatic logic [31:0] init_word(input logic [PA_W-1:0] byte_addr);
    logic [31:0] w;
    w = 32'(byte_addr >> 2);
    return (w * 32'h9E37_79B1) ^ 32'h0BAD_F00D;
  endfunction

  function automatic logic [LINE_W-1:0] init_line(input logic [LA_W-1:0] line);
    logic [LINE_W-1:0] d;
    for (int i = 0; i < LINE_BYTES / 4; i++)
      d[i*32 +: 32] = init_word({line, 7'(i * 4)});
    return d;
  endfunction
endpackage
