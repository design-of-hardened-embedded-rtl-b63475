// tb_pkg -- contents of the simulated configuration PROM, shared by the PROM
// model and the JTAG target model.
//
// Stored configuration s occupies BS_BYTES+1 bytes: the sync marker, then
// BS_BYTES data bytes. Data byte 0 is the configuration number s itself (so a
// receiver can tell which configuration it got), the others follow the formula
// (s*37 + i*13 + i/256) mod 256; a byte that would equal the marker is
// replaced by its value xor 1, since stored data never contains the marker.
package tb_pkg;

  function automatic logic [7:0] bs_byte(input int unsigned s, input longint unsigned i,
                                         input logic [7:0] marker);
    logic [7:0] b;
    if (i == 0) b = 8'(s);
    else        b = 8'(longint'(s) * 37 + i * 13 + i / 256);
    if (b == marker) b = b ^ 8'h01;
    return b;
  endfunction

endpackage
