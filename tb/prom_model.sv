// prom_model -- behavioural model of the serial configuration PROM.
//
// Holds NCFG stored configurations one after another, each a sync marker
// followed by BS_BYTES data bytes (see tb_pkg::bs_byte); bytes past the last
// configuration read as 8'hFF. The contents are computed, not stored. din shows
// the bit at the current bit address, MSB of each byte first; the address
// advances on every rising edge of cclk and returns to 0 while reset_mem is
// high. Not synthesizable.
module prom_model
  import tb_pkg::*;
#(
  parameter longint unsigned BS_BYTES = 8,
  parameter int unsigned     NCFG     = 3,
  parameter logic [7:0]      MARKER   = 8'hAA
) (
  input  logic cclk,
  input  logic reset_mem,
  output logic din
);

  longint unsigned addr;
  longint unsigned byte_idx, off;
  int unsigned     cfg;
  logic [7:0]      cur;

  always @(posedge cclk or posedge reset_mem) begin
    if (reset_mem) addr <= 0;
    else           addr <= addr + 1;
  end

  always_comb begin
    byte_idx = addr / 8;
    cfg      = int'(byte_idx / (BS_BYTES + 1));
    off      = byte_idx % (BS_BYTES + 1);
    if (cfg >= NCFG)  cur = 8'hFF;
    else if (off == 0) cur = MARKER;
    else              cur = bs_byte(cfg, off - 1, MARKER);
    din = cur[3'(7 - (addr % 8))];
  end

endmodule
