// rc_pkg -- types, constants and helper functions shared by the blocks of the
// hardened multi-FPGA reconfiguration system.
//
// A two-rail code (TRC) pair carries one error indication on two wires: the pair
// is a valid code word when the two rails differ and signals an error when they
// are equal. The number of stored configurations follows the off-line relocation
// strategy: with A independently recoverable areas and up to F non-recoverable
// faults, every sequence of faults needs its own configuration, so
// sum_{i=0..F} A^i bitstreams are kept (a complete A-ary tree of depth F).
// Default sizes are the case-study values (7 areas, 2 faults); the JTAG codes are
// those of a Virtex-4 device, the family of the case-study board.
package rc_pkg;

  // two-rail pair: [1] true rail, [0] complement rail
  typedef logic [1:0] trc_t;

  localparam trc_t TRC_OK  = 2'b10;  // value emitted when no error is present
  localparam trc_t TRC_ERR = 2'b11;  // value emitted when an error is flagged

  typedef enum logic {FAULT_RECOVERABLE = 1'b0, FAULT_NON_RECOVERABLE = 1'b1} fault_type_e;

  // case-study defaults
  localparam int unsigned DEF_AREAS   = 7;     // max_areas
  localparam int unsigned DEF_FAULTS  = 2;     // #faults
  localparam int unsigned DEF_K       = 3;     // classification threshold (not given: chosen)
  localparam int unsigned DEF_BS_BYTES = 3838960; // xc4vlx100 full bitstream (30,711,680 bits)
  localparam logic [7:0]  DEF_SYNC    = 8'hAA; // marker byte in front of every stored bitstream

  // Virtex-4 JTAG instruction register
  localparam int unsigned  JTAG_IR_LEN    = 10;
  localparam logic [9:0]   JTAG_CFG_IN    = 10'h3C5;
  localparam logic [9:0]   JTAG_JSTART    = 10'h3CC;
  localparam int unsigned  JTAG_START_CLKS = 12;  // Run-Test/Idle clocks after JSTART

  // a TRC pair is valid when its rails differ
  function automatic logic trc_valid(input trc_t p);
    return p[1] ^ p[0];
  endfunction

  // two-rail checker cell: output valid iff both inputs valid
  function automatic trc_t trc_cell(input trc_t a, input trc_t b);
    trc_t z;
    z[1] = (a[1] & b[1]) | (a[0] & b[0]);
    z[0] = (a[1] & b[0]) | (a[0] & b[1]);
    return z;
  endfunction

  // number of stored configurations: sum_{i=0..faults} areas^i
  function automatic int unsigned num_bitstreams(input int unsigned areas, input int unsigned faults);
    int unsigned s, p;
    s = 0; p = 1;
    for (int unsigned i = 0; i <= faults; i++) begin
      s += p;
      p *= areas;
    end
    return s;
  endfunction

endpackage
