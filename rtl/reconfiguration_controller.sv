// reconfiguration_controller -- hardened controller that heals a neighbour FPGA.
//
// It monitors the N two-rail error pairs of the areas of the neighbour FPGA
// and, on an error, reprograms that FPGA over JTAG with a recovery bitstream
// read from a serial PROM:
//   Fault Classifier      -> recoverable / non-recoverable, which area
//   Bitstream Address Calc -> which stored configuration, positions the PROM
//   Bitstream Module      -> PROM reader
//   Manager               -> sequencing, structural-test request, byte moves
//   Reconfiguration Interface -> JTAG master
// Hardening, as the document prescribes: the classifier is self-checking, the
// Manager, the Bitstream Address Calculator and the Bitstream Module are
// duplicated with comparison (copy A drives, copy B is only compared), and the
// Reconfiguration Interface is triplicated and voted. Every duplicated output
// bit is compared as a two-rail pair (a, ~b); these pairs, the classifier's
// check pair and the voter's pair are reduced by a two-rail checker to err_o,
// the controller's own error pair. err_o is meant to be watched by the
// controller on another FPGA, which treats this controller as one of its
// areas. The controller blocks nothing itself: a detected internal error is
// only signalled. Timing: see the sub-blocks; err_o is combinational.
module reconfiguration_controller
  import rc_pkg::*;
#(
  parameter int unsigned N        = DEF_AREAS,
  parameter int unsigned F        = DEF_FAULTS,
  parameter int unsigned K        = DEF_K,
  parameter int unsigned BS_BYTES = DEF_BS_BYTES,
  parameter logic [7:0]  PATTERN  = DEF_SYNC,
  localparam int unsigned NCFG    = num_bitstreams(N, F),
  localparam int unsigned CFGW    = (NCFG > 1) ? $clog2(NCFG) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // error signals of the monitored FPGA
  input  trc_t [N-1:0]    error_signals_i,
  // serial PROM
  output logic            cclk_o,
  output logic            reset_mem_o,
  input  logic            din_i,
  // JTAG port of the monitored FPGA
  output logic            tck_o,
  output logic            tms_o,
  output logic            tdi_o,
  input  logic            tdo_i,
  // structural test of the spare region
  output logic            test_req_o,
  input  logic            test_done_i,
  input  logic            test_pass_i,
  // status
  output logic            fault_identified_o,
  output fault_type_e     fault_type_o,
  output logic [N-1:0]    faulty_area_o,
  output logic [CFGW-1:0] config_o,
  output logic            busy_o,
  output logic            fail_o,
  output trc_t            err_o
);

  // ---------------- Fault Classifier (self-checking) ----------------
  logic enable;
  trc_t fc_err;

  fault_classifier #(.N(N), .K(K)) u_fc (
    .clk, .rst_n, .enable_i(enable), .error_signals_i,
    .fault_identified_o, .fault_type_o, .faulty_area_o, .err_o(fc_err)
  );

  // ---------------- Bitstream Address Calculator (x2) ----------------
  localparam int unsigned BACW = 4 + 8 + CFGW;
  logic [BACW-1:0] bac_out [2];
  logic            bm_rst, next_sync, bs_ready, bs_error, sync;
  logic [7:0]      pattern;
  logic [CFGW-1:0] cfg;

  for (genvar c = 0; c < 2; c++) begin : g_bac
    logic            r, ns, rdy, er;
    logic [7:0]      pat;
    logic [CFGW-1:0] cf;
    bitstream_address_calculator #(.N(N), .F(F), .PATTERN(PATTERN)) u_bac (
      .clk, .rst_n,
      .fault_identified_i(fault_identified_o), .fault_type_i(fault_type_o),
      .faulty_area_i(faulty_area_o),
      .bm_rst_o(r), .next_sync_o(ns), .pattern_o(pat), .sync_i(sync),
      .bs_ready_o(rdy), .bs_error_o(er), .config_o(cf)
    );
    assign bac_out[c] = {r, ns, rdy, er, pat, cf};
  end
  assign {bm_rst, next_sync, bs_ready, bs_error, pattern, cfg} = bac_out[0];
  assign config_o = cfg;

  // ---------------- Bitstream Module (x2) ----------------
  localparam int unsigned BMW = 4 + 8;
  logic [BMW-1:0] bm_out [2];
  logic           read, data_ready;
  logic [7:0]     data;

  for (genvar c = 0; c < 2; c++) begin : g_bm
    logic       ck, rm, sy, dr;
    logic [7:0] d;
    bitstream_module u_bm (
      .clk, .rst_n, .cclk_o(ck), .reset_mem_o(rm), .din_i,
      .rst_i(bm_rst), .next_sync_i(next_sync), .pattern_i(pattern), .sync_o(sy),
      .read_i(read), .data_ready_o(dr), .data_o(d)
    );
    assign bm_out[c] = {ck, rm, sy, dr, d};
  end
  logic bm_cclk, bm_reset_mem;
  assign {bm_cclk, bm_reset_mem, sync, data_ready, data} = bm_out[0];
  assign cclk_o      = bm_cclk;
  assign reset_mem_o = bm_reset_mem;

  // ---------------- Manager (x2) ----------------
  localparam int unsigned MGW = 7;
  logic [MGW-1:0] mgr_out [2];
  logic           prog, load, rdy, done, rec_error, mgr_test_req, mgr_busy, mgr_fail;

  for (genvar c = 0; c < 2; c++) begin : g_mgr
    logic en, tr, rd, pg, ld, bz, fl;
    manager #(.BS_BYTES(BS_BYTES)) u_mgr (
      .clk, .rst_n,
      .fault_identified_i(fault_identified_o), .fault_type_i(fault_type_o), .enable_o(en),
      .test_req_o(tr), .test_done_i, .test_pass_i,
      .bs_ready_i(bs_ready), .bs_error_i(bs_error),
      .read_o(rd), .data_ready_i(data_ready),
      .prog_o(pg), .load_o(ld), .rdy_i(rdy), .done_i(done), .rec_error_i(rec_error),
      .busy_o(bz), .fail_o(fl)
    );
    assign mgr_out[c] = {en, tr, rd, pg, ld, bz, fl};
  end
  assign {enable, mgr_test_req, read, prog, load, mgr_busy, mgr_fail} = mgr_out[0];
  assign test_req_o = mgr_test_req;
  assign busy_o     = mgr_busy;
  assign fail_o     = mgr_fail;

  // ---------------- Reconfiguration Interface (x3, voted) ----------------
  logic [5:0] ri_out [3];
  logic [5:0] ri_voted;
  trc_t       ri_err;

  for (genvar c = 0; c < 3; c++) begin : g_ri
    logic ry, dn, re, ck, ms, di;
    reconfiguration_interface u_ri (
      .clk, .rst_n, .prog_i(prog), .load_i(load), .data_i(data),
      .rdy_o(ry), .done_o(dn), .rec_error_o(re),
      .tck_o(ck), .tms_o(ms), .tdi_o(di), .tdo_i
    );
    assign ri_out[c] = {ry, dn, re, ck, ms, di};
  end

  tmr_voter #(.W(6)) u_ri_vote (
    .a_i(ri_out[0]), .b_i(ri_out[1]), .c_i(ri_out[2]), .y_o(ri_voted), .err_o(ri_err)
  );
  assign {rdy, done, rec_error, tck_o, tms_o, tdi_o} = ri_voted;

  // ---------------- own error pair ----------------
  localparam int unsigned NCMP = BACW + BMW + MGW;
  trc_t [NCMP+1:0] chk;
  logic [NCMP-1:0] cmp_a, cmp_b;

  assign cmp_a = {bac_out[0], bm_out[0], mgr_out[0]};
  assign cmp_b = {bac_out[1], bm_out[1], mgr_out[1]};

  always_comb begin
    for (int i = 0; i < NCMP; i++) chk[i] = {cmp_a[i], ~cmp_b[i]};
    chk[NCMP]   = fc_err;
    chk[NCMP+1] = ri_err;
  end

  trc_checker #(.N(NCMP + 2)) u_chk (.pairs_i(chk), .pair_o(err_o));

endmodule
