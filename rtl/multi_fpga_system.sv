// multi_fpga_system -- self-healing multi-FPGA platform (top level).
//
// N_FPGA FPGAs, each holding N_IRA independently recoverable areas (IRAs) and
// one hardened Reconfiguration Controller. Every IRA is a triple-modular-
// redundant block: its three replicas (the application logic, outside this
// RTL, entering on ira_replica_i) are voted by a tmr_voter, which masks one
// faulty replica and raises the area's two-rail error pair.
// Monitoring is distributed: the controller on FPGA k watches FPGA (k+1) mod
// N_FPGA, i.e. the FPGAs form a ring and each one is watched by exactly one
// neighbour. The controller sees N = N_IRA + 1 error pairs: pairs 0..N_IRA-1
// are the IRAs of the watched FPGA, pair N_IRA is that FPGA's own controller,
// which is treated as one more recoverable area.
// Per controller the top brings out the serial PROM port, the JTAG port that
// programs the watched FPGA, the structural-test handshake for the spare
// region and status (classification, current configuration, busy, fail).
// Everything is synchronous to one clock clk with asynchronous active-low
// reset rst_n. The default sizes are the case study's: four FPGAs, up to six
// IRAs per FPGA (plus the controller: seven areas), two tolerated
// non-recoverable faults; IRA width and classification threshold are chosen.
module multi_fpga_system
  import rc_pkg::*;
#(
  parameter int unsigned N_FPGA   = 4,
  parameter int unsigned N_IRA    = DEF_AREAS - 1,
  parameter int unsigned W        = 8,
  parameter int unsigned F        = DEF_FAULTS,
  parameter int unsigned K        = DEF_K,
  parameter int unsigned BS_BYTES = DEF_BS_BYTES,
  parameter logic [7:0]  PATTERN  = DEF_SYNC,
  localparam int unsigned N       = N_IRA + 1,
  localparam int unsigned NCFG    = num_bitstreams(N, F),
  localparam int unsigned CFGW    = (NCFG > 1) ? $clog2(NCFG) : 1
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  // IRA replicas and voted outputs, per FPGA
  input  logic [N_FPGA-1:0][N_IRA-1:0][2:0][W-1:0]  ira_replica_i,
  output logic [N_FPGA-1:0][N_IRA-1:0][W-1:0]       ira_out_o,
  // serial PROM of each controller
  output logic [N_FPGA-1:0]                         prom_cclk_o,
  output logic [N_FPGA-1:0]                         prom_reset_o,
  input  logic [N_FPGA-1:0]                         prom_din_i,
  // JTAG from the controller on FPGA k to FPGA (k+1) mod N_FPGA
  output logic [N_FPGA-1:0]                         jtag_tck_o,
  output logic [N_FPGA-1:0]                         jtag_tms_o,
  output logic [N_FPGA-1:0]                         jtag_tdi_o,
  input  logic [N_FPGA-1:0]                         jtag_tdo_i,
  // structural test of the spare region of the watched FPGA
  output logic [N_FPGA-1:0]                         test_req_o,
  input  logic [N_FPGA-1:0]                         test_done_i,
  input  logic [N_FPGA-1:0]                         test_pass_i,
  // status of each controller
  output logic [N_FPGA-1:0]                         fault_identified_o,
  output logic [N_FPGA-1:0]                         fault_nonrec_o,
  output logic [N_FPGA-1:0][N-1:0]                  faulty_area_o,
  output logic [N_FPGA-1:0][CFGW-1:0]               config_o,
  output logic [N_FPGA-1:0]                         busy_o,
  output logic [N_FPGA-1:0]                         fail_o,
  output trc_t [N_FPGA-1:0]                         ctrl_err_o,
  output trc_t [N_FPGA-1:0][N_IRA-1:0]              ira_err_o
);

  for (genvar k = 0; k < N_FPGA; k++) begin : g_fpga
    localparam int unsigned M = (k + 1) % N_FPGA;   // FPGA watched by this one

    // IRAs of FPGA k
    for (genvar a = 0; a < N_IRA; a++) begin : g_ira
      tmr_voter #(.W(W)) u_vote (
        .a_i(ira_replica_i[k][a][0]), .b_i(ira_replica_i[k][a][1]), .c_i(ira_replica_i[k][a][2]),
        .y_o(ira_out_o[k][a]), .err_o(ira_err_o[k][a])
      );
    end

    // Reconfiguration Controller of FPGA k, watching FPGA M
    trc_t [N-1:0] watched;
    fault_type_e  ftype;
    assign watched = {ctrl_err_o[M], ira_err_o[M]};
    assign fault_nonrec_o[k] = (ftype == FAULT_NON_RECOVERABLE);

    reconfiguration_controller #(
      .N(N), .F(F), .K(K), .BS_BYTES(BS_BYTES), .PATTERN(PATTERN)
    ) u_ctrl (
      .clk, .rst_n,
      .error_signals_i(watched),
      .cclk_o(prom_cclk_o[k]), .reset_mem_o(prom_reset_o[k]), .din_i(prom_din_i[k]),
      .tck_o(jtag_tck_o[k]), .tms_o(jtag_tms_o[k]), .tdi_o(jtag_tdi_o[k]), .tdo_i(jtag_tdo_i[k]),
      .test_req_o(test_req_o[k]), .test_done_i(test_done_i[k]), .test_pass_i(test_pass_i[k]),
      .fault_identified_o(fault_identified_o[k]), .fault_type_o(ftype),
      .faulty_area_o(faulty_area_o[k]), .config_o(config_o[k]),
      .busy_o(busy_o[k]), .fail_o(fail_o[k]), .err_o(ctrl_err_o[k])
    );
  end

endmodule
