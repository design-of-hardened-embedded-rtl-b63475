// tb_full_size -- one complete recovery with the top at its default sizes:
// four FPGAs, six IRAs of 8 bits each plus the controller (7 areas), two
// tolerated permanent faults (57 stored configurations) and full-size
// bitstreams of 3,838,960 bytes. A replica of IRA 0 on FPGA 1 turns faulty;
// the controller on FPGA 0 classifies the fault as recoverable and streams the
// whole initial configuration from its PROM to FPGA 1 over JTAG. Checks the
// classification, that the voted outputs stay correct, and that the target
// received every byte of configuration 0 intact; reports the clocks needed.
module tb_full_size;
  import rc_pkg::*;
  import tb_pkg::*;
  localparam int unsigned NF = 4, NI = DEF_AREAS - 1, W = 8, N = DEF_AREAS;
  localparam int unsigned NC = num_bitstreams(DEF_AREAS, DEF_FAULTS);
  localparam int unsigned CW = $clog2(NC);

  logic clk = 0, rst_n = 0;
  logic [NF-1:0][NI-1:0][2:0][W-1:0] rep;
  logic [NF-1:0][NI-1:0][W-1:0] yout;
  logic [NF-1:0] cclk, preset, din, tck, tms, tdi, tdo, treq, tdone, tpass;
  logic [NF-1:0] fid, fnr, busy, fail;
  logic [NF-1:0][N-1:0] farea;
  logic [NF-1:0][CW-1:0] cfg;
  trc_t [NF-1:0] cerr;
  trc_t [NF-1:0][NI-1:0] ierr;
  int unsigned n_done [NF], last_cfg [NF], last_bad [NF];
  longint unsigned last_bytes [NF];
  logic odd [NF];
  logic faulty = 0;
  int checks = 0, failures = 0;
  longint unsigned cycles = 0;

  multi_fpga_system dut (
    .clk, .rst_n, .ira_replica_i(rep), .ira_out_o(yout),
    .prom_cclk_o(cclk), .prom_reset_o(preset), .prom_din_i(din),
    .jtag_tck_o(tck), .jtag_tms_o(tms), .jtag_tdi_o(tdi), .jtag_tdo_i(tdo),
    .test_req_o(treq), .test_done_i(tdone), .test_pass_i(tpass),
    .fault_identified_o(fid), .fault_nonrec_o(fnr), .faulty_area_o(farea), .config_o(cfg),
    .busy_o(busy), .fail_o(fail), .ctrl_err_o(cerr), .ira_err_o(ierr)
  );

  for (genvar k = 0; k < NF; k++) begin : g_env
    localparam int M = (k + 1) % NF;
    prom_model #(.BS_BYTES(DEF_BS_BYTES), .NCFG(NC), .MARKER(DEF_SYNC)) u_prom (
      .cclk(cclk[k]), .reset_mem(preset[k]), .din(din[k]));
    jtag_target_model #(.MARKER(DEF_SYNC)) u_tgt (
      .tck(tck[k]), .tms(tms[k]), .tdi(tdi[k]), .tdo(tdo[k]), .bad_capture(1'b0),
      .n_done(n_done[M]), .last_cfg(last_cfg[M]), .last_bytes(last_bytes[M]),
      .last_bad(last_bad[M]), .odd_bits(odd[M]));
  end
  assign tdone = treq;
  assign tpass = '1;

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  always_comb begin
    for (int m = 0; m < NF; m++) for (int a = 0; a < NI; a++) begin
      logic [W-1:0] v;
      v = W'(m * 16 + a * 3 + 1);
      rep[m][a][0] = v;
      rep[m][a][1] = (faulty && m == 1 && a == 0) ? ~v : v;
      rep[m][a][2] = v;
    end
  end

  initial begin
    repeat (120_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    faulty = 1;
    while (!fid[0]) @(negedge clk);
    t0 = cycles;
    checks += 3;
    if (fnr[0])              begin failures++; $display("FAIL classified non-recoverable"); end
    if (farea[0] != N'(1))   begin failures++; $display("FAIL faulty area %b", farea[0]); end
    if (yout[1][0] != 8'd17) begin failures++; $display("FAIL fault not masked"); end
    while (n_done[1] == 0) @(negedge clk);
    faulty = 0;
    repeat (10) @(negedge clk);
    $display("recovery took %0d clocks for %0d bytes", cycles - t0, last_bytes[1]);
    checks += 5;
    if (last_cfg[1] != 0)                begin failures++; $display("FAIL configuration %0d", last_cfg[1]); end
    if (last_bytes[1] != DEF_BS_BYTES)   begin failures++; $display("FAIL %0d bytes", last_bytes[1]); end
    if (last_bad[1] != 0 || odd[1])      begin failures++; $display("FAIL %0d bad bytes", last_bad[1]); end
    if (fail != '0)                      begin failures++; $display("FAIL controller failed"); end
    if (ierr[1][0][1] == ierr[1][0][0])  begin failures++; $display("FAIL error pair still set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
