// tb_multi_fpga_system -- end-to-end test of the four-FPGA ring at reduced
// sizes (2 IRAs per FPGA + controller = 3 areas, K = 2, F = 2, 6-byte
// bitstreams). Every controller has its PROM model; every FPGA has a JTAG
// target model standing for its configuration port. The application replicas
// are driven by the testbench: a faulty replica is inverted. A completed
// configuration repairs transient faults of the FPGA it reached, and a
// relocation (configuration c*3+a+1) also repairs the permanent fault of
// area a. Mechanisms exercised and counted (each must occur):
//   masked     - a faulty replica outvoted at an IRA output
//   reload     - recoverable fault repaired by reloading the configuration
//   relocate   - non-recoverable fault moved to spare fabric after a test
//   parallel   - two controllers recovering at the same time
//   ctrl_fault - a controller's internal mismatch repaired by its neighbour
//   exhausted  - a fault beyond the F tolerated ones ends in fail
//   test_fail  - a failed structural test of the spare region ends in fail
//   rec_error  - a JTAG error while reprogramming ends in fail
module tb_multi_fpga_system;
  import rc_pkg::*;
  import tb_pkg::*;
  localparam int unsigned NF = 4, NI = 2, W = 4, F = 2, K = 2, BS = 6;
  localparam int unsigned N = NI + 1;
  localparam int unsigned NC = num_bitstreams(N, F);
  localparam int unsigned CW = $clog2(NC);
  localparam logic [7:0] MK = 8'hAA;

  typedef enum int {NONE, TRANSIENT, PERMANENT} fault_e;

  logic clk = 0, rst_n = 0;
  logic [NF-1:0][NI-1:0][2:0][W-1:0] rep;
  logic [NF-1:0][NI-1:0][W-1:0] yout, val;
  logic [NF-1:0] cclk, preset, din, tck, tms, tdi, tdo, treq, tdone, tpass;
  logic [NF-1:0] fid, fnr, busy, fail;
  logic [NF-1:0][N-1:0] farea;
  logic [NF-1:0][CW-1:0] cfg;
  trc_t [NF-1:0] cerr;
  trc_t [NF-1:0][NI-1:0] ierr;
  fault_e flt [NF][N];
  int unsigned n_done [NF], last_cfg [NF], last_bad [NF];
  longint unsigned last_bytes [NF];
  logic odd [NF];
  int checks = 0, failures = 0;
  int c_masked = 0, c_reload = 0, c_relocate = 0, c_parallel = 0, c_ctrl = 0, c_exhaust = 0;
  int c_test_fail = 0, c_rec_error = 0;
  logic [NF-1:0] bad_cap = '0, test_ok = '1;

  multi_fpga_system #(.N_FPGA(NF), .N_IRA(NI), .W(W), .F(F), .K(K), .BS_BYTES(BS), .PATTERN(MK)) dut (
    .clk, .rst_n, .ira_replica_i(rep), .ira_out_o(yout),
    .prom_cclk_o(cclk), .prom_reset_o(preset), .prom_din_i(din),
    .jtag_tck_o(tck), .jtag_tms_o(tms), .jtag_tdi_o(tdi), .jtag_tdo_i(tdo),
    .test_req_o(treq), .test_done_i(tdone), .test_pass_i(tpass),
    .fault_identified_o(fid), .fault_nonrec_o(fnr), .faulty_area_o(farea), .config_o(cfg),
    .busy_o(busy), .fail_o(fail), .ctrl_err_o(cerr), .ira_err_o(ierr)
  );

  for (genvar k = 0; k < NF; k++) begin : g_env
    localparam int M = (k + 1) % NF;   // FPGA reprogrammed by controller k
    prom_model #(.BS_BYTES(BS), .NCFG(NC), .MARKER(MK)) u_prom (
      .cclk(cclk[k]), .reset_mem(preset[k]), .din(din[k]));
    jtag_target_model #(.MARKER(MK)) u_tgt (
      .tck(tck[k]), .tms(tms[k]), .tdi(tdi[k]), .tdo(tdo[k]), .bad_capture(bad_cap[k]),
      .n_done(n_done[M]), .last_cfg(last_cfg[M]), .last_bytes(last_bytes[M]),
      .last_bad(last_bad[M]), .odd_bits(odd[M]));

    // structural test of the spare region: passes unless test_ok[k] is low
    always @(posedge clk) begin
      if (treq[k] && !tdone[k]) tdone[k] <= 1;
      if (!treq[k]) tdone[k] <= 0;
    end
    assign tpass[k] = test_ok[k];

    // the watched FPGA M reacts to a completed configuration
    int unsigned seen = 0;
    int unsigned cur_cfg = 0;
    always @(posedge clk) if (n_done[M] != seen) begin
      seen <= n_done[M];
      checks += 2;
      if (last_bytes[M] != BS || last_bad[M] != 0 || odd[M]) begin
        failures++; $display("FAIL FPGA %0d stream %0d bytes %0d bad", M, last_bytes[M], last_bad[M]);
      end
      if (last_cfg[M] != 32'(cfg[k])) begin
        failures++; $display("FAIL FPGA %0d got configuration %0d, controller says %0d", M, last_cfg[M], cfg[k]);
      end
      for (int a = 0; a < N; a++) if (flt[M][a] == TRANSIENT) begin
        flt[M][a] = NONE;
        if (a == NI) c_ctrl++; else c_reload++;
      end
      if (last_cfg[M] != cur_cfg) begin
        int a;
        a = (int'(last_cfg[M]) - 1) % N;
        if (flt[M][a] == PERMANENT) begin flt[M][a] = NONE; c_relocate++; end
        cur_cfg <= last_cfg[M];
      end
    end
  end

  // controller faults: one copy of the Manager of controller m disagrees
  always @(negedge clk) begin
    if (flt[1][NI] == TRANSIENT) force dut.g_fpga[1].u_ctrl.g_mgr[1].u_mgr.fail_o = 1'b1;
    else                         release dut.g_fpga[1].u_ctrl.g_mgr[1].u_mgr.fail_o;
  end

  always #5 clk = ~clk;

  // replicas: random data, a faulty replica 1 is inverted
  always @(posedge clk) begin
    for (int m = 0; m < NF; m++) for (int a = 0; a < NI; a++) val[m][a] <= W'($urandom);
  end
  always_comb begin
    for (int m = 0; m < NF; m++) for (int a = 0; a < NI; a++) begin
      rep[m][a][0] = val[m][a];
      rep[m][a][1] = (flt[m][a] != NONE) ? ~val[m][a] : val[m][a];
      rep[m][a][2] = val[m][a];
    end
  end
  always @(negedge clk) if (rst_n) begin
    for (int m = 0; m < NF; m++) for (int a = 0; a < NI; a++) begin
      checks++;
      if (yout[m][a] != val[m][a]) begin failures++; $display("FAIL IRA %0d.%0d not masked", m, a); end
      else if (flt[m][a] != NONE) c_masked++;
    end
    if ($countones(busy) >= 2) c_parallel++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait until no controller has been busy for 100 consecutive clocks
  task automatic wait_quiet();
    int t, idle;
    t = 0; idle = 0;
    repeat (20) @(negedge clk);
    while (idle < 100 && t < 200000) begin
      @(negedge clk);
      t++;
      idle = (busy == '0) ? idle + 1 : 0;
    end
  endtask

  function automatic bit all_clear(int m);
    for (int a = 0; a < N; a++) if (flt[m][a] != NONE) return 0;
    return 1;
  endfunction

  initial begin
    for (int m = 0; m < NF; m++) for (int a = 0; a < N; a++) flt[m][a] = NONE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // 1: two transient faults handled in parallel by controllers 0 and 2
    flt[1][0] = TRANSIENT;
    flt[3][1] = TRANSIENT;
    wait_quiet();
    checks += 2;
    if (!all_clear(1) || !all_clear(3)) begin failures++; $display("FAIL transient faults not repaired"); end
    if (cfg[0] != 0 || cfg[2] != 0) begin failures++; $display("FAIL configuration changed on reload"); end
    // 2: a permanent fault in FPGA 2 area 1: reload, then relocation to 0*3+1+1
    flt[2][1] = PERMANENT;
    wait_quiet();
    checks += 2;
    if (!all_clear(2)) begin failures++; $display("FAIL permanent fault not relocated"); end
    if (cfg[1] != 2)   begin failures++; $display("FAIL FPGA 2 configuration %0d", cfg[1]); end
    // 3: internal fault of the controller on FPGA 1, repaired by controller 0
    flt[1][NI] = TRANSIENT;
    wait_quiet();
    checks++;
    if (!all_clear(1)) begin failures++; $display("FAIL controller fault not repaired"); end
    // 4: FPGA 0 (watched by controller 3) collects permanent faults until none
    //    can be tolerated any more
    flt[0][0] = PERMANENT; wait_quiet();
    flt[0][1] = PERMANENT; wait_quiet();
    checks += 2;
    if (cfg[3] != CW'((0 * N + 0 + 1) * N + 1 + 1)) begin failures++; $display("FAIL FPGA 0 configuration %0d", cfg[3]); end
    if (fail[3]) begin failures++; $display("FAIL early fail"); end
    flt[0][0] = PERMANENT; wait_quiet();
    checks++;
    if (!fail[3]) begin failures++; $display("FAIL third permanent fault not reported"); end
    else c_exhaust++;
    checks++;
    if (fail[2:0] != 0) begin failures++; $display("FAIL other controllers failed"); end
    // 5: controller 0 meets a JTAG error while repairing FPGA 1
    bad_cap[0] = 1;
    flt[1][1] = TRANSIENT;
    wait_quiet();
    checks++;
    if (!fail[0]) begin failures++; $display("FAIL JTAG error not reported"); end
    else c_rec_error++;
    // 6: the spare region of FPGA 3 fails its structural test
    test_ok[2] = 0;
    flt[3][0] = PERMANENT;
    wait_quiet();
    checks++;
    if (!fail[2]) begin failures++; $display("FAIL failed structural test not reported"); end
    else c_test_fail++;
    checks++;
    if (fail[1]) begin failures++; $display("FAIL controller 1 failed"); end
    // every mechanism must have occurred
    $display("mechanisms: masked=%0d reload=%0d relocate=%0d parallel=%0d ctrl_fault=%0d exhausted=%0d test_fail=%0d rec_error=%0d",
             c_masked, c_reload, c_relocate, c_parallel, c_ctrl, c_exhaust, c_test_fail, c_rec_error);
    checks += 8;
    if (c_test_fail == 0) begin failures++; $display("FAIL no failed structural test"); end
    if (c_rec_error == 0) begin failures++; $display("FAIL no JTAG error"); end
    if (c_masked == 0)   begin failures++; $display("FAIL no masking seen"); end
    if (c_reload == 0)   begin failures++; $display("FAIL no reload seen"); end
    if (c_relocate < 3)  begin failures++; $display("FAIL relocations %0d", c_relocate); end
    if (c_parallel == 0) begin failures++; $display("FAIL no parallel recovery"); end
    if (c_ctrl == 0)     begin failures++; $display("FAIL no controller repair"); end
    if (c_exhaust == 0)  begin failures++; $display("FAIL no exhaustion"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
