// tb_reconfiguration_controller -- the hardened controller with the PROM model
// and the JTAG target model of the watched FPGA (N = 3 areas, F = 2, K = 2,
// 6-byte bitstreams, 13 stored configurations).
// The stand-in for the watched FPGA raises an area's error pair and clears it
// when a configuration has been completed, unless the fault is permanent.
// Checks, per recovery: classification, configuration number delivered to the
// target (and its contents), structural test only before relocation, and the
// final bs_error/fail after a third non-recoverable fault. The controller's
// own error pair must stay valid; forcing one copy of a duplicated Manager
// output must make it invalid.
module tb_reconfiguration_controller;
  import rc_pkg::*;
  import tb_pkg::*;
  localparam int unsigned N = 3, F = 2, K = 2, BS = 6;
  localparam int unsigned NC = num_bitstreams(N, F);
  localparam logic [7:0] MK = 8'hAA;
  logic clk = 0, rst_n = 0;
  trc_t [N-1:0] errs;
  logic cclk, reset_mem, din, tck, tms, tdi, tdo;
  logic test_req, test_done = 0, test_pass = 1;
  logic fid, busy, fail;
  fault_type_e ftype;
  logic [N-1:0] farea;
  logic [$clog2(NC)-1:0] cfg;
  trc_t self_err;
  int unsigned n_done, last_cfg, last_bad;
  longint unsigned last_bytes;
  logic odd_bits;
  int checks = 0, failures = 0, n_tests = 0;
  logic check_self = 1;

  reconfiguration_controller #(.N(N), .F(F), .K(K), .BS_BYTES(BS), .PATTERN(MK)) dut (
    .clk, .rst_n, .error_signals_i(errs),
    .cclk_o(cclk), .reset_mem_o(reset_mem), .din_i(din),
    .tck_o(tck), .tms_o(tms), .tdi_o(tdi), .tdo_i(tdo),
    .test_req_o(test_req), .test_done_i(test_done), .test_pass_i(test_pass),
    .fault_identified_o(fid), .fault_type_o(ftype), .faulty_area_o(farea), .config_o(cfg),
    .busy_o(busy), .fail_o(fail), .err_o(self_err)
  );
  prom_model #(.BS_BYTES(BS), .NCFG(NC), .MARKER(MK)) u_prom (.cclk, .reset_mem, .din);
  jtag_target_model #(.MARKER(MK)) u_tgt (
    .tck, .tms, .tdi, .tdo, .bad_capture(1'b0), .n_done, .last_cfg, .last_bytes, .last_bad, .odd_bits
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && check_self) begin
    checks++;
    if (self_err[1] == self_err[0]) begin failures++; $display("FAIL controller error pair %b", self_err); end
  end

  // structural test stand-in: passes after a few clocks
  always @(posedge clk) begin
    if (test_req && !test_done) begin n_tests++; test_done <= 1; end
    if (!test_req) test_done <= 0;
  end

  // one fault in area a: expect classification and the given configuration
  task automatic fault(input int a, input logic exp_nonrec, input int exp_cfg, input logic exp_fail);
    int unsigned done0, tests0;
    logic seen_type;
    done0 = n_done; tests0 = n_tests;
    @(negedge clk);
    errs[a] = TRC_ERR;
    while (!fid) @(negedge clk);
    seen_type = (ftype == FAULT_NON_RECOVERABLE);
    checks += 2;
    if (seen_type != exp_nonrec) begin failures++; $display("FAIL area %0d type %0d", a, seen_type); end
    if (farea != N'(1 << a))     begin failures++; $display("FAIL area %b", farea); end
    while (n_done == done0 && !fail) @(negedge clk);
    checks++;
    if (fail != exp_fail) begin failures++; $display("FAIL fail=%0d", fail); end
    if (!exp_fail) begin
      errs[a] = TRC_OK;   // the reprogrammed area works again
      checks += 4;
      if (last_cfg != exp_cfg) begin failures++; $display("FAIL loaded configuration %0d expected %0d", last_cfg, exp_cfg); end
      if (last_bytes != BS || last_bad != 0 || odd_bits) begin
        failures++; $display("FAIL stream %0d bytes %0d bad", last_bytes, last_bad);
      end
      if ((n_tests != tests0) != exp_nonrec) begin failures++; $display("FAIL structural test use"); end
      if (int'(cfg) != exp_cfg) begin failures++; $display("FAIL config_o %0d", cfg); end
      while (busy) @(negedge clk);
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    errs = {N{TRC_OK}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    fault(1, 0, 0, 0);   // recoverable: reload 0
    fault(1, 1, 2, 0);   // second in a row: relocate, 0*3+1+1
    fault(0, 0, 2, 0);
    fault(0, 1, 7, 0);   // 2*3+0+1
    fault(2, 0, 7, 0);
    fault(2, 1, 0, 1);   // third non-recoverable fault: no bitstream
    // duplication with comparison: disturb one copy of the Manager
    check_self = 0;
    @(negedge clk);
    force dut.g_mgr[1].u_mgr.busy_o = ~dut.g_mgr[0].u_mgr.busy_o;
    @(negedge clk);
    checks++;
    if (self_err[1] != self_err[0]) begin failures++; $display("FAIL duplicate mismatch not signalled"); end
    release dut.g_mgr[1].u_mgr.busy_o;
    @(negedge clk);
    checks++;
    if (self_err[1] == self_err[0]) begin failures++; $display("FAIL error pair stuck after release"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
