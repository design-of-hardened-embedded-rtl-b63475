// tb_reconfiguration_interface -- JTAG master against the JTAG target model.
// Programs a 20-byte stream of configuration 5 and checks that the target
// received exactly those bytes (no padding bit), saw CFG_IN, JSTART and the
// start-up clocks, and that done is raised; checks the byte rate (one byte per
// 8 TCK periods = 16 clocks, plus one hand-over clock); then provokes a bad IR
// capture value and expects rec_error and no completed configuration.
module tb_reconfiguration_interface;
  import rc_pkg::*;
  import tb_pkg::*;
  localparam int unsigned NB = 20, CFG = 5;
  localparam logic [7:0] MK = 8'hAA;
  logic clk = 0, rst_n = 0;
  logic prog = 0, load = 0, rdy, done, rec_error, tck, tms, tdi, tdo, bad_capture = 0;
  logic [7:0] data = 0;
  int unsigned n_done, last_cfg, last_bad;
  longint unsigned last_bytes;
  logic odd_bits;
  int checks = 0, failures = 0;

  reconfiguration_interface dut (
    .clk, .rst_n, .prog_i(prog), .load_i(load), .data_i(data),
    .rdy_o(rdy), .done_o(done), .rec_error_o(rec_error),
    .tck_o(tck), .tms_o(tms), .tdi_o(tdi), .tdo_i(tdo)
  );
  jtag_target_model #(.MARKER(MK)) u_tgt (
    .tck, .tms, .tdi, .tdo, .bad_capture, .n_done, .last_cfg, .last_bytes, .last_bad, .odd_bits
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    prog = 1;
    for (int i = 0; i < NB; i++) begin
      t = 0;
      while (!rdy) begin @(negedge clk); t++; end
      if (i >= 2) begin
        checks++;
        if (t > 17) begin failures++; $display("FAIL byte %0d waited %0d clocks", i, t); end
      end
      data = bs_byte(CFG, i, MK);
      load = 1; @(negedge clk); load = 0;
    end
    while (!rdy) @(negedge clk);
    prog = 0;
    t = 0;
    while (!done && t < 2000) begin @(negedge clk); t++; end
    checks += 6;
    if (!done)              begin failures++; $display("FAIL no done"); end
    if (rec_error)          begin failures++; $display("FAIL rec_error"); end
    if (n_done != 1)        begin failures++; $display("FAIL target configurations %0d", n_done); end
    if (last_cfg != CFG)    begin failures++; $display("FAIL target got configuration %0d", last_cfg); end
    if (last_bytes != NB)   begin failures++; $display("FAIL target got %0d bytes", last_bytes); end
    if (last_bad != 0 || odd_bits) begin failures++; $display("FAIL %0d bad bytes, odd=%0d", last_bad, odd_bits); end
    // second session with a broken capture value
    repeat (5) @(negedge clk);
    bad_capture = 1;
    prog = 1;
    t = 0;
    while (!rec_error && t < 2000) begin @(negedge clk); t++; end
    checks += 3;
    if (!rec_error) begin failures++; $display("FAIL no rec_error"); end
    if (rdy)        begin failures++; $display("FAIL ready after capture error"); end
    prog = 0;
    repeat (100) @(negedge clk);
    if (n_done != 1) begin failures++; $display("FAIL configuration completed after error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
