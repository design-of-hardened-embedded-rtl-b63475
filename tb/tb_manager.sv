// tb_manager -- Manager against simple reactive stand-ins for the classifier,
// address calculator, PROM reader, JTAG interface and structural test.
// Checks for each recovery: classifier disabled throughout, structural test
// only for non-recoverable faults, exactly BS_BYTES reads and loads, every load
// inside prog, prog dropped before done is awaited, re-enable at the end; and
// the failure state after bs_error, a failed structural test and rec_error.
module tb_manager;
  import rc_pkg::*;
  localparam int unsigned BS = 5;
  logic clk = 0, rst_n = 0;
  logic fid = 0;
  fault_type_e ftype = FAULT_RECOVERABLE;
  logic enable, test_req, test_done = 0, test_pass = 1;
  logic bs_ready = 0, bs_error = 0, read, data_ready = 0;
  logic prog, load, rdy = 0, done = 0, rec_error = 0, busy, fail;
  logic give_bs_error = 0, give_rec_error = 0;
  int checks = 0, failures = 0;
  int n_read = 0, n_load = 0, n_test = 0;

  manager #(.BS_BYTES(BS)) dut (
    .clk, .rst_n, .fault_identified_i(fid), .fault_type_i(ftype), .enable_o(enable),
    .test_req_o(test_req), .test_done_i(test_done), .test_pass_i(test_pass),
    .bs_ready_i(bs_ready), .bs_error_i(bs_error), .read_o(read), .data_ready_i(data_ready),
    .prog_o(prog), .load_o(load), .rdy_i(rdy), .done_i(done), .rec_error_i(rec_error),
    .busy_o(busy), .fail_o(fail)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-ins
  always @(posedge clk) begin
    if (read) begin n_read++; fork begin repeat (4) @(posedge clk); data_ready <= 1; @(posedge clk); data_ready <= 0; end join_none end
    if (load) begin
      n_load++;
      checks++;
      if (!prog) begin failures++; $display("FAIL load outside prog"); end
      rdy <= 0;
      fork begin repeat (6) @(posedge clk); rdy <= 1; end join_none
    end
    if (test_req && !test_done) fork begin repeat (3) @(posedge clk); test_done <= 1; end join_none
    if (!test_req) test_done <= 0;
  end

  logic prog_q = 0;
  always @(posedge clk) begin
    prog_q <= prog;
    if (rst_n && prog && !prog_q) begin
      done <= 0;
      fork begin
        repeat (5) @(posedge clk);
        if (give_rec_error) rec_error <= 1; else rdy <= 1;
      end join_none
    end
    if (rst_n && !prog && prog_q) begin
      checks++;
      if (n_load != BS && !give_rec_error) begin failures++; $display("FAIL prog dropped after %0d loads t=%0t tp=%0d be=%0d", n_load, $time, test_pass, give_bs_error); end
      rdy <= 0;
      fork begin repeat (8) @(posedge clk); done <= 1; end join_none
    end
  end

  // the classifier stays disabled for the whole recovery
  always @(posedge clk) if (rst_n && busy) begin
    checks++;
    if (enable) begin failures++; $display("FAIL classifier enabled during recovery"); end
  end

  task automatic recover(input logic nonrec, input logic expect_fail);
    n_read = 0; n_load = 0;
    @(negedge clk);
    checks++;
    if (!enable) begin failures++; $display("FAIL not enabled before fault"); end
    fid = 1; ftype = nonrec ? FAULT_NON_RECOVERABLE : FAULT_RECOVERABLE;
    bs_ready = 0;
    @(negedge clk);
    fid = 0;
    fork begin
      repeat (10) @(negedge clk);
      if (give_bs_error) bs_error = 1; else bs_ready = 1;
    end join_none
    while (!enable && !fail) begin
      @(negedge clk);
      if (test_req) n_test++;
    end
    checks += 2;
    if (fail != expect_fail) begin failures++; $display("FAIL fail=%0d expected %0d", fail, expect_fail); end
    if (!expect_fail && (n_read != BS || n_load != BS)) begin
      failures++; $display("FAIL reads %0d loads %0d", n_read, n_load);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    n_test = 0;
    recover(0, 0);
    checks++; if (n_test != 0) begin failures++; $display("FAIL test for recoverable"); end
    recover(1, 0);
    checks++; if (n_test == 0) begin failures++; $display("FAIL no test for non-recoverable"); end
    // bs_error
    give_bs_error = 1;
    recover(0, 1);
    give_bs_error = 0; bs_error = 0;
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    // structural test fails
    test_pass = 0;
    recover(1, 1);
    test_pass = 1;
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    // reconfiguration error
    give_rec_error = 1;
    recover(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
