// tb_fault_classifier -- drives observation sequences into the classifier
// (N = 4 areas, K = 3) and compares every report with a reference model of the
// rule "non-recoverable after K consecutive observations of the same area".
// Also checks: one report per enable period, nothing while disabled, the
// lowest area wins when several report, one-cycle report latency, and a valid
// self-check pair.
module tb_fault_classifier;
  import rc_pkg::*;
  localparam int unsigned N = 4, K = 3;
  logic clk = 0, rst_n = 0, enable = 0;
  trc_t [N-1:0] errs;
  logic fid;
  fault_type_e ftype;
  logic [N-1:0] farea;
  trc_t self_err;
  int checks = 0, failures = 0;
  int ref_last = -1, ref_cnt = 0;

  fault_classifier #(.N(N), .K(K)) dut (
    .clk, .rst_n, .enable_i(enable), .error_signals_i(errs),
    .fault_identified_o(fid), .fault_type_o(ftype), .faulty_area_o(farea), .err_o(self_err)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (self_err[1] == self_err[0]) begin failures++; $display("FAIL self-check pair %b", self_err); end
  end

  // one observation: raise errors on mask, expect a report after one clock
  task automatic observe(input logic [N-1:0] mask);
    int a;
    logic nonrec;
    a = -1;
    for (int i = N - 1; i >= 0; i--) if (mask[i]) a = i;
    if (a == ref_last) ref_cnt++; else ref_cnt = 1;
    nonrec = (ref_cnt >= K);
    if (nonrec) begin ref_last = -1; ref_cnt = 0; end else ref_last = a;
    @(negedge clk);
    enable = 1;
    for (int i = 0; i < N; i++) errs[i] = mask[i] ? TRC_ERR : TRC_OK;
    @(negedge clk);
    checks += 3;
    if (!fid) begin failures++; $display("FAIL no report for mask %b", mask); end
    if (farea != N'(1 << a)) begin failures++; $display("FAIL area %b expected %0d", farea, a); end
    if ((ftype == FAULT_NON_RECOVERABLE) != nonrec) begin
      failures++; $display("FAIL type %0d expected nonrec=%0d (area %0d)", ftype, nonrec, a);
    end
    // stays silent while the error persists within the same enable period
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (fid) begin failures++; $display("FAIL repeated report"); end
    end
    enable = 0;
    repeat (2) @(negedge clk);
    errs = {N{TRC_OK}};
  endtask

  initial begin
    errs = {N{TRC_OK}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // errors while disabled are ignored
    errs[1] = TRC_ERR;
    repeat (4) begin
      @(negedge clk);
      checks++;
      if (fid) begin failures++; $display("FAIL report while disabled"); end
    end
    errs = {N{TRC_OK}};
    observe(4'b0100);  // area 2: rec
    observe(4'b0100);  // rec
    observe(4'b0100);  // nonrec (3rd)
    observe(4'b0100);  // rec again, fresh run
    observe(4'b0010);  // area 1 rec
    observe(4'b1000);  // area 3
    observe(4'b1000);
    observe(4'b1000);  // nonrec
    observe(4'b1010);  // several: area 1 wins
    observe(4'b0011);  // area 0
    for (int n = 0; n < 60; n++) begin
      logic [N-1:0] m;
      m = N'($urandom_range(1, (1 << N) - 1));
      if (n % 3 != 0) m = N'(1 << ($urandom % 2));   // favour runs on areas 0/1
      observe(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
