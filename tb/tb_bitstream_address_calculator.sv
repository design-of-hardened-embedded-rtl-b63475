// tb_bitstream_address_calculator -- address calculator with a real PROM reader
// and the PROM model (N = 3 areas, F = 2 faults: 13 stored configurations).
// After each bs_ready the next PROM byte must be the number of the expected
// configuration (byte 0 of every stored bitstream holds its number); the
// expected number follows the tree rule child = c*N + area + 1. A third
// non-recoverable fault must give bs_error.
module tb_bitstream_address_calculator;
  import rc_pkg::*;
  import tb_pkg::*;
  localparam int unsigned N = 3, F = 2, BS = 4;
  localparam int unsigned NC = num_bitstreams(N, F);
  localparam logic [7:0] MK = 8'hAA;
  logic clk = 0, rst_n = 0;
  logic fid;
  fault_type_e ftype;
  logic [N-1:0] farea;
  logic bm_rst, next_sync, sync, bs_ready, bs_error, cclk, reset_mem, din, read, data_ready;
  logic [7:0] pattern, data;
  logic [$clog2(NC)-1:0] cfg;
  int checks = 0, failures = 0;
  int ref_cfg = 0, ref_depth = 0;

  bitstream_address_calculator #(.N(N), .F(F), .PATTERN(MK)) dut (
    .clk, .rst_n, .fault_identified_i(fid), .fault_type_i(ftype), .faulty_area_i(farea),
    .bm_rst_o(bm_rst), .next_sync_o(next_sync), .pattern_o(pattern), .sync_i(sync),
    .bs_ready_o(bs_ready), .bs_error_o(bs_error), .config_o(cfg)
  );
  bitstream_module u_bm (
    .clk, .rst_n, .cclk_o(cclk), .reset_mem_o(reset_mem), .din_i(din),
    .rst_i(bm_rst), .next_sync_i(next_sync), .pattern_i(pattern), .sync_o(sync),
    .read_i(read), .data_ready_o(data_ready), .data_o(data)
  );
  prom_model #(.BS_BYTES(BS), .NCFG(NC), .MARKER(MK)) u_prom (.cclk, .reset_mem, .din);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fault(input logic nonrec, input int area);
    @(negedge clk);
    fid = 1; ftype = nonrec ? FAULT_NON_RECOVERABLE : FAULT_RECOVERABLE; farea = N'(1 << area);
    @(negedge clk);
    fid = 0;
    if (nonrec && ref_depth >= F) begin
      repeat (2) @(negedge clk);
      checks++;
      if (!bs_error || bs_ready) begin failures++; $display("FAIL expected bs_error"); end
      return;
    end
    if (nonrec) begin ref_cfg = ref_cfg * N + area + 1; ref_depth++; end
    while (!bs_ready && !bs_error) @(negedge clk);
    checks += 3;
    if (bs_error) begin failures++; $display("FAIL unexpected bs_error"); end
    if (int'(cfg) != ref_cfg) begin failures++; $display("FAIL config %0d expected %0d", cfg, ref_cfg); end
    @(negedge clk); read = 1; @(negedge clk); read = 0;
    while (!data_ready) @(negedge clk);
    if (int'(data) != ref_cfg) begin failures++; $display("FAIL PROM at config %0d expected %0d", data, ref_cfg); end
  endtask

  initial begin
    fid = 0; ftype = FAULT_RECOVERABLE; farea = '0; read = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (pattern !== MK) begin failures++; $display("FAIL pattern"); end
    fault(0, 1);   // reload configuration 0
    fault(1, 1);   // -> 2
    fault(0, 0);   // reload 2
    fault(1, 2);   // -> 9
    fault(0, 2);   // reload 9
    fault(1, 0);   // no configuration left: bs_error
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
