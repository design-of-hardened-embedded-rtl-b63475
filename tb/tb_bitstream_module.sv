// tb_bitstream_module -- PROM reader against the PROM model (3 stored
// configurations of 6 bytes). Rewinds, finds markers, reads bytes and compares
// them with the PROM formula; checks that a byte takes 16 clocks.
module tb_bitstream_module;
  import rc_pkg::*;
  import tb_pkg::*;
  localparam int unsigned BS = 6, NC = 3;
  localparam logic [7:0] MK = 8'hAA;
  logic clk = 0, rst_n = 0;
  logic cclk, reset_mem, din, rst, next_sync, sync, read, data_ready;
  logic [7:0] data;
  int checks = 0, failures = 0;

  bitstream_module dut (
    .clk, .rst_n, .cclk_o(cclk), .reset_mem_o(reset_mem), .din_i(din),
    .rst_i(rst), .next_sync_i(next_sync), .pattern_i(MK), .sync_o(sync),
    .read_i(read), .data_ready_o(data_ready), .data_o(data)
  );
  prom_model #(.BS_BYTES(BS), .NCFG(NC), .MARKER(MK)) u_prom (.cclk, .reset_mem, .din);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic find_sync();
    pulse(next_sync);
    while (!sync) @(negedge clk);
  endtask

  task automatic read_byte(input logic [7:0] exp, input bit chk_time);
    int t;
    pulse(read);
    t = 1;
    while (!data_ready) begin @(negedge clk); t++; end
    checks++;
    if (data !== exp) begin failures++; $display("FAIL byte %h expected %h", data, exp); end
    if (chk_time) begin
      checks++;
      if (t != 16) begin failures++; $display("FAIL byte took %0d clocks", t); end
    end
  endtask

  initial begin
    {rst, next_sync, read} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int target = 0; target < NC; target++) begin
      pulse(rst);
      repeat (2) @(negedge clk);
      for (int s = 0; s <= target; s++) find_sync();
      for (int i = 0; i < BS; i++) read_byte(bs_byte(target, i, MK), i == 2);
    end
    // a second search straight after the data of configuration 2 finds nothing
    // more; rewind and read configuration 0 again without re-searching twice
    pulse(rst);
    repeat (2) @(negedge clk);
    find_sync();
    read_byte(8'd0, 1);
    read_byte(bs_byte(0, 1, MK), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
