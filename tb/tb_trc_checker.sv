// tb_trc_checker -- exhaustive check of the two-rail checker for N = 5 pairs:
// all 1024 input combinations; the output must be a valid code word exactly
// when every input pair is valid.
module tb_trc_checker;
  import rc_pkg::*;
  localparam int unsigned N = 5;
  trc_t [N-1:0] pairs;
  trc_t         z;
  int checks = 0, failures = 0;

  trc_checker #(.N(N)) dut (.pairs_i(pairs), .pair_o(z));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      logic all_ok;
      pairs  = (2 * N)'(v);
      all_ok = 1'b1;
      for (int i = 0; i < N; i++) all_ok &= (pairs[i][1] != pairs[i][0]);
      #1;
      checks++;
      if ((z[1] != z[0]) != all_ok) begin
        failures++;
        $display("FAIL pairs=%b z=%b expected valid=%0d", pairs, z, all_ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
