// tb_tmr_voter -- random and directed check of the TMR voter: output is the
// bitwise majority, the error pair is invalid exactly when the replicas differ.
module tb_tmr_voter;
  import rc_pkg::*;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, c, y;
  trc_t         e;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a_i(a), .b_i(b), .c_i(c), .y_o(y), .err_o(e));

  task automatic check_one();
    logic [W-1:0] exp_y;
    logic         exp_err;
    for (int i = 0; i < W; i++) exp_y[i] = (32'(a[i]) + 32'(b[i]) + 32'(c[i])) >= 2;
    exp_err = (a != b) || (a != c);
    #1;
    checks += 2;
    if (y !== exp_y) begin failures++; $display("FAIL vote %h %h %h -> %h", a, b, c, y); end
    if ((e[1] == e[0]) != exp_err) begin failures++; $display("FAIL err %h %h %h -> %b", a, b, c, e); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      a = W'($urandom);
      b = a; c = a;
      case (n % 5)
        0: ;
        1: b = a ^ W'(1 << (n % W));
        2: c = a ^ W'($urandom);
        3: a = b ^ W'(1 << ((n / 3) % W));
        default: begin b = W'($urandom); c = W'($urandom); end
      endcase
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
