// jtag_target_model -- behavioural model of the JTAG configuration port of the
// monitored FPGA.
//
// A full IEEE 1149.1 TAP state machine clocked by tck. Capture-IR loads the
// mandatory ...01 pattern (or ...00 while bad_capture is high, to provoke a
// capture error). While the instruction is CFG_IN, every bit shifted through
// Shift-DR is collected, MSB first, into bytes; byte 0 names the configuration
// and every later byte is compared with the PROM formula of tb_pkg. When JSTART
// is in the instruction register and START_CLKS clocks have passed in
// Run-Test/Idle, the model counts one completed configuration: n_done
// increments, last_cfg/last_bytes/last_bad describe what was received, and
// odd_bits flags a stream whose length was not a whole number of bytes.
module jtag_target_model
  import tb_pkg::*;
#(
  parameter int unsigned     IR_LEN     = 10,
  parameter logic [IR_LEN-1:0] CFG_IN   = 10'h3C5,
  parameter logic [IR_LEN-1:0] JSTART   = 10'h3CC,
  parameter int unsigned     START_CLKS = 12,
  parameter logic [7:0]      MARKER     = 8'hAA
) (
  input  logic            tck,
  input  logic            tms,
  input  logic            tdi,
  output logic            tdo,
  input  logic            bad_capture,
  output int unsigned     n_done,
  output int unsigned     last_cfg,
  output longint unsigned last_bytes,
  output int unsigned     last_bad,
  output logic            odd_bits
);

  typedef enum int {TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
                    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR} tap_e;

  tap_e              st = TLR;
  logic [IR_LEN-1:0] ir_sr = '0, instr = '0;
  logic [7:0]        cur = '0;
  int unsigned       nbit = 0, rti_cnt = 0, cfg = 0, bad = 0;
  longint unsigned   nbytes = 0;

  initial begin
    n_done = 0; last_cfg = 0; last_bytes = 0; last_bad = 0; odd_bits = 0; tdo = 0;
  end

  function automatic tap_e nxt(tap_e s, logic m);
    case (s)
      TLR:    return m ? TLR    : RTI;
      RTI:    return m ? SEL_DR : RTI;
      SEL_DR: return m ? SEL_IR : CAP_DR;
      CAP_DR: return m ? EX1_DR : SH_DR;
      SH_DR:  return m ? EX1_DR : SH_DR;
      EX1_DR: return m ? UPD_DR : PAU_DR;
      PAU_DR: return m ? EX2_DR : PAU_DR;
      EX2_DR: return m ? UPD_DR : SH_DR;
      UPD_DR: return m ? SEL_DR : RTI;
      SEL_IR: return m ? TLR    : CAP_IR;
      CAP_IR: return m ? EX1_IR : SH_IR;
      SH_IR:  return m ? EX1_IR : SH_IR;
      EX1_IR: return m ? UPD_IR : PAU_IR;
      PAU_IR: return m ? EX2_IR : PAU_IR;
      EX2_IR: return m ? UPD_IR : SH_IR;
      default: return m ? SEL_DR : RTI;  // UPD_IR
    endcase
  endfunction

  always @(posedge tck) begin
    case (st)
      TLR: instr <= '0;
      CAP_IR: ir_sr <= bad_capture ? IR_LEN'(0) : IR_LEN'(1);
      SH_IR:  ir_sr <= {tdi, ir_sr[IR_LEN-1:1]};
      UPD_IR: begin
        instr <= ir_sr;
        rti_cnt <= 0;
        if (ir_sr == CFG_IN) begin
          nbit <= 0; nbytes <= 0; bad <= 0; cfg <= 0;
        end
      end
      SH_DR: if (instr == CFG_IN) begin
        if (nbit == 7) begin
          if (nbytes == 0) cfg <= int'({cur[6:0], tdi});
          else if ({cur[6:0], tdi} != bs_byte(cfg, nbytes, MARKER)) bad <= bad + 1;
          nbytes <= nbytes + 1;
          nbit   <= 0;
        end else begin
          nbit <= nbit + 1;
        end
        cur <= {cur[6:0], tdi};
      end
      RTI: if (instr == JSTART) begin
        rti_cnt <= rti_cnt + 1;
        if (rti_cnt + 1 == START_CLKS) begin
          n_done     <= n_done + 1;
          last_cfg   <= cfg;
          last_bytes <= nbytes;
          last_bad   <= bad;
          odd_bits   <= (nbit != 0);
        end
      end
      default: ;
    endcase
    st <= nxt(st, tms);
  end

  always @(negedge tck) tdo <= ir_sr[0];

endmodule
