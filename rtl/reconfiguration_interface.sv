// reconfiguration_interface -- JTAG master that programs the monitored FPGA.
//
// A rising edge of prog_i starts a configuration session on the JTAG port of
// the neighbour FPGA:
//   Test-Logic-Reset (5 x TMS=1) -> Shift-IR, load the CFG_IN instruction ->
//   Shift-DR, shift every byte handed over with load_i (MSB first) ->
//   when prog_i falls: Exit1-DR/Update-DR -> Shift-IR, load JSTART ->
//   Run-Test/Idle for START_CLKS clocks -> done_o.
// rdy_o is high while the interface waits in Shift-DR for the next byte; a
// load_i pulse captures data_i. The last bit of every byte is held back until
// it is known whether another byte follows, so that the final bit of the
// stream is shifted with TMS=1 and no padding bit enters the device.
// Each TCK period is two system clocks (TCK low with new TMS/TDI, then TCK
// high). While each instruction is shifted, the first two TDO bits must be the
// mandatory IR capture value 1,0 (IEEE 1149.1); otherwise the session is
// aborted through Test-Logic-Reset and rec_error_o is raised. done_o and
// rec_error_o hold until the next session.
// The document gives the block's role and its prog/load/rdy/done/rec_error and
// TCK/TMS/TDI/TDO signals; the TAP sequence, the Virtex-4 instruction codes
// and the capture-value check are this design's choices.
module reconfiguration_interface
  import rc_pkg::*;
#(
  parameter int unsigned IR_LEN     = JTAG_IR_LEN,
  parameter logic [IR_LEN-1:0] CFG_IN = IR_LEN'(JTAG_CFG_IN),
  parameter logic [IR_LEN-1:0] JSTART = IR_LEN'(JTAG_JSTART),
  parameter int unsigned START_CLKS = JTAG_START_CLKS
) (
  input  logic       clk,
  input  logic       rst_n,
  // Manager / Bitstream Module
  input  logic       prog_i,
  input  logic       load_i,
  input  logic [7:0] data_i,
  output logic       rdy_o,
  output logic       done_o,
  output logic       rec_error_o,
  // JTAG port of the monitored FPGA
  output logic       tck_o,
  output logic       tms_o,
  output logic       tdi_o,
  input  logic       tdo_i
);

  typedef enum logic [3:0] {
    R_IDLE, R_TLR, R_TO_IR1, R_SHIFT_IR, R_TO_DR, R_WAIT_BYTE, R_SHIFT_PEND,
    R_SHIFT_BYTE, R_SHIFT_LAST, R_TO_IR2, R_TO_RTI, R_RTI, R_ABORT
  } state_e;

  localparam int unsigned CW = $clog2(IR_LEN + START_CLKS + 8);

  state_e      st;
  logic [CW-1:0] cnt;
  logic        ph, prog_q, second_ir, pend_valid, pend_bit;
  logic [7:0]  byte_q;
  logic        f_tms, f_tdi, f_last;
  logic [IR_LEN-1:0] ir;

  assign ir    = second_ir ? JSTART : CFG_IN;
  assign rdy_o = (st == R_WAIT_BYTE);

  // TMS/TDI for the current TCK period and whether it is the last of the state
  always_comb begin
    f_tms  = 1'b0;
    f_tdi  = 1'b0;
    f_last = 1'b1;
    unique case (st)
      R_TLR, R_ABORT: begin f_tms = 1'b1; f_last = (cnt == CW'(4)); end
      R_TO_IR1: begin  // TLR -> RTI -> SelDR -> SelIR -> CapIR -> ShiftIR
        f_tms  = (cnt == CW'(1)) || (cnt == CW'(2));
        f_last = (cnt == CW'(4));
      end
      R_SHIFT_IR: begin
        f_tdi  = ir[cnt[$clog2(IR_LEN)-1:0]];
        f_tms  = (cnt == CW'(IR_LEN - 1));
        f_last = f_tms;
      end
      R_TO_DR: begin   // Exit1-IR -> UpdIR -> SelDR -> CapDR -> ShiftDR
        f_tms  = (cnt < CW'(2));
        f_last = (cnt == CW'(3));
      end
      R_SHIFT_PEND: f_tdi = pend_bit;
      R_SHIFT_BYTE: begin
        f_tdi  = byte_q[3'(7 - cnt)];
        f_last = (cnt == CW'(6));
      end
      R_SHIFT_LAST: begin f_tdi = pend_bit; f_tms = 1'b1; end
      R_TO_IR2: begin  // Exit1-DR -> UpdDR -> SelDR -> SelIR -> CapIR -> ShiftIR
        f_tms  = (cnt < CW'(3));
        f_last = (cnt == CW'(4));
      end
      R_TO_RTI: begin  // Exit1-IR -> UpdIR -> RTI
        f_tms  = (cnt == CW'(0));
        f_last = (cnt == CW'(1));
      end
      R_RTI: f_last = (cnt == CW'(START_CLKS - 1));
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= R_IDLE;
      cnt         <= '0;
      ph          <= 1'b0;
      prog_q      <= 1'b0;
      second_ir   <= 1'b0;
      pend_valid  <= 1'b0;
      pend_bit    <= 1'b0;
      byte_q      <= '0;
      done_o      <= 1'b0;
      rec_error_o <= 1'b0;
      tck_o       <= 1'b0;
      tms_o       <= 1'b1;
      tdi_o       <= 1'b0;
    end else begin
      prog_q <= prog_i;
      unique case (st)
        R_IDLE: begin
          tck_o <= 1'b0;
          ph    <= 1'b0;
          if (prog_i && !prog_q) begin
            done_o      <= 1'b0;
            rec_error_o <= 1'b0;
            second_ir   <= 1'b0;
            pend_valid  <= 1'b0;
            cnt         <= '0;
            st          <= R_TLR;
          end
        end
        R_WAIT_BYTE: begin
          tck_o <= 1'b0;
          ph    <= 1'b0;
          cnt   <= '0;
          if (load_i) begin
            byte_q <= data_i;
            st     <= pend_valid ? R_SHIFT_PEND : R_SHIFT_BYTE;
          end else if (!prog_i) begin
            st <= R_SHIFT_LAST;
          end
        end
        default: begin
          if (!ph) begin
            tck_o <= 1'b0;
            tms_o <= f_tms;
            tdi_o <= f_tdi;
            ph    <= 1'b1;
          end else begin
            tck_o <= 1'b1;
            ph    <= 1'b0;
            cnt   <= f_last ? '0 : cnt + CW'(1);
            if (st == R_SHIFT_IR && cnt < CW'(2) && tdo_i != (cnt == CW'(0))) begin
              rec_error_o <= 1'b1;
              cnt         <= '0;
              st          <= R_ABORT;
            end else if (f_last) begin
              unique case (st)
                R_TLR:        st <= R_TO_IR1;
                R_TO_IR1:     st <= R_SHIFT_IR;
                R_SHIFT_IR:   st <= second_ir ? R_TO_RTI : R_TO_DR;
                R_TO_DR:      st <= R_WAIT_BYTE;
                R_SHIFT_PEND: st <= R_SHIFT_BYTE;
                R_SHIFT_BYTE: begin
                  pend_bit   <= byte_q[0];
                  pend_valid <= 1'b1;
                  st         <= R_WAIT_BYTE;
                end
                R_SHIFT_LAST: st <= R_TO_IR2;
                R_TO_IR2: begin
                  second_ir <= 1'b1;
                  st        <= R_SHIFT_IR;
                end
                R_TO_RTI:     st <= R_RTI;
                R_RTI: begin
                  done_o <= 1'b1;
                  st     <= R_IDLE;
                end
                default:      st <= R_IDLE;  // R_ABORT ends in Test-Logic-Reset
              endcase
            end
          end
        end
      endcase
    end
  end

endmodule
