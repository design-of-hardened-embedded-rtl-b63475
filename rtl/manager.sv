// manager -- recovery sequencer of the Reconfiguration Controller.
//
// Idle, it keeps the Fault Classifier enabled. On a fault_identified_i pulse
// it drops enable_o for the whole recovery and then:
//  1. for a non-recoverable fault, requests a structural test of the spare
//     region (test_req_o high until test_done_i); a failed test (test_pass_i
//     low) ends in the failure state;
//  2. waits for the Bitstream Address Calculator: bs_ready_i continues,
//     bs_error_i (no configuration left) ends in the failure state;
//  3. raises prog_o and moves BS_BYTES bytes from the Bitstream Module to the
//     Reconfiguration Interface: read_o pulse, wait data_ready_i, wait rdy_i,
//     load_o pulse (the interface takes the byte from the module's data bus);
//     the next read is issued right after a load, so fetching overlaps shifting;
//  4. once the interface is ready again after the last byte, drops prog_o and
//     waits for done_i, then re-enables the classifier.
// rec_error_i during programming also ends in the failure state. The failure
// state is sticky until reset and is shown on fail_o; busy_o is high during a
// recovery. Steps and handshake signals are the document's; the exact pulse
// timing, the byte count and the sticky failure state are this design's.
module manager
  import rc_pkg::*;
#(
  parameter int unsigned BS_BYTES = DEF_BS_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  // Fault Classifier
  input  logic        fault_identified_i,
  input  fault_type_e fault_type_i,
  output logic        enable_o,
  // structural test of the spare region
  output logic        test_req_o,
  input  logic        test_done_i,
  input  logic        test_pass_i,
  // Bitstream Address Calculator
  input  logic        bs_ready_i,
  input  logic        bs_error_i,
  // Bitstream Module
  output logic        read_o,
  input  logic        data_ready_i,
  // Reconfiguration Interface
  output logic        prog_o,
  output logic        load_o,
  input  logic        rdy_i,
  input  logic        done_i,
  input  logic        rec_error_i,
  // status
  output logic        busy_o,
  output logic        fail_o
);

  localparam int unsigned BW = $clog2(BS_BYTES + 1);

  typedef enum logic [3:0] {
    M_IDLE, M_TEST, M_WAIT_BS, M_READ, M_WAIT_DATA, M_WAIT_RDY, M_LAST_RDY, M_WAIT_DONE, M_FAIL
  } state_e;

  state_e        state;
  logic [BW-1:0] sent;

  assign enable_o = (state == M_IDLE);
  assign busy_o   = (state != M_IDLE) && (state != M_FAIL);
  assign fail_o   = (state == M_FAIL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      sent       <= '0;
      test_req_o <= 1'b0;
      read_o     <= 1'b0;
      load_o     <= 1'b0;
      prog_o     <= 1'b0;
    end else begin
      read_o <= 1'b0;
      load_o <= 1'b0;
      unique case (state)
        M_IDLE: if (fault_identified_i) begin
          sent <= '0;
          if (fault_type_i == FAULT_NON_RECOVERABLE) begin
            test_req_o <= 1'b1;
            state      <= M_TEST;
          end else begin
            state <= M_WAIT_BS;
          end
        end
        M_TEST: if (test_done_i) begin
          test_req_o <= 1'b0;
          state      <= test_pass_i ? M_WAIT_BS : M_FAIL;
        end
        M_WAIT_BS: begin
          if (bs_error_i)      state <= M_FAIL;
          else if (bs_ready_i) begin
            prog_o <= 1'b1;
            state  <= M_READ;
          end
        end
        M_READ: begin
          read_o <= 1'b1;
          state  <= M_WAIT_DATA;
        end
        M_WAIT_DATA: if (data_ready_i) state <= M_WAIT_RDY;
        M_WAIT_RDY: if (rdy_i) begin
          load_o <= 1'b1;
          sent   <= sent + BW'(1);
          state  <= (32'(sent) + 1 == BS_BYTES) ? M_LAST_RDY : M_READ;
        end
        M_LAST_RDY: if (rdy_i && !load_o) begin
          prog_o <= 1'b0;
          state  <= M_WAIT_DONE;
        end
        M_WAIT_DONE: if (done_i && !prog_o) state <= M_IDLE;
        M_FAIL: ;
        default: state <= M_FAIL;
      endcase
      if (rec_error_i && prog_o) begin
        prog_o <= 1'b0;
        state  <= M_FAIL;
      end
    end
  end

endmodule
