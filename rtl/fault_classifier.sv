// fault_classifier -- self-checking recoverable / non-recoverable fault classifier.
//
// Watches the N two-rail error pairs of the monitored FPGA's areas. While
// enable_i is high and the classifier is armed, an invalid pair (rails equal)
// is an error observation: the lowest-numbered erroneous area is reported
// one-hot on faulty_area_o and fault_identified_o pulses for one cycle together
// with fault_type_o. Classification follows the frequency rule of the document:
// an area is declared non-recoverable when it has been the faulty one in the
// last K consecutive observations. last_ira remembers the area of the previous
// observation and a counter the length of the current run; after a
// non-recoverable verdict both are cleared, since the area then moves to fresh
// fabric. After a report the classifier disarms until enable_i has been low
// (the Manager drops it for the whole recovery), so one error yields one report.
//
// Self-checking: the state (last_ira, run counter) carries an even-parity bit;
// the stored and recomputed parities form a two-rail pair, and a second pair
// checks that last_ira is zero or one-hot and the counter is below K. err_o is
// their two-rail combination and is invalid on any inconsistency.
// The interface (error_signals, enable, fault_identified, fault_type,
// faulty_area, last_ira, K) is the document's; the priority rule for
// simultaneous errors, the parity code and the reset values are this design's.
module fault_classifier
  import rc_pkg::*;
#(
  parameter int unsigned N = DEF_AREAS,  // monitored areas (error pairs)
  parameter int unsigned K = DEF_K       // consecutive observations for non-recoverable
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enable_i,
  input  trc_t [N-1:0]   error_signals_i,
  output logic           fault_identified_o,
  output fault_type_e    fault_type_o,
  output logic [N-1:0]   faulty_area_o,
  output trc_t           err_o
);

  localparam int unsigned CW = $clog2(K + 1);

  logic [N-1:0]  err_vec, first_err, last_ira;
  logic [CW-1:0] run_cnt, next_cnt;
  logic          par_q, armed, any_err, hit;

  always_comb begin
    for (int i = 0; i < N; i++) err_vec[i] = ~trc_valid(error_signals_i[i]);
    first_err = err_vec & (~err_vec + N'(1));   // isolate lowest set bit
    any_err   = |err_vec;
    hit       = (first_err == last_ira);
    next_cnt  = hit ? run_cnt + CW'(1) : CW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_ira           <= '0;
      run_cnt            <= '0;
      par_q              <= 1'b0;
      armed              <= 1'b1;
      fault_identified_o <= 1'b0;
      fault_type_o       <= FAULT_RECOVERABLE;
      faulty_area_o      <= '0;
    end else begin
      fault_identified_o <= 1'b0;
      if (!enable_i) armed <= 1'b1;
      if (enable_i && armed && any_err) begin
        armed              <= 1'b0;
        fault_identified_o <= 1'b1;
        faulty_area_o      <= first_err;
        if (32'(next_cnt) >= K) begin
          fault_type_o <= FAULT_NON_RECOVERABLE;
          last_ira     <= '0;
          run_cnt      <= '0;
          par_q        <= 1'b0;
        end else begin
          fault_type_o <= FAULT_RECOVERABLE;
          last_ira     <= first_err;
          run_cnt      <= next_cnt;
          par_q        <= ^{first_err, next_cnt};
        end
      end
    end
  end

  // self-checking part
  trc_t par_pair, cons_pair;
  assign par_pair  = {par_q, ~(^{last_ira, run_cnt})};
  assign cons_pair = (((last_ira & (last_ira - N'(1))) == '0) && (32'(run_cnt) < K)) ? TRC_OK : TRC_ERR;
  assign err_o     = trc_cell(par_pair, cons_pair);

endmodule
