// tmr_voter -- majority voter of a triplicated block with two-rail error output.
//
// Used at the outputs of every independently recoverable area (IRA) hardened by
// triple modular redundancy, and at the outputs of the triplicated
// Reconfiguration Interface. Each output bit is the majority of the three replica
// bits, so one faulty replica is masked. For every bit the replicas are compared
// pairwise as two-rail pairs (a, ~b) and (a, ~c); the pairs are reduced by a
// two-rail checker, so err_o is a valid code word only when all three replicas
// agree, and it identifies the area to the Reconfiguration Controller that
// monitors this FPGA. Combinational, no clock.
// Majority voting and error signalling follow the document; the two-rail way the
// disagreement is encoded is this design's choice.
module tmr_voter
  import rc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  output logic [W-1:0] y_o,
  output trc_t         err_o
);

  trc_t [2*W-1:0] cmp;

  assign y_o = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      cmp[2*i]   = {a_i[i], ~b_i[i]};
      cmp[2*i+1] = {a_i[i], ~c_i[i]};
    end
  end

  trc_checker #(.N(2*W)) u_chk (.pairs_i(cmp), .pair_o(err_o));

endmodule
