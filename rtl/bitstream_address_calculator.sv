// bitstream_address_calculator -- locates the recovery bitstream in the PROM.
//
// Recovery bitstreams are computed off-line: one configuration for every
// sequence of up to F non-recoverable faults among the N areas, numbered as a
// complete N-ary tree in breadth-first order (root 0 = initial implementation,
// the children of configuration c are c*N+1 .. c*N+N, child c*N+a+1 being the
// one in which area a has been moved to spare fabric). They are stored in the
// PROM in this order, sum_{i=0..F} N^i of them, each behind a sync marker.
//
// On a fault_identified_i pulse the block picks the target configuration:
//  * recoverable fault: the current configuration is reloaded;
//  * non-recoverable fault in area a: the child c*N+a+1 becomes current and is
//    loaded; if F non-recoverable faults have already been handled no
//    configuration exists, and bs_error_o is raised instead (held until the
//    next fault_identified_i).
// It then rewinds the Bitstream Module (bm_rst_o) and asks it (next_sync_o)
// to find sync markers, counting sync_i answers, until the PROM is positioned
// at the start of the target bitstream; bs_ready_o is then raised and held
// until the next fault_identified_i. config_o is the current configuration.
// The signal names are the document's; the tree numbering, the PROM layout and
// the marker counting are this design's reading of the off-line strategy.
module bitstream_address_calculator
  import rc_pkg::*;
#(
  parameter int unsigned N       = DEF_AREAS,
  parameter int unsigned F       = DEF_FAULTS,
  parameter logic [7:0]  PATTERN = DEF_SYNC,
  localparam int unsigned NCFG   = num_bitstreams(N, F),
  localparam int unsigned CFGW   = (NCFG > 1) ? $clog2(NCFG) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // Fault Classifier
  input  logic             fault_identified_i,
  input  fault_type_e      fault_type_i,
  input  logic [N-1:0]     faulty_area_i,
  // Bitstream Module
  output logic             bm_rst_o,
  output logic             next_sync_o,
  output logic [7:0]       pattern_o,
  input  logic             sync_i,
  // Manager
  output logic             bs_ready_o,
  output logic             bs_error_o,
  output logic [CFGW-1:0]  config_o
);

  localparam int unsigned DW = $clog2(F + 1);

  typedef enum logic [2:0] {B_IDLE, B_REWIND, B_SEEK, B_WAIT_SYNC} state_e;

  state_e          state;
  logic [CFGW-1:0] target, syncs;
  logic [DW-1:0]   depth;
  logic [CFGW-1:0] area_idx;

  assign pattern_o = PATTERN;

  always_comb begin
    area_idx = '0;
    for (int i = 0; i < N; i++) if (faulty_area_i[i]) area_idx = CFGW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= B_IDLE;
      config_o    <= '0;
      depth       <= '0;
      target      <= '0;
      syncs       <= '0;
      bm_rst_o    <= 1'b0;
      next_sync_o <= 1'b0;
      bs_ready_o  <= 1'b0;
      bs_error_o  <= 1'b0;
    end else begin
      bm_rst_o    <= 1'b0;
      next_sync_o <= 1'b0;
      if (fault_identified_i) begin
        bs_ready_o <= 1'b0;
        bs_error_o <= 1'b0;
        syncs      <= '0;
        if (fault_type_i == FAULT_NON_RECOVERABLE) begin
          if (32'(depth) >= F) begin
            bs_error_o <= 1'b1;
            state      <= B_IDLE;
          end else begin
            target   <= CFGW'(32'(config_o) * N + 32'(area_idx) + 1);
            config_o <= CFGW'(32'(config_o) * N + 32'(area_idx) + 1);
            depth    <= depth + DW'(1);
            bm_rst_o <= 1'b1;
            state    <= B_REWIND;
          end
        end else begin
          target   <= config_o;
          bm_rst_o <= 1'b1;
          state    <= B_REWIND;
        end
      end else begin
        unique case (state)
          B_IDLE:   ;
          B_REWIND: state <= B_SEEK;           // Bitstream Module is rewinding
          B_SEEK: begin
            next_sync_o <= 1'b1;
            state       <= B_WAIT_SYNC;
          end
          B_WAIT_SYNC: if (sync_i) begin
            if (syncs == target) begin
              bs_ready_o <= 1'b1;
              state      <= B_IDLE;
            end else begin
              syncs <= syncs + CFGW'(1);
              state <= B_SEEK;
            end
          end
          default: state <= B_IDLE;
        endcase
      end
    end
  end

endmodule
