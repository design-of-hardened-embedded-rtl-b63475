// bitstream_module -- reader of the serial configuration PROM.
//
// The recovery bitstreams sit one after another in a serial Flash PROM, each
// preceded by a one-byte sync marker. The module clocks the PROM with cclk_o
// (one PROM bit per two system clocks: din_i is sampled as cclk_o rises, and
// the PROM advances on that rising edge) and assembles bytes MSB first.
// It serves two clients:
//  * the Bitstream Address Calculator: rst_i (pulse) rewinds the PROM through
//    reset_mem_o; next_sync_i (pulse) reads bytes until one equals pattern_i and
//    then pulses sync_o, leaving the PROM positioned on the first byte after
//    the marker;
//  * the Manager: read_i (pulse) fetches the next byte, presented on data_o
//    (held until the next fetch) with a one-cycle data_ready_o pulse.
// A byte takes 16 clocks; requests that arrive while busy are ignored.
// The signal set is the one of the document's block diagram; the byte-aligned
// marker search, the bit order and the cclk timing are this design's choices.
module bitstream_module
  import rc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // serial PROM
  output logic       cclk_o,
  output logic       reset_mem_o,
  input  logic       din_i,
  // Bitstream Address Calculator
  input  logic       rst_i,
  input  logic       next_sync_i,
  input  logic [7:0] pattern_i,
  output logic       sync_o,
  // Manager / Reconfiguration Interface
  input  logic       read_i,
  output logic       data_ready_o,
  output logic [7:0] data_o
);

  typedef enum logic [1:0] {S_IDLE, S_REWIND, S_SEARCH, S_FETCH} state_e;

  state_e     state;
  logic [2:0] bit_cnt;
  logic [6:0] shreg;
  logic [7:0] next_byte;

  assign next_byte = {shreg, din_i};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      bit_cnt      <= '0;
      shreg        <= '0;
      cclk_o       <= 1'b0;
      reset_mem_o  <= 1'b0;
      sync_o       <= 1'b0;
      data_ready_o <= 1'b0;
      data_o       <= '0;
    end else begin
      sync_o       <= 1'b0;
      data_ready_o <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cclk_o  <= 1'b0;
          bit_cnt <= '0;
          if (rst_i) begin
            reset_mem_o <= 1'b1;
            state       <= S_REWIND;
          end else if (next_sync_i) begin
            state <= S_SEARCH;
          end else if (read_i) begin
            state <= S_FETCH;
          end
        end
        S_REWIND: begin
          reset_mem_o <= 1'b0;
          state       <= S_IDLE;
        end
        S_SEARCH, S_FETCH: begin
          if (!cclk_o) begin
            shreg  <= next_byte[6:0];
            cclk_o <= 1'b1;
            if (bit_cnt == 3'd7) begin
              if (state == S_FETCH) begin
                data_o       <= next_byte;
                data_ready_o <= 1'b1;
                state        <= S_IDLE;
              end else if (next_byte == pattern_i) begin
                sync_o <= 1'b1;
                state  <= S_IDLE;
              end
            end
            bit_cnt <= bit_cnt + 3'd1;
          end else begin
            cclk_o <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
