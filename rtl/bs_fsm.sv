// Band-search finite state machine.
//
// Clocked by the falling edge of the reference clock, the end of each
// half-period measurement. hold low (a new modulus, or reset) sends it to the
// search start: band code 0, S1 = 1 (VCO tuning node on V_min), S2 = 0
// (normal loop open), S3 = 1 (band-search loop closed). Each following
// reference cycle it reads the comparator:
//  - band 0 already too high: the target is below the VCO range; stop at 0;
//  - too low: go to the next band, or stop if this is the last band;
//  - too high on band k > 0: go back to band k-1 and stop.
// Stopping freezes the band code, sets S1 = 0, S2 = 1, S3 = 0 and hands over
// to the analog loop (state LOCK). done pulses for one cycle when it stops.
// The search runs at most 2^BAND_BITS + 1 reference cycles.
// The stepping rule follows the source's description of a search upward from
// band 0 on the tuning curves; reading "too high" / "too low" consistently is
// this design's interpretation. Reset (rst_n, active low) is synchronous to
// the falling reference edge, as the source's locking procedure "starts
// from a synchronous reset"; it must be held over at least one such edge.
module bs_fsm
  import wbpll_pkg::*;
#(
  parameter int unsigned BAND_BITS = BAND_W
) (
  input  logic                 ref_clk,
  input  logic                 rst_n,
  input  logic                 hold,      // low: restart the search
  input  logic                 too_low,   // from the comparator
  output logic [BAND_BITS-1:0] band,      // VCO digital control bits b0..b(n-1)
  output logic                 s1,        // 1: tuning node to V_min
  output logic                 s2,        // 1: normal loop closed
  output logic                 s3,        // 1: band-search loop closed
  output logic                 done,      // one-cycle pulse at the end of a search
  output bs_state_t            state
);
  localparam logic [BAND_BITS-1:0] BAND_MAX = '1;

  always_ff @(negedge ref_clk) begin
    if (!rst_n) begin
      state <= BS_FIRST;
      band  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!hold) begin
        state <= BS_FIRST;
        band  <= '0;
      end else begin
        unique case (state)
          BS_FIRST: begin
            if (!too_low) begin
              state <= BS_LOCK;              // below the range: keep band 0
              done  <= 1'b1;
            end else begin
              band  <= band + 1'b1;
              state <= BS_STEP;
            end
          end
          BS_STEP: begin
            if (too_low) begin
              if (band == BAND_MAX) begin
                state <= BS_LOCK;            // above the range: keep the top band
                done  <= 1'b1;
              end else begin
                band <= band + 1'b1;
              end
            end else begin
              band  <= band - 1'b1;          // passed it: previous band
              state <= BS_LOCK;
              done  <= 1'b1;
            end
          end
          default: ;                         // BS_LOCK: band frozen
        endcase
      end
    end
  end

  assign s1 = (state != BS_LOCK);
  assign s3 = (state != BS_LOCK);
  assign s2 = (state == BS_LOCK);
endmodule
