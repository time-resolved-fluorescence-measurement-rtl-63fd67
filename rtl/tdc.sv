`timescale 1ns / 1ps
// tdc: time-to-digital converter back end (coarse counter, hit detection and
// thermometer-to-binary fine code) for a tapped-delay-line TDC.
//
// The TDC runs on one 200 MHz clock, which gives the published 5 ns coarse
// resolution; the sampled delay line (tdl_delay_line) gives the fine part.
// A new photon is recognised when tap 0 of the sampled line is 1 and was 0 in
// the previous sample, i.e. the STOP rising edge arrived during the last
// clock period. The fine code is the number of ones in the sampled line
// (a ones count, so isolated bubbles in the thermometer code cost at most one
// bin); it is the time from the STOP edge to the sampling clock edge in tap
// units, so it lies in 1..NTAPS and a larger code means an earlier photon.
// The coarse code counts clock periods since the last START pulse (0 for
// the period in which START is high) and saturates at its maximum (photons
// later than that are reported with the maximum coarse code). With the
// laser fired by the START rising edge at time Ts, a photon reported as
// (coarse, fine) arrived at Ts + (coarse+1)*T - fine*tap, within one tap,
// where T is the clock period. Hit detection, the ones count and the coarse counter
// are this design's choices; the published design only states that the TDC
// follows an established tapped-delay-line method and gives its resolutions.
//
// Interface: start (one-cycle START pulse, clears the coarse counter),
// taps (sampled delay line), hit/coarse/fine (registered result).
// Timing: hit is high for one cycle, one clock after the sample that holds
// the edge (two clocks after the period in which the photon arrived).
module tdc #(
  parameter int unsigned NTAPS    = 255,
  parameter int unsigned COARSE_W = flt_pkg::COARSE_W,
  parameter int unsigned FINE_W   = flt_pkg::FINE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [NTAPS-1:0]    taps,
  output logic                hit,
  output logic [COARSE_W-1:0] coarse,
  output logic [FINE_W-1:0]   fine
);

  localparam logic [COARSE_W-1:0] COARSE_MAX = '1;

  logic [COARSE_W-1:0] coarse_cnt, coarse_now, coarse_prev;
  logic                tap0_prev;
  logic [FINE_W-1:0]   ones;

  // clock periods since the START period (the period in which start is high)
  assign coarse_now = start ? '0 : coarse_cnt;

  always_comb begin
    ones = '0;
    for (int i = 0; i < NTAPS; i++)
      ones = ones + FINE_W'(taps[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse_cnt  <= '0;
      coarse_prev <= '0;
      tap0_prev   <= 1'b0;
      hit         <= 1'b0;
      coarse      <= '0;
      fine        <= '0;
    end else begin
      coarse_cnt  <= (coarse_now == COARSE_MAX) ? COARSE_MAX : coarse_now + 1'b1;
      coarse_prev <= coarse_now;
      tap0_prev   <= taps[0];
      hit         <= taps[0] & ~tap0_prev;
      coarse      <= coarse_prev;
      fine        <= ones;
    end
  end

  initial assert (NTAPS < (1 << FINE_W))
    else $error("tdc: NTAPS=%0d does not fit the %0d-bit fine code", NTAPS, FINE_W);

endmodule
