`timescale 1ns / 1ps
// tdl_delay_line: behavioural model of the tapped delay line of the TDC.
//
// This is a simulation model, not synthesizable logic. In the FPGA the line
// is a chain of carry cells whose taps are captured by a row of flip-flops on
// every rising edge of the 200 MHz TDC clock; its layout is device specific.
// The model reproduces what that row of flip-flops holds: tap i sees the STOP
// signal delayed by i * TAP_PS picoseconds, so a STOP rising edge that arrived
// t before the clock edge shows up as a thermometer code with about
// t / TAP_PS ones starting at tap 0. The 19 ps tap delay is the published
// fine resolution; the tap count (255, so that the count fits the 8-bit fine
// field) is this design's choice. A line of 255 x 19 ps spans 4.85 ns, a
// little less than the 5 ns clock period: a hit in the first 0.15 ns of a
// period reads as a full line.
//
// Interface: clk (TDC clock), stop (SPAD output), taps (sampled line,
// registered on the rising edge of clk, tap 0 nearest the input).
// The model assumes STOP pulses are separated by more than one clock period,
// which the 50 ns SPAD dead time guarantees.
module tdl_delay_line #(
  parameter int unsigned NTAPS  = 255,
  parameter int unsigned TAP_PS = 19
) (
  input  logic             clk,
  input  logic             stop,
  output logic [NTAPS-1:0] taps
);

  realtime last_rise;
  realtime last_fall;

  always @(posedge stop) last_rise <= $realtime;
  always @(negedge stop) last_fall <= $realtime;

  // Level of STOP as seen at time tp (in ns).
  function automatic logic level_at(realtime tp);
    return (last_rise <= tp) && ((last_fall < last_rise) || (last_fall > tp));
  endfunction

  initial begin
    last_rise = -1.0e9;
    last_fall = -0.5e9;
    taps      = '0;
  end

  always @(posedge clk) begin
    realtime now, span;
    now  = $realtime;
    span = real'(NTAPS) * real'(TAP_PS) / 1000.0;
    if (now - last_rise > span && now - last_fall > span)
      taps <= {NTAPS{level_at(now)}};      // no edge inside the line
    else
      for (int i = 0; i < NTAPS; i++)
        taps[i] <= level_at(now - (real'(i) * real'(TAP_PS) / 1000.0));
  end

endmodule
