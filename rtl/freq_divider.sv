`timescale 1ns / 1ps
// freq_divider: generates the START (laser trigger) and PACKET pulses.
//
// Both are free-running dividers of the 200 MHz system clock with periods set
// at run time by the processor: START every start_div clock cycles (this
// period is the time window of the fluorescence-decay histogram and the laser
// repetition period), PACKET every packet_div cycles (the packet duration
// used to cut the photon stream into packets for droplet detection).
// Each pulse is high for one clock cycle; a divisor below 2 is treated as 2,
// so START can reach the published 100 MHz maximum (50% duty cycle there).
// The two counters are independent. The published design gives only the
// function of this block; the one-cycle pulse shape, the clamp and the
// 32-bit divisors are this design's choices.
//
// Interface: start_div, packet_div (divisors, sampled every cycle; a change
// takes effect when the running count next reaches it), start, packet
// (registered pulses). The first pulses come one cycle after reset ends.
module freq_divider #(
  parameter int unsigned DIV_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] start_div,
  input  logic [DIV_W-1:0] packet_div,
  output logic             start,
  output logic             packet
);

  logic [DIV_W-1:0] start_cnt, packet_cnt;
  logic [DIV_W-1:0] start_last, packet_last;

  // Last count value of a period: divisor - 1, at least 1.
  assign start_last  = (start_div  < DIV_W'(2)) ? DIV_W'(1) : start_div  - 1'b1;
  assign packet_last = (packet_div < DIV_W'(2)) ? DIV_W'(1) : packet_div - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_cnt  <= '0;
      packet_cnt <= '0;
      start      <= 1'b0;
      packet     <= 1'b0;
    end else begin
      start  <= (start_cnt == '0);
      packet <= (packet_cnt == '0);
      start_cnt  <= (start_cnt  >= start_last)  ? '0 : start_cnt  + 1'b1;
      packet_cnt <= (packet_cnt >= packet_last) ? '0 : packet_cnt + 1'b1;
    end
  end

endmodule
