`timescale 1ns / 1ps
// sorting_control: drives the CONTROL signal of the sorting actuator.
//
// After the processor has measured a droplet's fluorescence lifetime it
// writes a sorting entry (droplet number, packet number of the droplet's
// first packet, action bit) into the sorting FIFO. This block takes the
// entries one at a time. The packet number is the system's time base: the
// droplet reaches the actuator a fixed number of packets, cfg_delay, after
// its first packet was seen at the detection spot. For an entry whose
// action bit is set the block waits until the packet in progress is
// first_packet + cfg_delay (modulo 256) and then holds CONTROL high for
// cfg_width packets. An entry with the action bit clear is consumed without
// effect (counted in passed). An entry that arrives after its firing packet
// (packets elapsed since first_packet above cfg_delay) is discarded and
// counted in missed, so the actuator never acts on the wrong droplet.
// The published design gives only the block's inputs (the FIFO fields) and
// its output; the delay/width timing model, the skip and miss rules and the
// counters are this design's choices. Elapsed packets are computed modulo
// 256, so cfg_delay must be below the 8-bit packet-number period and an
// entry must arrive less than 256 packets after its first packet.
//
// Interface: entry/entry_valid/entry_pop (show-ahead FIFO read side),
// packet_number/packet_tick (from the word writer), cfg_delay, cfg_width
// (packets, 0 treated as 1), control, active_droplet (droplet number of the
// entry being handled), fired/passed/missed counters.
// Timing: CONTROL rises in the cycle after the packet number reaches the
// firing packet and falls after the packet_tick that ends the last packet.
module sorting_control
  import flt_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  sort_entry_t           entry,
  input  logic                  entry_valid,
  output logic                  entry_pop,
  input  logic [PKT_NUM_W-1:0]  packet_number,
  input  logic                  packet_tick,
  input  logic [PKT_NUM_W-1:0]  cfg_delay,
  input  logic [PKT_NUM_W-1:0]  cfg_width,
  output logic                  control,
  output logic [DROP_NUM_W-1:0] active_droplet,
  output logic [15:0]           fired,
  output logic [15:0]           passed,
  output logic [15:0]           missed
);

  typedef enum logic [1:0] {ST_IDLE, ST_WAIT, ST_FIRE} sort_state_t;

  sort_state_t          state;
  sort_entry_t          cur;
  logic [PKT_NUM_W-1:0] elapsed, remaining;

  assign elapsed   = packet_number - cur.first_packet;
  assign entry_pop = (state == ST_IDLE) && entry_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= ST_IDLE;
      cur            <= '0;
      remaining      <= '0;
      control        <= 1'b0;
      active_droplet <= '0;
      fired          <= '0;
      passed         <= '0;
      missed         <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          control <= 1'b0;
          if (entry_valid) begin
            cur            <= entry;
            active_droplet <= entry.droplet_number;
            state          <= ST_WAIT;
          end
        end
        ST_WAIT: begin
          if (!cur.action) begin
            passed <= passed + 1'b1;
            state  <= ST_IDLE;
          end else if (elapsed == cfg_delay) begin
            control   <= 1'b1;
            remaining <= (cfg_width == '0) ? PKT_NUM_W'(1) : cfg_width;
            fired     <= fired + 1'b1;
            state     <= ST_FIRE;
          end else if (elapsed > cfg_delay) begin
            missed <= missed + 1'b1;
            state  <= ST_IDLE;
          end
        end
        ST_FIRE: begin
          if (packet_tick) begin
            if (remaining == PKT_NUM_W'(1)) begin
              control <= 1'b0;
              state   <= ST_IDLE;
            end
            remaining <= remaining - 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
