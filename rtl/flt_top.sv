`timescale 1ns / 1ps
// flt_top: FPGA part of a time-correlated single photon counting (TCSPC)
// system that measures the fluorescence lifetime of droplets flowing past a
// detection spot and sorts them.
//
// Data path: the frequency divider triggers the pulsed laser (start_laser)
// and the TDC coarse counter with START, and cuts time into packets with
// PACKET. The SPAD's STOP pulses are timed by the tapped-delay-line TDC
// (5 ns coarse step, 19 ps taps). The word writer turns photons, packets and
// idle write slots into a 32-bit word stream (photon words, packet words
// carrying the droplet-detection flags, zero filler words) held in the data
// FIFO, whose read side (dma_*) feeds the DMA engine that copies the stream
// into processor memory. The processor builds the per-droplet histograms,
// estimates the lifetime and writes a sorting entry per droplet through
// sort_wr_* into the sorting FIFO; the sorting control then raises CONTROL
// for the actuator when that droplet reaches it.
// Processor, DMA engine, memory bridge and configuration registers are
// outside this module: their signals are ports. The configuration inputs
// are expected to be static while running.
//
// The delay line is a behavioural model (tdl_delay_line), since the real
// line is a device-specific carry chain; everything else is synthesizable.
// All logic runs on clk, the 200 MHz TDC clock; rst_n is an asynchronous,
// active-low reset.
module flt_top
  import flt_pkg::*;
#(
  parameter int unsigned NTAPS           = 255,
  parameter int unsigned TAP_PS          = 19,
  parameter int unsigned CNT_W           = 16,
  parameter int unsigned SLOT_CYCLES     = 10,
  parameter int unsigned DATA_FIFO_DEPTH = 1024,
  parameter int unsigned SORT_FIFO_DEPTH = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // optics
  input  logic                  stop,
  output logic                  start_laser,
  output logic                  control,
  // configuration (processor registers)
  input  logic [31:0]           cfg_start_div,
  input  logic [31:0]           cfg_packet_div,
  input  logic [CNT_W-1:0]      cfg_thr_droplet,
  input  logic [CNT_W-1:0]      cfg_thr_background,
  input  logic [PKT_NUM_W-1:0]  cfg_sort_delay,
  input  logic [PKT_NUM_W-1:0]  cfg_sort_width,
  // word stream toward the DMA engine
  output logic [WORD_W-1:0]     dma_data,
  output logic                  dma_valid,
  input  logic                  dma_ready,
  // sorting entries from the processor
  input  logic                  sort_wr_valid,
  input  sort_entry_t           sort_wr_entry,
  output logic                  sort_full,
  // status
  output logic [PKT_NUM_W-1:0]  packet_number,
  output logic                  droplet_start,
  output logic [15:0]           lost_photons,
  output logic [15:0]           dropped_words,
  output logic [15:0]           sort_fired,
  output logic [15:0]           sort_passed,
  output logic [15:0]           sort_missed,
  output logic [$clog2(DATA_FIFO_DEPTH+1)-1:0] data_fifo_level,
  output logic [$clog2(SORT_FIFO_DEPTH+1)-1:0] sort_fifo_level,
  output logic [DROP_NUM_W-1:0] sort_active_droplet
);

  logic                start, packet, packet_tick;
  logic [NTAPS-1:0]    taps;
  logic                hit;
  logic [COARSE_W-1:0] coarse;
  logic [FINE_W-1:0]   fine;
  logic                fifo_wr, fifo_full, fifo_empty;
  logic [WORD_W-1:0]   fifo_wdata;
  sort_entry_t         sort_entry;
  logic                sort_empty, sort_pop;

  assign start_laser = start;

  freq_divider u_freq_divider (
    .clk, .rst_n,
    .start_div  (cfg_start_div),
    .packet_div (cfg_packet_div),
    .start, .packet
  );

  tdl_delay_line #(.NTAPS(NTAPS), .TAP_PS(TAP_PS)) u_delay_line (
    .clk, .stop, .taps
  );

  tdc #(.NTAPS(NTAPS)) u_tdc (
    .clk, .rst_n, .start, .taps, .hit, .coarse, .fine
  );

  write_data_control #(.CNT_W(CNT_W), .SLOT_CYCLES(SLOT_CYCLES)) u_write_ctrl (
    .clk, .rst_n,
    .hit, .coarse, .fine, .packet,
    .thr_droplet    (cfg_thr_droplet),
    .thr_background (cfg_thr_background),
    .fifo_wr, .fifo_wdata, .fifo_full,
    .packet_number, .packet_tick, .droplet_start,
    .lost_photons, .dropped_words
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(DATA_FIFO_DEPTH)) u_data_fifo (
    .clk, .rst_n,
    .wr_en   (fifo_wr),
    .wr_data (fifo_wdata),
    .full    (fifo_full),
    .rd_en   (dma_ready && dma_valid),
    .rd_data (dma_data),
    .empty   (fifo_empty),
    .count   (data_fifo_level)
  );
  assign dma_valid = !fifo_empty;

  sync_fifo #(.WIDTH(SORT_ENTRY_W), .DEPTH(SORT_FIFO_DEPTH)) u_sort_fifo (
    .clk, .rst_n,
    .wr_en   (sort_wr_valid && !sort_full),
    .wr_data (sort_wr_entry),
    .full    (sort_full),
    .rd_en   (sort_pop),
    .rd_data (sort_entry),
    .empty   (sort_empty),
    .count   (sort_fifo_level)
  );

  sorting_control u_sorting_control (
    .clk, .rst_n,
    .entry          (sort_entry),
    .entry_valid    (!sort_empty),
    .entry_pop      (sort_pop),
    .packet_number,
    .packet_tick,
    .cfg_delay      (cfg_sort_delay),
    .cfg_width      (cfg_sort_width),
    .control,
    .active_droplet (sort_active_droplet),
    .fired          (sort_fired),
    .passed         (sort_passed),
    .missed         (sort_missed)
  );

endmodule
