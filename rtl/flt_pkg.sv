`timescale 1ns / 1ps
// flt_pkg: types and constants shared by the fluorescence-lifetime (FLT)
// measurement front end.
//
// The FPGA writes two kinds of 32-bit words into the FIFO that feeds the DMA:
//   photon word : bits 31..16 unused (zero), 15..8 coarse time, 7..0 fine time
//   packet word : bits 31..24 packet number, 23 background flag,
//                 22 droplet flag, 21..16 droplet number, 15..0 = 16'hFFFF
// and, when no photon arrived in a write slot, the all-zero filler word.
// These layouts and field widths are those of the published word formats;
// the sorting-entry layout is this design's own choice (the fields are the
// published ones: droplet number, packet number of its first packet and an
// action bit).
package flt_pkg;

  localparam int unsigned WORD_W      = 32;
  localparam int unsigned COARSE_W    = 8;
  localparam int unsigned FINE_W      = 8;
  localparam int unsigned PKT_NUM_W   = 8;
  localparam int unsigned DROP_NUM_W  = 6;

  localparam logic [15:0] PACKET_STAMP = 16'hFFFF;
  localparam logic [31:0] ZERO_WORD    = 32'h0000_0000;

  typedef struct packed {
    logic [15:0]         unused;
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } photon_word_t;

  typedef struct packed {
    logic [PKT_NUM_W-1:0]  packet_number;
    logic                  background_flag;
    logic                  droplet_flag;
    logic [DROP_NUM_W-1:0] droplet_number;
    logic [15:0]           stamp;
  } packet_word_t;

  // Classification of one packet against the two intensity thresholds.
  typedef enum logic [1:0] {
    PKT_BACKGROUND   = 2'd0,   // photon count below the background threshold
    PKT_UNCLASSIFIED = 2'd1,   // between the two thresholds
    PKT_DROPLET      = 2'd2    // above the droplet threshold
  } pkt_class_t;

  // Sorting information written by the processor for each measured droplet.
  typedef struct packed {
    logic                  action;
    logic [DROP_NUM_W-1:0] droplet_number;
    logic [PKT_NUM_W-1:0]  first_packet;
  } sort_entry_t;

  localparam int unsigned SORT_ENTRY_W = $bits(sort_entry_t);

endpackage
