`timescale 1ns / 1ps
// write_data_control: builds the 32-bit word stream written into the FIFO
// that feeds the DMA.
//
// Three kinds of word are written (layouts in flt_pkg):
//   * a photon word for every photon the TDC reports (coarse and fine time in
//     the low 16 bits);
//   * a packet word at every PACKET pulse: the 16-bit packet stamp 16'hFFFF
//     plus the packet number, the droplet number and the droplet and
//     background flags of the packet that has just ended;
//   * a zero word in every write slot of SLOT_CYCLES clock cycles in which no
//     photon word was written. Photon-or-zero words therefore leave at one
//     per slot, a constant rate equal to the highest photon rate the detector
//     can deliver (50 ns dead time = 10 cycles of the 200 MHz clock), and
//     packet words at the packet rate, so a fixed transfer size always covers
//     the same stretch of time whatever the photon count.
// An 8-bit packet counter gives the packet numbers and a photon counter,
// cleared at every PACKET pulse, gives the packet intensity that
// droplet_detector classifies. The packet word is a trailer: it follows
// the photon words of its packet. A photon reported in the same cycle as the
// PACKET pulse belongs to the packet that ends.
// The word formats, counters, packet stamp, zero words and slot rate follow
// the published design. This design's choices: the write arbiter below (one
// FIFO write per cycle, photon words of the ending packet first, then its
// packet word, then any later photon, zero words last), the one-word photon
// buffer (a photon that finds it still occupied is dropped and counted in
// lost_photons), dropping words when the FIFO is full (counted in
// dropped_words), and replacing the photon time 16'hFFFF, which only a photon
// at the saturated coarse code and full fine code can have, by 16'hFFFE so
// that it cannot be mistaken for a packet stamp. Photon words are never zero
// because the fine code is at least 1.
//
// Interface: hit/coarse/fine from the TDC, packet from the frequency
// divider, thresholds from the processor, a FIFO write port (fifo_wr is only
// raised when fifo_full is low), packet_number (number of the packet in
// progress) and packet_tick (one cycle, when packet_number changes).
// Timing: a photon word is written the cycle after the TDC reports it unless
// a packet word has priority; the packet word two cycles after the PACKET
// pulse.
module write_data_control
  import flt_pkg::*;
#(
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned SLOT_CYCLES = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // TDC
  input  logic                  hit,
  input  logic [COARSE_W-1:0]   coarse,
  input  logic [FINE_W-1:0]     fine,
  // frequency divider
  input  logic                  packet,
  // configuration
  input  logic [CNT_W-1:0]      thr_droplet,
  input  logic [CNT_W-1:0]      thr_background,
  // FIFO write port
  output logic                  fifo_wr,
  output logic [WORD_W-1:0]     fifo_wdata,
  input  logic                  fifo_full,
  // status
  output logic [PKT_NUM_W-1:0]  packet_number,
  output logic                  packet_tick,
  output logic                  droplet_start,
  output logic [15:0]           lost_photons,
  output logic [15:0]           dropped_words
);

  typedef enum logic [1:0] {WR_NONE, WR_PHOTON, WR_PACKET, WR_ZERO} wr_sel_t;

  localparam int unsigned SLOT_W = (SLOT_CYCLES > 1) ? $clog2(SLOT_CYCLES) : 1;

  // photon counter of the packet in progress
  logic [CNT_W-1:0] photon_cnt, eval_cnt;
  // pending photon word
  logic             ph_pend, ph_old;
  photon_word_t     ph_word;
  // pending packet word
  logic             pkt_inflight, pkt_ready;
  packet_word_t     pkt_word;
  logic [PKT_NUM_W-1:0] closed_number;
  // write slots
  logic [SLOT_W-1:0] slot_cnt;
  logic              slot_used, zero_due;
  wr_sel_t           sel;

  // droplet detector results
  logic                  det_valid, det_drop, det_bg;
  logic [DROP_NUM_W-1:0] det_num;
  pkt_class_t            det_class;

  assign eval_cnt = (hit && photon_cnt != '1) ? photon_cnt + 1'b1 : photon_cnt;

  droplet_detector #(.CNT_W(CNT_W)) u_detector (
    .clk, .rst_n,
    .eval            (packet),
    .count           (eval_cnt),
    .thr_droplet,
    .thr_background,
    .result_valid    (det_valid),
    .pkt_class       (det_class),
    .droplet_flag    (det_drop),
    .background_flag (det_bg),
    .droplet_number  (det_num),
    .droplet_start
  );

  // write arbiter
  always_comb begin
    if (ph_pend && ph_old) sel = WR_PHOTON;
    else if (pkt_ready)    sel = WR_PACKET;
    else if (ph_pend && !pkt_inflight) sel = WR_PHOTON;
    else if (zero_due)     sel = WR_ZERO;
    else                   sel = WR_NONE;
  end

  always_comb begin
    unique case (sel)
      WR_PHOTON: fifo_wdata = ph_word;
      WR_PACKET: fifo_wdata = pkt_word;
      default:   fifo_wdata = ZERO_WORD;
    endcase
  end

  assign fifo_wr = (sel != WR_NONE) && !fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      photon_cnt    <= '0;
      packet_number <= '0;
      closed_number <= '0;
      packet_tick   <= 1'b0;
      ph_pend       <= 1'b0;
      ph_old        <= 1'b0;
      ph_word       <= '0;
      pkt_inflight  <= 1'b0;
      pkt_ready     <= 1'b0;
      pkt_word      <= '0;
      slot_cnt      <= '0;
      slot_used     <= 1'b0;
      zero_due      <= 1'b0;
      lost_photons  <= '0;
      dropped_words <= '0;
    end else begin
      // packet and photon counters
      packet_tick <= packet;
      if (packet) begin
        photon_cnt    <= '0;
        closed_number <= packet_number;
        packet_number <= packet_number + 1'b1;
        pkt_inflight  <= 1'b1;
      end else if (hit && photon_cnt != '1) begin
        photon_cnt <= photon_cnt + 1'b1;
      end

      // packet word, assembled when the detector has classified the packet
      if (det_valid) begin
        pkt_ready <= 1'b1;
        pkt_word  <= '{packet_number:   closed_number,
                       background_flag: det_bg,
                       droplet_flag:    det_drop,
                       droplet_number:  det_num,
                       stamp:           PACKET_STAMP};
      end
      if (sel == WR_PACKET) begin
        pkt_ready    <= 1'b0;
        pkt_inflight <= packet;   // a new PACKET pulse in this very cycle
        if (ph_pend) ph_old <= 1'b1;   // now ahead of any later packet word
      end

      // photon buffer
      if (sel == WR_PHOTON) ph_pend <= 1'b0;
      if (hit) begin
        if (ph_pend && sel != WR_PHOTON) begin
          if (lost_photons != '1) lost_photons <= lost_photons + 1'b1;
        end else begin
          ph_pend <= 1'b1;
          // older than any packet word not yet written?
          ph_old  <= !pkt_inflight || (sel == WR_PACKET);
          ph_word <= '{unused: '0,
                       coarse: coarse,
                       fine:   ({coarse, fine} == 16'hFFFF) ? 8'hFE : fine};
        end
      end

      // write slots and zero words
      if (sel == WR_ZERO) zero_due <= 1'b0;
      if (32'(slot_cnt) == SLOT_CYCLES - 1) begin
        slot_cnt  <= '0;
        slot_used <= 1'b0;
        if (!(slot_used || sel == WR_PHOTON)) zero_due <= 1'b1;
      end else begin
        slot_cnt <= slot_cnt + 1'b1;
        if (sel == WR_PHOTON) slot_used <= 1'b1;
      end

      if (sel != WR_NONE && fifo_full && dropped_words != '1)
        dropped_words <= dropped_words + 1'b1;
    end
  end

  // A new PACKET pulse must not arrive before the previous packet word has
  // been written (packet periods are microseconds long in practice).
  a_packet_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    packet |-> !(pkt_inflight && sel != WR_PACKET))
    else $error("write_data_control: PACKET pulse while a packet word is pending");

endmodule
