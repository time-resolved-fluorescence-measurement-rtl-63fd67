`timescale 1ns / 1ps
// droplet_detector: packet classification and droplet/background flags.
//
// At the end of every packet the photon count of that packet is compared
// with two thresholds: above the droplet threshold it is a droplet packet,
// below the background threshold a background packet, otherwise
// unclassified. A two-state machine (BACKGROUND, DROPLET) then filters
// isolated noise packets:
//   * In BACKGROUND, DROP_RUN (3) successive droplet packets start a droplet:
//     the droplet flag goes to 1 and the 6-bit droplet number is incremented.
//     Single bright packets in the background do not start one.
//   * In DROPLET, the droplet ends at the first background packet that
//     follows at least UNC_RUN (2) successive unclassified packets; a dark
//     packet inside a droplet that is not preceded by that run is ignored.
//   * From the end of a droplet until the next droplet starts, the background
//     flag is 1 for every packet below the background threshold and 0 for
//     the others; it is 0 during a droplet.
// This rule set, the run lengths 3 and 2 and the 6-bit droplet number follow
// the published detection scheme. This design's choices: the packet that
// completes the run of three is the first to carry the droplet flag; the
// packet that ends a droplet already carries the background flag; a run of
// droplet or unclassified packets is broken by any packet of another class;
// after reset the detector is in BACKGROUND with droplet number 0.
//
// Interface: eval (one-cycle strobe at the end of a packet), count (that
// packet's photon count), thresholds. Outputs are registered and hold the
// result for the packet evaluated last, valid from the cycle after eval
// (result_valid is high for that one cycle). droplet_start pulses with
// result_valid when a droplet starts.
module droplet_detector
  import flt_pkg::*;
#(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned DROP_RUN = 3,
  parameter int unsigned UNC_RUN  = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  eval,
  input  logic [CNT_W-1:0]      count,
  input  logic [CNT_W-1:0]      thr_droplet,
  input  logic [CNT_W-1:0]      thr_background,
  output logic                  result_valid,
  output pkt_class_t            pkt_class,
  output logic                  droplet_flag,
  output logic                  background_flag,
  output logic [DROP_NUM_W-1:0] droplet_number,
  output logic                  droplet_start
);

  typedef enum logic {ST_BACKGROUND = 1'b0, ST_DROPLET = 1'b1} det_state_t;

  det_state_t state;
  logic [3:0] drop_run;   // successive droplet packets, saturating
  logic [3:0] unc_run;    // successive unclassified packets, saturating
  pkt_class_t cls;

  always_comb begin
    if (count > thr_droplet)         cls = PKT_DROPLET;
    else if (count < thr_background) cls = PKT_BACKGROUND;
    else                             cls = PKT_UNCLASSIFIED;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= ST_BACKGROUND;
      drop_run        <= '0;
      unc_run         <= '0;
      result_valid    <= 1'b0;
      pkt_class       <= PKT_BACKGROUND;
      droplet_flag    <= 1'b0;
      background_flag <= 1'b0;
      droplet_number  <= '0;
      droplet_start   <= 1'b0;
    end else begin
      result_valid  <= eval;
      droplet_start <= 1'b0;
      if (eval) begin
        pkt_class <= cls;
        drop_run  <= (cls == PKT_DROPLET)
                     ? ((drop_run == 4'hF) ? drop_run : drop_run + 1'b1) : '0;
        unc_run   <= (cls == PKT_UNCLASSIFIED)
                     ? ((unc_run == 4'hF) ? unc_run : unc_run + 1'b1) : '0;
        unique case (state)
          ST_BACKGROUND: begin
            if (cls == PKT_DROPLET && 32'(drop_run) + 1 >= DROP_RUN) begin
              state           <= ST_DROPLET;
              droplet_flag    <= 1'b1;
              background_flag <= 1'b0;
              droplet_number  <= droplet_number + 1'b1;
              droplet_start   <= 1'b1;
            end else begin
              droplet_flag    <= 1'b0;
              background_flag <= (cls == PKT_BACKGROUND);
            end
          end
          ST_DROPLET: begin
            if (cls == PKT_BACKGROUND && 32'(unc_run) >= UNC_RUN) begin
              state           <= ST_BACKGROUND;
              droplet_flag    <= 1'b0;
              background_flag <= 1'b1;
            end else begin
              droplet_flag    <= 1'b1;
              background_flag <= 1'b0;
            end
          end
          default: state <= ST_BACKGROUND;
        endcase
      end
    end
  end

endmodule
