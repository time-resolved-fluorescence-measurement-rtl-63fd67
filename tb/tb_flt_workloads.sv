`timescale 1ns / 1ps
// tb_flt_workloads: runs the full-size design at the three droplet flow
// rates of the published experiments: 1000, 200 and 5 droplets per second,
// with about 3.2e3, 1.63e4 and 6.39e5 photons per droplet.
//
// The three workloads differ only in time scale. The laser runs at 50 MHz,
// a droplet takes 30 % of each droplet period, and the packet length is 1 %
// of the period (10 us, 50 us, 2 ms); the thresholds scale with it. While a
// droplet is in the spot each laser pulse yields a photon with probability
// 0.45, which after the 50 ns SPAD dead time gives about 10.6 million
// detected photons per second: that is what the published photon counts per
// droplet correspond to at all three rates. Photon delays are 1 ns plus an
// exponential decay of lifetime 1 ns.
// For each workload the design is reset and reconfigured, two droplet
// periods are run (one at 5 droplets/s, i.e. 0.2 s of system time) and the
// testbench checks, from the word stream alone: that every droplet is
// detected once, that its photon count is within 20 % of the published
// count, that the lifetime estimated from the coarse/fine codes (mean delay
// minus the 1 ns offset) is within five standard errors of 1 ns, that each
// packet holds packet_div/10 photon-or-zero words, that no photon or word
// is lost, and that CONTROL fires 40 packets after the first packet of the
// droplets to be sorted.
module tb_flt_workloads;
  import flt_pkg::*;

  localparam real TCLK = 5.0;
  localparam int  SCENE = 100;

  logic clk = 0, rst_n = 0, stop = 0;
  logic start_laser, control;
  logic [31:0] dma_data;
  logic dma_valid, dma_ready = 1;
  logic sort_wr_valid = 0, sort_full;
  sort_entry_t sort_wr_entry = '0;
  logic [7:0] packet_number;
  logic droplet_start;
  logic [15:0] lost_photons, dropped_words, sort_fired, sort_passed, sort_missed;
  logic [10:0] data_fifo_level;
  logic [6:0] sort_fifo_level;
  logic [5:0] sort_active_droplet;
  logic [31:0] packet_div = 32'd2000;
  logic [15:0] thr_d = 16'd60, thr_b = 16'd12;

  flt_top dut (
    .clk, .rst_n, .stop, .start_laser, .control,
    .cfg_start_div(32'd4), .cfg_packet_div(packet_div),
    .cfg_thr_droplet(thr_d), .cfg_thr_background(thr_b),
    .cfg_sort_delay(8'd40), .cfg_sort_width(8'd30),
    .dma_data, .dma_valid, .dma_ready,
    .sort_wr_valid, .sort_wr_entry, .sort_full,
    .packet_number, .droplet_start, .lost_photons, .dropped_words,
    .sort_fired, .sort_passed, .sort_missed,
    .data_fifo_level, .sort_fifo_level, .sort_active_droplet);

  always #(TCLK / 2) clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // scene, photon source and SPAD
  int abs_pkt = 0;
  bit emit = 0;
  always @(packet_number) if (rst_n) abs_pkt++;

  function automatic real photon_prob(int pk);
    int s;
    s = pk % SCENE;
    if (s >= 20 && s < 50) return 0.45;
    if (s == 18 || s == 19 || s == 50 || s == 51) return 0.06;
    return 0.01;
  endfunction

  real photon_delay[$];
  realtime last_detect = -1.0e6;

  function automatic real rand01();
    return (real'($urandom_range(0, 999999)) + 0.5) / 1.0e6;
  endfunction

  always @(posedge start_laser) if (rst_n && emit) begin
    real d;
    if (rand01() < photon_prob(abs_pkt)) begin
      d = 1.0 - $ln(rand01());
      if (d > 15.0) d = 15.0;
      if ($realtime + d - last_detect >= 50.0) begin
        last_detect = $realtime + d;
        photon_delay.push_back(d);
        fork
          begin
            #(d) stop = 1;
            #(6.0) stop = 0;
          end
        join_none
      end
    end
  end

  // ------------------------------------------------------------------
  // DMA / processor model
  int slot_words = 0, exp_pkt = 0, n_drops = 0, n_delay = 0;
  bit prev_dflag = 0, measuring = 0;
  real sum_delay = 0.0;
  int expected_photons = 0;
  int first_pkt_of[int];
  sort_entry_t pending[$];
  int pending_due[$];

  always @(posedge clk) if (rst_n && measuring && dma_valid && dma_ready) begin
    logic [31:0] w;
    w = dma_data;
    if (w == 32'h0) begin
      slot_words++;
    end else if (w[15:0] != 16'hFFFF) begin
      photon_word_t pw;
      real d, rec;
      pw = w;
      slot_words++;
      rec = (real'(pw.coarse) + 1.0) * TCLK - (real'(pw.fine) - 0.5) * 0.019;
      if (photon_delay.size() == 0) check(0, "photon word without photon");
      else begin
        d = photon_delay.pop_front();
        checks++;
        if (d < rec - 0.011 - ((pw.fine == 8'd255) ? 1.0 : 0.0) || d > rec + 0.011) begin
          failures++;
          $display("FAIL photon delay %0.4f ns reported as %0.4f ns", d, rec);
        end
      end
      if (prev_dflag) begin sum_delay += rec; n_delay++; end
    end else begin
      packet_word_t pk;
      pk = w;
      checks++;
      if (exp_pkt > 0 && (slot_words < int'(packet_div) / 10 - 1 || slot_words > int'(packet_div) / 10 + 1)) begin
        failures++;
        $display("FAIL packet %0d holds %0d photon/zero words", exp_pkt, slot_words);
      end
      slot_words = 0;
      if (pk.packet_number != exp_pkt[7:0]) begin
        checks++; failures++; $display("FAIL packet number %0d expected %0d", pk.packet_number, exp_pkt[7:0]);
      end
      if (pk.droplet_flag && !prev_dflag) begin
        first_pkt_of[pk.droplet_number] = exp_pkt;
        sum_delay = 0.0; n_delay = 0;
      end
      if (!pk.droplet_flag && prev_dflag) begin
        real tau, tol;
        int dn;
        dn = n_drops + 1;
        n_drops++;
        tau = sum_delay / real'(n_delay) - 1.0;
        tol = 5.0 / $sqrt(real'(n_delay));
        $display("  droplet %0d: packets %0d..%0d, %0d photons (published %0d), lifetime estimate %0.4f ns",
                 dn, first_pkt_of[dn], exp_pkt - 1, n_delay, expected_photons, tau);
        check(n_delay > expected_photons * 8 / 10 && n_delay < expected_photons * 12 / 10,
              $sformatf("photons per droplet %0d, published %0d", n_delay, expected_photons));
        check(tau > 1.0 - tol && tau < 1.0 + tol, $sformatf("lifetime estimate %0.4f ns", tau));
        pending.push_back('{action: 1'(dn % 2), droplet_number: 6'(dn), first_packet: 8'(first_pkt_of[dn])});
        pending_due.push_back(exp_pkt + 3);
      end
      prev_dflag = pk.droplet_flag;
      exp_pkt++;
    end
  end

  always @(negedge clk) begin
    sort_wr_valid <= 1'b0;
    if (pending.size() > 0 && abs_pkt >= pending_due[0] && !sort_full) begin
      sort_wr_entry <= pending.pop_front();
      void'(pending_due.pop_front());
      sort_wr_valid <= 1'b1;
    end
  end

  int stall_left = 0;
  always @(negedge clk) begin
    if (stall_left > 0) begin
      stall_left--;
      dma_ready <= (stall_left == 0);
    end else if ($urandom_range(0, 99999) == 0) begin
      stall_left = 300;
      dma_ready <= 1'b0;
    end
  end

  int n_rises = 0;
  logic control_d = 0;
  always @(posedge clk) begin
    control_d <= control;
    if (rst_n && control && !control_d) begin
      int d;
      n_rises++;
      d = sort_active_droplet;
      check(first_pkt_of.exists(d) && d % 2 == 1 && abs_pkt == first_pkt_of[d] + 40,
            $sformatf("CONTROL for droplet %0d at packet %0d", d, abs_pkt));
    end
  end

  task automatic run_workload(input int flow, input int pdiv, input int photons, input int periods);
    $display("workload: %0d droplets/s, packet %0d cycles", flow, pdiv);
    emit = 0;
    repeat (20) @(negedge clk);          // let pending STOP pulses finish
    rst_n = 0;
    packet_div = 32'(pdiv);
    thr_d = 16'(pdiv * 3 / 100);         // 60 photons per 10 us packet
    thr_b = 16'(pdiv * 6 / 1000);        // 12 photons per 10 us packet
    photon_delay.delete();
    pending.delete(); pending_due.delete(); first_pkt_of.delete();
    abs_pkt = 0; exp_pkt = 0; slot_words = 0; n_drops = 0; n_rises = 0;
    prev_dflag = 0; expected_photons = photons;
    repeat (3) @(negedge clk);
    rst_n = 1;
    abs_pkt = 0;
    emit = 1; measuring = 1;
    wait (abs_pkt >= (periods - 1) * SCENE + 95);
    repeat (10) @(negedge clk);
    check(n_drops == periods, $sformatf("%0d droplets detected, %0d expected", n_drops, periods));
    check(n_rises == (periods + 1) / 2 && int'(sort_fired) == n_rises, "sorting pulses");
    check(lost_photons == 0 && dropped_words == 0, "no lost photon or dropped word");
    measuring = 0;
  endtask

  initial begin
    run_workload(1000, 2000, 3200, 2);
    run_workload(200, 10000, 16300, 2);
    run_workload(5, 400000, 639000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
