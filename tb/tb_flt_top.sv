`timescale 1ns / 1ps
// tb_flt_top: end-to-end test of the FLT measurement and sorting front end
// with every parameter at its default.
//
// Scene: the laser fires at 50 MHz (START every 4 cycles), packets last
// 10 us (2000 cycles) and a droplet passes every 100 packets (1000
// droplets/s): packets 20..49 of each 100 are bright, 18, 19, 50 and 51 are
// edges of intermediate brightness, the rest is background, with a single
// bright packet in the background (packet 5, 70) and a single dark packet
// inside the droplet (packet 35). Each laser pulse yields a photon with a
// probability set by the scene; its delay is 1 ns plus an exponential decay
// of lifetime 1 ns. A SPAD model with 50 ns dead time turns photons into
// STOP pulses.
// The DMA/processor model reads the word stream (with stalls of the ready
// signal), and checks: each photon word against the true delay of the
// photon it reports (within one 19 ps tap); the packet words (packet
// numbers in sequence, flags against the scene); exactly one photon-or-zero
// word per 10-cycle slot in every packet; one detected droplet per scene
// droplet. It estimates each droplet's lifetime from the mean delay and
// writes a sorting entry (action = odd droplet number; the entry of every
// fourth droplet is held back until it is too late). CONTROL must rise 40
// packets after the droplet's first packet and only for action entries.
// Each mechanism (photon, zero and packet words, droplet start and end,
// ignored noise packets, background flag, packet-number wrap, DMA stall,
// sorting fire/pass/miss) is counted and must occur.
module tb_flt_top;
  import flt_pkg::*;

  localparam real TCLK = 5.0;
  localparam int  START_DIV = 4, PACKET_DIV = 2000, SLOT = 10;
  localparam int  SCENE = 100, N_DROPLETS = 4;

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

  flt_top dut (
    .clk, .rst_n, .stop, .start_laser, .control,
    .cfg_start_div(32'(START_DIV)), .cfg_packet_div(32'(PACKET_DIV)),
    .cfg_thr_droplet(16'd40), .cfg_thr_background(16'd12),
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
    #8ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // scene, photon source and SPAD
  int abs_pkt = 0;             // index of the packet in progress
  always @(packet_number) if (rst_n) abs_pkt++;

  function automatic real photon_prob(int pk);
    int s;
    s = pk % SCENE;
    if (s == 35) return 0.01;                                  // dark packet in droplet
    if (s >= 20 && s < 50) return 0.21;                        // droplet
    if (s == 18 || s == 19 || s == 50 || s == 51) return 0.06; // edges
    if (s == 5 || s == 70) return 0.21;                        // bright noise packet
    return 0.01;                                               // background
  endfunction

  real photon_delay[$];        // true delays of detected photons, in order
  realtime last_detect = -1.0e6;
  int n_emitted = 0;

  function automatic real rand01();
    return (real'($urandom_range(0, 999999)) + 0.5) / 1.0e6;
  endfunction

  always @(posedge start_laser) if (rst_n) begin
    real d;
    if (rand01() < photon_prob(abs_pkt)) begin
      d = 1.0 - $ln(rand01());                 // 1 ns offset + lifetime 1 ns
      if (d > 15.0) d = 15.0;
      n_emitted++;
      if ($realtime + d - last_detect >= 50.0) begin   // SPAD dead time
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
  int n_photon_words = 0, n_zero_words = 0, n_packet_words = 0;
  int slot_words = 0, exp_pkt = 0, n_wraps = 0;
  int n_drop_start = 0, n_drop_end = 0, n_bg_flag = 0, n_noise_ignored = 0, n_stalls = 0;
  bit prev_dflag = 0;
  int cur_droplet = -1;
  real sum_delay = 0.0;
  int n_delay = 0;
  int first_pkt_of[int];       // droplet number -> absolute first packet
  int action_of[int];
  int late_of[int];
  sort_entry_t pending[$];
  int pending_due[$];

  function automatic bit exp_droplet_flag(int pk);
    int s;
    s = pk % SCENE;
    return (s >= 22 && s <= 51);
  endfunction

  always @(posedge clk) if (rst_n && dma_valid && dma_ready) begin
    logic [31:0] w;
    w = dma_data;
    if (w == 32'h0) begin
      n_zero_words++; slot_words++;
    end else if (w[15:0] != 16'hFFFF) begin
      photon_word_t pw;
      real lo, hi, d;
      pw = w;
      n_photon_words++; slot_words++;
      if (photon_delay.size() == 0) check(0, "photon word without photon");
      else begin
        d = photon_delay.pop_front();
        hi = (real'(pw.coarse) + 1.0) * TCLK - (real'(pw.fine) - 1.0) * 0.019 + 0.001;
        lo = (pw.fine == 8'd255) ? -1.0 : (real'(pw.coarse) + 1.0) * TCLK - real'(pw.fine) * 0.019 - 0.001;
        checks++;
        if (!(d > lo && d <= hi)) begin
          failures++;
          $display("FAIL photon delay %0.4f ns reported as coarse %0d fine %0d", d, pw.coarse, pw.fine);
        end
        if (prev_dflag) begin sum_delay += d; n_delay++; end
      end
    end else begin
      packet_word_t pk;
      pk = w;
      n_packet_words++;
      // one photon-or-zero word per 10-cycle slot
      if (exp_pkt > 0) begin
        checks++;
        if (slot_words < PACKET_DIV / SLOT - 1 || slot_words > PACKET_DIV / SLOT + 1) begin
          failures++; $display("FAIL packet %0d holds %0d photon/zero words", exp_pkt, slot_words);
        end
      end
      slot_words = 0;
      check(pk.packet_number == exp_pkt[7:0], $sformatf("packet number %0d expected %0d", pk.packet_number, exp_pkt[7:0]));
      if (exp_pkt > 0 && pk.packet_number == 8'd0) n_wraps++;
      check(pk.droplet_flag == exp_droplet_flag(exp_pkt),
            $sformatf("packet %0d droplet flag %0b", exp_pkt, pk.droplet_flag));
      if (!pk.droplet_flag && pk.background_flag) n_bg_flag++;
      if ((exp_pkt % SCENE == 5 || exp_pkt % SCENE == 70) && !pk.droplet_flag) n_noise_ignored++;
      if (exp_pkt % SCENE == 35 && pk.droplet_flag) n_noise_ignored++;
      if (pk.droplet_flag && !prev_dflag) begin
        n_drop_start++;
        cur_droplet = pk.droplet_number;
        first_pkt_of[cur_droplet] = exp_pkt;
        sum_delay = 0.0; n_delay = 0;
      end
      if (!pk.droplet_flag && prev_dflag) begin
        real tau;
        n_drop_end++;
        check(pk.background_flag, "background flag at droplet end");
        // lifetime estimate from the mean delay (offset 1 ns)
        tau = sum_delay / real'(n_delay) - 1.0;
        checks++;
        if (tau < 0.85 || tau > 1.15) begin
          failures++; $display("FAIL droplet %0d lifetime estimate %0.3f ns", cur_droplet, tau);
        end
        $display("droplet %0d: %0d photons, lifetime estimate %0.3f ns", cur_droplet, n_delay, tau);
        action_of[cur_droplet] = cur_droplet % 2;
        late_of[cur_droplet] = (cur_droplet % 4 == 3);
        pending.push_back('{action: 1'(cur_droplet % 2), droplet_number: 6'(cur_droplet),
                            first_packet: 8'(first_pkt_of[cur_droplet])});
        // processing time: a few packets, or past the firing packet
        pending_due.push_back(late_of[cur_droplet] ? first_pkt_of[cur_droplet] + 45 : exp_pkt + 3);
      end
      prev_dflag = pk.droplet_flag;
      exp_pkt++;
    end
  end

  // processor writes sorting entries when they are due
  always @(negedge clk) begin
    sort_wr_valid <= 1'b0;
    if (pending.size() > 0 && abs_pkt >= pending_due[0] && !sort_full) begin
      sort_wr_entry <= pending.pop_front();
      void'(pending_due.pop_front());
      sort_wr_valid <= 1'b1;
    end
  end

  // DMA ready with stalls
  int stall_left = 0;
  always @(negedge clk) begin
    if (stall_left > 0) begin
      stall_left--;
      dma_ready <= (stall_left == 0);
    end else if ($urandom_range(0, 9999) == 0) begin
      stall_left = 300;
      dma_ready <= 1'b0;
    end
    if (data_fifo_level > 11'd20) n_stalls++;
  end

  // CONTROL timing
  int n_rises = 0;
  logic control_d = 0;
  always @(posedge clk) begin
    control_d <= control;
    if (rst_n && control && !control_d) begin
      int d;
      n_rises++;
      d = sort_active_droplet;
      checks++;
      if (!first_pkt_of.exists(d) || action_of[d] != 1 || late_of[d] != 0 ||
          abs_pkt != first_pkt_of[d] + 40) begin
        failures++;
        $display("FAIL CONTROL for droplet %0d at packet %0d", d, abs_pkt);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (abs_pkt >= N_DROPLETS * SCENE + 5);
    repeat (10) @(negedge clk);
    $display("photons emitted=%0d words: photon=%0d zero=%0d packet=%0d",
             n_emitted, n_photon_words, n_zero_words, n_packet_words);
    $display("droplet starts=%0d ends=%0d bg-flag packets=%0d noise ignored=%0d wraps=%0d stalls=%0d",
             n_drop_start, n_drop_end, n_bg_flag, n_noise_ignored, n_wraps, n_stalls);
    $display("sorting: fired=%0d passed=%0d missed=%0d CONTROL rises=%0d",
             sort_fired, sort_passed, sort_missed, n_rises);
    check(n_drop_start == N_DROPLETS && n_drop_end == N_DROPLETS, "one droplet per scene droplet");
    check(n_photon_words > 1000 && n_zero_words > 1000, "photon and zero words");
    check(n_bg_flag > 100, "background flag");
    check(n_noise_ignored >= 3 * N_DROPLETS, "noise packets ignored");
    check(n_wraps >= 1, "packet number wrap");
    check(n_stalls > 0, "DMA stall");
    check(lost_photons == 0 && dropped_words == 0, "no lost photon, no dropped word");
    check(int'(sort_fired) == n_rises && sort_fired >= 1, "sorting fired");
    check(sort_passed >= 1, "sorting passed");
    check(sort_missed >= 1, "sorting missed");
    check(int'(sort_fired + sort_passed + sort_missed) == N_DROPLETS, "every entry handled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
