`timescale 1ns / 1ps
// tb_write_data_control: checks the word stream written into the FIFO.
//
// Photons (at most one per 10-cycle dead time) and PACKET pulses every
// PKT cycles are driven; the photon rate follows a pattern of bright
// (droplet) and dim (background) stretches with noise, so that droplets are
// detected. The testbench builds the expected stream itself: every photon
// word in order, and after the last photon of a packet (a photon in the
// PACKET cycle included) the packet word with the packet number, the flags
// and droplet number given by a reference model of the detection rules.
// The written stream with the zero words removed must equal it. Also
// checked: photon+zero words leave at one per 10-cycle slot, packet words
// come two cycles after the pulse when no photon is in the way, a second
// photon that finds the buffer occupied is counted as lost, the time
// 16'hFFFF is written as 16'hFFFE, and nothing is written while the FIFO
// is full (those words are counted as dropped).
module tb_write_data_control;
  import flt_pkg::*;
  localparam int PKT = 200, SLOT = 10;
  logic clk = 0, rst_n = 0;
  logic hit = 0, packet = 0, fifo_full = 0;
  logic [7:0] coarse = '0, fine = '0;
  logic [15:0] thr_d = 16'd12, thr_b = 16'd4;
  logic fifo_wr, packet_tick, droplet_start;
  logic [31:0] fifo_wdata;
  logic [7:0] packet_number;
  logic [15:0] lost_photons, dropped_words;
  int checks = 0, failures = 0;

  write_data_control #(.CNT_W(16), .SLOT_CYCLES(SLOT)) dut (
    .clk, .rst_n, .hit, .coarse, .fine, .packet, .thr_droplet(thr_d),
    .thr_background(thr_b), .fifo_wr, .fifo_wdata, .fifo_full,
    .packet_number, .packet_tick, .droplet_start, .lost_photons, .dropped_words);

  always #2.5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] expq[$];
  int n_photon_zero = 0, n_zero = 0, n_packet_words = 0, cycle = 0;
  int pkt_cycle = -100, pkt_latency_ok = 0, pkt_latency_bad = 0;
  bit compare = 1;

  // observed stream
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (fifo_wr) begin
      if (fifo_full) begin failures++; $display("FAIL write while full"); end
      if (fifo_wdata == 32'h0) n_zero++;
      if (fifo_wdata[15:0] != 16'hFFFF) n_photon_zero++;
      else begin
        n_packet_words++;
        if (cycle - pkt_cycle == 2) pkt_latency_ok++;
      end
      if (compare && fifo_wdata != 32'h0) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected word %h", fifo_wdata);
        end else begin
          logic [31:0] e;
          e = expq.pop_front();
          if (e != fifo_wdata) begin
            failures++; $display("FAIL word %h expected %h (cycle %0d)", fifo_wdata, e, cycle);
          end
        end
      end
    end
    if (packet) pkt_cycle = cycle;
  end

  // reference detection model (on the class history)
  int hist[$];
  bit ref_drop = 0;
  int ref_num = 0, ref_pkt = 0, ref_droplets = 0, pcount = 0;

  function automatic logic [31:0] packet_word(int cnt);
    int k, n;
    packet_word_t w;
    k = (cnt > int'(thr_d)) ? 2 : (cnt < int'(thr_b)) ? 0 : 1;
    hist.push_back(k);
    n = hist.size();
    if (!ref_drop && n >= 3 && hist[n-1] == 2 && hist[n-2] == 2 && hist[n-3] == 2) begin
      ref_drop = 1; ref_num++; ref_droplets++;
    end else if (ref_drop && n >= 3 && hist[n-1] == 0 && hist[n-2] == 1 && hist[n-3] == 1) begin
      ref_drop = 0;
    end
    w.packet_number   = ref_pkt[7:0];
    w.background_flag = !ref_drop && k == 0;
    w.droplet_flag    = ref_drop;
    w.droplet_number  = ref_num[5:0];
    w.stamp           = 16'hFFFF;
    ref_pkt++;
    return w;
  endfunction

  task automatic drive_cycle(input bit h, input bit p, input logic [7:0] c = 8'($urandom),
                             input logic [7:0] f = 8'($urandom_range(1, 255)));
    @(negedge clk);
    hit = h; packet = p; coarse = c; fine = f;
    if (h) begin
      pcount++;
      expq.push_back({16'h0, ({c, f} == 16'hFFFF) ? 16'hFFFE : {c, f}});
    end
    if (p) begin
      expq.push_back(packet_word(pcount));
      pcount = 0;
    end
  endtask

  initial begin
    int since_hit, rate, t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    since_hit = 100;
    t = 0;
    for (int pk = 0; pk < 600; pk++) begin
      // intensity pattern: 12 bright packets per 30, with single-packet noise
      if ((pk % 30) >= 10 && (pk % 30) < 22) rate = ($urandom_range(0, 9) == 0) ? 1 : 45;
      else if ((pk % 30) == 9 || (pk % 30) == 22 || (pk % 30) == 23) rate = 5;
      else rate = ($urandom_range(0, 12) == 0) ? 45 : 1;
      for (int c = 0; c < PKT; c++) begin
        bit h;
        h = (since_hit >= SLOT) && ($urandom_range(0, 99) < rate);
        // sometimes a photon exactly in the PACKET cycle or right after it
        if (c == PKT - 1 && since_hit >= SLOT && $urandom_range(0, 3) == 0) h = 1;
        since_hit = h ? 1 : since_hit + 1;
        drive_cycle(h, c == PKT - 1);
      end
    end
    // clamp: coarse 255 / fine 255
    drive_cycle(1, 0, 8'hFF, 8'hFF);
    repeat (20) drive_cycle(0, 0);
    // lost photon: two photons right after a PACKET pulse
    drive_cycle(0, 1);
    drive_cycle(1, 0, 8'h12, 8'h34);
    @(negedge clk); hit = 1; coarse = 8'h56; fine = 8'h78; pcount++;  // this one is lost
    repeat (30) drive_cycle(0, 0);
    drive_cycle(0, 0);
    hit = 0; packet = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d expected words never written", expq.size()); end
    checks++;
    if (lost_photons != 16'd1) begin failures++; $display("FAIL lost_photons=%0d", lost_photons); end
    // rate: one photon or zero word per slot
    checks++;
    if (n_photon_zero < cycle / SLOT - 2 || n_photon_zero > cycle / SLOT + 2) begin
      failures++; $display("FAIL %0d photon+zero words in %0d cycles", n_photon_zero, cycle);
    end
    checks++;
    if (pkt_latency_ok < 100) begin failures++; $display("FAIL packet word latency (%0d at 2 cycles)", pkt_latency_ok); end
    checks++;
    if (ref_droplets < 15 || n_zero < 1000) begin
      failures++; $display("FAIL coverage: droplets=%0d zeros=%0d", ref_droplets, n_zero);
    end
    // FIFO full: nothing written, words dropped
    compare = 0;
    @(negedge clk); fifo_full = 1;
    repeat (100) @(negedge clk);
    fifo_full = 0;
    checks++;
    if (dropped_words < 16'd9) begin failures++; $display("FAIL dropped_words=%0d", dropped_words); end
    $display("droplets=%0d packet words=%0d photon+zero=%0d zeros=%0d cycles=%0d",
             ref_droplets, n_packet_words, n_photon_zero, n_zero, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
