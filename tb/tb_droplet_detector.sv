`timescale 1ns / 1ps
// tb_droplet_detector: self-checking test of the packet classification and
// the droplet/background flag rules.
//
// A scripted packet sequence reproduces the typical trace of a droplet
// passing the spot: isolated bright packets in the background, a rising
// edge, a dark packet inside the droplet, a falling edge through
// unclassified packets, and a second droplet. The expected flags of the
// scripted part are written out by hand. A long random sequence follows,
// checked against a reference model kept in the testbench that works on
// the history of packet classes (last three and last two classes) rather
// than on run counters.
module tb_droplet_detector;
  import flt_pkg::*;

  localparam int CNT_W = 16;
  logic clk = 0, rst_n = 0;
  logic eval = 0;
  logic [CNT_W-1:0] count = '0;
  logic [CNT_W-1:0] thr_d = 16'd100, thr_b = 16'd20;
  logic result_valid, dflag, bflag, dstart;
  pkt_class_t pclass;
  logic [DROP_NUM_W-1:0] dnum;

  int checks = 0, failures = 0;

  droplet_detector #(.CNT_W(CNT_W)) dut (
    .clk, .rst_n, .eval, .count, .thr_droplet(thr_d), .thr_background(thr_b),
    .result_valid, .pkt_class(pclass), .droplet_flag(dflag),
    .background_flag(bflag), .droplet_number(dnum), .droplet_start(dstart));

  always #2.5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int hist[$];          // classes of all packets so far: 0 bg, 1 unc, 2 drop
  bit ref_in_drop = 0;
  int ref_num = 0;

  function automatic int cls_of(int c);
    if (c > int'(thr_d)) return 2;
    if (c < int'(thr_b)) return 0;
    return 1;
  endfunction

  task automatic send(input int c, input int exp_d = -1, input int exp_b = -1);
    int k, n;
    bit exp_start;
    k = cls_of(c);
    hist.push_back(k);
    n = hist.size();
    exp_start = 0;
    if (!ref_in_drop) begin
      if (n >= 3 && hist[n-1] == 2 && hist[n-2] == 2 && hist[n-3] == 2) begin
        ref_in_drop = 1; ref_num++; exp_start = 1;
      end
    end else begin
      if (n >= 3 && hist[n-1] == 0 && hist[n-2] == 1 && hist[n-3] == 1)
        ref_in_drop = 0;
    end
    @(negedge clk); eval = 1; count = c[CNT_W-1:0];
    @(negedge clk); eval = 0;
    checks++;
    if (!result_valid || dflag !== ref_in_drop ||
        bflag !== (!ref_in_drop && k == 0) || int'(dnum) != (ref_num % 64) ||
        dstart !== exp_start || int'(pclass) != k) begin
      failures++;
      $display("FAIL packet %0d count=%0d: d=%0b b=%0b num=%0d start=%0b (ref d=%0b b=%0b num=%0d start=%0b)",
               n, c, dflag, bflag, dnum, dstart, ref_in_drop, (!ref_in_drop && k == 0), ref_num % 64, exp_start);
    end
    if (exp_d >= 0) begin
      checks++;
      if (dflag !== exp_d[0] || bflag !== exp_b[0]) begin
        failures++;
        $display("FAIL scripted packet %0d: d=%0b b=%0b expected d=%0d b=%0d", n, dflag, bflag, exp_d, exp_b);
      end
    end
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  int starts_seen = 0;
  always @(posedge clk) if (rst_n && dstart) starts_seen++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // background, with a false droplet packet (X1)
    send(5, 0, 1); send(8, 0, 1); send(150, 0, 0); send(6, 0, 1);
    // rising edge through unclassified packets, then the droplet
    send(40, 0, 0); send(70, 0, 0);
    send(120, 0, 0); send(130, 0, 0); send(140, 1, 0);
    send(160, 1, 0);
    // a dark packet inside the droplet (Y): ignored
    send(10, 1, 0); send(150, 1, 0); send(155, 1, 0);
    // one unclassified then dark: still droplet
    send(50, 1, 0); send(10, 1, 0);
    // falling edge: two unclassified packets then the first dark one (B)
    send(60, 1, 0); send(30, 1, 0); send(5, 0, 1);
    // background again, with an unclassified one and a false bright (X2)
    send(25, 0, 0); send(4, 0, 1); send(200, 0, 0); send(3, 0, 1);
    // two bright packets then a dip: no droplet
    send(200, 0, 0); send(200, 0, 0); send(50, 0, 0); send(200, 0, 0);
    checks++;
    if (dnum != 6'd1) begin failures++; $display("FAIL droplet number %0d after one droplet", dnum); end
    // random sequence: runs of bright and dark packets with noise
    for (int i = 0; i < 300; i++) begin
      int len;
      // a droplet-like burst (sometimes too short), then background
      len = $urandom_range(1, 12);
      for (int j = 0; j < len; j++)
        send($urandom_range(0, 9) == 0 ? $urandom_range(0, 99) : $urandom_range(101, 300));
      len = $urandom_range(0, 3);
      for (int j = 0; j < len; j++) send($urandom_range(20, 100));
      len = $urandom_range(1, 10);
      for (int j = 0; j < len; j++)
        send($urandom_range(0, 7) == 0 ? $urandom_range(20, 300) : $urandom_range(0, 19));
    end
    checks++;
    if (starts_seen != ref_num) begin
      failures++; $display("FAIL droplet_start pulses %0d, droplets %0d", starts_seen, ref_num);
    end
    $display("droplets detected: %0d", ref_num);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
