`timescale 1ns / 1ps
// tb_tdc: checks hit detection, the fine code and the coarse counter of the
// TDC back end by driving the sampled delay line directly.
//
// Each cycle the testbench presents one sample of the line: idle (all zero),
// a fresh rising edge (a thermometer code with n ones from tap 0, sometimes
// with a bubble at its front), a line still high, or a falling edge (ones
// only at the far end). START pulses come at random intervals. The expected
// result for a sample presented in cycle k is checked in cycle k+1: a hit
// only for a fresh rising edge, fine = number of ones, coarse = cycles
// elapsed since the START cycle minus one, saturated at 255.
module tb_tdc;
  localparam int NTAPS = 255;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [NTAPS-1:0] taps = '0;
  logic hit;
  logic [7:0] coarse, fine;
  int checks = 0, failures = 0;
  int hits_seen = 0, saturated_seen = 0;

  tdc #(.NTAPS(NTAPS)) dut (.clk, .rst_n, .start, .taps, .hit, .coarse, .fine);

  always #2.5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, start_cyc, next_start, level, n;
    bit exp_hit;
    int exp_fine, exp_coarse;
    logic [NTAPS-1:0] t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0; start_cyc = -1000; next_start = 0; level = 0;
    exp_hit = 0; exp_fine = 0; exp_coarse = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      cyc++;
      // check the result of the previous cycle's sample
      if (exp_hit || hit) begin
        checks++;
        if (hit !== exp_hit || int'(fine) != exp_fine || int'(coarse) != exp_coarse) begin
          failures++;
          $display("FAIL cycle %0d: hit=%0b coarse=%0d fine=%0d, expected hit=%0b coarse=%0d fine=%0d",
                   cyc, hit, coarse, fine, exp_hit, exp_coarse, exp_fine);
        end
        if (hit) hits_seen++;
      end
      // new sample
      exp_hit = 0;
      if (level == 0) begin
        if ($urandom_range(0, 9) == 0 && start_cyc >= 0) begin
          n = $urandom_range(1, NTAPS);
          t = '0;
          for (int b = 0; b < n; b++) t[b] = 1'b1;
          if (n > 2 && n < NTAPS && $urandom_range(0, 3) == 0) begin
            t[n-1] = 1'b0; t[n] = 1'b1;     // bubble at the front of the edge
          end
          exp_hit = 1;
          exp_fine = $countones(t);
          exp_coarse = (cyc - start_cyc - 1 > 255) ? 255 : cyc - start_cyc - 1;
          if (exp_coarse == 255) saturated_seen++;
          level = 1;
        end else begin
          t = '0;
        end
      end else if (level == 1) begin
        if ($urandom_range(0, 1) == 0) t = '1;
        else begin
          n = $urandom_range(1, NTAPS - 1);
          t = '0;
          for (int b = n; b < NTAPS; b++) t[b] = 1'b1;
          level = 2;
        end
      end else begin
        t = '0;
        level = 0;
      end
      taps = t;
      // START pulses at random intervals, never in a cycle that presents
      // a photon sample
      start = 0;
      if (cyc >= next_start && level == 0) begin
        start = 1;
        start_cyc = cyc;
        next_start = cyc + (($urandom_range(0, 3) == 0) ? $urandom_range(260, 400) : $urandom_range(4, 60));
      end
      if (cyc - start_cyc < 1 && exp_hit) begin
        exp_hit = 0; taps = '0; level = 0;
      end
    end
    checks++;
    if (hits_seen < 100 || saturated_seen == 0) begin
      failures++; $display("FAIL coverage: hits=%0d saturated=%0d", hits_seen, saturated_seen);
    end
    $display("hits=%0d saturated-coarse hits=%0d", hits_seen, saturated_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
