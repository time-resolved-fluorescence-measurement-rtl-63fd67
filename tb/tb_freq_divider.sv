`timescale 1ns / 1ps
// tb_freq_divider: checks the START and PACKET pulse periods and widths.
// Each divisor setting is held for a while; the testbench measures the
// number of clock cycles between successive pulses and checks it against
// the divisor (a divisor below 2 gives a period of 2), and that every pulse
// lasts exactly one cycle except at period 1, which cannot occur.
module tb_freq_divider;
  logic clk = 0, rst_n = 0;
  logic [31:0] start_div = 32'd4, packet_div = 32'd2000;
  logic start, packet;
  int checks = 0, failures = 0;

  freq_divider dut (.clk, .rst_n, .start_div, .packet_div, .start, .packet);

  always #2.5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int sd, input int pd, input int nstart, input int npacket);
    int last_s, last_p, cyc, ns, np, exp_s, exp_p;
    start_div = sd; packet_div = pd;
    exp_s = (sd < 2) ? 2 : sd;
    exp_p = (pd < 2) ? 2 : pd;
    // let the new divisors take effect
    repeat (exp_s + exp_p + 4) @(posedge clk);
    last_s = -1; last_p = -1; cyc = 0; ns = 0; np = 0;
    while (ns < nstart || np < npacket) begin
      @(posedge clk); #0.1;
      cyc++;
      if (start) begin
        if (last_s >= 0) begin
          checks++;
          if (cyc - last_s != exp_s) begin
            failures++; $display("FAIL START period %0d, expected %0d", cyc - last_s, exp_s);
          end
          ns++;
        end
        last_s = cyc;
      end
      if (packet) begin
        if (last_p >= 0) begin
          checks++;
          if (cyc - last_p != exp_p) begin
            failures++; $display("FAIL PACKET period %0d, expected %0d", cyc - last_p, exp_p);
          end
          np++;
        end
        last_p = cyc;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    measure(4, 2000, 50, 3);       // 50 MHz laser, 10 us packets
    measure(2, 37, 100, 20);       // 100 MHz laser (maximum)
    measure(0, 1, 20, 20);         // clamped divisors
    measure(16, 5, 30, 30);
    measure(3, 200, 30, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
