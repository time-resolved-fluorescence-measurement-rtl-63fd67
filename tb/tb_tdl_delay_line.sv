`timescale 1ns / 1ps
// tb_tdl_delay_line: checks the behavioural delay-line model.
// A STOP rising edge is placed a known number of picoseconds (19*m + 7)
// before a rising clock edge; the sample taken at that edge must be a clean
// thermometer code with m+1 ones (capped at the line length), the next
// sample all ones while STOP is high, and after STOP falls the line must
// empty from tap 0 upward.
module tb_tdl_delay_line;
  localparam int NTAPS = 255;
  logic clk = 0, stop = 0;
  logic [NTAPS-1:0] taps;
  int checks = 0, failures = 0;

  tdl_delay_line #(.NTAPS(NTAPS), .TAP_PS(19)) dut (.clk, .stop, .taps);

  always #2.5 clk = ~clk;     // rising edges at 2.5 + 5k ns

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_thermo(logic [NTAPS-1:0] v, int n);
    for (int i = 0; i < NTAPS; i++)
      if (v[i] !== (i < n)) return 0;
    return 1;
  endfunction

  initial begin
    int m, expn;
    repeat (4) @(posedge clk);
    for (int trial = 0; trial < 300; trial++) begin
      m = (trial < 20) ? trial : $urandom_range(0, 262);
      // wait for a rising edge, then place STOP (19m+7) ps before the next
      @(posedge clk);
      #(5.0 - (19.0 * m + 7.0) / 1000.0);
      stop = 1;
      @(posedge clk); #0.1;
      expn = (m + 1 > NTAPS) ? NTAPS : m + 1;
      checks++;
      if (!is_thermo(taps, expn)) begin
        failures++;
        $display("FAIL m=%0d: %0d ones, expected thermometer of %0d", m, $countones(taps), expn);
      end
      @(posedge clk); #0.1;
      checks++;
      if (taps !== '1) begin failures++; $display("FAIL line not full while STOP high"); end
      // fall 1 ns before the next edge: taps below ~52 are low, above high
      #(5.0 - 0.1 - 1.0);
      stop = 0;
      @(posedge clk); #0.1;
      checks++;
      if (taps[0] !== 1'b0 || taps[NTAPS-1] !== 1'b1 || $countones(taps) != NTAPS - 53) begin
        failures++; $display("FAIL falling edge: %0d ones", $countones(taps));
      end
      repeat (3) @(posedge clk);
      #0.1;
      checks++;
      if (taps !== '0) begin failures++; $display("FAIL line not empty"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
