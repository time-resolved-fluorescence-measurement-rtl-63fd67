`timescale 1ns / 1ps
// tb_sorting_control: checks the actuator timing.
// A packet counter in the testbench advances every PKT cycles. Entries are
// offered at various times relative to their first packet: early enough
// (CONTROL must be high exactly during packets first+delay ..
// first+delay+width-1), with the action bit clear (no pulse, counted as
// passed) and too late (no pulse, counted as missed). The testbench
// records, packet by packet, whether CONTROL was high and compares with the
// expected set of packets.
module tb_sorting_control;
  import flt_pkg::*;
  localparam int PKT = 20;
  logic clk = 0, rst_n = 0;
  sort_entry_t entry;
  logic entry_valid = 0, entry_pop, control;
  logic [7:0] packet_number = '0, cfg_delay = 8'd6, cfg_width = 8'd2;
  logic packet_tick = 0;
  logic [5:0] active_droplet;
  logic [15:0] fired, passed, missed;
  int checks = 0, failures = 0;

  sorting_control dut (.clk, .rst_n, .entry, .entry_valid, .entry_pop,
    .packet_number, .packet_tick, .cfg_delay, .cfg_width, .control,
    .active_droplet, .fired, .passed, .missed);

  always #2.5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // packet clock
  int cyc = 0;
  int ctrl_cycles[int];        // absolute packet index -> cycles CONTROL high
  int abs_pkt = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    packet_tick <= (cyc % PKT == 0);
    if (cyc % PKT == 0) begin packet_number <= packet_number + 1'b1; abs_pkt <= abs_pkt + 1; end
    if (control) ctrl_cycles[abs_pkt] = ctrl_cycles.exists(abs_pkt) ? ctrl_cycles[abs_pkt] + 1 : 1;
  end

  bit expect_on[int];
  int exp_fired = 0, exp_passed = 0, exp_missed = 0;

  task automatic offer(input bit action, input int first_abs, input int dnum);
    entry = '{action: action, droplet_number: dnum[5:0], first_packet: first_abs[7:0]};
    @(negedge clk); entry_valid = 1;
    @(posedge clk); #0.1;
    while (!entry_pop) begin @(posedge clk); #0.1; end
    @(negedge clk); entry_valid = 0;
  endtask

  task automatic wait_packet(input int p);
    while (abs_pkt < p) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 60; d++) begin
      int first, kind;
      first = 10 + d * 12;
      kind = d % 5;
      cfg_width = (d % 3 == 0) ? 8'd1 : 8'd2;
      // offer the entry while the droplet travels (or too late)
      if (kind == 4) begin
        wait_packet(first + 7);           // after its firing packet
        offer(1, first, d);
        exp_missed++;
      end else begin
        wait_packet(first + 1 + (d % 4));
        offer(kind != 3, first, d);
        if (kind != 3) begin
          exp_fired++;
          for (int k = 0; k < int'(cfg_width); k++) expect_on[first + 6 + k] = 1;
        end else exp_passed++;
      end
      checks++;
      if (active_droplet != d[5:0]) begin failures++; $display("FAIL active droplet %0d", active_droplet); end
      wait_packet(first + 11);
    end
    wait_packet(abs_pkt + 3);
    // compare packet by packet
    for (int p = 0; p < abs_pkt; p++) begin
      bit on_exp, on_got;
      on_exp = expect_on.exists(p);
      on_got = ctrl_cycles.exists(p) && ctrl_cycles[p] > 2;
      checks++;
      if (on_exp != on_got) begin
        failures++; $display("FAIL packet %0d: CONTROL %0b expected %0b", p, on_got, on_exp);
      end
      // a firing packet is covered completely, except its first cycle or two
      if (on_exp && on_got && ctrl_cycles[p] < PKT - 2) begin
        failures++; $display("FAIL packet %0d: CONTROL high only %0d cycles", p, ctrl_cycles[p]);
      end
    end
    checks++;
    if (int'(fired) != exp_fired || int'(passed) != exp_passed || int'(missed) != exp_missed) begin
      failures++; $display("FAIL counters fired=%0d passed=%0d missed=%0d", fired, passed, missed);
    end
    $display("fired=%0d passed=%0d missed=%0d", fired, passed, missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
