`timescale 1ns / 1ps
// tb_sync_fifo: random pushes and pops against a queue model, with phases
// that fill the FIFO to full and drain it to empty; checks data order, the
// full/empty flags and the occupancy count every cycle.
module tb_sync_fifo;
  localparam int W = 32, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, full_seen = 0, empty_seen = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .full,
                                         .rd_en, .rd_data, .empty, .count);

  always #2.5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pw, pr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      // phases: fill, drain, mixed
      case ((i / 500) % 3)
        0: begin pw = 80; pr = 20; end
        1: begin pw = 20; pr = 80; end
        default: begin pw = 50; pr = 50; end
      endcase
      @(negedge clk);
      checks++;
      if (full !== (q.size() == D) || empty !== (q.size() == 0) || int'(count) != q.size()) begin
        failures++; $display("FAIL flags: full=%0b empty=%0b count=%0d model=%0d", full, empty, count, q.size());
      end
      if (!empty) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("FAIL data %h expected %h", rd_data, q[0]); end
      end
      if (full) full_seen++;
      if (empty) empty_seen++;
      rd_en = !empty && ($urandom_range(0, 99) < pr);
      wr_en = (!full || rd_en) && ($urandom_range(0, 99) < pw);
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++;
    if (full_seen == 0 || empty_seen == 0) begin failures++; $display("FAIL never full or never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
