`timescale 1ns / 1ps
// sync_fifo: single-clock first-in first-out buffer with show-ahead read.
//
// Used twice in the design: as the 32-bit data FIFO between the word writer
// and the DMA engine that copies the word stream into processor memory, and
// as the FIFO through which the processor hands the sorting information of
// each measured droplet back to the sorting control. The buffer is a
// DEPTH-entry array with binary read and write pointers and an occupancy
// counter. The head entry is visible on rd_data whenever empty is low
// (first-word fall-through), so the read side behaves like a valid/ready
// stream: valid = !empty, ready = rd_en. The published design only names
// the FIFOs and the 32-bit width of the data FIFO; depth, single clock and
// show-ahead reading are this design's choices.
//
// Interface: wr_en/wr_data/full, rd_en/rd_data/empty, count (entries held).
// A write while full and a read while empty are ignored (and flagged by
// assertions). Simultaneous read and write are allowed, also when full.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full    = (32'(count) == DEPTH);
  assign empty   = (count == '0);
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (!full || rd_en))
    else $error("sync_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> !empty)
    else $error("sync_fifo: read while empty");

endmodule
