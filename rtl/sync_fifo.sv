// sync_fifo - single-clock FIFO, the memory-buffer node.
//
// Writes and reads use the same clock (as the document states). Storage is a
// register array of DEPTH words addressed by wrapping read and write pointers
// one bit wider than the address, so full and empty are told apart by the top
// pointer bit. A read when empty is ignored; a write when full is ignored
// unless a read happens in the same cycle, which frees the slot it needs. rd_data
// is registered: it shows the popped word the cycle after rd_en. The optional
// clock enable (en) lets the FIFO run at the configured data rate.
//
// Ports: clk, rst_n (active-low synchronous reset), en, wr_en, wr_data,
// rd_en, rd_data, full, empty, count. WIDTH = 8 follows the 8-bit data in the
// FIFO waveform; DEPTH = 16 is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign empty = (wr_ptr == rd_ptr);
  assign count = wr_ptr - rd_ptr;
  assign do_wr = en && wr_en && (!full || do_rd);
  assign do_rd = en && rd_en && !empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      rd_data <= '0;
    end else begin
      if (do_wr) begin
        mem[wr_ptr[AW-1:0]] <= wr_data;
        wr_ptr <= wr_ptr + 1'b1;
      end
      if (do_rd) begin
        rd_data <= mem[rd_ptr[AW-1:0]];
        rd_ptr  <= rd_ptr + 1'b1;
      end
    end
  end

  // pointers never drift apart by more than DEPTH
  assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= int'(DEPTH));
endmodule
