// router_fifo: one output channel buffer of the packet router.
//
// A synchronous FIFO of DEPTH words of WIDTH bits.  A word is written on the
// rising clock edge when write_enb is high and the FIFO is not full; a word is
// read when read_enb is high and the FIFO is not empty, and appears on
// data_out after that edge (registered read).  A write and a read in the same
// cycle are both done.  The occupancy is kept in a counter one bit wider than
// the pointers, so full and empty are exact.
//
// Reset (resetn low, synchronous) empties the FIFO: full = 0, empty = 1 and
// data_out = 0, as the router's FIFO description requires.  The depth of 16
// words is this design's own choice; the FIFO interface (clock, resetn, write
// enable, read enable, data in, full, empty, data out) follows the router's
// FIFO block.
module router_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             resetn,
  input  logic             write_enb,
  input  logic             read_enb,
  input  logic [WIDTH-1:0] data_in,
  output logic             full,
  output logic             empty,
  output logic [WIDTH-1:0] data_out
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;
  logic             do_wr, do_rd;

  assign full  = (count == (PTR_W+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = write_enb && !full;
  assign do_rd = read_enb && !empty;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!resetn) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      data_out <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) begin
        rd_ptr   <= next_ptr(rd_ptr);
        data_out <= mem[rd_ptr];
      end
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage has no reset: a word is only read after it has been written.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= data_in;
  end

endmodule
