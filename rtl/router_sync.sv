// router_sync: FIFO synchronization between the router controller and the
// output FIFOs.
//
// While the controller decodes a header (detect_add high) the channel address
// on the low bits of the input byte is registered every cycle, so the value
// held after the header edge is the packet's destination.  That address
// steers the controller's single write enable (write_enb_reg) to one of the
// NUM_CH FIFOs, and selects which FIFO's full and empty flags go back to the
// controller.  During decode the empty flag is taken from the address on the
// input directly, so the controller can decide in the header cycle whether
// the destination FIFO is free.  vld_out[i] tells the receiver of channel i
// that its FIFO holds data.
//
// The port list follows the router's synchronizer block (data, detect add,
// full and empty of each FIFO, write enable register in; FIFO full, write
// enable, FIFO empty and one valid per channel out).  The combinational
// steering and the registered address are this design's choice.
module router_sync
  import router_pkg::*;
#(
  parameter int unsigned N_CH = NUM_CH
) (
  input  logic                     clk,
  input  logic                     resetn,
  input  logic [$clog2(N_CH)-1:0]  data,          // address bits of the input byte
  input  logic                     detect_add,
  input  logic [N_CH-1:0]          full,
  input  logic [N_CH-1:0]          empty,
  input  logic                     write_enb_reg,
  output logic                     fifo_full,
  output logic                     fifo_empty,
  output logic [N_CH-1:0]          write_enb,
  output logic [N_CH-1:0]          vld_out
);

  localparam int unsigned AW = $clog2(N_CH);

  logic [AW-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (!resetn)         addr_q <= '0;
    else if (detect_add) addr_q <= data;
  end

  always_comb begin
    write_enb = '0;
    if (write_enb_reg) write_enb[addr_q] = 1'b1;
    fifo_full  = full[addr_q];
    fifo_empty = detect_add ? empty[data] : empty[addr_q];
    vld_out    = ~empty;
  end

endmodule
