// router_reg: the packet datapath of the router.
//
// Holds the bytes the controller cannot write at once and checks parity:
//   header_q    the header byte, taken in DECODE_ADDRESS and written in
//               LOAD_FIRST_DATA;
//   hold_q      a payload byte taken in LOAD_DATA while the FIFO was full,
//               written in LOAD_AFTER_FULL;
//   pkt_parity  the parity byte (the byte taken in LOAD_DATA with
//               packet_valid low); taking it sets low_pkt_valid;
//   int_parity  XOR of the header and every payload byte taken.
// dout is the byte offered to the FIFOs, chosen by the controller state.
// parity_done goes high once the parity byte has been written.  In
// CHECK_PARITY_ERROR (rst_int_reg high) err is loaded with the result of the
// comparison and low_pkt_valid and parity_done are cleared.  err stays valid
// until the next header is taken.
//
// The controller-side signal names (parity done, low packet valid, reset
// internal register) and the error output follow the router; how this block
// is built is this design's own choice.  Reset is synchronous, active low.
module router_reg
  import router_pkg::*;
(
  input  logic              clk,
  input  logic              resetn,
  input  logic              pkt_valid,
  input  logic [DATA_W-1:0] data_in,
  input  logic              fifo_full,
  input  logic              detect_add,
  input  logic              lfd_state,
  input  logic              ld_state,
  input  logic              laf_state,
  input  logic              lp_state,
  input  logic              rst_int_reg,
  output logic              parity_done,
  output logic              low_pkt_valid,
  output logic              err,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] header_q, hold_q, pkt_parity, int_parity;
  logic              take_header, take_payload, take_parity, parity_written;

  assign take_header    = detect_add && pkt_valid;
  assign take_payload   = ld_state && pkt_valid;
  assign take_parity    = ld_state && !pkt_valid;
  assign parity_written = (lp_state && !fifo_full) || (laf_state && low_pkt_valid);

  always_ff @(posedge clk) begin
    if (!resetn) begin
      header_q      <= '0;
      hold_q        <= '0;
      pkt_parity    <= '0;
      int_parity    <= '0;
      low_pkt_valid <= 1'b0;
      parity_done   <= 1'b0;
      err           <= 1'b0;
    end else begin
      if (take_header) begin
        header_q   <= data_in;
        int_parity <= data_in;
        err        <= 1'b0;
      end
      if (take_payload) begin
        int_parity <= int_parity ^ data_in;
        if (fifo_full) hold_q <= data_in;
      end
      if (take_parity) begin
        pkt_parity    <= data_in;
        low_pkt_valid <= 1'b1;
      end
      if (parity_written) parity_done <= 1'b1;
      if (rst_int_reg) begin
        err           <= (int_parity != pkt_parity);
        low_pkt_valid <= 1'b0;
        parity_done   <= 1'b0;
      end
    end
  end

  always_comb begin
    dout = data_in;                                   // LOAD_DATA: straight through
    if (lfd_state)      dout = header_q;
    else if (lp_state)  dout = pkt_parity;
    else if (laf_state) dout = low_pkt_valid ? pkt_parity : hold_q;
  end

endmodule
