// router_reg: byte path and parity check of the 1x3 router.
//
// Four registers sit between the input bus and the FIFOs:
//   header_byte     the header, taken when detect_add and pkt_valid are high;
//   full_state_byte the input byte taken in LOAD_DATA while the FIFO is full;
//   internal_parity running XOR of the header and every payload byte;
//   packet_parity   the parity byte sent by the source.
// dout is the byte the FSM writes into the selected FIFO. It is loaded with the
// header in LOAD_FIRST_DATA, with data_in in LOAD_DATA when the FIFO has room,
// and with full_state_byte in LOAD_AFTER_FULL, so every byte reaches the FIFO
// one cycle after it was on data_in (or, after a full FIFO, once there is room).
//
// low_pkt_valid is set in LOAD_DATA when pkt_valid is low (the byte on data_in is
// then the parity) and cleared by rst_int_reg. parity_done is set when the parity
// byte is loaded into dout: in LOAD_DATA with pkt_valid and fifo_full low, or in
// LOAD_AFTER_FULL when low_pkt_valid is high and parity_done still low; it is
// cleared by detect_add. err is evaluated in CHECK_PARITY_ERROR (rst_int_reg) once
// parity_done is high, is 1 when the two parities differ, and holds until the
// next packet reaches LOAD_FIRST_DATA.
//
// These rules follow the router's description. Clearing low_pkt_valid also on
// detect_add (so a packet cut short by a read time-out leaves no trace) and the
// moment err is evaluated and cleared are this design's choices. All registers
// update on the rising edge; resetn is synchronous and active low.
module router_reg
  import router_pkg::*;
(
  input  logic  clock,
  input  logic  resetn,
  input  logic  pkt_valid,
  input  byte_t data_in,
  input  logic  fifo_full,
  input  logic  detect_add,
  input  logic  ld_state,
  input  logic  laf_state,
  input  logic  full_state,
  input  logic  lfd_state,
  input  logic  rst_int_reg,
  output byte_t dout,
  output logic  err,
  output logic  parity_done,
  output logic  low_pkt_valid
);

  byte_t header_byte, full_state_byte, internal_parity, packet_parity;

  always_ff @(posedge clock) begin
    if (!resetn) begin
      dout            <= '0;
      err             <= 1'b0;
      parity_done     <= 1'b0;
      low_pkt_valid   <= 1'b0;
      header_byte     <= '0;
      full_state_byte <= '0;
      internal_parity <= '0;
      packet_parity   <= '0;
    end else begin
      // header and the byte path into the FIFO
      if (detect_add && pkt_valid) header_byte <= data_in;

      if (lfd_state)                   dout <= header_byte;
      else if (ld_state && !fifo_full) dout <= data_in;
      else if (laf_state)              dout <= full_state_byte;

      if (ld_state && fifo_full) full_state_byte <= data_in;

      // end of packet
      if (rst_int_reg || detect_add)  low_pkt_valid <= 1'b0;
      else if (ld_state && !pkt_valid) low_pkt_valid <= 1'b1;

      if (detect_add)
        parity_done <= 1'b0;
      else if ((ld_state && !fifo_full && !pkt_valid) ||
               (laf_state && low_pkt_valid && !parity_done))
        parity_done <= 1'b1;

      // parity
      if (detect_add)                  packet_parity <= '0;
      else if (ld_state && !pkt_valid) packet_parity <= data_in;

      if (detect_add)
        internal_parity <= '0;
      else if (lfd_state)
        internal_parity <= internal_parity ^ header_byte;
      else if (ld_state && pkt_valid && !full_state)
        internal_parity <= internal_parity ^ data_in;

      if (lfd_state)                       err <= 1'b0;
      else if (rst_int_reg && parity_done) err <= (internal_parity != packet_parity);
    end
  end

endmodule
