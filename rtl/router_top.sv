// router_top: 1x3 packet router.
//
// One source sends packets (header, 1..63 payload bytes, parity) on data_in,
// framed by pkt_valid; the router forwards each packet to one of three client
// ports named by the header's port field, where it waits in a 16-entry FIFO
// until the client reads it.
//
// Source side: pkt_valid rises with the header byte and falls with the parity
// byte (pkt_valid is low while the parity is on data_in). A byte on data_in is
// taken at every rising edge at which busy is low, so the source must hold its
// byte while busy is high. busy rises the cycle after a header is taken. error
// goes high after a packet whose parity byte is not the XOR of its header and
// payload; it stays until the next packet starts.
// Client side: vld_out_x is high while FIFO x holds data. The client raises
// read_enb_x; each byte appears on data_out_x the cycle after the read_enb_x that
// fetched it, header first. data_out_x is 0 when no packet is being read. If
// read_enb_x stays low for 30 cycles while vld_out_x is high, FIFO x is
// emptied (read time-out) and a packet still being written to it is abandoned.
//
// The structure (FSM, register, synchronizer, three FIFOs) and the ports follow
// the router's description; each block's header comment says where it departs.
// All logic is on the rising edge of clock; resetn is synchronous, active low.
module router_top
  import router_pkg::*;
(
  input  logic  clock,
  input  logic  resetn,
  input  logic  pkt_valid,
  input  byte_t data_in,
  input  logic  read_enb_0,
  input  logic  read_enb_1,
  input  logic  read_enb_2,
  output byte_t data_out_0,
  output byte_t data_out_1,
  output byte_t data_out_2,
  output logic  vld_out_0,
  output logic  vld_out_1,
  output logic  vld_out_2,
  output logic  busy,
  output logic  error
);

  logic       detect_add, lfd_state, ld_state, laf_state, full_state, rst_int_reg;
  logic       write_enb_reg, fifo_full, parity_done, low_pkt_valid;
  logic [NUM_PORTS-1:0] write_enb, empty, full, soft_reset;
  byte_t      dout;

  router_fsm u_fsm (
    .clock, .resetn, .pkt_valid,
    .data_in       (data_in[ADDR_W-1:0]),
    .fifo_full,
    .fifo_empty_0  (empty[0]),
    .fifo_empty_1  (empty[1]),
    .fifo_empty_2  (empty[2]),
    .soft_reset_0  (soft_reset[0]),
    .soft_reset_1  (soft_reset[1]),
    .soft_reset_2  (soft_reset[2]),
    .parity_done, .low_pkt_valid,
    .write_enb_reg, .detect_add, .ld_state, .laf_state, .lfd_state,
    .full_state, .rst_int_reg, .busy
  );

  router_reg u_reg (
    .clock, .resetn, .pkt_valid, .data_in, .fifo_full,
    .detect_add, .ld_state, .laf_state, .full_state, .lfd_state, .rst_int_reg,
    .dout,
    .err           (error),
    .parity_done, .low_pkt_valid
  );

  router_sync u_sync (
    .clock, .resetn, .detect_add,
    .data_in       (data_in[ADDR_W-1:0]),
    .write_enb_reg,
    .read_enb_0, .read_enb_1, .read_enb_2,
    .empty_0       (empty[0]),
    .empty_1       (empty[1]),
    .empty_2       (empty[2]),
    .full_0        (full[0]),
    .full_1        (full[1]),
    .full_2        (full[2]),
    .write_enb, .fifo_full,
    .vld_out_0, .vld_out_1, .vld_out_2,
    .soft_reset_0  (soft_reset[0]),
    .soft_reset_1  (soft_reset[1]),
    .soft_reset_2  (soft_reset[2])
  );

  router_fifo u_fifo_0 (
    .clock, .resetn, .soft_reset(soft_reset[0]), .write_enb(write_enb[0]),
    .read_enb(read_enb_0), .lfd_state, .data_in(dout), .data_out(data_out_0),
    .full(full[0]), .empty(empty[0])
  );

  router_fifo u_fifo_1 (
    .clock, .resetn, .soft_reset(soft_reset[1]), .write_enb(write_enb[1]),
    .read_enb(read_enb_1), .lfd_state, .data_in(dout), .data_out(data_out_1),
    .full(full[1]), .empty(empty[1])
  );

  router_fifo u_fifo_2 (
    .clock, .resetn, .soft_reset(soft_reset[2]), .write_enb(write_enb[2]),
    .read_enb(read_enb_2), .lfd_state, .data_in(dout), .data_out(data_out_2),
    .full(full[2]), .empty(empty[2])
  );

  // Source rule: a byte offered while the router is busy is held for the next cycle.
  a_source_holds: assert property (@(posedge clock) disable iff (!resetn)
    busy && pkt_valid |=> $stable(data_in));

endmodule
