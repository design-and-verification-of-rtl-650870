// router_fsm: controller of the 1x3 router.
//
// Eight states move one packet from the input bus into the FIFO of its port:
//   DECODE_ADDRESS     idle; detect_add = 1. A header (pkt_valid = 1) for port
//                      0..2 goes to LOAD_FIRST_DATA if that FIFO is empty, else to
//                      WAIT_TILL_EMPTY. The header byte is taken in this cycle.
//   WAIT_TILL_EMPTY    busy; waits until the FIFO of the latched port is empty.
//   LOAD_FIRST_DATA    busy, lfd_state; the header moves to the register output.
//                      Always continues to LOAD_DATA.
//   LOAD_DATA          ld_state, write_enb_reg, not busy: one byte per cycle. Goes
//                      to FIFO_FULL_STATE when the FIFO is full, else to
//                      LOAD_PARITY once pkt_valid has fallen (parity on data_in).
//   LOAD_PARITY        busy, write_enb_reg: writes the parity byte.
//                      Always continues to CHECK_PARITY_ERROR.
//   CHECK_PARITY_ERROR busy, rst_int_reg. Back to DECODE_ADDRESS, or to
//                      FIFO_FULL_STATE when the parity write was refused because
//                      the FIFO was full.
//   FIFO_FULL_STATE    busy, full_state, no write; waits for room.
//   LOAD_AFTER_FULL    busy, laf_state, write_enb_reg: writes the byte that was
//                      refused. Then DECODE_ADDRESS if parity_done, LOAD_PARITY if
//                      low_pkt_valid, else LOAD_DATA.
// A soft_reset (read time-out) of the FIFO being written returns the FSM to
// DECODE_ADDRESS from any state that is writing a packet.
//
// The states, their outputs and most transitions follow the router's
// description. This design's own choices: WAIT_TILL_EMPTY is entered and left
// as above (the description gives only its outputs); the port is latched with
// the header so that WAIT_TILL_EMPTY does not depend on data_in; CHECK_PARITY_
// ERROR tests whether the parity write was refused in LOAD_PARITY (a registered
// copy of fifo_full) rather than the current fifo_full, so a read in
// LOAD_PARITY cannot lose the parity byte; port 3 headers are ignored.
// Outputs are decoded from the state register (Moore); reset is synchronous,
// active low, to DECODE_ADDRESS.
module router_fsm
  import router_pkg::*;
(
  input  logic  clock,
  input  logic  resetn,
  input  logic  pkt_valid,
  input  port_t data_in,
  input  logic  fifo_full,
  input  logic  fifo_empty_0,
  input  logic  fifo_empty_1,
  input  logic  fifo_empty_2,
  input  logic  soft_reset_0,
  input  logic  soft_reset_1,
  input  logic  soft_reset_2,
  input  logic  parity_done,
  input  logic  low_pkt_valid,
  output logic  write_enb_reg,
  output logic  detect_add,
  output logic  ld_state,
  output logic  laf_state,
  output logic  lfd_state,
  output logic  full_state,
  output logic  rst_int_reg,
  output logic  busy
);

  state_e     state, next;
  port_t      port;            // destination of the packet being handled
  logic       parity_refused;  // LOAD_PARITY's write met a full FIFO
  logic [3:0] empty_v, tmo_v;

  assign empty_v = {1'b0, fifo_empty_2, fifo_empty_1, fifo_empty_0};
  assign tmo_v   = {1'b0, soft_reset_2, soft_reset_1, soft_reset_0};

  always_comb begin
    next = state;
    unique case (state)
      DECODE_ADDRESS:
        if (pkt_valid && data_in != 2'd3)
          next = empty_v[data_in] ? LOAD_FIRST_DATA : WAIT_TILL_EMPTY;
      WAIT_TILL_EMPTY:
        if (empty_v[port]) next = LOAD_FIRST_DATA;
      LOAD_FIRST_DATA:
        next = LOAD_DATA;
      LOAD_DATA:
        if (fifo_full)       next = FIFO_FULL_STATE;
        else if (!pkt_valid) next = LOAD_PARITY;
      LOAD_PARITY:
        next = CHECK_PARITY_ERROR;
      CHECK_PARITY_ERROR:
        next = parity_refused ? FIFO_FULL_STATE : DECODE_ADDRESS;
      FIFO_FULL_STATE:
        if (!fifo_full) next = LOAD_AFTER_FULL;
      LOAD_AFTER_FULL:
        if (parity_done)        next = DECODE_ADDRESS;
        else if (low_pkt_valid) next = LOAD_PARITY;
        else                    next = LOAD_DATA;
      default:
        next = DECODE_ADDRESS;
    endcase
    if (state != DECODE_ADDRESS && state != WAIT_TILL_EMPTY && tmo_v[port])
      next = DECODE_ADDRESS;
  end

  always_ff @(posedge clock) begin
    if (!resetn) begin
      state          <= DECODE_ADDRESS;
      port           <= '0;
      parity_refused <= 1'b0;
    end else begin
      state          <= next;
      parity_refused <= (state == LOAD_PARITY) && fifo_full;
      if (state == DECODE_ADDRESS && pkt_valid) port <= data_in;
    end
  end

  assign detect_add    = (state == DECODE_ADDRESS);
  assign lfd_state     = (state == LOAD_FIRST_DATA);
  assign ld_state      = (state == LOAD_DATA);
  assign laf_state     = (state == LOAD_AFTER_FULL);
  assign full_state    = (state == FIFO_FULL_STATE);
  assign rst_int_reg   = (state == CHECK_PARITY_ERROR);
  assign write_enb_reg = (state == LOAD_DATA) || (state == LOAD_PARITY) || (state == LOAD_AFTER_FULL);
  assign busy          = !((state == DECODE_ADDRESS) || (state == LOAD_DATA));

  // A packet is only ever written while its FIFO exists.
  a_port_valid: assert property (@(posedge clock) disable iff (!resetn)
    state != DECODE_ADDRESS |-> port != 2'd3);

endmodule
