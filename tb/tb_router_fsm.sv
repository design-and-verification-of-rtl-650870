// tb_router_fsm: self-checking testbench of router_fsm.
//
// The state is recovered from the outputs alone (each state has its own strobe
// or busy/write_enb_reg pattern), after checking that write_enb_reg and busy
// have the values the state calls for. Directed sequences walk every
// transition: a plain packet, WAIT_TILL_EMPTY, a full FIFO during the payload,
// LOAD_AFTER_FULL to each of its three successors, a parity write refused by a
// full FIFO, time-out of the written port and of another port, and a header for
// the nonexistent port 3.
module tb_router_fsm;
  import router_pkg::*;

  logic clock = 1'b0;
  logic resetn, pkt_valid, fifo_full;
  port_t data_in;
  logic fifo_empty_0, fifo_empty_1, fifo_empty_2;
  logic soft_reset_0, soft_reset_1, soft_reset_2;
  logic parity_done, low_pkt_valid;
  logic write_enb_reg, detect_add, ld_state, laf_state, lfd_state, full_state, rst_int_reg, busy;

  router_fsm dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic state_e observed();
    if (detect_add)  return DECODE_ADDRESS;
    if (lfd_state)   return LOAD_FIRST_DATA;
    if (ld_state)    return LOAD_DATA;
    if (laf_state)   return LOAD_AFTER_FULL;
    if (full_state)  return FIFO_FULL_STATE;
    if (rst_int_reg) return CHECK_PARITY_ERROR;
    if (write_enb_reg) return LOAD_PARITY;
    return WAIT_TILL_EMPTY;
  endfunction

  // one clock: expect state `exp` in the next cycle
  task automatic expect_next(state_e exp);
    state_e s;
    @(negedge clock);
    s = observed();
    check(s == exp, $sformatf("state %s expected %s", s.name(), exp.name()));
    check($countones({detect_add, lfd_state, ld_state, laf_state, full_state, rst_int_reg}) <= 1,
          "more than one state strobe");
    check(write_enb_reg == (s inside {LOAD_DATA, LOAD_PARITY, LOAD_AFTER_FULL}), "write_enb_reg");
    check(busy == !(s inside {DECODE_ADDRESS, LOAD_DATA}), $sformatf("busy in %s", s.name()));
  endtask

  initial begin
    resetn = 1'b0; pkt_valid = 1'b0; fifo_full = 1'b0; data_in = '0;
    {fifo_empty_2, fifo_empty_1, fifo_empty_0} = 3'b111;
    {soft_reset_2, soft_reset_1, soft_reset_0} = 3'b000;
    parity_done = 1'b0; low_pkt_valid = 1'b0;
    repeat (2) @(negedge clock);
    resetn = 1'b1;
    expect_next(DECODE_ADDRESS);

    // 1. plain packet to port 1
    pkt_valid = 1'b1; data_in = 2'd1;
    expect_next(LOAD_FIRST_DATA);
    data_in = 2'd2;                     // payload bits must not matter
    expect_next(LOAD_DATA);
    expect_next(LOAD_DATA);
    pkt_valid = 1'b0;
    expect_next(LOAD_PARITY);
    parity_done = 1'b1; low_pkt_valid = 1'b1;
    expect_next(CHECK_PARITY_ERROR);
    expect_next(DECODE_ADDRESS);
    parity_done = 1'b0; low_pkt_valid = 1'b0;
    expect_next(DECODE_ADDRESS);

    // 2. port 2 not empty: wait, then load
    fifo_empty_2 = 1'b0; pkt_valid = 1'b1; data_in = 2'd2;
    expect_next(WAIT_TILL_EMPTY);
    data_in = 2'd0;                     // the latched port decides, not data_in
    expect_next(WAIT_TILL_EMPTY);
    expect_next(WAIT_TILL_EMPTY);
    fifo_empty_2 = 1'b1;
    expect_next(LOAD_FIRST_DATA);
    expect_next(LOAD_DATA);

    // 3. full during payload, LOAD_AFTER_FULL back to LOAD_DATA
    fifo_full = 1'b1;
    expect_next(FIFO_FULL_STATE);
    expect_next(FIFO_FULL_STATE);
    fifo_full = 1'b0;
    expect_next(LOAD_AFTER_FULL);
    expect_next(LOAD_DATA);

    // 4. full with parity on the bus, LOAD_AFTER_FULL to LOAD_PARITY, parity refused
    pkt_valid = 1'b0; fifo_full = 1'b1;
    expect_next(FIFO_FULL_STATE);
    low_pkt_valid = 1'b1; fifo_full = 1'b0;
    expect_next(LOAD_AFTER_FULL);
    fifo_full = 1'b1;
    expect_next(LOAD_PARITY);
    parity_done = 1'b1;
    expect_next(CHECK_PARITY_ERROR);
    expect_next(FIFO_FULL_STATE);       // parity write was refused
    fifo_full = 1'b0;
    expect_next(LOAD_AFTER_FULL);
    expect_next(DECODE_ADDRESS);        // parity_done: packet complete
    parity_done = 1'b0; low_pkt_valid = 1'b0;

    // 5. parity accepted although the FIFO fills during CHECK_PARITY_ERROR
    pkt_valid = 1'b1; data_in = 2'd0;
    expect_next(LOAD_FIRST_DATA);
    expect_next(LOAD_DATA);
    pkt_valid = 1'b0;
    expect_next(LOAD_PARITY);
    fifo_full = 1'b1;                   // refused in LOAD_PARITY...
    expect_next(CHECK_PARITY_ERROR);
    fifo_full = 1'b0;                   // ...room again: still retried
    expect_next(FIFO_FULL_STATE);
    expect_next(LOAD_AFTER_FULL);
    parity_done = 1'b1;
    expect_next(DECODE_ADDRESS);
    parity_done = 1'b0;
    pkt_valid = 1'b1; data_in = 2'd1;
    expect_next(LOAD_FIRST_DATA);
    expect_next(LOAD_DATA);
    pkt_valid = 1'b0;
    expect_next(LOAD_PARITY);
    expect_next(CHECK_PARITY_ERROR);
    fifo_full = 1'b1;                   // full only after the accepted write
    expect_next(DECODE_ADDRESS);
    fifo_full = 1'b0;

    // 6. time-out: another port's has no effect, the written port's aborts
    pkt_valid = 1'b1; data_in = 2'd0;
    expect_next(LOAD_FIRST_DATA);
    expect_next(LOAD_DATA);
    soft_reset_1 = 1'b1;
    expect_next(LOAD_DATA);
    soft_reset_1 = 1'b0; fifo_full = 1'b1;
    expect_next(FIFO_FULL_STATE);
    soft_reset_0 = 1'b1;
    pkt_valid = 1'b0;
    expect_next(DECODE_ADDRESS);
    soft_reset_0 = 1'b0; fifo_full = 1'b0;

    // 7. time-out while waiting for the FIFO keeps the packet
    fifo_empty_1 = 1'b0; pkt_valid = 1'b1; data_in = 2'd1;
    expect_next(WAIT_TILL_EMPTY);
    soft_reset_1 = 1'b1; pkt_valid = 1'b1;
    expect_next(WAIT_TILL_EMPTY);
    soft_reset_1 = 1'b0; fifo_empty_1 = 1'b1;
    expect_next(LOAD_FIRST_DATA);
    pkt_valid = 1'b0;
    expect_next(LOAD_DATA);
    expect_next(LOAD_PARITY);
    expect_next(CHECK_PARITY_ERROR);
    expect_next(DECODE_ADDRESS);

    // 8. port 3 is ignored
    pkt_valid = 1'b1; data_in = 2'd3;
    expect_next(DECODE_ADDRESS);
    expect_next(DECODE_ADDRESS);
    pkt_valid = 1'b0;
    expect_next(DECODE_ADDRESS);

    // 9. synchronous reset from the middle of a packet
    pkt_valid = 1'b1; data_in = 2'd2;
    expect_next(LOAD_FIRST_DATA);
    resetn = 1'b0;
    expect_next(DECODE_ADDRESS);
    resetn = 1'b1; pkt_valid = 1'b0;
    expect_next(DECODE_ADDRESS);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
