// tb_router_reg: self-checking testbench of router_reg.
//
// Part 1 drives the state strobes cycle by cycle, as the controller would, for
// two packets (one plain, one meeting a full FIFO during the payload and again
// on the parity byte, with a wrong parity) and checks dout, parity_done,
// low_pkt_valid and err after every edge against values written out by hand.
// Part 2 runs 300 random packets: a small behavioural controller in the
// testbench drives the strobes, fifo_full is random, and the bytes that would
// enter the FIFO (dout whenever a write is asked for and the FIFO has room)
// must be exactly header, payload and parity in order; err must equal
// "parity byte != XOR of header and payload".
module tb_router_reg;
  import router_pkg::*;

  logic clock = 1'b0;
  logic resetn, pkt_valid, fifo_full;
  byte_t data_in, dout;
  logic detect_add, ld_state, laf_state, full_state, lfd_state, rst_int_reg;
  logic err, parity_done, low_pkt_valid;

  router_reg dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_err = 0, n_full = 0, n_laf_parity = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  state_e st;
  always_comb begin
    detect_add  = (st == DECODE_ADDRESS);
    lfd_state   = (st == LOAD_FIRST_DATA);
    ld_state    = (st == LOAD_DATA);
    laf_state   = (st == LOAD_AFTER_FULL);
    full_state  = (st == FIFO_FULL_STATE);
    rst_int_reg = (st == CHECK_PARITY_ERROR);
  end

  // one cycle of part 1: present inputs, then check outputs after the edge
  task automatic cyc(state_e s, bit pv, byte_t d, bit full, byte_t exp_dout,
                     bit exp_pd, bit exp_low, bit exp_err);
    st = s; pkt_valid = pv; data_in = d; fifo_full = full;
    @(negedge clock);
    check(dout == exp_dout, $sformatf("%s: dout %h expected %h", s.name(), dout, exp_dout));
    check(parity_done == exp_pd, $sformatf("%s: parity_done %b", s.name(), parity_done));
    check(low_pkt_valid == exp_low, $sformatf("%s: low_pkt_valid %b", s.name(), low_pkt_valid));
    check(err == exp_err, $sformatf("%s: err %b", s.name(), err));
  endtask

  // ------------------------------------------------------------------ part 2
  state_e tst;                 // testbench controller state
  logic   refused;
  byte_t  sent[$], got[$];
  logic   bad_sent;

  function automatic logic tb_busy(state_e s);
    return !(s inside {DECODE_ADDRESS, LOAD_DATA});
  endfunction

  task automatic run_packet(int len, bit bad, int full_pct);
    byte_t pkt[$];
    byte_t x;
    int    i;
    pkt.push_back({6'(len), 2'($urandom_range(0, 2))});
    for (int k = 0; k < len; k++) pkt.push_back(8'($urandom));
    x = '0;
    foreach (pkt[k]) x ^= pkt[k];
    pkt.push_back(bad ? ~x : x);
    sent = pkt;
    got.delete();
    i = 0;
    tst = DECODE_ADDRESS;
    refused = 1'b0;
    forever begin
      // everything is decided on the falling edge, for the rising edge that follows
      // source: present byte i; it is taken at the next edge when not busy
      pkt_valid = (i < pkt.size() - 1);
      data_in   = (i < pkt.size()) ? pkt[i] : 8'($urandom);
      // a FIFO that had room last cycle and took no write since cannot be full
      // in LOAD_AFTER_FULL, so back-pressure is only applied elsewhere
      fifo_full = (tst inside {DECODE_ADDRESS, LOAD_AFTER_FULL}) ? 1'b0 : (($urandom % 100) < full_pct);
      st = tst;
      if (tst == FIFO_FULL_STATE) n_full++;
      // what the FIFO accepts at the coming edge
      if ((tst inside {LOAD_DATA, LOAD_PARITY, LOAD_AFTER_FULL}) && !fifo_full) got.push_back(dout);
      if (!tb_busy(tst) && (tst != DECODE_ADDRESS || i == 0)) i++;
      if (tst == LOAD_AFTER_FULL && low_pkt_valid && !parity_done) n_laf_parity++;
      // testbench controller
      unique case (tst)
        DECODE_ADDRESS:     tst = pkt_valid ? LOAD_FIRST_DATA : DECODE_ADDRESS;
        LOAD_FIRST_DATA:    tst = LOAD_DATA;
        LOAD_DATA:          tst = fifo_full ? FIFO_FULL_STATE : (!pkt_valid ? LOAD_PARITY : LOAD_DATA);
        LOAD_PARITY:        begin refused = fifo_full; tst = CHECK_PARITY_ERROR; end
        CHECK_PARITY_ERROR: tst = refused ? FIFO_FULL_STATE : DECODE_ADDRESS;
        FIFO_FULL_STATE:    tst = fifo_full ? FIFO_FULL_STATE : LOAD_AFTER_FULL;
        LOAD_AFTER_FULL:    tst = parity_done ? DECODE_ADDRESS : (low_pkt_valid ? LOAD_PARITY : LOAD_DATA);
        default:            tst = DECODE_ADDRESS;
      endcase
      @(negedge clock);
      if (tst == DECODE_ADDRESS) break;
    end
    st = DECODE_ADDRESS; pkt_valid = 1'b0;
    check(got.size() == sent.size(), $sformatf("packet of %0d bytes reached FIFO as %0d", sent.size(), got.size()));
    foreach (sent[k]) if (k < got.size()) check(got[k] == sent[k], $sformatf("byte %0d: %h expected %h", k, got[k], sent[k]));
    check(err == bad, $sformatf("err %b for a packet with bad=%b", err, bad));
    if (err) n_err++;
  endtask

  initial begin
    resetn = 1'b0; st = DECODE_ADDRESS; pkt_valid = 1'b0; data_in = '0; fifo_full = 1'b0;
    repeat (2) @(negedge clock);
    resetn = 1'b1;
    check(dout == 0 && !err && !parity_done && !low_pkt_valid, "outputs after reset");

    // packet A: header 0D (3 bytes to port 1), payload 11 22 33, parity 0D^11^22^33 = 0D
    cyc(DECODE_ADDRESS,     1, 8'h0D, 0, 8'h00, 0, 0, 0);
    cyc(LOAD_FIRST_DATA,    1, 8'h11, 0, 8'h0D, 0, 0, 0);
    cyc(LOAD_DATA,          1, 8'h11, 0, 8'h11, 0, 0, 0);
    cyc(LOAD_DATA,          1, 8'h22, 0, 8'h22, 0, 0, 0);
    cyc(LOAD_DATA,          1, 8'h33, 0, 8'h33, 0, 0, 0);
    cyc(LOAD_DATA,          0, 8'h0D, 0, 8'h0D, 1, 1, 0);
    cyc(LOAD_PARITY,        0, 8'h00, 0, 8'h0D, 1, 1, 0);
    cyc(CHECK_PARITY_ERROR, 0, 8'h00, 0, 8'h0D, 1, 0, 0);
    cyc(DECODE_ADDRESS,     0, 8'h00, 0, 8'h0D, 0, 0, 0);

    // packet B: header 0A (2 bytes to port 2), payload A5 5A, wrong parity 00
    cyc(DECODE_ADDRESS,     1, 8'h0A, 0, 8'h0D, 0, 0, 0);
    cyc(LOAD_FIRST_DATA,    1, 8'hA5, 0, 8'h0A, 0, 0, 0);
    cyc(LOAD_DATA,          1, 8'hA5, 1, 8'h0A, 0, 0, 0);  // header refused, A5 kept aside
    cyc(FIFO_FULL_STATE,    1, 8'h5A, 1, 8'h0A, 0, 0, 0);
    cyc(LOAD_AFTER_FULL,    1, 8'h5A, 0, 8'hA5, 0, 0, 0);  // header written, A5 next
    cyc(LOAD_DATA,          1, 8'h5A, 0, 8'h5A, 0, 0, 0);
    cyc(LOAD_DATA,          0, 8'h00, 1, 8'h5A, 0, 1, 0);  // 5A refused, parity kept aside
    cyc(FIFO_FULL_STATE,    0, 8'hEE, 1, 8'h5A, 0, 1, 0);
    cyc(LOAD_AFTER_FULL,    0, 8'hEE, 0, 8'h00, 1, 1, 0);  // parity moves to dout
    cyc(LOAD_PARITY,        0, 8'hEE, 0, 8'h00, 1, 1, 0);
    cyc(CHECK_PARITY_ERROR, 0, 8'hEE, 0, 8'h00, 1, 0, 1);  // 0A^A5^5A = 0A != 00
    cyc(DECODE_ADDRESS,     0, 8'hEE, 0, 8'h00, 0, 0, 1);
    cyc(DECODE_ADDRESS,     1, 8'h05, 0, 8'h00, 0, 0, 1);
    cyc(LOAD_FIRST_DATA,    1, 8'h77, 0, 8'h05, 0, 0, 0);  // err cleared by the next packet
    cyc(DECODE_ADDRESS,     0, 8'h00, 0, 8'h05, 0, 0, 0);

    // part 2: random packets under random back-pressure
    for (int p = 0; p < 300; p++)
      run_packet($urandom_range(1, MAX_PAYLOAD), ($urandom % 4) == 0, (p % 3) * 25);

    check(n_err > 0, "no parity error seen");
    check(n_full > 0, "no full FIFO seen");
    check(n_laf_parity > 0, "parity never taken after a full FIFO");
    $display("errors=%0d full_cycles=%0d laf_parity=%0d", n_err, n_full, n_laf_parity);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
