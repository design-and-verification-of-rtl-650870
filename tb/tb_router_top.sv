// tb_router_top: end-to-end, self-checking testbench of router_top at its
// default sizes.
//
// A source task sends packets (header, payload, parity) and holds each byte
// while busy is high. Three client readers raise read_enb_x at random rates
// while vld_out_x is high (never leaving it unanswered for 20 cycles unless a
// test turns the reader off), and check every byte that appears on data_out_x
// against a per-port queue of the packets sent to that port. After each packet
// error must equal "the packet's parity byte was wrong". Also checked: busy one
// cycle after a header, vld_out three cycles after a header into an empty FIFO,
// data_out back to 0 after a packet is read, and the read time-out (FIFO
// emptied, vld_out and data_out low), also while a packet is still being
// written, which the router abandons. Runs the payload lengths 4, 14 and 16,
// then 600 random packets of 1..63 bytes, then the directed cases. Every
// mechanism of the router is counted from its internal strobes, and one that
// never happened counts as a failure.
module tb_router_top;
  import router_pkg::*;

  logic clock = 1'b0;
  logic resetn, pkt_valid;
  byte_t data_in;
  logic read_enb_0, read_enb_1, read_enb_2;
  byte_t data_out_0, data_out_1, data_out_2;
  logic vld_out_0, vld_out_1, vld_out_2, busy, error;

  router_top dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- clients
  byte_t exp_q [3][$];
  bit    reader_on [3] = '{1, 1, 1};
  int    rate [3] = '{60, 60, 60};    // read probability in percent
  int    n_bytes_read = 0, n_idle_checks = 0;

  wire [2:0] vld_v = {vld_out_2, vld_out_1, vld_out_0};
  byte_t     dout_v [3];
  assign dout_v[0] = data_out_0;
  assign dout_v[1] = data_out_1;
  assign dout_v[2] = data_out_2;
  logic [2:0] rd_v = '0;
  assign {read_enb_2, read_enb_1, read_enb_0} = rd_v;

  for (genvar p = 0; p < 3; p++) begin : g_client
    bit pend = 0;
    int waited = 0;
    always @(negedge clock) begin
      if (!resetn) begin
        pend = 0; waited = 0; rd_v[p] = 1'b0;
      end else begin
        if (pend) begin
          if (exp_q[p].size() == 0) begin
            check(0, $sformatf("port %0d: unexpected byte %h", p, dout_v[p]));
          end else begin
            automatic byte_t e = exp_q[p].pop_front();
            check(dout_v[p] == e, $sformatf("port %0d: data_out %h expected %h", p, dout_v[p], e));
            n_bytes_read++;
          end
        end else if (exp_q[p].size() == 0) begin
          check(dout_v[p] == 8'h00, $sformatf("port %0d: data_out %h while idle", p, dout_v[p]));
          n_idle_checks++;
        end
        rd_v[p] = reader_on[p] && vld_v[p] && ((($urandom % 100) < rate[p]) || waited >= 20);
        pend    = rd_v[p] && vld_v[p];
        waited  = (vld_v[p] && !rd_v[p]) ? waited + 1 : 0;
      end
    end
  end

  // ------------------------------------------------------- mechanism counters
  int n_busy_hold = 0, n_full = 0, n_wait_empty = 0, n_laf = 0, n_parity_retry = 0;
  int n_err = 0, n_timeout = 0, n_rw = 0, n_good = 0;
  always @(negedge clock) if (resetn) begin
    if (busy && pkt_valid) n_busy_hold++;
    if (dut.u_fsm.state == FIFO_FULL_STATE && dut.u_fsm.state != dut.u_fsm.next) n_full++;
    if (dut.u_fsm.state == WAIT_TILL_EMPTY && dut.u_fsm.next == LOAD_FIRST_DATA) n_wait_empty++;
    if (dut.u_fsm.laf_state) n_laf++;
    if (dut.u_fsm.state == CHECK_PARITY_ERROR && dut.u_fsm.next == FIFO_FULL_STATE) n_parity_retry++;
    if (|dut.soft_reset) n_timeout++;
    if (|(dut.write_enb & ~dut.full & {read_enb_2, read_enb_1, read_enb_0} & ~dut.empty)) n_rw++;
  end

  // ---------------------------------------------------------------- source
  // Sends one packet; returns after the router is idle again, then checks error.
  int n_abort = 0;

  // With allow_abort the source gives up when the router drops the packet on a
  // read time-out (controller back in DECODE_ADDRESS before the packet ended).
  task automatic send_packet(int port, int len, bit bad, bit check_timing = 0, bit allow_abort = 0);
    byte_t pkt[$];
    byte_t x = '0;
    int    i = 0, cyc = 0, hdr_cyc = -1;
    bit    was_empty = !vld_v[port];
    pkt.push_back({6'(len), 2'(port)});
    for (int k = 0; k < len; k++) pkt.push_back(8'($urandom));
    foreach (pkt[k]) x ^= pkt[k];
    pkt.push_back(bad ? (x ^ 8'(1 << $urandom_range(0, 7))) : x);
    foreach (pkt[k]) exp_q[port].push_back(pkt[k]);
    while (i < pkt.size()) begin
      if (allow_abort && i > 0 && dut.u_fsm.detect_add) begin
        pkt_valid = 1'b0;
        n_abort++;
        return;
      end
      pkt_valid = (i < pkt.size() - 1);
      data_in   = pkt[i];
      if (i == 0 && !busy) hdr_cyc = cyc;
      if (!busy) i++;
      @(negedge clock);
      cyc++;
      if (i == 1 && cyc == hdr_cyc + 1)
        check(busy, "busy not raised the cycle after a header");
      if (check_timing && was_empty && cyc == hdr_cyc + 2)
        check(!vld_v[port], "vld_out rose too early");
      if (check_timing && was_empty && cyc == hdr_cyc + 3)
        check(vld_v[port], "vld_out not raised three cycles after the header");
    end
    pkt_valid = 1'b0;
    data_in   = 8'($urandom);
    while (busy) @(negedge clock);
    check(error == bad, $sformatf("error %b after a packet with bad=%b (port %0d, len %0d)", error, bad, port, len));
    if (error) n_err++; else n_good++;
  endtask

  task automatic drain(int max_cycles = 2000);
    for (int c = 0; c < max_cycles; c++) begin
      if (exp_q[0].size() == 0 && exp_q[1].size() == 0 && exp_q[2].size() == 0) break;
      @(negedge clock);
    end
    repeat (3) @(negedge clock);
    for (int p = 0; p < 3; p++)
      check(exp_q[p].size() == 0, $sformatf("port %0d: %0d bytes never read", p, exp_q[p].size()));
  endtask

  initial begin
    resetn = 1'b0; pkt_valid = 1'b0; data_in = '0;
    repeat (3) @(negedge clock);
    check(!busy && !error && vld_v == 3'b000, "outputs after reset");
    resetn = 1'b1;
    @(negedge clock);

    // payload lengths 4, 14, 16, one per port, first into empty FIFOs
    send_packet(2, 4, 0, 1);
    send_packet(1, 14, 0, 1);
    send_packet(0, 16, 0, 1);
    drain();

    // random traffic in phases of reader speed
    for (int ph = 0; ph < 6; ph++) begin
      for (int p = 0; p < 3; p++) rate[p] = (ph % 3 == 0) ? 90 : (ph % 3 == 1) ? 30 : 8 + 20 * p;
      for (int k = 0; k < 100; k++)
        send_packet($urandom_range(0, 2), $urandom_range(1, MAX_PAYLOAD), ($urandom % 5) == 0);
    end
    drain();
    for (int p = 0; p < 3; p++) rate[p] = 60;

    // parity byte refused by a full FIFO: 15 payload bytes fill the 16 entries
    reader_on[1] = 0;
    fork
      send_packet(1, 15, 0);
      begin repeat (24) @(negedge clock); reader_on[1] = 1; end
    join
    drain();

    // read time-out: nobody reads port 0 for 30 cycles
    begin
      automatic int tmo_before = n_timeout;
      reader_on[0] = 0;
      send_packet(0, 10, 0);
      repeat (35) @(negedge clock);
      check(n_timeout == tmo_before + 1, "no read time-out on port 0");
      check(!vld_out_0 && data_out_0 == 8'h00, "port 0 not emptied by the time-out");
      exp_q[0].delete();
      reader_on[0] = 1;
      send_packet(0, 5, 1);
      drain();
    end

    // time-out while the packet is still being written: 40 bytes into an unread FIFO
    reader_on[2] = 0;
    send_packet(2, 40, 0, 0, 1);
    check(n_abort == 1, "packet to an unread port was not abandoned");
    repeat (2) @(negedge clock);
    check(!busy && !vld_out_2 && data_out_2 == 8'h00, "port 2 not cleared after the abandoned packet");
    exp_q[2].delete();
    reader_on[2] = 1;
    send_packet(2, 33, 0);
    drain();

    // packet for the nonexistent port 3 is not delivered anywhere
    pkt_valid = 1'b1; data_in = 8'b000001_11;
    @(negedge clock);
    pkt_valid = 1'b0;
    repeat (5) @(negedge clock);
    check(!busy && vld_v == 3'b000, "port 3 header was acted upon");

    check(n_busy_hold > 0,    "busy never held the source");
    check(n_full > 0,         "no FIFO_FULL_STATE");
    check(n_laf > 0,          "no LOAD_AFTER_FULL");
    check(n_wait_empty > 0,   "no WAIT_TILL_EMPTY");
    check(n_parity_retry > 0, "parity write never retried");
    check(n_err > 0,          "no parity error reported");
    check(n_good > 0,         "no good packet");
    check(n_timeout > 0,      "no read time-out");
    check(n_rw > 0,           "no simultaneous FIFO read and write");
    check(n_abort > 0,        "no packet abandoned on a time-out");
    $display("bytes read=%0d idle checks=%0d busy holds=%0d full=%0d laf=%0d wait_empty=%0d parity_retry=%0d errors=%0d good=%0d timeouts=%0d rw=%0d aborts=%0d",
             n_bytes_read, n_idle_checks, n_busy_hold, n_full, n_laf, n_wait_empty, n_parity_retry,
             n_err, n_good, n_timeout, n_rw, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
