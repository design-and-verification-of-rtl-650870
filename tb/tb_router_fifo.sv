// tb_router_fifo: self-checking testbench of router_fifo.
//
// A queue-based reference model follows every write and read: a write is kept
// when fewer than 16 entries are held, the header flag is lfd_state of the
// previous cycle, a read returns the oldest entry on data_out one cycle later,
// and a read header starts a countdown of payload length + 1 after which an
// idle cycle returns data_out to 0. Inputs change on the falling edge; outputs
// are compared with the model on the falling edge. Directed phases fill the FIFO
// to full, write into a full FIFO, read and write at once, soft-reset it, and
// read a whole packet with pauses; then 4000 random cycles follow.
module tb_router_fifo;
  import router_pkg::*;

  logic clock = 1'b0;
  logic resetn, soft_reset, write_enb, read_enb, lfd_state;
  byte_t data_in, data_out;
  logic full, empty;

  router_fifo dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_full = 0, n_drop = 0, n_rw = 0, n_soft = 0, n_idle = 0;

  logic [8:0] q[$];
  byte_t      exp_out = '0;
  int         exp_rem = 0;
  logic       lfd_q = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // reference model, advanced on every rising edge with the inputs of that cycle
  always @(posedge clock) begin
    if (!resetn || soft_reset) begin
      q.delete();
      exp_out = '0;
      exp_rem = 0;
      lfd_q   = 1'b0;
      if (resetn && soft_reset) n_soft++;
    end else begin
      automatic bit wr = write_enb && q.size() < 16;
      automatic bit rd = read_enb && q.size() > 0;
      automatic logic [8:0] w;
      if (write_enb && q.size() == 16) n_drop++;
      if (wr && rd) n_rw++;
      if (rd) begin
        w = q.pop_front();
        exp_out = w[7:0];
        if (w[8]) exp_rem = int'(w[7:2]) + 1;
        else if (exp_rem > 0) exp_rem--;
      end else if (exp_rem == 0) begin
        if (exp_out != 0) n_idle++;
        exp_out = '0;
      end
      if (wr) q.push_back({lfd_q, data_in});
      lfd_q = lfd_state;
    end
  end

  always @(negedge clock) begin
    if (resetn) begin
      check(data_out == exp_out, $sformatf("data_out %h expected %h", data_out, exp_out));
      check(full == (q.size() == 16), $sformatf("full %b with %0d entries", full, q.size()));
      check(empty == (q.size() == 0), $sformatf("empty %b with %0d entries", empty, q.size()));
      if (full) n_full++;
    end
  end

  task automatic drive(bit w, bit r, bit lfd, byte_t d, bit sr = 1'b0);
    @(negedge clock);
    write_enb  = w;
    read_enb   = r;
    lfd_state  = lfd;
    data_in    = d;
    soft_reset = sr;
  endtask

  // writes one packet: lfd pulse, header, payload, parity
  task automatic write_packet(int len, bit rd_too);
    byte_t hdr = {6'(len), 2'd1};
    drive(1'b0, rd_too, 1'b1, 8'h00);
    drive(1'b1, rd_too, 1'b0, hdr);
    for (int i = 0; i < len; i++) drive(1'b1, rd_too, 1'b0, 8'($urandom));
    drive(1'b1, rd_too, 1'b0, 8'($urandom));
  endtask

  initial begin
    resetn = 1'b0; soft_reset = 1'b0; write_enb = 1'b0; read_enb = 1'b0;
    lfd_state = 1'b0; data_in = '0;
    repeat (3) @(negedge clock);
    check(empty && !full && data_out == 0, "state after reset");
    resetn = 1'b1;

    // a 20-byte write stream into an unread FIFO: fills at 16, rest dropped
    write_packet(18, 1'b0);
    check(full, "full after 16 writes");
    // drain with pauses
    for (int i = 0; i < 40; i++) drive(1'b0, (i % 3) != 1, 1'b0, 8'h00);
    check(empty, "empty after draining");

    // short packet read back with pauses: data_out holds mid-packet, idles after parity
    write_packet(4, 1'b0);
    for (int i = 0; i < 20; i++) drive(1'b0, (i % 2) == 0, 1'b0, 8'h00);

    // simultaneous read and write
    write_packet(10, 1'b1);
    drive(1'b0, 1'b1, 1'b0, 8'h00);

    // soft reset of a partly filled FIFO
    write_packet(6, 1'b0);
    drive(1'b0, 1'b0, 1'b0, 8'h00, 1'b1);
    drive(1'b0, 1'b0, 1'b0, 8'h00);
    check(empty && !full && data_out == 0, "state after soft reset");

    // random traffic
    for (int i = 0; i < 4000; i++)
      drive(($urandom % 100) < 55, ($urandom % 100) < 50, ($urandom % 100) < 8,
            8'($urandom), ($urandom % 400) == 0);
    drive(1'b0, 1'b0, 1'b0, 8'h00);

    check(n_full > 0, "FIFO never became full");
    check(n_drop > 0, "no write into a full FIFO");
    check(n_rw > 0, "no simultaneous read and write");
    check(n_soft > 0, "no soft reset");
    check(n_idle > 0, "data_out never returned to idle after a packet");
    $display("full cycles=%0d dropped=%0d rw=%0d soft=%0d idle=%0d", n_full, n_drop, n_rw, n_soft, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
