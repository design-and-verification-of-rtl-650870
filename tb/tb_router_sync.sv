// tb_router_sync: self-checking testbench of router_sync.
//
// Checks, against values computed in the testbench: the address latch (updated
// only while detect_add is high), fifo_full selection for every address and every
// full pattern, the one-hot write enable, vld_out = ~empty, and the read time-out:
// soft_reset_x must rise exactly after 30 consecutive cycles with vld_out_x high
// and read_enb_x low, never earlier, and a read or an empty FIFO restarts the count.
// The time-out part runs a per-port cycle counter as reference over random traffic.
module tb_router_sync;
  import router_pkg::*;

  logic clock = 1'b0;
  logic resetn, detect_add, write_enb_reg;
  port_t data_in;
  logic read_enb_0, read_enb_1, read_enb_2;
  logic empty_0, empty_1, empty_2, full_0, full_1, full_2;
  logic [2:0] write_enb;
  logic fifo_full, vld_out_0, vld_out_1, vld_out_2;
  logic soft_reset_0, soft_reset_1, soft_reset_2;

  router_sync dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0, n_timeouts = 0;
  port_t exp_sel = '0;
  int    idle_cnt [3] = '{0, 0, 0};
  logic [2:0] exp_soft = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  wire [2:0] empty_v = {empty_2, empty_1, empty_0};
  wire [2:0] full_v  = {full_2, full_1, full_0};
  wire [2:0] rd_v    = {read_enb_2, read_enb_1, read_enb_0};
  wire [2:0] soft_v  = {soft_reset_2, soft_reset_1, soft_reset_0};
  wire [2:0] vld_v   = {vld_out_2, vld_out_1, vld_out_0};

  // reference: address latch and time-out counters
  always @(posedge clock) begin
    if (!resetn) begin
      exp_sel  = '0;
      idle_cnt = '{0, 0, 0};
      exp_soft = '0;
    end else begin
      if (detect_add) exp_sel = data_in;
      for (int p = 0; p < 3; p++) begin
        exp_soft[p] = 1'b0;
        if (!empty_v[p] && !rd_v[p]) begin
          idle_cnt[p]++;
          if (idle_cnt[p] == 30) begin
            exp_soft[p] = 1'b1;
            idle_cnt[p] = 0;
          end
        end else begin
          idle_cnt[p] = 0;
        end
      end
    end
  end

  always @(negedge clock) begin
    if (resetn) begin
      automatic logic exp_full = (exp_sel == 2'd3) ? 1'b0 : full_v[exp_sel];
      automatic logic [2:0] exp_we = (write_enb_reg && exp_sel != 2'd3) ? 3'(1 << exp_sel) : 3'b000;
      check(fifo_full == exp_full, $sformatf("fifo_full %b expected %b (sel %0d)", fifo_full, exp_full, exp_sel));
      check(write_enb == exp_we, $sformatf("write_enb %b expected %b", write_enb, exp_we));
      check(vld_v == ~empty_v, "vld_out differs from ~empty");
      check(soft_v == exp_soft, $sformatf("soft_reset %b expected %b", soft_v, exp_soft));
      for (int p = 0; p < 3; p++) if (soft_v[p]) n_timeouts++;
    end
  end

  task automatic set_in(bit da, port_t d, bit we, logic [2:0] rd, logic [2:0] em, logic [2:0] fu);
    @(negedge clock);
    detect_add = da; data_in = d; write_enb_reg = we;
    {read_enb_2, read_enb_1, read_enb_0} = rd;
    {empty_2, empty_1, empty_0} = em;
    {full_2, full_1, full_0} = fu;
  endtask

  initial begin
    resetn = 1'b0;
    set_in(1'b0, 2'd0, 1'b0, 3'b000, 3'b111, 3'b000);
    @(negedge clock);
    resetn = 1'b1;

    // every address against every full pattern, with and without write_enb_reg
    for (int a = 0; a < 4; a++) begin
      set_in(1'b1, 2'(a), 1'b0, 3'b000, 3'b111, 3'b000);
      for (int f = 0; f < 8; f++) begin
        set_in(1'b0, 2'(3 - a), 1'b1, 3'b000, 3'b111, 3'(f));
        set_in(1'b0, 2'(a + 1), 1'b0, 3'b000, 3'b111, 3'(f));
      end
    end

    // time-out exactly at 30 idle cycles on port 1; port 0 read every 10 cycles
    set_in(1'b0, 2'd0, 1'b0, 3'b000, 3'b100, 3'b000);
    for (int i = 0; i < 29; i++) begin
      set_in(1'b0, 2'd0, 1'b0, (i % 10 == 9) ? 3'b001 : 3'b000, 3'b100, 3'b000);
      check(!soft_reset_1, "soft_reset_1 before 30 idle cycles");
    end
    set_in(1'b0, 2'd0, 1'b0, 3'b000, 3'b111, 3'b000);
    check(soft_reset_1, "soft_reset_1 after 30 idle cycles");
    check(!soft_reset_0, "soft_reset_0 with reads every 10 cycles");

    // random traffic, time-outs now and then
    for (int i = 0; i < 6000; i++)
      set_in(($urandom % 4) == 0, 2'($urandom), 1'($urandom),
             3'({($urandom % 40) == 0, ($urandom % 40) == 0, ($urandom % 40) == 0}),
             3'({($urandom % 30) == 0, ($urandom % 30) == 0, ($urandom % 30) == 0}),
             3'($urandom));
    @(negedge clock);

    check(n_timeouts > 3, "too few time-outs in random traffic");
    $display("time-outs=%0d", n_timeouts);
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
