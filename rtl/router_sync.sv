// router_sync: glue between the router controller and its three output FIFOs.
//
// - Address latch: while detect_add is high (the FSM is in DECODE_ADDRESS) the
//   destination field data_in[1:0] of the input byte is registered; the value
//   seen with the header stays until the next packet's DECODE_ADDRESS.
// - fifo_full is the full flag of the FIFO that address selects (0 for port 3,
//   which does not exist).
// - write_enb[2:0] is write_enb_reg steered to that FIFO (one-hot or zero).
// - vld_out_x = ~empty_x.
// - Read time-out: one counter per port counts the cycles in which vld_out_x is
//   high and read_enb_x is low; a read or an empty FIFO clears it. After TIMEOUT
//   (30) such cycles in a row soft_reset_x is high for one cycle, which empties
//   FIFO x (and, for the packet being written, returns the FSM to DECODE_ADDRESS).
//
// The selection rules, vld_out and the 30-cycle limit follow the router's
// description; counting consecutive unanswered cycles (rather than cycles since
// vld_out rose) is this design's reading of "within 30 clock cycles".
// Timing: fifo_full, write_enb and vld_out are combinational; soft_reset is
// registered. Reset is synchronous and active low.
module router_sync
  import router_pkg::*;
#(
  parameter int unsigned TIMEOUT = READ_TIMEOUT
) (
  input  logic        clock,
  input  logic        resetn,
  input  logic        detect_add,
  input  port_t       data_in,
  input  logic        write_enb_reg,
  input  logic        read_enb_0,
  input  logic        read_enb_1,
  input  logic        read_enb_2,
  input  logic        empty_0,
  input  logic        empty_1,
  input  logic        empty_2,
  input  logic        full_0,
  input  logic        full_1,
  input  logic        full_2,
  output logic [2:0]  write_enb,
  output logic        fifo_full,
  output logic        vld_out_0,
  output logic        vld_out_1,
  output logic        vld_out_2,
  output logic        soft_reset_0,
  output logic        soft_reset_1,
  output logic        soft_reset_2
);

  localparam int unsigned CNT_W = $clog2(TIMEOUT + 1);

  port_t            sel;
  logic [2:0]       vld, rd, tmo;
  logic [CNT_W-1:0] wait_cnt [3];

  always_ff @(posedge clock) begin
    if (!resetn)         sel <= '0;
    else if (detect_add) sel <= data_in;
  end

  always_comb begin
    unique case (sel)
      2'd0:    fifo_full = full_0;
      2'd1:    fifo_full = full_1;
      2'd2:    fifo_full = full_2;
      default: fifo_full = 1'b0;
    endcase
  end

  always_comb begin
    write_enb = '0;
    if (write_enb_reg && sel != 2'd3) write_enb[sel] = 1'b1;
  end

  assign vld = ~{empty_2, empty_1, empty_0};
  assign rd  = {read_enb_2, read_enb_1, read_enb_0};
  assign {vld_out_2, vld_out_1, vld_out_0} = vld;

  for (genvar p = 0; p < 3; p++) begin : g_timeout
    always_ff @(posedge clock) begin
      if (!resetn || !vld[p] || rd[p]) begin
        wait_cnt[p] <= '0;
        tmo[p]     <= 1'b0;
      end else if (wait_cnt[p] == CNT_W'(TIMEOUT - 1)) begin
        wait_cnt[p] <= '0;
        tmo[p]     <= 1'b1;
      end else begin
        wait_cnt[p] <= wait_cnt[p] + 1'b1;
        tmo[p]     <= 1'b0;
      end
    end
  end

  assign {soft_reset_2, soft_reset_1, soft_reset_0} = tmo;

  a_one_fifo_written: assert property (@(posedge clock) disable iff (!resetn) $onehot0(write_enb));

endmodule
