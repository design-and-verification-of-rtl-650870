// router_fifo: output buffer of one client port of the 1x3 router.
//
// A synchronous FIFO of DEPTH entries, each WIDTH bits wide: the packet byte and,
// in the top bit, a flag that is set for the header byte. The FSM raises lfd_state
// in the cycle before the header is written (the header reaches this FIFO one
// cycle after LOAD_FIRST_DATA, through the register block), so the FIFO delays
// lfd_state by one cycle and stores the delayed copy as the header flag.
//
// Write: data_in is stored on the rising edge when write_enb is high and the FIFO
// is not full; a write to a full FIFO is dropped (the FSM retries it).
// Read: when read_enb is high and the FIFO is not empty, the oldest entry is
// registered onto data_out on the rising edge, so a byte appears one cycle after
// the read_enb that fetched it. Reading and writing in the same cycle is allowed.
// Reading a header loads a counter with its payload length plus one (the parity
// byte); each following byte read counts it down. Once it is zero and no read is
// made, data_out returns to its idle value 0. The description drives the bus to
// high impedance there; this design drives 0 instead and keeps tri-states out of
// the core.
//
// resetn (active low, synchronous) and soft_reset (active high, the read
// time-out from the synchronizer) both empty the FIFO: full = 0, empty = 1,
// data_out = 0. The entry count (DEPTH and WIDTH, 16 x 9) follows the description;
// pointer-based full/empty flags are this design's choice.
module router_fifo
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH,
  parameter int unsigned WIDTH = FIFO_WIDTH
) (
  input  logic               clock,
  input  logic               resetn,
  input  logic               soft_reset,
  input  logic               write_enb,
  input  logic               read_enb,
  input  logic               lfd_state,
  input  logic [WIDTH-2:0]   data_in,
  output logic [WIDTH-2:0]   data_out,
  output logic               full,
  output logic               empty
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = LEN_W + 1;  // holds payload length + 1 (up to 64)

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W:0]   wr_ptr, rd_ptr;            // one extra bit tells full from empty
  logic             lfd_q;                     // lfd_state delayed to match the header write
  logic [CNT_W-1:0] remaining;                 // bytes of the current packet still to read

  logic do_write, do_read;
  logic [WIDTH-1:0] rd_word;

  assign empty    = (wr_ptr == rd_ptr);
  assign full     = (wr_ptr[PTR_W-1:0] == rd_ptr[PTR_W-1:0]) && (wr_ptr[PTR_W] != rd_ptr[PTR_W]);
  assign do_write = write_enb && !full;
  assign do_read  = read_enb && !empty;
  assign rd_word  = mem[rd_ptr[PTR_W-1:0]];

  always_ff @(posedge clock) begin
    if (do_write) mem[wr_ptr[PTR_W-1:0]] <= {lfd_q, data_in};
  end

  always_ff @(posedge clock) begin
    if (!resetn || soft_reset) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      lfd_q     <= 1'b0;
      remaining <= '0;
      data_out  <= '0;
    end else begin
      lfd_q <= lfd_state;
      if (do_write) wr_ptr <= wr_ptr + 1'b1;
      if (do_read) begin
        rd_ptr   <= rd_ptr + 1'b1;
        data_out <= rd_word[WIDTH-2:0];
        if (rd_word[WIDTH-1])
          remaining <= CNT_W'(hdr_len(rd_word[DATA_W-1:0])) + 1'b1;
        else if (remaining != '0)
          remaining <= remaining - 1'b1;
      end else if (remaining == '0) begin
        data_out <= '0;
      end
    end
  end

endmodule
