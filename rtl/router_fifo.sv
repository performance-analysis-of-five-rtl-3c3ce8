// router_fifo: synchronous FIFO that buffers the packets bound for one
// output port of the router.
//
// The FIFO is DATA_W bits wide and DEPTH words deep (8 x 16, as specified
// for the router). A word on data_in is written on the rising clock edge
// when write_enb is high and the FIFO is not full; the oldest word is moved
// to the registered data_out on the rising edge when read_enb is high and
// the FIFO is not empty, so read data appears one clock after read_enb.
// Reads and writes may happen in the same cycle. A write attempted while
// full and a read attempted while empty are ignored.
//
// resetn is active low and synchronous: it empties the FIFO (empty = 1,
// full = 0) and clears data_out, as the router specification requires.
// Storage is a register array indexed by binary pointers with one extra
// wrap bit (DEPTH must be a power of two); full and empty are decoded from the pointer difference. The
// pointer scheme and the handling of write-when-full / read-when-empty are
// this design's choices.
module router_fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic              write_enb,
  input  logic              read_enb,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              full,
  output logic              empty
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PW:0]       wr_ptr, rd_ptr;
  logic [PW:0]       count;
  logic              do_wr, do_rd;

  assign count = wr_ptr - rd_ptr;
  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = write_enb && !full;
  assign do_rd = read_enb && !empty;

  // The pointers wrap naturally, so DEPTH must be a power of two.
  initial assert ((DEPTH & (DEPTH - 1)) == 0 && DEPTH >= 2)
    else $error("router_fifo: DEPTH must be a power of two >= 2");

  always_ff @(posedge clock) begin
    if (!resetn) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      data_out <= '0;
    end else begin
      if (do_wr) begin
        mem[wr_ptr[PW-1:0]] <= data_in;
        wr_ptr              <= wr_ptr + 1'b1;
      end
      if (do_rd) begin
        data_out <= mem[rd_ptr[PW-1:0]];
        rd_ptr   <= rd_ptr + 1'b1;
      end
    end
  end

endmodule
