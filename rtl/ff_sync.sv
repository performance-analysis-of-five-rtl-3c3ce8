// ff_sync: ties the single input port of the router to its N_OUT output
// FIFOs.
//
// While the controller is decoding a header (detect_add high) and
// packet_valid is high, the two address bits on data_in are latched in
// addr_q and held for the rest of the packet. The latched address selects
// which FIFO receives write_enb when the controller raises write_enb_reg,
// and which FIFO's full/empty flags are returned to the controller as
// fifo_full / fifo_empty. An address with no FIFO (>= N_OUT, possible only
// when N_OUT < 4) returns fifo_empty = 0 and fifo_full = 1, as the
// specification's mux table does. vld_out[i] is simply ~empty[i]: output i
// has data ready to read.
//
// Timing: the address register updates on the rising clock edge; every
// other output is combinational. During detect_add the flag mux is steered
// by the address on data_in itself, so the controller sees the flags of
// the FIFO the arriving header addresses in the same cycle (this design's
// reading of "if data = 00 then fifo_empty = empty_0"). resetn (active
// low, synchronous) clears the latched address.
module ff_sync #(
  parameter int unsigned N_OUT  = 4,
  parameter int unsigned ADDR_W = 2
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic [ADDR_W-1:0] addr_in,        // data_in[1:0] of the input port
  input  logic              detect_add,
  input  logic              packet_valid,
  input  logic              write_enb_reg,
  input  logic [N_OUT-1:0]  full,
  input  logic [N_OUT-1:0]  empty,
  output logic [N_OUT-1:0]  write_enb,
  output logic              fifo_full,
  output logic              fifo_empty,
  output logic [N_OUT-1:0]  vld_out
);

  logic [ADDR_W-1:0] addr_q;
  logic [ADDR_W-1:0] sel;

  always_ff @(posedge clock) begin
    if (!resetn)
      addr_q <= '0;
    else if (detect_add && packet_valid)
      addr_q <= addr_in;
  end

  assign sel = detect_add ? addr_in : addr_q;

  always_comb begin
    fifo_empty = 1'b0;
    fifo_full  = 1'b1;
    write_enb  = '0;
    for (int i = 0; i < N_OUT; i++) begin
      if (sel == ADDR_W'(i)) begin
        fifo_empty = empty[i];
        fifo_full  = full[i];
      end
      if (addr_q == ADDR_W'(i))
        write_enb[i] = write_enb_reg;
    end
  end

  assign vld_out = ~empty;

endmodule
