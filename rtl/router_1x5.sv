// router_1x5: five-port packet router, one 8-bit input port and N_OUT = 4
// 8-bit output ports.
//
// A sender streams a packet into the input port: a header byte whose bits
// [1:0] name the output port, payload bytes with packet_valid high, then a
// parity byte (XOR of header and payload) with packet_valid low. The
// sender must hold data_in and packet_valid while suspend_data is high and
// may change them after every rising edge at which suspend_data was low.
// The controller (fsm_router) steers the bytes through the data register
// (router_reg) into the FIFO of the addressed port (router_fifo, 8 x 16);
// ff_sync latches the address and routes write enables and FIFO flags.
// A packet only starts into an empty FIFO; while that FIFO is full the
// router raises suspend_data and resumes when the receiver has read.
// err reports, from the cycle after the packet's parity check until the
// next check, whether the packet's parity byte disagreed with the parity
// the router computed; the packet is delivered either way.
//
// Each output port i offers vld_out[i] while its FIFO holds data; the
// receiver raises read_enb[i] and gets the oldest byte on data_out[i] one
// clock later. With an empty FIFO and no stalls a packet of n payload
// bytes occupies the input for n + 5 clocks (header, LOAD_FIRST_DATA,
// n payload, parity, LOAD_PARITY, CHECK_PARITY_ERROR) and its header is
// readable (vld_out high) 3 clocks after the header was taken.
//
// The block split, the FIFO size and the controller follow the router
// specification. It describes the router both with four output FIFOs (the
// five-port router) and with three; the four-port default is used here and
// N_OUT = 3 gives the three-output variant, in which address 3 is not
// routed. resetn is active low and synchronous.
module router_1x5
  import router_pkg::*;
#(
  parameter int unsigned N_OUT      = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic              packet_valid,
  input  logic [ROUTER_DATA_W-1:0] data_in,
  input  logic [N_OUT-1:0]  read_enb,
  output logic [ROUTER_DATA_W-1:0] data_out [N_OUT],
  output logic [N_OUT-1:0]  vld_out,
  output logic              err,
  output logic              suspend_data
);

  logic              write_enb_reg;
  logic              fifo_full, fifo_empty;
  logic              parity_done, low_packet_valid;
  logic [ROUTER_DATA_W-1:0] dout;
  logic [N_OUT-1:0]  write_enb, full, empty;
  reg_ctrl_t         ctrl;

  initial assert (N_OUT >= 1 && N_OUT <= (1 << ROUTER_ADDR_W))
    else $error("router_1x5: N_OUT must be 1..4");

  fsm_router #(.N_OUT(N_OUT), .ADDR_W(ROUTER_ADDR_W)) u_fsm (
    .clock, .resetn, .packet_valid,
    .addr_in          (data_in[ROUTER_ADDR_W-1:0]),
    .fifo_full, .fifo_empty, .parity_done, .low_packet_valid,
    .write_enb_reg, .suspend_data, .ctrl
  );

  router_reg #(.DATA_W(ROUTER_DATA_W)) u_reg (
    .clock, .resetn, .packet_valid, .data_in, .fifo_full, .ctrl,
    .parity_done, .low_packet_valid, .err, .dout
  );

  ff_sync #(.N_OUT(N_OUT), .ADDR_W(ROUTER_ADDR_W)) u_sync (
    .clock, .resetn,
    .addr_in          (data_in[ROUTER_ADDR_W-1:0]),
    .detect_add       (ctrl.detect_add),
    .packet_valid, .write_enb_reg, .full, .empty,
    .write_enb, .fifo_full, .fifo_empty, .vld_out
  );

  for (genvar i = 0; i < N_OUT; i++) begin : g_fifo
    router_fifo #(.DATA_W(ROUTER_DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clock, .resetn,
      .write_enb (write_enb[i]),
      .read_enb  (read_enb[i]),
      .data_in   (dout),
      .data_out  (data_out[i]),
      .full      (full[i]),
      .empty     (empty[i])
    );
  end

  // Bytes are only written to the FIFO the controller selected.
  always_ff @(posedge clock)
    if (resetn) assert ($countones(write_enb) <= 1)
      else $error("router_1x5: more than one FIFO written");

endmodule
