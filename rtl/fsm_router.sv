// fsm_router: controller of the 1x5 router.
//
// An eight-state Moore machine that walks each packet through the data
// registers (router_reg) into the addressed FIFO:
//   DECODE_ADDRESS     idle; on packet_valid with a routable address go to
//                      LOAD_FIRST_DATA if that FIFO is empty, otherwise
//                      WAIT_TILL_EMPTY (a new packet only enters an empty
//                      FIFO).
//   WAIT_TILL_EMPTY    hold the sender until the addressed FIFO is empty.
//   LOAD_FIRST_DATA    move the latched header to dout; always on to
//                      LOAD_DATA.
//   LOAD_DATA          write the held byte to the FIFO and take the next
//                      one; packet_valid low means the byte just taken is
//                      the parity byte (go to LOAD_PARITY); a full FIFO
//                      goes to FIFO_FULL_STATE.
//   LOAD_PARITY        write the parity byte; full FIFO -> FIFO_FULL_STATE,
//                      otherwise CHECK_PARITY_ERROR.
//   FIFO_FULL_STATE    wait while the FIFO is full, then LOAD_AFTER_FULL.
//   LOAD_AFTER_FULL    write the byte that was refused and move the byte
//                      held during the stall to dout; resume in LOAD_DATA
//                      or LOAD_PARITY (from parity_done/low_packet_valid).
//   CHECK_PARITY_ERROR router_reg compares parities and clears its status;
//                      always back to DECODE_ADDRESS.
// The states, their transitions and their outputs follow the router
// specification. The specification gives no exit from LOAD_AFTER_FULL
// when parity_done is already high (the parity byte was refused by a full
// FIFO in LOAD_PARITY); this design goes to CHECK_PARITY_ERROR there, so
// that the parity check and the status clear still happen.
//
// Outputs: suspend_data is low only in DECODE_ADDRESS and LOAD_DATA; the
// sender presents a new byte after every rising edge at which
// suspend_data was low and holds it otherwise. write_enb_reg is high in
// LOAD_DATA, LOAD_PARITY and LOAD_AFTER_FULL. ctrl carries one strobe per
// state for router_reg. All outputs are decoded from the state register
// only. resetn is active low and synchronous and selects DECODE_ADDRESS.
module fsm_router
  import router_pkg::*;
#(
  parameter int unsigned N_OUT  = 4,
  parameter int unsigned ADDR_W = 2
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic              packet_valid,
  input  logic [ADDR_W-1:0] addr_in,          // data_in[1:0]
  input  logic              fifo_full,
  input  logic              fifo_empty,
  input  logic              parity_done,
  input  logic              low_packet_valid,
  output logic              write_enb_reg,
  output logic              suspend_data,
  output reg_ctrl_t         ctrl
);

  fsm_state_e state, next;
  logic       addr_ok;

  assign addr_ok = (32'(addr_in) < N_OUT);

  always_ff @(posedge clock) begin
    if (!resetn) state <= DECODE_ADDRESS;
    else         state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      DECODE_ADDRESS:
        if (packet_valid && addr_ok)
          next = fifo_empty ? LOAD_FIRST_DATA : WAIT_TILL_EMPTY;
      WAIT_TILL_EMPTY:
        if (fifo_empty) next = LOAD_FIRST_DATA;
      LOAD_FIRST_DATA:
        next = LOAD_DATA;
      LOAD_DATA:
        if (fifo_full)          next = FIFO_FULL_STATE;
        else if (!packet_valid) next = LOAD_PARITY;
      LOAD_PARITY:
        next = fifo_full ? FIFO_FULL_STATE : CHECK_PARITY_ERROR;
      FIFO_FULL_STATE:
        if (!fifo_full) next = LOAD_AFTER_FULL;
      LOAD_AFTER_FULL:
        if (parity_done)           next = CHECK_PARITY_ERROR;
        else if (low_packet_valid) next = LOAD_PARITY;
        else                       next = LOAD_DATA;
      CHECK_PARITY_ERROR:
        next = DECODE_ADDRESS;
      default:
        next = DECODE_ADDRESS;
    endcase
  end

  always_comb begin
    ctrl               = '0;
    ctrl.detect_add    = (state == DECODE_ADDRESS);
    ctrl.lfd_state     = (state == LOAD_FIRST_DATA);
    ctrl.ld_state      = (state == LOAD_DATA);
    ctrl.lp_state      = (state == LOAD_PARITY);
    ctrl.full_state    = (state == FIFO_FULL_STATE);
    ctrl.laf_state     = (state == LOAD_AFTER_FULL);
    ctrl.reset_int_reg = (state == CHECK_PARITY_ERROR);
  end

  assign write_enb_reg = (state == LOAD_DATA) || (state == LOAD_PARITY) ||
                         (state == LOAD_AFTER_FULL);
  assign suspend_data  = !((state == DECODE_ADDRESS) || (state == LOAD_DATA));

endmodule
