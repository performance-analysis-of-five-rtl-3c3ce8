// router_pkg: types and constants shared by the 1x5 packet router.
//
// A packet enters on one 8-bit port as a header byte, one or more payload
// bytes while packet_valid is high, and a final parity byte presented with
// packet_valid low. The two low bits of the header select the output port.
// The parity byte is the XOR of the header and every payload byte. The
// header layout beyond the address bits is not used by the router.
package router_pkg;

  localparam int unsigned ROUTER_DATA_W = 8;   // width of every port and FIFO word
  localparam int unsigned ROUTER_ADDR_W = 2;   // address field: header bits [1:0]

  // Controller states, one per state of the router controller.
  typedef enum logic [2:0] {
    DECODE_ADDRESS     = 3'd0,
    LOAD_FIRST_DATA    = 3'd1,
    LOAD_DATA          = 3'd2,
    LOAD_PARITY        = 3'd3,
    FIFO_FULL_STATE    = 3'd4,
    LOAD_AFTER_FULL    = 3'd5,
    WAIT_TILL_EMPTY    = 3'd6,
    CHECK_PARITY_ERROR = 3'd7
  } fsm_state_e;

  // Per-state strobes from the controller to the data registers.
  typedef struct packed {
    logic detect_add;     // DECODE_ADDRESS: latch header and address
    logic lfd_state;      // LOAD_FIRST_DATA: move header to dout
    logic ld_state;       // LOAD_DATA: move payload/parity to dout
    logic lp_state;       // LOAD_PARITY
    logic full_state;     // FIFO_FULL_STATE
    logic laf_state;      // LOAD_AFTER_FULL: move held byte to dout
    logic reset_int_reg;  // CHECK_PARITY_ERROR: compare and clear status
  } reg_ctrl_t;

endpackage
