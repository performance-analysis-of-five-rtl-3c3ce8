// router_reg: data, status and parity registers of the router.
//
// Bytes on the input port pass through dout, a one-byte register that
// feeds all FIFOs, so every byte is written into the FIFO one clock after
// it is latched. Driven by the controller's per-state strobes (ctrl):
//   - header: latched into first_byte while detect_add and packet_valid
//     are high, copied to dout in LOAD_FIRST_DATA;
//   - payload and parity: latched into dout from data_in in LOAD_DATA (and
//     LOAD_PARITY) while fifo_full is low;
//   - a byte taken in LOAD_DATA while the FIFO is full is kept in
//     full_state_byte and copied to dout in LOAD_AFTER_FULL.
// internal_parity is the XOR of the header and of every payload byte
// (a byte taken in LOAD_DATA with packet_valid high). The byte taken with
// packet_valid low is the packet's parity byte and is kept in
// packet_parity. In CHECK_PARITY_ERROR (reset_int_reg) err is loaded with
// the result of comparing the two, and the parity and status registers
// are cleared; err then holds until the next packet's check.
//
// Status outputs for the controller:
//   low_packet_valid goes high when packet_valid is seen low in LOAD_DATA;
//   parity_done goes high when the parity byte has been latched to dout,
//   either in LOAD_DATA (FIFO not full) or in LOAD_AFTER_FULL after a stall.
// The full_state strobe needs no action here: nothing is latched while the
// FIFO is full. All outputs are registered. resetn is active low and synchronous and
// clears dout, err, parity_done and low_packet_valid as specified (and the
// internal registers, which is this design's choice). The set/clear rules
// follow the specification; the separate packet_parity register and err
// holding its value until the next check are this design's choices.
module router_reg
  import router_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic              packet_valid,
  input  logic [DATA_W-1:0] data_in,
  input  logic              fifo_full,
  input  reg_ctrl_t         ctrl,
  output logic              parity_done,
  output logic              low_packet_valid,
  output logic              err,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] first_byte;
  logic [DATA_W-1:0] full_state_byte;
  logic [DATA_W-1:0] internal_parity;
  logic [DATA_W-1:0] packet_parity;

  // Header hold and the byte taken while the FIFO is full.
  always_ff @(posedge clock) begin
    if (!resetn) begin
      first_byte      <= '0;
      full_state_byte <= '0;
    end else begin
      if (ctrl.detect_add && packet_valid)
        first_byte <= data_in;
      if (ctrl.ld_state && fifo_full)
        full_state_byte <= data_in;
    end
  end

  // Output data register feeding the FIFOs.
  always_ff @(posedge clock) begin
    if (!resetn)
      dout <= '0;
    else if (ctrl.lfd_state)
      dout <= first_byte;
    else if ((ctrl.ld_state || ctrl.lp_state) && !fifo_full)
      dout <= data_in;
    else if (ctrl.laf_state)
      dout <= full_state_byte;
  end

  // Status registers.
  always_ff @(posedge clock) begin
    if (!resetn || ctrl.reset_int_reg) begin
      parity_done      <= 1'b0;
      low_packet_valid <= 1'b0;
    end else begin
      if ((ctrl.ld_state && !fifo_full && !packet_valid) ||
          (ctrl.laf_state && low_packet_valid && !parity_done))
        parity_done <= 1'b1;
      if (ctrl.ld_state && !packet_valid)
        low_packet_valid <= 1'b1;
    end
  end

  // Parity accumulation, capture of the packet's parity byte, error flag.
  always_ff @(posedge clock) begin
    if (!resetn) begin
      internal_parity <= '0;
      packet_parity   <= '0;
      err             <= 1'b0;
    end else if (ctrl.reset_int_reg) begin
      err             <= (internal_parity != packet_parity);
      internal_parity <= '0;
      packet_parity   <= '0;
    end else begin
      if (ctrl.lfd_state)
        internal_parity <= internal_parity ^ first_byte;
      else if (ctrl.ld_state && packet_valid)
        internal_parity <= internal_parity ^ data_in;
      if (ctrl.ld_state && !packet_valid && !fifo_full)
        packet_parity <= data_in;
      else if (ctrl.laf_state && low_packet_valid && !parity_done)
        packet_parity <= full_state_byte;
    end
  end

endmodule
