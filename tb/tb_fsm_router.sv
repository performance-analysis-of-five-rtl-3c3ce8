// tb_fsm_router: self-checking test of the router controller.
//
// A transition table written here from the controller's specification is
// stepped alongside the DUT under random inputs (biased so every state is
// reached). Each cycle the test compares the seven per-state strobes,
// write_enb_reg and suspend_data with the values the table's state implies.
// It is run with four outputs (all addresses routed) and checks the
// three-output instance separately for the unrouted address 3, which must
// leave the controller in DECODE_ADDRESS. Every state must be visited.
module tb_fsm_router;
  import router_pkg::*;

  logic       clock = 1'b0;
  logic       resetn, packet_valid, fifo_full, fifo_empty;
  logic       parity_done, low_packet_valid;
  logic [1:0] addr_in;
  logic       write_enb_reg, suspend_data, we3, sus3;
  reg_ctrl_t  ctrl, ctrl3;
  int         checks = 0, failures = 0;
  int         visits[8];
  int         unrouted_seen = 0;

  typedef enum int {DA, LFD, LD, LP, FFS, LAF, WTE, CPE} st_t;
  st_t st;

  fsm_router dut (.clock, .resetn, .packet_valid, .addr_in, .fifo_full,
    .fifo_empty, .parity_done, .low_packet_valid, .write_enb_reg,
    .suspend_data, .ctrl);

  fsm_router #(.N_OUT(3)) dut3 (.clock, .resetn, .packet_valid, .addr_in,
    .fifo_full, .fifo_empty, .parity_done, .low_packet_valid,
    .write_enb_reg(we3), .suspend_data(sus3), .ctrl(ctrl3));

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (model state %s) at %0t", what, st.name(), $time);
    end
  endtask

  function automatic st_t model_next(st_t s);
    case (s)
      DA:  return (packet_valid) ? (fifo_empty ? LFD : WTE) : DA;
      WTE: return fifo_empty ? LFD : WTE;
      LFD: return LD;
      LD:  return fifo_full ? FFS : (!packet_valid ? LP : LD);
      LP:  return fifo_full ? FFS : CPE;
      FFS: return fifo_full ? FFS : LAF;
      LAF: return parity_done ? CPE : (low_packet_valid ? LP : LD);
      default: return DA;   // CPE
    endcase
  endfunction

  task automatic compare();
    reg_ctrl_t exp;
    exp = '0;
    exp.detect_add    = (st == DA);
    exp.lfd_state     = (st == LFD);
    exp.ld_state      = (st == LD);
    exp.lp_state      = (st == LP);
    exp.full_state    = (st == FFS);
    exp.laf_state     = (st == LAF);
    exp.reset_int_reg = (st == CPE);
    check(ctrl == exp, "state strobes");
    check(write_enb_reg == (st inside {LD, LP, LAF}), "write_enb_reg");
    check(suspend_data == !(st inside {DA, LD}), "suspend_data");
  endtask

  initial begin
    resetn = 1'b0; packet_valid = 1'b1; fifo_full = 1'b0; fifo_empty = 1'b1;
    parity_done = 1'b0; low_packet_valid = 1'b0; addr_in = 2'd0;
    repeat (2) @(posedge clock);
    #1 st = DA; resetn = 1'b1;
    compare();
    for (int i = 0; i < 6000; i++) begin
      packet_valid     = ($urandom_range(0, 9) < 7);
      fifo_full        = ($urandom_range(0, 9) < 3);
      fifo_empty       = ($urandom_range(0, 9) < 5);
      parity_done      = 1'($urandom);
      low_packet_valid = 1'($urandom);
      addr_in          = 2'($urandom);
      // the three-output controller never leaves DECODE_ADDRESS on address 3
      if (ctrl3.detect_add && addr_in == 2'd3 && packet_valid) begin
        @(posedge clock);
        #1;
        unrouted_seen++;
        check(ctrl3.detect_add, "address 3 not routed with three outputs");
        st = model_next(st);
        visits[st]++;
        compare();
        continue;
      end
      @(posedge clock);
      st = model_next(st);
      visits[st]++;
      #1 compare();
    end
    for (int s = 0; s < 8; s++) check(visits[s] > 0, "every state visited");
    check(unrouted_seen > 0, "unrouted address exercised");
    // synchronous reset returns to DECODE_ADDRESS from any state
    resetn = 1'b0; @(posedge clock); #1 st = DA; compare(); resetn = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
