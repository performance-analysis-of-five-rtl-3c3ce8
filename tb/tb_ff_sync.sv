// tb_ff_sync: self-checking test of the address latch and FIFO steering.
//
// Two instances are driven with the same random stimulus: the default
// four-output one and a three-output one, whose address 3 has no FIFO and
// must return fifo_empty = 0, fifo_full = 1. A reference address register
// kept here (loaded on detect_add & packet_valid) predicts, every cycle,
// which FIFO receives write_enb, which flags are returned (from the address
// on the input during detect_add, from the latched address otherwise) and
// vld_out = ~empty.
module tb_ff_sync;
  logic       clock = 1'b0;
  logic       resetn, detect_add, packet_valid, write_enb_reg;
  logic [1:0] addr_in;
  logic [3:0] full, empty;
  logic [3:0] we4, vld4;
  logic [2:0] we3, vld3;
  logic       ff4, fe4, ff3, fe3;
  logic [1:0] ref_addr;
  int         checks = 0, failures = 0;

  ff_sync dut4 (
    .clock, .resetn, .addr_in, .detect_add, .packet_valid, .write_enb_reg,
    .full, .empty, .write_enb(we4), .fifo_full(ff4), .fifo_empty(fe4),
    .vld_out(vld4));

  ff_sync #(.N_OUT(3)) dut3 (
    .clock, .resetn, .addr_in, .detect_add, .packet_valid, .write_enb_reg,
    .full(full[2:0]), .empty(empty[2:0]), .write_enb(we3), .fifo_full(ff3),
    .fifo_empty(fe3), .vld_out(vld3));

  always #5 clock = ~clock;

  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    logic [1:0] sel;
    sel = detect_add ? addr_in : ref_addr;
    check(fe4 == empty[sel] && ff4 == full[sel], "flags, 4 outputs");
    check(we4 == (write_enb_reg ? 4'(1) << ref_addr : 4'b0), "write_enb, 4 outputs");
    check(vld4 == ~empty, "vld_out, 4 outputs");
    if (sel == 2'd3)
      check(fe3 == 1'b0 && ff3 == 1'b1, "unrouted address flags");
    else
      check(fe3 == empty[sel] && ff3 == full[sel], "flags, 3 outputs");
    check(we3 == (write_enb_reg ? 3'(4'(1) << ref_addr) : 3'b0), "write_enb, 3 outputs");
    check(vld3 == ~empty[2:0], "vld_out, 3 outputs");
  endtask

  initial begin
    resetn = 1'b0; detect_add = 1'b1; packet_valid = 1'b1; addr_in = 2'd2;
    write_enb_reg = 1'b0; full = '0; empty = '1;
    @(posedge clock); #1;
    ref_addr = 2'd0;
    resetn = 1'b1; detect_add = 1'b0;
    compare();
    for (int i = 0; i < 4000; i++) begin
      detect_add    = 1'($urandom_range(0, 3) == 0);
      packet_valid  = 1'($urandom);
      write_enb_reg = detect_add ? 1'b0 : 1'($urandom);
      addr_in       = 2'($urandom);
      full          = 4'($urandom);
      empty         = 4'($urandom);
      #1 compare();
      @(posedge clock);
      if (detect_add && packet_valid) ref_addr = addr_in;
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
