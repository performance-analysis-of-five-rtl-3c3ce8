// tb_router_fifo: self-checking test of the 8 x 16 router FIFO.
//
// A queue serves as the reference model. The test checks the reset state
// (empty = 1, full = 0, data_out = 0), fills the FIFO to exactly 16 words
// and checks full, checks that a write while full is dropped, drains it and
// checks order and the one-clock read latency, checks that a read while
// empty leaves data_out alone, then runs random simultaneous reads and
// writes, comparing flags every cycle and every read word.
module tb_router_fifo;
  localparam int DW = 8, DEPTH = 16;

  logic          clock = 1'b0;
  logic          resetn, write_enb, read_enb;
  logic [DW-1:0] data_in, data_out;
  logic          full, empty;
  int            checks = 0, failures = 0;
  logic [DW-1:0] model[$];
  logic [DW-1:0] exp_out;

  router_fifo #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One clock: apply controls, let the edge pass, update the model,
  // then compare flags and read data.
  task automatic step(input bit we, input bit re, input logic [DW-1:0] d);
    bit did_rd, did_wr;
    write_enb = we; read_enb = re; data_in = d;
    did_rd = re && model.size() != 0;
    did_wr = we && model.size() != DEPTH;   // a full FIFO takes no write
    if (did_rd) exp_out = model[0];
    @(posedge clock);
    if (did_rd) void'(model.pop_front());
    if (did_wr) model.push_back(d);
    #1;
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    check(data_out == exp_out, "data_out");
  endtask

  initial begin
    resetn = 1'b0; write_enb = 1'b1; read_enb = 1'b0; data_in = 8'hAA;
    exp_out = '0;
    repeat (2) @(posedge clock);
    #1;
    check(empty == 1'b1 && full == 1'b0 && data_out == '0, "reset state");
    resetn = 1'b1;
    // fill
    for (int i = 0; i < DEPTH; i++) step(1, 0, 8'(i * 7 + 1));
    check(full == 1'b1, "full after 16 writes");
    step(1, 0, 8'hEE);                 // dropped
    // drain: data appears the clock after read_enb
    for (int i = 0; i < DEPTH; i++) begin
      step(0, 1, 8'h00);
      check(data_out == 8'(i * 7 + 1), "drain order");
    end
    check(empty == 1'b1, "empty after drain");
    step(0, 1, 8'h00);                 // read while empty: no change
    check(data_out == 8'(15 * 7 + 1), "data_out held on empty read");
    // random traffic
    for (int i = 0; i < 3000; i++)
      step(1'($urandom_range(0, 99) < 55), 1'($urandom_range(0, 99) < 50),
           8'($urandom));
    // reset in the middle of traffic clears everything
    resetn = 1'b0; write_enb = 1'b1; read_enb = 1'b1;
    @(posedge clock); #1;
    resetn = 1'b1; write_enb = 1'b0; read_enb = 1'b0;
    check(empty && !full && data_out == '0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
