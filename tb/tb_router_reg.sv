// tb_router_reg: self-checking test of the router's data, status and
// parity registers.
//
// Part 1 plays two packets through the registers with the strobe sequence
// the controller produces (DECODE_ADDRESS, LOAD_FIRST_DATA, LOAD_DATA...,
// LOAD_PARITY, CHECK_PARITY_ERROR), one with a correct parity byte and one
// with a wrong one, plus a packet that meets a full FIFO in LOAD_DATA, and
// checks the bytes on dout in order, parity_done, low_packet_valid and err.
// Part 2 applies random one-hot strobes, packet_valid, fifo_full and data
// and compares every output with a register model kept in the test.
module tb_router_reg;
  import router_pkg::*;

  logic       clock = 1'b0;
  logic       resetn, packet_valid, fifo_full;
  logic [7:0] data_in, dout;
  reg_ctrl_t  ctrl;
  logic       parity_done, low_packet_valid, err;
  int         checks = 0, failures = 0;

  // model registers
  logic [7:0] m_first, m_fsb, m_ipar, m_ppar, m_dout;
  logic       m_pd, m_lpv, m_err;

  router_reg dut (.*);

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

  task automatic tick(input reg_ctrl_t c, input bit pv, input bit ff,
                      input logic [7:0] d);
    ctrl = c; packet_valid = pv; fifo_full = ff; data_in = d;
    @(posedge clock);
    #1;
  endtask

  function automatic reg_ctrl_t strobe(input int k);
    reg_ctrl_t c;
    c = reg_ctrl_t'(7'(1) << (6 - k));   // k: 0 detect_add ... 6 reset_int_reg
    return c;
  endfunction

  localparam int DA = 0, LFD = 1, LD = 2, LP = 3, FFS = 4, LAF = 5, CPE = 6;

  // Send header + payload + parity through the strobe sequence of an
  // unstalled packet; check each byte as it reaches dout.
  task automatic send_packet(input logic [7:0] hdr, input int n,
                             input bit corrupt);
    logic [7:0] par, b;
    par = hdr;
    tick(strobe(DA), 1, 0, hdr);
    tick(strobe(LFD), 1, 0, 8'h00);
    check(dout == hdr, "header on dout after LOAD_FIRST_DATA");
    for (int i = 0; i < n; i++) begin
      b = 8'($urandom);
      par ^= b;
      tick(strobe(LD), 1, 0, b);
      check(dout == b, "payload on dout");
      check(!parity_done && !low_packet_valid, "status low during payload");
    end
    tick(strobe(LD), 0, 0, corrupt ? ~par : par);
    check(dout == (corrupt ? ~par : par), "parity byte on dout");
    check(parity_done && low_packet_valid, "parity_done and low_packet_valid");
    tick(strobe(LP), 0, 0, corrupt ? ~par : par);
    tick(strobe(CPE), 0, 0, 8'h00);
    check(err == corrupt, "err after parity check");
    check(!parity_done && !low_packet_valid, "status cleared by reset_int_reg");
  endtask

  initial begin
    resetn = 1'b0;
    tick(strobe(LD), 1, 0, 8'h5A);
    check(dout == 0 && !err && !parity_done && !low_packet_valid, "reset");
    resetn = 1'b1;
    send_packet(8'h15, 5, 0);
    send_packet(8'h22, 3, 1);
    check(err == 1'b1, "err holds after check");
    send_packet(8'h07, 0, 0);
    // stall: header, two payload bytes, FIFO full while taking the third
    begin
      logic [7:0] p0, p1, p2, par;
      p0 = 8'h11; p1 = 8'h22; p2 = 8'h44; par = 8'h03 ^ p0 ^ p1 ^ p2;
      tick(strobe(DA), 1, 0, 8'h03);
      tick(strobe(LFD), 1, 0, p0);
      tick(strobe(LD), 1, 0, p0);
      tick(strobe(LD), 1, 1, p1);          // refused write, p1 held aside
      check(dout == p0, "dout kept while FIFO full");
      tick(strobe(FFS), 1, 1, p2);
      tick(strobe(FFS), 1, 0, p2);
      tick(strobe(LAF), 1, 0, p2);
      check(dout == p1, "held byte on dout after LOAD_AFTER_FULL");
      tick(strobe(LD), 1, 0, p2);
      check(dout == p2, "payload resumes after stall");
      tick(strobe(LD), 0, 0, par);
      tick(strobe(LP), 0, 0, par);
      tick(strobe(CPE), 0, 0, 0);
      check(err == 1'b0, "parity correct across a stall");
    end
    // random strobes against the model
    m_first = dut.first_byte; m_fsb = dut.full_state_byte;
    m_ipar = dut.internal_parity; m_ppar = dut.packet_parity;
    m_dout = dout; m_pd = parity_done; m_lpv = low_packet_valid; m_err = err;
    for (int i = 0; i < 4000; i++) begin
      reg_ctrl_t c;
      bit pv, ff;
      logic [7:0] d;
      c = strobe($urandom_range(0, 6)); pv = 1'($urandom); ff = 1'($urandom);
      d = 8'($urandom);
      // model
      if (c.detect_add && pv) m_first <= d;
      if (c.ld_state && ff) m_fsb <= d;
      if (c.lfd_state) m_dout <= m_first;
      else if ((c.ld_state || c.lp_state) && !ff) m_dout <= d;
      else if (c.laf_state) m_dout <= m_fsb;
      if (c.reset_int_reg) begin
        m_pd <= 0; m_lpv <= 0; m_err <= (m_ipar != m_ppar);
        m_ipar <= 0; m_ppar <= 0;
      end else begin
        if ((c.ld_state && !ff && !pv) || (c.laf_state && m_lpv && !m_pd)) m_pd <= 1;
        if (c.ld_state && !pv) m_lpv <= 1;
        if (c.lfd_state) m_ipar <= m_ipar ^ m_first;
        else if (c.ld_state && pv) m_ipar <= m_ipar ^ d;
        if (c.ld_state && !pv && !ff) m_ppar <= d;
        else if (c.laf_state && m_lpv && !m_pd) m_ppar <= m_fsb;
      end
      tick(c, pv, ff, d);
      check(dout == m_dout, "random: dout");
      check(parity_done == m_pd && low_packet_valid == m_lpv, "random: status");
      check(err == m_err, "random: err");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
