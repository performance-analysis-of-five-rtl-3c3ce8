// tb_router_1x5: end-to-end test of the five-port router at its default
// size (one input, four 8 x 16 output FIFOs).
//
// A sender streams packets (header with a random destination in bits
// [1:0], 0..24 payload bytes, parity byte) following the suspend_data rule:
// it moves to the next byte only after a rising edge at which
// suspend_data was low. Some packets carry a wrong parity byte. Four
// receivers read their ports at random rates, some slowly enough to fill
// their FIFO. A scoreboard per port checks every byte read, in order,
// against the bytes sent to that port; err is checked after every packet's
// parity check; the router's occupancy of the input (n + 5 clocks for n
// payload bytes when it neither waits nor stalls) and the delay from the
// header being taken to vld_out (two clock edges) are checked.
// Each mechanism of the router must occur at least once: waiting for an
// empty FIFO, a FIFO-full stall, the resume paths after a stall (back to
// LOAD_DATA, to LOAD_PARITY, and straight to the parity check), a parity
// error, a packet without payload, and a packet to each port.
module tb_router_1x5;
  import router_pkg::*;

  localparam int N_OUT = 4;
  localparam int N_PKT = 600;

  logic       clock = 1'b0;
  logic       resetn, packet_valid;
  logic [7:0] data_in;
  logic [N_OUT-1:0] read_enb, vld_out;
  logic [7:0] data_out [N_OUT];
  logic       err, suspend_data;
  int         checks = 0, failures = 0;

  router_1x5 dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (400000) @(posedge clock);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- stimulus stream ----------------
  typedef struct { logic [7:0] d; bit pv; int pkt; } item_t;
  item_t      stream[$];
  logic [7:0] expq [N_OUT][$];      // bytes each port must deliver
  bit         bad_parity[$];        // per packet, in send order
  int         payload_len[$];
  int         n_zero = 0, n_bad = 0, n_port[N_OUT], n_unrouted = 0;

  initial begin
    for (int p = 0; p < N_PKT; p++) begin
      int n, gap;
      logic [7:0] hdr, par, b;
      bit bad;
      logic [1:0] a;
      a   = 2'($urandom);
      if (32'(a) >= N_OUT) begin
        // no FIFO for this address: header and payload all decode as
        // address a, so the whole packet is dropped
        n = $urandom_range(0, 6);
        stream.push_back('{{6'($urandom), a}, 1'b1, -1});
        repeat (n) stream.push_back('{{6'($urandom), a}, 1'b1, -1});
        stream.push_back('{8'($urandom), 1'b0, -1});
        n_unrouted++;
        continue;
      end
      n   = (p % 9 == 4) ? 0 : $urandom_range(1, 24);
      hdr = {6'($urandom), a};
      bad = ($urandom_range(0, 9) == 0);
      par = hdr;
      stream.push_back('{hdr, 1'b1, p});
      expq[a].push_back(hdr);
      for (int i = 0; i < n; i++) begin
        b = 8'($urandom);
        par ^= b;
        stream.push_back('{b, 1'b1, p});
        expq[a].push_back(b);
      end
      if (bad) par ^= 8'(1 << $urandom_range(0, 7));
      stream.push_back('{par, 1'b0, p});
      expq[a].push_back(par);
      bad_parity.push_back(bad);
      payload_len.push_back(n);
      if (n == 0) n_zero++;
      if (bad) n_bad++;
      n_port[a]++;
      gap = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 4) : 0;
      repeat (gap) stream.push_back('{8'hxx, 1'b0, -1});
    end
  end

  // ---------------- sender ----------------
  bit taken;
  always @(posedge clock) taken <= resetn && !suspend_data;

  initial begin
    resetn = 1'b0; packet_valid = 1'b0; data_in = '0;
    repeat (3) @(posedge clock);
    @(negedge clock) resetn = 1'b1;
    packet_valid = stream[0].pv; data_in = stream[0].d;
    forever begin
      @(negedge clock);
      if (taken && stream.size() != 0) begin
        void'(stream.pop_front());
        if (stream.size() != 0) begin
          packet_valid = stream[0].pv; data_in = stream[0].d;
        end else begin
          packet_valid = 1'b0; data_in = '0;
        end
      end
    end
  end

  // ---------------- receivers ----------------
  int  slow[N_OUT];          // read probability per port, percent
  bit  pending[N_OUT];
  int  delivered = 0, total_bytes;

  initial begin
    read_enb = '0;
    foreach (pending[i]) pending[i] = 0;
    @(posedge resetn);
    total_bytes = 0;
    for (int i = 0; i < N_OUT; i++) total_bytes += expq[i].size();
    forever begin
      @(negedge clock);
      for (int i = 0; i < N_OUT; i++) begin
        if (pending[i]) begin
          logic [7:0] e;
          if (expq[i].size() == 0) begin
            check(0, "byte read with none expected");
          end else begin
            e = expq[i].pop_front();
            check(data_out[i] == e, $sformatf("port %0d data", i));
          end
          delivered++;
        end
        // change each port's reading speed now and then
        if ($urandom_range(0, 299) == 0) slow[i] = $urandom_range(3, 100);
        read_enb[i] = ($urandom_range(1, 100) <= slow[i]);
      end
    end
  end
  always @(posedge clock)
    for (int i = 0; i < N_OUT; i++) pending[i] <= read_enb[i] && vld_out[i];

  initial for (int i = 0; i < N_OUT; i++) slow[i] = 60;

  // ---------------- monitors ----------------
  fsm_state_e st, st_prev;
  int  pkt_idx = 0, occupancy = 0, occ_pkt_n;
  bit  in_pkt = 0, pkt_stalled = 0, check_err_next = 0, cur_bad;
  int  cnt_wte = 0, cnt_ffs = 0, cnt_laf_ld = 0, cnt_laf_lp = 0,
       cnt_laf_cpe = 0, cnt_lp_ffs = 0, cnt_err = 0, cnt_timed = 0,
       cnt_vld_timed = 0, cnt_unrouted = 0;
  int  vld_wait = -1;
  logic [1:0] cur_addr;

  assign st = dut.u_fsm.state;

  always @(posedge clock) begin
    if (!resetn) begin
      st_prev <= DECODE_ADDRESS;
    end else begin
      st_prev <= st;
      if (check_err_next) begin
        check(err == cur_bad, "err after parity check");
        if (err) cnt_err++;
        check_err_next <= 0;
      end
      // vld_out of a port that was empty two edges after the header edge
      if (vld_wait == 0) begin
        check(vld_out[cur_addr], "vld_out two edges after header");
        cnt_vld_timed++;
      end
      if (vld_wait >= 0) vld_wait <= vld_wait - 1;
      if (in_pkt) occupancy <= occupancy + 1;
      case (st)
        DECODE_ADDRESS:
          if (packet_valid && 32'(data_in[1:0]) >= N_OUT) begin
            cnt_unrouted++;
          end else if (packet_valid) begin
            in_pkt      <= 1;
            occupancy   <= 1;
            pkt_stalled <= 0;
            cur_addr    <= data_in[1:0];
            occ_pkt_n   <= payload_len[pkt_idx];
            cur_bad     <= bad_parity[pkt_idx];
            // an empty FIFO the sender cannot see being read yet
            if (!vld_out[data_in[1:0]] && !read_enb[data_in[1:0]])
              vld_wait <= 2;
          end
        WAIT_TILL_EMPTY: begin
          pkt_stalled <= 1;
          if (st_prev != WAIT_TILL_EMPTY) cnt_wte++;
        end
        FIFO_FULL_STATE: begin
          pkt_stalled <= 1;
          if (st_prev != FIFO_FULL_STATE) cnt_ffs++;
          if (st_prev == LOAD_PARITY) cnt_lp_ffs++;
        end
        LOAD_DATA:   if (st_prev == LOAD_AFTER_FULL) cnt_laf_ld++;
        LOAD_PARITY: if (st_prev == LOAD_AFTER_FULL) cnt_laf_lp++;
        CHECK_PARITY_ERROR: begin
          if (st_prev == LOAD_AFTER_FULL) cnt_laf_cpe++;
          check_err_next <= 1;
          in_pkt <= 0;
          pkt_idx <= pkt_idx + 1;
          if (!pkt_stalled) begin
            check(occupancy + 1 == occ_pkt_n + 5, "input occupancy n+5");
            cnt_timed++;
          end
        end
        default: ;
      endcase
    end
  end

  // ---------------- end of test ----------------
  initial begin
    @(posedge resetn);
    wait (pkt_idx == N_PKT - n_unrouted);
    repeat (3) @(posedge clock);
    read_enb = '1;
    foreach (slow[i]) slow[i] = 100;
    repeat (200) @(posedge clock);
    for (int i = 0; i < N_OUT; i++) begin
      check(expq[i].size() == 0, $sformatf("port %0d delivered everything", i));
      check(n_port[i] > 0, $sformatf("packet sent to port %0d", i));
    end
    check(delivered == total_bytes, "byte count");
    $display("packets=%0d bytes=%0d wait_till_empty=%0d fifo_full=%0d laf->ld=%0d laf->lp=%0d laf->cpe=%0d lp->full=%0d parity_err=%0d/%0d zero_payload=%0d timed=%0d vld_timed=%0d unrouted=%0d/%0d",
             pkt_idx, delivered, cnt_wte, cnt_ffs, cnt_laf_ld, cnt_laf_lp,
             cnt_laf_cpe, cnt_lp_ffs, cnt_err, n_bad, n_zero, cnt_timed,
             cnt_vld_timed, cnt_unrouted, n_unrouted);
    check(cnt_wte > 0, "WAIT_TILL_EMPTY occurred");
    check(cnt_ffs > 0, "FIFO_FULL_STATE occurred");
    check(cnt_laf_ld > 0, "resume to LOAD_DATA occurred");
    check(cnt_laf_lp > 0, "resume to LOAD_PARITY occurred");
    check(cnt_laf_cpe > 0, "resume to CHECK_PARITY_ERROR occurred");
    check(cnt_lp_ffs > 0, "full FIFO in LOAD_PARITY occurred");
    check(cnt_err > 0 && cnt_err == n_bad, "every parity error flagged");
    check(n_zero > 0, "packet without payload");
    check(cnt_timed > 0 && cnt_vld_timed > 0, "timing checked");
    if (N_OUT < 4) check(n_unrouted > 0 && cnt_unrouted > 0, "unrouted packets dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
