// tb_stochastic_tg: self-checking test of the stochastic traffic generator.
//
// The bench plays the internal bus, the control module (run/clear and the
// emulation time) and the network (a receiver that acknowledges flits, or
// refuses some of them). A monitor splits the flit stream into packets and
// records, per packet, its length, head and tail cycles, header fields and
// time stamp. The expected packet lengths and intervals are computed from a
// model of the 16-bit Galois LFSR written here, independently of the RTL.
// Tests: fixed-length back-to-back packets with exact timing and time stamps;
// LFSR-drawn lengths and intervals; retransmission after refused flits;
// pause and resume; on/off bursts; register read-back and counters.
module tb_stochastic_tg;
  import emu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  ib_req_t     ib_req;
  logic [31:0] ib_rdata;
  ctrl_t       ctrl;
  logic [31:0] now;
  link_fwd_t   link_o;
  link_bwd_t   link_i;
  logic        done, nack;

  int checks = 0, failures = 0;

  stochastic_tg #(.SLOT(9'd3), .NODE_ID(4'd9)) dut (
    .clk, .rst_n, .ib_req, .ib_rdata, .ctrl, .now, .link_o, .link_i, .done, .nack
  );

  always #5 clk = ~clk;

  // emulation time: counts running cycles
  always_ff @(posedge clk) begin
    if (ctrl.clear)    now <= '0;
    else if (ctrl.run) now <= now + 1;
  end

  // receiver: refuses a flit when refuse_mode and the offer counter hits
  int offers = 0;
  bit refuse_mode = 0;
  assign link_i.ack_valid = link_o.req;
  assign link_i.ack       = !(refuse_mode && (offers % 3 == 1));

  // monitor
  int          cyc = 0;
  int          n_pkt = 0, cur_len = 0, nacks_seen = 0, replays_seen = 0;
  int          pkt_len [256];
  int          pkt_head[256];
  int          pkt_tail[256];
  int          pkt_ts  [256];
  int          pkt_now [256];
  logic [15:0] pkt_hdr [256];
  logic [15:0] last_refused;
  bit          was_refused = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (link_o.req) begin
      offers <= offers + 1;
      if (was_refused) begin
        checks++;
        if (!link_o.replay || link_o.data != last_refused) begin
          failures++;
          $display("FAIL: retransmitted flit %h replay=%0b, expected %h", link_o.data, link_o.replay, last_refused);
        end
      end
      if (!link_i.ack) begin
        nacks_seen <= nacks_seen + 1;
        was_refused  = 1;
        last_refused = link_o.data;
      end else begin
        was_refused = 0;
        if (link_o.replay) replays_seen <= replays_seen + 1;
        if (flit_type(link_o.data) == FT_HEAD) begin
          pkt_head[n_pkt] <= cyc;
          pkt_hdr[n_pkt]  <= link_o.data;
          pkt_now[n_pkt]  <= now;
          cur_len <= 1;
        end else begin
          if (cur_len == 1) pkt_ts[n_pkt] <= int'(link_o.data[TS_W-1:0]);
          cur_len <= cur_len + 1;
          if (flit_type(link_o.data) == FT_TAIL) begin
            pkt_len[n_pkt]  <= cur_len + 1;
            pkt_tail[n_pkt] <= cyc;
            n_pkt <= n_pkt + 1;
          end
        end
      end
    end
  end

  // ---- helpers ----
  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
  endfunction

  task automatic ib_write(input int r, input logic [31:0] d);
    @(negedge clk);
    ib_req = '0;
    ib_req.we = 1'b1;
    ib_req.addr = {9'd3, 4'(r)};
    ib_req.wdata = d;
    @(negedge clk);
    ib_req = '0;
  endtask

  task automatic ib_read(input int r, output logic [31:0] d);
    @(negedge clk);
    ib_req = '0;
    ib_req.re = 1'b1;
    ib_req.addr = {9'd3, 4'(r)};
    #1 d = ib_rdata;
    @(negedge clk);
    ib_req = '0;
  endtask

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic do_clear();
    @(negedge clk);
    ctrl.run = 1'b0; ctrl.clear = 1'b1;
    @(negedge clk);
    ctrl.clear = 1'b0;
    n_pkt = 0;
  endtask

  task automatic run_until_done(input int max_cycles);
    @(negedge clk);
    ctrl.run = 1'b1;
    for (int i = 0; i < max_cycles && !done; i++) @(negedge clk);
    ctrl.run = 1'b0;
  endtask

  // ---- test sequence ----
  logic [31:0] rv;
  logic [15:0] s1, s2;

  initial begin
    ib_req = '0;
    ctrl = '0;
    now = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1: fixed length 5, no interval, 4 packets to node 7
    ib_write(0, 5); ib_write(1, 5); ib_write(3, 0); ib_write(4, 0);
    ib_write(6, 0); ib_write(7, 256); ib_write(8, 7); ib_write(9, 4);
    ib_read(8, rv);  expect_eq("DEST read-back", rv, 7);
    ib_read(7, rv);  expect_eq("P_OFF_ON read-back", rv, 256);
    do_clear();
    run_until_done(500);
    expect_eq("done after 4 packets", done, 1);
    expect_eq("packets seen", n_pkt, 4);
    for (int p = 0; p < 4; p++) begin
      expect_eq("length", pkt_len[p], 5);
      expect_eq("tail-head", pkt_tail[p] - pkt_head[p], 4);
      expect_eq("dest field", pkt_hdr[p][13:10], 7);
      expect_eq("src field", pkt_hdr[p][9:6], 9);
      expect_eq("time stamp", pkt_ts[p], (pkt_now[p] - 1) % 8192);
      if (p > 0) expect_eq("tail to next head", pkt_head[p] - pkt_tail[p-1], 2);
    end
    ib_read(10, rv); expect_eq("SENT_PACKETS", rv, 4);
    ib_read(11, rv); expect_eq("SENT_FLITS", rv, 20);
    ib_read(12, rv); expect_eq("NACK_FLITS", rv, 0);

    // 2: drawn lengths 5..14 and intervals 3..10 from the two LFSRs
    s1 = 16'hACE1; s2 = 16'h1234;
    ib_write(0, 15); ib_write(1, 5); ib_write(2, s1);
    ib_write(3, 11); ib_write(4, 3); ib_write(5, s2); ib_write(9, 12);
    do_clear();
    run_until_done(2000);
    expect_eq("packets seen (drawn)", n_pkt, 12);
    // the OFF cycle that starts the burst steps LFSR 2 once
    s2 = lfsr_next(s2);
    for (int p = 0; p < 12; p++) begin
      expect_eq("drawn length", pkt_len[p], 5 + (s1 % 10));
      s1 = lfsr_next(s1);
      if (p > 0) begin
        expect_eq("drawn interval", pkt_head[p] - pkt_tail[p-1], 2 + 3 + (s2 % 8));
        s2 = lfsr_next(s2);
      end
    end

    // 3: refused flits are retransmitted with replay and counted
    ib_write(0, 6); ib_write(1, 6); ib_write(3, 0); ib_write(4, 0); ib_write(9, 5);
    do_clear();
    nacks_seen = 0;
    refuse_mode = 1;
    run_until_done(2000);
    refuse_mode = 0;
    expect_eq("packets with refusals", n_pkt, 5);
    for (int p = 0; p < 5; p++) expect_eq("length with refusals", pkt_len[p], 6);
    ib_read(12, rv); expect_eq("NACK_FLITS", rv, nacks_seen);
    checks++;
    if (nacks_seen < 5) begin failures++; $display("FAIL: too few refusals %0d", nacks_seen); end
    ib_read(11, rv); expect_eq("SENT_FLITS counts accepted only", rv, 30);

    // 4: pause mid-packet, req drops, then resume
    ib_write(0, 40); ib_write(1, 40); ib_write(9, 1);
    do_clear();
    @(negedge clk); ctrl.run = 1'b1;
    repeat (10) @(negedge clk);
    ctrl.run = 1'b0;
    repeat (2) @(negedge clk);
    expect_eq("req low while paused", link_o.req, 0);
    expect_eq("nothing finished while paused", n_pkt, 0);
    run_until_done(200);
    expect_eq("paused packet completes", n_pkt, 1);
    expect_eq("paused packet length", pkt_len[0], 40);

    // 5: on/off bursts: with P_ON_OFF = 128 bursts have ~2 packets
    ib_write(0, 5); ib_write(1, 5); ib_write(3, 0); ib_write(4, 0);
    ib_write(6, 128); ib_write(7, 16); ib_write(9, 60);
    do_clear();
    run_until_done(20000);
    expect_eq("packets in on/off run", n_pkt, 60);
    begin
      int bursts = 1;
      for (int p = 1; p < 60; p++) if (pkt_head[p] - pkt_tail[p-1] > 2) bursts++;
      checks++;
      if (bursts < 15 || bursts > 50) begin
        failures++;
        $display("FAIL: %0d bursts for 60 packets, expected about 30", bursts);
      end
      $display("on/off: %0d bursts", bursts);
    end
    ib_read(13, rv); expect_eq("STATUS done", rv[0], 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
