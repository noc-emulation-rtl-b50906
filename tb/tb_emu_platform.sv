// tb_emu_platform: end-to-end test of the emulation platform.
//
// The bench plays the control processor on OPB and connects the platform's
// links to the behavioural network (tb_noc_model). With the platform at its
// default size (4 stochastic and 4 trace-driven generator/receptor pairs) it
// runs one complete emulation, the way the control software would:
//  1. configures the stochastic generators (on/off bursts, packet lengths
//     5..15 flits, two of them aimed at the same receptor), the slave
//     receptors (reply latency, read length, statistics interval) and streams
//     read/write descriptors into the trace-driven generators;
//  2. starts the emulation, stops it half way and checks that time and
//     traffic freeze, resumes it and waits until the control module reports
//     all generators done;
//  3. reads every statistic back over OPB and compares it with what the
//     bench saw on the links: packets and flits per generator and receptor,
//     latency sums recomputed from time stamps, not-acknowledged flits, the
//     global congestion counter, stall cycles inside packets at the
//     stochastic receptors, refused heads at the slave receptors,
//     descriptors of the slave receptors, replies.
// It counts how often each mechanism happened (retransmission, wormhole
// contention, slave head refusal, reply, refused and resent reply flit,
// reply received by a generator, interval snapshot, stop/resume,
// burst off-periods) and fails if one never did.
module tb_emu_platform;
  import emu_pkg::*;

  localparam int NS = 4, NTR = 4, NT = NS + NTR;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int NUM_PK = 30;     // packets per stochastic generator
  localparam int NDESC  = 12;     // descriptors per trace-driven generator

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        opb_select, opb_rnw;
  logic [31:0] opb_abus, opb_dbus, sl_dbus;
  logic        sl_xferack;
  link_fwd_t   tg_fwd [NT];
  link_bwd_t   tg_bwd [NT];
  link_fwd_t   tr_fwd [NT];
  link_bwd_t   tr_bwd [NT];
  link_fwd_t   rsp_fwd [NTR];
  link_bwd_t   rsp_bwd [NTR];
  link_fwd_t   tg_rsp_fwd [NTR];
  link_bwd_t   tg_rsp_bwd [NTR];
  int checks = 0, failures = 0;

  emu_platform dut (
    .clk, .rst_n, .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .sl_dbus, .sl_xferack,
    .tg_fwd, .tg_bwd, .tr_fwd, .tr_bwd, .rsp_fwd, .rsp_bwd, .tg_rsp_fwd, .tg_rsp_bwd
  );

  tb_noc_model #(.NT(NT), .N_TRACE(NTR), .REFUSE_PCT(10)) u_net (
    .clk, .rst_n, .tg_fwd, .tg_bwd, .tr_fwd, .tr_bwd, .rsp_fwd, .rsp_bwd, .tg_rsp_fwd, .tg_rsp_bwd
  );

  always #5 clk = ~clk;

  // ---------------- OPB master ----------------
  task automatic opb(input logic rnw, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    opb_select = 1'b1; opb_rnw = rnw; opb_abus = a; opb_dbus = rnw ? '0 : d;
    q = '0;
    for (int c = 0; c < 10; c++) begin
      @(posedge clk); #1;
      if (sl_xferack) begin q = sl_dbus; break; end
      if (c == 9) begin failures++; $display("FAIL: no OPB acknowledge at %h", a); end
    end
    @(negedge clk);
    opb_select = 1'b0; opb_rnw = 1'b0; opb_abus = '0; opb_dbus = '0;
  endtask
  task automatic ctl_wr(input int r, input logic [31:0] d);
    logic [31:0] q; opb(1'b0, BASE + 32'(4 * r), d, q);
  endtask
  task automatic ctl_rd(input int r, output logic [31:0] q);
    opb(1'b1, BASE + 32'(4 * r), '0, q);
  endtask
  task automatic unit_wr(input int slot, input int r, input logic [31:0] d);
    logic [31:0] q; opb(1'b0, BASE + 32'h8000 + 32'(4 * (slot * 16 + r)), d, q);
  endtask
  task automatic unit_rd(input int slot, input int r, output logic [31:0] q);
    opb(1'b1, BASE + 32'h8000 + 32'(4 * (slot * 16 + r)), '0, q);
  endtask
  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s = %0d, expected %0d", what, got, exp); end
  endtask

  // ---------------- link monitors ----------------
  wire [31:0] now = dut.now;
  wire        running = dut.u_ctrl.running;
  int tg_pkts[NT], tg_flits[NT], tg_nacks[NT], tg_replays[NT];
  int tr_pkts[NT], tr_flits[NT];
  longint tr_latsum[NT];
  int tr_ts[NT], tr_first[NT];
  int cong_cycles = 0, contention = 0, slave_refusals = 0, replies = 0, reply_bad = 0;
  int tr_inpkt[NT], tr_stalls[NT];
  int flits_while_stopped = 0, stopped_cycles = 0;
  int rsp_flits = 0, rsp_nacks = 0;
  int tg_rep_flits[NTR], tg_rep_pkts[NTR], tg_rep_first[NTR], tg_rep_ts[NTR];
  longint tg_rep_lat[NTR];
  int rsp_len[NTR];

  always @(posedge clk) if (rst_n) begin
    bit any_nack;
    any_nack = 0;
    for (int k = 0; k < NT; k++) begin
      if (tg_fwd[k].req) begin
        if (tg_bwd[k].ack) begin
          tg_flits[k]++;
          if (flit_type(tg_fwd[k].data) == FT_TAIL) tg_pkts[k]++;
          if (tg_fwd[k].replay) tg_replays[k]++;
        end else begin
          tg_nacks[k]++;
          any_nack = 1;
        end
      end
      if (!(tr_fwd[k].req && tr_bwd[k].ack) && tr_inpkt[k]) tr_stalls[k]++;
      if (tr_fwd[k].req) begin
        if (!tr_bwd[k].ack) slave_refusals++;
        else begin
          tr_flits[k]++;
          tr_inpkt[k] = (flit_type(tr_fwd[k].data) != FT_TAIL);
          if (tr_first[k] == 1) tr_ts[k] = int'(tr_fwd[k].data[TS_W-1:0]);
          tr_first[k] = (flit_type(tr_fwd[k].data) == FT_HEAD) ? 1 : 0;
          if (flit_type(tr_fwd[k].data) == FT_TAIL) begin
            tr_pkts[k]++;
            tr_latsum[k] += (now - tr_ts[k]) & 8191;
          end
        end
      end
    end
    if (any_nack && running) cong_cycles++;
    // wormhole contention: a head refused while its destination is locked
    for (int k = 0; k < NT; k++)
      if (tg_fwd[k].req && !tg_bwd[k].ack && flit_type(tg_fwd[k].data) == FT_HEAD &&
          u_net.lockv[tg_fwd[k].data[13:10]]) contention++;
    for (int i = 0; i < NTR; i++) if (rsp_fwd[i].req && !rsp_bwd[i].ack) rsp_nacks++;
    for (int j = 0; j < NTR; j++) if (tg_rsp_fwd[j].req) begin
      tg_rep_flits[j]++;
      if (tg_rep_first[j] == 1) tg_rep_ts[j] = int'(tg_rsp_fwd[j].data[TS_W-1:0]);
      tg_rep_first[j] = (flit_type(tg_rsp_fwd[j].data) == FT_HEAD) ? 1 : 0;
      if (flit_type(tg_rsp_fwd[j].data) == FT_TAIL) begin
        tg_rep_pkts[j]++;
        tg_rep_lat[j] += (now - tg_rep_ts[j]) & 8191;
      end
    end
    for (int i = 0; i < NTR; i++) if (rsp_fwd[i].req && rsp_bwd[i].ack) begin
      if (flit_type(rsp_fwd[i].data) == FT_HEAD) begin
        replies++;
        rsp_len[i] = 1;
        // a reply goes back to a trace-driven generator
        if (int'(rsp_fwd[i].data[13:10]) < NS || rsp_fwd[i].data[5:4] != CMD_RESP) reply_bad++;
      end else rsp_len[i]++;
      rsp_flits++;
    end
    if (!running) begin
      stopped_cycles++;
      for (int k = 0; k < NT; k++) if (tg_fwd[k].req) flits_while_stopped++;
    end
  end

  // ---------------- test ----------------
  int  tdst[NTR] = '{5, 5, 7, 4};      // trace generator i (id 4+i) -> receptor id
  int  sdst[NS]  = '{1, 1, 3, 0};      // stochastic generator -> receptor id
  int  n_read = 0, n_write = 0;
  logic [31:0] rv, t0;
  int  bursts_off = 0;
  int  st_prev[NS];

  // on/off Markov chain: count bursts that ended in the OFF state
  always @(posedge clk) if (rst_n) begin
    int st[NS];
    st[0] = int'(dut.g_stoch[0].u_tg.state);
    st[1] = int'(dut.g_stoch[1].u_tg.state);
    st[2] = int'(dut.g_stoch[2].u_tg.state);
    st[3] = int'(dut.g_stoch[3].u_tg.state);
    for (int k = 0; k < NS; k++) begin
      if (st_prev[k] == 2 && st[k] == 0) bursts_off++;
      st_prev[k] = st[k];
    end
  end

  initial begin
    opb_select = 0; opb_rnw = 0; opb_abus = 0; opb_dbus = 0;
    for (int k = 0; k < NS; k++) st_prev[k] = 0;
    for (int k = 0; k < NT; k++) begin
      tg_pkts[k] = 0; tg_flits[k] = 0; tg_nacks[k] = 0; tg_replays[k] = 0;
      tr_pkts[k] = 0; tr_flits[k] = 0; tr_latsum[k] = 0; tr_ts[k] = 0; tr_first[k] = 0;
      tr_inpkt[k] = 0; tr_stalls[k] = 0;
    end
    for (int i = 0; i < NTR; i++) begin
      tg_rep_flits[i] = 0; tg_rep_pkts[i] = 0; tg_rep_first[i] = 0; tg_rep_ts[i] = 0; tg_rep_lat[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // stochastic generators: lengths 5..15, interval 0..7, bursts
    for (int k = 0; k < NS; k++) begin
      unit_wr(k, 0, 16); unit_wr(k, 1, 5); unit_wr(k, 2, 32'h1000 + 77 * k);
      unit_wr(k, 3, 8);  unit_wr(k, 4, 0); unit_wr(k, 5, 32'h2000 + 91 * k);
      unit_wr(k, 6, 64); unit_wr(k, 7, 24); unit_wr(k, 8, sdst[k]); unit_wr(k, 9, NUM_PK);
    end
    // slave receptors: reply after 6 cycles (receptor 6 after 45), 4-flit read replies, 400-cycle intervals
    for (int i = 0; i < NTR; i++) begin
      unit_wr(NT + NS + i, 2, (i == 2) ? 45 : 6); unit_wr(NT + NS + i, 3, 4); unit_wr(NT + NS + i, 4, 400);
    end
    ctl_wr(0, 32'h1);    // reset: clears all units
    ctl_wr(0, 32'h2);    // start
    // trace-driven generators: descriptors streamed at run time,
    // alternating reads and writes
    for (int j = 0; j < NDESC; j++) begin
      for (int i = 0; i < NTR; i++) begin
        int cmd, len, dly;
        cmd = (j % 2 == 0) ? 2 : 1;
        len = (cmd == 2) ? 2 : 3 + (j % 4);
        dly = 5 + ((i * 7 + j * 13) % 40);
        if (cmd == 2) n_read++; else n_write++;
        // generators 2 and 3 send every third request to receptor 6, a
        // slow slave, so that its late replies meet those of another slave
        unit_wr(NS + i, 0, {16'(dly), 4'((i >= 2 && j % 3 == 2) ? 6 : tdst[i]), 2'(cmd), 8'(len), 2'b00});
      end
    end
    for (int i = 0; i < NTR; i++) unit_wr(NS + i, 6, 1);   // end of trace
    ctl_rd(0, rv); expect_eq("not all done before traces end", rv[1], 0);
    repeat (100) @(negedge clk);
    ctl_wr(0, 32'h4);    // stop
    ctl_rd(1, t0);
    repeat (50) @(negedge clk);
    ctl_rd(1, rv); expect_eq("time frozen while stopped", rv, t0);
    ctl_wr(0, 32'h8);    // resume
    for (int w = 0; w < 400; w++) begin
      ctl_rd(0, rv);
      if (rv[1]) break;
      repeat (20) @(negedge clk);
    end
    expect_eq("all generators done", rv[1], 1);
    repeat (60) @(negedge clk);   // let the last flits and replies drain
    ctl_wr(0, 32'h4);    // stop

    // ---- generators ----
    for (int k = 0; k < NS; k++) begin
      unit_rd(k, 10, rv); expect_eq("stoch TG SENT_PACKETS", rv, NUM_PK);
      expect_eq("stoch TG packets on link", tg_pkts[k], NUM_PK);
      unit_rd(k, 11, rv); expect_eq("stoch TG SENT_FLITS", rv, tg_flits[k]);
      unit_rd(k, 12, rv); expect_eq("stoch TG NACK_FLITS", rv, tg_nacks[k]);
    end
    for (int i = 0; i < NTR; i++) begin
      unit_rd(NS + i, 2, rv); expect_eq("trace TG SENT_PACKETS", rv, NDESC);
      unit_rd(NS + i, 4, rv); expect_eq("trace TG NACK_FLITS", rv, tg_nacks[NS + i]);
    end
    // ---- stochastic receptors ----
    begin
      int sum_tr = 0, sum_st = 0;
      for (int k = 0; k < NS; k++) begin
        unit_rd(NT + k, 0, rv); expect_eq("stoch TR PACKETS", rv, tr_pkts[k]); sum_tr += rv;
        unit_rd(NT + k, 1, rv); expect_eq("stoch TR FLITS", rv, tr_flits[k]);
        unit_rd(NT + k, 2, rv); expect_eq("stoch TR LAT_SUM", rv, tr_latsum[k]);
        unit_rd(NT + k, 5, rv); expect_eq("stoch TR STALLS", rv, tr_stalls[k]); sum_st += rv;
      end
      $display("INFO link stall cycles at stochastic receptors=%0d", sum_st);
      checks++; if (sum_st == 0) begin failures++; $display("FAIL: no stalled packet at a receptor"); end
      expect_eq("all stochastic packets delivered", sum_tr, NS * NUM_PK);
      expect_eq("receptor 1 gets two generators", tr_pkts[1], 2 * NUM_PK);
    end
    // ---- slave receptors ----
    begin
      int sum_pk = 0, n_desc = 0, bad_desc = 0, n_ovf = 0, n_ref = 0;
      for (int i = 0; i < NTR; i++) begin
        int slot;
        slot = NT + NS + i;
        unit_rd(slot, 13, rv); expect_eq("slave TR PACKETS", rv, tr_pkts[NS + i]); sum_pk += rv;
        unit_rd(slot, 1, rv);
        for (int j = 0, n = int'(rv); j < n; j++) begin
          unit_rd(slot, 0, rv);
          n_desc++;
          if (rv[18:15] < NS || rv[14:13] == 0) bad_desc++;
        end
        unit_rd(slot, 12, rv);
        n_ovf += rv;
        unit_rd(slot, 14, rv);
        n_ref += rv;
        unit_rd(slot, 11, rv);
        checks++;
        if (rv == 0) begin failures++; $display("FAIL: no interval snapshot in slave %0d", i); end
      end
      expect_eq("all requests delivered", sum_pk, NTR * NDESC);
      expect_eq("slave REFUSED", n_ref, slave_refusals);
      expect_eq("descriptors read + overflowed", n_desc + n_ovf, NTR * NDESC);
      $display("INFO descriptor queue overflows=%0d", n_ovf);
      checks++; if (n_ovf == 0) begin failures++; $display("FAIL: no descriptor queue overflow"); end
      expect_eq("bad descriptors", bad_desc, 0);
      expect_eq("one reply per request", replies, NTR * NDESC);
      expect_eq("replies to trace generators", reply_bad, 0);
      expect_eq("reply flits (4 per read, 2 per write)", rsp_flits, 4 * n_read + 2 * n_write);
      // replies as received by the trace-driven generators
      begin
        int sum_rep = 0;
        for (int i = 0; i < NTR; i++) begin
          unit_rd(NS + i, 7, rv); expect_eq("trace TG REPLIES", rv, tg_rep_pkts[i]); sum_rep += rv;
          unit_rd(NS + i, 8, rv); expect_eq("trace TG REPLY_FLITS", rv, tg_rep_flits[i]);
          unit_rd(NS + i, 9, rv); expect_eq("trace TG REPLY_LAT_SUM", rv, tg_rep_lat[i]);
        end
        expect_eq("every reply reached its generator", sum_rep, NTR * NDESC);
      end
    end
    // ---- control module ----
    ctl_rd(2, rv); expect_eq("CONGESTION", rv, cong_cycles);
    ctl_rd(4, rv);
    checks++;
    if (rv == 0) begin failures++; $display("FAIL: RUNTIME not recorded"); end
    $display("INFO runtime=%0d cycles congestion=%0d", rv, cong_cycles);
    expect_eq("no flits while stopped", flits_while_stopped, 0);

    // ---- mechanisms ----
    begin
      int rep = 0, nk = 0;
      for (int k = 0; k < NT; k++) begin rep += tg_replays[k]; nk += tg_nacks[k]; end
      $display("INFO mechanisms: nacks=%0d replays=%0d contention=%0d slave_refusals=%0d replies=%0d stopped_cycles=%0d",
               nk, rep, contention, slave_refusals, replies, stopped_cycles);
      checks++; if (nk == 0)             begin failures++; $display("FAIL: no refused flit"); end
      checks++; if (rep == 0)            begin failures++; $display("FAIL: no retransmission"); end
      checks++; if (contention == 0)     begin failures++; $display("FAIL: no wormhole contention"); end
      checks++; if (slave_refusals == 0) begin failures++; $display("FAIL: no slave head refusal"); end
      checks++; if (replies == 0)        begin failures++; $display("FAIL: no reply"); end
      $display("INFO refused reply flits=%0d", rsp_nacks);
      checks++; if (rsp_nacks == 0)      begin failures++; $display("FAIL: no reply retransmission"); end
      $display("INFO bursts ended in OFF=%0d", bursts_off);
      checks++; if (bursts_off == 0)     begin failures++; $display("FAIL: no on/off burst"); end
      checks++; if (stopped_cycles < 50) begin failures++; $display("FAIL: no stop/resume"); end
    end
    // on/off: a stochastic generator has spent time in its OFF state
    for (int k = 0; k < NS; k++) begin
      unit_rd(k, 13, rv);
      expect_eq("stoch TG done status", rv[0], 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
