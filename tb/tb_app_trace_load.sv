// tb_app_trace_load: the complete-NoC experiment run on the platform.
//
// Four trace-driven generators act as processing cores and four slave
// receptors as memories, through the whole platform at its default size,
// with the behavioural crossbar standing in for the network. Generators 0
// and 1 (ids 4, 5) use memory 4, generators 2 and 3 use memory 5, so the two
// busy slaves push back when their replies pile up.
//
// The bench, acting as the control software, starts one emulation and
// streams read/write descriptors into the generators at run time, changing
// the offered load every statistics interval: six levels, from a packet
// every 40 cycles to one every 13 cycles per generator. Each descriptor is
// written shortly before it is due; like real control software, the bench
// also tracks the fill of each generator's queue (reading STATUS when its
// estimate gets high) and holds descriptors back rather than overflow it.
// When the network saturates, generators fall behind and the backlog waits.
// After each interval it reads the slaves' snapshot registers over the bus
// and prints, per load level, the read, write and overall average latency
// and the share of packets that arrived within the 14-cycle limit (the
// acknowledgment ratio).
//
// The interval is 2,000 cycles instead of the 1,000,000 of the original
// experiment, so that six levels simulate in seconds; the register is
// written like any other setting. Checks: the reset values of INTERVAL and
// LAT_LIMIT; every snapshot equal to counts and latency sums the bench
// recomputes from what arrives at the slaves, bucketed by interval; every
// descriptor sent; and a higher average latency at the highest load than at
// the lowest.
module tb_app_trace_load;
  import emu_pkg::*;

  localparam int NS = 4, NTR = 4, NT = NS + NTR;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int IVL = 2000;
  localparam int NLEV = 6;

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
  tb_noc_model #(.NT(NT), .N_TRACE(NTR), .REFUSE_PCT(5)) u_net (
    .clk, .rst_n, .tg_fwd, .tg_bwd, .tr_fwd, .tr_bwd, .rsp_fwd, .rsp_bwd, .tg_rsp_fwd, .tg_rsp_bwd
  );

  always #5 clk = ~clk;

  task automatic opb(input logic rnw, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    opb_select = 1'b1; opb_rnw = rnw; opb_abus = a; opb_dbus = rnw ? '0 : d;
    q = '0;
    for (int c = 0; c < 10; c++) begin
      @(posedge clk); #1;
      if (sl_xferack) begin q = sl_dbus; break; end
    end
    @(negedge clk);
    opb_select = 1'b0; opb_rnw = 1'b0; opb_abus = '0; opb_dbus = '0;
  endtask
  task automatic ctl_wr(input int r, input logic [31:0] d);
    logic [31:0] q; opb(1'b0, BASE + 32'(4 * r), d, q);
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

  // slave-side monitor, bucketed by interval (interval n: now in [n*IVL, (n+1)*IVL))
  wire [31:0] now = dut.now;
  wire        units_run = dut.u_ctrl.running && !dut.u_ctrl.clear_q;
  int     m_rd[NTR][NLEV + 2], m_wr[NTR][NLEV + 2], m_on[NTR][NLEV + 2];
  longint m_rdl[NTR][NLEV + 2], m_wrl[NTR][NLEV + 2];
  int     m_ts[NTR], m_first[NTR], m_cmd[NTR];
  always @(posedge clk) if (rst_n && units_run) begin
    for (int i = 0; i < NTR; i++) begin
      int k, b, lat;
      k = NS + i;
      if (tr_fwd[k].req && tr_bwd[k].ack) begin
        if (m_first[i] == 1) m_ts[i] = int'(tr_fwd[k].data[TS_W-1:0]);
        m_first[i] = (flit_type(tr_fwd[k].data) == FT_HEAD) ? 1 : 0;
        if (flit_type(tr_fwd[k].data) == FT_HEAD) m_cmd[i] = int'(tr_fwd[k].data[5:4]);
        if (flit_type(tr_fwd[k].data) == FT_TAIL) begin
          lat = (now - m_ts[i]) & 8191;
          b = now / IVL;
          if (b < NLEV + 2) begin
            if (m_cmd[i] == CMD_READ) begin m_rd[i][b]++; m_rdl[i][b] += lat; end
            else begin m_wr[i][b]++; m_wrl[i][b] += lat; end
            if (lat <= 14) m_on[i][b]++;
          end
        end
      end
    end
  end

  int dly[NLEV] = '{40, 30, 24, 20, 16, 13};
  int tdst[NS] = '{4, 4, 5, 5};
  int next_rel[NS], nsent[NS], seq[NS], est[NS];
  int avg_lo, avg_hi;

  initial begin
    logic [31:0] rv;
    opb_select = 0; opb_rnw = 0; opb_abus = 0; opb_dbus = 0;
    for (int i = 0; i < NTR; i++) begin
      m_ts[i] = 0; m_first[i] = 0; m_cmd[i] = 0;
      for (int b = 0; b < NLEV + 2; b++) begin
        m_rd[i][b] = 0; m_wr[i][b] = 0; m_on[i][b] = 0; m_rdl[i][b] = 0; m_wrl[i][b] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    unit_rd(NT + NS, 4, rv); expect_eq("INTERVAL reset value", rv, 1000000);
    unit_rd(NT + NS, 5, rv); expect_eq("LAT_LIMIT reset value", rv, 14);
    for (int i = 0; i < NTR; i++) begin
      unit_wr(NT + NS + i, 2, 4);      // reply latency
      unit_wr(NT + NS + i, 3, 4);      // read reply length
      unit_wr(NT + NS + i, 4, IVL);
    end
    // stochastic units: one packet each, then done
    for (int k = 0; k < NS; k++) begin
      unit_wr(k, 8, k); unit_wr(k, 9, 1);
    end
    ctl_wr(0, 32'h2);                   // start
    for (int g = 0; g < NS; g++) begin next_rel[g] = 20 + 3 * g; nsent[g] = 0; seq[g] = 0; est[g] = 0; end

    for (int lev = 0; lev < NLEV; lev++) begin
      // stream descriptors for this interval, each about 60 cycles ahead
      while (now < (lev + 1) * IVL - 60) begin
        for (int g = 0; g < NS; g++) begin
          if (next_rel[g] - int'(now) < 60 && next_rel[g] < (lev + 1) * IVL && est[g] >= 12) begin
            unit_rd(NS + g, 1, rv);
            est[g] = int'(rv[7:0]);
          end
          if (next_rel[g] - int'(now) < 60 && next_rel[g] < (lev + 1) * IVL && est[g] < 16) begin
            int cmd, len, d;
            cmd = (seq[g] % 3 == 0) ? 1 : 2;          // one write, two reads
            len = (cmd == 2) ? 2 : 3 + (seq[g] % 4);
            d   = dly[lev] + ((seq[g] * 7) % 5) - 2;
            unit_wr(NS + g, 0, {16'(d), 4'(tdst[g]), 2'(cmd), 8'(len), 2'b00});
            next_rel[g] += d;
            nsent[g]++; seq[g]++; est[g]++;
          end
        end
        @(negedge clk);
      end
      // wait for the snapshot of this interval, then read it
      while (now < (lev + 1) * IVL + 10) @(negedge clk);
      begin
        longint rdc = 0, rdl = 0, wrc = 0, wrl = 0, onc = 0;
        for (int i = 0; i < NTR; i++) begin
          int s;
          s = NT + NS + i;
          unit_rd(s, 11, rv); expect_eq("INTERVAL_IDX", rv, lev + 1);
          unit_rd(s, 6, rv);  expect_eq("SNAP_RD_CNT", rv, m_rd[i][lev]);  rdc += rv;
          unit_rd(s, 7, rv);  expect_eq("SNAP_RD_LAT", rv, m_rdl[i][lev]); rdl += rv;
          unit_rd(s, 8, rv);  expect_eq("SNAP_WR_CNT", rv, m_wr[i][lev]);  wrc += rv;
          unit_rd(s, 9, rv);  expect_eq("SNAP_WR_LAT", rv, m_wrl[i][lev]); wrl += rv;
          unit_rd(s, 10, rv); expect_eq("SNAP_ONTIME", rv, m_on[i][lev]);  onc += rv;
        end
        if (rdc == 0 || wrc == 0) begin
          failures++; checks++;
          $display("FAIL: level %0d saw no reads or writes", lev);
        end else begin
          int avg;
          avg = int'(((rdl + wrl) * 100) / (rdc + wrc));
          if (lev == 0) avg_lo = avg;
          if (lev == NLEV - 1) avg_hi = avg;
          $display("INFO one packet per %0d cycles: read %0d.%02d  write %0d.%02d  overall %0d.%02d cycles, ack ratio %0d %%",
                   dly[lev], int'(rdl * 100 / rdc) / 100, int'(rdl * 100 / rdc) % 100,
                   int'(wrl * 100 / wrc) / 100, int'(wrl * 100 / wrc) % 100,
                   avg / 100, avg % 100, int'(onc * 100 / (rdc + wrc)));
        end
      end
    end
    for (int g = 0; g < NS; g++) unit_wr(NS + g, 6, 1);     // end of traces
    for (int w = 0; w < 500; w++) begin
      opb(1'b1, BASE, '0, rv);
      if (rv[1]) break;
      repeat (20) @(negedge clk);
    end
    expect_eq("all generators done", rv[1], 1);
    ctl_wr(0, 32'h4);
    for (int g = 0; g < NS; g++) begin
      unit_rd(NS + g, 2, rv); expect_eq("descriptors replayed", rv, nsent[g]);
      unit_rd(NS + g, 5, rv); expect_eq("no descriptor dropped", rv, 0);
    end
    checks++;
    if (avg_hi <= avg_lo) begin failures++; $display("FAIL: latency did not rise with load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NLEV + 2) * IVL + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
