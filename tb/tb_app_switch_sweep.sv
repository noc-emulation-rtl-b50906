// tb_app_switch_sweep: the mesh-of-switches experiment run on the platform.
//
// Four stochastic generator/receptor pairs (the corner units of a 2x3 mesh)
// are driven through the whole platform at its default size, with the
// behavioural crossbar standing in for the switches. For each configuration
// the bench, acting as the control software, resets the platform, programs
// fixed-length packets of L flits, bursts of on average B packets
// (P_ON_OFF = 256 / B) and a constant number of packets per generator,
// starts the emulation, waits for the control module to report all
// generators done, and reads back the receptors' packet counts and latency
// sums. Generators 0 and 1 share receptor 2 and generators 2 and 3 share
// receptor 0, so packets also wait for each other.
//
// Part 1 sweeps L = 5, 10, 15 against B = 3, 9, 15 and prints the average
// latency of each point. Part 2 runs the exploration loop of the emulation
// flow: a dichotomic search over L = 5..15 (B = 9) for the largest packet
// length whose average latency stays within a 19-cycle constraint, then one
// more emulation at L + 1 to confirm it breaks the constraint.
//
// Checks per emulation: every generator sent its packets and their flits
// (L each), the receptors received them all, and each receptor's latency sum
// equals the sum the bench recomputes from the time stamps it sees arrive.
// The latencies themselves depend on the stand-in network and are printed,
// not compared with anything.
module tb_app_switch_sweep;
  import emu_pkg::*;

  localparam int NS = 4, NTR = 4, NT = NS + NTR;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int NUM_PK = 24;
  localparam int LAT_CONSTRAINT = 19;

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

  // receptor-side monitor: latency sums recomputed from the stamps
  wire [31:0] now = dut.now;
  longint mon_latsum [NS];
  int     mon_ts [NS], mon_first [NS];
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NS; k++) if (tr_fwd[k].req && tr_bwd[k].ack) begin
      if (mon_first[k] == 1) mon_ts[k] = int'(tr_fwd[k].data[TS_W-1:0]);
      mon_first[k] = (flit_type(tr_fwd[k].data) == FT_HEAD) ? 1 : 0;
      if (flit_type(tr_fwd[k].data) == FT_TAIL) mon_latsum[k] += (now - mon_ts[k]) & 8191;
    end
  end

  int sdst[NS] = '{2, 2, 0, 0};
  int emulations = 0;

  // one emulation; returns the average latency times 100
  task automatic emulate(input int L, input int B, output int avg_x100);
    logic [31:0] rv;
    longint lat = 0, pk = 0;
    for (int k = 0; k < NS; k++) begin mon_latsum[k] = 0; mon_first[k] = 0; end
    ctl_wr(0, 32'h1);                      // reset
    for (int k = 0; k < NS; k++) begin
      unit_wr(k, 0, L + 1); unit_wr(k, 1, L);          // fixed length L
      unit_wr(k, 2, 32'h0100 + 17 * k + L); unit_wr(k, 5, 32'h0200 + 29 * k + B);
      unit_wr(k, 3, 0); unit_wr(k, 4, 0);
      unit_wr(k, 6, (256 + B / 2) / B); unit_wr(k, 7, 32);
      unit_wr(k, 8, sdst[k]); unit_wr(k, 9, NUM_PK);
    end
    ctl_wr(0, 32'h2);                      // start
    for (int i = 0; i < NTR; i++) unit_wr(NS + i, 6, 1);   // trace units: empty trace
    for (int w = 0; w < 2000; w++) begin
      ctl_rd(0, rv);
      if (rv[1]) break;
      repeat (16) @(negedge clk);
    end
    expect_eq("all generators done", rv[1], 1);
    repeat (10) @(negedge clk);
    ctl_wr(0, 32'h4);                      // stop
    for (int k = 0; k < NS; k++) begin
      unit_rd(k, 10, rv); expect_eq("SENT_PACKETS", rv, NUM_PK);
      unit_rd(k, 11, rv); expect_eq("SENT_FLITS", rv, NUM_PK * L);
      unit_rd(NT + k, 0, rv); pk += rv;
      unit_rd(NT + k, 2, rv); lat += rv;
      expect_eq("receptor latency sum", rv, mon_latsum[k]);
    end
    expect_eq("packets received", pk, NS * NUM_PK);
    avg_x100 = int'((lat * 100) / (pk == 0 ? 1 : pk));
    emulations++;
  endtask

  int Ls[3] = '{5, 10, 15};
  int Bs[3] = '{3, 9, 15};
  int res[3][3];

  initial begin
    int a, lo, hi, mid, a_next, searches;
    opb_select = 0; opb_rnw = 0; opb_abus = 0; opb_dbus = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // part 1: sweep
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        emulate(Ls[i], Bs[j], a);
        res[i][j] = a;
        $display("INFO L=%0d B=%0d average latency %0d.%02d cycles", Ls[i], Bs[j], a / 100, a % 100);
      end
    // longer packets take longer to cross: average latency grows with L
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (!(res[0][j] < res[1][j] && res[1][j] < res[2][j])) begin
        failures++; $display("FAIL: latency not increasing with L at B=%0d", Bs[j]);
      end
    end

    // part 2: dichotomic search for the largest L within the constraint
    lo = 5; hi = 15; searches = 0;
    emulate(lo, 9, a);
    checks++;
    if (a > LAT_CONSTRAINT * 100) begin failures++; $display("FAIL: L=5 already violates the constraint"); end
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      emulate(mid, 9, a);
      searches++;
      $display("INFO search: L=%0d average latency %0d.%02d", mid, a / 100, a % 100);
      if (a <= LAT_CONSTRAINT * 100) lo = mid; else hi = mid - 1;
    end
    $display("INFO search result: L=%0d after %0d emulations", lo, searches);
    checks++;
    if (searches > 4) begin failures++; $display("FAIL: search took %0d steps", searches); end
    if (lo < 15) begin
      emulate(lo + 1, 9, a_next);
      checks++;
      if (a_next <= LAT_CONSTRAINT * 100) begin failures++; $display("FAIL: L=%0d also meets the constraint", lo + 1); end
    end
    $display("INFO emulations run: %0d", emulations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
