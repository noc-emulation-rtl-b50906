// tb_stochastic_tr: self-checking test of the statistics receptor.
//
// The bench sends packets of chosen lengths and time stamps on the link, with
// idle cycles between flits, and keeps its own sums of the latencies
// (arrival time of the tail minus the stamp, modulo 2^13). It then reads the
// packet, flit, latency-sum, minimum and maximum registers and compares them.
// Cases include the shortest packet (time-stamp flit is the tail) and a time
// stamp that wraps around 2^13. The stall counter must equal the idle cycles
// the bench inserts inside packets, not those between packets.
module tb_stochastic_tr;
  import emu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  ib_req_t     ib_req;
  logic [31:0] ib_rdata;
  ctrl_t       ctrl;
  logic [31:0] now;
  link_fwd_t   link_i;
  link_bwd_t   link_o;
  int checks = 0, failures = 0;

  stochastic_tr #(.SLOT(9'd12)) dut (.clk, .rst_n, .ib_req, .ib_rdata, .ctrl, .now, .link_i, .link_o);

  always #5 clk = ~clk;

  task automatic ib_read(input int r, output logic [31:0] d);
    @(negedge clk);
    ib_req = '0; ib_req.re = 1'b1; ib_req.addr = {9'd12, 4'(r)};
    #1 d = ib_rdata;
    @(negedge clk);
    ib_req = '0;
  endtask
  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s = %0d, expected %0d", what, got, exp); end
  endtask

  longint exp_sum = 0, exp_flits = 0, exp_stalls = 0;
  int     exp_min = 8191, exp_max = 0, exp_pkts = 0;

  // send one flit in the coming cycle, check it is acknowledged
  task automatic send_flit(input logic [15:0] f);
    @(negedge clk);
    link_i.req = 1'b1; link_i.replay = 1'b0; link_i.data = f;
    #1;
    checks++;
    if (!(link_o.ack_valid && link_o.ack)) begin failures++; $display("FAIL: flit not acknowledged"); end
    exp_flits++;
  endtask

  // packet whose tail arrives when now == t_tail; stamp ts
  task automatic send_packet(input int len, input int ts, input int idle);
    int lat;
    for (int i = 0; i < len; i++) begin
      logic [15:0] f;
      if (i == 0) f = head_flit(4'd3, 4'd1, CMD_DATA);
      else begin
        f = '0;
        f[15:14] = (i == len - 1) ? FT_TAIL : FT_BODY;
        f[12:0]  = (i == 1) ? 13'(ts) : 13'(i);
      end
      send_flit(f);
      if (i == len - 1) begin
        lat = (now - ts) & 8191;
        exp_sum += lat;
        exp_pkts++;
        if (lat < exp_min) exp_min = lat;
        if (lat > exp_max) exp_max = lat;
      end
      if (idle > 0) begin
        @(negedge clk); link_i = '0;
        repeat (idle - 1) @(negedge clk);
        if (i != len - 1) exp_stalls += idle;
      end
    end
    @(negedge clk); link_i = '0;
    repeat (2) @(negedge clk);          // gap between packets: not a stall
  endtask

  logic [31:0] rv;
  initial begin
    ib_req = '0; ctrl = '0; link_i = '0;
    now = 32'd1000;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); ctrl.clear = 1'b1; @(negedge clk); ctrl.clear = 1'b0;
    send_packet(5, 990, 0);
    now = 32'd2000;
    send_packet(2, 1977, 0);
    now = 32'd8200;            // stamp before the 13-bit wrap
    send_packet(7, 8180, 1);
    now = 32'd3000;
    send_packet(15, 2993, 0);
    for (int k = 0; k < 20; k++) begin
      now = 32'd5000 + 32'(k * 37);
      send_packet(3 + (k % 9), 5000 + k * 37 - (k * 7 % 40), k % 3);
    end
    ib_read(0, rv); expect_eq("PACKETS", rv, exp_pkts);
    ib_read(1, rv); expect_eq("FLITS", rv, exp_flits);
    ib_read(2, rv); expect_eq("LAT_SUM", rv, exp_sum);
    ib_read(3, rv); expect_eq("LAT_MIN", rv, exp_min);
    ib_read(4, rv); expect_eq("LAT_MAX", rv, exp_max);
    ib_read(5, rv); expect_eq("STALLS", rv, exp_stalls);
    ib_read(6, rv); expect_eq("unused register", rv, 0);
    // clear
    @(negedge clk); ctrl.clear = 1'b1; @(negedge clk); ctrl.clear = 1'b0;
    ib_read(0, rv); expect_eq("PACKETS after clear", rv, 0);
    ib_read(2, rv); expect_eq("LAT_SUM after clear", rv, 0);
    ib_read(5, rv); expect_eq("STALLS after clear", rv, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
