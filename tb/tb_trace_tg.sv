// tb_trace_tg: self-checking test of the trace-driven traffic generator.
//
// The bench writes packet descriptors over the internal bus, runs the
// generator against a receiver that acknowledges every flit (or refuses some)
// and checks each packet it sees against the descriptor that produced it:
// destination, command, length, and the release spacing, which must equal
// the descriptor's delay when the link is free, or the previous packet's
// length plus one cycle when the delay is shorter than the packet. It also
// fills the queue past its depth and checks the drop counter and status.
// Finally it sends reply packets into the reply input, with idle cycles
// between some flits, and checks the reply counters and latency sum against
// the stamps it wrote.
module tb_trace_tg;
  import emu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  ib_req_t     ib_req;
  logic [31:0] ib_rdata;
  ctrl_t       ctrl;
  logic [31:0] now;
  link_fwd_t   link_o;
  link_bwd_t   link_i;
  link_fwd_t   rsp_i;
  link_bwd_t   rsp_o;
  logic        done, nack;
  int checks = 0, failures = 0;

  localparam int DEPTH = 8;

  trace_tg #(.SLOT(9'd5), .NODE_ID(4'd2), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .ib_req, .ib_rdata, .ctrl, .now, .link_o, .link_i,
    .rsp_link_i(rsp_i), .rsp_link_o(rsp_o), .done, .nack
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (ctrl.clear)    now <= '0;
    else if (ctrl.run) now <= now + 1;
  end

  int offers = 0;
  bit refuse_mode = 0;
  assign link_i.ack_valid = link_o.req;
  assign link_i.ack       = !(refuse_mode && (offers % 2 == 0));

  int          cyc = 0, n_pkt = 0, cur_len = 0, nacks = 0;
  int          pkt_len[64], pkt_head[64];
  logic [15:0] pkt_hdr[64];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (link_o.req) begin
      offers <= offers + 1;
      if (!link_i.ack) nacks <= nacks + 1;
      else if (flit_type(link_o.data) == FT_HEAD) begin
        pkt_head[n_pkt] <= cyc; pkt_hdr[n_pkt] <= link_o.data; cur_len <= 1;
      end else begin
        cur_len <= cur_len + 1;
        if (flit_type(link_o.data) == FT_TAIL) begin
          pkt_len[n_pkt] <= cur_len + 1; n_pkt <= n_pkt + 1;
        end
      end
    end
  end

  task automatic ib_write(input int r, input logic [31:0] d);
    @(negedge clk);
    ib_req = '0; ib_req.we = 1'b1; ib_req.addr = {9'd5, 4'(r)}; ib_req.wdata = d;
    @(negedge clk);
    ib_req = '0;
  endtask
  task automatic ib_read(input int r, output logic [31:0] d);
    @(negedge clk);
    ib_req = '0; ib_req.re = 1'b1; ib_req.addr = {9'd5, 4'(r)};
    #1 d = ib_rdata;
    @(negedge clk);
    ib_req = '0;
  endtask
  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s = %0d, expected %0d", what, got, exp); end
  endtask
  function automatic logic [31:0] desc(input int delay, input int dst, input int cmd, input int len);
    return {16'(delay), 4'(dst), 2'(cmd), 8'(len), 2'b00};
  endfunction

  int dly[6] = '{3, 20, 2, 15, 0, 30};
  int dst[6] = '{1, 6, 3, 0, 7, 5};
  int cmd[6] = '{1, 2, 1, 2, 1, 2};
  int len[6] = '{4, 3, 6, 2, 5, 4};
  logic [31:0] rv;

  initial begin
    ib_req = '0; ctrl = '0; now = '0; rsp_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); ctrl.clear = 1'b1; @(negedge clk); ctrl.clear = 1'b0;
    for (int i = 0; i < 6; i++) ib_write(0, desc(dly[i], dst[i], cmd[i], len[i]));
    ib_read(1, rv);
    expect_eq("queue fill", rv[7:0], 6);
    expect_eq("not done with queue filled", rv[31], 0);
    ib_write(6, 1);
    @(negedge clk); ctrl.run = 1'b1;
    for (int i = 0; i < 400 && !(done && n_pkt == 6); i++) @(negedge clk);
    ctrl.run = 1'b0;
    expect_eq("packets", n_pkt, 6);
    for (int i = 0; i < 6; i++) begin
      expect_eq("dest", pkt_hdr[i][13:10], dst[i]);
      expect_eq("src", pkt_hdr[i][9:6], 2);
      expect_eq("cmd", pkt_hdr[i][5:4], cmd[i]);
      expect_eq("length", pkt_len[i], len[i]);
      if (i > 0) begin
        int exp_gap;
        exp_gap = (dly[i] > len[i-1]) ? dly[i] : len[i-1] + 1;
        expect_eq("release spacing", pkt_head[i] - pkt_head[i-1], exp_gap);
      end
    end
    ib_read(2, rv); expect_eq("SENT_PACKETS", rv, 6);
    ib_read(3, rv); expect_eq("SENT_FLITS", rv, 24);
    ib_read(1, rv); expect_eq("done when drained", rv[31], 1);

    // refused flits and queue overflow
    @(negedge clk); ctrl.clear = 1'b1; @(negedge clk); ctrl.clear = 1'b0;
    n_pkt = 0; nacks = 0;
    for (int i = 0; i < DEPTH + 2; i++) ib_write(0, desc(1, 4, 1, 3));
    ib_read(5, rv); expect_eq("DROPPED", rv, 2);
    ib_read(1, rv); expect_eq("queue full", rv[7:0], DEPTH);
    ib_read(1, rv); expect_eq("not done before end mark", rv[31], 0);
    ib_write(6, 1);
    refuse_mode = 1;
    @(negedge clk); ctrl.run = 1'b1;
    for (int i = 0; i < 400 && !(done && n_pkt == DEPTH); i++) @(negedge clk);
    ctrl.run = 1'b0;
    refuse_mode = 0;
    expect_eq("packets after refusals", n_pkt, DEPTH);
    ib_read(4, rv); expect_eq("NACK_FLITS", rv, nacks);
    checks++;
    if (nacks == 0) begin failures++; $display("FAIL: no refusals"); end

    // replies from slave cores
    begin
      int r_flits = 0, r_lat = 0, age;
      @(negedge clk); ctrl.clear = 1'b1; @(negedge clk); ctrl.clear = 1'b0;
      ctrl.run = 1'b1;
      repeat (50) @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        int n;
        n   = (p % 2 == 0) ? 4 : 2;           // read or write reply
        age = 7 + 3 * p;
        for (int f = 0; f < n; f++) begin
          rsp_i.req = 1'b1; rsp_i.replay = 1'b0;
          if (f == 0)      rsp_i.data = head_flit(4'd2, 4'd6, CMD_RESP);
          else begin
            rsp_i.data = '0;
            rsp_i.data[15:14] = (f == n - 1) ? FT_TAIL : FT_BODY;
            if (f == 1) rsp_i.data[12:0] = 13'(now - 32'(age));
          end
          #1;
          checks++;
          if (!(rsp_o.ack_valid && rsp_o.ack)) begin failures++; $display("FAIL: reply flit refused"); end
          if (f == 1) r_lat += age;
          if (f == n - 1) r_lat += n - 2;      // cycles from stamp flit to tail
          r_flits++;
          @(negedge clk);
          if (f == 1 && p == 2) begin rsp_i = '0; repeat (2) @(negedge clk); r_lat += 2; end
        end
        rsp_i = '0;
        repeat (p) @(negedge clk);
      end
      ctrl.run = 1'b0;
      ib_read(7, rv); expect_eq("REPLIES", rv, 5);
      ib_read(8, rv); expect_eq("REPLY_FLITS", rv, r_flits);
      ib_read(9, rv); expect_eq("REPLY_LAT_SUM", rv, r_lat);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
