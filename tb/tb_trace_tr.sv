// tb_trace_tr: self-checking test of the slave traffic receptor.
//
// The bench sends read, write and plain data packets with chosen time stamps
// and checks:
//  * the descriptor queue: one descriptor per packet with latency, source,
//    command and length, popped by bus reads, and the overflow counter when
//    the queue is full;
//  * the reply: destination = request source, RD_LEN flits for a read and 2
//    for a write, head on the reply link exactly RESP_LAT + 2 cycles after
//    the request's tail; a request head arriving while a reply is pending is
//    not acknowledged;
//  * the interval statistics: read/write counts and latency sums and the
//    number of packets within LAT_LIMIT, copied into the snapshot registers
//    at the end of each INTERVAL, and the reset values 1,000,000 and 14;
//    a full 1,000,000-cycle interval is run and the snapshot must land on
//    exactly that cycle;
//  * REFUSED, the count of refused request heads.
// Expected values are kept by the bench as it sends.
module tb_trace_tr;
  import emu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  ib_req_t     ib_req;
  logic [31:0] ib_rdata;
  ctrl_t       ctrl;
  logic [31:0] now;
  link_fwd_t   link_i, rsp_o;
  link_bwd_t   link_o, rsp_i;
  int checks = 0, failures = 0;

  localparam int DEPTH = 4;
  localparam int RESP_LAT = 5;

  trace_tr #(.SLOT(9'd20), .NODE_ID(4'd6), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .ib_req, .ib_rdata, .ctrl, .now, .link_i, .link_o, .rsp_o, .rsp_i
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (ctrl.clear)    now <= '0;
    else if (ctrl.run) now <= now + 1;
  end

  // reply monitor
  assign rsp_i.ack_valid = rsp_o.req;
  assign rsp_i.ack       = 1'b1;
  int          cyc = 0, n_rsp = 0, rlen = 0;
  int          rsp_head[32], rsp_len[32];
  logic [15:0] rsp_hdr[32];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rsp_o.req) begin
      if (flit_type(rsp_o.data) == FT_HEAD) begin
        rsp_head[n_rsp] <= cyc; rsp_hdr[n_rsp] <= rsp_o.data; rlen <= 1;
      end else begin
        rlen <= rlen + 1;
        if (flit_type(rsp_o.data) == FT_TAIL) begin rsp_len[n_rsp] <= rlen + 1; n_rsp <= n_rsp + 1; end
      end
    end
  end

  task automatic ib_write(input int r, input logic [31:0] d);
    @(negedge clk);
    ib_req = '0; ib_req.we = 1'b1; ib_req.addr = {9'd20, 4'(r)}; ib_req.wdata = d;
    @(negedge clk);
    ib_req = '0;
  endtask
  task automatic ib_read(input int r, output logic [31:0] d);
    @(negedge clk);
    ib_req = '0; ib_req.re = 1'b1; ib_req.addr = {9'd20, 4'(r)};
    #1 d = ib_rdata;
    @(negedge clk);
    ib_req = '0;
  endtask
  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s = %0d, expected %0d", what, got, exp); end
  endtask

  int rd_cnt = 0, wr_cnt = 0, ontime = 0;
  longint rd_lat = 0, wr_lat = 0;
  int last_lat, tail_cyc, refused = 0;

  // send a packet; the head is retried until acknowledged; age = stamp offset
  task automatic send_packet(input int src, input cmd_e cmd, input int len, input int age);
    int ts;
    for (int i = 0; i < len; i++) begin
      logic [15:0] f;
      if (i == 0) f = head_flit(4'd6, 4'(src), cmd);
      else begin
        f = '0;
        f[15:14] = (i == len - 1) ? FT_TAIL : FT_BODY;
        f[12:0]  = (i == 1) ? 13'(ts) : 13'(i);
      end
      @(negedge clk);
      if (i == 0) ts = (now - age) & 8191;
      if (i == 1) f[12:0] = 13'(ts);
      link_i.req = 1'b1; link_i.replay = 1'b0; link_i.data = f;
      #1;
      while (!link_o.ack) begin
        refused++;
        @(negedge clk);
        link_i.replay = 1'b1;
        #1;
      end
      link_i.replay = 1'b0;
      if (i == len - 1) begin
        last_lat = (now - ts) & 8191;
        tail_cyc = cyc;
        if (cmd == CMD_READ) begin rd_cnt++; rd_lat += last_lat; end
        else begin wr_cnt++; wr_lat += last_lat; end
        if (last_lat <= 14) ontime++;
      end
    end
    @(negedge clk); link_i = '0;
  endtask

  logic [31:0] rv;
  int lats[4], srcs[4], lens[4];
  cmd_e cmds[4];

  initial begin
    ib_req = '0; ctrl = '0; link_i = '0; now = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ib_read(4, rv); expect_eq("INTERVAL reset value", rv, 1000000);
    ib_read(5, rv); expect_eq("LAT_LIMIT reset value", rv, 14);
    ib_write(2, RESP_LAT); ib_write(3, 3); ib_write(4, 400);
    @(negedge clk); ctrl.clear = 1'b1; ctrl.run = 1'b1; @(negedge clk); ctrl.clear = 1'b0;

    // read request: reply of 3 flits to source 2 after RESP_LAT
    send_packet(2, CMD_READ, 4, 10);
    lats[0] = last_lat; srcs[0] = 2; lens[0] = 4; cmds[0] = CMD_READ;
    begin
      int tc; tc = tail_cyc;
      // a new request arriving now finds the reply pending and is refused
      send_packet(3, CMD_WRITE, 2, 30);
      lats[1] = last_lat; srcs[1] = 3; lens[1] = 2; cmds[1] = CMD_WRITE;
      repeat (20) @(negedge clk);
      expect_eq("replies", n_rsp, 2);
      expect_eq("read reply start", rsp_head[0] - tc, RESP_LAT + 2);
    end
    checks++;
    if (refused == 0) begin failures++; $display("FAIL: head not refused while reply pending"); end
    expect_eq("read reply dest", rsp_hdr[0][13:10], 2);
    expect_eq("read reply src", rsp_hdr[0][9:6], 6);
    expect_eq("read reply cmd", rsp_hdr[0][5:4], CMD_RESP);
    expect_eq("read reply length", rsp_len[0], 3);
    expect_eq("write reply dest", rsp_hdr[1][13:10], 3);
    expect_eq("write reply length", rsp_len[1], 2);

    // data packet: no reply
    send_packet(1, CMD_DATA, 5, 12);
    lats[2] = last_lat; srcs[2] = 1; lens[2] = 5; cmds[2] = CMD_DATA;
    send_packet(0, CMD_READ, 3, 7);
    lats[3] = last_lat; srcs[3] = 0; lens[3] = 3; cmds[3] = CMD_READ;
    repeat (20) @(negedge clk);
    expect_eq("replies after data packet", n_rsp, 3);

    // descriptors
    ib_read(1, rv); expect_eq("queue fill", rv, 4);
    for (int i = 0; i < 4; i++) begin
      ib_read(0, rv);
      expect_eq("desc latency", rv[31:19], lats[i]);
      expect_eq("desc source", rv[18:15], srcs[i]);
      expect_eq("desc command", rv[14:13], cmds[i]);
      expect_eq("desc flits", rv[12:5], lens[i]);
    end
    ib_read(1, rv); expect_eq("queue drained", rv, 0);

    // overflow: DEPTH + 2 data packets without reading
    for (int i = 0; i < DEPTH + 2; i++) send_packet(1, CMD_DATA, 2, 3);
    ib_read(12, rv); expect_eq("OVERFLOW", rv, 2);

    // interval statistics: wait for the end of the first interval
    while (now < 400) @(negedge clk);
    repeat (3) @(negedge clk);
    ib_read(11, rv); expect_eq("INTERVAL_IDX", rv, 1);
    ib_read(6, rv);  expect_eq("SNAP_RD_CNT", rv, rd_cnt);
    ib_read(7, rv);  expect_eq("SNAP_RD_LAT", rv, rd_lat);
    ib_read(8, rv);  expect_eq("SNAP_WR_CNT", rv, wr_cnt);
    ib_read(9, rv);  expect_eq("SNAP_WR_LAT", rv, wr_lat);
    ib_read(10, rv); expect_eq("SNAP_ONTIME", rv, ontime);
    ib_read(13, rv); expect_eq("PACKETS", rv, 4 + DEPTH + 2);
    ib_read(14, rv); expect_eq("REFUSED", rv, refused);
    // second interval with one slow read
    rd_cnt = 0; rd_lat = 0; wr_cnt = 0; wr_lat = 0; ontime = 0;
    send_packet(4, CMD_READ, 4, 40);
    while (now < 800) @(negedge clk);
    repeat (3) @(negedge clk);
    ib_read(11, rv); expect_eq("INTERVAL_IDX 2", rv, 2);
    ib_read(6, rv);  expect_eq("SNAP_RD_CNT 2", rv, 1);
    ib_read(7, rv);  expect_eq("SNAP_RD_LAT 2", rv, rd_lat);
    ib_read(10, rv); expect_eq("SNAP_ONTIME 2", rv, 0);

    // a whole interval at the reset length of 1,000,000 running cycles:
    // the snapshot must appear exactly at its end
    ib_write(4, 1000000);
    @(negedge clk); ctrl.clear = 1'b1; @(negedge clk); ctrl.clear = 1'b0;
    send_packet(5, CMD_WRITE, 3, 4);
    while (now != 999999) @(negedge clk);
    ib_req = '0; ib_req.re = 1'b1; ib_req.addr = {9'd20, 4'd11};
    #1 expect_eq("INTERVAL_IDX before 1,000,000 cycles", ib_rdata, 0);
    @(negedge clk);
    #1 expect_eq("INTERVAL_IDX after 1,000,000 cycles", ib_rdata, 1);
    @(negedge clk); ib_req = '0;
    ib_read(8, rv); expect_eq("SNAP_WR_CNT of the long interval", rv, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
