// trace_tr: trace-driven traffic receptor acting as a slave core.
//
// The receptor stands in for a memory behind the network. It parses arriving
// request packets (head: source and command; second flit: 13-bit time stamp;
// tail: end) and does three things with each one:
//  * pushes a packet descriptor into a queue that the control processor
//    drains at run time, giving a continuous trace of the traffic:
//      [31:19] latency  [18:15] source  [14:13] command  [12:5] flits
//    A descriptor that finds the queue full is counted in OVERFLOW.
//  * adds the packet to the statistics of the current interval: reads and
//    writes with their latency sums, and the packets that arrived within
//    LAT_LIMIT cycles (the acknowledgment ratio is ONTIME / packets). Every
//    INTERVAL running cycles the interval counters are copied into snapshot
//    registers, cleared, and INTERVAL_IDX is incremented.
//  * for read and write requests, sends a reply packet back to the source
//    after RESP_LAT cycles: RD_LEN flits for a read, two flits for a write.
//    While a reply is pending, the head flit of a new packet is answered
//    with ack = 0 (not acknowledged); the generator retries it later. All
//    other flits are acknowledged at once. REFUSED counts these refusals,
//    a measure of how congested the receptor's link is.
// The reset values INTERVAL = 1,000,000 cycles and LAT_LIMIT = 14 cycles are
// the settings of the document's complete-NoC experiment. The descriptor
// layout, the single outstanding reply and the reply lengths are this
// design's choices.
//
// Register map (word offsets in the unit's slot):
//   0 DESC (ro, a read pops the queue)  1 STATUS: [7:0] queue fill
//   2 RESP_LAT  3 RD_LEN  4 INTERVAL  5 LAT_LIMIT
//   6 SNAP_RD_CNT  7 SNAP_RD_LAT  8 SNAP_WR_CNT  9 SNAP_WR_LAT
//   10 SNAP_ONTIME  11 INTERVAL_IDX  12 OVERFLOW  13 PACKETS  14 REFUSED
module trace_tr
  import emu_pkg::*;
#(
  parameter logic [8:0]      SLOT    = 9'd0,
  parameter logic [ID_W-1:0] NODE_ID = '0,
  parameter int unsigned     DEPTH   = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ib_req_t     ib_req,
  output logic [31:0] ib_rdata,
  input  ctrl_t       ctrl,
  input  logic [31:0] now,
  input  link_fwd_t   link_i,
  output link_bwd_t   link_o,
  output link_fwd_t   rsp_o,
  input  link_bwd_t   rsp_i
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic             wr, rd;
  logic [3:0]       ra;
  flit_type_e       ft;
  logic             take, refuse;
  logic             first;
  logic [TS_W-1:0]  ts_q, ts_now, lat;
  logic [ID_W-1:0]  src_q;
  cmd_e             cmd_q;
  logic [LEN_W-1:0] nflits;
  logic             tail_in;

  // reply engine
  logic             pend;          // a reply is owed or being sent
  logic             rsp_wait;      // counting down before the reply starts
  logic [15:0]      rsp_cnt;
  logic [ID_W-1:0]  rsp_dst;
  logic [LEN_W-1:0] rsp_len;
  logic             rsp_start, rsp_busy, rsp_done;
  logic             rsp_flit_ok, rsp_nack;

  // configuration and statistics
  logic [15:0]      resp_lat;
  logic [LEN_W-1:0] rd_len;
  logic [31:0]      interval, ivl_cnt, ivl_idx;
  logic [TS_W-1:0]  lat_limit;
  logic [31:0]      rd_cnt, rd_lat, wr_cnt, wr_lat, ontime;
  logic [31:0]      s_rd_cnt, s_rd_lat, s_wr_cnt, s_wr_lat, s_ontime;
  logic [31:0]      overflow, packets, refused;
  logic             ivl_end;

  // descriptor queue
  logic [31:0]      desc_in, desc_out;
  logic             q_full, q_empty, q_push, q_pop;
  logic [CW-1:0]    q_fill;

  assign wr = ib_hit(ib_req, SLOT) && ib_req.we;
  assign rd = ib_hit(ib_req, SLOT) && ib_req.re;
  assign ra = ib_req.addr[3:0];

  assign ft      = flit_type(link_i.data);
  assign refuse  = (ft == FT_HEAD) && pend;
  assign take    = link_i.req && !refuse;
  assign link_o.ack_valid = link_i.req;
  assign link_o.ack       = !refuse;

  assign ts_now  = first ? link_i.data[TS_W-1:0] : ts_q;
  assign lat     = now[TS_W-1:0] - ts_now;
  assign tail_in = take && (ft == FT_TAIL);

  assign desc_in = {lat, src_q, cmd_q, nflits + LEN_W'(2), 5'd0};
  assign q_push  = tail_in;
  assign q_pop   = rd && (ra == 4'd0);

  assign ivl_end = ctrl.run && (ivl_cnt + 32'd1 >= interval);

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .clear(ctrl.clear),
    .push(q_push), .din(desc_in), .pop(q_pop),
    .dout(desc_out), .full(q_full), .empty(q_empty), .count(q_fill)
  );

  assign rsp_start = pend && rsp_wait && (rsp_cnt == '0) && ctrl.run;

  pkt_sender u_rsp (
    .clk, .rst_n,
    .clear   (ctrl.clear),
    .run     (ctrl.run),
    .start   (rsp_start),
    .dst     (rsp_dst),
    .src     (NODE_ID),
    .cmd     (CMD_RESP),
    .len     (rsp_len),
    .ts      (now[TS_W-1:0]),
    .busy    (rsp_busy),
    .link_o  (rsp_o),
    .link_i  (rsp_i),
    .flit_ok (rsp_flit_ok),
    .nack    (rsp_nack),
    .pkt_done(rsp_done)
  );

  // packet parser
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first  <= 1'b0;
      ts_q   <= '0;
      src_q  <= '0;
      cmd_q  <= CMD_DATA;
      nflits <= '0;
    end else if (ctrl.clear) begin
      first  <= 1'b0;
      nflits <= '0;
    end else if (take) begin
      first <= (ft == FT_HEAD);
      if (first) ts_q <= link_i.data[TS_W-1:0];
      if (ft == FT_HEAD) begin
        src_q  <= link_i.data[9:6];
        cmd_q  <= cmd_e'(link_i.data[5:4]);
        nflits <= '0;
      end else begin
        nflits <= nflits + 1'b1;
      end
    end
  end

  // reply engine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      rsp_wait <= 1'b0;
      rsp_cnt  <= '0;
      rsp_dst  <= '0;
      rsp_len  <= LEN_W'(2);
    end else if (ctrl.clear) begin
      pend     <= 1'b0;
      rsp_wait <= 1'b0;
      rsp_cnt  <= '0;
    end else begin
      if (tail_in && (cmd_q == CMD_READ || cmd_q == CMD_WRITE)) begin
        pend     <= 1'b1;
        rsp_wait <= 1'b1;
        rsp_cnt  <= resp_lat;
        rsp_dst  <= src_q;
        rsp_len  <= (cmd_q == CMD_READ) ? rd_len : LEN_W'(2);
      end else if (rsp_start) begin
        rsp_wait <= 1'b0;
      end else if (rsp_wait && ctrl.run) begin
        rsp_cnt <= rsp_cnt - 1'b1;
      end
      if (rsp_done) pend <= 1'b0;
    end
  end

  // configuration
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_lat  <= '0;
      rd_len    <= LEN_W'(4);
      interval  <= 32'd1_000_000;
      lat_limit <= TS_W'(14);
    end else if (wr) begin
      unique case (ra)
        4'd2: resp_lat  <= ib_req.wdata[15:0];
        4'd3: rd_len    <= ib_req.wdata[LEN_W-1:0];
        4'd4: interval  <= ib_req.wdata;
        4'd5: lat_limit <= ib_req.wdata[TS_W-1:0];
        default: ;
      endcase
    end
  end

  // interval statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {rd_cnt, rd_lat, wr_cnt, wr_lat, ontime} <= '0;
      {s_rd_cnt, s_rd_lat, s_wr_cnt, s_wr_lat, s_ontime} <= '0;
      ivl_cnt  <= '0;
      ivl_idx  <= '0;
      overflow <= '0;
      packets  <= '0;
      refused  <= '0;
    end else if (ctrl.clear) begin
      {rd_cnt, rd_lat, wr_cnt, wr_lat, ontime} <= '0;
      {s_rd_cnt, s_rd_lat, s_wr_cnt, s_wr_lat, s_ontime} <= '0;
      ivl_cnt  <= '0;
      ivl_idx  <= '0;
      overflow <= '0;
      packets  <= '0;
      refused  <= '0;
    end else begin
      logic [31:0] n_rd_cnt, n_rd_lat, n_wr_cnt, n_wr_lat, n_ontime;
      n_rd_cnt = rd_cnt;
      n_rd_lat = rd_lat;
      n_wr_cnt = wr_cnt;
      n_wr_lat = wr_lat;
      n_ontime = ontime;
      if (link_i.req && refuse) refused <= refused + 1'b1;
      if (tail_in) begin
        packets <= packets + 1'b1;
        if (q_full && !q_pop) overflow <= overflow + 1'b1;
        if (cmd_q == CMD_READ) begin
          n_rd_cnt = n_rd_cnt + 1'b1;
          n_rd_lat = n_rd_lat + 32'(lat);
        end else begin
          n_wr_cnt = n_wr_cnt + 1'b1;
          n_wr_lat = n_wr_lat + 32'(lat);
        end
        if (lat <= lat_limit) n_ontime = n_ontime + 1'b1;
      end
      if (ivl_end) begin
        s_rd_cnt <= n_rd_cnt;
        s_rd_lat <= n_rd_lat;
        s_wr_cnt <= n_wr_cnt;
        s_wr_lat <= n_wr_lat;
        s_ontime <= n_ontime;
        {rd_cnt, rd_lat, wr_cnt, wr_lat, ontime} <= '0;
        ivl_cnt <= '0;
        ivl_idx <= ivl_idx + 1'b1;
      end else begin
        rd_cnt <= n_rd_cnt;
        rd_lat <= n_rd_lat;
        wr_cnt <= n_wr_cnt;
        wr_lat <= n_wr_lat;
        ontime <= n_ontime;
        if (ctrl.run) ivl_cnt <= ivl_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    ib_rdata = '0;
    if (rd) begin
      unique case (ra)
        4'd0:  ib_rdata = q_empty ? '0 : desc_out;
        4'd1:  ib_rdata = 32'(q_fill);
        4'd2:  ib_rdata = 32'(resp_lat);
        4'd3:  ib_rdata = 32'(rd_len);
        4'd4:  ib_rdata = interval;
        4'd5:  ib_rdata = 32'(lat_limit);
        4'd6:  ib_rdata = s_rd_cnt;
        4'd7:  ib_rdata = s_rd_lat;
        4'd8:  ib_rdata = s_wr_cnt;
        4'd9:  ib_rdata = s_wr_lat;
        4'd10: ib_rdata = s_ontime;
        4'd11: ib_rdata = ivl_idx;
        4'd12: ib_rdata = overflow;
        4'd13: ib_rdata = packets;
        4'd14: ib_rdata = refused;
        default: ib_rdata = '0;
      endcase
    end
  end

  // a reply starts only when the reply sender is free
  a_rsp_idle: assert property (@(posedge clk) disable iff (!rst_n) rsp_start |-> !rsp_busy);

endmodule
