// trace_tg: trace-driven traffic generator.
//
// The control processor streams packet descriptors, taken from a trace of a
// real application, into a descriptor queue at run time; the generator
// replays them on its network link. A descriptor is one 32-bit word:
//   [31:16] delay: cycles from the release of the previous packet
//   [15:12] destination   [11:10] command (write or read request)
//   [9:2]   length in flits
// A release counter counts running cycles since the last packet was handed
// to the network interface. The head descriptor is released when the counter
// has reached its delay and the interface is idle, so descriptors keep their
// trace spacing unless the network holds the previous packet back. Packets
// are time-stamped when released. The descriptor format and the queue depth
// are this design's choices; the document says the generator receives packet
// descriptors in a continuous flow from the processor.
//
// Register map (word offsets in the unit's slot):
//   0 DESC (wo, pushes a descriptor)  1 STATUS (ro): bit 31 done, [7:0] queue
//   fill  2 SENT_PACKETS  3 SENT_FLITS  4 NACK_FLITS  5 DROPPED (descriptors
//   written while the queue was full)  6 END (wo, any write marks the end of
//   the trace)
// done is high once the end of the trace has been marked, the queue is empty
// and no packet is in flight, so that a momentarily empty queue during a run
// is not taken for the end. clear empties the queue, forgets the end mark and
// zeroes the counters.
//
// Replies. The slave cores answer the generator's requests; their reply
// packets come back on a second link (rsp_link_i/rsp_link_o), which accepts
// every flit in the cycle it is offered. The generator counts reply packets
// and flits and sums the reply latency, taken at the reply's tail from the
// time stamp in its second flit, modulo 2^13 as in the receptors:
//   7 REPLIES  8 REPLY_FLITS  9 REPLY_LAT_SUM
// The document says the slaves reply to the masters' requests; what the
// master does with a reply is not described, and counting is this design's
// choice. Replies do not hold back further requests.
module trace_tg
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
  output link_fwd_t   link_o,
  input  link_bwd_t   link_i,
  input  link_fwd_t   rsp_link_i,
  output link_bwd_t   rsp_link_o,
  output logic        done,
  output logic        nack
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic            wr, rd;
  logic [3:0]      ra;
  logic [31:0]     desc;
  logic            full, empty, push, pop;
  logic [CW-1:0]   fill;
  logic [15:0]     since;
  logic            busy, flit_ok, pkt_done;
  logic [31:0]     sent_packets, sent_flits, nack_flits, dropped;
  logic            trace_end;
  logic            r_first;     // next reply flit is the time-stamp flit
  logic [TS_W-1:0] r_ts_q, r_ts_now, r_lat;
  logic [31:0]     replies, reply_flits, reply_lat;
  flit_type_e      r_ft;

  assign wr   = ib_hit(ib_req, SLOT) && ib_req.we;
  assign rd   = ib_hit(ib_req, SLOT) && ib_req.re;
  assign ra   = ib_req.addr[3:0];
  assign push = wr && (ra == 4'd0);
  assign pop  = ctrl.run && !ctrl.clear && !empty && !busy && (since >= desc[31:16]);

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .clear(ctrl.clear),
    .push, .din(ib_req.wdata), .pop,
    .dout(desc), .full, .empty, .count(fill)
  );

  pkt_sender u_ni (
    .clk, .rst_n,
    .clear   (ctrl.clear),
    .run     (ctrl.run),
    .start   (pop),
    .dst     (desc[15:12]),
    .src     (NODE_ID),
    .cmd     (cmd_e'(desc[11:10])),
    .len     (desc[9:2]),
    .ts      (now[TS_W-1:0]),
    .busy    (busy),
    .link_o  (link_o),
    .link_i  (link_i),
    .flit_ok (flit_ok),
    .nack    (nack),
    .pkt_done(pkt_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since        <= '0;
      sent_packets <= '0;
      sent_flits   <= '0;
      nack_flits   <= '0;
      dropped      <= '0;
      trace_end    <= 1'b0;
    end else if (ctrl.clear) begin
      since        <= '0;
      sent_packets <= '0;
      sent_flits   <= '0;
      nack_flits   <= '0;
      dropped      <= '0;
      trace_end    <= 1'b0;
    end else begin
      if (wr && ra == 4'd6) trace_end <= 1'b1;
      if (pop)                      since <= 16'd1;
      else if (ctrl.run && since != 16'hFFFF) since <= since + 1'b1;
      if (pkt_done) sent_packets <= sent_packets + 1'b1;
      if (flit_ok)  sent_flits   <= sent_flits + 1'b1;
      if (nack)     nack_flits   <= nack_flits + 1'b1;
      if (push && full) dropped  <= dropped + 1'b1;
    end
  end

  assign done = trace_end && empty && !busy;

  // reply sink
  assign rsp_link_o.ack_valid = rsp_link_i.req;
  assign rsp_link_o.ack       = 1'b1;
  assign r_ft     = flit_type(rsp_link_i.data);
  assign r_ts_now = r_first ? rsp_link_i.data[TS_W-1:0] : r_ts_q;
  assign r_lat    = now[TS_W-1:0] - r_ts_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_first     <= 1'b0;
      r_ts_q      <= '0;
      replies     <= '0;
      reply_flits <= '0;
      reply_lat   <= '0;
    end else if (ctrl.clear) begin
      r_first     <= 1'b0;
      replies     <= '0;
      reply_flits <= '0;
      reply_lat   <= '0;
    end else if (rsp_link_i.req) begin
      reply_flits <= reply_flits + 1'b1;
      r_first     <= (r_ft == FT_HEAD);
      if (r_first) r_ts_q <= rsp_link_i.data[TS_W-1:0];
      if (r_ft == FT_TAIL) begin
        replies   <= replies + 1'b1;
        reply_lat <= reply_lat + 32'(r_lat);
      end
    end
  end

  always_comb begin
    ib_rdata = '0;
    if (rd) begin
      unique case (ra)
        4'd1:    ib_rdata = {done, 23'd0, 8'(fill)};
        4'd2:    ib_rdata = sent_packets;
        4'd3:    ib_rdata = sent_flits;
        4'd4:    ib_rdata = nack_flits;
        4'd5:    ib_rdata = dropped;
        4'd7:    ib_rdata = replies;
        4'd8:    ib_rdata = reply_flits;
        4'd9:    ib_rdata = reply_lat;
        default: ib_rdata = '0;
      endcase
    end
  end

endmodule
