// stochastic_tr: traffic receptor that keeps global statistics in hardware.
//
// The receptor sinks every packet that arrives on its link and acknowledges
// each flit in the same cycle (ack_valid = req, ack = 1). It follows the
// packet with a small parser: the head flit gives the source, the second flit
// the 13-bit time stamp written by the generator, and the tail flit ends the
// packet. At the tail the packet latency is (arrival time - time stamp)
// modulo 2^13, so latencies up to 8191 cycles are measured exactly; the
// document uses the same 13-bit stamp. The arrival time is the global
// emulation time from the control module.
//
// Statistics, readable on the bus (word offsets in the unit's slot):
//   0 PACKETS  1 FLITS  2 LAT_SUM  3 LAT_MIN  4 LAT_MAX  5 STALLS
// STALLS measures congestion on the link into the receptor: it counts the
// cycles in which a packet has begun (head received, tail not yet) but no
// flit arrives, i.e. the packet is held up somewhere in the network. The
// document lists per-link congestion among the receptor statistics without
// defining it; this definition is this design's choice.
// The average latency is LAT_SUM / PACKETS, computed by the control
// processor; this design keeps the sum rather than dividing in hardware.
// clear from the control module zeroes all statistics (LAT_MIN to all ones).
module stochastic_tr
  import emu_pkg::*;
#(
  parameter logic [8:0] SLOT = 9'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ib_req_t     ib_req,
  output logic [31:0] ib_rdata,
  input  ctrl_t       ctrl,
  input  logic [31:0] now,
  input  link_fwd_t   link_i,
  output link_bwd_t   link_o
);

  logic            rd;
  logic [3:0]      ra;
  logic            take;
  flit_type_e      ft;
  logic            first;       // next flit is the time-stamp flit
  logic [TS_W-1:0] ts_q;
  logic [TS_W-1:0] ts_now;
  logic [TS_W-1:0] lat;
  logic [31:0]     packets, flits, lat_sum;
  logic [TS_W-1:0] lat_min, lat_max;
  logic            in_pkt;
  logic [31:0]     stalls;

  assign rd   = ib_hit(ib_req, SLOT) && ib_req.re;
  assign ra   = ib_req.addr[3:0];

  assign link_o.ack_valid = link_i.req;
  assign link_o.ack       = 1'b1;
  assign take             = link_i.req;
  assign ft               = flit_type(link_i.data);

  // time stamp of this packet: from the flit itself when it is the
  // time-stamp flit, from the register afterwards
  assign ts_now = first ? link_i.data[TS_W-1:0] : ts_q;
  assign lat    = now[TS_W-1:0] - ts_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first   <= 1'b0;
      ts_q    <= '0;
      packets <= '0;
      flits   <= '0;
      lat_sum <= '0;
      lat_min <= '1;
      lat_max <= '0;
      in_pkt  <= 1'b0;
      stalls  <= '0;
    end else if (ctrl.clear) begin
      first   <= 1'b0;
      packets <= '0;
      flits   <= '0;
      lat_sum <= '0;
      lat_min <= '1;
      lat_max <= '0;
      in_pkt  <= 1'b0;
      stalls  <= '0;
    end else if (!take) begin
      if (in_pkt) stalls <= stalls + 1'b1;
    end else begin
      flits  <= flits + 1'b1;
      in_pkt <= (ft != FT_TAIL);
      first <= (ft == FT_HEAD);
      if (first) ts_q <= link_i.data[TS_W-1:0];
      if (ft == FT_TAIL) begin
        packets <= packets + 1'b1;
        lat_sum <= lat_sum + 32'(lat);
        if (lat < lat_min) lat_min <= lat;
        if (lat > lat_max) lat_max <= lat;
      end
    end
  end

  always_comb begin
    ib_rdata = '0;
    if (rd) begin
      unique case (ra)
        4'd0:    ib_rdata = packets;
        4'd1:    ib_rdata = flits;
        4'd2:    ib_rdata = lat_sum;
        4'd3:    ib_rdata = 32'(lat_min);
        4'd4:    ib_rdata = 32'(lat_max);
        4'd5:    ib_rdata = stalls;
        default: ib_rdata = '0;
      endcase
    end
  end

endmodule
