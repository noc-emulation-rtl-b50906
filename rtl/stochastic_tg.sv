// stochastic_tg: stochastic traffic generator with a two-state Markov source.
//
// The generator has the three interfaces of the document: a register bench on
// the internal bus, a network link, and a run/clear interface to the control
// module. Following the document's block diagram, two random generators (LFSR
// 1 and LFSR 2) each feed a bounded draw Low + LFSR % (High - Low): LFSR 1
// sets the packet length in flits, LFSR 2 the interval between packets. When
// High equals Low the draw is Low. A packets generator turns the draws into
// packets and hands them to the network interface (pkt_sender), which sends
// flits with req / replay and retransmits a flit that comes back not
// acknowledged.
//
// The traffic follows an on/off Markov chain, the model the document names.
// In OFF, every running cycle draws u = LFSR2[15:8]; if u < P_OFF_ON a burst
// starts with a packet. After each packet, u = LFSR1[15:8] is drawn; if
// u < P_ON_OFF the chain returns to OFF, otherwise the generator waits the
// drawn interval and sends the next packet of the burst. Probabilities are in
// units of 1/256 (0..256). The mean number of packets per burst is thus
// 256 / P_ON_OFF. After NUM_PACKETS packets (0: no limit) the generator stops
// and raises done. The encoding of the probabilities, the use of the upper
// LFSR byte and the packet count are this design's choices.
//
// Register map (word offsets inside the unit's 16-word slot on the bus):
//   0 PL_HIGH   1 PL_LOW    2 LFSR1_SEED   3 IBP_HIGH   4 IBP_LOW
//   5 LFSR2_SEED  6 P_ON_OFF  7 P_OFF_ON  8 DEST  9 NUM_PACKETS
//   10 SENT_PACKETS (ro)  11 SENT_FLITS (ro)  12 NACK_FLITS (ro)
//   13 STATUS (ro): bit 0 done, bits 3:1 state
// Writing a seed reloads its LFSR; clear from the control module reloads both
// LFSRs from their seeds and zeroes the counters, keeping the configuration.
//
// Timing: with an always-acknowledging network a packet of L flits occupies
// the link for L consecutive cycles; within a burst, a drawn interval G puts
// G + 1 idle cycles between the tail of one packet and the head of the next.
// A packet's time stamp is the emulation time of the cycle before its head
// flit first appears on the link.
module stochastic_tg
  import emu_pkg::*;
#(
  parameter logic [8:0]      SLOT    = 9'd0,
  parameter logic [ID_W-1:0] NODE_ID = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ib_req_t     ib_req,
  output logic [31:0] ib_rdata,
  input  ctrl_t       ctrl,
  input  logic [31:0] now,
  output link_fwd_t   link_o,
  input  link_bwd_t   link_i,
  output logic        done,
  output logic        nack
);

  typedef enum logic [2:0] {S_OFF, S_GAP, S_SEND, S_DONE} state_e;

  logic [LEN_W-1:0] pl_high, pl_low;
  logic [15:0]      ibp_high, ibp_low;
  logic [15:0]      seed1, seed2;
  logic [8:0]       p_on_off, p_off_on;
  logic [ID_W-1:0]  dest;
  logic [15:0]      num_packets;
  logic [31:0]      sent_packets, sent_flits, nack_flits;

  state_e           state;
  logic [15:0]      gap_cnt;
  logic [15:0]      q1, q2;
  logic             load1, load2, step1, step2;
  logic [LEN_W-1:0] pl_range, len_draw;
  logic [15:0]      ibp_range, gap_draw;
  logic             start, busy, flit_ok, pkt_done;
  logic             wr, rd;
  logic [3:0]       ra;
  logic             last_packet;

  assign wr = ib_hit(ib_req, SLOT) && ib_req.we;
  assign rd = ib_hit(ib_req, SLOT) && ib_req.re;
  assign ra = ib_req.addr[3:0];

  // bounded draws: Low + LFSR % (High - Low)
  always_comb begin
    pl_range  = pl_high - pl_low;
    ibp_range = ibp_high - ibp_low;
    len_draw  = (pl_high <= pl_low)   ? pl_low  : pl_low  + LEN_W'(q1 % pl_range);
    gap_draw  = (ibp_high <= ibp_low) ? ibp_low : ibp_low + (q2 % ibp_range);
  end

  assign last_packet = (num_packets != '0) && (sent_packets + 32'd1 >= 32'(num_packets));

  always_comb begin
    start = 1'b0;
    step1 = 1'b0;
    step2 = 1'b0;
    if (ctrl.run && !ctrl.clear) begin
      unique case (state)
        S_OFF: begin
          step2 = 1'b1;
          if ({1'b0, q2[15:8]} < p_off_on) begin
            start = 1'b1;
            step1 = 1'b1;
          end
        end
        S_GAP: begin
          if (gap_cnt == '0) begin
            start = 1'b1;
            step1 = 1'b1;
          end
        end
        S_SEND: begin
          if (pkt_done && !last_packet) step2 = 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign load1 = ctrl.clear || (wr && ra == 4'd2);
  assign load2 = ctrl.clear || (wr && ra == 4'd5);

  lfsr u_lfsr1 (.clk, .rst_n, .load(load1), .seed(wr && ra == 4'd2 ? ib_req.wdata[15:0] : seed1),
                .step(step1), .q(q1));
  lfsr u_lfsr2 (.clk, .rst_n, .load(load2), .seed(wr && ra == 4'd5 ? ib_req.wdata[15:0] : seed2),
                .step(step2), .q(q2));

  pkt_sender u_ni (
    .clk, .rst_n,
    .clear   (ctrl.clear),
    .run     (ctrl.run),
    .start   (start),
    .dst     (dest),
    .src     (NODE_ID),
    .cmd     (CMD_DATA),
    .len     (len_draw),
    .ts      (now[TS_W-1:0]),
    .busy    (busy),
    .link_o  (link_o),
    .link_i  (link_i),
    .flit_ok (flit_ok),
    .nack    (nack),
    .pkt_done(pkt_done)
  );

  // configuration registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pl_high     <= LEN_W'(5);
      pl_low      <= LEN_W'(5);
      seed1       <= 16'h0001;
      ibp_high    <= '0;
      ibp_low     <= '0;
      seed2       <= 16'h0001;
      p_on_off    <= 9'd0;
      p_off_on    <= 9'd256;
      dest        <= '0;
      num_packets <= '0;
    end else if (wr) begin
      unique case (ra)
        4'd0: pl_high     <= ib_req.wdata[LEN_W-1:0];
        4'd1: pl_low      <= ib_req.wdata[LEN_W-1:0];
        4'd2: seed1       <= ib_req.wdata[15:0];
        4'd3: ibp_high    <= ib_req.wdata[15:0];
        4'd4: ibp_low     <= ib_req.wdata[15:0];
        4'd5: seed2       <= ib_req.wdata[15:0];
        4'd6: p_on_off    <= ib_req.wdata[8:0];
        4'd7: p_off_on    <= ib_req.wdata[8:0];
        4'd8: dest        <= ib_req.wdata[ID_W-1:0];
        4'd9: num_packets <= ib_req.wdata[15:0];
        default: ;
      endcase
    end
  end

  // packets generator state and statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_OFF;
      gap_cnt      <= '0;
      sent_packets <= '0;
      sent_flits   <= '0;
      nack_flits   <= '0;
    end else if (ctrl.clear) begin
      state        <= S_OFF;
      gap_cnt      <= '0;
      sent_packets <= '0;
      sent_flits   <= '0;
      nack_flits   <= '0;
    end else begin
      if (flit_ok) sent_flits <= sent_flits + 1'b1;
      if (nack)    nack_flits <= nack_flits + 1'b1;
      if (ctrl.run) begin
        unique case (state)
          S_OFF: if (start) state <= S_SEND;
          S_GAP: begin
            if (start) state <= S_SEND;
            else       gap_cnt <= gap_cnt - 1'b1;
          end
          S_SEND: begin
            if (pkt_done) begin
              sent_packets <= sent_packets + 1'b1;
              if (last_packet) begin
                state <= S_DONE;
              end else if ({1'b0, q1[15:8]} < p_on_off) begin
                state <= S_OFF;
              end else begin
                state   <= S_GAP;
                gap_cnt <= gap_draw;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign done = (state == S_DONE);

  always_comb begin
    ib_rdata = '0;
    if (rd) begin
      unique case (ra)
        4'd0:  ib_rdata = 32'(pl_high);
        4'd1:  ib_rdata = 32'(pl_low);
        4'd2:  ib_rdata = 32'(seed1);
        4'd3:  ib_rdata = 32'(ibp_high);
        4'd4:  ib_rdata = 32'(ibp_low);
        4'd5:  ib_rdata = 32'(seed2);
        4'd6:  ib_rdata = 32'(p_on_off);
        4'd7:  ib_rdata = 32'(p_off_on);
        4'd8:  ib_rdata = 32'(dest);
        4'd9:  ib_rdata = 32'(num_packets);
        4'd10: ib_rdata = sent_packets;
        4'd11: ib_rdata = sent_flits;
        4'd12: ib_rdata = nack_flits;
        4'd13: ib_rdata = {28'd0, state, done};
        default: ib_rdata = '0;
      endcase
    end
  end

  // the sender only starts a packet when it is idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
