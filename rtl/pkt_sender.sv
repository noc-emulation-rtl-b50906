// pkt_sender: the network-interface side of a traffic generator.
//
// Turns one packet request (destination, source, command, length in flits,
// time stamp) into a sequence of flits on a flit link: a head flit, a flit
// carrying the 13-bit time stamp, and body flits numbered 2..len-1; the last
// flit is typed TAIL. Lengths below 2 are sent as 2.
//
// Flow control is stop-and-wait with retransmission: the current flit is
// held on the link with req=1 until the receiver answers ack_valid=1. On
// ack=1 the next flit follows in the next cycle (one flit per cycle at best);
// on ack=0 the flit counts as not acknowledged (nack=1 for that cycle) and is
// presented again with replay=1. While run=0 the sender holds its state and
// drives req=0, which pauses the packet. clear drops any packet in progress.
//
// start is taken only when busy=0. flit_ok pulses for every accepted flit and
// pkt_done with the acceptance of the tail flit.
module pkt_sender
  import emu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              run,
  input  logic              start,
  input  logic [ID_W-1:0]   dst,
  input  logic [ID_W-1:0]   src,
  input  cmd_e              cmd,
  input  logic [LEN_W-1:0]  len,
  input  logic [TS_W-1:0]   ts,
  output logic              busy,
  output link_fwd_t         link_o,
  input  link_bwd_t         link_i,
  output logic              flit_ok,
  output logic              nack,
  output logic              pkt_done
);

  logic [ID_W-1:0]  dst_q, src_q;
  cmd_e             cmd_q;
  logic [LEN_W-1:0] len_q, idx;
  logic [TS_W-1:0]  ts_q;
  logic             retry;
  logic             last;
  logic             answered;

  assign last     = (idx == len_q - 1'b1);
  assign answered = busy && run && link_i.ack_valid;
  assign flit_ok  = answered && link_i.ack;
  assign nack     = answered && !link_i.ack;
  assign pkt_done = flit_ok && last;

  always_comb begin
    link_o.req    = busy && run;
    link_o.replay = busy && run && retry;
    link_o.data   = '0;
    if (idx == '0) begin
      link_o.data = head_flit(dst_q, src_q, cmd_q);
    end else begin
      link_o.data[FLIT_W-1 -: 2] = last ? FT_TAIL : FT_BODY;
      if (idx == LEN_W'(1)) link_o.data[TS_W-1:0] = ts_q;
      else                  link_o.data[13:0]     = 14'(idx);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      retry <= 1'b0;
      idx   <= '0;
      dst_q <= '0;
      src_q <= '0;
      cmd_q <= CMD_DATA;
      len_q <= LEN_W'(2);
      ts_q  <= '0;
    end else if (clear) begin
      busy  <= 1'b0;
      retry <= 1'b0;
      idx   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        retry <= 1'b0;
        idx   <= '0;
        dst_q <= dst;
        src_q <= src;
        cmd_q <= cmd;
        len_q <= (len < LEN_W'(2)) ? LEN_W'(2) : len;
        ts_q  <= ts;
      end
    end else if (answered) begin
      if (link_i.ack) begin
        retry <= 1'b0;
        if (last) busy <= 1'b0;
        else      idx  <= idx + 1'b1;
      end else begin
        retry <= 1'b1;
      end
    end
  end

endmodule
