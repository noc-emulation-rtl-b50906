// tb_noc_model: behavioural stand-in for the network under test.
//
// Not a model of any particular switch: it is a single-stage crossbar with
// wormhole locking, enough to carry the platform's traffic end to end. Each
// receptor port has a one-flit output register. A head flit from generator k
// is accepted for receptor d (its destination field) when the register of d
// is free (or drains in this cycle), no other packet holds d, no other
// generator was granted d in this cycle, and a per-cycle random draw does
// not refuse it (REFUSE_PCT percent, emulating congestion inside the
// network). The head locks d to k until the tail passes. Refused flits are
// answered ack = 0, so the generator retransmits them. Generators are served
// in index order. Replies of the slave receptors travel the same way on a
// second crossbar to the reply inputs of the trace-driven generators: the
// reply head names generator NT - N_TRACE + j, which is reply output j. A
// reply head is refused while another reply holds that output, so
// receptors answering the same generator at once have to retransmit. Reply
// flits pass straight through, without a register.
module tb_noc_model
  import emu_pkg::*;
#(
  parameter int NT         = 8,
  parameter int N_TRACE    = 4,
  parameter int REFUSE_PCT = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_fwd_t tg_fwd  [NT],
  output link_bwd_t tg_bwd  [NT],
  output link_fwd_t tr_fwd  [NT],
  input  link_bwd_t tr_bwd  [NT],
  input  link_fwd_t rsp_fwd [N_TRACE],
  output link_bwd_t rsp_bwd [N_TRACE],
  output link_fwd_t tg_rsp_fwd [N_TRACE],
  input  link_bwd_t tg_rsp_bwd [N_TRACE]
);

  localparam int NS = NT - N_TRACE;

  logic              outv  [NT];
  logic [FLIT_W-1:0] outd  [NT];
  logic              lockv [NT];
  int                lockk [NT];
  logic [NT-1:0]     refuse_now;
  logic              grant [NT];
  int                gdst  [NT];

  always_ff @(posedge clk) begin
    for (int k = 0; k < NT; k++) refuse_now[k] <= ($urandom % 100) < REFUSE_PCT;
  end

  always_comb begin
    logic taken [NT];
    for (int d = 0; d < NT; d++) taken[d] = 1'b0;
    for (int k = 0; k < NT; k++) begin
      int  d;
      logic head, free;
      grant[k] = 1'b0;
      head = flit_type(tg_fwd[k].data) == FT_HEAD;
      d    = head ? int'(tg_fwd[k].data[13:10]) : -1;
      if (!head) begin
        for (int j = 0; j < NT; j++) if (lockv[j] && lockk[j] == k) d = j;
      end
      gdst[k] = d;
      if (tg_fwd[k].req && d >= 0 && d < NT) begin
        free = !outv[d] || (tr_bwd[d].ack_valid && tr_bwd[d].ack);
        if (free && !taken[d] && !refuse_now[k] &&
            (head ? !lockv[d] : (lockv[d] && lockk[d] == k))) begin
          grant[k] = 1'b1;
          taken[d] = 1'b1;
        end
      end
      tg_bwd[k].ack_valid = tg_fwd[k].req;
      tg_bwd[k].ack       = grant[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NT; d++) begin
        outv[d] <= 1'b0; outd[d] <= '0; lockv[d] <= 1'b0; lockk[d] <= 0;
      end
    end else begin
      for (int d = 0; d < NT; d++)
        if (outv[d] && tr_bwd[d].ack_valid && tr_bwd[d].ack) outv[d] <= 1'b0;
      for (int k = 0; k < NT; k++) begin
        if (grant[k]) begin
          outv[gdst[k]] <= 1'b1;
          outd[gdst[k]] <= tg_fwd[k].data;
          if (flit_type(tg_fwd[k].data) == FT_HEAD) begin
            lockv[gdst[k]] <= 1'b1;
            lockk[gdst[k]] <= k;
          end
          if (flit_type(tg_fwd[k].data) == FT_TAIL) lockv[gdst[k]] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    for (int d = 0; d < NT; d++) begin
      tr_fwd[d].req    = outv[d];
      tr_fwd[d].replay = 1'b0;
      tr_fwd[d].data   = outd[d];
    end
  end

  // reply crossbar
  logic rlockv [N_TRACE];
  int   rlocki [N_TRACE];
  logic rgrant [N_TRACE];
  int   rdst   [N_TRACE];

  always_comb begin
    logic taken [N_TRACE];
    for (int j = 0; j < N_TRACE; j++) begin
      taken[j] = 1'b0;
      tg_rsp_fwd[j] = '0;
    end
    for (int i = 0; i < N_TRACE; i++) begin
      int j;
      logic head;
      rgrant[i] = 1'b0;
      head = flit_type(rsp_fwd[i].data) == FT_HEAD;
      j    = head ? int'(rsp_fwd[i].data[13:10]) - NS : -1;
      if (!head) begin
        for (int m = 0; m < N_TRACE; m++) if (rlockv[m] && rlocki[m] == i) j = m;
      end
      rdst[i] = j;
      if (rsp_fwd[i].req && j >= 0 && j < N_TRACE && !taken[j] &&
          (head ? !rlockv[j] : (rlockv[j] && rlocki[j] == i))) begin
        rgrant[i]     = 1'b1;
        taken[j]      = 1'b1;
        tg_rsp_fwd[j] = rsp_fwd[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_TRACE; i++) begin
      rsp_bwd[i].ack_valid = rsp_fwd[i].req;
      rsp_bwd[i].ack       = 1'b0;
      for (int j = 0; j < N_TRACE; j++)
        if (rgrant[i] && rdst[i] == j) rsp_bwd[i].ack = tg_rsp_bwd[j].ack;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_TRACE; j++) begin rlockv[j] <= 1'b0; rlocki[j] <= 0; end
    end else begin
      for (int i = 0; i < N_TRACE; i++) if (rgrant[i]) begin
        if (flit_type(rsp_fwd[i].data) == FT_HEAD) begin
          rlockv[rdst[i]] <= 1'b1;
          rlocki[rdst[i]] <= i;
        end
        if (flit_type(rsp_fwd[i].data) == FT_TAIL) rlockv[rdst[i]] <= 1'b0;
      end
    end
  end

endmodule
