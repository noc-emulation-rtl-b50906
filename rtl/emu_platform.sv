// emu_platform: hardware layer of the NoC emulation platform.
//
// The platform wraps a network under test with the components that drive and
// observe it, all configured and controlled by a processor over OPB:
//  * opb_ib_filter maps an OPB address window onto internal bus 0 (control
//    module) and internal bus 1 (traffic generators and receptors);
//  * control_module starts, stops, resumes and resets all units together and
//    provides the global emulation time and congestion counter;
//  * N_STOCH stochastic generators (stochastic_tg) and receptors
//    (stochastic_tr) for emulating a network of switches, as in the first
//    application of the document: a 2x3 mesh with a generator and a receptor
//    at each of its 4 corners;
//  * N_TRACE trace-driven generators (trace_tg) and slave receptors
//    (trace_tr) for emulating a complete NoC, as in the second application:
//    a 2x2 mesh with one generator and one receptor per switch.
// The network itself is not part of this design: its links are ports.
//
// Numbering. Generators are numbered k = 0..NT-1 (NT = N_STOCH + N_TRACE),
// stochastic ones first; receptors likewise. Generator k sends with source
// id k and sits in IB 1 slot k; receptor k is destination id k and sits in
// slot NT + k. A trace-driven receptor replies to the source id of the
// request, i.e. to generator k's node. Control interface k drives generator
// k, interface NT + k receptor k.
//
// Ports: tg_fwd/tg_bwd are the links from generator k into the network,
// tr_fwd/tr_bwd the links from the network into receptor k, rsp_fwd/rsp_bwd
// the reply links of the trace-driven receptors (index i = receptor
// N_STOCH + i), tg_rsp_fwd/tg_rsp_bwd the links that bring replies from the
// network back to the trace-driven generators (index i = generator
// N_STOCH + i). Timing is that of the units; see their files.
module emu_platform
  import emu_pkg::*;
#(
  parameter int unsigned N_STOCH    = 4,
  parameter int unsigned N_TRACE    = 4,
  parameter logic [31:0] C_BASEADDR = 32'h8000_0000,
  localparam int unsigned NT        = N_STOCH + N_TRACE
) (
  input  logic        clk,
  input  logic        rst_n,
  // OPB slave port
  input  logic        opb_select,
  input  logic        opb_rnw,
  input  logic [31:0] opb_abus,
  input  logic [31:0] opb_dbus,
  output logic [31:0] sl_dbus,
  output logic        sl_xferack,
  // links to and from the network under test
  output link_fwd_t   tg_fwd  [NT],
  input  link_bwd_t   tg_bwd  [NT],
  input  link_fwd_t   tr_fwd  [NT],
  output link_bwd_t   tr_bwd  [NT],
  output link_fwd_t   rsp_fwd [N_TRACE],
  input  link_bwd_t   rsp_bwd [N_TRACE],
  input  link_fwd_t   tg_rsp_fwd [N_TRACE],
  output link_bwd_t   tg_rsp_bwd [N_TRACE]
);

  ib_req_t     ib0_req, ib1_req;
  logic [31:0] ib0_rdata, ib1_rdata;
  logic [31:0] tg_rdata [NT];
  logic [31:0] tr_rdata [NT];
  ctrl_t       ctrl [2*NT];
  logic [2*NT-1:0] done, nack;
  logic [31:0] now;

  opb_ib_filter #(.C_BASEADDR(C_BASEADDR)) u_filter (
    .clk, .rst_n,
    .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .sl_dbus, .sl_xferack,
    .ib0_req, .ib0_rdata, .ib1_req, .ib1_rdata
  );

  control_module #(.N_UNITS(2*NT)) u_ctrl (
    .clk, .rst_n,
    .ib_req(ib0_req), .ib_rdata(ib0_rdata),
    .ctrl, .done, .nack, .now
  );

  for (genvar k = 0; k < int'(N_STOCH); k++) begin : g_stoch
    stochastic_tg #(.SLOT(9'(k)), .NODE_ID(ID_W'(k))) u_tg (
      .clk, .rst_n,
      .ib_req(ib1_req), .ib_rdata(tg_rdata[k]),
      .ctrl(ctrl[k]), .now,
      .link_o(tg_fwd[k]), .link_i(tg_bwd[k]),
      .done(done[k]), .nack(nack[k])
    );
    stochastic_tr #(.SLOT(9'(NT + k))) u_tr (
      .clk, .rst_n,
      .ib_req(ib1_req), .ib_rdata(tr_rdata[k]),
      .ctrl(ctrl[NT + k]), .now,
      .link_i(tr_fwd[k]), .link_o(tr_bwd[k])
    );
    assign done[NT + k] = 1'b1;
    assign nack[NT + k] = 1'b0;
  end

  for (genvar i = 0; i < int'(N_TRACE); i++) begin : g_trace
    localparam int unsigned K = N_STOCH + i;
    trace_tg #(.SLOT(9'(K)), .NODE_ID(ID_W'(K))) u_tg (
      .clk, .rst_n,
      .ib_req(ib1_req), .ib_rdata(tg_rdata[K]),
      .ctrl(ctrl[K]), .now,
      .link_o(tg_fwd[K]), .link_i(tg_bwd[K]),
      .rsp_link_i(tg_rsp_fwd[i]), .rsp_link_o(tg_rsp_bwd[i]),
      .done(done[K]), .nack(nack[K])
    );
    trace_tr #(.SLOT(9'(NT + K)), .NODE_ID(ID_W'(K))) u_tr (
      .clk, .rst_n,
      .ib_req(ib1_req), .ib_rdata(tr_rdata[K]),
      .ctrl(ctrl[NT + K]), .now,
      .link_i(tr_fwd[K]), .link_o(tr_bwd[K]),
      .rsp_o(rsp_fwd[i]), .rsp_i(rsp_bwd[i])
    );
    assign done[NT + K] = 1'b1;
    assign nack[NT + K] = 1'b0;
  end

  // IB 1 slaves drive zero unless addressed, so their read data is OR-ed
  always_comb begin
    ib1_rdata = '0;
    for (int k = 0; k < int'(NT); k++) ib1_rdata |= tg_rdata[k] | tr_rdata[k];
  end

  // source and destination ids are ID_W bits wide
  if (NT > (1 << ID_W)) begin : g_too_many
    $error("emu_platform: more than %0d generators", 1 << ID_W);
  end

endmodule
