// emu_pkg: types and constants shared by the NoC emulation platform.
//
// The platform talks to two kinds of buses:
//  * the internal bus (IB), a single-cycle register bus behind the OPB-to-IB
//    filter. A request carries a write strobe, a read strobe, a 13-bit word
//    address and 32-bit write data. Every slave decodes its own address
//    range and drives its read data combinationally (zero when not
//    addressed), so the read data of all slaves on one IB can be OR-ed.
//  * flit links into the network under test. The generator side drives
//    req, replay and a data flit; the receiving side answers in the same
//    cycle with ack_valid and ack. ack=1 means the flit was taken, ack=0 means
//    it was not acknowledged and the sender presents it again, with replay
//    set. The signal names req, replay, ack and ack valid are those of the
//    stochastic generator's network link; the same-cycle answer and the
//    stop-and-wait retransmission are this design's choice.
//
// Flit format (FLIT_W = 16 bits, the switch width of the first application):
//   [15:14] flit type: HEAD, BODY, TAIL
//   head flit:      [13:10] destination, [9:6] source, [5:4] command
//   second flit:    [12:0] time stamp taken when the packet was generated
//   further flits:  [13:0] payload (a running flit number)
// A packet has at least two flits (head and time-stamp flit); its last flit
// is typed TAIL. The 13-bit time stamp is the document's width; the layout of
// the fields is this design's own.
package emu_pkg;

  localparam int unsigned FLIT_W  = 16;
  localparam int unsigned TS_W    = 13;
  localparam int unsigned ID_W    = 4;
  localparam int unsigned IB_AW   = 13;
  localparam int unsigned IB_DW   = 32;
  localparam int unsigned LEN_W   = 8;

  typedef enum logic [1:0] {
    FT_BODY = 2'b00,
    FT_TAIL = 2'b01,
    FT_HEAD = 2'b10
  } flit_type_e;

  // command field of the head flit
  typedef enum logic [1:0] {
    CMD_DATA  = 2'b00,   // stochastic traffic, no reply expected
    CMD_WRITE = 2'b01,   // write request to a slave receptor
    CMD_READ  = 2'b10,   // read request to a slave receptor
    CMD_RESP  = 2'b11    // reply of a slave receptor
  } cmd_e;

  typedef struct packed {
    logic              req;
    logic              replay;
    logic [FLIT_W-1:0] data;
  } link_fwd_t;

  typedef struct packed {
    logic ack_valid;
    logic ack;
  } link_bwd_t;

  typedef struct packed {
    logic             we;
    logic             re;
    logic [IB_AW-1:0] addr;
    logic [IB_DW-1:0] wdata;
  } ib_req_t;

  // one synchronization interface from the control module to a TG or TR
  typedef struct packed {
    logic run;
    logic clear;
  } ctrl_t;

  function automatic flit_type_e flit_type(input logic [FLIT_W-1:0] f);
    return flit_type_e'(f[FLIT_W-1 -: 2]);
  endfunction

  function automatic logic [FLIT_W-1:0] head_flit(input logic [ID_W-1:0] dst,
                                                  input logic [ID_W-1:0] src,
                                                  input cmd_e cmd);
    logic [FLIT_W-1:0] f;
    f = '0;
    f[15:14] = FT_HEAD;
    f[13:10] = dst;
    f[9:6]   = src;
    f[5:4]   = cmd;
    return f;
  endfunction

  // IB1 address: [12:4] unit slot, [3:0] register within the unit
  function automatic logic ib_hit(input ib_req_t r, input logic [8:0] slot);
    return (r.we || r.re) && (r.addr[12:4] == slot);
  endfunction

endpackage
