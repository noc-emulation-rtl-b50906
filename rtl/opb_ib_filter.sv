// opb_ib_filter: bridge from the processor's OPB bus to the two internal buses.
//
// The filter claims the 64 KiB window that starts at C_BASEADDR on the OPB.
// Address bit 15 chooses the internal bus: 0 for IB 0 (the control module),
// 1 for IB 1 (the traffic generators and receptors). Bits 14:2 become the
// 13-bit word address on the internal bus, so IB 1 has 512 unit slots of 16
// registers. Accesses outside the window are left to other OPB slaves.
//
// A transfer takes three cycles: in the cycle after opb_select rises the
// filter drives a one-cycle write or read strobe on the chosen internal bus;
// the slaves answer combinationally and the filter latches the read data;
// in the third cycle it raises sl_xferack for one cycle, with the read data on
// sl_dbus (zero otherwise, as OPB slaves OR their data). The master drops
// opb_select after the acknowledge. Only the name and place of the filter come
// from the document; the window, the address split and the timing are this
// design's choices, and only single-word transfers are supported.
module opb_ib_filter
  import emu_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h8000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        opb_select,
  input  logic        opb_rnw,
  input  logic [31:0] opb_abus,
  input  logic [31:0] opb_dbus,
  output logic [31:0] sl_dbus,
  output logic        sl_xferack,
  output ib_req_t     ib0_req,
  input  logic [31:0] ib0_rdata,
  output ib_req_t     ib1_req,
  input  logic [31:0] ib1_rdata
);

  typedef enum logic [1:0] {F_IDLE, F_STROBE, F_ACK} fstate_e;

  fstate_e     st;
  logic        hit;
  logic        bus1_q, rnw_q;
  logic [12:0] addr_q;
  logic [31:0] wdata_q, rdata_q;

  assign hit = opb_select && (opb_abus[31:16] == C_BASEADDR[31:16]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= F_IDLE;
      bus1_q  <= 1'b0;
      rnw_q   <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata_q <= '0;
    end else begin
      unique case (st)
        F_IDLE: if (hit) begin
          st      <= F_STROBE;
          bus1_q  <= opb_abus[15];
          rnw_q   <= opb_rnw;
          addr_q  <= opb_abus[14:2];
          wdata_q <= opb_dbus;
        end
        F_STROBE: begin
          st      <= F_ACK;
          rdata_q <= bus1_q ? ib1_rdata : ib0_rdata;
        end
        F_ACK:   st <= F_IDLE;
        default: st <= F_IDLE;
      endcase
    end
  end

  always_comb begin
    ib0_req = '0;
    ib1_req = '0;
    if (st == F_STROBE) begin
      if (bus1_q) begin
        ib1_req.we    = !rnw_q;
        ib1_req.re    = rnw_q;
        ib1_req.addr  = addr_q;
        ib1_req.wdata = wdata_q;
      end else begin
        ib0_req.we    = !rnw_q;
        ib0_req.re    = rnw_q;
        ib0_req.addr  = addr_q;
        ib0_req.wdata = wdata_q;
      end
    end
  end

  assign sl_xferack = (st == F_ACK);
  assign sl_dbus    = (st == F_ACK && rnw_q) ? rdata_q : '0;

endmodule
