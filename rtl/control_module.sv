// control_module: global synchronization of the emulation platform.
//
// The control processor writes commands into this module's register on
// internal bus 0; the module passes them on, through one run/clear interface
// per traffic generator and receptor, to all of them at once. It also keeps
// the global emulation time that every generator stamps into its packets and
// every receptor measures latency against, and a global congestion counter.
//
// Commands (write to register 0, one bit each, acted on in this priority):
//   bit 0 RESET : stop, pulse clear to all units, zero the time and counters
//   bit 1 START : pulse clear to all units, zero the time, then run
//   bit 2 STOP  : stop; units freeze where they are
//   bit 3 RESUME: run again without clearing
// clear is a one-cycle pulse, registered, so every unit sees it in the same
// cycle; run goes high in the same cycle as the clear pulse of START, and the
// units give clear priority over run.
//
// Register map (word offsets on IB 0):
//   0 STATUS (read): bit 0 running, bit 1 all units done
//   1 NOW: emulation time, counts running cycles
//   2 CONGESTION: running cycles in which at least one unit had a flit not
//     acknowledged
//   3 DONE: the done input vector
//   4 RUNTIME: emulation time at which all units were first done
// The command encoding and the register layout are this design's choices;
// the document names reset, start, stop and resume and a global congestion
// counter.
module control_module
  import emu_pkg::*;
#(
  parameter int unsigned N_UNITS = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ib_req_t            ib_req,
  output logic [31:0]        ib_rdata,
  output ctrl_t              ctrl [N_UNITS],
  input  logic [N_UNITS-1:0] done,
  input  logic [N_UNITS-1:0] nack,
  output logic [31:0]        now
);

  logic        wr, rd;
  logic [3:0]  ra;
  logic        running, clear_q;
  logic [31:0] congestion, runtime;
  logic        all_done, rt_valid;
  logic [3:0]  cmd;

  assign wr  = ib_req.we && (ib_req.addr[12:4] == '0);
  assign rd  = ib_req.re && (ib_req.addr[12:4] == '0);
  assign ra  = ib_req.addr[3:0];
  assign cmd = (wr && ra == 4'd0) ? ib_req.wdata[3:0] : 4'd0;
  assign all_done = &done;

  // commands
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      clear_q <= 1'b0;
    end else begin
      clear_q <= cmd[0] || cmd[1];
      if (cmd[0])      running <= 1'b0;
      else if (cmd[1]) running <= 1'b1;
      else if (cmd[2]) running <= 1'b0;
      else if (cmd[3]) running <= 1'b1;
    end
  end

  // time, congestion and run time count exactly the cycles in which the
  // units run (run = 1 and no clear pulse)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= '0;
      congestion <= '0;
      runtime    <= '0;
      rt_valid   <= 1'b0;
    end else if (cmd[0] || cmd[1]) begin
      now        <= '0;
      congestion <= '0;
      runtime    <= '0;
      rt_valid   <= 1'b0;
    end else if (running && !clear_q) begin
      now <= now + 1'b1;
      if (|nack) congestion <= congestion + 1'b1;
      if (all_done && !rt_valid) begin
        runtime  <= now;
        rt_valid <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N_UNITS); i++) begin
      ctrl[i].run   = running;
      ctrl[i].clear = clear_q;
    end
  end

  always_comb begin
    ib_rdata = '0;
    if (rd) begin
      unique case (ra)
        4'd0:    ib_rdata = {30'd0, all_done, running};
        4'd1:    ib_rdata = now;
        4'd2:    ib_rdata = congestion;
        4'd3:    ib_rdata = 32'(done);
        4'd4:    ib_rdata = runtime;
        default: ib_rdata = '0;
      endcase
    end
  end

endmodule
