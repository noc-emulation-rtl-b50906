// tb_control_module: self-checking test of the control module.
//
// Drives commands on internal bus 0 and checks the run/clear interfaces of
// all units, the emulation time (counts running cycles only, zeroed by start
// and reset, kept by stop/resume), the congestion counter (running cycles
// with any unit's nack high), the done vector and the run-time register
// (time at which all units were first done).
module tb_control_module;
  import emu_pkg::*;

  localparam int N = 6;
  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  ib_req_t       ib_req;
  logic [31:0]   ib_rdata;
  ctrl_t         ctrl [N];
  logic [N-1:0]  done, nack;
  logic [31:0]   now;
  int checks = 0, failures = 0;

  control_module #(.N_UNITS(N)) dut (.clk, .rst_n, .ib_req, .ib_rdata, .ctrl, .done, .nack, .now);

  always #5 clk = ~clk;

  task automatic ib_write(input int r, input logic [31:0] d);
    @(negedge clk);
    ib_req = '0; ib_req.we = 1'b1; ib_req.addr = 13'(r); ib_req.wdata = d;
    @(negedge clk);
    ib_req = '0;
  endtask
  task automatic ib_read(input int r, output logic [31:0] d);
    @(negedge clk);
    ib_req = '0; ib_req.re = 1'b1; ib_req.addr = 13'(r);
    #1 d = ib_rdata;
    @(negedge clk);
    ib_req = '0;
  endtask
  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s = %0d, expected %0d", what, got, exp); end
  endtask

  // count clear pulses and running cycles seen on every interface
  int clears [N];
  int runs [N];
  always @(posedge clk) for (int i = 0; i < N; i++) begin
    if (ctrl[i].clear) clears[i]++;
    if (ctrl[i].run && !ctrl[i].clear) runs[i]++;
  end

  int cong_exp = 0;
  logic [31:0] rv, t0;

  initial begin
    ib_req = '0; done = '0; nack = '0;
    for (int i = 0; i < N; i++) begin clears[i] = 0; runs[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ib_read(0, rv); expect_eq("idle status", rv, 0);

    // START: one clear pulse to all, then running
    ib_write(0, 32'h2);
    ib_read(0, rv); expect_eq("running after start", rv[0], 1);
    for (int i = 0; i < N; i++) expect_eq("clear pulse on start", clears[i], 1);
    repeat (50) @(negedge clk);
    // STOP freezes the time
    ib_write(0, 32'h4);
    ib_read(1, t0);
    repeat (20) @(negedge clk);
    ib_read(1, rv); expect_eq("time frozen while stopped", rv, t0);
    for (int i = 0; i < N; i++) expect_eq("run cycles equal time", runs[i], t0);
    // RESUME continues without clear
    ib_write(0, 32'h8);
    repeat (30) @(negedge clk);
    ib_write(0, 32'h4);
    ib_read(1, rv);
    expect_eq("time after resume", rv, runs[0]);
    expect_eq("no clear on resume", clears[0], 1);

    // congestion: nack for 17 running cycles; all done at a known time
    ib_write(0, 32'h2);
    @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      nack = (c % 2 == 0 && c < 34) ? N'(1 << (c % N)) : '0;
      if (c == 25) done = '1;
      @(negedge clk);
    end
    nack = '0;
    ib_write(0, 32'h4);
    ib_read(2, rv); expect_eq("CONGESTION", rv, 17);
    ib_read(3, rv); expect_eq("DONE vector", rv, (1 << N) - 1);
    ib_read(0, rv); expect_eq("all done status", rv[1], 1);
    ib_read(4, rv);
    checks++;
    if (rv < 25 || rv > 28) begin failures++; $display("FAIL: RUNTIME %0d", rv); end

    // RESET: clear pulse, time and counters to zero, stopped
    ib_write(0, 32'h1);
    ib_read(1, rv); expect_eq("time after reset", rv, 0);
    ib_read(2, rv); expect_eq("congestion after reset", rv, 0);
    ib_read(0, rv); expect_eq("stopped after reset", rv[0], 0);
    for (int i = 0; i < N; i++) expect_eq("clear pulses", clears[i], 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
