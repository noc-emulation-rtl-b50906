// tb_opb_ib_filter: self-checking test of the OPB-to-internal-bus bridge.
//
// Two register-file slaves in the bench sit on IB 0 and IB 1 and answer reads
// combinationally. An OPB master task writes and reads words at addresses in
// and outside the filter's window. Checks: each access reaches the right bus
// with the right word address and data, the strobe lasts one cycle, read data
// comes back with sl_xferack, and accesses outside
// the window are not acknowledged. An acknowledged transfer takes three
// cycles, so the master sees sl_xferack two clock edges after select rises.
module tb_opb_ib_filter;
  import emu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        opb_select, opb_rnw;
  logic [31:0] opb_abus, opb_dbus, sl_dbus;
  logic        sl_xferack;
  ib_req_t     ib0_req, ib1_req;
  logic [31:0] ib0_rdata, ib1_rdata;
  int checks = 0, failures = 0;

  opb_ib_filter #(.C_BASEADDR(32'h4000_0000)) dut (
    .clk, .rst_n, .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .sl_dbus, .sl_xferack,
    .ib0_req, .ib0_rdata, .ib1_req, .ib1_rdata
  );

  always #5 clk = ~clk;

  // bench slaves: 8192 words each, addressed by the 13-bit word address
  logic [31:0] mem0 [8192];
  logic [31:0] mem1 [8192];
  int strobes0 = 0, strobes1 = 0;
  assign ib0_rdata = ib0_req.re ? mem0[ib0_req.addr] : '0;
  assign ib1_rdata = ib1_req.re ? mem1[ib1_req.addr] : '0;
  always @(posedge clk) begin
    if (ib0_req.we) mem0[ib0_req.addr] <= ib0_req.wdata;
    if (ib1_req.we) mem1[ib1_req.addr] <= ib1_req.wdata;
    if (ib0_req.we || ib0_req.re) strobes0++;
    if (ib1_req.we || ib1_req.re) strobes1++;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s = %0h, expected %0h", what, got, exp); end
  endtask

  // one OPB transfer; returns the data and the cycles to acknowledge (-1: none)
  task automatic opb(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] q, output int lat);
    @(negedge clk);
    opb_select = 1'b1; opb_rnw = rnw; opb_abus = a; opb_dbus = rnw ? '0 : d;
    lat = -1;
    for (int c = 1; c <= 10; c++) begin
      @(posedge clk); #1;
      if (sl_xferack) begin lat = c; q = sl_dbus; break; end
    end
    @(negedge clk);
    opb_select = 1'b0; opb_rnw = 1'b0; opb_abus = '0; opb_dbus = '0;
  endtask

  logic [31:0] q;
  int lat;
  initial begin
    opb_select = 0; opb_rnw = 0; opb_abus = 0; opb_dbus = 0;
    for (int i = 0; i < 8192; i++) begin mem0[i] = 32'(i) ^ 32'h5A5A_0000; mem1[i] = 32'(i) ^ 32'hC3C3_0000; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    opb(1'b0, 32'h4000_0010, 32'hDEAD_BEEF, q, lat);       // IB 0 word 4
    expect_eq("write ack latency", lat, 2);
    expect_eq("IB0 word 4 written", mem0[4], 32'hDEAD_BEEF);
    opb(1'b0, 32'h4000_8000 + 4 * 37, 32'h1234_5678, q, lat);  // IB 1 word 37
    expect_eq("IB1 word 37 written", mem1[37], 32'h1234_5678);
    expect_eq("IB0 word 37 untouched", mem0[37], 32'(37) ^ 32'h5A5A_0000);
    opb(1'b1, 32'h4000_0010, 0, q, lat);
    expect_eq("read IB0", q, 32'hDEAD_BEEF);
    expect_eq("read ack latency", lat, 2);
    opb(1'b1, 32'h4000_8000 + 4 * 8191, 0, q, lat);
    expect_eq("read IB1 top word", q, 32'(8191) ^ 32'hC3C3_0000);
    opb(1'b1, 32'h4000_0000 + 4 * 100, 0, q, lat);
    expect_eq("read IB0 word 100", q, 32'(100) ^ 32'h5A5A_0000);
    expect_eq("strobes on IB0", strobes0, 3);
    expect_eq("strobes on IB1", strobes1, 2);
    opb(1'b0, 32'h4001_0010, 32'hFFFF_FFFF, q, lat);
    expect_eq("outside window: no ack", lat, -1);
    expect_eq("outside window: no write", mem0[4], 32'hDEAD_BEEF);
    for (int k = 0; k < 50; k++) begin
      logic [31:0] a, d;
      a = {16'h4000, 1'($urandom), 13'($urandom), 2'b00};
      d = $urandom;
      opb(1'b0, a, d, q, lat);
      opb(1'b1, a, 0, q, lat);
      expect_eq("random write/read", q, d);
    end
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
