// tb_lfsr: self-checking test of the Galois LFSR.
//
// Loads seeds, steps the register and compares every state with a reference
// sequence computed here from the feedback polynomial x^16+x^14+x^13+x^11+1,
// written as a shift-and-XOR on the integer state. Also checks that the
// register holds when step is low, that a zero seed is replaced by 1, and
// that the period from a seed is exactly 65535 (maximal length).
module tb_lfsr;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0, step = 1'b0;
  logic [15:0] seed = '0;
  logic [15:0] q;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst_n, .load, .seed, .step, .q);

  always #5 clk = ~clk;

  // reference: polynomial taps at exponents 16,14,13,11 in Galois form
  function automatic int ref_next(input int s);
    int t;
    t = s >> 1;
    if (s & 1) t = t ^ ((1 << 15) | (1 << 13) | (1 << 12) | (1 << 10));
    return t;
  endfunction

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    int s, period;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("reset state", q, 1);
    load = 1'b1; seed = 16'hACE1;
    @(negedge clk);
    load = 1'b0;
    chk("loaded seed", q, 16'hACE1);
    s = 16'hACE1;
    step = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      s = ref_next(s);
      chk("sequence", q, s);
    end
    step = 1'b0;
    repeat (3) @(negedge clk);
    chk("hold", q, s);
    load = 1'b1; seed = 16'h0000;
    @(negedge clk);
    load = 1'b0;
    chk("zero seed replaced", q, 1);
    // period
    step = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q != 16'h0001 && period < 70000);
    step = 1'b0;
    chk("period", period, 65535);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
