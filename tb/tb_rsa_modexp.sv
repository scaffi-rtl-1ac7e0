// tb_rsa_modexp: runs the exponentiation island against a multiplication
// model that answers each SCAFFI request within the same clock cycle (as the
// real channel appears to this island, whose clock is stopped meanwhile).
// Checks the results against a reference square-and-multiply computed with
// 256-bit arithmetic, and that each exponentiation issues exactly one
// squaring per exponent bit plus one multiplication per set bit.
`timescale 1ps/1ps
module tb_rsa_modexp;
  localparam int W = 128;
  logic clk = 0, rst, start, busy, done, sr, sa;
  logic [W-1:0] base, exponent, result, op_a, op_b, mm_result, n;
  int checks = 0, failures = 0, mults = 0;

  rsa_modexp dut (.clk, .rst, .start, .base, .exponent, .busy, .done, .result,
    .sr, .sa, .op_a, .op_b, .mm_result);

  always #6944 clk = ~clk;

  function automatic logic [W-1:0] mulmod(input logic [W-1:0] x, y, m);
    logic [2*W-1:0] p;
    p = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    return W'(p % {{W{1'b0}}, m});
  endfunction

  function automatic logic [W-1:0] powmod(input logic [W-1:0] x, e, m);
    logic [W-1:0] r = 1;
    for (int i = W - 1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, x, m);
    end
    return r;
  endfunction

  function automatic logic [W-1:0] rand_w();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // multiplication island model
  always @(sr) begin
    #2000;
    mm_result = mulmod(op_a, op_b, n);
    mults++;
    sa = sr;
  end

  initial begin
    #4_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, e, m);
    logic [W-1:0] expect_r;
    int m0;
    expect_r = powmod(x, e, m);
    @(negedge clk);
    n = m; base = x; exponent = e; start = 1;
    m0 = mults;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (result !== expect_r) begin
      failures++; $display("%h^%h mod %h = %h expected %h", x, e, m, result, expect_r);
    end
    checks++;
    if (mults - m0 != W + $countones(e)) begin
      failures++; $display("%0d multiplications, expected %0d", mults - m0, W + $countones(e));
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy after done"); end
  endtask

  initial begin
    logic [W-1:0] m;
    rst = 1; start = 0; sa = 0; n = 7; base = '0; exponent = '0; mm_result = '0;
    #30_000 rst = 0;
    run(3, 0, 7);
    run(2, 10, 1000);
    run(5, '1, 1009);
    for (int i = 0; i < 6; i++) begin
      m = rand_w() | 1;
      run(rand_w() % m, rand_w(), m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
