// tb_rsa_gals: the GALS RSA core at full size (128-bit operands, 72 MHz
// exponentiation clock, 40 MHz multiplication clock). Runs exponentiations
// with random full-width operands and small ones, and checks
//  - the result against a 256-bit reference square-and-multiply;
//  - that the exponentiation clock is stopped for each multiplication: it
//    makes at most two rising edges per multiplication (issue, take result)
//    plus a few for start and done;
//  - that the multiplier clock ran at least W+1 edges per multiplication;
//  - the share of time the exponentiation island spends stopped (printed,
//    and required to exceed 95 %).
`timescale 1ps/1ps
module tb_rsa_gals;
  localparam int W = scaffi_pkg::RSA_W;
  logic rst, mx_clk, mm_clk, start, busy, done, mm_busy;
  logic [W-1:0] base, exponent, modulus, result;
  int checks = 0, failures = 0;
  int mx_edges = 0, mm_edges = 0, mx_stretches = 0;
  time stopped = 0, t_req;

  rsa_gals dut (.rst, .mx_clk, .mm_clk, .start, .base, .exponent, .modulus,
    .busy, .done, .result, .mm_busy);

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

  always @(posedge mx_clk) mx_edges++;
  always @(posedge mm_clk) mm_edges++;
  always @(posedge dut.mx_rs) begin mx_stretches++; t_req = $time; end
  always @(negedge dut.mx_rs) if (!rst) stopped += $time - t_req;

  initial begin
    #60_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, e, m);
    logic [W-1:0] expect_r;
    int mx0, mm0, st0, nmul;
    time t0, s0;
    expect_r = powmod(x, e, m);
    nmul = W + $countones(e);
    @(posedge mx_clk);
    modulus <= m; base <= x; exponent <= e; start <= 1'b1;
    @(posedge mx_clk);
    start <= 1'b0;
    mx0 = mx_edges; mm0 = mm_edges; st0 = mx_stretches; t0 = $time; s0 = stopped;
    do @(posedge mx_clk); while (!done);
    checks++;
    if (result !== expect_r) begin
      failures++; $display("%h^%h mod %h = %h expected %h", x, e, m, result, expect_r);
    end
    checks++;
    if (mx_stretches - st0 != nmul) begin
      failures++; $display("%0d channel transfers, expected %0d", mx_stretches - st0, nmul);
    end
    checks++;
    if (mx_edges - mx0 > 2 * nmul + 2) begin
      failures++; $display("exponentiation clock made %0d edges for %0d products", mx_edges - mx0, nmul);
    end
    checks++;
    if (mm_edges - mm0 < (W + 1) * nmul) begin
      failures++; $display("multiplier clock made only %0d edges", mm_edges - mm0);
    end
    $display("%0d products in %0t ps, exponentiation clock stopped %0d.%0d %% of the time, %0d edges",
             nmul, $time - t0, 100 * (stopped - s0) / ($time - t0),
             (1000 * (stopped - s0) / ($time - t0)) % 10, mx_edges - mx0);
    checks++;
    if (100 * (stopped - s0) < 95 * ($time - t0)) begin
      failures++; $display("exponentiation clock not stopped during products");
    end
  endtask

  initial begin
    logic [W-1:0] m;
    rst = 1; start = 0; base = '0; exponent = '0; modulus = 7;
    #300_000 rst = 0;
    m = rand_w() | (W'(1) << (W - 1)) | 1;
    run(rand_w() % m, rand_w(), m);
    run(7, 13, 1009);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
