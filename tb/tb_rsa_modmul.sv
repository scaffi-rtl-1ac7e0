// tb_rsa_modmul: drives the multiplication island through its 2-phase
// handshake with random 128-bit operands and moduli (and a few edge cases),
// compares every product with a*b mod n computed with 256-bit arithmetic, and
// checks that SA answers exactly W+1 clock edges after SR (one edge to take
// the operands, one per operand bit).
`timescale 1ps/1ps
module tb_rsa_modmul;
  localparam int W = 128;
  logic clk = 0, rst, sr, sa, busy;
  logic [W-1:0] a, b, n, result;
  int checks = 0, failures = 0;

  rsa_modmul dut (.clk, .rst, .sr, .sa, .a, .b, .n, .result, .busy);

  always #12500 clk = ~clk;

  function automatic logic [W-1:0] mulmod(input logic [W-1:0] x, y, m);
    logic [2*W-1:0] p;
    p = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    return W'(p % {{W{1'b0}}, m});
  endfunction

  function automatic logic [W-1:0] rand_w();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [W-1:0] x, y, m);
    int cyc = 0;
    logic [W-1:0] expect_p;
    expect_p = mulmod(x, y, m);
    @(negedge clk);
    a = x; b = y; n = m;
    sr = ~sr;
    while (sa != sr) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (result !== expect_p) begin
      failures++; $display("%h*%h mod %h = %h expected %h", x, y, m, result, expect_p);
    end
    checks++;
    if (cyc != W + 1) begin failures++; $display("latency %0d expected %0d", cyc, W + 1); end
  endtask

  initial begin
    logic [W-1:0] m;
    rst = 1; sr = 0; a = '0; b = '0; n = 3;
    #60_000 rst = 0;
    one(0, 5, 7);
    one(6, 6, 7);
    m = '1;
    one(m - 1, m - 1, m);
    one(1, m - 2, m);
    for (int i = 0; i < 40; i++) begin
      m = rand_w() | 1;
      if (i % 4 == 0) m = m >> $urandom_range(100);
      if (m < 2) m = 3;
      one(rand_w() % m, rand_w() % m, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
