// tb_scaffi_data_consumption: the testbench plays the input port, toggling
// SR with a new word whenever SA has caught up, and throttles accept at
// random; it checks each word comes out once, in order, with one SA toggle,
// and that nothing is taken while accept is low.
`timescale 1ps/1ps
module tb_scaffi_data_consumption;
  localparam int W = 16;
  logic clk = 0, rst;
  logic sr, sa, accept, out_valid;
  logic [W-1:0] data, out_data;
  int checks = 0, failures = 0, received = 0, stalls = 0;
  logic [W-1:0] expected_q[$];

  scaffi_data_consumption #(.W(W)) dut (.clk, .rst, .sr, .sa, .data,
    .accept, .out_data, .out_valid);

  always #6000 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accept and pending as the DUT sees them at the coming edge, recorded
  // by the driver; checked just after that edge
  logic acc_q = 0, pend_q = 0, sa_q = 0;
  always @(posedge clk) begin
    #100;
    if (!rst && out_valid) begin
      checks++;
      received++;
      if (out_data !== expected_q.pop_front()) begin
        failures++; $display("wrong word %h", out_data);
      end
      if (!acc_q || !pend_q) begin failures++; $display("took a word it should not"); end
    end
    if (!rst && pend_q && !acc_q) begin
      stalls++;
      checks++;
      if (sa !== sa_q) begin failures++; $display("SA moved while not accepting"); end
    end
  end

  initial begin
    rst = 1; sr = 0; data = '0; accept = 0;
    repeat (3) @(posedge clk);
    #1000 rst = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      accept = $urandom_range(2) != 0;
      if (sr == sa) begin
        data = W'($urandom);
        expected_q.push_back(data);
        sr = ~sr;
      end
      acc_q  = accept;
      pend_q = (sr != sa);
      sa_q   = sa;
    end
    @(negedge clk);
    accept = 1; acc_q = 1; pend_q = (sr != sa); sa_q = sa;
    @(negedge clk);
    acc_q = 1; pend_q = (sr != sa); sa_q = sa;
    repeat (4) @(posedge clk);
    checks++;
    if (expected_q.size() != 0 || stalls == 0) begin
      failures++; $display("left %0d, stalls %0d", expected_q.size(), stalls);
    end
    $display("received %0d stalls %0d", received, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
