// tb_scaffi_data_production: the testbench plays the output port (SA
// follows SR a few cycles later) and offers words at random; it checks that
// every accepted word appears on the bus with one SR toggle, that nothing is
// accepted while SA differs from SR, and that the bus does not change then.
`timescale 1ps/1ps
module tb_scaffi_data_production;
  localparam int W = 16;
  logic clk = 0, rst;
  logic [W-1:0] in_data, data;
  logic in_valid, in_ready, sr, sa;
  int checks = 0, failures = 0, sent = 0;
  logic [W-1:0] expected_q[$];

  scaffi_data_production #(.W(W)) dut (.clk, .rst, .in_data, .in_valid,
    .in_ready, .sr, .sa, .data);

  always #5000 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // port model: SA follows SR after 1..3 cycles
  initial begin
    sa = 0;
    forever begin
      @(posedge clk);
      if (sr != sa) begin
        repeat ($urandom_range(2)) @(posedge clk);
        #1000 sa = sr;
      end
    end
  end

  logic prev_sr;
  logic [W-1:0] prev_data;
  always @(posedge clk) begin
    #100;
    if (!rst) begin
      if (sr != prev_sr) begin
        checks++;
        if (data !== expected_q.pop_front()) begin
          failures++; $display("wrong word on bus %h", data);
        end
      end else if (sr != sa) begin
        checks++;
        if (data !== prev_data) begin failures++; $display("bus changed while busy"); end
      end
    end
    prev_sr   = sr;
    prev_data = data;
  end

  initial begin
    rst = 1; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    #1000 rst = 0;
    while (sent < 200) begin
      @(negedge clk);
      in_valid = $urandom_range(3) != 0;
      in_data  = W'($urandom);
      checks++;
      if (in_ready !== (sr == sa)) begin failures++; $display("in_ready wrong"); end
      if (in_valid && in_ready) begin
        expected_q.push_back(in_data);
        sent++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expected_q.size() != 0) begin failures++; $display("words not sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
