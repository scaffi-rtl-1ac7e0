// tb_scaffi_stretcher: checks the free-running period of the ring against
// its delay budget, that Ack is Req delayed by D1, that Clock never moves
// between Ack rising and Req falling, that stretching happens at both clock
// levels, and that the clock restarts within half a period after release.
`timescale 1ps/1ps
module tb_scaffi_stretcher;
  import scaffi_pkg::*;
  localparam int unsigned D3   = d3_ps(SENDER_MHZ);
  localparam int unsigned HALF = D3 + INV_PS + D2_PS + MUX_PS + CEL_PS;

  logic req, ack, clk;
  int checks = 0, failures = 0;
  int stretch_high = 0, stretch_low = 0;
  time last_edge;

  scaffi_stretcher dut (.req, .ack, .clk);

  task automatic fail(input string msg);
    failures++;
    $display("%0t: %s", $time, msg);
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ack must equal req delayed by D1
  always @(req) begin
    automatic logic v = req;
    #(D1_PS - 1);
    checks++;
    if (ack !== !v) fail("ack moved before D1");
    #2;
    checks++;
    if (ack !== v) fail("ack is not req delayed by D1");
  end

  initial begin
    time t0, t1;
    logic lvl;
    req = 0;
    // free-running period (half period from the delay budget)
    repeat (3) @(posedge clk);
    t0 = $time;
    repeat (10) @(posedge clk);
    t1 = $time;
    checks++;
    if (t1 - t0 != 10 * 2 * HALF) fail($sformatf("period %0t expected %0d", (t1 - t0) / 10, 2 * HALF));
    // stretch at random phases
    for (int i = 0; i < 60; i++) begin
      #($urandom_range(2 * HALF));
      req = 1;
      wait (ack == 1'b1);
      lvl = clk;
      if (lvl) stretch_high++; else stretch_low++;
      fork
        begin : watch
          @(clk) fail("clock moved while stretched");
        end
        #($urandom_range(5 * HALF, 1)) ;
      join_any
      disable fork;
      checks++;
      if (clk !== lvl) fail("clock level lost during stretch");
      req = 0;
      t0 = $time;
      @(clk);
      checks++;
      if ($time - t0 > HALF + MUX_PS + CEL_PS) fail("clock did not restart in time");
      wait (ack == 1'b0);
    end
    checks++;
    if (stretch_high == 0 || stretch_low == 0) fail("stretch not seen at both levels");
    $display("stretches: high %0d low %0d", stretch_high, stretch_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
