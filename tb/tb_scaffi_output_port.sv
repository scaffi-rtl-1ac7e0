// tb_scaffi_output_port: walks the output port through its ten-state
// specification twice (four words) and checks RS, AR and SA in every state
// against a table of the specification, then checks that reset returns the
// controller to state 0 from state 5.
`timescale 1ps/1ps
module tb_scaffi_output_port;
  logic rst, sr, as, aa;
  logic rs, ar, sa;
  int checks = 0, failures = 0;

  scaffi_output_port dut (.rst, .sr, .sa, .ar, .aa, .rs, .as);

  // {SR,AS,AA} applied in states 0..9 and the expected {RS,AR,SA}.
  logic [2:0] stim [10] = '{3'b000, 3'b100, 3'b110, 3'b111, 3'b110,
                            3'b100, 3'b000, 3'b010, 3'b011, 3'b010};
  logic [2:0] expo [10] = '{3'b000, 3'b100, 3'b111, 3'b101, 3'b001,
                            3'b001, 3'b101, 3'b110, 3'b100, 3'b000};

  task automatic check(input int st);
    checks++;
    if ({rs, ar, sa} !== expo[st]) begin
      failures++;
      $display("state %0d: {RS,AR,SA}=%b expected %b", st, {rs, ar, sa}, expo[st]);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; {sr, as, aa} = 3'b000;
    #10 rst = 0;
    #10;
    for (int lap = 0; lap < 2; lap++) begin
      for (int st = 0; st < 10; st++) begin
        {sr, as, aa} = stim[st];
        #10 check(st);
      end
    end
    // back in state 0; go to state 5, then reset with SR low
    for (int st = 0; st <= 5; st++) begin
      {sr, as, aa} = stim[st];
      #10;
    end
    check(5);
    rst = 1; {sr, as, aa} = 3'b000;
    #10 check(0);
    rst = 0;
    #10 check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
