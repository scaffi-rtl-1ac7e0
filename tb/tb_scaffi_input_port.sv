// tb_scaffi_input_port: walks the input port through its ten-state
// specification twice and checks RS, SR and AA in every state against a table
// of the specification, then checks reset from state 5.
`timescale 1ps/1ps
module tb_scaffi_input_port;
  logic rst, ar, as, sa;
  logic rs, sr, aa;
  int checks = 0, failures = 0;

  scaffi_input_port dut (.rst, .ar, .aa, .sr, .sa, .rs, .as);

  // {AR,AS,SA} applied in states 0..9 and the expected {RS,SR,AA}.
  logic [2:0] stim [10] = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b000,
                            3'b001, 3'b101, 3'b111, 3'b011, 3'b001};
  logic [2:0] expo [10] = '{3'b000, 3'b100, 3'b111, 3'b011, 3'b011,
                            3'b010, 3'b110, 3'b101, 3'b001, 3'b001};

  task automatic check(input int st);
    checks++;
    if ({rs, sr, aa} !== expo[st]) begin
      failures++;
      $display("state %0d: {RS,SR,AA}=%b expected %b", st, {rs, sr, aa}, expo[st]);
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
    rst = 1; {ar, as, sa} = 3'b000;
    #10 rst = 0;
    #10;
    for (int lap = 0; lap < 2; lap++) begin
      for (int st = 0; st < 10; st++) begin
        {ar, as, sa} = stim[st];
        #10 check(st);
      end
    end
    {ar, as, sa} = 3'b000;
    #10 check(0);
    for (int st = 0; st <= 5; st++) begin
      {ar, as, sa} = stim[st];
      #10;
    end
    check(5);
    rst = 1; {ar, as, sa} = 3'b000;
    #10 check(0);
    rst = 0;
    #10 check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
