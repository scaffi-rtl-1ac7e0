// tb_scaffi_dual_to_single: sends random words as valid rail pairs separated
// by the spacer and checks the output word both when valid and after the
// rails have returned to the spacer (it must be held).
`timescale 1ps/1ps
module tb_scaffi_dual_to_single;
  localparam int W = 16;
  logic [W-1:0] t, f, d;
  int checks = 0, failures = 0;

  scaffi_dual_to_single #(.W(W)) dut (.t, .f, .d);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word;
    for (int i = 0; i < 300; i++) begin
      word = W'($urandom);
      t = word; f = ~word;
      #10;
      checks++;
      if (d !== word) begin failures++; $display("valid: %h expected %h", d, word); end
      t = '0; f = '0;
      #10;
      checks++;
      if (d !== word) begin failures++; $display("spacer: %h expected %h", d, word); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
