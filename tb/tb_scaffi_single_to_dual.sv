// tb_scaffi_single_to_dual: random words with AR high and low; checks each
// rail pair is (1,0) or (0,1) per bit while AR is high and (0,0) otherwise.
`timescale 1ps/1ps
module tb_scaffi_single_to_dual;
  localparam int W = 16;
  logic [W-1:0] d, t, f;
  logic ar;
  int checks = 0, failures = 0;

  scaffi_single_to_dual #(.W(W)) dut (.d, .ar, .t, .f);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      d  = W'($urandom);
      ar = $urandom_range(1);
      #10;
      for (int k = 0; k < W; k++) begin
        checks++;
        if (ar ? ({t[k], f[k]} !== {d[k], !d[k]}) : ({t[k], f[k]} !== 2'b00)) begin
          failures++;
          $display("bit %0d d=%b ar=%b rails=%b%b", k, d[k], ar, t[k], f[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
