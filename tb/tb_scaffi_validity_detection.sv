// tb_scaffi_validity_detection: moves the rails bit by bit, in random order,
// from the spacer to a random valid word and back, and checks that the
// detector output rises only after the last bit became valid and falls only
// after the last bit returned to the spacer. Widths 16 (default) and 5.
`timescale 1ps/1ps
module tb_scaffi_validity_detection;
  int checks = 0, failures = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] t16, f16;  logic ar16;
  logic [4:0]  t5,  f5;   logic ar5;
  scaffi_validity_detection dut16 (.t(t16), .f(f16), .ar(ar16));
  scaffi_validity_detection #(.W(5)) dut5 (.t(t5), .f(f5), .ar(ar5));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%0t %s: got %b", $time, what, got); end
  endtask

  initial begin
    logic [15:0] word, order_done;
    int k;
    t16 = '0; f16 = '0; t5 = '0; f5 = '0;
    #10;
    chk(ar16, 0, "spacer16"); chk(ar5, 0, "spacer5");
    for (int rep = 0; rep < 40; rep++) begin
      word = 16'($urandom);
      order_done = '0;
      // fill
      for (int n = 0; n < 16; n++) begin
        do k = $urandom_range(15); while (order_done[k]);
        order_done[k] = 1;
        t16[k] = word[k]; f16[k] = ~word[k];
        if (k < 5) begin t5[k] = word[k]; f5[k] = ~word[k]; end
        #10;
        chk(ar16, n == 15, "fill16");
        chk(ar5, &order_done[4:0], "fill5");
      end
      // drain
      for (int n = 0; n < 16; n++) begin
        do k = $urandom_range(15); while (!order_done[k]);
        order_done[k] = 0;
        t16[k] = 0; f16[k] = 0;
        if (k < 5) begin t5[k] = 0; f5[k] = 0; end
        #10;
        chk(ar16, n != 15, "drain16");
        chk(ar5, |order_done[4:0], "drain5");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
