// tb_c_element: drives random input sequences and compares the output with
// a reference that follows both inputs when they agree and holds otherwise.
`timescale 1ps/1ps
module tb_c_element;
  logic a, b, y;
  logic ref_y;
  int checks = 0, failures = 0;

  c_element dut (.a, .b, .y);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; ref_y = 0;
    #10;
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(1)) a = ~a; else b = ~b;
      if (a == b) ref_y = a;
      #10;
      checks++;
      if (y !== ref_y) begin
        failures++;
        $display("a=%b b=%b y=%b expected %b", a, b, y, ref_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
