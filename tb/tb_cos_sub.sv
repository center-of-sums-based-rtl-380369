// tb_cos_sub -- self-checking test of the SUB unit: exhaustive 5-bit
// subtraction compared with the difference modulo 32.
module tb_cos_sub;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] a, b, y;

  cos_sub #(.W(5)) dut (.a(a), .b(b), .y(y));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a = 5'(i); b = 5'(j);
        @(posedge clk);
        checks++;
        if (int'(y) != ((i - j + 32) % 32)) begin
          failures++;
          $display("FAIL %0d - %0d = %0d", i, j, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
