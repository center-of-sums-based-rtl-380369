// tb_cos_mul -- self-checking test of the MT unit: exhaustive 4x4->8 bit
// (area) products and random 4x8->16 bit (area times centre) products.
module tb_cos_mul;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  a4, b4, c4;
  logic [7:0]  y8, b8;
  logic [15:0] y16;

  cos_mul #(.A_W(4), .B_W(4), .Y_W(8))  dut_ac (.a(a4), .b(b4), .y(y8));
  cos_mul #(.A_W(4), .B_W(8), .Y_W(16)) dut_tc (.a(c4), .b(b8), .y(y16));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c4 = '0; b8 = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        @(posedge clk);
        checks++;
        if (int'(y8) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", i, j, y8);
        end
      end
    for (int k = 0; k < 500; k++) begin
      c4 = 4'($urandom); b8 = 8'($urandom);
      @(posedge clk);
      checks++;
      if (int'(y16) != int'(c4) * int'(b8)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", c4, b8, y16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
