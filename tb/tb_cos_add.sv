// tb_cos_add -- self-checking test of the ADD unit.
// Checks the widening 4+4->5 bit configuration exhaustively and a 16+16->16
// truncating configuration with random operands against integer sums.
module tb_cos_add;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  a4, b4;
  logic [4:0]  y5;
  logic [15:0] a16, b16, y16;

  cos_add #(.A_W(4), .B_W(4), .Y_W(5))    dut_small (.a(a4), .b(b4), .y(y5));
  cos_add #(.A_W(16), .B_W(16), .Y_W(16)) dut_wide  (.a(a16), .b(b16), .y(y16));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        @(posedge clk);
        checks++;
        if (int'(y5) != i + j) begin
          failures++;
          $display("FAIL 4-bit %0d + %0d = %0d", i, j, y5);
        end
      end
    for (int k = 0; k < 500; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      @(posedge clk);
      checks++;
      if (y16 != 16'((32'(a16) + 32'(b16)) % 32'h1_0000)) begin
        failures++;
        $display("FAIL 16-bit %0d + %0d = %0d", a16, b16, y16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
