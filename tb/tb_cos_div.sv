// tb_cos_div -- self-checking test of the DIV unit.
// Exhaustive 5-bit / 4-bit division (the halving dividers, quotient kept to
// 4 bits) and random 16-bit / 9-bit division (the output divider), compared
// with integer floor division. A zero divisor must give an all-ones quotient.
module tb_cos_div;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  ns;
  logic [3:0]  ds, qs;
  logic [15:0] nw, qw;
  logic [8:0]  dw;

  cos_div #(.N_W(5),  .D_W(4), .Q_W(4))  dut_small (.n(ns), .d(ds), .q(qs));
  cos_div #(.N_W(16), .D_W(9), .Q_W(16)) dut_wide  (.n(nw), .d(dw), .q(qw));

  function automatic int ref_div(int n, int d, int qbits);
    if (d == 0) return (1 << qbits) - 1;
    return (n / d) % (1 << qbits);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nw = '0; dw = '0;
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 16; j++) begin
        ns = 5'(i); ds = 4'(j);
        @(posedge clk);
        checks++;
        if (int'(qs) != ref_div(i, j, 4)) begin
          failures++;
          $display("FAIL %0d / %0d = %0d", i, j, qs);
        end
      end
    // The worked results of the original: 1125/165 = 6 and 740/95 = 7.
    nw = 16'd1125; dw = 9'd165;
    @(posedge clk);
    checks++;
    if (qw != 16'd6) begin failures++; $display("FAIL 1125/165 = %0d", qw); end
    nw = 16'd740; dw = 9'd95;
    @(posedge clk);
    checks++;
    if (qw != 16'd7) begin failures++; $display("FAIL 740/95 = %0d", qw); end
    for (int k = 0; k < 2000; k++) begin
      nw = 16'($urandom);
      dw = (k % 8 == 0) ? 9'($urandom_range(0, 3)) : 9'($urandom);
      @(posedge clk);
      checks++;
      if (int'(qw) != ref_div(int'(nw), int'(dw), 16)) begin
        failures++;
        $display("FAIL %0d / %0d = %0d", nw, dw, qw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
