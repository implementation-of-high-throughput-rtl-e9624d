// tb_cla_adder: exhaustive check of the 8-bit look-ahead adder (all a, b and
// carry-in values) against the built-in addition.
module tb_cla_adder;
  logic [7:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          logic [8:0] e;
          a = 8'(i); b = 8'(j); cin = c[0];
          #1;
          e = 9'(i) + 9'(j) + 9'(c);
          checks++;
          if ({cout, sum} !== e) begin
            failures++;
            if (failures < 10) $display("%0d + %0d + %0d = %0d, got %0d", i, j, c, e, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
