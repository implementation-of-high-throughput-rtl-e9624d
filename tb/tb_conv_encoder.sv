// tb_conv_encoder: drives random bits (with idle gaps) into the encoder and
// compares every output pair with the hand-written code equations, checking
// the one-cycle latency.
module tb_conv_encoder;
  import vd_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic out_valid;
  logic [1:0] out_code;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic x1, x2;
    logic [1:0] exp_code;
    x1 = 0; x2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      logic v;
      v        = ($urandom_range(0, 3) != 0);
      in_valid = v;
      in_bit   = 1'($urandom);
      if (v) begin
        exp_code = ref_encode(in_bit, x1, x2);
        x2 = x1; x1 = in_bit;
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v || (v && out_code !== exp_code)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: got %b/%b exp %b/%b", i, out_valid, out_code, v, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
