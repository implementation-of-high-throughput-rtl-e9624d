// tb_smu: drives random decisions, keep masks and best-state pointers into the
// register-exchange survivor memory (depth 15) and compares the decoded bit
// stream and its timing with a model of the survivor registers.
module tb_smu;
  localparam int D = 15;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] dec, keep;
  logic [1:0] opt_state;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;
  longint surv[4];
  int steps = 0;

  smu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec = '0; keep = '0; opt_state = '0;
    foreach (surv[s]) surv[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 4000; i++) begin
      longint nsurv[4];
      bit ev, eb;
      en        = ($urandom_range(0, 5) != 0);
      dec       = 4'($urandom);
      keep      = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hf;
      opt_state = 2'($urandom);
      if (!keep[opt_state]) keep[opt_state] = 1'b1;
      ev = 0; eb = 0;
      if (en) begin
        for (int ns = 0; ns < 4; ns++) begin
          int p;
          p = ((ns & 1) << 1) | int'(dec[ns]);
          nsurv[ns] = keep[ns] ? (((surv[p] << 1) | longint'(ns >> 1)) & ((64'd1 << D) - 1)) : surv[ns];
        end
        surv = nsurv;
        steps++;
        ev = steps >= D;
        eb = bit'((surv[opt_state] >> (D - 1)) & 1);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== ev || (ev && out_bit !== eb)) begin
        failures++;
        if (failures < 10) $display("step %0d: got %b/%b exp %b/%b", i, out_valid, out_bit, ev, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
