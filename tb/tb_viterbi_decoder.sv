// tb_viterbi_decoder: encodes random bit streams, flips channel bits at
// random, and feeds the symbols (with idle gaps) to the decoder.  Every
// decoded bit is compared with the integer reference decoder (same T and
// depth) and its arrival time with the latency rule (two clocks after the
// symbol DEPTH-1 later was accepted).  A separate error-free stream must come
// back exactly as sent.
module tb_viterbi_decoder;
  import vd_ref_pkg::*;
  localparam int D = 15;
  localparam int T = 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] rx = '0;
  logic out_valid, out_bit;
  logic [3:0] state_live;
  logic [7:0] opt_pm;
  int checks = 0, failures = 0;
  longint cycle = 0;

  viterbi_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // expected outputs: bit and cycle at which it must be seen
  bit     exp_bit[$];
  longint exp_cyc[$];
  bit     sent[$];
  bit     check_sent;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_bit.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cycle);
      end else begin
        bit b;
        longint c;
        b = exp_bit.pop_front();
        c = exp_cyc.pop_front();
        if (out_bit !== b || cycle != c) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %b exp %b (due cycle %0d)", cycle, out_bit, b, c);
        end
        if (check_sent) begin
          bit s;
          s = sent.pop_front();
          checks++;
          if (out_bit !== s) failures++;
        end
      end
    end
  end

  task automatic run_stream(input int n, input int err_per_1000, input bit gaps);
    vd_ref m;
    logic x1, x2;
    longint acc_cyc[$];
    m = new(D, T);
    x1 = 0; x2 = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < n + D; i++) begin
      logic x;
      logic [1:0] sym;
      bit o;
      x = (i < n) ? 1'($urandom) : 1'b0;
      if (i < n) sent.push_back(x);
      sym = ref_encode(x, x1, x2);
      x2 = x1; x1 = x;
      if (int'($urandom_range(0, 999)) < err_per_1000) sym[0] = ~sym[0];
      if (int'($urandom_range(0, 999)) < err_per_1000) sym[1] = ~sym[1];
      if (gaps) while ($urandom_range(0, 3) == 0) @(posedge clk);
      #1;
      in_valid = 1;
      rx = sym;
      acc_cyc.push_back(cycle);
      if (m.step(sym, o)) begin
        exp_bit.push_back(o);
        exp_cyc.push_back(cycle + 2);
      end
      @(posedge clk);
      #1 in_valid = 0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_bit.size() != 0) begin failures++; $display("%0d outputs missing", exp_bit.size()); end
    exp_bit.delete(); exp_cyc.delete(); sent.delete();
    $display("stream n=%0d err/1000=%0d: states purged %0d", n, err_per_1000, m.purges);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    check_sent = 1;
    run_stream(500, 0, 1);
    check_sent = 0;
    run_stream(2000, 30, 1);
    run_stream(2000, 80, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
