// tb_viterbi_k9: the decoder built for constraint length 9 (256 states) with
// the common generators 561 and 753 (octal), survivor depth 45 and the default
// threshold T = 2.  An error-free stream must decode exactly; a stream with 6 %
// of channel bits flipped must match the integer reference decoder bit for
// bit, with the latency rule of the decoder.  Purging must occur.  The
// decoded-bit errors are also reported next to a full-trellis decoder's.
module tb_viterbi_k9;
  import vd_ref_pkg::*;
  localparam int K  = 9;
  localparam int G0 = 'o561;
  localparam int G1 = 'o753;
  localparam int D  = 45;
  localparam int T  = 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] rx = '0;
  logic out_valid, out_bit;
  logic [255:0] state_live;
  logic [7:0] opt_pm;
  int checks = 0, failures = 0, purges = 0;
  longint live_sum = 0, live_steps = 0;
  longint cycle = 0;

  viterbi_decoder #(.K(K), .G0(G0), .G1(G1), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  bit     exp_bit[$];
  longint exp_cyc[$];
  bit     sent[$];
  bit     check_sent;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      live_sum += $countones(state_live);
      live_steps++;
    end
    if (rst_n && out_valid) begin
      checks++;
      if (exp_bit.size() == 0) begin
        failures++;
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
          checks++;
          if (out_bit !== sent.pop_front()) failures++;
        end
      end
    end
  end

  task automatic run_stream(input int n, input int err_per_1000);
    vd_ref m, mf;
    int st, err_t, err_f;
    bit sent_all[$], out_t[$], out_f[$];
    m  = new(D, T, K, G0, G1);
    mf = new(D, 100000, K, G0, G1);
    st = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < n + D; i++) begin
      logic x;
      logic [1:0] sym;
      bit o;
      x = (i < n) ? 1'($urandom) : 1'b0;
      if (i < n) sent.push_back(x);
      sent_all.push_back(x);
      sym = ref_code(K, G0, G1, st, x);
      st  = (int'(x) << (K - 2)) | (st >> 1);
      if (int'($urandom_range(0, 999)) < err_per_1000) sym[0] = ~sym[0];
      if (int'($urandom_range(0, 999)) < err_per_1000) sym[1] = ~sym[1];
      #1;
      in_valid = 1;
      rx = sym;
      if (m.step(sym, o)) begin
        exp_bit.push_back(o);
        exp_cyc.push_back(cycle + 2);
        out_t.push_back(o);
      end
      if (mf.step(sym, o)) out_f.push_back(o);
      @(posedge clk);
      #1 in_valid = 0;
      if ($urandom_range(0, 7) == 0) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_bit.size() != 0) begin failures++; $display("%0d outputs missing", exp_bit.size()); end
    exp_bit.delete(); exp_cyc.delete(); sent.delete();
    purges += m.purges;
    err_t = 0;
    err_f = 0;
    for (int i = 0; i < out_t.size(); i++) begin
      if (out_t[i] != sent_all[i]) err_t++;
      if (out_f[i] != sent_all[i]) err_f++;
    end
    $display("K=9 decoded-bit errors over %0d bits: T-algorithm (T=%0d) %0d, full trellis %0d", out_t.size(), T, err_t, err_f);
    $display("K=9 stream n=%0d err/1000=%0d: states purged %0d, mean live states %0d.%0d of 256", n, err_per_1000,
             m.purges, live_sum / live_steps, (live_sum * 10 / live_steps) % 10);
    live_sum = 0;
    live_steps = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    check_sent = 1;
    run_stream(300, 0);
    check_sent = 0;
    run_stream(1500, 60);
    checks++;
    if (purges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
