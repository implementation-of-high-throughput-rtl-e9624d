// tb_pmu: runs the path metric unit through random branch-metric steps with
// random keep masks and compares the registered metrics, live flags and
// decision bits with an integer model of the K=3 (101, 111) trellis.
module tb_pmu;
  import vd_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0][4:0] bm;
  logic [3:0] keep;
  logic [3:0][7:0] pm, new_pm;
  logic [3:0] pm_valid, new_valid, dec;
  int checks = 0, failures = 0;
  int mpm[4];
  bit mlive[4];

  pmu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bm = '0; keep = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    foreach (mpm[s]) begin mpm[s] = 0; mlive[s] = (s == 0); end
    for (int i = 0; i < 3000; i++) begin
      logic [1:0] rx;
      int npm[4];
      bit nlive[4], ndec[4];
      rx = 2'($urandom);
      for (int c = 0; c < 4; c++) bm[c] = 5'(hamming2(rx, 2'(c)));
      en   = ($urandom_range(0, 4) != 0);
      keep = (i % 7 == 3) ? 4'($urandom) : 4'hf;
      // model: predecessors of ns are {ns[0], b}
      for (int ns = 0; ns < 4; ns++) begin
        bit got;
        got = 0;
        npm[ns] = 0;
        ndec[ns] = 0;
        for (int b = 0; b < 2; b++) begin
          int p, c;
          p = ((ns & 1) << 1) | b;
          if (mlive[p]) begin
            c = mpm[p] + hamming2(rx, ref_encode(ns[1], p[1], p[0]));
            if (!got || c < npm[ns]) begin npm[ns] = c; ndec[ns] = b[0]; got = 1; end
          end
        end
        nlive[ns] = got;
      end
      #1;
      for (int ns = 0; ns < 4; ns++) begin
        checks++;
        if (new_valid[ns] !== nlive[ns] || (nlive[ns] && (new_pm[ns] !== 8'(npm[ns]) || dec[ns] !== ndec[ns]))) begin
          failures++;
          if (failures < 10) $display("step %0d state %0d: got %0d/%b/%b exp %0d/%b/%b", i, ns,
                                      new_pm[ns], dec[ns], new_valid[ns], npm[ns], ndec[ns], nlive[ns]);
        end
      end
      @(posedge clk); #1;
      if (en) begin
        for (int ns = 0; ns < 4; ns++) begin
          mlive[ns] = nlive[ns] && keep[ns];
          if (mlive[ns]) mpm[ns] = npm[ns];
        end
        // the T-algorithm never purges every state; keep the model alive
        if (!(mlive[0] | mlive[1] | mlive[2] | mlive[3])) begin
          rst_n = 0; @(posedge clk); #1; rst_n = 1;
          foreach (mpm[s]) begin mpm[s] = 0; mlive[s] = (s == 0); end
        end
      end
      for (int ns = 0; ns < 4; ns++) begin
        checks++;
        if (pm_valid[ns] !== mlive[ns] || (mlive[ns] && pm[ns] !== 8'(mpm[ns]))) begin
          failures++;
          if (failures < 10) $display("step %0d state %0d reg: got %0d/%b exp %0d/%b", i, ns,
                                      pm[ns], pm_valid[ns], mpm[ns], mlive[ns]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
