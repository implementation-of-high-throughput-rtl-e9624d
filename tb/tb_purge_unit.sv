// tb_purge_unit: random registered metrics (with wrap-around), live masks and
// received pairs.  The testbench forms the ACS results itself, then checks the
// precomputed best metric, the best-state pointer and the keep mask against a
// direct search over the new metrics with threshold T = 2.
module tb_purge_unit;
  import vd_ref_pkg::*;
  localparam int T = 2;
  logic [3:0][7:0] pm, new_pm;
  logic [3:0] pm_valid, new_valid, keep;
  logic [3:0][4:0] bm;
  logic [7:0] opt_pm;
  logic [1:0] opt_state;
  int checks = 0, failures = 0, purged = 0;

  purge_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int base, upm[4], npm[4], opt, opt_s;
      bit nlive[4], have;
      logic [1:0] rx;
      base = $urandom_range(0, 100000);
      do pm_valid = 4'($urandom); while (pm_valid == 0);
      for (int s = 0; s < 4; s++) begin
        upm[s] = base + $urandom_range(0, 6);
        pm[s]  = 8'(upm[s]);
      end
      rx = 2'($urandom);
      for (int c = 0; c < 4; c++) bm[c] = 5'(hamming2(rx, 2'(c)));
      for (int ns = 0; ns < 4; ns++) begin
        bit got;
        got = 0;
        npm[ns] = 0;
        for (int b = 0; b < 2; b++) begin
          int p, c;
          p = ((ns & 1) << 1) | b;
          if (pm_valid[p]) begin
            c = upm[p] + hamming2(rx, ref_encode(ns[1], p[1], p[0]));
            if (!got || c < npm[ns]) begin npm[ns] = c; got = 1; end
          end
        end
        nlive[ns]     = got;
        new_valid[ns] = got;
        new_pm[ns]    = 8'(npm[ns]);
      end
      have = 0; opt = 0; opt_s = 0;
      for (int s = 0; s < 4; s++)
        if (nlive[s] && (!have || npm[s] < opt)) begin opt = npm[s]; opt_s = s; have = 1; end
      #1;
      checks++;
      if (opt_pm !== 8'(opt) || opt_state !== 2'(opt_s)) begin
        failures++;
        if (failures < 10) $display("case %0d: opt got %0d@%0d exp %0d@%0d", i, opt_pm, opt_state, 8'(opt), opt_s);
      end
      for (int s = 0; s < 4; s++) begin
        bit k;
        k = nlive[s] && (npm[s] - opt <= T);
        if (nlive[s] && !k) purged++;
        checks++;
        if (keep[s] !== k) begin
          failures++;
          if (failures < 10) $display("case %0d state %0d: keep %b exp %b", i, s, keep[s], k);
        end
      end
    end
    $display("states purged: %0d", purged);
    checks++;
    if (purged == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
