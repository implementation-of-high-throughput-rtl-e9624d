// tb_acs_unit: random add-compare-select cases, including metrics that wrap
// around 2^8, checked against integer arithmetic on unwrapped metrics.
module tb_acs_unit;
  logic [7:0] pm0, pm1, new_pm;
  logic       v0, v1, dec, new_valid;
  logic [4:0] bm0, bm1;
  int checks = 0, failures = 0;

  acs_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int base, a, b, c0, c1, ebest;
      bit edec, evalid;
      // unwrapped metrics within a spread of 120, anywhere on the 8-bit circle
      base = $urandom_range(0, 100000);
      a    = base + $urandom_range(0, 120);
      b    = base + $urandom_range(0, 120);
      pm0  = 8'(a);
      pm1  = 8'(b);
      bm0  = 5'($urandom_range(0, 2));
      bm1  = 5'($urandom_range(0, 2));
      v0   = (i % 4) != 1;
      v1   = (i % 4) != 2;
      #1;
      c0 = a + int'(bm0);
      c1 = b + int'(bm1);
      evalid = v0 | v1;
      if (v0 && v1) edec = c1 < c0;
      else          edec = v1;
      ebest = edec ? c1 : c0;
      checks++;
      if (new_valid !== evalid || (evalid && (dec !== edec || new_pm !== 8'(ebest)))) begin
        failures++;
        if (failures < 10)
          $display("pm0=%0d pm1=%0d bm=%0d,%0d v=%b%b: got %0d/%b/%b exp %0d/%b/%b",
                   pm0, pm1, bm0, bm1, v1, v0, new_pm, dec, new_valid, 8'(ebest), edec, evalid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
