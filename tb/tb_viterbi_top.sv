// tb_viterbi_top: end-to-end test of the encoder and decoder at their default
// parameters (K = 3, 8-bit metrics, depth 15, T = 2).
//
// Random bits go into the encoder of the top; its symbols pass through a
// channel model that flips bits and then into the decoder of the top.
// Phase 1 uses isolated channel errors (at most one flipped bit in any 20
// symbols), which the code always corrects: the decoded stream must equal the
// sent one.  Phase 2 uses a high random error rate; every decoded bit is then
// compared with the integer reference decoder.  The input has idle gaps in
// both phases.  The testbench counts, and requires at least once each: a
// purged state, a step with all four states live, a corrected channel error,
// a wrap-around of the best path metric, an idle gap, and a best state other
// than 00 at the output.  In phase 2 it also reports the decoded-bit error
// count of the decoder next to that of a full-trellis decoder (no purging).
module tb_viterbi_top;
  import vd_ref_pkg::*;
  localparam int D = 15;
  localparam int T = 2;

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_in_bit = 0, enc_out_valid;
  logic [1:0] enc_out_code;
  logic dec_in_valid, dec_out_valid, dec_out_bit;
  logic [1:0] dec_rx;
  logic [3:0] dec_state_live;
  logic [7:0] dec_opt_pm;
  int checks = 0, failures = 0;

  viterbi_top dut (.*);

  always #5 clk = ~clk;

  // channel: flip mask applied to the encoder output, chosen by the driver
  logic [1:0] flip = '0;
  assign dec_in_valid = enc_out_valid;
  assign dec_rx       = enc_out_code ^ flip;

  int n_purge = 0, n_all_live = 0, n_corrected = 0, n_wrap = 0, n_gap = 0, n_best_nz = 0;
  int phase = 0;
  logic [7:0] prev_opt = '0;
  vd_ref m, mfull;
  bit  sent[$];
  bit  sent2[$];
  bit  full_bit[$];
  int  err_t = 0, err_full = 0;
  bit  exp_bit[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoder-side observation
  always @(posedge clk) begin
    if (rst_n && dec_in_valid) begin
      bit o;
      // reference model runs on exactly what the decoder receives
      if (m.step(dec_rx, o)) exp_bit.push_back(o);
      if (mfull.step(dec_rx, o)) full_bit.push_back(o);
      if (m.last_opt_state != 0) n_best_nz++;
    end
    if (rst_n) begin
      if (dec_state_live != 4'hf) n_purge++;
      else n_all_live++;
      if (dec_opt_pm < prev_opt && prev_opt - dec_opt_pm > 8'd128) n_wrap++;
      prev_opt <= dec_opt_pm;
    end
    if (rst_n && dec_out_valid) begin
      bit e;
      checks++;
      if (exp_bit.size() == 0) begin
        failures++;
      end else begin
        e = exp_bit.pop_front();
        if (dec_out_bit !== e) begin
          failures++;
          if (failures < 10) $display("phase %0d: decoded %b, reference %b", phase, dec_out_bit, e);
        end
      end
      if (phase == 2 && sent2.size() != 0 && full_bit.size() != 0) begin
        bit s, f;
        s = sent2.pop_front();
        f = full_bit.pop_front();
        if (dec_out_bit !== s) err_t++;
        if (f != s) err_full++;
      end
      if (phase == 1) begin
        bit s;
        s = sent.pop_front();
        checks++;
        if (dec_out_bit !== s) begin
          failures++;
          if (failures < 10) $display("phase 1: decoded %b, sent %b", dec_out_bit, s);
        end
      end
    end
  end

  task automatic send(input int n, input int sparse, input int err_per_1000);
    int since_err;
    since_err = 100;
    for (int i = 0; i < n + D; i++) begin
      logic x;
      x = (i < n) ? 1'($urandom) : 1'b0;
      if (phase == 1 && i < n) sent.push_back(x);
      if (phase == 2) sent2.push_back(x);
      if ($urandom_range(0, 4) == 0) begin
        n_gap++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
      end
      #1;
      enc_in_valid = 1;
      enc_in_bit   = x;
      @(posedge clk);
      #1;
      enc_in_valid = 0;
      // the symbol is now on the encoder output for one cycle: pick its errors
      flip = '0;
      if (sparse != 0) begin
        if (since_err >= 20 && i < n && $urandom_range(0, 9) == 0) begin
          flip[$urandom_range(0, 1)] = 1'b1;
          since_err = 0;
          n_corrected++;
        end else since_err++;
      end else begin
        if (int'($urandom_range(0, 999)) < err_per_1000) flip[0] = 1'b1;
        if (int'($urandom_range(0, 999)) < err_per_1000) flip[1] = 1'b1;
      end
    end
    @(posedge clk); #1 flip = '0;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    m = new(D, T);
    mfull = new(D, 1000);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    phase = 1;
    send(3000, 1, 0);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d bits not decoded", sent.size()); end
    // phase 2 from a fresh reset
    phase = 2;
    rst_n = 0;
    m.reset();
    mfull.reset();
    exp_bit.delete();
    full_bit.delete();
    @(posedge clk); #1 rst_n = 1;
    send(4000, 0, 80);
    checks++;
    if (exp_bit.size() != 0) begin failures++; $display("%0d reference bits not output", exp_bit.size()); end
    $display("phase 2 decoded-bit errors: T-algorithm (T=%0d) %0d, full trellis %0d", T, err_t, err_full);
    $display("purged-state cycles %0d, all-live cycles %0d, corrected errors %0d, metric wraps %0d, gaps %0d, best state not 00 %0d",
             n_purge, n_all_live, n_corrected, n_wrap, n_gap, n_best_nz);
    checks += 6;
    if (n_purge == 0) failures++;
    if (n_all_live == 0) failures++;
    if (n_corrected == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_best_nz == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
