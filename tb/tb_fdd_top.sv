// tb_fdd_top: end-to-end testbench of the whole core, at its default sizes.
//
// Acts as the SPI master of the document's set-up: one 16-bit word per
// sample, sent back to back with cs_n held low (16 clocks per sample, the
// 4096 Hz / 256 Hz ratio), while the FDI value is read back from sdo in every
// word. A reference chain built from integer models (wavelet, power, delay,
// LMS, frame count, LFSR) predicts the FDI value, and each word read back is
// compared with the value the model had two words earlier (a new FDI value
// reaches sdo at the start of the second word after the sample that
// completed its frame). The run goes through:
//   1. mu = 0 (no adaptation) and a strong torque-like signal: every error
//      sample is above the threshold and the index saturates at 255;
//   2. mu = 0.1, approximation band, a signal whose amplitude jumps
//      (emulated fault);
//   3. detail band, vibration-like signal with an amplitude jump;
//   4. the complete built-in self-test: tst = 1 for 65280 test patterns
//      (255 LFSR states times 256 seeds), i.e. 130560 words.
// Each mechanism is counted and a mechanism that never happened is a
// failure.
module tb_fdd_top;
  import fdd_pkg::*;
  import fdd_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, cs_n = 1'b1, sdi = 1'b0, tst = 1'b0;
  logic sdo;
  int   checks = 0, failures = 0;

  fdd_top dut (.clk, .rst, .cs_n, .sdi, .sdo, .tst);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // reference chain
  dwt_ref   mdwt;
  power_ref mpow;
  lms_ref   mlms;
  tpg_ref   mtpg;
  fdi_ref   mfdi;
  longint   pdelay;
  int       mu_model;
  bit       sel_detail;

  // mechanism counters
  int n_mu_words, n_approx, n_detail, n_test, n_flags, n_frames, n_sat;
  int n_fault_frames, n_test_frames, n_test_fault_frames;

  // FDI value of the model after each word, for the sdo comparison
  int fdi_hist [$];
  int nwords;
  int test_fdi_sum = 0;

  task automatic model_word(input logic [15:0] w, input bit t);
    longint c, p;
    sel_detail = w[14];
    if (w[15]) begin
      mu_model = int'(w[11:0]);
      n_mu_words++;
    end else if (mdwt.push(int'($signed(w[11:0])))) begin
      c = sel_detail ? mdwt.d : mdwt.a;
      if (t) begin
        c = mtpg.value();
        mtpg.step();
        n_test++;
      end else if (sel_detail) n_detail++;
      else n_approx++;
      p = mpow.push(c);
      mlms.push(pdelay, p, mu_model);
      pdelay = p;
      if (mlms.e > 512 || mlms.e < -512) n_flags++;
      if (mfdi.push(mlms.e)) begin
        n_frames++;
        if (mfdi.value == 255) n_sat++;
        if (mfdi.value > 0) n_fault_frames++;
        if (t) begin
          n_test_frames++;
          test_fdi_sum += mfdi.value;
          if (mfdi.value > 0) n_test_fault_frames++;
        end
      end
    end
    fdi_hist.push_back(mfdi.value);
  endtask

  // One word, back to back: sdi set after the falling edge, sdo read at
  // the rising edge.
  task automatic word(input logic [15:0] w);
    logic [15:0] rx;
    int          expv;
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk);
      cs_n = 1'b0;
      sdi  = w[i];
      if (i == 12) tst = tst_req;   // mode changes inside a word, clear of the pipeline
      @(posedge clk);
      rx[i] = sdo;
    end
    expv = (nwords >= 2) ? fdi_hist[nwords - 2] : 0;
    check(rx == 16'(expv), $sformatf("word %0d: sdo %0d expected FDI %0d", nwords, rx, expv));
    model_word(w, tst);
    nwords++;
  endtask

  function automatic logic [15:0] sample_word(int s, bit detail);
    return {1'b0, detail, 2'b00, 12'(s)};
  endfunction

  function automatic int sig(int i, int amp, int period);
    real v;
    v = real'(amp) * $sin(2.0 * 3.14159265 * real'(i) / real'(period));
    return int'(v) + int'($urandom_range(40)) - 20;
  endfunction

  logic tst_req = 1'b0;
  int sat_before, frames_before, fault_before;
  initial begin
    mdwt = new(); mpow = new(); mlms = new(); mtpg = new(); mfdi = new(256);
    pdelay = 0; mu_model = 0; nwords = 0;
    n_mu_words = 0; n_approx = 0; n_detail = 0; n_test = 0;
    n_flags = 0; n_frames = 0; n_sat = 0; n_fault_frames = 0;
    n_test_frames = 0; n_test_fault_frames = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    // 1. no adaptation, strong signal: saturated index
    word({1'b1, 1'b0, 2'b00, 12'd0});
    for (int i = 0; i < 1100; i++) word(sample_word(1900 + int'($urandom_range(40)) - 20, 0));
    check(n_sat > 0, "index saturates at 255 without adaptation");

    // 2. mu = 0.1, approximation band, amplitude jump
    word({1'b1, 1'b0, 2'b00, 12'd205});
    frames_before = n_frames; fault_before = n_fault_frames;
    for (int i = 0; i < 3072; i++) word(sample_word(sig(i, (i < 2048) ? 300 : 1500, 100), 0));
    check(n_fault_frames > fault_before, "approximation band: jump gives a non-zero index");

    // 3. detail band, vibration-like signal, amplitude jump
    fault_before = n_fault_frames;
    for (int i = 0; i < 3072; i++) word(sample_word(sig(i, (i < 2048) ? 300 : 1900, 3), 1));
    check(n_fault_frames > fault_before, "detail band: jump gives a non-zero index");

    // 4. built-in self-test: 65280 patterns
    tst_req = 1'b1;
    sat_before = n_test;
    for (int i = 0; i < 130560; i++) word(sample_word(0, 0));
    check(n_test - sat_before == 65280, $sformatf("65280 test patterns applied (%0d)", n_test - sat_before));
    // the self-test signature: the pattern must look like a fault
    check(n_test_fault_frames * 10 > n_test_frames * 9,
          $sformatf("self-test frames with detections: %0d of %0d", n_test_fault_frames, n_test_frames));
    check(mtpg.seqs == 256, $sformatf("256 LFSR sequences, one per seed (%0d)", mtpg.seqs));
    // two more words to read the last index back
    tst_req = 1'b0;
    word({1'b1, 1'b0, 2'b00, 12'd205});
    word({1'b1, 1'b0, 2'b00, 12'd205});

    $display("mechanisms: mu words %0d, approximation coefficients %0d, detail coefficients %0d,",
             n_mu_words, n_approx, n_detail);
    $display("            test patterns %0d, threshold crossings %0d, FDI frames %0d,",
             n_test, n_flags, n_frames);
    $display("            frames with faults %0d, saturated frames %0d, SDO words %0d",
             n_fault_frames, n_sat, nwords);
    $display("            self-test frames %0d, of which with detections %0d, mean self-test FDI %0d",
             n_test_frames, n_test_fault_frames, test_fdi_sum / ((n_test_frames > 0) ? n_test_frames : 1));
    check(n_mu_words > 0, "step size loaded");
    check(n_approx > 0, "approximation band used");
    check(n_detail > 0, "detail band used");
    check(n_test > 0, "test mode used");
    check(n_flags > 0, "threshold crossed");
    check(n_frames > 0, "FDI frames completed");
    check(n_sat > 0, "FDI saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
