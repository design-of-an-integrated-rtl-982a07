// tb_valve_cycles: the four valve test campaigns, with synthetic signals.
//
// Runs the whole core (default sizes, SPI pins only) through four scenarios
// of one normal open/close cycle (45 s) followed by one faulty cycle (45 s)
// at 256 samples per second, one SPI word per sample:
//   1. torque, approximation band, light brake load: the level rises from
//      0.20 to 0.33 of full scale and the ripple grows, with occasional
//      stick-slip jerks;
//   2. torque, approximation band, heavy brake load: level 0.75 with a large
//      oscillation;
//   3. vibration, detail band, worn gears: a 60 Hz tone of amplitude 0.8 plus
//      small tooth impacts every few hundred milliseconds;
//   4. vibration, detail band, broken teeth: the same tone with strong
//      impacts once per shaft turn.
// The signals are synthetic stand-ins shaped after the measured cases (levels
// in fractions of the ADC full scale); recorded sensor data is not used.
// Every FDI value read back on sdo is compared with the integer reference
// chain. For each scenario the testbench prints the FDI histogram of the
// faulty cycle in ten hbin of relative amplitude (FDI/255), as the host
// would, and checks the frame rate (one FDI value per 2 s). The printed
// histograms characterise the core on these signals; with mu = 0.1 the
// predictor follows steady level changes and slow oscillations, so only
// fast, irregular power changes (jerks, impacts) raise the index.
module tb_valve_cycles;
  import fdd_pkg::*;
  import fdd_ref_pkg::*;

  localparam int FS     = 256;        // samples per second
  localparam int CYCLE  = 45 * FS;    // samples per open/close cycle

  logic clk = 1'b0, rst = 1'b1, cs_n = 1'b1, sdi = 1'b0, tst = 1'b0;
  logic sdo;
  int   checks = 0, failures = 0;

  fdd_top dut (.clk, .rst, .cs_n, .sdi, .sdo, .tst);

  always #5 clk = ~clk;

  initial begin
    repeat (2_500_000) @(posedge clk);
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

  dwt_ref   mdwt;
  power_ref mpow;
  lms_ref   mlms;
  fdi_ref   mfdi;
  longint   pdelay;
  int       mu_model;
  int       fdi_hist [$];
  int       nwords;
  bit       new_frame;

  task automatic model_reset();
    mdwt = new(); mpow = new(); mlms = new(); mfdi = new(256);
    pdelay = 0; mu_model = 0; nwords = 0;
    fdi_hist.delete();
  endtask

  task automatic model_word(input logic [15:0] w);
    longint c, p;
    new_frame = 0;
    if (w[15]) mu_model = int'(w[11:0]);
    else if (mdwt.push(int'($signed(w[11:0])))) begin
      c = w[14] ? mdwt.d : mdwt.a;
      p = mpow.push(c);
      mlms.push(pdelay, p, mu_model);
      pdelay = p;
      new_frame = mfdi.push(mlms.e);
    end
    fdi_hist.push_back(mfdi.value);
  endtask

  task automatic word(input logic [15:0] w);
    logic [15:0] rx;
    int          expv;
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk);
      cs_n = 1'b0;
      sdi  = w[i];
      @(posedge clk);
      rx[i] = sdo;
    end
    expv = (nwords >= 2) ? fdi_hist[nwords - 2] : 0;
    check(rx == 16'(expv), $sformatf("word %0d: sdo %0d expected FDI %0d", nwords, rx, expv));
    model_word(w);
    nwords++;
  endtask

  function automatic int clip12(real v);
    int s;
    s = int'(v * 2048.0);
    if (s > 2047) s = 2047;
    if (s < -2048) s = -2048;
    return s;
  endfunction

  function automatic real noise(real amp);
    return amp * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  localparam real PI = 3.14159265358979;

  // signal of scenario sc at sample i; faulty selects the test cycle
  function automatic real signal(int sc, int i, bit faulty);
    real t;
    t = real'(i) / real'(FS);
    case (sc)
      1: if (!faulty) return 0.20 + noise(0.05);
         else return 0.33 + noise(0.08) + (((i % 700) < 40) ? 0.10 * $sin(2.0 * PI * 8.0 * t) : 0.0);
      2: if (!faulty) return 0.25 + noise(0.05);
         else return 0.75 + 0.15 * $sin(2.0 * PI * 3.0 * t) + noise(0.08);
      3: return 0.8 * $sin(2.0 * PI * 60.0 * t) + noise(0.05)
                + ((faulty && (i % 77) < 2) ? 0.15 : 0.0);
      default: return 0.8 * $sin(2.0 * PI * 60.0 * t) + noise(0.05)
                + ((faulty && (i % 366) < 3) ? 0.9 : 0.0);
    endcase
  endfunction

  real mean_normal [1:4];
  real mean_faulty [1:4];

  task automatic run_scenario(input int sc, input string name);
    int   hbin [10];
    int   nf, sum_n, nn, sum_f, b;
    bit   detail;
    detail = (sc >= 3);
    // reset the core between campaigns
    @(negedge clk);
    cs_n = 1'b1;
    rst  = 1'b1;
    repeat (3) @(negedge clk);
    rst  = 1'b0;
    model_reset();
    word({1'b1, detail, 2'b00, 12'd205});   // mu = 0.1
    foreach (hbin[k]) hbin[k] = 0;
    nf = 0; sum_f = 0; nn = 0; sum_n = 0;
    for (int i = 0; i < 2 * CYCLE; i++) begin
      word({1'b0, detail, 2'b00, 12'(clip12(signal(sc, i % CYCLE, i >= CYCLE)))});
      if (new_frame) begin
        if (i < CYCLE) begin
          nn++; sum_n += mfdi.value;
        end else begin
          nf++; sum_f += mfdi.value;
          b = (mfdi.value * 10) / 256;
          hbin[b]++;
        end
      end
    end
    mean_normal[sc] = real'(sum_n) / real'(nn);
    mean_faulty[sc] = real'(sum_f) / real'(nf);
    $display("%s: mean FDI normal cycle %0.1f, faulty cycle %0.1f; faulty-cycle histogram (%% of %0d frames):",
             name, mean_normal[sc], mean_faulty[sc], nf);
    for (int k = 0; k < 10; k++)
      $display("   %3d..%3d%%  %5.1f", k * 10, k * 10 + 10, 100.0 * real'(hbin[k]) / real'(nf));
    // 45 s at 256 Hz = 5760 coefficients = 22.5 frames of 256 per cycle
    check(nn == 22 && nf == 23, $sformatf("%s: frames per cycle %0d and %0d", name, nn, nf));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run_scenario(1, "torque, light brake load");
    run_scenario(2, "torque, heavy brake load");
    run_scenario(3, "vibration, worn gears");
    run_scenario(4, "vibration, broken teeth");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
