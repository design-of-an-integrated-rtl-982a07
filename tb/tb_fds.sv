// tb_fds: self-checking testbench of the fault detection system.
//
// Feeds a sampled test signal (a sine plus noise whose amplitude jumps
// four-fold halfway through each segment, as a stand-in for a fault) every
// 16 clocks, in three segments: approximation band, detail band, and test
// mode with the built-in pattern. The reference chain (integer models of the
// wavelet, power, delay and LMS stages, and of the LFSR) predicts every power
// and error value, which are compared bit for bit. It also checks the rate
// (one error per two samples) and that the amplitude jump drives the error
// above the 0.25 threshold while the steady part before it stays below.
module tb_fds;
  import fdd_pkg::*;
  import fdd_ref_pkg::*;

  logic      clk = 1'b0, rst = 1'b1;
  sample_t   sample = '0;
  logic      sample_valid = 1'b0;
  coef_sel_e coef_sel = SEL_APPROX;
  logic      tst = 1'b0;
  bus_t      mu = 16'sd205;   // 0.1
  logic      mu_load = 1'b0;
  bus_t      e_out, power_out;
  logic      e_valid, tpg_done;
  int        checks = 0, failures = 0;

  fds dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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
  tpg_ref   mtpg;
  longint   pdelay;
  longint   exp_e [$];
  longint   exp_p [$];
  int       nerr;

  // compare every error the block produces with the next expected one
  always @(posedge clk) begin
    if (!rst && e_valid) begin
      nerr++;
      if (exp_e.size() == 0) check(0, "error value without a coefficient");
      else begin
        longint ee, pp;
        ee = exp_e.pop_front();
        pp = exp_p.pop_front();
        check(e_out == bus_t'(ee), $sformatf("e %0d expected %0d", e_out, ee));
        // the power register still holds the sample the error came from
        check(power_out == bus_t'(pp), $sformatf("power %0d expected %0d", power_out, pp));
      end
    end
  end

  int  maxe_before, maxe_after;

  task automatic push(input int s, input bit after_jump);
    longint c, p;
    @(posedge clk);
    sample <= sample_t'(s);
    sample_valid <= 1'b1;
    @(posedge clk);
    sample_valid <= 1'b0;
    if (mdwt.push(s)) begin
      c = (coef_sel == SEL_DETAIL) ? mdwt.d : mdwt.a;
      if (tst) begin
        c = mtpg.value();
        mtpg.step();
      end
      p = mpow.push(c);
      mlms.push(pdelay, p, 205);
      pdelay = p;
      exp_p.push_back(p);
      exp_e.push_back(mlms.e);
      if (!tst) begin
        if (after_jump) begin
          if (mlms.e > maxe_after) maxe_after = int'(mlms.e);
          if (-mlms.e > maxe_after) maxe_after = int'(-mlms.e);
        end else if (mlms.e > maxe_before) maxe_before = int'(mlms.e);
      end
    end
    repeat (14) @(posedge clk);
  endtask

  function automatic int sig(int i, int amp, int period);
    real v;
    v = real'(amp) * $sin(2.0 * 3.14159265 * real'(i) / real'(period));
    return int'(v) + int'($urandom_range(40)) - 20;
  endfunction

  int total_pairs;
  initial begin
    nerr = 0;
    mdwt = new(); mpow = new(); mlms = new(); mtpg = new();
    pdelay = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    mu_load <= 1'b1;
    @(posedge clk);
    mu_load <= 1'b0;
    total_pairs = 0;
    // segment 1: approximation band, slow signal (torque-like)
    coef_sel = SEL_APPROX;
    maxe_before = 0; maxe_after = 0;
    for (int i = 0; i < 1600; i++) push(sig(i, (i < 800) ? 250 : 1000, 200), i >= 800);
    check(maxe_before < 512, $sformatf("approximation: steady part stays below 0.25 (%0d)", maxe_before));
    check(maxe_after > 512, $sformatf("approximation: jump raises |e| above 0.25 (%0d)", maxe_after));
    // segment 2: detail band, fast signal (vibration-like)
    coef_sel = SEL_DETAIL;
    maxe_after = 0;
    for (int i = 0; i < 1600; i++) push(sig(i, (i < 800) ? 250 : 1900, 3), i >= 800);
    check(maxe_after > 512, $sformatf("detail: jump raises |e| above 0.25 (%0d)", maxe_after));
    // segment 3: test mode, pattern replaces the sub-band
    tst = 1'b1;
    for (int i = 0; i < 1200; i++) push(sig(i, 250, 200), 0);
    tst = 1'b0;
    repeat (20) @(posedge clk);
    check(nerr == 2200, $sformatf("one error value per two samples (%0d)", nerr));
    check(exp_e.size() == 0, "all expected errors produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
