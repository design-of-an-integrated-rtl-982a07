// tb_dwt97: self-checking testbench of the 9/7 lifting wavelet transform.
//
// Part 1 feeds 400 random samples, spaced like the SPI words (16 clocks),
// and compares every coefficient pair bit for bit with an integer model of
// the lifting equations that uses ordinary multiplications. It also checks
// that one pair comes out per two inputs, one clock after the odd sample.
// Part 2 feeds a constant and checks the filter-bank property of the 9/7
// wavelet: the low band passes DC with gain sqrt(2), the high band removes it.
// Part 3 feeds the alternating sequence +c,-c: the high band then carries it
// and the low band is near zero.
module tb_dwt97;
  import fdd_pkg::*;
  import fdd_ref_pkg::*;

  logic    clk = 1'b0, rst = 1'b1;
  sample_t in_sample = '0;
  logic    in_valid = 1'b0;
  bus_t    a_out, d_out;
  logic    out_valid;
  int      checks = 0, failures = 0;

  dwt97 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Drive one sample; return whether the model produced a pair and check it.
  task automatic drive(input int s, input dwt_ref m, output bit produced);
    @(posedge clk);
    in_sample <= sample_t'(s);
    in_valid  <= 1'b1;
    @(posedge clk);
    in_valid  <= 1'b0;
    produced = m.push(s);
    #1;
    check(out_valid == produced, "out_valid once per pair, one clock after the odd sample");
    if (produced)
      check(a_out == bus_t'(m.a) && d_out == bus_t'(m.d),
            $sformatf("pair: dut a=%0d d=%0d model a=%0d d=%0d", a_out, d_out, m.a, m.d));
    repeat (14) @(posedge clk);
  endtask

  task automatic do_reset();
    rst <= 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
  endtask

  dwt_ref m;
  bit     p;
  int     npairs;
  real    ga, gd;

  initial begin
    do_reset();
    m = new();
    npairs = 0;
    for (int i = 0; i < 400; i++) begin
      drive($signed(12'($urandom)), m, p);
      if (p) npairs++;
    end
    check(npairs == 200, "200 pairs from 400 samples");

    // DC: constant 1000
    do_reset();
    m = new();
    for (int i = 0; i < 40; i++) drive(1000, m, p);
    ga = real'(a_out) / 1000.0;
    gd = real'(d_out) / 1000.0;
    check(ga > 1.40 && ga < 1.43, $sformatf("DC gain of low band %f", ga));
    check(gd > -0.01 && gd < 0.01, $sformatf("DC gain of high band %f", gd));

    // Nyquist: +c, -c
    do_reset();
    m = new();
    for (int i = 0; i < 40; i++) drive((i % 2) ? -1000 : 1000, m, p);
    check((a_out < 20 && a_out > -20), $sformatf("low band rejects the alternating input (%0d)", a_out));
    check((d_out > 1000 || d_out < -1000), $sformatf("high band carries the alternating input (%0d)", d_out));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
