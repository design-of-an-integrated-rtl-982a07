// tb_lms_filter: self-checking testbench of the 5-tap LMS predictor.
//
// Part 1 drives random x, d and step sizes and compares y and e with an
// integer model of the LMS equations after every sample (one-clock latency).
// Part 2 checks adaptation independently of the model: with mu = 0.1 and a
// steady power signal of 0.5 the error must fall below 0.01; a jump of the
// signal to 1.0 must then give an error above 0.25 on the first sample; with
// mu = 0 the weights must not move.
module tb_lms_filter;
  import fdd_pkg::*;
  import fdd_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  bus_t x_in = '0, d_in = '0, mu_in = '0;
  logic in_valid = 1'b0, mu_load = 1'b0;
  bus_t y_out, e_out;
  logic out_valid;
  int   checks = 0, failures = 0;

  lms_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  lms_ref m;

  task automatic push(input int x, input int d, input int u, input bit cmp);
    @(posedge clk);
    mu_in <= bus_t'(u);           // load the step size one clock ahead
    mu_load <= 1'b1;
    @(posedge clk);
    mu_load <= 1'b0;
    x_in <= bus_t'(x); d_in <= bus_t'(d);
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    m.push(x, d, u);
    #1;
    if (cmp) begin
      check(out_valid, "out_valid one clock after in_valid");
      check(y_out == bus_t'(m.y) && e_out == bus_t'(m.e),
            $sformatf("dut y=%0d e=%0d model y=%0d e=%0d", y_out, e_out, m.y, m.e));
    end
    @(posedge clk);
  endtask

  task automatic do_reset();
    rst <= 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    m = new();
  endtask

  int p, prev;
  initial begin
    do_reset();
    prev = 0;
    for (int i = 0; i < 1500; i++) begin
      p = $urandom_range(2047);
      push(prev, p, $urandom_range(400), 1);
      prev = p;
    end

    // adaptation to a steady power of 0.5 with mu = 0.1
    do_reset();
    for (int i = 0; i < 400; i++) push(1024, 1024, 205, 1);
    check(e_out < 21 && e_out > -21, $sformatf("converged error %0d below 0.01", e_out));
    check(y_out > 1000, $sformatf("prediction %0d near 0.5", y_out));
    push(1024, 2048, 205, 1);
    check(e_out > 512, $sformatf("jump to 1.0 gives error %0d above 0.25", e_out));
    // mu = 0 freezes the weights: same input twice gives the same prediction
    for (int i = 0; i < 6; i++) push(700, 100, 0, 1);
    p = y_out;
    push(700, 100, 0, 1);
    check(y_out == bus_t'(p), "no adaptation with mu = 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
