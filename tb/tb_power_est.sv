// tb_power_est: self-checking testbench of the power estimator.
//
// Runs the default window of 2 and a window of 4 side by side.
// Feeds random 16-bit values (small, medium and full-scale ones, with gaps of
// random length between them) and compares each output with the mean of the
// last squares computed in 64-bit integers. Also checks the one-clock
// latency, saturation at full scale, and that a run of zeros brings the power
// back to zero after the window has passed.
module tb_power_est;
  import fdd_pkg::*;
  import fdd_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  bus_t in_data = '0;
  logic in_valid = 1'b0;
  bus_t out_data, out4;
  logic out_valid, out4_valid;
  int   checks = 0, failures = 0;

  power_est dut (.*);                      // default window of 2
  power_est #(.WIN_LOG2(2)) dut4 (.clk, .rst, .in_data, .in_valid,
                                  .out_data(out4), .out_valid(out4_valid));

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

  power_ref m, m4;
  longint   exp_p, exp4;

  task automatic push(input int v);
    @(posedge clk);
    in_data  <= bus_t'(v);
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    exp_p = m.push(longint'(v));
    exp4  = m4.push(longint'(v));
    #1;
    check(out4_valid && out4 == bus_t'(exp4), $sformatf("window 4: power %0d expected %0d", out4, exp4));
    check(out_valid, "out_valid one clock after in_valid");
    check(out_data == bus_t'(exp_p), $sformatf("power %0d expected %0d for input %0d", out_data, exp_p, v));
    repeat ($urandom_range(3)) @(posedge clk);
  endtask

  int v;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    m = new(1);
    m4 = new(2);
    for (int i = 0; i < 600; i++) begin
      case ($urandom_range(2))
        0: v = $signed(16'($urandom)) >>> 6;
        1: v = $signed(16'($urandom)) >>> 3;
        default: v = $signed(16'($urandom));
      endcase
      push(v);
    end
    for (int i = 0; i < 4; i++) push(-32768);
    check(out_data == 16'sh7fff, "saturates at full scale");
    for (int i = 0; i < 4; i++) push(0);
    check(out_data == 0, "zero after the window of zeros");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
