// tb_fdi: self-checking testbench of the fault detection index.
//
// Drives frames of error samples at the default frame length of 256 with a
// chosen share of samples above the 0.25 threshold, including the boundary
// values +-0.25 (not a fault) and +-0.25 plus one LSB (a fault) and the most
// negative value, and compares each frame's index with an independent count.
// Checks that fdi_valid comes once per 256 samples, one clock after the last
// one, that a frame of all faults saturates at 255 and an all-clean frame
// gives 0.
module tb_fdi;
  import fdd_pkg::*;
  import fdd_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  bus_t e_in = '0;
  logic in_valid = 1'b0;
  logic fd_flag;
  bus_t fdi_out;
  logic fdi_valid;
  int   checks = 0, failures = 0;

  fdi dut (.*);

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

  fdi_ref m;
  int     valids;

  always @(posedge clk) if (fdi_valid) valids++;

  task automatic push(input int e);
    bit done;
    @(posedge clk);
    e_in <= bus_t'(e);
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    done = m.push(e);
    #1;
    check(fdi_valid == done, "fdi_valid one clock after the last sample of a frame");
    if (done) check(fdi_out == bus_t'(m.value), $sformatf("FDI %0d expected %0d", fdi_out, m.value));
  endtask

  function automatic int pick(int pct);
    int r;
    r = $urandom_range(99);
    case ($urandom_range(4))
      0: return (r < pct) ? 513 : 512;
      1: return (r < pct) ? -513 : -512;
      2: return (r < pct) ? -32768 : 0;
      default: return (r < pct) ? int'($urandom_range(32767, 513)) : int'($urandom_range(512)) - 256;
    endcase
  endfunction

  initial begin
    valids = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    m = new(256);
    for (int f = 0; f < 10; f++)
      for (int k = 0; k < 256; k++) push(pick(f * 10));
    for (int k = 0; k < 256; k++) push(20000);
    check(fdi_out == 255, $sformatf("all faults saturate at 255 (%0d)", fdi_out));
    for (int k = 0; k < 256; k++) push(100);
    check(fdi_out == 0, "clean frame gives 0");
    check(valids == 12, $sformatf("one FDI value per 256 samples (%0d)", valids));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
