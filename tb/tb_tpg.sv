// tb_tpg: self-checking testbench of the test pattern generator.
//
// Steps the generator continuously and checks, against properties worked out
// from the LFSR theory rather than from the RTL: every sequence visits 255
// distinct non-zero states and returns to its seed; the next sequence starts
// at seed+1; the output holds the state in bits [10:3] with zeros elsewhere;
// all_done pulses exactly once after 255*256 = 65280 steps; a paused enable
// holds the state.
module tb_tpg;
  import fdd_pkg::*;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  bus_t out;
  logic all_done;
  int   checks = 0, failures = 0;

  tpg dut (.clk, .rst, .en, .out, .all_done);

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

  bit       seen [256];
  int       steps, done_at, done_count, seq_len, seq;
  logic [7:0] state, seed_exp, held;
  bit       format_ok, nonzero_ok, distinct_ok;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    check(out == bus_t'(16'h0008), $sformatf("first output is seed 1 at bits [10:3] (%h)", out));
    // pause: state must hold
    held = out[10:3];
    repeat (5) @(posedge clk);
    #1;
    check(out[10:3] == held, "state holds while en is low");

    en = 1'b1;
    steps = 0; done_count = 0; done_at = -1;
    seed_exp = 8'h01;
    format_ok = 1; nonzero_ok = 1; distinct_ok = 1;
    for (seq = 0; seq < 256; seq++) begin
      foreach (seen[i]) seen[i] = 0;
      check(out[10:3] == seed_exp, $sformatf("sequence %0d starts at its seed", seq));
      for (seq_len = 0; seq_len < 255; seq_len++) begin
        state = out[10:3];
        if (out[15:11] != 0 || out[2:0] != 0) format_ok = 0;
        if (state == 0) nonzero_ok = 0;
        if (seen[state]) distinct_ok = 0;
        seen[state] = 1;
        @(posedge clk);
        #1;
        steps++;
        if (all_done) begin
          done_count++;
          done_at = steps;
        end
      end
      seed_exp = (seed_exp == 8'hff) ? 8'h01 : seed_exp + 8'h01;
    end
    check(format_ok, "output zero outside bits [10:3]");
    check(nonzero_ok, "LFSR never reaches zero");
    check(distinct_ok, "255 distinct states per sequence");
    check(done_count == 1, $sformatf("all_done pulses once (%0d)", done_count));
    check(done_at == 65280, $sformatf("all_done after 65280 patterns (%0d)", done_at));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
