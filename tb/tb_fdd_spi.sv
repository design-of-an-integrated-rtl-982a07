// tb_fdd_spi: self-checking testbench of the SPI slave.
//
// A bus-functional master sends random words, both back to back with cs_n
// held low and separated by cs_n pulses: sensor samples (b15 = 0) and step
// sizes (b15 = 1), with random b14 and random unused bits. It checks that a
// sample appears with a one-clock sample_valid right after the 16th bit,
// that a b15 = 1 word gives mu with a one-clock mu_valid, that b14 selects the sub-band,
// and that sdo carries, MSB first, the FDI value present when the word began.
// The value on fdi_i is changed in the middle of each word, so a word that
// picked it up too late or too early is caught.
module tb_fdd_spi;
  import fdd_pkg::*;

  logic      clk = 1'b0, rst = 1'b1;
  logic      cs_n = 1'b1, sdi = 1'b0;
  logic      sdo;
  sample_t   sample_o;
  logic      sample_valid_o, mu_valid_o;
  coef_sel_e coef_sel_o;
  bus_t      mu_o;
  bus_t      fdi_i = '0;
  int        checks = 0, failures = 0;

  fdd_spi dut (.*);

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

  // expected decodes, in order, checked by the monitor below
  logic [15:0] sent_q [$];
  bus_t        mu_exp;
  int          words_seen;

  always @(posedge clk) begin
    if (!rst && (sample_valid_o || mu_valid_o)) begin
      logic [15:0] w;
      if (sent_q.size() == 0) begin
        check(0, "decode without a word");
      end else begin
        w = sent_q.pop_front();
        words_seen++;
        check(sample_valid_o == !w[15] && mu_valid_o == w[15], "b15 selects sample or mu");
        if (!w[15]) check(sample_o == sample_t'(w[11:0]), "sample field");
        else        mu_exp = bus_t'({4'b0, w[11:0]});
        // mu_o, coef_sel_o and sample_o are stable in the valid cycle
        if (w[15]) check(mu_o == mu_exp, $sformatf("mu %h expected %h", mu_o, mu_exp));
        check(coef_sel_o == coef_sel_e'(w[14]), "b14 selects the sub-band");
      end
    end
  end

  bus_t fdi_cur;   // value the slave must send in the current word
  bus_t fdi_next;

  // One word, MSB first; sdi changes after the falling edge, sdo is read at
  // the rising edge. cs_n stays low afterwards unless gap is set.
  task automatic xfer(input logic [15:0] w, input bit gap);
    logic [15:0] rx;
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk);
      cs_n = 1'b0;
      sdi  = w[i];
      if (i == 8) begin
        fdi_next = bus_t'($urandom);
        fdi_i    = fdi_next;
      end
      @(posedge clk);
      rx[i] = sdo;
      if (i == 0) sent_q.push_back(w);
    end
    check(rx == fdi_cur, $sformatf("sdo word %h expected %h", rx, fdi_cur));
    fdi_cur = fdi_next;
    if (gap) begin
      @(negedge clk);
      cs_n = 1'b1;
      repeat ($urandom_range(3)) @(negedge clk);
    end
  endtask

  logic [15:0] w;
  initial begin
    mu_exp = '0;
    words_seen = 0;
    fdi_i = 16'h1234;
    fdi_cur = 16'h1234;
    fdi_next = 16'h1234;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      w = 16'($urandom);
      if ($urandom_range(4) != 0) w[15] = 1'b0;
      xfer(w, $urandom_range(3) == 0);
    end
    @(negedge clk);
    cs_n = 1'b1;
    repeat (3) @(posedge clk);
    check(words_seen == 500 && sent_q.size() == 0, $sformatf("500 words decoded (%0d)", words_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
