// tb_decimation_filter: self-checking test of the complete /256 decimator.
//
// A second-order 1-bit modulator written in the bench turns test signals
// into a bitstream at 12.288 MHz, which drives the filter.  Checks:
//   * DC: a 0.3 input gives an output mean of 0.3 within 2e-4;
//   * gain: tones at 937.5 Hz and 15 kHz at -6 dBFS come out with their
//     amplitude within 0.1 dB (least-squares sine fit over 256 samples);
//   * one output word every 256 clocks (48 kHz).
`timescale 1ns/1ps
module tb_decimation_filter;
  import bist_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, din = 0;
  word_t y_adc;
  logic y_valid;
  int checks = 0, failures = 0;
  real s1 = 0.0, s2 = 0.0;          // bench modulator state
  real xin = 0.0;
  longint cyc = 0, last_v = -1;
  real ys[$];

  decimation_filter dut (.clk(clk), .rst_n(rst_n), .din(din), .y_adc(y_adc), .y_valid(y_valid));

  always #40.69 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) if (rst_n && y_valid) begin
    if (last_v >= 0) check(cyc - last_v == 256, "one word per 256 clocks");
    last_v = cyc;
    ys.push_back(real'(y_adc) / 8388608.0);
  end

  // drive n clocks of signal amp*sin(2 pi f t) + dc
  task automatic drive(input int n, input real amp, input real f, input real dc);
    for (int i = 0; i < n; i++) begin
      real v;
      xin = dc + amp * $sin(2.0 * PI * f * real'(cyc) / 12.288e6);
      v = (s2 >= 0.0) ? 1.0 : -1.0;
      din = (s2 >= 0.0);
      s2 = s2 + 0.5 * (s1 - v);                 // delaying integrators, gains 1/2
      s1 = s1 + 0.5 * (xin - v);
      @(negedge clk);
      cyc++;
    end
  endtask

  task automatic fit(input real f, output real amp, output real mean);
    real sc = 0, ss = 0, cc = 0, sn = 0, cs = 0, sm = 0;
    int m = ys.size();
    for (int k = 0; k < 256; k++) begin
      real ph = 2.0 * PI * f * real'(k) / 48.0e3;
      real y = ys[m - 256 + k];
      sn += y * $sin(ph); cs += y * $cos(ph); sm += y;
    end
    amp = 2.0 * $sqrt(sn * sn + cs * cs) / 256.0;
    mean = sm / 256.0;
  endtask

  initial begin
    real amp, mean;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    drive(256 * 400, 0.0, 0.0, 0.3);
    fit(1000.0, amp, mean);
    $display("DC amplitude mean %f", mean);
    check(mean > 0.2998 && mean < 0.3002, "DC level");
    // 960.9 Hz = 41 bins of 48 kHz / 2048; 256 samples hold 5.125 periods, so
    // use a bin-centred 937.5 Hz tone (5 periods) for the 256-point fit
    drive(256 * 400, 0.5, 937.5, 0.0);
    fit(937.5, amp, mean);
    $display("937.5 Hz amplitude %f", amp);
    check(amp > 0.5 * 0.98855 && amp < 0.5 * 1.01158, "937.5 Hz gain within 0.1 dB");
    drive(256 * 400, 0.5, 15000.0, 0.0);
    fit(15000.0, amp, mean);
    $display("15 kHz amplitude %f", amp);
    check(amp > 0.5 * 0.98855 && amp < 0.5 * 1.01158, "15 kHz gain within 0.1 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
