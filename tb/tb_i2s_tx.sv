// tb_i2s_tx: self-checking test of the I2S transmitter.
//
// Loads random left/right word pairs once every 256 clocks (one frame, as in
// the design) and decodes the serial stream the way an I2S receiver does:
// data sampled on the rising bit clock, MSB one bit clock after each word
// select edge, ws low for the left word.  Checks every decoded word, the
// bit-clock period (4 clocks) and the 64 bit clocks per frame.
`timescale 1ns/1ps
module tb_i2s_tx;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  word_t left = '0, right = '0;
  logic sck, ws, sd;
  int checks = 0, failures = 0;
  word_t sent_l[$], sent_r[$];
  logic [31:0] sh_l, sh_r;
  logic ws_d = 0;
  int bitpos = 0, nsck = 0, frames = 0, last_rise = -1, cyc = 0;

  i2s_tx dut (.clk(clk), .rst_n(rst_n), .load(load), .left(left), .right(right),
              .sck(sck), .ws(ws), .sd(sd));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge sck) begin
    if (last_rise >= 0) check(cyc - last_rise == 4, "bit clock period 4 clocks");
    last_rise = cyc;
    if (ws != ws_d) begin
      if (ws == 1'b0) begin
        check(bitpos == 32, "32 bit clocks per word");
        check(word_t'(sh_l[30:7]) == sent_l[0], "left word");
        check(word_t'(sh_r[30:7]) == sent_r[0], "right word");
        void'(sent_l.pop_front());
        void'(sent_r.pop_front());
      end
      if (ws == 1'b0) frames++;
      bitpos = 0;
    end
    ws_d = ws;
    if (ws) sh_r = {sh_r[30:0], sd};
    else    sh_l = {sh_l[30:0], sd};
    bitpos++;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      left = word_t'($urandom);
      right = word_t'($urandom);
      if (f == 3) begin left = 24'sh7FFFFF; right = 24'sh800000; end
      sent_l.push_back(left);
      sent_r.push_back(right);
      load = 1;
      @(negedge clk);
      load = 0;
      repeat (255) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(frames >= 199, "frames decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
