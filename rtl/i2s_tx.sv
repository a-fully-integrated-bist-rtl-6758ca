// i2s_tx: I2S serial output of the ADC word and the THD+N signal.
//
// Lets an external logic analyzer record y_ADC(n) and the ORA's thdn(n)
// side by side.  Each 'load' pulse (once per 48 kHz sample) captures the two
// 24-bit words and restarts a 64-bit-clock frame: the left slot (ws = 0)
// carries 'left', the right slot (ws = 1) carries 'right', MSB first, with
// the standard one-bit delay after each ws edge and zero padding to 32 bits
// per slot.  The bit clock is clk/4 (3.072 MHz for f_OS = 12.288 MHz), data
// change on the falling edge of sck.  The published design only names an
// I2S interface; frame format and clocking are this design's choice.
// Timing: outputs are registered; a frame occupies 256 clocks.
module i2s_tx
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t left,
  input  word_t right,
  output logic  sck,
  output logic  ws,
  output logic  sd
);
  logic [7:0] cnt;          // clk count within the frame
  word_t      l_r, r_r;
  logic [5:0] bitn;         // bit slot 0..63
  logic       sd_n;

  always_comb begin
    bitn = cnt[7:2];
    sd_n = 1'b0;
    if (bitn >= 6'd1 && bitn <= 6'd24)       sd_n = l_r[24 - int'(bitn)];
    else if (bitn >= 6'd33 && bitn <= 6'd56) sd_n = r_r[56 - int'(bitn)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; l_r <= '0; r_r <= '0;
      sck <= 1'b0; ws <= 1'b0; sd <= 1'b0;
    end else begin
      if (load) begin
        cnt <= '0;
        l_r <= left;
        r_r <= right;
      end else begin
        cnt <= cnt + 1'b1;
      end
      sck <= cnt[1];
      ws  <= bitn[5];
      sd  <= sd_n;
    end
  end
endmodule
