// comp_filter: FIR compensation filter and decimate-by-2 stage.
//
// Runs on the 96 kHz CIC output.  A 63-tap linear-phase FIR raises the
// passband by the inverse of the third-order comb droop (about 1.9 dB at
// 20 kHz) and removes the band above 24 kHz; every second input produces one
// 48 kHz output.  The filter is computed with one multiply-accumulate per
// clock, 63 clocks per output, well inside the 256 clocks of a 48 kHz period.
//
// Coefficients: least-squares design over 0..20 kHz (target 1/H_CIC(f),
// weight 2000) and 27.5..48 kHz (target 0), rounded to 18-bit integers with
// a DC gain of 2^17.  Passband error with the comb is below ±0.001 dB and
// the stopband is below -64 dB.  Only half the symmetric taps are stored.
// The published design gives only the purpose, the ±0.05 dB ripple goal and
// the decimation factor; taps, widths and coefficients are this design's.
//
// Scaling: input full scale ±2^21, output Q1.23 (full scale ±2^23),
// saturated.  Timing: dout_valid pulses TAPS+2 clocks after every second
// din_valid; dout holds until the next pulse.
module comp_filter
  import bist_pkg::*;
#(
  parameter int unsigned IN_W   = 23,
  parameter int unsigned TAPS   = 63,
  parameter int unsigned COEF_W = 18,
  parameter int unsigned SHIFT  = 15           // 2^17 gain, 2^21 -> 2^23
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] din,
  input  logic                   din_valid,
  output word_t                  dout,
  output logic                   dout_valid
);
  localparam int unsigned HALF = (TAPS + 1) / 2;
  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS) + 1;

  localparam logic signed [COEF_W-1:0] H [HALF] = '{
    18'sd8, -18'sd23, 18'sd5, 18'sd52, -18'sd34, -18'sd95, 18'sd91, 18'sd155,
    -18'sd193, -18'sd235, 18'sd357, 18'sd335, -18'sd605, -18'sd454, 18'sd966, 18'sd592,
    -18'sd1476, -18'sd747, 18'sd2183, 18'sd921, -18'sd3165, -18'sd1118, 18'sd4560, 18'sd1363,
    -18'sd6654, -18'sd1733, 18'sd10168, 18'sd2550, -18'sd17565, -18'sd5946, 18'sd44127, 18'sd74294
  };

  logic signed [IN_W-1:0]  hist [TAPS];
  logic signed [ACC_W-1:0] acc;
  logic [$clog2(TAPS)-1:0] k;
  logic                    run, phase, last;
  logic signed [COEF_W-1:0] c_k;
  logic signed [63:0]      scaled;
  logic [$clog2(HALF)-1:0] ki;

  always_comb begin
    ki     = $bits(ki)'((int'(k) < int'(HALF)) ? int'(k) : int'(TAPS) - 1 - int'(k));
    c_k    = H[ki];
    scaled = (64'(acc) + (64'sd1 <<< (SHIFT - 1))) >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) hist[i] <= '0;
      acc <= '0; k <= '0; run <= 1'b0; phase <= 1'b0; last <= 1'b0;
      dout <= '0; dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      last <= 1'b0;
      if (din_valid) begin
        hist[0] <= din;
        for (int i = 1; i < TAPS; i++) hist[i] <= hist[i-1];
        phase <= ~phase;
        if (phase) begin
          run <= 1'b1;
          k   <= '0;
          acc <= '0;
        end
      end else if (run) begin
        acc <= acc + ACC_W'(c_k * hist[k]);
        if (k == ($clog2(TAPS))'(TAPS - 1)) begin
          run  <= 1'b0;
          last <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
      if (last) begin
        dout       <= sat_word(scaled);
        dout_valid <= 1'b1;
      end
    end
  end
endmodule
