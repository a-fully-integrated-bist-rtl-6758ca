// booth_mul: sequential radix-2 Booth multiplier (signed W x W -> 2W).
//
// The ORA has a single multiplier, shared by all IQWF steps.  Because a new
// decimated sample arrives only every 256 oversampling cycles, the product is
// formed one Booth step per clock: the pair {Q[0], q_-1} selects add, subtract
// or nothing of the multiplicand into the upper partial product, then the
// whole {P, Q, q_-1} register shifts right arithmetically.  A W-bit product
// therefore takes W clocks (24 for the published 24x24 case).
//
// Interface: pulse 'start' with a (multiplicand) and b (multiplier) valid;
// 'busy' is high for the W clocks of the operation and 'done' pulses for one
// clock W clocks after 'start', when p holds a*b.  p keeps its value until
// the next start.  A start while busy is ignored.
module booth_mul #(
  parameter int unsigned W = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p,
  output logic                  busy,
  output logic                  done
);
  logic signed [W:0]        m;      // multiplicand, one guard bit
  logic signed [W:0]        hi;     // upper partial product
  logic        [W-1:0]      lo;     // multiplier / lower product bits
  logic                     q_1;
  logic [$clog2(W+1)-1:0]   cnt;
  logic signed [W:0]        sum;

  always_comb begin
    unique case ({lo[0], q_1})
      2'b01:   sum = hi + m;
      2'b10:   sum = hi - m;
      default: sum = hi;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m <= '0; hi <= '0; lo <= '0; q_1 <= 1'b0;
      cnt <= '0; busy <= 1'b0; done <= 1'b0; p <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        m    <= {a[W-1], a};
        hi   <= '0;
        lo   <= b;
        q_1  <= 1'b0;
        cnt  <= ($clog2(W+1))'(W);
        busy <= 1'b1;
      end else if (busy) begin
        {hi, lo, q_1} <= {sum[W], sum, lo};
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          p    <= {sum, lo[W-1:1]};
        end
      end
    end
  end
endmodule
