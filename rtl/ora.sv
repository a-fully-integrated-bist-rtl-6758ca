// ora: output response analyzer of the IQWF (in-phase / quadrature wave
// fitting) self-test.
//
// One signed Booth multiplier (booth_mul, 24 clocks per product), operand
// multiplexers, an offset subtractor, the x(n,p) register and one
// accumulator serve every step of the procedure.  For each decimated sample
// y_ADC(n) (strobe smp_valid) it does, according to 'op':
//   OP_OFFSET : acc += y_ADC(n)                            (no multiply)
//   OP_INPHASE: acc += y_IDSG(n) * y~(n),   y~ = y_ADC - a0
//   OP_QUAD   : acc += y_QDSG(n) * y~(n)
//   OP_THDN   : substep 1  x(n,1) = y~(n)   - 2*A_I*y_IDSG(n)
//               substep 2  x(n,2) = x(n,1)  - 2*A_Q*y_QDSG(n)  (= thdn(n))
//               substep 3  acc   += x(n,2)^2
// and, once per run on pow_start, OP_POWER: acc = A_I^2 + A_Q^2 (this
// result step reuses the same multiplier; the A_I/A_Q operand on the left
// multiplier input is this design's addition for it).
// A sample is accumulated only if acc_en is high when it arrives (acc_en is
// sampled together with the sample); acc_clr zeroes acc.
//
// Scaling: words are Q1.23, products Q2.46, and the accumulator keeps the
// Q2.46 LSB (y_ADC is added shifted left by 23), so with N = 2^11:
//   a0 = acc >>> 34,  A_I = A_Q = acc >>> 32 (the 4/N factor),
//   P_THDN = acc >>> 11 (Q2.46), A_I^2 + A_Q^2 = acc (Q2.46).
// 2*A*y_DSG is the product shifted by 22 instead of 23.  x(n,p) saturates
// at 24 bits.  The y_ADC-minus-a0 subtractor, the shared multiplier, the x
// register and the three-substep schedule follow the published ORA; widths,
// saturation and the exact cycle schedule are this design's choice.
//
// Timing: inputs are sampled on smp_valid.  OP_THDN takes 3 x 25 + 1 = 76
// clocks per sample (three 24-clock products plus one issue clock each),
// OP_INPHASE/OP_QUAD 26 and OP_OFFSET 2, all well below the 256-clock
// decimated period.  thdn holds x(n,2) of the last sample processed.
// substep and mul_done only expose the schedule for monitoring.
module ora
  import bist_pkg::*;
#(
  parameter int unsigned ACC_W = 59
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ora_op_e                 op,
  input  logic                    acc_clr,
  input  logic                    acc_en,
  input  logic                    smp_valid,
  input  logic                    pow_start,
  input  word_t                   y_adc,
  input  word_t                   y_i,
  input  word_t                   y_q,
  input  word_t                   a0,
  input  word_t                   a_i,
  input  word_t                   a_q,
  output logic signed [ACC_W-1:0] acc,
  output word_t                   thdn,
  output logic                    busy,
  output logic [1:0]              substep,    // observation: substep index
  output logic                    mul_done    // observation: product ready
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e        state;
  logic [1:0]    sub;            // substep index 0..2
  word_t         y_r, yi_r, yq_r, x;
  word_t         y_t;            // offset-free response y~(n)
  word_t         ab_mux;         // A_I / A_Q multiplexer
  word_t         dsg_mux;        // y_IDSG / y_QDSG multiplexer
  word_t         mul_a, mul_b;
  prod_t         prod;
  logic          mul_start, mul_busy;
  logic          last_sub, acc_sub;
  logic          acc_en_r;       // acc_en sampled with the sample
  logic signed [63:0] x_next;

  assign substep = sub;

  // ---------------- operand multiplexers ----------------
  always_comb begin
    y_t     = sat_word(64'(y_r) - 64'(a0));
    ab_mux  = (sub == 2'd1) ? a_q : a_i;
    dsg_mux = (op == OP_QUAD || (op == OP_THDN && sub == 2'd1)) ? yq_r : yi_r;
    unique case (op)
      OP_THDN:  begin
                  mul_a = (sub == 2'd2) ? x : dsg_mux;
                  mul_b = (sub == 2'd2) ? x : ab_mux;
                end
      OP_POWER: begin
                  mul_a = ab_mux;
                  mul_b = ab_mux;
                end
      default:  begin
                  mul_a = dsg_mux;
                  mul_b = y_t;
                end
    endcase
    // subtractor: x(n,1) from y~(n), x(n,2) from x(n,1)
    x_next   = 64'((sub == 2'd0) ? y_t : x) - (64'(prod) >>> 22);
    last_sub = (op == OP_THDN)  ? (sub == 2'd2) :
               (op == OP_POWER) ? (sub == 2'd1) : 1'b1;
    acc_sub  = (op != OP_THDN) || (sub == 2'd2);
  end

  assign mul_start = (state == S_ISSUE) && (op != OP_OFFSET);

  booth_mul #(.W(WORD_W)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .start(mul_start),
    .a    (mul_a),
    .b    (mul_b),
    .p    (prod),
    .busy (mul_busy),
    .done (mul_done)
  );

  // ---------------- sequencing, x register, accumulator ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; sub <= '0;
      y_r <= '0; yi_r <= '0; yq_r <= '0; x <= '0;
      acc <= '0; thdn <= '0; acc_en_r <= 1'b0;
    end else begin
      if (acc_clr) acc <= '0;
      unique case (state)
        S_IDLE: begin
          sub <= '0;
          if (smp_valid && op != OP_POWER) begin
            y_r      <= y_adc;
            acc_en_r <= acc_en;
            yi_r  <= y_i;
            yq_r  <= y_q;
            state <= S_ISSUE;
          end else if (pow_start && op == OP_POWER) begin
            acc_en_r <= acc_en;
            state    <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (op == OP_OFFSET) begin
            if (acc_en_r && !acc_clr) acc <= acc + (ACC_W'(y_r) <<< (WORD_W - 1));
            state <= S_IDLE;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (mul_done) begin
            if (op == OP_THDN && sub != 2'd2) begin
              x <= sat_word(x_next);
              if (sub == 2'd1) thdn <= sat_word(x_next);
            end
            if (acc_sub && acc_en_r && !acc_clr) acc <= acc + ACC_W'(prod);
            if (last_sub) begin
              state <= S_IDLE;
            end else begin
              sub   <= sub + 1'b1;
              state <= S_ISSUE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || mul_busy;

  // A new sample must not arrive while the previous one is still processed
  // (smp_valid is low during reset, so no reset qualifier is needed).
  a_no_overrun: assert property (@(posedge clk) smp_valid |-> state == S_IDLE);
endmodule
