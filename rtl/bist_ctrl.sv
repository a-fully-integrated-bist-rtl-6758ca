// bist_ctrl: BIST controller of the IQWF self-test.
//
// On 'start' the setup parameters (a21, K and the initial integrator values
// that fix amplitude and phase) are registered and loaded into the three
// DSGs.  After SETTLE_SAMPLES decimated samples, which let the modulator and
// the decimation filter settle, the controller runs the four IQWF steps,
// each over N = 2^N_LOG2 decimated samples, and converts the ORA accumulator
// after each step (shifts shown for N = 2^11; they follow N_LOG2):
//   step 1 (OP_OFFSET)  a0     = acc >>> 34        (Q1.23)
//   step 2 (OP_INPHASE) A_I    = acc >>> 32        (Q1.23, the 4/N factor)
//   step 3 (OP_QUAD)    A_Q    = acc >>> 32
//   step 4 (OP_THDN)    P_THDN = acc >>> 11        (Q2.46)
// and finally has the ORA form sig_pow2 = A_I^2 + A_Q^2 (Q2.46), so that
// SNDR = sig_pow2 / (2 * P_THDN).  The DSGs run without interruption through
// all steps; the coherent test frequency makes every step see the same
// phase relation between stimulus and references.
// The step order, N and the quantities follow the published procedure; the
// settling period, the result formats and the handshake are this design's.
//
// Handshake: 'start' is accepted when idle or done; 'busy' is high during a
// run and 'done' stays high from the end of the run until the next start.
// Results hold their values until overwritten by the next run.
// Timing: one run lasts (SETTLE_SAMPLES + 4*N) decimated periods plus a
// few clocks.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned N_LOG2         = 11,
  parameter int unsigned SETTLE_SAMPLES = 64,
  parameter int unsigned ACC_W          = 59,
  parameter int unsigned S_X1_W         = 46,
  parameter int unsigned I_X1_W         = 38
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // setup and status
  input  logic                     start,
  input  logic [31:0]              a21_in,
  input  k_cfg_t                   k_in,
  input  logic signed [S_X1_W-1:0] s_x1_in,
  input  logic signed [I_X1_W-1:0] i_x1_in,
  output logic                     busy,
  output logic                     done,
  output ora_op_e                  step,
  // DSG setup
  output logic                     dsg_load,
  output logic [31:0]              a21,
  output k_cfg_t                   k_cfg,
  output logic signed [S_X1_W-1:0] s_x1,
  output logic signed [I_X1_W-1:0] i_x1,
  // ORA control
  input  logic                     smp_valid,
  input  logic signed [ACC_W-1:0]  acc,
  input  logic                     ora_busy,
  output ora_op_e                  op,
  output logic                     acc_clr,
  output logic                     acc_en,
  output logic                     ora_smp,
  output logic                     pow_start,
  // results
  output word_t                    a0,
  output word_t                    a_i,
  output word_t                    a_q,
  output prod_t                    p_thdn,
  output prod_t                    sig_pow2
);
  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_SETTLE, C_RUN, C_NEXT, C_POWER, C_POWER_WAIT, C_DONE} cstate_e;

  cstate_e            state;
  logic [N_LOG2:0]    cnt;
  logic               full;

  assign full      = (state == C_RUN) && (cnt == (N_LOG2+1)'(1 << N_LOG2));
  assign ora_smp   = smp_valid && (state == C_SETTLE || (state == C_RUN && !full));
  assign acc_en    = (state == C_RUN) || (state == C_POWER) || (state == C_POWER_WAIT);
  assign busy      = (state != C_IDLE) && (state != C_DONE);
  assign done      = (state == C_DONE);
  assign step      = op;

  function automatic word_t acc_to_word(input logic signed [ACC_W-1:0] v, input int unsigned sh);
    logic signed [63:0] w;
    w = 64'(v) >>> sh;
    return sat_word(w);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; cnt <= '0; op <= OP_OFFSET;
      dsg_load <= 1'b0; acc_clr <= 1'b0; pow_start <= 1'b0;
      a21 <= '0; k_cfg <= '0; s_x1 <= '0; i_x1 <= '0;
      a0 <= '0; a_i <= '0; a_q <= '0; p_thdn <= '0; sig_pow2 <= '0;
    end else begin
      dsg_load  <= 1'b0;
      acc_clr   <= 1'b0;
      pow_start <= 1'b0;
      unique case (state)
        C_IDLE, C_DONE: begin
          if (start) begin
            a21  <= a21_in;
            k_cfg <= k_in;
            s_x1 <= s_x1_in;
            i_x1 <= i_x1_in;
            a0 <= '0; a_i <= '0; a_q <= '0;
            state <= C_LOAD;
          end
        end
        C_LOAD: begin
          dsg_load <= 1'b1;
          acc_clr  <= 1'b1;
          op       <= OP_OFFSET;
          cnt      <= '0;
          state    <= C_SETTLE;
        end
        C_SETTLE: begin
          if (smp_valid) begin
            if (cnt == (N_LOG2+1)'(SETTLE_SAMPLES - 1)) begin
              cnt   <= '0;
              state <= C_RUN;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        C_RUN: begin
          if (ora_smp) cnt <= cnt + 1'b1;
          if (full && !ora_busy) state <= C_NEXT;
        end
        C_NEXT: begin
          acc_clr <= 1'b1;
          cnt     <= '0;
          unique case (op)
            OP_OFFSET:  begin a0  <= acc_to_word(acc, WORD_W - 1 + N_LOG2); op <= OP_INPHASE; state <= C_RUN; end
            OP_INPHASE: begin a_i <= acc_to_word(acc, WORD_W - 3 + N_LOG2); op <= OP_QUAD;    state <= C_RUN; end
            OP_QUAD:    begin a_q <= acc_to_word(acc, WORD_W - 3 + N_LOG2); op <= OP_THDN;    state <= C_RUN; end
            default:    begin p_thdn <= prod_t'(acc >>> N_LOG2); op <= OP_POWER; state <= C_POWER; end
          endcase
        end
        C_POWER: begin
          pow_start <= 1'b1;
          state     <= C_POWER_WAIT;
        end
        C_POWER_WAIT: begin
          if (!pow_start && !ora_busy) begin
            sig_pow2 <= prod_t'(acc);
            state    <= C_DONE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
