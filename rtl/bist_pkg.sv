// bist_pkg: types and constants shared by the BIST ΔΣ ADC.
//
// Number formats used throughout:
//   * ADC words, IQ reference words and the fitted coefficients a0, A_I, A_Q
//     are 24-bit signed fractions (Q1.23, full scale = ±1.0).
//   * Products of two such words are 48-bit Q2.46; the ORA accumulator keeps
//     that scale so that tiny THD+N squares are not lost.
// The 24-bit word, N = 2^11 and OSR = 256 follow the published design; the
// fractional formats are this implementation's choice.
package bist_pkg;

  localparam int unsigned WORD_W = 24;    // decimated ADC / reference word
  localparam int unsigned PROD_W = 2 * WORD_W;

  typedef logic signed [WORD_W-1:0] word_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // Operation the ORA performs on each decimated sample (Table I steps),
  // plus a one-shot signal-power calculation at the end of a run.
  typedef enum logic [2:0] {
    OP_OFFSET  = 3'd0,  // step 1: acc += y_ADC(n)
    OP_INPHASE = 3'd1,  // step 2: acc += y_IDSG(n) * y~(n)
    OP_QUAD    = 3'd2,  // step 3: acc += y_QDSG(n) * y~(n)
    OP_THDN    = 3'd3,  // step 4: three substeps, acc += x(n,2)^2
    OP_POWER   = 3'd4   // result: acc = A_I^2 + A_Q^2 (one shot)
  } ora_op_e;

  // Gain K of the DSG stabilising path, realised by shifting and adding:
  // K = sum over the enabled terms of (neg ? -1 : +1) * 2^-shift.
  localparam int unsigned K_TERMS = 3;
  typedef struct packed {
    logic       en;
    logic       neg;
    logic [5:0] shift;
  } k_term_t;
  typedef k_term_t [K_TERMS-1:0] k_cfg_t;

  // Switch-phase inputs of the D3T modulator (names of the published switch network).
  typedef struct packed {
    logic phi1;    // Φ1
    logic phi1d;   // Φ1' (delayed Φ1)
    logic phi2;    // Φ2
    logic phi2d;   // Φ2' (delayed Φ2)
  } phases_t;

  // Switch enables of one D3T branch j (names of the published switch network).
  typedef struct packed {
    logic s1, sa, s3, sc;   // positive input capacitor C_Sj+
    logic s2, sb, se, s5;   // negative input capacitor C_Sj-
    logic s4, sd;
  } d3t_branch_sw_t;

  // Switch enables of the complete input/reference network.
  typedef struct packed {
    d3t_branch_sw_t br0;   // branch j = 0 (driven by D_i0)
    d3t_branch_sw_t br1;   // branch j = 1 (driven by D_i1)
    logic ref_pos;         // Φ2 & D_o   : reference charge to one side
    logic ref_neg;         // Φ2 & ~D_o  : reference charge to the other side
  } d3t_sw_t;

  // Observation bundle of the self-test, brought out at the top so that the
  // internal stimulus/response words and handshakes can be monitored.
  typedef struct packed {
    logic       smp;        // decimated-sample strobe at the ORA input
    logic       ora_smp;    // sample handed to the ORA
    logic       acc_en;     // ORA accumulates (a measuring step is running)
    logic       pow_start;  // final A_I^2 + A_Q^2 request
    logic       ora_busy;   // ORA processing a sample
    logic       mul_done;   // Booth multiplier finished a product
    logic [1:0] ora_sub;    // step-4 substep index (0..2)
    word_t      y_i;        // in-phase reference y_IDSG(n)
    word_t      y_q;        // quadrature reference y_QDSG(n)
    word_t      thdn;       // THD+N sample x(n,2)
  } bist_obs_t;

  // Saturate a wide signed value to WORD_W bits.
  function automatic word_t sat_word(input logic signed [63:0] v);
    if (v > 64'sd8388607)       return word_t'(24'sh7FFFFF);
    else if (v < -64'sd8388608) return word_t'(24'sh800000);
    else                        return word_t'(v[WORD_W-1:0]);
  endfunction

endpackage
