// dfe_pkg: constants and types shared by the speculative DFE / blind CDR.
//
// The receiver takes two 5-bit ADC samples per unit interval (UI) without
// any phase relation between the sampling clock and the data ("blind" 2x
// oversampling). The digital back end works on frames of 8 UI = 16 samples
// (a 4:16 deMUX behind four time-interleaved ADCs). The frame size, the
// 5-bit sample and coefficient widths and the 8 phase intervals per UI are
// the published design; the phase resolution and the signed sample format
// are choices of this implementation.
//
// Signed sample format: an ADC code S in 0..31 is mapped to 2*S-31, i.e.
// half-LSB units centred on mid-scale. The result is always odd, so a
// corrected sample is never exactly zero and its sign is always defined.
// A coefficient c (5-bit, ADC LSB units) becomes 2*c in the same units.
package dfe_pkg;

  localparam int unsigned ADC_W   = 5;   // ADC resolution (bits)
  localparam int unsigned COEF_W  = 5;   // DFE coefficient width (bits, ADC LSB)
  localparam int unsigned N_ADC   = 4;   // time-interleaved ADCs
  localparam int unsigned N_UI    = 8;   // UIs per deMUXed frame
  localparam int unsigned N_SAMP  = 2 * N_UI; // samples per frame (16)
  localparam int unsigned N_INT   = 8;   // phase intervals per UI (alpha[0:7])
  localparam int unsigned N_SPEC  = 4;   // PD/DD units per array: (b[n-2], b[n-1])
  localparam int unsigned PH_W    = 6;   // phase resolution: 1/64 UI
  localparam int unsigned PH_INT_W = 2;  // integer UI bits kept in PHI_AVG
  localparam int unsigned D_W     = 8;   // signed corrected-sample width

  typedef logic [ADC_W-1:0]           sample_t;   // raw ADC code
  typedef logic [COEF_W-1:0]          coef_t;     // DFE coefficient magnitude
  typedef logic signed [D_W-1:0]      dval_t;     // signed (corrected) sample
  typedef logic [PH_W-1:0]            phase_t;    // phase within one UI
  typedef logic [PH_INT_W+PH_W-1:0]   phase_avg_t;// PHI_AVG incl. whole UIs

  // Result of one Phase Detection / Data Decision unit.
  typedef struct packed {
    phase_t phx;        // instantaneous transition phase PHI_X
    logic   phx_valid;  // a single transition was seen in d[0:2]
    logic   b;          // recovered bit
  } pdd_t;

  // Signed sample of an ADC code: 2*S - 31.
  function automatic dval_t to_signed(sample_t s);
    return dval_t'(2 * int'(s) - (2**ADC_W - 1));
  endfunction

endpackage
