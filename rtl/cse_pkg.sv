// Shared constants, types and code-generation functions of the cell search engine.
//
// Sizes follow the WCDMA air interface as used by the engine: 4-bit I/Q input samples,
// 2560-chip slots, 15 slots per frame, 256-chip synchronisation codes, 16 secondary
// synchronisation codes, 64 code groups of 8 scrambling codes, and a (15,3) comma-free
// code word of 15 symbols per frame. The word lengths after truncation (12-bit stage-1
// partial results, 16-bit accumulator fields, 10 bits dropped after the stage-2 coherent
// combination) are the design's documented fixed-point choices.
//
// The primary and secondary synchronisation codes are produced here from their
// closed-form construction (a 16-chip base sequence a, a 16-chip outer Golay sequence
// for the PSC and the z sequence times Hadamard rows for the SSCs), so no code table
// has to be stored. These constructions follow the air-interface standard; the
// chip values are used consistently by the RTL and the testbenches.
package cse_pkg;

  localparam int unsigned DATA_W      = 4;     // ADC sample width (I and Q), signed
  localparam int unsigned PSC_LEN     = 256;   // synchronisation code length (chips)
  localparam int unsigned N_SSC       = 16;    // number of secondary sync codes
  localparam int unsigned N_GROUPS    = 64;    // scrambling-code groups
  localparam int unsigned N_CODES     = 8;     // scrambling codes per group
  localparam int unsigned FRAME_SLOTS = 15;    // slots per frame = CFRS code length
  localparam int unsigned SYM_LEN     = 256;   // CPICH symbol length (chips)

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // Configuration of one preprocessing block (SPR -> RSPF -> FOC).
  localparam int unsigned SPR_FRAC_W = 24;     // fractional bits of the SPR drift accumulator
  localparam int unsigned SPR_SEL_W  = 4;      // signed tap selection, range +-SPR_HALF
  localparam int unsigned PH_W       = 16;     // FOC phase accumulator width
  localparam int unsigned LUT_AW     = 6;      // FOC register file address width (64 phases)
  localparam int unsigned COEF_W     = 6;      // FOC cos/sin word width, signed, scale 2^(COEF_W-1)

  typedef struct packed {
    logic signed [SPR_SEL_W-1:0]  sel;         // current tap selection (0 = centre tap)
    logic signed [SPR_FRAC_W:0]   frac;        // accumulated sub-sample drift
  } spr_state_t;

  typedef struct packed {
    logic                          en_spr;     // 0 = SPR bypassed (selection held at 0)
    logic                          en_rspf;    // 0 = RSPF bypassed (first sample of each chip)
    logic                          en_foc;     // 0 = FOC bypassed
    logic signed [SPR_FRAC_W-1:0]  drift;      // assumed clock drift per sample, 2^-SPR_FRAC_W units
    logic signed [PH_W-1:0]        phase_step; // FOC phase increment per chip, 2^-PH_W cycles
  } pre_cfg_t;

  // 16-chip base sequence a (standard).
  localparam logic [15:0] SEQ_A = 16'b0110_1010_1100_0000; // bit n = 1 means chip n is -1
  // 16-chip outer sequence of the hierarchical PSC (bit n = 1 means -1).
  localparam logic [15:0] SEQ_O = 16'b0010_1000_1101_1000;

  // a(n) as a sign bit: 1 = -1.
  function automatic logic a_neg(input int unsigned n);
    return SEQ_A[n%16];
  endfunction

  // PSC chip k (0..255) as a sign bit: PSC(16i+j) = o(i)*a(j).
  function automatic logic psc_neg(input int unsigned k);
    return SEQ_O[(k/16)%16] ^ SEQ_A[k%16];
  endfunction

  // z sequence: z = <b,b,b,-b,b,b,-b,-b,b,-b,b,-b,-b,-b,-b,-b>, b = <a(0..7), -a(8..15)>.
  localparam logic [15:0] SEQ_Z_OUTER = 16'b1111_1010_1100_1000; // bit n = 1: block n negated
  function automatic logic b_neg(input int unsigned n);
    return SEQ_A[n%16] ^ ((n%16) >= 8);
  endfunction

  // SSC number j (0..15), chip k (0..255): Hadamard row 16j times z(k).
  function automatic logic ssc_neg(input int unsigned j, input int unsigned k);
    logic [7:0] m, kk;
    m  = 8'(16*j);
    kk = 8'(k);
    return (^(m & kk)) ^ SEQ_Z_OUTER[(k/16)%16] ^ b_neg(k);
  endfunction

endpackage
