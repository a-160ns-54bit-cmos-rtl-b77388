// srt_pkg: sizes, encodings and helper functions shared by the self-timed
// radix-2 SRT divider.
//
// Data between the ring stages travels "dual-monotonic": every bit is a pair
// of wires (t, f).  00 means the bit is reset (not ready), 01 evaluated false,
// 10 evaluated true; 11 never occurs.  The quotient digit travels on three
// wires (one per digit value +1, 0, -1), all low meaning "spacer".  These
// encodings follow the document.  The register-transfer model keeps the
// encodings but advances every self-timed event on a clock edge, so one
// clock stands for one gate-level event (evaluate, precharge, C-element flip).
//
// Number format (this design's reading of the document): the partial
// remainder datapath is REM_W = 55 bits, two's complement, bit weights
// -2, 1, 1/2, ... 2^-53.  Divisor and dividend are MANT_W = 53-bit normalised
// fractions 0.1xxx (value in [1/2, 1)), so the shifted remainder 2P, which lies
// in [-2D, 2D], always fits.  Five stages iterate at most eleven times, giving
// Q_W = 55 quotient digits q_0..q_54 with weights 2^0..2^-54.
package srt_pkg;

  localparam int REM_W    = 55;            // width of the remainder datapath ("55b CSA")
  localparam int MANT_W   = REM_W - 2;     // operand significand width
  localparam int EST_W    = 3;             // width of the remainder approximation CPA
  localparam int N_STAGES = 5;             // stages in the ring
  localparam int N_ITERS  = 11;            // maximum trips round the ring
  localparam int Q_W      = N_STAGES * N_ITERS;  // quotient digits

  // Triple-monotonic quotient digit: {plus, zero, minus}.  Exactly one wire
  // high carries a digit; all low is the spacer between two digits.
  typedef logic [2:0] qdig_t;
  localparam qdig_t Q_SPACER = 3'b000;
  localparam qdig_t Q_NEG    = 3'b001;
  localparam qdig_t Q_ZERO   = 3'b010;
  localparam qdig_t Q_POS    = 3'b100;

  // One dual-monotonic bit and one dual-monotonic remainder word.
  typedef struct packed {
    logic t;
    logic f;
  } dm_bit_t;

  typedef struct packed {
    logic [REM_W-1:0] t;
    logic [REM_W-1:0] f;
  } dm_word_t;

  // Plain (single-rail) view of what one stage hands to the next: the
  // shifted partial remainder in carry-save form, the quotient digit already
  // chosen for it, and the force-next-digit flag.
  typedef struct packed {
    logic [REM_W-1:0] sum;
    logic [REM_W-1:0] car;
    qdig_t            q;
    logic             frc;
  } ring_state_t;

  // The same bundle as it travels on the wires between stages.
  typedef struct packed {
    dm_word_t sum;
    dm_word_t car;
    qdig_t    q;
    dm_bit_t  frc;
  } ring_tok_t;

  localparam ring_tok_t TOK_SPACER = '0;

  // Completion status of the three self-timed blocks of one stage: the
  // remainder block (DMUX + CSA), the approximation block (three arms) and
  // the digit block (RMUX + selection).
  typedef struct packed {
    logic r_done, r_empty;
    logic p_done, p_empty;
    logic q_done, q_empty;
  } stage_stat_t;

  function automatic dm_word_t dm_encode_word(input logic [REM_W-1:0] v);
    dm_word_t w;
    w.t = v;
    w.f = ~v;
    return w;
  endfunction

  function automatic ring_tok_t tok_encode(input ring_state_t s);
    ring_tok_t k;
    k.sum   = dm_encode_word(s.sum);
    k.car   = dm_encode_word(s.car);
    k.q     = s.q;
    k.frc.t = s.frc;
    k.frc.f = ~s.frc;
    return k;
  endfunction

  function automatic ring_state_t tok_decode(input ring_tok_t k);
    ring_state_t s;
    s.sum = k.sum.t;
    s.car = k.car.t;
    s.q   = k.q;
    s.frc = k.frc.t;
    return s;
  endfunction

  // Digit value of a triple-monotonic digit as a 2-bit two's complement number.
  function automatic logic signed [1:0] qdig_value(input qdig_t q);
    unique case (q)
      Q_POS:   return 2'sd1;
      Q_NEG:   return -2'sd1;
      default: return 2'sd0;
    endcase
  endfunction

endpackage
