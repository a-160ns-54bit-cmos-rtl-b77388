// srt_divider: self-timed radix-2 SRT divider for the significand of a
// double-precision division.
//
// Five identical stages form a ring (A -> B -> C -> D -> E -> A) with no
// latches between them: each stage's precharged output is the only storage,
// and a stage is reset as soon as its successor has taken its result.  Each
// stage performs one overlapped SRT step, so one trip round the ring yields
// five quotient digits; at most eleven trips give 55 digits.  Each stage's
// digits are collected by its own asynchronous shift register.  After every
// trip the bundle leaving stage E is compared with the one from the trip
// before; if it repeated, the remaining digits would repeat too and the ring
// stops early (Same), otherwise it stops after eleven trips (Full).  The
// final remainder's sign then fixes up the quotient.
//
// Interface.  Operands are MANT_W-bit normalised significands 1xxx...x
// (read as fractions in [1/2, 1)).  Pulse `go` while `busy` is low; the
// operands are captured in the input registers.  When `done` rises,
//   dividend * 2^55 = quotient * divisor + remainder,  0 <= remainder < divisor,
// `quotient` has Q_W+1 = 56 bits (value quotient * 2^-55, in (1/2, 2)),
// `exact` says the remainder is zero, `early` that the ring stopped on a
// repeated remainder and `trips` how many times it went round.
//
// Timing model.  The chip has no clock; here every self-timed event (a stage
// evaluating or resetting, a C-element switching) takes one clock, so the
// cycle counts show the order of events, not the chip's nanoseconds.
// Following the document: the ring, the overlapped stage structure, the
// 55-bit remainder with 3-bit approximation adders, force-ahead digit
// selection, shift registers with spacers, early done on a repeated
// remainder, final sign/decrement step.  This design's choices: the number
// format, starting the ring with the leading quotient digit fixed at +1 (the
// first stage receives the dividend with digit +1, i.e. computes
// 2*(dividend - divisor)), the control state sequence, and comparing the
// whole inter-stage bundle for the early stop.
module srt_divider
  import srt_pkg::*;
#(
  parameter int ITERS = N_ITERS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic [MANT_W-1:0] dividend,
  input  logic [MANT_W-1:0] divisor,
  output logic              busy,
  output logic              done,
  output logic [Q_W:0]      quotient,
  output logic [MANT_W-1:0] remainder,
  output logic              exact,
  output logic              corrected,     // final remainder was negative: quotient decremented
  output logic              early,
  output logic [3:0]        trips,
  // event counters' taps, for observing the self-timed behaviour
  output logic [N_STAGES-1:0] stage_fired,
  output logic [N_STAGES-1:0] stage_forced,
  output logic [N_STAGES-1:0] stage_aliased
);
  // ---------------- input registers ----------------
  logic [MANT_W-1:0] x_r, d_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r <= '0;
      d_r <= '0;
    end else if (go && !busy) begin
      x_r <= dividend;
      d_r <= divisor;
    end
  end

  logic [REM_W-1:0] dword;
  assign dword = {2'b00, d_r};

  // ---------------- control ----------------
  logic flush, load, more, release_sr, settled, cmp_valid, same;
  logic rem_neg, rem_zero;

  // ---------------- ring ----------------
  ring_tok_t tok     [N_STAGES];   // output of stage i
  ring_tok_t tok_in  [N_STAGES];
  stage_stat_t sstat [N_STAGES];
  logic      sr_ack  [N_STAGES];
  qdig_t     sr_dig  [N_STAGES];
  logic      sr_stab [N_STAGES];
  qdig_t     digs    [N_STAGES][ITERS];

  // input mux: dividend bundle at the start, stage E's bundle when the
  // controller lets the ring go round again, otherwise reset (spacer)
  ring_state_t init_state;
  always_comb begin
    init_state.sum = {2'b00, x_r};
    init_state.car = '0;
    init_state.q   = Q_POS;
    init_state.frc = 1'b0;
  end

  always_comb begin
    if (load)      tok_in[0] = tok_encode(init_state);
    else if (more) tok_in[0] = tok[N_STAGES-1];
    else           tok_in[0] = TOK_SPACER;
  end

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    if (i > 0) begin : g_link
      assign tok_in[i] = tok[i-1];
    end

    srt_stage u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .flush     (flush),
      .divisor   (dword),
      .tok_in    (tok_in[i]),
      .tok_out   (tok[i]),
      .succ      (sstat[(i+1) % N_STAGES]),
      .stat      (sstat[i]),
      .sr_ack    (sr_ack[i]),
      .sr_release(release_sr),
      .sr_digit  (sr_dig[i]),
      .fired     (stage_fired[i]),
      .forced    (stage_forced[i]),
      .aliased   (stage_aliased[i])
    );

    quot_shift_reg #(.N_DIG(ITERS)) u_qsr (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (flush),
      .din   (sr_dig[i]),
      .ack   (sr_ack[i]),
      .digits(digs[i]),
      .stable(sr_stab[i])
    );
  end

  always_comb begin
    settled = 1'b1;
    for (int i = 0; i < N_STAGES; i++) settled &= sr_stab[i];
  end

  // ---------------- early done detection ----------------
  rem_compare u_cmp (
    .clk         (clk),
    .rst_n       (rst_n),
    .clr         (flush),
    .capture     (stage_fired[N_STAGES-1]),
    .state       (tok_decode(tok[N_STAGES-1])),
    .same        (same),
    .result_valid(cmp_valid)
  );

  ring_control #(.ITERS(ITERS)) u_ctl (
    .clk       (clk),
    .rst_n     (rst_n),
    .go        (go),
    .a_fired   (stage_fired[0]),
    .e_empty   (sstat[N_STAGES-1].r_empty && sstat[N_STAGES-1].q_empty),
    .cmp_valid (cmp_valid),
    .same      (same),
    .settled   (settled),
    .flush     (flush),
    .load      (load),
    .more      (more),
    .release_sr(release_sr),
    .busy      (busy),
    .done      (done),
    .early     (early),
    .trips     (trips)
  );

  // ---------------- quotient assembly and final resolve ----------------
  // digit k = N_STAGES*j + i was produced by stage i on trip j; with
  // ITERS < N_ITERS the low digit positions are zero.
  logic [Q_W-1:0] qpos, qneg;
  always_comb begin
    qpos = '0;
    qneg = '0;
    for (int j = 0; j < ITERS; j++) begin
      for (int i = 0; i < N_STAGES; i++) begin
        qpos[Q_W-1-(N_STAGES*j+i)] = digs[i][j] == Q_POS;
        qneg[Q_W-1-(N_STAGES*j+i)] = digs[i][j] == Q_NEG;
      end
    end
  end

  quot_resolve u_res (
    .qpos     (qpos),
    .qneg     (qneg),
    .last     (tok_decode(tok[N_STAGES-1])),
    .divisor  (dword),
    .quotient (quotient),
    .remainder(remainder),
    .rem_neg  (rem_neg),
    .rem_zero (rem_zero)
  );

  assign exact     = rem_zero;
  assign corrected = rem_neg;

endmodule
