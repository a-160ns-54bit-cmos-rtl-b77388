// srt_stage: one stage of the self-timed SRT ring, with overlapped execution.
//
// A stage receives from its predecessor the shifted partial remainder
// (carry-save) and, separately, the quotient digit already selected for it
// together with the force flag.  It is built from three self-timed blocks,
// each with its own dual-monotonic output, completion detector and
// precharge control (document Figures 3, 4 and 5):
//   R  remainder block: DMUX + 55-bit CSA, computes 2*(R - q*D); needs the
//      incoming remainder and the incoming digit.
//   P  approximation block: three arms (3-bit CSA + 3-bit CPA, none on the
//      zero arm) giving the next remainder's top bits for q = -1, 0, +1;
//      needs only the incoming remainder, so it works before the digit comes.
//   Q  digit block: RMUX picks the arm matching the incoming digit and the
//      selection logic picks the next digit and force flag; needs P and the
//      incoming digit.
// The digit path of this stage (P then Q) thus overlaps the remainder path
// of the next stage, and each block fires as soon as its own operands are
// there, so whichever path is later in a given stage sets the pace.
//
// Self-timing.  A block evaluates when it is out of precharge, its inputs
// are complete and its output is empty.  It goes into precharge when every
// block that reads its output is complete and its own inputs have returned to
// reset, and leaves precharge when every reader is empty again (a C-element
// style set/reset on completion signals; the document combines completion
// signals with C-elements but does not print the exact pairing, so this rule
// is this design's).  One clock edge stands for one evaluate or precharge
// event.  Readers: R of stage i is read by R and P of stage i+1; P is read by
// Q of the same stage; Q is read by R and Q of stage i+1 and by the quotient
// shift register.
//
// Digit to the shift register.  The digit block also waits for the shift
// register's entry cell to be empty.  Its digit is held on `sr_digit` after
// it resets and a spacer is sent only once `sr_release` says the ring will
// iterate again, so that an early finish leaves the repeated digit in the
// shift register (document Section 4).  `flush` returns the stage to reset.
module srt_stage
  import srt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [REM_W-1:0] divisor,
  input  ring_tok_t        tok_in,      // predecessor's remainder and digit
  output ring_tok_t        tok_out,
  input  stage_stat_t      succ,        // successor's block status
  output stage_stat_t      stat,        // own block status
  input  logic             sr_ack,      // shift register entry cell is empty
  input  logic             sr_release,  // spacers may now be sent to the shift register
  output qdig_t            sr_digit,
  output logic             fired,       // one-clock pulse when R and Q are both complete
  output logic             forced,      // force flag set by the last digit selection
  output logic             aliased      // last selection saw a wrapped approximation
);
  localparam int HI = REM_W - 2;          // columns HI..LO feed the short adders
  localparam int LO = REM_W - EST_W - 2;

  // ---------------- input completion ----------------
  logic rem_in_done, rem_in_empty, dig_in_done, dig_in_empty;

  comp_det #(.WIDTH(2 * REM_W)) u_cd_rin (
    .t    ({tok_in.sum.t, tok_in.car.t}),
    .f    ({tok_in.sum.f, tok_in.car.f}),
    .done (rem_in_done),
    .empty(rem_in_empty)
  );
  assign dig_in_done  = (|tok_in.q) & (tok_in.frc.t | tok_in.frc.f);
  assign dig_in_empty = ~(|tok_in.q) & ~(tok_in.frc.t | tok_in.frc.f);

  // ---------------- output registers (precharged block outputs) ----------------
  dm_word_t rsum, rcar;                    // R block
  logic [3*EST_W-1:0] pt, pf;              // P block: {est for q=+1, q=0, q=-1}
  qdig_t    qd;                            // Q block
  dm_bit_t  qf;

  logic r_done, r_empty, p_done, p_empty, q_done, q_empty;

  comp_det #(.WIDTH(2 * REM_W)) u_cd_r (
    .t    ({rsum.t, rcar.t}),
    .f    ({rsum.f, rcar.f}),
    .done (r_done),
    .empty(r_empty)
  );
  comp_det #(.WIDTH(3 * EST_W)) u_cd_p (
    .t    (pt),
    .f    (pf),
    .done (p_done),
    .empty(p_empty)
  );
  assign q_done  = (|qd) & (qf.t | qf.f);
  assign q_empty = ~(|qd) & ~(qf.t | qf.f);

  always_comb begin
    stat.r_done  = r_done;
    stat.r_empty = r_empty;
    stat.p_done  = p_done;
    stat.p_empty = p_empty;
    stat.q_done  = q_done;
    stat.q_empty = q_empty;
  end

  always_comb begin
    tok_out.sum = rsum;
    tok_out.car = rcar;
    tok_out.q   = qd;
    tok_out.frc = qf;
  end

  // ---------------- precharge control ----------------
  // set: all readers complete and own inputs reset; clear: all readers empty
  logic r_prech, p_prech, q_prech;
  logic r_set, r_clr, p_set, p_clr, q_set, q_clr;

  assign r_set = succ.r_done  && succ.p_done  && rem_in_empty && dig_in_empty;
  assign r_clr = succ.r_empty && succ.p_empty;
  assign p_set = q_done  && rem_in_empty;
  assign p_clr = q_empty;
  assign q_set = succ.r_done  && succ.q_done  && p_empty && dig_in_empty;
  assign q_clr = succ.r_empty && succ.q_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_prech <= 1'b0;
      p_prech <= 1'b0;
      q_prech <= 1'b0;
    end else if (flush) begin
      r_prech <= 1'b0;
      p_prech <= 1'b0;
      q_prech <= 1'b0;
    end else begin
      if (r_set) r_prech <= 1'b1; else if (r_clr) r_prech <= 1'b0;
      if (p_set) p_prech <= 1'b1; else if (p_clr) p_prech <= 1'b0;
      if (q_set) q_prech <= 1'b1; else if (q_clr) q_prech <= 1'b0;
    end
  end

  // ---------------- datapath ----------------
  ring_state_t      s_in;
  logic [REM_W-1:0] sum_nx, car_nx;
  logic [EST_W-1:0] est_p, est_0, est_n, est;
  qdig_t            q_nx;
  logic             frc_nx;

  assign s_in = tok_decode(tok_in);

  rem_csa u_csa (
    .sum     (s_in.sum),
    .car     (s_in.car),
    .divisor (divisor),
    .q       (s_in.q),
    .sum_next(sum_nx),
    .car_next(car_nx)
  );

  approx_arm #(.HAS_CSA(1'b1)) u_arm_plus_d (   // incoming digit -1: add D
    .s_top(s_in.sum[HI:LO]), .c_top(s_in.car[HI:LO]), .m_top(divisor[HI:LO]), .est(est_p));
  approx_arm #(.HAS_CSA(1'b0)) u_arm_zero (     // incoming digit 0
    .s_top(s_in.sum[HI:LO]), .c_top(s_in.car[HI:LO]), .m_top('0), .est(est_0));
  approx_arm #(.HAS_CSA(1'b1)) u_arm_minus_d (  // incoming digit +1: subtract D
    .s_top(s_in.sum[HI:LO]), .c_top(s_in.car[HI:LO]), .m_top(~divisor[HI:LO]), .est(est_n));

  // RMUX, reading the stored arm results
  always_comb begin
    unique case (s_in.q)
      Q_POS:   est = pt[0 +: EST_W];          // arm that subtracted D
      Q_NEG:   est = pt[2*EST_W +: EST_W];    // arm that added D
      default: est = pt[EST_W +: EST_W];
    endcase
  end

  qsl u_qsl (
    .est    (est),
    .frc_in (s_in.frc),
    .q      (q_nx),
    .frc_out(frc_nx)
  );

  // ---------------- evaluate / precharge events ----------------
  logic r_eval, p_eval, q_eval;
  assign r_eval = !flush && !r_prech && rem_in_done && dig_in_done && r_empty;
  assign p_eval = !flush && !p_prech && rem_in_done && p_empty;
  assign q_eval = !flush && !q_prech && p_done && dig_in_done && q_empty && sr_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsum <= '0;
      rcar <= '0;
      pt   <= '0;
      pf   <= '0;
      qd   <= Q_SPACER;
      qf   <= '0;
      forced  <= 1'b0;
      aliased <= 1'b0;
    end else begin
      if (flush || r_prech) begin
        rsum <= '0;
        rcar <= '0;
      end else if (r_eval) begin
        rsum <= dm_encode_word(sum_nx);
        rcar <= dm_encode_word(car_nx);
      end
      if (flush || p_prech) begin
        pt <= '0;
        pf <= '0;
      end else if (p_eval) begin
        pt <= {est_p, est_0, est_n};
        pf <= ~{est_p, est_0, est_n};
      end
      if (flush || q_prech) begin
        qd <= Q_SPACER;
        qf <= '0;
      end else if (q_eval) begin
        qd      <= q_nx;
        qf.t    <= frc_nx;
        qf.f    <= ~frc_nx;
        forced  <= frc_nx;
        aliased <= s_in.frc && !est[EST_W-1];
      end
    end
  end

  // one pulse when the stage's two outputs are both complete
  logic both_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) both_q <= 1'b0;
    else        both_q <= r_done && q_done;
  end
  assign fired = r_done && q_done && !both_q;

  // ---------------- digit hand-off to the shift register ----------------
  logic  hold, rel;
  qdig_t dig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= 1'b0;
      rel  <= 1'b0;
      dig  <= Q_SPACER;
    end else if (flush) begin
      hold <= 1'b0;
      rel  <= 1'b0;
    end else if (q_eval) begin
      hold <= 1'b1;
      rel  <= 1'b0;
      dig  <= q_nx;
    end else begin
      if (sr_release) rel <= 1'b1;
      if ((rel || sr_release) && !q_done) hold <= 1'b0;
    end
  end

  assign sr_digit = hold ? dig : Q_SPACER;

endmodule
