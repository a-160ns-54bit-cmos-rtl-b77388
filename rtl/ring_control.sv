// ring_control: start, iteration and stop control of the self-timed ring.
//
// A division runs as follows.  `go` (while idle) clears the ring, the remainder
// register and the quotient shift registers (flush), then the input mux
// offers the dividend bundle (`load`) until the first stage has taken it.
// From then on the ring runs by itself.  Every time the last stage
// evaluates, the remainder comparator reports whether the bundle repeated;
// the controller counts the trip and either
//   * stops early (Same): the remainder repeated, so all later digits repeat;
//   * stops because the shift registers are full (Full): N_ITERS trips done;
//   * or lets the bundle back into the first stage (`more`) and allows the
//     stages to send spacers into the shift registers (`release` pulse).
//     `more` stays up until the last stage has reset, so the first stage
//     sees its input return to reset only when its producer really has.
// After stopping it waits until every shift register is quiescent
// (`settled`) and raises `done`, which stays high until the next `go`.
// The document names the control logic, the Same and Full conditions and
// the Done output; the state sequence is this design's.
module ring_control
  import srt_pkg::*;
#(
  parameter int ITERS = N_ITERS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  logic       a_fired,       // first stage has evaluated
  input  logic       e_empty,       // last stage's outputs are back in reset
  input  logic       cmp_valid,     // comparator result for the latest trip
  input  logic       same,
  input  logic       settled,       // all quotient shift registers quiescent
  output logic       flush,
  output logic       load,
  output logic       more,
  output logic       release_sr,
  output logic       busy,
  output logic       done,
  output logic       early,         // stopped on a repeated remainder
  output logic [3:0] trips          // ring trips of the last division
);
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_LOAD, S_RUN, S_SETTLE} state_t;
  state_t st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      more  <= 1'b0;
      done  <= 1'b0;
      early <= 1'b0;
      trips <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (go) begin
          st    <= S_CLEAR;
          done  <= 1'b0;
          early <= 1'b0;
          trips <= '0;
          more  <= 1'b0;
        end
        S_CLEAR: st <= S_LOAD;
        S_LOAD:  if (a_fired) st <= S_RUN;
        S_RUN: begin
          if (more && e_empty) more <= 1'b0;
          if (cmp_valid) begin
            trips <= trips + 4'd1;
            if (same) begin
              early <= 1'b1;
              st    <= S_SETTLE;
            end else if (32'(trips) + 1 >= ITERS) begin
              st    <= S_SETTLE;
            end else begin
              more  <= 1'b1;
            end
          end
        end
        S_SETTLE: if (settled) begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign flush      = (st == S_CLEAR);
  assign load       = (st == S_LOAD);
  assign busy       = (st != S_IDLE);
  assign release_sr = (st == S_RUN) && cmp_valid && !same && (32'(trips) + 1 < ITERS);

endmodule
