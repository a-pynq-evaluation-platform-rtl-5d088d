// hpa_pmvr: Peak to Mean Vote Ratio unit of the Hough Performance Analyser.
//
// It watches the HPS stream leaving the design under test, one vote count per
// beat, and over one HPS (first beat after reset, clear or the previous tlast
// up to the next tlast) keeps
//   peak    = max A(rho, theta)
//   total   = sum of all A(rho, theta)
//   nonzero = number of locations with A(rho, theta) > 0.
// The mean vote of the non-zero locations is N_f = total / nonzero, and the
// ratio is R_f = peak / N_f. After the tlast beat a restoring divider computes
//   ratio_q16 = floor(peak * nonzero * 2^16 / total)
// (unsigned Q16.16, exact up to truncation) in NUM_W cycles; ratio_f32 is the
// same value as an IEEE-754 single, mantissa truncated. done rises when both
// are ready, NUM_W + 2 clock cycles (66 at the defaults) after the tlast
// beat; the next HPS must not start before that, which a design under test
// that first consumes a whole image always satisfies (checked by an
// assertion). An HPS with no votes gives a ratio of 0.
//
// The measured quantities and the formula are those of the platform; the
// word widths, the divider and the fixed-point and float formats are this
// design's own. Counters are CNT_W bits and do not saturate: at the default
// 264,780-location HPS they overflow only beyond 2^32 votes.
module hpa_pmvr
  import hep_pkg::*;
#(
  parameter int unsigned VOTE_W = VOTE_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // HPS stream (monitored)
  input  logic [VOTE_W-1:0] tdata,
  input  logic              tvalid,
  input  logic              tready,
  input  logic              tlast,
  // results
  output logic [VOTE_W-1:0] peak,
  output logic [CNT_W-1:0]  total,
  output logic [CNT_W-1:0]  nonzero,
  output logic [31:0]       ratio_q16,
  output logic [31:0]       ratio_f32,
  output logic              done
);

  localparam int unsigned NUM_W = VOTE_W + CNT_W + 16;  // peak * nonzero * 2^16
  localparam int unsigned CW    = $clog2(NUM_W + 1);

  typedef enum logic [1:0] {P_ACC, P_MUL, P_DIV, P_DONE} pstate_e;
  pstate_e state;

  logic             fire, first;
  logic [NUM_W-1:0] num;       // numerator bits still to shift in, quotient bits shifted in
  logic [CNT_W-1:0] rem;       // always below total
  logic [CW-1:0]    step;
  logic [CNT_W:0]   rem_sh;
  logic [CNT_W-1:0] rem_nx;
  logic [NUM_W-1:0] num_nx;
  logic             ge;

  assign fire = tvalid && tready;

  // one restoring-division step
  always_comb begin
    rem_sh = {rem, num[NUM_W-1]};
    ge     = (rem_sh >= {1'b0, total});
    rem_nx = CNT_W'(ge ? (rem_sh - {1'b0, total}) : rem_sh);  // below total
    num_nx = {num[NUM_W-2:0], ge};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= P_ACC;
      first     <= 1'b1;
      peak      <= '0;
      total     <= '0;
      nonzero   <= '0;
      num       <= '0;
      rem       <= '0;
      step      <= '0;
      ratio_q16 <= '0;
      ratio_f32 <= '0;
      done      <= 1'b0;
    end else if (clear) begin
      state   <= P_ACC;
      first   <= 1'b1;
      peak    <= '0;
      total   <= '0;
      nonzero <= '0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        P_ACC, P_DONE: if (fire) begin
          // the first beat of an HPS restarts the sums
          if (first) begin
            peak    <= tdata;
            total   <= CNT_W'(tdata);
            nonzero <= CNT_W'(tdata != '0);
            done    <= 1'b0;
          end else begin
            if (tdata > peak) peak <= tdata;
            total   <= total + CNT_W'(tdata);
            nonzero <= nonzero + CNT_W'(tdata != '0);
          end
          first <= tlast;
          state <= tlast ? P_MUL : P_ACC;
        end
        P_MUL: begin
          num  <= (NUM_W'(peak) * NUM_W'(nonzero)) << 16;
          rem  <= '0;
          step <= '0;
          if (total == '0) begin
            ratio_q16 <= '0;
            ratio_f32 <= '0;
            done      <= 1'b1;
            state     <= P_DONE;
          end else begin
            state <= P_DIV;
          end
        end
        P_DIV: begin
          rem  <= rem_nx;
          num  <= num_nx;
          step <= step + 1'b1;
          if (step == CW'(NUM_W - 1)) begin
            ratio_q16 <= num_nx[31:0];
            ratio_f32 <= q16_to_f32(num_nx[31:0]);
            done      <= 1'b1;
            state     <= P_DONE;
          end
        end
        default: state <= P_ACC;
      endcase
    end
  end

  // the next HPS may only start once the ratio is done
  a_no_beat_while_dividing: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> (state == P_ACC || state == P_DONE));
  // the quotient never exceeds peak, so it fits Q16.16
  a_q_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (state == P_DIV && step == CW'(NUM_W - 1)) |-> (num_nx[NUM_W-1:32] == '0));

endmodule
