// hpa: Hough Performance Analyser.
//
// Sits beside the design under test and watches both of its streams without
// driving them: the image stream from the input DMA and the HPS stream to the
// output DMA. It holds the processing-time counters (hpa_proc_time), which
// run from the first rising edge of input tvalid to the output tlast beat,
// and the PMVR unit (hpa_pmvr), which measures the peak, the total votes and
// the non-zero locations of the HPS and computes their Peak to Mean Vote
// Ratio. Both sub-units are those of the platform; their results go to the
// register interface. clear restarts both.
module hpa
  import hep_pkg::*;
#(
  parameter int unsigned VOTE_W = VOTE_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // input stream of the design under test (monitored)
  input  logic              in_tvalid,
  input  logic              in_tready,
  // output stream of the design under test (monitored)
  input  logic [VOTE_W-1:0] out_tdata,
  input  logic              out_tvalid,
  input  logic              out_tready,
  input  logic              out_tlast,
  // processing time
  output logic [CNT_W-1:0]  cycles,
  output logic [CNT_W-1:0]  in_beats,
  output logic [CNT_W-1:0]  out_beats,
  output logic              time_busy,
  output logic              time_done,
  // PMVR
  output logic [VOTE_W-1:0] peak,
  output logic [CNT_W-1:0]  total,
  output logic [CNT_W-1:0]  nonzero,
  output logic [31:0]       pmvr_q16,
  output logic [31:0]       pmvr_f32,
  output logic              pmvr_done
);

  hpa_proc_time u_time (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .in_tvalid (in_tvalid),
    .in_tready (in_tready),
    .out_tvalid(out_tvalid),
    .out_tready(out_tready),
    .out_tlast (out_tlast),
    .cycles    (cycles),
    .in_beats  (in_beats),
    .out_beats (out_beats),
    .busy      (time_busy),
    .done      (time_done)
  );

  hpa_pmvr #(.VOTE_W(VOTE_W)) u_pmvr (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .tdata    (out_tdata),
    .tvalid   (out_tvalid),
    .tready   (out_tready),
    .tlast    (out_tlast),
    .peak     (peak),
    .total    (total),
    .nonzero  (nonzero),
    .ratio_q16(pmvr_q16),
    .ratio_f32(pmvr_f32),
    .done     (pmvr_done)
  );

endmodule
