// tb_sweep_unit: one point of the PMVR-versus-delta_theta sweep (used by
// tb_pmvr_sweep).
//
// It instantiates the line Hough transform core and the performance analyser
// with N_THETA orientations (delta_theta = 180/N_THETA degrees) on a small
// image and runs one frame at full rate. The image is built by the same
// formula in every unit: a horizontal, a vertical, a 45-degree and a shallow
// line, plus about 1 % noise pixels from a fixed multiplicative hash of the
// pixel index. The unit checks every HPS word against its own reference
// HPS and the analyser's peak, total, non-zero and Q16.16 ratio against values
// computed from that reference, and reports the ratio and its check counts.
module tb_sweep_unit
  import hep_pkg::*;
#(
  parameter int unsigned N_THETA = 180,
  parameter int unsigned IMG_W   = 64,
  parameter int unsigned IMG_H   = 36
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  output logic [31:0] ratio_q16,
  output int          checks,
  output int          failures
);

  localparam int unsigned VOTE_W  = 16;
  localparam int unsigned RHO_MAX = rho_max(IMG_W, IMG_H);
  localparam int unsigned N_RHO   = 2 * RHO_MAX + 1;
  localparam int unsigned NPIX    = IMG_W * IMG_H;
  localparam int unsigned NHPS    = N_THETA * N_RHO;

  logic [PIX_W-1:0]  s_tdata = '0;
  logic              s_tvalid = 1'b0, s_tlast = 1'b0;
  logic              s_tready;
  logic [VOTE_W-1:0] m_tdata;
  logic              m_tvalid, m_tlast;
  logic              m_tready = 1'b1;
  logic              bypass_any;
  logic [CNT_W-1:0]  cycles, in_beats, out_beats, total, nonzero;
  logic              time_busy, time_done, pmvr_done;
  logic [VOTE_W-1:0] peak;
  logic [31:0]       pmvr_f32;

  lht_core #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_THETA(N_THETA), .VOTE_W(VOTE_W)) u_core (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast),
    .bypass_any(bypass_any));

  hpa #(.VOTE_W(VOTE_W)) u_hpa (
    .clk(clk), .rst_n(rst_n), .clear(1'b0),
    .in_tvalid(s_tvalid), .in_tready(s_tready),
    .out_tdata(m_tdata), .out_tvalid(m_tvalid), .out_tready(m_tready), .out_tlast(m_tlast),
    .cycles(cycles), .in_beats(in_beats), .out_beats(out_beats),
    .time_busy(time_busy), .time_done(time_done),
    .peak(peak), .total(total), .nonzero(nonzero),
    .pmvr_q16(ratio_q16), .pmvr_f32(pmvr_f32), .pmvr_done(pmvr_done));

  logic img [NPIX];
  int   hps_ref [NHPS];

  function automatic bit pixel(int c, int r);
    int unsigned h;
    h = (unsigned'(r * IMG_W + c) * 32'h9E3779B1) >> 16;
    return (r == IMG_H / 3) || (c == IMG_W / 5) || (r == c) ||
           (r == (c / 3) + IMG_H / 2) || ((h % 100) == 0);
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 5) $display("N_THETA %0d %s: got %0d expected %0d", N_THETA, what, got, exp);
    end
  endtask

  initial begin
    longint pk, tot, nz;
    int n;
    checks = 0;
    failures = 0;
    finished = 1'b0;
    for (int i = 0; i < NHPS; i++) hps_ref[i] = 0;
    for (int p = 0; p < NPIX; p++) begin
      img[p] = pixel(p % IMG_W, p / IMG_W);
      if (img[p]) begin
        longint xi, yi, c, s, r;
        xi = p % IMG_W - IMG_W / 2;
        yi = p / IMG_W - IMG_H / 2;
        for (int k = 0; k < N_THETA; k++) begin
          real a;
          a = 3.14159265358979323846 * k / N_THETA;
          c = longint'($floor($cos(a) * 65536.0 + 0.5));
          s = longint'($floor($sin(a) * 65536.0 + 0.5));
          r = (xi * c + yi * s + 32768) >>> 16;
          hps_ref[k * N_RHO + int'(r) + RHO_MAX]++;
        end
      end
    end
    pk = 0; tot = 0; nz = 0;
    for (int i = 0; i < NHPS; i++) begin
      if (hps_ref[i] > pk) pk = hps_ref[i];
      tot += hps_ref[i];
      if (hps_ref[i] != 0) nz++;
    end
    wait (rst_n);
    fork
      begin
        for (int p = 0; p < NPIX; p++) begin
          @(negedge clk);
          s_tvalid <= 1'b1;
          s_tdata  <= img[p] ? 8'hff : 8'h00;
          s_tlast  <= (p == NPIX - 1);
          #1;
          while (!s_tready) begin @(negedge clk); #1; end
          @(posedge clk);
        end
        @(negedge clk);
        s_tvalid <= 1'b0;
        s_tlast  <= 1'b0;
      end
      begin
        n = 0;
        while (n < NHPS) begin
          @(posedge clk);
          if (m_tvalid && m_tready) begin
            chk("HPS word", longint'(m_tdata), hps_ref[n]);
            n++;
          end
        end
      end
    join
    @(posedge clk);
    while (!pmvr_done) @(posedge clk);
    #1;
    chk("peak", longint'(peak), pk);
    chk("total", longint'(total), tot);
    chk("nonzero", longint'(nonzero), nz);
    chk("ratio", longint'(ratio_q16), (pk * nz * 65536) / tot);
    chk("in beats", longint'(in_beats), NPIX);
    finished = 1'b1;
  end

endmodule
