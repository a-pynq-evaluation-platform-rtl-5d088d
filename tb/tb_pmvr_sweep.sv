// tb_pmvr_sweep: PMVR measured over several theta discretisation steps.
//
// Six units run the same 64x36 test image side by side through the line
// Hough transform core and the performance analyser with delta_theta =
// 0.5, 1, 2, 4, 9 and 15 degrees (N_THETA = 360, 180, 90, 45, 20, 12). Each
// unit checks its HPS and analyser results against its own reference; this
// bench prints R_f for every step and also checks that the finest step gives a
// higher ratio than the coarsest, the trend the sweep is meant to show on an
// image made of long straight lines.
module tb_pmvr_sweep;
  localparam int N = 6;
  localparam int unsigned NT [N] = '{360, 180, 90, 45, 20, 12};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic        fin [N];
  logic [31:0] rf [N];
  int          uc [N];
  int          uf [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_unit
    tb_sweep_unit #(.N_THETA(NT[i])) u (
      .clk(clk), .rst_n(rst_n), .finished(fin[i]), .ratio_q16(rf[i]),
      .checks(uc[i]), .failures(uf[i]));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < N; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < N; i++) begin
      checks   += uc[i];
      failures += uf[i];
      $display("delta_theta = %5.2f deg (N_THETA %3d): R_f = %f", 180.0 / NT[i], NT[i],
               real'(rf[i]) / 65536.0);
    end
    checks++;
    if (rf[0] <= rf[N-1]) begin
      failures++;
      $display("R_f at the finest step is not above R_f at the coarsest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
