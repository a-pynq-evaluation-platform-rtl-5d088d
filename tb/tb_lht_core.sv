// tb_lht_core: self-checking test of the line Hough transform core.
//
// The core runs on a 40x24 image with the default 180 orientations (HPS of
// 180 x 49 locations). Three frames are streamed: random edge pixels plus a
// horizontal and a diagonal line. Frame 1 has random gaps on the input and
// random back-pressure on the output; frames 2 and 3 run with the input always
// valid and the output always ready, and the bench checks that a frame then
// takes at most IMG_W*IMG_H + N_THETA*N_RHO + 8 cycles from the first pixel
// to tlast (one pixel and one HPS word per clock). Every output word is
// compared with a reference HPS computed here from rho = round(x*cos + y*sin)
// with x, y relative to the image centre, in theta-major order; tlast must
// be on the last word only. Because the core clears its HPS while reading it
// out, frames 2 and 3 also check the clear. The bench counts output stalls and
// bypass events and fails if either never happened.
module tb_lht_core;
  import hep_pkg::*;

  localparam int unsigned IMG_W   = 40;
  localparam int unsigned IMG_H   = 24;
  localparam int unsigned N_THETA = 180;
  localparam int unsigned VOTE_W  = 16;
  localparam int unsigned RHO_MAX = 24;   // ceil(sqrt(20^2 + 12^2))
  localparam int unsigned N_RHO   = 2 * RHO_MAX + 1;
  localparam int unsigned NPIX    = IMG_W * IMG_H;
  localparam int unsigned NHPS    = N_THETA * N_RHO;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [PIX_W-1:0]  s_axis_tdata = '0;
  logic              s_axis_tvalid = 1'b0;
  logic              s_axis_tready;
  logic              s_axis_tlast = 1'b0;
  logic [VOTE_W-1:0] m_axis_tdata;
  logic              m_axis_tvalid;
  logic              m_axis_tready = 1'b0;
  logic              m_axis_tlast;
  logic              bypass_any;

  int checks = 0, failures = 0;
  int stalls = 0, bypasses = 0;
  bit noisy_out = 1'b1;
  logic [PIX_W-1:0] img [NPIX];
  int hps_ref [NHPS];

  always #5 clk = ~clk;

  lht_core #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_THETA(N_THETA), .VOTE_W(VOTE_W)) dut (.*);

  always @(posedge clk) begin
    if (m_axis_tvalid && !m_axis_tready) stalls++;
    if (bypass_any) bypasses++;
  end

  // output back-pressure
  always @(posedge clk) m_axis_tready <= noisy_out ? ($urandom_range(0, 3) != 0) : 1'b1;

  function automatic void build_reference();
    for (int i = 0; i < NHPS; i++) hps_ref[i] = 0;
    for (int p = 0; p < NPIX; p++) begin
      if (img[p] != 0) begin
        int xi, yi;
        xi = p % IMG_W - IMG_W / 2;
        yi = p / IMG_W - IMG_H / 2;
        for (int k = 0; k < N_THETA; k++) begin
          real a;
          longint c, s, r;
          a = 3.14159265358979323846 * k / N_THETA;
          c = longint'($floor($cos(a) * 65536.0 + 0.5));
          s = longint'($floor($sin(a) * 65536.0 + 0.5));
          r = (longint'(xi) * c + longint'(yi) * s + 32768) >>> 16;
          hps_ref[k * N_RHO + int'(r) + RHO_MAX]++;
        end
      end
    end
  endfunction

  task automatic make_image(int seed_pct);
    for (int p = 0; p < NPIX; p++)
      img[p] = ($urandom_range(0, 99) < seed_pct) ? PIX_W'($urandom_range(1, 255)) : '0;
    for (int c = 0; c < IMG_W; c++) img[7 * IMG_W + c] = 8'hff;              // row 7
    for (int d = 0; d < IMG_H; d++) img[d * IMG_W + d + 5] = 8'h80;         // diagonal
  endtask

  task automatic send_image(bit gaps);
    for (int p = 0; p < NPIX; p++) begin
      if (gaps) while ($urandom_range(0, 4) == 0) begin
        s_axis_tvalid <= 1'b0;
        @(posedge clk);
      end
      s_axis_tvalid <= 1'b1;
      s_axis_tdata  <= img[p];
      s_axis_tlast  <= (p == NPIX - 1);
      @(posedge clk);
      while (!s_axis_tready) @(posedge clk);
    end
    s_axis_tvalid <= 1'b0;
    s_axis_tlast  <= 1'b0;
  endtask

  task automatic receive_hps(output longint last_cycle);
    int n;
    n = 0;
    while (n < NHPS) begin
      @(posedge clk);
      if (m_axis_tvalid && m_axis_tready) begin
        checks++;
        if (int'(m_axis_tdata) != hps_ref[n] || m_axis_tlast != (n == NHPS - 1)) begin
          failures++;
          if (failures < 10)
            $display("HPS word %0d (theta %0d rho %0d): got %0d/%0b expected %0d",
                     n, n / N_RHO, n % N_RHO - RHO_MAX, m_axis_tdata, m_axis_tlast, hps_ref[n]);
        end
        n++;
      end
    end
    last_cycle = cyc;
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 3; f++) begin
      noisy_out = (f == 0);
      make_image(f == 2 ? 40 : 15);
      build_reference();
      wait (s_axis_tready);
      @(posedge clk);
      t0 = cyc;
      fork
        send_image(f == 0);
        receive_hps(t1);
      join
      if (f > 0) begin
        checks++;
        if (t1 - t0 > longint'(NPIX + NHPS + 8)) begin
          failures++;
          $display("frame %0d took %0d cycles, limit %0d", f, t1 - t0, NPIX + NHPS + 8);
        end
        $display("frame %0d: %0d cycles (%0d pixels + %0d HPS words)", f, t1 - t0, NPIX, NHPS);
      end
      // no extra output words
      repeat (5) @(posedge clk);
      checks++;
      if (m_axis_tvalid) begin
        failures++;
        $display("extra output after tlast");
      end
    end
    checks += 2;
    if (stalls == 0) begin failures++; $display("no output stall seen"); end
    if (bypasses == 0) begin failures++; $display("no bypass seen"); end
    $display("stalls %0d bypass cycles %0d", stalls, bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
