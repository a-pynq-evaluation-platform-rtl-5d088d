// tb_hep_top_full: the Hough Inspection Unit at its default size, end to end.
//
// Same bench as tb_hep_top, with every parameter of hep_top at its default:
// a 1280x720 image, 180 orientations (delta_theta = 1 degree), delta_rho = 1
// and a 180 x 1471 HPS. Two frames are run: frame 0 with input gaps and output
// back-pressure, frame 1 at full rate after an analyser clear. Each image holds
// random edge pixels (4 and 10 per mille) plus a horizontal, a vertical and a
// diagonal line. Every HPS word, the processing time and the PMVR registers
// are checked against the bench's own reference, and the full-rate frame must
// finish within IMG_W*IMG_H + N_THETA*N_RHO + 8 cycles (1,186,388) and, at
// a 150 MHz clock, take 7.91 ms (about 126 frames per second) to two decimals.
module tb_hep_top_full;
  import hep_pkg::*;

  localparam int unsigned IMG_W   = IMG_W_DEF;
  localparam int unsigned IMG_H   = IMG_H_DEF;
  localparam int unsigned N_THETA = N_THETA_DEF;
  localparam int unsigned N_FRAMES = 2;
  localparam int unsigned VOTE_W  = VOTE_W_DEF;
  localparam int unsigned RHO_MAX = rho_max(IMG_W, IMG_H);
  localparam int unsigned N_RHO   = 2 * RHO_MAX + 1;
  localparam int unsigned NPIX    = IMG_W * IMG_H;
  localparam int unsigned NHPS    = N_THETA * N_RHO;
  localparam longint      WATCHDOG = 4000000;

  logic aclk = 1'b0;
  logic aresetn = 1'b0;
  logic [PIX_W-1:0]  s_axis_tdata = '0;
  logic              s_axis_tvalid = 1'b0;
  logic              s_axis_tready;
  logic              s_axis_tlast = 1'b0;
  logic [VOTE_W-1:0] m_axis_tdata;
  logic              m_axis_tvalid;
  logic              m_axis_tready = 1'b0;
  logic              m_axis_tlast;
  logic [5:0]        s_axil_awaddr = '0;
  logic              s_axil_awvalid = 1'b0;
  logic              s_axil_awready;
  logic [31:0]       s_axil_wdata = '0;
  logic [3:0]        s_axil_wstrb = '0;
  logic              s_axil_wvalid = 1'b0;
  logic              s_axil_wready;
  logic [1:0]        s_axil_bresp;
  logic              s_axil_bvalid;
  logic              s_axil_bready = 1'b0;
  logic [5:0]        s_axil_araddr = '0;
  logic              s_axil_arvalid = 1'b0;
  logic              s_axil_arready;
  logic [31:0]       s_axil_rdata;
  logic [1:0]        s_axil_rresp;
  logic              s_axil_rvalid;
  logic              s_axil_rready = 1'b0;
  logic              dut_bypass;

  int checks = 0, failures = 0;
  int n_stall = 0, n_bypass = 0, n_reuse = 0, n_clear = 0, n_divide = 0;
  bit noisy_out = 1'b0;
  longint cyc = 0;
  longint t_rise = -1, t_last = -1;
  logic [PIX_W-1:0] img [NPIX];
  int hps_ref [NHPS];
  longint coef_c [N_THETA], coef_s [N_THETA];

  always #5 aclk = ~aclk;
  always @(posedge aclk) cyc <= cyc + 1;

  hep_top dut (.*);

  // bench-side view of the streams, sampled at the rising edge
  logic in_tvalid_q = 1'b0;
  always @(posedge aclk) begin
    in_tvalid_q <= s_axis_tvalid;
    if (aresetn) begin
      if (s_axis_tvalid && !in_tvalid_q && t_rise < 0) t_rise = cyc;
      if (m_axis_tvalid && m_axis_tready && m_axis_tlast) t_last = cyc;
      if (m_axis_tvalid && !m_axis_tready) n_stall++;
      if (dut_bypass) n_bypass++;
    end
  end
  always @(negedge aclk) m_axis_tready <= noisy_out ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- processing system side: AXI4-Lite, driven and sampled on the falling edge
  task automatic axil_read(input logic [5:0] addr, output logic [31:0] data);
    @(negedge aclk);
    s_axil_araddr  <= addr;
    s_axil_arvalid <= 1'b1;
    #1;
    while (!s_axil_arready) begin @(negedge aclk); #1; end
    @(negedge aclk);
    s_axil_arvalid <= 1'b0;
    while (!s_axil_rvalid) @(negedge aclk);
    data = s_axil_rdata;
    s_axil_rready <= 1'b1;
    @(negedge aclk);
    s_axil_rready <= 1'b0;
  endtask

  task automatic axil_write(input logic [5:0] addr, input logic [31:0] data);
    @(negedge aclk);
    s_axil_awaddr  <= addr;
    s_axil_awvalid <= 1'b1;
    s_axil_wdata   <= data;
    s_axil_wstrb   <= 4'hf;
    s_axil_wvalid  <= 1'b1;
    #1;
    while (!s_axil_wready) begin @(negedge aclk); #1; end
    @(negedge aclk);
    s_axil_awvalid <= 1'b0;
    s_axil_wvalid  <= 1'b0;
    while (!s_axil_bvalid) @(negedge aclk);
    s_axil_bready <= 1'b1;
    @(negedge aclk);
    s_axil_bready <= 1'b0;
  endtask

  // ---- reference model
  function automatic void build_reference();
    for (int i = 0; i < NHPS; i++) hps_ref[i] = 0;
    for (int p = 0; p < NPIX; p++) begin
      if (img[p] != 0) begin
        longint xi, yi, r;
        xi = p % IMG_W - IMG_W / 2;
        yi = p / IMG_W - IMG_H / 2;
        for (int k = 0; k < N_THETA; k++) begin
          r = (xi * coef_c[k] + yi * coef_s[k] + 32768) >>> 16;
          hps_ref[k * N_RHO + int'(r) + RHO_MAX]++;
        end
      end
    end
  endfunction

  // sparse random edges (per mille), one horizontal, one vertical and one
  // diagonal line
  task automatic make_image(int edge_pm);
    for (int p = 0; p < NPIX; p++)
      img[p] = ($urandom_range(0, 999) < edge_pm) ? PIX_W'($urandom_range(1, 255)) : '0;
    for (int c = 0; c < IMG_W; c++) img[(IMG_H / 3) * IMG_W + c] = 8'hff;
    for (int r = 0; r < IMG_H; r++) img[r * IMG_W + IMG_W / 4] = 8'h01;
    for (int d = 0; d < IMG_H && d < IMG_W; d++) img[d * IMG_W + d] = 8'h80;
  endtask

  // ---- input DMA: drives on the falling edge
  task automatic send_image(bit gaps);
    for (int p = 0; p < NPIX; p++) begin
      @(negedge aclk);
      if (gaps) while ($urandom_range(0, 4) == 0) begin
        s_axis_tvalid <= 1'b0;
        @(negedge aclk);
      end
      s_axis_tvalid <= 1'b1;
      s_axis_tdata  <= img[p];
      s_axis_tlast  <= (p == NPIX - 1);
      #1;
      while (!s_axis_tready) begin @(negedge aclk); #1; end
      @(posedge aclk);
    end
    @(negedge aclk);
    s_axis_tvalid <= 1'b0;
    s_axis_tlast  <= 1'b0;
  endtask

  // ---- output DMA: checks every beat at the rising edge
  task automatic receive_hps(int frame);
    int n;
    n = 0;
    while (n < NHPS) begin
      @(posedge aclk);
      if (m_axis_tvalid && m_axis_tready) begin
        checks++;
        if (int'(m_axis_tdata) != hps_ref[n] || m_axis_tlast != (n == NHPS - 1)) begin
          failures++;
          if (failures < 20)
            $display("frame %0d HPS word %0d (theta %0d, rho %0d): got %0d/%0b expected %0d",
                     frame, n, n / N_RHO, n % N_RHO - RHO_MAX, m_axis_tdata, m_axis_tlast,
                     hps_ref[n]);
        end
        n++;
      end
    end
  endtask

  function automatic logic [31:0] f32_of(logic [31:0] q);
    int e;
    logic [31:0] m;
    if (q == 0) return 0;
    e = 31;
    m = q;
    while (!m[31]) begin
      m = m << 1;
      e--;
    end
    return {1'b0, 8'(127 + e - 16), m[30:8]};
  endfunction

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    longint pk, tot, nz, q;
    for (int k = 0; k < N_THETA; k++) begin
      real a;
      a = 3.14159265358979323846 * k / N_THETA;
      coef_c[k] = longint'($floor($cos(a) * 65536.0 + 0.5));
      coef_s[k] = longint'($floor($sin(a) * 65536.0 + 0.5));
    end
    repeat (4) @(posedge aclk);
    @(negedge aclk);
    aresetn <= 1'b1;
    axil_read(6'h24, d);
    check("config", longint'(d), longint'({16'(N_RHO), 16'(N_THETA)}));
    for (int f = 0; f < N_FRAMES; f++) begin
      noisy_out = (f == 0);
      make_image(f == 1 ? 10 : 4);
      build_reference();
      if (f == 1) begin
        axil_write(6'h00, 32'h1);     // clear the analyser
        axil_read(6'h04, d);
        check("cycles after clear", longint'(d), 0);
        axil_read(6'h00, d);
        check("status after clear", longint'(d), 0);
        if (d == 0) n_clear++;
      end
      t_rise = -1;
      t_last = -1;
      fork
        send_image(f == 0);
        receive_hps(f);
      join
      if (f > 0) n_reuse++;
      // wait for the PMVR divider
      do axil_read(6'h00, d); while (!d[2]);
      check("status done", longint'(d), 6);
      n_divide++;
      axil_read(6'h04, d);
      check("processing cycles", longint'(d), t_last - t_rise + 1);
      $display("frame %0d: %0d cycles for %0d pixels and %0d HPS words", f, d, NPIX, NHPS);
      if (f > 0) begin
        checks++;
        if (longint'(d) > longint'(NPIX + NHPS + 8)) begin
          failures++;
          $display("frame %0d too slow: %0d cycles", f, d);
        end
        // at a 150 MHz clock the frame must take 7.91 ms (to two decimals)
        checks++;
        if ($rtoi(real'(d) / 150.0e3 * 100.0 + 0.5) != 791) begin
          failures++;
          $display("frame %0d: %f ms at 150 MHz, expected 7.91 ms", f, real'(d) / 150.0e3);
        end
        $display("frame %0d: %f ms at 150 MHz, %f frames per second", f,
                 real'(d) / 150.0e3, 150.0e6 / real'(d));
      end
      axil_read(6'h08, d); check("in beats", longint'(d), NPIX);
      axil_read(6'h0C, d); check("out beats", longint'(d), NHPS);
      pk = 0; tot = 0; nz = 0;
      for (int i = 0; i < NHPS; i++) begin
        if (hps_ref[i] > pk) pk = hps_ref[i];
        tot += hps_ref[i];
        if (hps_ref[i] != 0) nz++;
      end
      q = (pk * nz * 65536) / tot;
      axil_read(6'h10, d); check("peak", longint'(d), pk);
      axil_read(6'h14, d); check("total", longint'(d), tot);
      axil_read(6'h18, d); check("nonzero", longint'(d), nz);
      axil_read(6'h1C, d); check("pmvr q16", longint'(d), q);
      axil_read(6'h20, d); check("pmvr f32", longint'(d), longint'(f32_of(32'(q))));
      $display("frame %0d: peak %0d, N_f %f, R_f %f", f, pk, real'(tot) / real'(nz),
               real'(q) / 65536.0);
    end
    $display("mechanisms: output stalls %0d, vote bypass %0d, HPS reuse after clear-on-read %0d, analyser clear %0d, PMVR divide %0d",
             n_stall, n_bypass, n_reuse, n_clear, n_divide);
    checks += 5;
    if (n_stall == 0)  begin failures++; $display("no output stall"); end
    if (n_bypass == 0) begin failures++; $display("no vote bypass"); end
    if (n_reuse == 0)  begin failures++; $display("no HPS reuse"); end
    if (n_clear == 0)  begin failures++; $display("no analyser clear"); end
    if (n_divide == 0) begin failures++; $display("no PMVR divide"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
