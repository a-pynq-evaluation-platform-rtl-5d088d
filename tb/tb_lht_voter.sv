// tb_lht_voter: self-checking test of one HPS column (lht_voter).
//
// A 64x48 image and theta index 37 of 180 keep the memory small (81 rho
// bins). After a clear pass the bench sends 3000 cycles of random votes, a
// third of them repeating the previous pixel or its right-hand neighbour so
// that back-to-back votes on the same rho bin exercise the bypass, then reads
// every bin (clearing it on the way) and compares it with a reference
// histogram built from the same rho = round(x*cos + y*sin) formula in
// 64-bit integer arithmetic. A second read pass checks that all bins are
// zero again. It also counts the bypass hits and fails if there were none.
module tb_lht_voter;
  import hep_pkg::*;

  localparam int unsigned THETA_IDX = 37;
  localparam int unsigned N_THETA   = 180;
  localparam int unsigned IMG_W     = 64;
  localparam int unsigned IMG_H     = 48;
  localparam int unsigned VOTE_W    = 16;
  localparam int unsigned RHO_MAX   = 40;   // ceil(sqrt(32^2 + 24^2))
  localparam int unsigned N_RHO     = 2 * RHO_MAX + 1;
  localparam int unsigned ADDR_W    = $clog2(N_RHO);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic vote_valid = 1'b0;
  logic signed [COORD_W-1:0] x = '0, y = '0;
  logic clr_en = 1'b0;
  logic [ADDR_W-1:0] clr_addr = '0;
  logic rd_en = 1'b0;
  logic [ADDR_W-1:0] rd_addr = '0;
  logic [VOTE_W-1:0] rd_data;
  logic bypass_hit;

  int checks = 0, failures = 0, bypasses = 0;
  int ref_hist [N_RHO];

  always #5 clk = ~clk;

  lht_voter #(
    .THETA_IDX(THETA_IDX), .N_THETA(N_THETA), .IMG_W(IMG_W), .IMG_H(IMG_H), .VOTE_W(VOTE_W)
  ) dut (.*);

  always @(posedge clk) if (bypass_hit) bypasses++;

  function automatic int ref_rho_idx(int xi, int yi);
    real a;
    longint c, s, r;
    a = 3.14159265358979323846 * THETA_IDX / N_THETA;
    c = longint'($floor($cos(a) * 65536.0 + 0.5));
    s = longint'($floor($sin(a) * 65536.0 + 0.5));
    r = longint'(xi) * c + longint'(yi) * s + 32768;
    r = r >>> 16;
    return int'(r) + RHO_MAX;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi, yi, r;
    foreach (ref_hist[i]) ref_hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // clear pass
    for (int a = 0; a < N_RHO; a++) begin
      @(posedge clk);
      clr_en   <= 1'b1;
      clr_addr <= ADDR_W'(a);
    end
    @(posedge clk);
    clr_en <= 1'b0;
    // random votes
    xi = 0; yi = 0;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk);
      r = $urandom_range(0, 9);
      if (r < 3) begin
        vote_valid <= 1'b0;
      end else begin
        if (r < 6) begin
          xi = $urandom_range(0, IMG_W - 1) - IMG_W / 2;
          yi = $urandom_range(0, IMG_H - 1) - IMG_H / 2;
        end else if (r < 8) begin
          xi = (xi < int'(IMG_W / 2) - 1) ? xi + 1 : xi;
        end
        vote_valid <= 1'b1;
        x <= COORD_W'(xi);
        y <= COORD_W'(yi);
        ref_hist[ref_rho_idx(xi, yi)]++;
      end
    end
    @(posedge clk);
    vote_valid <= 1'b0;
    repeat (4) @(posedge clk);
    // read out with clear, then read again expecting zero
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < N_RHO; a++) begin
        rd_en    <= 1'b1;
        rd_addr  <= ADDR_W'(a);
        clr_en   <= (pass == 0);
        clr_addr <= ADDR_W'(a);
        @(posedge clk);
        rd_en  <= 1'b0;
        clr_en <= 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (int'(rd_data) != (pass == 0 ? ref_hist[a] : 0)) begin
          failures++;
          if (failures < 10)
            $display("pass %0d bin %0d: got %0d expected %0d", pass, a, rd_data,
                     pass == 0 ? ref_hist[a] : 0);
        end
      end
    end
    checks++;
    if (bypasses == 0) begin
      failures++;
      $display("bypass never used");
    end
    $display("bypass hits: %0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
