// lht_voter: one orientation (one theta column) of the Hough Parameter Space.
//
// For every edge pixel presented on vote_valid/x/y it evaluates
//   rho = x*cos(theta_k) + y*sin(theta_k),   theta_k = 180 * THETA_IDX / N_THETA degrees
// rounds rho to the nearest integer (delta_rho = 1) and increments the vote
// counter A(rho, theta_k), kept in a local memory of N_RHO words indexed by
// rho + RHO_MAX. x and y are signed coordinates relative to the image centre.
//
// Pipeline (one vote per clock, no stall):
//   cycle 0  vote_valid, x, y presented; products x*C and y*S registered
//   cycle 1  rho rounded from the products; memory read issued
//   cycle 2  read data (or the bypass value) + 1 written back
// A vote in cycle 2 writes its address at the end of that cycle, but the read
// for the next vote was issued in the same cycle and sees the old word. A
// one-entry bypass register therefore forwards the last written value when
// two consecutive votes hit the same rho; older writes are already visible.
//
// Readout port: rd_en/rd_addr issue a read, rd_data is valid one cycle later
// (read-first). clr_en/clr_addr write zero; the controller uses it to clear the
// memory after reset and, together with rd_en at the same address, to clear
// every location as it is read out. The controller never overlaps votes with
// reads or clears. The voting equation is the line Hough transform itself; the
// fixed-point format, rounding, pipeline and bypass are this design's own.
module lht_voter
  import hep_pkg::*;
#(
  parameter int unsigned THETA_IDX = 0,
  parameter int unsigned N_THETA   = N_THETA_DEF,
  parameter int unsigned IMG_W     = IMG_W_DEF,
  parameter int unsigned IMG_H     = IMG_H_DEF,
  parameter int unsigned VOTE_W    = VOTE_W_DEF,
  localparam int unsigned RHO_MAX  = rho_max(IMG_W, IMG_H),
  localparam int unsigned N_RHO    = 2 * RHO_MAX + 1,
  localparam int unsigned ADDR_W   = $clog2(N_RHO)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // vote input
  input  logic                      vote_valid,
  input  logic signed [COORD_W-1:0] x,
  input  logic signed [COORD_W-1:0] y,
  // clear (write zero)
  input  logic                      clr_en,
  input  logic [ADDR_W-1:0]         clr_addr,
  // readout
  input  logic                      rd_en,
  input  logic [ADDR_W-1:0]         rd_addr,
  output logic [VOTE_W-1:0]         rd_data,
  // asserted in the cycle a vote takes its count from the bypass register
  output logic                      bypass_hit
);

  localparam int unsigned PROD_W = COORD_W + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + 1;
  localparam logic signed [COEF_W-1:0] COS_C = COEF_W'(trig_coef(THETA_IDX, N_THETA, 1'b0));
  localparam logic signed [COEF_W-1:0] SIN_C = COEF_W'(trig_coef(THETA_IDX, N_THETA, 1'b1));
  localparam logic signed [SUM_W-1:0]  HALF  = SUM_W'(1) <<< (TRIG_FRAC - 1);

  logic [VOTE_W-1:0] mem [N_RHO];

  // stage 1: products
  logic                     v1;
  logic signed [PROD_W-1:0] px1, py1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      px1 <= '0;
      py1 <= '0;
    end else begin
      v1  <= vote_valid;
      px1 <= PROD_W'(x) * PROD_W'(COS_C);
      py1 <= PROD_W'(y) * PROD_W'(SIN_C);
    end
  end

  // rho rounded to the nearest integer, shifted to a non-negative address
  logic signed [SUM_W-1:0] rho_fix;
  logic signed [SUM_W-1:0] rho_idx;
  logic [ADDR_W-1:0]       a1;
  always_comb begin
    rho_fix = SUM_W'(px1) + SUM_W'(py1) + HALF;
    rho_idx = (rho_fix >>> TRIG_FRAC) + $signed(SUM_W'(RHO_MAX));
    a1      = ADDR_W'(rho_idx);
  end

  // stage 2: read-modify-write with bypass
  logic              v2;
  logic [ADDR_W-1:0] a2;
  logic [VOTE_W-1:0] rd_q;
  logic              wv_q;
  logic [ADDR_W-1:0] wa_q;
  logic [VOTE_W-1:0] wd_q;
  logic [VOTE_W-1:0] cur, nxt;

  always_comb begin
    bypass_hit = v2 && wv_q && (wa_q == a2);
    cur        = bypass_hit ? wd_q : rd_q;
    nxt        = cur + VOTE_W'(1);
  end

  // memory: one read port, one write port (read-first)
  always_ff @(posedge clk) begin
    if (v1)
      rd_q <= mem[a1];
    else if (rd_en)
      rd_q <= mem[rd_addr];
    if (v2)
      mem[a2] <= nxt;
    else if (clr_en)
      mem[clr_addr] <= '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2   <= 1'b0;
      a2   <= '0;
      wv_q <= 1'b0;
      wa_q <= '0;
      wd_q <= '0;
    end else begin
      v2   <= v1;
      a2   <= a1;
      wv_q <= v2;
      wa_q <= a2;
      wd_q <= nxt;
    end
  end

  assign rd_data = rd_q;

  // rho always lands inside the memory
  a_rho_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    v1 |-> (rho_idx >= 0) && (rho_idx < SUM_W'(N_RHO)));
  // the controller keeps votes and readout apart
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(v1 && rd_en) && !(v2 && clr_en));

endmodule
