// lht_core: line Hough transform architecture used as the design under test.
//
// A binary edge image arrives on an AXI-Stream slave, one pixel per beat in
// raster order (row 0 first, column 0 first); any non-zero pixel is an edge
// pixel. For each edge pixel, N_THETA voters (one per orientation, theta_k =
// 180*k/N_THETA degrees) vote in parallel, so the image is consumed at one
// pixel per clock with tready held high. After the last pixel of the frame
// (IMG_W*IMG_H beats) the pipeline drains and the whole Hough Parameter Space
// A(rho, theta) is streamed out on an AXI-Stream master, theta-major: all
// N_RHO values of theta_0 (rho = -RHO_MAX .. +RHO_MAX), then theta_1, and so
// on; tlast marks the final word. Every location is written back to zero as it
// is read, so the HPS is clear for the next frame; after reset the controller
// first clears all locations (N_RHO cycles, tready low).
//
// Timing with tready always high on the output: one frame takes about
// IMG_W*IMG_H + N_THETA*N_RHO + 6 cycles from the first pixel to tlast
// (1,186,386 cycles at the default 1280x720, 180 x 1471 HPS).
//
// From the source architecture: image size, delta_rho = 1 pixel,
// delta_theta = 1 degree, an HPS that is not reduced in size. This design's
// own choices: centre origin for x and y, 8-bit pixel beats, 16-bit vote
// words, the theta-major readout order, clear-on-read, the parallel voter
// organisation and the 2-entry output buffer that absorbs tready stalls.
module lht_core
  import hep_pkg::*;
#(
  parameter int unsigned IMG_W   = IMG_W_DEF,
  parameter int unsigned IMG_H   = IMG_H_DEF,
  parameter int unsigned N_THETA = N_THETA_DEF,
  parameter int unsigned VOTE_W  = VOTE_W_DEF,
  localparam int unsigned RHO_MAX = rho_max(IMG_W, IMG_H),
  localparam int unsigned N_RHO   = 2 * RHO_MAX + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // image in
  input  logic [PIX_W-1:0]  s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic              s_axis_tlast,
  // HPS out
  output logic [VOTE_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast,
  // some voter forwarded a count through its read-modify-write bypass this cycle
  output logic              bypass_any
);

  localparam int unsigned ADDR_W  = $clog2(N_RHO);
  localparam int unsigned TH_W    = (N_THETA > 1) ? $clog2(N_THETA) : 1;
  localparam int unsigned COL_W   = $clog2(IMG_W);
  localparam int unsigned ROW_W   = $clog2(IMG_H);
  localparam int unsigned DRAIN_N = 4;

  typedef enum logic [1:0] {S_CLEAR, S_VOTE, S_DRAIN, S_READ} state_e;
  state_e state;

  // ---------------------------------------------------------------- input side
  logic [COL_W-1:0] col;
  logic [ROW_W-1:0] row;
  logic             s_fire, last_pix;

  assign s_axis_tready = (state == S_VOTE);
  assign s_fire        = s_axis_tvalid && s_axis_tready;
  assign last_pix      = (col == COL_W'(IMG_W - 1)) && (row == ROW_W'(IMG_H - 1));

  logic                      vote_q;
  logic signed [COORD_W-1:0] x_q, y_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vote_q <= 1'b0;
      x_q    <= '0;
      y_q    <= '0;
    end else begin
      vote_q <= s_fire && (s_axis_tdata != '0);
      x_q    <= $signed(COORD_W'(col)) - $signed(COORD_W'(IMG_W / 2));
      y_q    <= $signed(COORD_W'(row)) - $signed(COORD_W'(IMG_H / 2));
    end
  end

  // -------------------------------------------------------------- control
  logic [ADDR_W-1:0] clr_cnt;
  logic [2:0]        drain_cnt;
  logic [TH_W-1:0]   rd_th;
  logic [ADDR_W-1:0] rd_rho;
  logic              rd_active;    // more reads to issue
  logic              issue;
  logic              inflight;     // a read returns this cycle
  logic [TH_W-1:0]   th_q;
  logic              last_q;
  logic              pop;
  logic [1:0]        fcount;
  logic              out_done;

  assign pop      = m_axis_tvalid && m_axis_tready;
  assign out_done = pop && m_axis_tlast;
  // at most two words buffered or in flight after this cycle's pop
  assign issue    = (state == S_READ) && rd_active &&
                    ((32'(fcount) + 32'(inflight) - 32'(pop)) < 2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      clr_cnt   <= '0;
      col       <= '0;
      row       <= '0;
      drain_cnt <= '0;
      rd_th     <= '0;
      rd_rho    <= '0;
      rd_active <= 1'b0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          clr_cnt <= clr_cnt + 1'b1;
          if (clr_cnt == ADDR_W'(N_RHO - 1)) begin
            clr_cnt <= '0;
            state   <= S_VOTE;
          end
        end
        S_VOTE: if (s_fire) begin
          if (col == COL_W'(IMG_W - 1)) begin
            col <= '0;
            row <= row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
          if (last_pix) begin
            row       <= '0;
            drain_cnt <= '0;
            state     <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 3'(DRAIN_N - 1)) begin
            rd_th     <= '0;
            rd_rho    <= '0;
            rd_active <= 1'b1;
            state     <= S_READ;
          end
        end
        S_READ: begin
          if (issue) begin
            if (rd_rho == ADDR_W'(N_RHO - 1)) begin
              rd_rho <= '0;
              if (rd_th == TH_W'(N_THETA - 1))
                rd_active <= 1'b0;
              else
                rd_th <= rd_th + 1'b1;
            end else begin
              rd_rho <= rd_rho + 1'b1;
            end
          end
          if (out_done)
            state <= S_VOTE;
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

  // ---------------------------------------------------------------- voters
  logic [VOTE_W-1:0] rd_data [N_THETA];
  logic [N_THETA-1:0] bypass_vec;

  for (genvar k = 0; k < N_THETA; k++) begin : g_theta
    logic sel;
    assign sel = (rd_th == TH_W'(k));
    lht_voter #(
      .THETA_IDX(k),
      .N_THETA  (N_THETA),
      .IMG_W    (IMG_W),
      .IMG_H    (IMG_H),
      .VOTE_W   (VOTE_W)
    ) u_voter (
      .clk       (clk),
      .rst_n     (rst_n),
      .vote_valid(vote_q),
      .x         (x_q),
      .y         (y_q),
      .clr_en    ((state == S_CLEAR) || (issue && sel)),
      .clr_addr  ((state == S_CLEAR) ? clr_cnt : rd_rho),
      .rd_en     (issue && sel),
      .rd_addr   (rd_rho),
      .rd_data   (rd_data[k]),
      .bypass_hit(bypass_vec[k])
    );
  end

  assign bypass_any = |bypass_vec;

  // ---------------------------------------------------- output buffer (2 deep)
  logic [VOTE_W-1:0] fdata [2];
  logic              flast [2];
  logic [VOTE_W-1:0] ret_data;
  logic              ret_last;

  always_comb begin
    ret_data = rd_data[th_q];
    ret_last = last_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inflight <= 1'b0;
      th_q     <= '0;
      last_q   <= 1'b0;
      fcount   <= '0;
      fdata[0] <= '0;
      fdata[1] <= '0;
      flast[0] <= 1'b0;
      flast[1] <= 1'b0;
    end else begin
      inflight <= issue;
      th_q     <= rd_th;
      last_q   <= (rd_th == TH_W'(N_THETA - 1)) && (rd_rho == ADDR_W'(N_RHO - 1));
      // pop shifts entry 1 into entry 0; a returning read fills the first free slot
      if (pop) begin
        fdata[0] <= fdata[1];
        flast[0] <= flast[1];
      end
      if (inflight) begin
        if (pop) begin
          if (fcount == 2'd1) begin
            fdata[0] <= ret_data;
            flast[0] <= ret_last;
          end else begin
            fdata[1] <= ret_data;
            flast[1] <= ret_last;
          end
        end else begin
          if (fcount == 2'd0) begin
            fdata[0] <= ret_data;
            flast[0] <= ret_last;
          end else begin
            fdata[1] <= ret_data;
            flast[1] <= ret_last;
          end
        end
      end
      fcount <= fcount + 2'(inflight) - 2'(pop);
    end
  end

  assign m_axis_tvalid = (fcount != 2'd0);
  assign m_axis_tdata  = fdata[0];
  assign m_axis_tlast  = flast[0];

  // ------------------------------------------------------------- stream rules
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_axis_tvalid && !m_axis_tready) |=> m_axis_tvalid && $stable(m_axis_tdata)
                                          && $stable(m_axis_tlast));
  a_fifo_bound: assert property (@(posedge clk) disable iff (!rst_n) fcount <= 2'd2);
  a_in_tlast: assert property (@(posedge clk) disable iff (!rst_n)
    (s_fire && s_axis_tlast) |-> last_pix);

endmodule
