// hep_top: Hough Inspection Unit, the programmable-logic part of the Hough
// Evaluation Platform.
//
// The platform measures a line Hough transform (LHT) architecture on the chip
// itself. An input DMA streams a binary edge image into the design under test
// (here lht_core), an output DMA collects the Hough Parameter Space (HPS) it
// produces, and the Hough Performance Analyser (hpa) taps both streams to
// measure the processing time of the frame and the Peak to Mean Vote Ratio
// (PMVR) of the HPS. The processing system reads the results over AXI4-Lite
// (hep_axil_regs) and fetches the HPS itself from memory for plotting.
//
// Ports: s_axis_* is the image stream from the input DMA (8-bit pixel per
// beat, raster order, tlast on the final pixel); m_axis_* is the HPS stream to
// the output DMA (one 16-bit vote count per beat, theta-major, tlast on the
// final location); s_axil_* is the register port to the processing system.
// The DMAs and the processing system are vendor parts outside this module.
// One clock, aclk, and one active-low reset, aresetn, serve everything; the
// analyser adds no latency to either stream.
//
// The block structure (two DMA streams, the design under test between them,
// the analyser tapping both, an AXI connection to the processing system) is
// the platform's; the single clock domain and the register map are this
// design's own.
module hep_top
  import hep_pkg::*;
#(
  parameter int unsigned IMG_W   = IMG_W_DEF,
  parameter int unsigned IMG_H   = IMG_H_DEF,
  parameter int unsigned N_THETA = N_THETA_DEF,
  parameter int unsigned VOTE_W  = VOTE_W_DEF,
  localparam int unsigned N_RHO  = 2 * rho_max(IMG_W, IMG_H) + 1
) (
  input  logic              aclk,
  input  logic              aresetn,
  // image from the input DMA
  input  logic [PIX_W-1:0]  s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic              s_axis_tlast,
  // HPS to the output DMA
  output logic [VOTE_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast,
  // AXI4-Lite registers
  input  logic [5:0]        s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [5:0]        s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // high in a cycle where a voter forwarded a vote through its bypass
  output logic              dut_bypass
);

  logic              clear;
  logic [VOTE_W-1:0] peak;
  hpa_status_t       status;

  // design under test
  lht_core #(
    .IMG_W  (IMG_W),
    .IMG_H  (IMG_H),
    .N_THETA(N_THETA),
    .VOTE_W (VOTE_W)
  ) u_dut (
    .clk          (aclk),
    .rst_n        (aresetn),
    .s_axis_tdata (s_axis_tdata),
    .s_axis_tvalid(s_axis_tvalid),
    .s_axis_tready(s_axis_tready),
    .s_axis_tlast (s_axis_tlast),
    .m_axis_tdata (m_axis_tdata),
    .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready),
    .m_axis_tlast (m_axis_tlast),
    .bypass_any   (dut_bypass)
  );

  // Hough Performance Analyser
  hpa #(.VOTE_W(VOTE_W)) u_hpa (
    .clk       (aclk),
    .rst_n     (aresetn),
    .clear     (clear),
    .in_tvalid (s_axis_tvalid),
    .in_tready (s_axis_tready),
    .out_tdata (m_axis_tdata),
    .out_tvalid(m_axis_tvalid),
    .out_tready(m_axis_tready),
    .out_tlast (m_axis_tlast),
    .cycles    (status.cycles),
    .in_beats  (status.in_beats),
    .out_beats (status.out_beats),
    .time_busy (status.time_busy),
    .time_done (status.time_done),
    .peak      (peak),
    .total     (status.total),
    .nonzero   (status.nonzero),
    .pmvr_q16  (status.pmvr_q16),
    .pmvr_f32  (status.pmvr_f32),
    .pmvr_done (status.pmvr_done)
  );

  assign status.peak        = CNT_W'(peak);
  assign status.config_word = {16'(N_RHO), 16'(N_THETA)};

  // register port to the processing system
  hep_axil_regs u_regs (
    .clk           (aclk),
    .rst_n         (aresetn),
    .s_axil_awaddr (s_axil_awaddr),
    .s_axil_awvalid(s_axil_awvalid),
    .s_axil_awready(s_axil_awready),
    .s_axil_wdata  (s_axil_wdata),
    .s_axil_wstrb  (s_axil_wstrb),
    .s_axil_wvalid (s_axil_wvalid),
    .s_axil_wready (s_axil_wready),
    .s_axil_bresp  (s_axil_bresp),
    .s_axil_bvalid (s_axil_bvalid),
    .s_axil_bready (s_axil_bready),
    .s_axil_araddr (s_axil_araddr),
    .s_axil_arvalid(s_axil_arvalid),
    .s_axil_arready(s_axil_arready),
    .s_axil_rdata  (s_axil_rdata),
    .s_axil_rresp  (s_axil_rresp),
    .s_axil_rvalid (s_axil_rvalid),
    .s_axil_rready (s_axil_rready),
    .status        (status),
    .clear         (clear)
  );

  // the input DMA must hold a beat until it is taken
  a_in_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    (s_axis_tvalid && !s_axis_tready) |=> s_axis_tvalid && $stable(s_axis_tdata)
                                          && $stable(s_axis_tlast));

endmodule
