// hep_axil_regs: AXI4-Lite slave through which the processing system reads
// the Hough Performance Analyser.
//
// Ten 32-bit registers (map in hep_pkg::reg_addr_e): control/status, the
// processing time in cycles, the input and output beat counts, the HPS peak,
// total votes and non-zero count, the PMVR as Q16.16 and as IEEE-754 single,
// and the HPS shape. Writing 1 to bit 0 of the control register gives a
// one-cycle clear pulse to the analyser; all other writes are accepted and
// ignored. Unmapped reads return 0. Every response is OKAY.
//
// Handshake: a write is taken in the cycle both AWVALID and WVALID are high
// and no response is pending; BVALID follows one cycle later and is held until
// BREADY. A read is taken when ARVALID is high and no read data is pending;
// RVALID follows one cycle later and is held until RREADY. The platform only
// places the analyser on the AXI bus to the processing system; the map and
// this handshake are this design's own.
module hep_axil_regs
  import hep_pkg::*;
#(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // write address / data / response
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  // read address / data
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // analyser
  input  hpa_status_t       status,
  output logic              clear
);

  logic wr_take, rd_take;
  logic [31:0] rd_mux;

  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign wr_take        = s_axil_awready;
  assign s_axil_arready = !s_axil_rvalid;
  assign rd_take        = s_axil_arvalid && s_axil_arready;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  always_comb begin
    unique case (s_axil_araddr[5:0])
      REG_CTRL:      rd_mux = {29'd0, status.pmvr_done, status.time_done, status.time_busy};
      REG_CYCLES:    rd_mux = status.cycles;
      REG_IN_BEATS:  rd_mux = status.in_beats;
      REG_OUT_BEATS: rd_mux = status.out_beats;
      REG_PEAK:      rd_mux = status.peak;
      REG_TOTAL:     rd_mux = status.total;
      REG_NONZERO:   rd_mux = status.nonzero;
      REG_PMVR_Q16:  rd_mux = status.pmvr_q16;
      REG_PMVR_F32:  rd_mux = status.pmvr_f32;
      REG_CONFIG:    rd_mux = status.config_word;
      default:       rd_mux = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      clear         <= 1'b0;
    end else begin
      clear <= wr_take && (s_axil_awaddr[5:0] == REG_CTRL) &&
               s_axil_wstrb[0] && s_axil_wdata[0];
      if (wr_take)
        s_axil_bvalid <= 1'b1;
      else if (s_axil_bready)
        s_axil_bvalid <= 1'b0;
      if (rd_take) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_mux;
      end else if (s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axil_bvalid && !s_axil_bready) |=> s_axil_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axil_rvalid && !s_axil_rready) |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
