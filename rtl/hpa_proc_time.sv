// hpa_proc_time: processing-time counters of the Hough Performance Analyser.
//
// The counters watch the two streams around the design under test. They
// start on a rising edge of tvalid on the input stream (the image coming from
// the input DMA) and stop on the beat that carries tlast on the output stream
// (the HPS going to the output DMA). Both trigger points are those of the
// platform description; counting the tlast beat as a transfer
// (tvalid && tready && tlast) rather than the bare tlast level is this design's
// reading of it.
//
// cycles counts every clock from the rising-edge cycle to the tlast cycle,
// both included, so cycles / f_clk is the processing time of one frame.
// in_beats and out_beats count the transfers on each stream over the same
// window (an own addition that lets software check the frame and HPS sizes).
// busy is high while timing; done goes high when the tlast beat is seen and
// stays high until the next rising edge of input tvalid or a clear. A rising
// edge while busy is ignored. All results are held after done.
module hpa_proc_time
  import hep_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  // input stream (monitored)
  input  logic             in_tvalid,
  input  logic             in_tready,
  // output stream (monitored)
  input  logic             out_tvalid,
  input  logic             out_tready,
  input  logic             out_tlast,
  // results
  output logic [CNT_W-1:0] cycles,
  output logic [CNT_W-1:0] in_beats,
  output logic [CNT_W-1:0] out_beats,
  output logic             busy,
  output logic             done
);

  logic in_tvalid_q;
  logic start, stop, in_fire, out_fire;

  assign in_fire  = in_tvalid && in_tready;
  assign out_fire = out_tvalid && out_tready;
  assign start    = in_tvalid && !in_tvalid_q && !busy;
  assign stop     = busy && out_fire && out_tlast;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_tvalid_q <= 1'b0;
      cycles      <= '0;
      in_beats    <= '0;
      out_beats   <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
    end else begin
      in_tvalid_q <= in_tvalid;
      if (clear) begin
        cycles    <= '0;
        in_beats  <= '0;
        out_beats <= '0;
        busy      <= 1'b0;
        done      <= 1'b0;
      end else if (start) begin
        cycles    <= CNT_W'(1);
        in_beats  <= CNT_W'(in_fire);
        out_beats <= '0;
        busy      <= 1'b1;
        done      <= 1'b0;
      end else if (busy) begin
        cycles    <= cycles + 1'b1;
        in_beats  <= in_beats + CNT_W'(in_fire);
        out_beats <= out_beats + CNT_W'(out_fire);
        if (stop) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
