// tb_hpa: self-checking test of the Hough Performance Analyser as a whole.
//
// The bench plays an input stream of 300 beats with gaps, a pause standing
// for the design under test, and an output stream of 500 vote counts with
// random back-pressure and tlast on the last one, twice. It checks the
// processing time in cycles (rising edge of input tvalid to the tlast beat,
// both included), the beat counts, and the PMVR results against values it
// computes itself, and that clear resets both units.
module tb_hpa;
  import hep_pkg::*;

  localparam int unsigned VOTE_W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic in_tvalid = 1'b0, in_tready = 1'b0;
  logic [VOTE_W-1:0] out_tdata = '0;
  logic out_tvalid = 1'b0, out_tready = 1'b0, out_tlast = 1'b0;
  logic [CNT_W-1:0] cycles, in_beats, out_beats;
  logic time_busy, time_done;
  logic [VOTE_W-1:0] peak;
  logic [CNT_W-1:0] total, nonzero;
  logic [31:0] pmvr_q16, pmvr_f32;
  logic pmvr_done;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hpa #(.VOTE_W(VOTE_W)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1, pk, tot, nz;
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      pk = 0; tot = 0; nz = 0;
      t0 = -1;
      n = 0;
      while (n < 300) begin
        in_tvalid <= ($urandom_range(0, 3) != 0) || (n > 0);
        in_tready <= 1'b1;
        @(posedge clk);
        if (in_tvalid && t0 < 0) t0 = cyc - 1;
        if (in_tvalid) n++;
      end
      in_tvalid <= 1'b0;
      repeat (40) @(posedge clk);
      n = 0;
      while (n < 500) begin
        int unsigned v;
        v = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 900) : 0;
        out_tvalid <= 1'b1;
        out_tdata  <= VOTE_W'(v);
        out_tlast  <= (n == 499);
        do begin
          out_tready <= ($urandom_range(0, 2) != 0);
          @(posedge clk);
        end while (!out_tready);
        if (v > pk) pk = v;
        tot += v;
        if (v != 0) nz++;
        n++;
      end
      t1 = cyc - 1;
      out_tvalid <= 1'b0;
      out_tlast  <= 1'b0;
      repeat (80) @(posedge clk);
      #1;
      check("cycles", longint'(cycles), t1 - t0 + 1);
      check("in_beats", longint'(in_beats), 300);
      check("out_beats", longint'(out_beats), 500);
      check("time_done", longint'(time_done), 1);
      check("pmvr_done", longint'(pmvr_done), 1);
      check("peak", longint'(peak), pk);
      check("total", longint'(total), tot);
      check("nonzero", longint'(nonzero), nz);
      check("pmvr_q16", longint'(pmvr_q16), (pk * nz * 65536) / tot);
      $display("run %0d: %0d cycles, R_f %f", run, cycles, real'(pmvr_q16) / 65536.0);
    end
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    @(posedge clk);
    #1;
    check("clear cycles", longint'(cycles), 0);
    check("clear total", longint'(total), 0);
    check("clear done", longint'(time_done || pmvr_done), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
