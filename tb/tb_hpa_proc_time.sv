// tb_hpa_proc_time: self-checking test of the processing-time counters.
//
// The bench plays both streams itself. For several random scenarios it
// raises input tvalid (the rising edge that starts timing), sends a random
// number of input beats with random gaps and random tready, waits, then sends
// output beats with random back-pressure and tlast on the final one. The
// expected cycle count is taken from the bench's own cycle counter: from the
// rising-edge cycle to the tlast-transfer cycle, both included. It also
// checks that a tvalid rising edge while busy does not restart the count,
// that tlast without tready does not stop it, that the result holds after
// done, and that clear zeroes everything.
module tb_hpa_proc_time;
  import hep_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic in_tvalid = 1'b0, in_tready = 1'b0;
  logic out_tvalid = 1'b0, out_tready = 1'b0, out_tlast = 1'b0;
  logic [CNT_W-1:0] cycles, in_beats, out_beats;
  logic busy, done;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hpa_proc_time dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_start, t_stop;
    int n_in, n_out, got_in, got_out;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int sc = 0; sc < 20; sc++) begin
      n_in  = $urandom_range(1, 200);
      n_out = $urandom_range(1, 300);
      got_in = 0;
      got_out = 0;
      // input phase: tvalid rises here
      in_tvalid <= 1'b1;
      in_tready <= ($urandom_range(0, 1) == 1);
      @(posedge clk);
      t_start = cyc - 1;
      if (in_tready) got_in++;
      while (got_in < n_in) begin
        // tvalid drops and rises again while busy: must not restart
        in_tvalid <= ($urandom_range(0, 5) != 0);
        in_tready <= ($urandom_range(0, 1) == 1);
        @(posedge clk);
        if (in_tvalid && in_tready) got_in++;
      end
      in_tvalid <= 1'b0;
      in_tready <= 1'b0;
      repeat ($urandom_range(0, 50)) @(posedge clk);
      // output phase; tlast is shown early with tready low once
      while (got_out < n_out) begin
        out_tvalid <= 1'b1;
        out_tlast  <= (got_out == n_out - 1) || ($urandom_range(0, 20) == 0 && got_out == 0);
        out_tready <= ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (out_tvalid && out_tready) got_out++;
        if (out_tvalid && out_tready && out_tlast) break;
      end
      t_stop = cyc - 1;
      out_tvalid <= 1'b0;
      out_tlast  <= 1'b0;
      out_tready <= 1'b0;
      @(posedge clk);
      #1;
      check("cycles", longint'(cycles), t_stop - t_start + 1);
      check("in_beats", longint'(in_beats), longint'(got_in));
      check("out_beats", longint'(out_beats), longint'(got_out));
      check("done", longint'(done), 1);
      check("busy", longint'(busy), 0);
      // result holds while idle
      repeat (10) @(posedge clk);
      #1;
      check("held", longint'(cycles), t_stop - t_start + 1);
      if (sc == 10) begin
        clear <= 1'b1;
        @(posedge clk);
        clear <= 1'b0;
        @(posedge clk);
        #1;
        check("clear cycles", longint'(cycles), 0);
        check("clear done", longint'(done), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
