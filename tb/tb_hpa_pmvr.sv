// tb_hpa_pmvr: self-checking test of the Peak to Mean Vote Ratio unit.
//
// Several HPS streams are sent with random back-pressure: random sparse
// vote counts, an all-zero HPS, a single-location HPS, and one built to have
// a peak of 395 over a mean of 35.92 votes per non-zero location, for which
// R_f = 395 / 35.92 = 11.00. For each the bench computes peak, total,
// non-zero count, floor(peak * nonzero * 2^16 / total) and the IEEE-754
// single encoding of that Q16.16 value (found by its own normalisation loop),
// and compares them with the unit's outputs once done rises. It also checks
// that done stays low while an HPS is still being received and that clear
// zeroes the sums. The divider must finish within 80 cycles of tlast.
module tb_hpa_pmvr;
  import hep_pkg::*;

  localparam int unsigned VOTE_W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic [VOTE_W-1:0] tdata = '0;
  logic tvalid = 1'b0, tready = 1'b0, tlast = 1'b0;
  logic [VOTE_W-1:0] peak;
  logic [CNT_W-1:0] total, nonzero;
  logic [31:0] ratio_q16, ratio_f32;
  logic done;

  int checks = 0, failures = 0;
  int unsigned hps [$];

  always #5 clk = ~clk;

  hpa_pmvr #(.VOTE_W(VOTE_W)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
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

  task automatic run_hps(string name);
    longint pk, tot, nz, q;
    pk = 0; tot = 0; nz = 0;
    foreach (hps[i]) begin
      if (hps[i] > pk) pk = hps[i];
      tot += hps[i];
      if (hps[i] != 0) nz++;
    end
    q = (tot == 0) ? 0 : (pk * nz * 65536) / tot;
    foreach (hps[i]) begin
      tvalid <= 1'b1;
      tdata  <= VOTE_W'(hps[i]);
      tlast  <= (i == hps.size() - 1);
      do begin
        tready <= ($urandom_range(0, 3) != 0);
        @(posedge clk);
      end while (!tready);
      if (i == hps.size() / 2 && hps.size() > 1) begin
        #1;
        checks++;
        if (done) begin
          failures++;
          $display("%s: done high in the middle of the HPS", name);
        end
      end
    end
    tvalid <= 1'b0;
    tlast  <= 1'b0;
    @(posedge clk);
    for (int w = 0; w < 80 && !done; w++) @(posedge clk);
    #1;
    check({name, " done"}, longint'(done), 1);
    check({name, " peak"}, longint'(peak), pk);
    check({name, " total"}, longint'(total), tot);
    check({name, " nonzero"}, longint'(nonzero), nz);
    check({name, " ratio_q16"}, longint'(ratio_q16), q);
    check({name, " ratio_f32"}, longint'(ratio_f32), longint'(f32_of(32'(q))));
    $display("%s: peak %0d total %0d nonzero %0d R_f %f", name, pk, tot, nz, real'(ratio_q16) / 65536.0);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < 6; r++) begin
      hps.delete();
      for (int i = 0; i < 2000; i++)
        hps.push_back(($urandom_range(0, 3) == 0) ? $urandom_range(1, 60) : 0);
      hps[$urandom_range(0, 1999)] = $urandom_range(100, 65535);
      run_hps($sformatf("random%0d", r));
    end
    // all zero
    hps.delete();
    repeat (100) hps.push_back(0);
    run_hps("empty");
    // a single location
    hps.delete();
    hps.push_back(7);
    run_hps("single");
    // peak 395, 100 non-zero locations holding 3592 votes (mean 35.92)
    hps.delete();
    hps.push_back(395);
    for (int i = 0; i < 99; i++) hps.push_back(32 + (i < 29 ? 1 : 0));
    repeat (50) hps.push_back(0);
    run_hps("fig4");
    check("fig4 R_f x100", longint'((ratio_q16 * 100 + 32768) >> 16), 1100);
    // clear
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    @(posedge clk);
    #1;
    check("clear total", longint'(total), 0);
    check("clear done", longint'(done), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
