// tb_hep_axil_regs: self-checking test of the AXI4-Lite register block.
//
// The bench drives a random analyser status, reads every register through
// AXI4-Lite with random RREADY delays and compares the data with the field it
// must come from; an unmapped address must read 0. It writes the control
// register with bit 0 set (one clear pulse expected) and clear (no pulse),
// presenting address and data in different cycles, and checks that every
// response is OKAY and is held until accepted.
module tb_hep_axil_regs;
  import hep_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [5:0]  s_axil_awaddr = '0;
  logic        s_axil_awvalid = 1'b0;
  logic        s_axil_awready;
  logic [31:0] s_axil_wdata = '0;
  logic [3:0]  s_axil_wstrb = '0;
  logic        s_axil_wvalid = 1'b0;
  logic        s_axil_wready;
  logic [1:0]  s_axil_bresp;
  logic        s_axil_bvalid;
  logic        s_axil_bready = 1'b0;
  logic [5:0]  s_axil_araddr = '0;
  logic        s_axil_arvalid = 1'b0;
  logic        s_axil_arready;
  logic [31:0] s_axil_rdata;
  logic [1:0]  s_axil_rresp;
  logic        s_axil_rvalid;
  logic        s_axil_rready = 1'b0;
  hpa_status_t status;
  logic        clear;

  int checks = 0, failures = 0, clears = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && clear) clears++;

  hep_axil_regs dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got 0x%0h expected 0x%0h", what, got, exp);
    end
  endtask

  // The bench drives and samples on the falling edge; a handshake seen there
  // completes on the next rising edge.
  task automatic axil_read(input logic [5:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_axil_araddr  <= addr;
    s_axil_arvalid <= 1'b1;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axil_arvalid <= 1'b0;
    while (!s_axil_rvalid) @(negedge clk);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    check("rvalid held", longint'(s_axil_rvalid), 1);
    check("rresp", longint'(s_axil_rresp), 0);
    data = s_axil_rdata;
    s_axil_rready <= 1'b1;
    @(negedge clk);
    s_axil_rready <= 1'b0;
  endtask

  task automatic axil_write(input logic [5:0] addr, input logic [31:0] data);
    @(negedge clk);
    s_axil_awaddr  <= addr;
    s_axil_awvalid <= 1'b1;
    repeat (2) @(negedge clk);     // data comes later than the address
    s_axil_wdata  <= data;
    s_axil_wstrb  <= 4'hf;
    s_axil_wvalid <= 1'b1;
    #1;
    while (!s_axil_wready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axil_awvalid <= 1'b0;
    s_axil_wvalid  <= 1'b0;
    while (!s_axil_bvalid) @(negedge clk);
    repeat (2) @(negedge clk);
    check("bvalid held", longint'(s_axil_bvalid), 1);
    check("bresp", longint'(s_axil_bresp), 0);
    s_axil_bready <= 1'b1;
    @(negedge clk);
    s_axil_bready <= 1'b0;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    status = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 10; r++) begin
      status.time_busy   = 1'($urandom);
      status.time_done   = 1'($urandom);
      status.pmvr_done   = 1'($urandom);
      status.cycles      = $urandom;
      status.in_beats    = $urandom;
      status.out_beats   = $urandom;
      status.peak        = $urandom;
      status.total       = $urandom;
      status.nonzero     = $urandom;
      status.pmvr_q16    = $urandom;
      status.pmvr_f32    = $urandom;
      status.config_word = $urandom;
      axil_read(6'h00, d);
      check("ctrl", longint'(d), longint'({status.pmvr_done, status.time_done, status.time_busy}));
      axil_read(6'h04, d); check("cycles", longint'(d), longint'(status.cycles));
      axil_read(6'h08, d); check("in_beats", longint'(d), longint'(status.in_beats));
      axil_read(6'h0C, d); check("out_beats", longint'(d), longint'(status.out_beats));
      axil_read(6'h10, d); check("peak", longint'(d), longint'(status.peak));
      axil_read(6'h14, d); check("total", longint'(d), longint'(status.total));
      axil_read(6'h18, d); check("nonzero", longint'(d), longint'(status.nonzero));
      axil_read(6'h1C, d); check("q16", longint'(d), longint'(status.pmvr_q16));
      axil_read(6'h20, d); check("f32", longint'(d), longint'(status.pmvr_f32));
      axil_read(6'h24, d); check("config", longint'(d), longint'(status.config_word));
      axil_read(6'h3C, d); check("unmapped", longint'(d), 0);
    end
    axil_write(6'h00, 32'h1);
    check("clear pulses after write 1", longint'(clears), 1);
    axil_write(6'h00, 32'h0);
    axil_write(6'h04, 32'h1);
    check("clear pulses after other writes", longint'(clears), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
