// Self-checking test of ctm_regs, the AXI4-Lite register block.
// An AXI4-Lite master task set drives it; the parameter and result FIFOs are
// replaced by simple testbench models. Checked: read-back of the staged
// parameters, byte strobes, that a PHI write pushes the complete parameter set
// in the same clock, SLVERR and the overflow flag when the parameter FIFO is
// full and the flag's clearing, the mode bit and its reset value, every
// STATUS field, RESULT reads popping results in order, SLVERR on an empty
// RESULT read, and one-clock write/read response latency.
module tb_ctm_regs;
  import ctm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [5:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  theta_t      theta;
  logic        theta_valid, theta_ready;
  logic [7:0]  param_count, result_count;
  logic [31:0] result;
  logic        result_valid, result_ready;
  logic        in_estimation, sig_loaded, gen_busy;
  int checks = 0, failures = 0;
  theta_t pushed [$];
  logic [31:0] results [$];

  ctm_regs #(.CNT_W(8), .RES_W(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // FIFO models
  always @(posedge clk) begin
    if (theta_valid && theta_ready) pushed.push_back(theta);
    if (result_valid && result_ready) void'(results.pop_front());
  end
  always @(negedge clk) begin
    result_valid = results.size() > 0;
    result       = results.size() > 0 ? results[0] : 32'd0;
    result_count = 8'(results.size());
  end

  task automatic axil_write(input logic [5:0] a, input logic [31:0] d, input logic [3:0] strb,
                            output logic [1:0] resp);
    int n = 0;
    s_axil_awaddr = a; s_axil_wdata = d; s_axil_wstrb = strb;
    s_axil_awvalid = 1; s_axil_wvalid = 1; s_axil_bready = 1;
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    #1 s_axil_awvalid = 0; s_axil_wvalid = 0;
    check(s_axil_bvalid, "write response one clock after acceptance");
    while (!s_axil_bvalid) begin @(posedge clk); #1; end
    resp = s_axil_bresp;
    @(posedge clk); #1 s_axil_bready = 0;
  endtask

  task automatic axil_read(input logic [5:0] a, output logic [31:0] d, output logic [1:0] resp);
    s_axil_araddr = a; s_axil_arvalid = 1; s_axil_rready = 0;
    do @(posedge clk); while (!s_axil_arready);
    #1 s_axil_arvalid = 0;
    check(s_axil_rvalid, "read data one clock after acceptance");
    // hold rready low a few clocks: data must stay
    d = s_axil_rdata;
    repeat (2) @(posedge clk);
    #1 check(s_axil_rvalid && s_axil_rdata == d, "read data held until taken");
    s_axil_rready = 1;
    @(posedge clk); #1 s_axil_rready = 0;
    resp = s_axil_rresp;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d; logic [1:0] r;
    theta_t t;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    theta_ready = 1; param_count = 8'd0; sig_loaded = 0; gen_busy = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    check(in_estimation == 1'b1, "mode resets to correlation");

    // write and read back the staged parameters
    t = '{beta: $urandom, tau: $urandom, fc: $urandom, alpha1: $urandom, alpha2: $urandom, phi: $urandom};
    axil_write(REG_BETA,   t.beta,   4'hF, r); check(r == RESP_OKAY, "beta write okay");
    axil_write(REG_TAU,    t.tau,    4'hF, r);
    axil_write(REG_FC,     t.fc,     4'hF, r);
    axil_write(REG_ALPHA1, t.alpha1, 4'hF, r);
    axil_write(REG_ALPHA2, t.alpha2, 4'hF, r);
    check(pushed.size() == 0, "no push before phi");
    axil_write(REG_PHI,    t.phi,    4'hF, r); check(r == RESP_OKAY, "phi write okay");
    check(pushed.size() == 1 && pushed[0] == t, "phi write pushes the full set");
    axil_read(REG_BETA, d, r);   check(d == t.beta && r == RESP_OKAY, "beta readback");
    axil_read(REG_ALPHA2, d, r); check(d == t.alpha2, "alpha2 readback");
    axil_read(REG_PHI, d, r);    check(d == t.phi, "phi readback");
    // byte strobes
    axil_write(REG_TAU, 32'hAABBCCDD, 4'b0101, r);
    axil_read(REG_TAU, d, r);
    check(d == {t.tau[31:24], 8'hBB, t.tau[15:8], 8'hDD}, "byte strobes");
    // second push reuses the staged words
    axil_write(REG_PHI, 32'h1234_5678, 4'hF, r);
    check(pushed.size() == 2 && pushed[1].tau == {t.tau[31:24], 8'hBB, t.tau[15:8], 8'hDD}
          && pushed[1].phi == 32'h1234_5678 && pushed[1].beta == t.beta, "second push");
    // full parameter FIFO
    theta_ready = 0;
    axil_write(REG_PHI, 32'd7, 4'hF, r);
    check(r == RESP_SLVERR && pushed.size() == 2, "SLVERR when parameter FIFO full");
    axil_read(REG_STATUS, d, r); check(d[29], "overflow flag set");
    axil_write(REG_CTRL, 32'h3, 4'hF, r);
    axil_read(REG_STATUS, d, r); check(!d[29], "overflow flag cleared");
    theta_ready = 1;
    // mode bit
    axil_write(REG_CTRL, 32'h0, 4'hF, r); check(in_estimation == 1'b0, "mode 0 (feedback)");
    axil_read(REG_CTRL, d, r); check(d == 32'h0, "ctrl readback 0");
    axil_write(REG_CTRL, 32'h1, 4'hF, r); check(in_estimation == 1'b1, "mode 1 (correlation)");
    // status fields
    param_count = 8'd77; sig_loaded = 1; gen_busy = 1;
    results.push_back(32'hDEAD_0001); results.push_back(32'h0000_BEEF); results.push_back(32'd42);
    @(negedge clk);
    axil_read(REG_STATUS, d, r);
    check(d[9:0] == 10'd77 && d[25:16] == 10'd3 && d[28] && !d[29] && d[30] && d[31], "status fields");
    // results pop in order
    axil_read(REG_RESULT, d, r); check(d == 32'hDEAD_0001 && r == RESP_OKAY, "result 0");
    axil_read(REG_RESULT, d, r); check(d == 32'h0000_BEEF, "result 1");
    axil_read(REG_RESULT, d, r); check(d == 32'd42, "result 2");
    check(results.size() == 0, "results popped");
    axil_read(REG_RESULT, d, r); check(r == RESP_SLVERR && d == 0, "empty result read");
    axil_read(REG_STATUS, d, r); check(!d[31] && d[25:16] == 0, "no result available");
    // unmapped address
    axil_read(6'h3C, d, r); check(d == 0 && r == RESP_OKAY, "unmapped read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
