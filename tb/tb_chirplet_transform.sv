// End-to-end test of the chirplet transform module at its default size
// (512-sample chirplets, 4 lanes, FIFOs of 128), acting as the processor and
// the two DMAs would.
//
//  1. A measured signal is built in floating point (two chirplet echoes plus
//     a small deterministic ripple), quantised to 16 bits and streamed in.
//  2. Arrival-time search in two passes, as the processor runs it: seven
//     coarse candidates are queued through the register port without any
//     status polling, their |CT| values read back, then six fine candidates
//     around the best coarse one. Every |CT| is compared with the
//     correlation computed here from the chirplet formula, within a bound
//     derived from the generator's per-sample error. The search must land
//     within one fine step of the true arrival time.
//  3. Feedback mode: the estimated chirplet comes out of the AXI-Stream port
//     and is compared sample by sample with the formula; the stream sink
//     stalls at random, which stalls the generator.
//  4. With the output stream blocked, parameter sets are pushed until the
//     parameter FIFO is full: the 129th push must get SLVERR.
//  5. In correlation mode 140 sets are queued with no result reads, so the
//     result FIFO fills and back-pressures the correlator; all 140 results
//     are then read and checked, and the steady-state rate of one chirplet
//     per 128 clocks is checked.
// Each mechanism (mode switch, generator stall, parameter FIFO full,
// result FIFO full, coarse and fine search) is counted and must occur.
module tb_chirplet_transform;
  import ctm_pkg::*;
  localparam int N = 512, L = 4, BEATS = N / L, DEPTH = 128;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic [5:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic [15:0] s_axis_tdata, m_axis_tdata;
  logic        s_axis_tvalid, s_axis_tready, s_axis_tlast;
  logic        m_axis_tvalid, m_axis_tready, m_axis_tlast;

  int checks = 0, failures = 0, cyc = 0;
  int n_mode_switch = 0, n_gen_stall = 0, n_param_full = 0, n_result_full = 0;
  int n_coarse = 0, n_fine = 0;
  logic signed [15:0] sig [N];
  bit out_random = 0, out_block = 0;

  chirplet_transform dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------- reference model
  function automatic real chirp(theta_t th, int n, output real env);
    real d, a1, f, a2, ph, b;
    d  = real'(n) - real'(th.tau[31:8]) / 256.0;
    b  = real'(th.beta[15:0]) / 32768.0;
    a1 = real'(th.alpha1) / 4294967296.0;
    f  = real'(th.fc) / 4294967296.0;
    a2 = real'($signed(th.alpha2)) / 4294967296.0;
    ph = real'(th.phi) / 4294967296.0;
    env = b * $exp(-a1 * d * d) * 32768.0;
    return env * $cos(2.0 * PI * (f * d + a2 * d * d + ph));
  endfunction

  // expected |CT| and the error bound that follows from the generator's
  // per-sample bound (1.2 % of the envelope plus 8 LSB)
  task automatic ref_ct(input theta_t th, output real ct, output real tol);
    real acc = 0.0, err = 0.0, env, p;
    for (int n = 0; n < N; n++) begin
      p = chirp(th, n, env);
      if (p > 32767.0) p = 32767.0;
      if (p < -32768.0) p = -32768.0;
      acc += real'(sig[n]) * p;
      err += (real'(sig[n]) < 0 ? -real'(sig[n]) : real'(sig[n])) * (0.012 * env + 8.0);
    end
    ct  = (acc < 0 ? -acc : acc) / 32768.0;
    tol = err / 32768.0 + 2.0;
  endtask

  function automatic theta_t mk(real beta, real tau, real fc, real a1, real a2, real phi);
    theta_t th;
    th.beta   = 32'($rtoi(beta * 32768.0));
    th.tau    = 32'($rtoi(tau * 65536.0));
    th.fc     = 32'($rtoi(fc * 4294967296.0));
    th.alpha1 = 32'($rtoi(a1 * 4294967296.0));
    th.alpha2 = 32'($rtoi(a2 * 4294967296.0));
    th.phi    = 32'($rtoi(phi * 4294967296.0));
    return th;
  endfunction

  // ---------------------------------------------------------- bus models
  task automatic axil_write(input logic [5:0] a, input logic [31:0] d, output logic [1:0] resp);
    s_axil_awaddr = a; s_axil_wdata = d; s_axil_wstrb = 4'hF;
    s_axil_awvalid = 1; s_axil_wvalid = 1; s_axil_bready = 1;
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    #1 s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) begin @(posedge clk); #1; end
    resp = s_axil_bresp;
    @(posedge clk); #1 s_axil_bready = 0;
  endtask

  task automatic axil_read(input logic [5:0] a, output logic [31:0] d, output logic [1:0] resp);
    s_axil_araddr = a; s_axil_arvalid = 1; s_axil_rready = 1;
    do @(posedge clk); while (!s_axil_arready);
    #1 s_axil_arvalid = 0;
    while (!s_axil_rvalid) begin @(posedge clk); #1; end
    d = s_axil_rdata; resp = s_axil_rresp;
    @(posedge clk); #1 s_axil_rready = 0;
  endtask

  task automatic push_theta(input theta_t th, output logic [1:0] resp);
    logic [1:0] r;
    axil_write(REG_BETA, th.beta, r);
    axil_write(REG_TAU, th.tau, r);
    axil_write(REG_FC, th.fc, r);
    axil_write(REG_ALPHA1, th.alpha1, r);
    axil_write(REG_ALPHA2, th.alpha2, r);
    axil_write(REG_PHI, th.phi, resp);
  endtask

  task automatic set_mode(input bit m);
    logic [1:0] r;
    axil_write(REG_CTRL, {31'd0, m}, r);
    n_mode_switch++;
  endtask

  task automatic wait_results(input int n);
    logic [31:0] st; logic [1:0] r;
    do axil_read(REG_STATUS, st, r); while (st[25:16] < 10'(n));
  endtask

  // ---------------------------------------------------------- monitors
  always @(negedge clk) m_axis_tready <= out_block ? 1'b0 : out_random ? ($urandom_range(0, 99) < 50) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (dut.gen_s.valid && !dut.gen_s.ready) n_gen_stall++;
    if (dut.xc_res_valid && !dut.xc_res_ready) n_result_full++;
  end

  // clocks between consecutive results entering the result FIFO
  int res_times [$];
  always @(posedge clk) if (rst_n && dut.xc_res_valid && dut.xc_res_ready) res_times.push_back(cyc);

  // estimated-chirplet stream capture
  logic signed [15:0] est [$];
  bit est_last [$];
  always @(posedge clk) if (rst_n && m_axis_tvalid && m_axis_tready) begin
    est.push_back($signed(m_axis_tdata));
    est_last.push_back(m_axis_tlast);
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    theta_t echo1, echo2, th, best;
    theta_t batch [$];
    real ct, tol, env, v, best_ct;
    real coarse_tau [7], fine_tau [6];
    logic [31:0] d; logic [1:0] r;

    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    s_axis_tvalid = 0; s_axis_tlast = 0; s_axis_tdata = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);

    // ---- 1. measured signal
    echo1 = mk(0.6, 205.1, 0.02, 0.0005, 0.00002, 0.15);
    echo2 = mk(0.3, 380.0, 0.03, 0.0008, -0.00001, 0.6);
    for (int n = 0; n < N; n++) begin
      v = chirp(echo1, n, env) + chirp(echo2, n, env) + 40.0 * $sin(real'(n) * 1.7);
      sig[n] = 16'($rtoi(v));
    end
    axil_read(REG_STATUS, d, r); check(!d[28], "no signal loaded after reset");
    for (int n = 0; n < N; n++) begin
      s_axis_tdata = sig[n]; s_axis_tvalid = 1; s_axis_tlast = (n == N - 1);
      do @(posedge clk); while (!s_axis_tready);
      #1;
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
    axil_read(REG_STATUS, d, r); check(d[28], "signal loaded");

    // ---- 2. coarse then fine search of the arrival time
    for (int i = 0; i < 7; i++) coarse_tau[i] = 157.0 + 16.0 * i;      // 157 .. 253
    for (int i = 0; i < 7; i++) begin
      th = echo1; th.tau = 32'($rtoi(coarse_tau[i] * 65536.0));
      push_theta(th, r); check(r == RESP_OKAY, "coarse push accepted");
      batch.push_back(th);
    end
    wait_results(7);
    best_ct = -1.0;
    for (int i = 0; i < 7; i++) begin
      axil_read(REG_RESULT, d, r); check(r == RESP_OKAY, "coarse result read");
      ref_ct(batch[i], ct, tol);
      check(real'(d) >= ct - tol && real'(d) <= ct + tol, "coarse |CT| value");
      if (real'(d) > best_ct) begin best_ct = real'(d); best = batch[i]; end
      n_coarse++;
    end
    batch.delete();
    for (int i = 0; i < 6; i++) fine_tau[i] = real'(best.tau) / 65536.0 + (i < 3 ? -2.0 * (3 - i) : 2.0 * (i - 2));
    for (int i = 0; i < 6; i++) begin
      th = echo1; th.tau = 32'($rtoi(fine_tau[i] * 65536.0));
      push_theta(th, r); check(r == RESP_OKAY, "fine push accepted");
      batch.push_back(th);
    end
    wait_results(6);
    for (int i = 0; i < 6; i++) begin
      axil_read(REG_RESULT, d, r);
      ref_ct(batch[i], ct, tol);
      check(real'(d) >= ct - tol && real'(d) <= ct + tol, "fine |CT| value");
      if (real'(d) > best_ct) begin best_ct = real'(d); best = batch[i]; end
      n_fine++;
    end
    batch.delete();
    v = real'(best.tau) / 65536.0 - 205.1;
    check(v <= 2.0 && v >= -2.0, "search finds the arrival time within one fine step");
    $display("search: tau = %f (true 205.1), |CT| = %0d", real'(best.tau) / 65536.0, $rtoi(best_ct));

    // ---- 3. feedback mode: estimated chirplet on the output stream
    set_mode(0);
    out_random = 1;
    push_theta(best, r);
    while (est.size() < N) @(posedge clk);
    for (int n = 0; n < N; n++) begin
      v = chirp(best, n, env);
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      check(real'(est[n]) - v <= 0.012 * env + 8.0 && v - real'(est[n]) <= 0.012 * env + 8.0, "estimated chirplet sample");
      check(est_last[n] == (n == N - 1), "estimated chirplet TLAST");
    end
    est.delete(); est_last.delete();

    // ---- 4. fill the parameter FIFO while the output stream is blocked
    out_block = 1;
    th = echo2;
    for (int i = 0; i < DEPTH + 3; i++) begin
      push_theta(th, r);
      if (r == RESP_SLVERR) begin n_param_full++; break; end
    end
    axil_read(REG_STATUS, d, r);
    check(d[29] && d[9:0] == 10'(DEPTH), "parameter FIFO full and overflow flagged");
    out_block = 0; out_random = 0;
    // drain: DEPTH chirplets plus the one in flight leave on the stream
    while (est.size() < (DEPTH + 1) * N) @(posedge clk);
    check(est_last[(DEPTH + 1) * N - 1], "drained chirplets end with TLAST");
    axil_write(REG_CTRL, 32'h2, r);   // clear overflow, mode stays 0
    axil_read(REG_STATUS, d, r); check(!d[29] && d[9:0] == 0, "overflow cleared, FIFO empty");
    est.delete(); est_last.delete();

    // ---- 5. correlation mode, result FIFO overflow protection and rate
    set_mode(1);
    res_times.delete();
    for (int i = 0; i < DEPTH + 12; i++) begin
      th = echo2; th.tau = 32'($rtoi((300.0 + real'(i)) * 65536.0));
      batch.push_back(th);
      push_theta(th, r); check(r == RESP_OKAY, "push accepted while generator runs");
    end
    repeat ((DEPTH + 12) * BEATS) @(posedge clk);
    axil_read(REG_STATUS, d, r); check(d[25:16] == 10'(DEPTH), "result FIFO full");
    for (int i = 0; i < DEPTH + 12; i++) begin
      axil_read(REG_RESULT, d, r);
      if (r != RESP_OKAY) begin wait_results(1); axil_read(REG_RESULT, d, r); end
      ref_ct(batch[i], ct, tol);
      check(r == RESP_OKAY && real'(d) >= ct - tol && real'(d) <= ct + tol, "queued |CT| value");
    end
    check(res_times.size() == DEPTH + 12, "all results produced");
    for (int i = 2; i < 40; i++) check(res_times[i] - res_times[i-1] == BEATS, "one chirplet per 128 clocks");
    axil_read(REG_STATUS, d, r); check(d[25:16] == 0 && !d[31], "all results read");

    // ---- mechanisms
    $display("mode switches %0d, generator stall clocks %0d, parameter FIFO full %0d, result FIFO full clocks %0d, coarse %0d, fine %0d",
             n_mode_switch, n_gen_stall, n_param_full, n_result_full, n_coarse, n_fine);
    check(n_mode_switch > 0, "mode switch happened");
    check(n_gen_stall > 0, "generator stall happened");
    check(n_param_full > 0, "parameter FIFO overflow happened");
    check(n_result_full > 0, "result FIFO back-pressure happened");
    check(n_coarse == 7 && n_fine == 6, "coarse and fine search ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
