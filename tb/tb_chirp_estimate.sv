// Workload test: one complete chirplet estimate through the CTM at its
// default size, with the testbench acting as the processor.
//
// A 512-sample window holding one chirplet echo plus a weaker interfering
// echo is streamed in. The processor then estimates tau, fc, alpha1, alpha2
// and phi by successive two-stage searches: for each parameter it queues
// seven coarse candidates (spacing D) through the register port without
// polling, reads the seven |CT| values, then queues six fine candidates at
// +-D/4, +-2D/4, +-3D/4 around the best one and keeps the best of all. Two
// rounds over the five parameters give ten searches, 130 chirplet transforms.
// Every |CT| is compared with a floating-point reference within the
// generator's error bound.
//
// The chirplet model is not normalised in hardware, so the processor gives
// each candidate the same energy through beta (beta ~ alpha1^(1/4) for a
// Gaussian envelope); otherwise wider envelopes would always score higher.
//
// Then, in feedback mode, the estimated chirplet is streamed out, scaled by
// least squares and subtracted from the window, as the processor does before
// looking for the next echo.
//
// Checked: |CT| values; the best |CT| found is at least 95 % of |CT| at the
// true parameters; tau within 1.5 samples; the residual holds less than 25 %
// of the window's energy; and the clocks per chirplet transform, bus traffic
// included, stay at or below 180 (1.2 us at 150 MHz for one 512-sample
// transform in the reference measurements).
module tb_chirp_estimate;
  import ctm_pkg::*;
  localparam int N = 512, NSEARCH = 10;
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

  int checks = 0, failures = 0, cyc = 0, n_ct = 0;
  logic signed [15:0] sig [N];
  logic signed [15:0] est [$];

  chirplet_transform dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign m_axis_tready = 1'b1;
  always @(posedge clk) if (rst_n && m_axis_tvalid) est.push_back($signed(m_axis_tdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask

  // real-valued parameter vector used by the processor model
  typedef struct { real beta, tau, fc, a1, a2, phi; } par_t;

  // Candidates are scaled to equal energy (beta proportional to alpha1^(1/4),
  // 0.5 at alpha1 = 0.001), so |CT| compares shapes and not energies.
  function automatic theta_t to_theta(par_t p, bit norm = 1);
    theta_t th;
    th.beta   = 32'($rtoi((norm ? 0.5 * $pow(p.a1 / 0.001, 0.25) : p.beta) * 32768.0));
    th.tau    = 32'($rtoi(p.tau * 65536.0));
    th.fc     = 32'($rtoi(p.fc * 4294967296.0));
    th.alpha1 = 32'($rtoi(p.a1 * 4294967296.0));
    th.alpha2 = 32'($rtoi(p.a2 * 4294967296.0));
    th.phi    = 32'($rtoi((p.phi - $floor(p.phi)) * 4294967296.0));
    return th;
  endfunction

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

  task automatic push_theta(input theta_t th);
    logic [1:0] r;
    axil_write(REG_BETA, th.beta, r);
    axil_write(REG_TAU, th.tau, r);
    axil_write(REG_FC, th.fc, r);
    axil_write(REG_ALPHA1, th.alpha1, r);
    axil_write(REG_ALPHA2, th.alpha2, r);
    axil_write(REG_PHI, th.phi, r);
    check(r == RESP_OKAY, "push accepted");
  endtask

  // evaluate a batch of candidates on the CTM; returns index and value of the best
  task automatic eval_batch(input par_t cand [$], output int best_i, output real best_v);
    logic [31:0] d, st; logic [1:0] r;
    real ct, tol;
    for (int i = 0; i < cand.size(); i++) push_theta(to_theta(cand[i]));
    do axil_read(REG_STATUS, st, r); while (st[25:16] < 10'(cand.size()));
    best_v = -1.0; best_i = 0;
    for (int i = 0; i < cand.size(); i++) begin
      axil_read(REG_RESULT, d, r);
      ref_ct(to_theta(cand[i]), ct, tol);
      check(r == RESP_OKAY && real'(d) >= ct - tol && real'(d) <= ct + tol, "|CT| value");
      if (real'(d) > best_v) begin best_v = real'(d); best_i = i; end
      n_ct++;
    end
  endtask

  function automatic par_t with_param(par_t p, int k, real v);
    case (k)
      0: p.tau = v;
      1: p.fc  = v;
      2: p.a1  = v;
      3: p.a2  = v;
      default: p.phi = v;
    endcase
    return p;
  endfunction

  function automatic real get_param(par_t p, int k);
    case (k)
      0: return p.tau;
      1: return p.fc;
      2: return p.a1;
      3: return p.a2;
      default: return p.phi;
    endcase
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    par_t truth, other, cur;
    par_t cand [$];
    real step [5], v, env, best_v, ct_true, tol, e_sig, e_res, num, den, k;
    int best_i, t0, clocks;
    logic [1:0] r;

    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    s_axis_tvalid = 0; s_axis_tlast = 0; s_axis_tdata = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);

    truth = '{beta: 0.5, tau: 240.3, fc: 0.05, a1: 0.001, a2: 0.00003, phi: 0.3};
    other = '{beta: 0.15, tau: 420.0, fc: 0.08, a1: 0.002, a2: 0.0, phi: 0.7};
    for (int n = 0; n < N; n++) begin
      v = chirp(to_theta(truth, 0), n, env) + chirp(to_theta(other, 0), n, env);
      sig[n] = 16'($rtoi(v));
    end
    for (int n = 0; n < N; n++) begin
      s_axis_tdata = sig[n]; s_axis_tvalid = 1; s_axis_tlast = (n == N - 1);
      @(posedge clk); #1;
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;

    // initial guess and coarse spacings
    cur  = '{beta: 0.5, tau: 238.0, fc: 0.048, a1: 0.0012, a2: 0.0, phi: 0.25};
    step = '{4.0, 0.004, 0.0002, 0.00002, 0.05};
    t0 = cyc;
    for (int round = 0; round < 2; round++) begin
      for (int p = 0; p < 5; p++) begin
        real c0, cb, best_coarse;
        c0 = get_param(cur, p);
        cand.delete();
        for (int j = -3; j <= 3; j++) cand.push_back(with_param(cur, p, c0 + step[p] * j));
        eval_batch(cand, best_i, best_coarse);
        cb = c0 + step[p] * (best_i - 3);
        cand.delete();
        for (int j = -3; j <= 3; j++) if (j != 0) cand.push_back(with_param(cur, p, cb + step[p] * j / 4.0));
        eval_batch(cand, best_i, best_v);
        if (best_v > best_coarse) cur = cand[best_i];
        else cur = with_param(cur, p, cb);
      end
      for (int p = 0; p < 5; p++) step[p] = step[p] / 2.0;
    end
    clocks = cyc - t0;
    $display("estimate: tau %f fc %f alpha1 %f alpha2 %f phi %f", cur.tau, cur.fc, cur.a1, cur.a2, cur.phi);
    $display("%0d transforms in %0d clocks: %0d clocks per transform", n_ct, clocks, clocks / n_ct);
    check(n_ct == NSEARCH * 13, "130 transforms run");
    check(clocks <= 180 * n_ct, "at most 180 clocks per transform, bus traffic included");
    ref_ct(to_theta(truth), ct_true, tol);
    ref_ct(to_theta(cur), best_v, tol);
    check(best_v >= 0.95 * ct_true, "best |CT| reaches 95 % of the true parameters' |CT|");
    check(cur.tau - truth.tau <= 1.5 && truth.tau - cur.tau <= 1.5, "tau within 1.5 samples");

    // feedback mode: fetch the estimated chirplet and subtract it
    axil_write(REG_CTRL, 32'h0, r);
    push_theta(to_theta(cur));
    while (est.size() < N) @(posedge clk);
    num = 0.0; den = 0.0; e_sig = 0.0; e_res = 0.0;
    for (int n = 0; n < N; n++) begin
      num += real'(sig[n]) * real'(est[n]);
      den += real'(est[n]) * real'(est[n]);
    end
    k = num / den;
    for (int n = 0; n < N; n++) begin
      e_sig += real'(sig[n]) * real'(sig[n]);
      e_res += (real'(sig[n]) - k * real'(est[n])) ** 2;
    end
    $display("residual energy %f of the window", e_res / e_sig);
    check(e_res < 0.25 * e_sig, "residual below 25 % of the window energy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
