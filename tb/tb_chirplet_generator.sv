// Self-checking test of chirplet_generator at its default size
// (512 samples, 4 lanes).
// Every generated sample is compared with the chirplet formula evaluated in
// floating point: beta*exp(-alpha1*d^2)*cos(2*pi*(fc*d + alpha2*d^2 + phi)),
// d = t - tau, within a tolerance set by the table resolutions (10-bit phase,
// 1/256 exponent steps): 1.2 % of the local envelope plus 8 LSB. Also checked:
// beat order and last flags, output saturation, back-to-back generation at
// 128 clocks per chirplet with the sink always ready, and correct data under
// random back-pressure, and the busy flag.
module tb_chirplet_generator;
  import ctm_pkg::*;
  localparam int N = 512, L = 4, BEATS = N / L;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  theta_t theta;
  logic theta_valid, theta_ready, busy;
  int checks = 0, failures = 0;
  theta_t q [$];          // parameter sets sent, in order
  int beat_cnt = 0, cur = 0, valid_cycles = 0, first_valid = -1, last_valid = -1, cyc = 0;
  int stalls = 0, saturations = 0;
  bit random_ready = 0;

  chirp_if #(.LANES(L), .SAMPLE_W(16), .IDX_W(7)) out (.clk, .rst_n);
  chirplet_generator #(.N_SAMPLES(N), .LANES(L), .SAMPLE_W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic real ref_sample(theta_t th, int n, output real env);
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

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (out.valid && !out.ready) stalls <= stalls + 1;
  end

  // output checker
  always @(posedge clk) if (rst_n && out.valid && out.ready) begin
    real r, env, tol;
    check(q.size() > cur, "beat without parameter set");
    check(out.idx == 7'(beat_cnt), "beat index");
    check(out.last == (beat_cnt == BEATS - 1), "last flag");
    check(busy, "busy while beats are in flight");
    for (int l = 0; l < L; l++) begin
      r = ref_sample(q[cur], beat_cnt * L + l, env);
      if (r > 32767.0) begin r = 32767.0; if (out.data[l] == 16'sd32767) saturations++; end
      if (r < -32768.0) r = -32768.0;
      tol = 0.012 * env + 8.0;
      check((real'(out.data[l]) - r) <= tol && (r - real'(out.data[l])) <= tol, "sample value");
      if ((real'(out.data[l]) - r) > tol || (r - real'(out.data[l])) > tol)
        if (failures < 20) $display("  set %0d t=%0d hw=%0d ref=%f", cur, beat_cnt*L+l, out.data[l], r);
    end
    if (first_valid < 0) first_valid = cyc;
    last_valid = cyc;
    valid_cycles++;
    if (beat_cnt == BEATS - 1) begin beat_cnt = 0; cur++; end else beat_cnt++;
  end

  always @(negedge clk) out.ready <= random_ready ? ($urandom_range(0, 99) < 40) : 1'b1;

  task automatic send(input theta_t th);
    theta = th; theta_valid = 1;
    do @(posedge clk); while (!theta_ready);
    q.push_back(th);
    #1 theta_valid = 0;
  endtask

  function automatic theta_t rand_theta();
    theta_t th;
    th.beta   = 32'($urandom_range(4000, 65535));
    th.tau    = 32'($urandom_range(0, 511 * 65536));
    th.alpha1 = 32'($urandom_range(400000, 200000000));   // ~1e-4 .. 0.047 per sample^2
    th.fc     = 32'($urandom_range(0, 32'h4000_0000));     // 0 .. 0.25 cycles/sample
    th.alpha2 = 32'($signed($urandom_range(0, 8000000)) - 4000000);
    th.phi    = $urandom;
    return th;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    theta_t th;
    theta = '0; theta_valid = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    check(!busy && !out.valid, "idle after reset");
    // saturating set: beta = 1.99998, cos = 1, envelope = 1 at t = tau = 100
    th = '{beta: 32'hFFFF, tau: 32'd100 << 16, fc: 0, alpha1: 32'd4000000, alpha2: 0, phi: 0};
    send(th);
    // three random sets back to back
    for (int i = 0; i < 3; i++) send(rand_theta());
    wait (cur == 4);
    check(saturations >= 1, "saturated output seen");
    check(valid_cycles == 4 * BEATS && last_valid - first_valid + 1 == 4 * BEATS,
          "four chirplets in 4*128 consecutive clocks");
    // random back-pressure
    random_ready = 1;
    for (int i = 0; i < 4; i++) send(rand_theta());
    wait (cur == 8);
    repeat (10) @(posedge clk);
    check(stalls > 0, "back-pressure exercised");
    check(!busy && !out.valid, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
