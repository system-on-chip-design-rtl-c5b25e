// Self-checking test of xcorr at its default size (512 samples, 4 lanes).
// A behavioural signal buffer with a one-clock read answers the
// correlator's row reads. Random chirplets, some at full scale, are
// streamed in; each result is compared
// with |sum f*psi| >> 15 computed in the testbench. Also checked: result
// latency of 2 clocks after the last beat, one beat per clock when the result
// side is ready, and input stalls while a result waits.
module tb_xcorr;
  localparam int N = 512, L = 4, BEATS = N / L, SW = 16;
  logic clk = 0, rst_n = 0;
  logic sig_rd_en;
  logic [6:0] sig_rd_row;
  logic signed [SW-1:0] sig_rd_data [L];
  logic [31:0] res_data;
  logic res_valid, res_ready;
  int checks = 0, failures = 0, stalls = 0, cyc = 0, last_acc_cyc = 0;
  logic signed [SW-1:0] sig [N];
  longint expect_q [$];
  bit random_ready = 0;

  chirp_if #(.LANES(L), .SAMPLE_W(SW), .IDX_W(7)) in (.clk, .rst_n);
  xcorr #(.N_SAMPLES(N), .LANES(L), .SAMPLE_W(SW), .RES_W(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // signal buffer model
  always @(posedge clk) if (sig_rd_en) for (int l = 0; l < L; l++) sig_rd_data[l] <= sig[sig_rd_row * L + l];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in.valid && in.ready && in.last) last_acc_cyc <= cyc;
    if (in.valid && !in.ready) stalls <= stalls + 1;
  end

  always @(negedge clk) res_ready <= random_ready ? ($urandom_range(0, 99) < 10) : 1'b1;

  // result checker
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    longint e;
    check(expect_q.size() > 0, "unexpected result");
    if (expect_q.size() > 0) begin
      e = expect_q.pop_front();
      check(res_data == 32'(e), "result value");
      if (res_data != 32'(e)) $display("  hw=%0d exp=%0d", res_data, e);
    end
  end

  // latency: first clock of res_valid after the last beat is 2 clocks later
  logic rv_d = 0;
  always @(posedge clk) begin
    rv_d <= res_valid;
    if (rst_n && res_valid && !rv_d) check(cyc - last_acc_cyc == 2, "result latency");
  end

  task automatic send_chirplet(input int amp, output int clocks);
    longint acc, m;
    logic signed [SW-1:0] c [N];
    int t0;
    t0 = cyc;
    acc = 0;
    for (int n = 0; n < N; n++) begin
      c[n] = SW'($signed($urandom_range(0, 2 * amp)) - amp);
      acc = acc + longint'(c[n]) * longint'(sig[n]);
    end
    m = acc < 0 ? -acc : acc;
    m = m >>> 15;
    expect_q.push_back(m > 64'hFFFF_FFFF ? 64'hFFFF_FFFF : m);
    for (int b = 0; b < BEATS; b++) begin
      for (int l = 0; l < L; l++) in.data[l] = c[b * L + l];
      in.idx = 7'(b); in.last = (b == BEATS - 1); in.valid = 1;
      do @(posedge clk); while (!in.ready);
      #1;
    end
    in.valid = 0;
    clocks = cyc - t0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int clk_used;
    in.valid = 0; in.last = 0; in.idx = 0;
    for (int l = 0; l < L; l++) in.data[l] = 0;
    for (int n = 0; n < N; n++) sig[n] = SW'($urandom);
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      send_chirplet(i < 2 ? 32767 : 3000, clk_used);
      check(clk_used == BEATS, "one beat per clock");
    end
    random_ready = 1;
    for (int i = 0; i < 6; i++) send_chirplet(i == 0 ? 32767 : 200 * (i + 1), clk_used);
    while (expect_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(stalls > 0, "input stalled behind a waiting result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
