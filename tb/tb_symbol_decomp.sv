// Self-checking test of symbol_decomp with 4 lanes.
// Random beats of random chirplets (4 beats each here) are offered with
// random gaps; the AXI-Stream side applies random back-pressure. Every output
// sample is compared with the expected time order (beat b, lane l -> sample
// 4b+l), TLAST must mark exactly the final sample of each chirplet, and with
// no back-pressure the stream must run at one sample per clock.
module tb_symbol_decomp;
  localparam int L = 4, SW = 16, BEATS = 4;
  logic clk = 0, rst_n = 0;
  logic [SW-1:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready, m_axis_tlast;
  int checks = 0, failures = 0, busy_cycles = 0, out_cnt = 0;
  logic [SW-1:0] exp_q [$];
  bit exp_last_q [$];
  bit bp = 0;

  chirp_if #(.LANES(L), .SAMPLE_W(SW), .IDX_W(2)) in (.clk, .rst_n);
  symbol_decomp #(.LANES(L), .SAMPLE_W(SW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk) m_axis_tready <= bp ? ($urandom_range(0, 99) < 50) : 1'b1;

  always @(posedge clk) if (rst_n && m_axis_tvalid && m_axis_tready) begin
    logic [SW-1:0] e; bit el;
    out_cnt++;
    check(exp_q.size() > 0, "unexpected sample");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front(); el = exp_last_q.pop_front();
      check(m_axis_tdata == e, "sample order/value");
      check(m_axis_tlast == el, "tlast");
    end
  end

  task automatic send_chirplet(input bit gaps);
    for (int b = 0; b < BEATS; b++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin in.valid = 0; @(posedge clk); #1; end
      for (int l = 0; l < L; l++) begin
        in.data[l] = SW'($urandom);
        exp_q.push_back(in.data[l]);
        exp_last_q.push_back(b == BEATS - 1 && l == L - 1);
      end
      in.idx = 2'(b); in.last = (b == BEATS - 1); in.valid = 1;
      do @(posedge clk); while (!in.ready);
      #1;
    end
    in.valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, n0;
    in.valid = 0; in.idx = 0; in.last = 0;
    for (int l = 0; l < L; l++) in.data[l] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    check(!m_axis_tvalid, "idle after reset");
    // rate: 3 chirplets = 48 samples in 48 + 1 clocks
    t0 = $time; n0 = out_cnt;
    for (int i = 0; i < 3; i++) send_chirplet(0);
    while (exp_q.size() != 0) @(posedge clk);
    check(out_cnt - n0 == 3 * BEATS * L, "sample count");
    check(($time - t0) / 10 <= 3 * BEATS * L + 1, "one sample per clock");
    bp = 1;
    for (int i = 0; i < 20; i++) send_chirplet(1);
    while (exp_q.size() != 0) @(posedge clk);
    @(posedge clk); #1;
    check(!m_axis_tvalid, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
