// Self-checking test of chirp_demux.
// Chirplets of 4 beats are sent with in_estimation set at random, and the
// mode bit is also toggled in the middle of chirplets. Each chirplet must
// arrive whole at the destination selected at its first beat (1: xcorr,
// 0: decomp), with its data unchanged, and never at the other one; ready
// must come from the selected destination. Both sinks apply random
// back-pressure.
module tb_chirp_demux;
  localparam int L = 4, SW = 16, BEATS = 4;
  logic clk = 0, rst_n = 0;
  logic in_estimation;
  int checks = 0, failures = 0, to_x = 0, to_d = 0, mid_toggles = 0;
  bit cur_sel;
  logic [SW-1:0] cur_d0;

  chirp_if #(.LANES(L), .SAMPLE_W(SW), .IDX_W(2)) in (.clk, .rst_n);
  chirp_if #(.LANES(L), .SAMPLE_W(SW), .IDX_W(2)) to_xcorr (.clk, .rst_n);
  chirp_if #(.LANES(L), .SAMPLE_W(SW), .IDX_W(2)) to_decomp (.clk, .rst_n);
  chirp_demux dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk) begin
    to_xcorr.ready  <= ($urandom_range(0, 99) < 60);
    to_decomp.ready <= ($urandom_range(0, 99) < 60);
  end

  // combinational checks just before each edge
  always @(posedge clk) if (rst_n && in.valid) begin
    check(to_xcorr.valid == cur_sel && to_decomp.valid == !cur_sel, "routing");
    check(in.ready == (cur_sel ? to_xcorr.ready : to_decomp.ready), "ready from selected sink");
    if (cur_sel) check(to_xcorr.data[0] == cur_d0 && to_xcorr.idx == in.idx && to_xcorr.last == in.last, "xcorr data");
    else         check(to_decomp.data[3] == in.data[3] && to_decomp.idx == in.idx && to_decomp.last == in.last, "decomp data");
    if (in.ready) begin if (cur_sel) to_x++; else to_d++; end
  end

  task automatic send_chirplet();
    in_estimation = 1'($urandom);
    cur_sel = in_estimation;
    for (int b = 0; b < BEATS; b++) begin
      for (int l = 0; l < L; l++) in.data[l] = SW'($urandom);
      cur_d0 = in.data[0];
      in.idx = 2'(b); in.last = (b == BEATS - 1); in.valid = 1;
      if (b == 1 && $urandom_range(0, 1) == 1) begin in_estimation = !in_estimation; mid_toggles++; end
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
    in.valid = 0; in.idx = 0; in.last = 0; in_estimation = 1;
    for (int l = 0; l < L; l++) in.data[l] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 200; i++) send_chirplet();
    check(to_x > 0 && to_d > 0 && mid_toggles > 0, "both paths and mid-chirplet toggles used");
    check(to_x + to_d == 200 * BEATS, "every beat delivered once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
