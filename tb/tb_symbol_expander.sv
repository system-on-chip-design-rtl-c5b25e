// Self-checking test of symbol_expander at its default size (512 samples,
// 4 lanes). Streams random signals in, with and without gaps in TVALID,
// ended by TLAST or by the 512th sample, then reads every row and checks that
// lane l of row r holds sample 4r+l, one clock after the read. Also checks
// the `loaded` flag and that a short TLAST-ended signal restarts at row 0.
module tb_symbol_expander;
  localparam int N = 512, L = 4, ROWS = N / L, SW = 16;
  logic clk = 0, rst_n = 0;
  logic [SW-1:0] s_axis_tdata;
  logic s_axis_tvalid, s_axis_tready, s_axis_tlast;
  logic rd_en;
  logic [6:0] rd_row;
  logic signed [SW-1:0] rd_data [L];
  logic loaded;
  int checks = 0, failures = 0;
  logic [SW-1:0] ref_sig [N];

  symbol_expander #(.N_SAMPLES(N), .LANES(L), .SAMPLE_W(SW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input int len, input bit use_last, input bit gaps);
    for (int i = 0; i < len; i++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin s_axis_tvalid = 0; @(posedge clk); #1; end
      ref_sig[i] = SW'($urandom);
      s_axis_tdata = ref_sig[i]; s_axis_tvalid = 1; s_axis_tlast = use_last && (i == len - 1);
      check(s_axis_tready, "always ready");
      @(posedge clk); #1;
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
  endtask

  task automatic read_all(input int rows);
    for (int r = 0; r < rows; r++) begin
      rd_en = 1; rd_row = 7'(r);
      @(posedge clk); #1;
      rd_en = 0; rd_row = 7'($urandom);
      for (int l = 0; l < L; l++) check(rd_data[l] == $signed(ref_sig[r * L + l]), "stored sample");
      @(posedge clk); #1;
      for (int l = 0; l < L; l++) check(rd_data[l] == $signed(ref_sig[r * L + l]), "read data held without rd_en");
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    s_axis_tvalid = 0; s_axis_tlast = 0; s_axis_tdata = 0; rd_en = 0; rd_row = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    check(!loaded, "not loaded after reset");
    send(N, 1, 0);
    check(loaded, "loaded after TLAST");
    read_all(ROWS);
    send(N, 0, 1);                 // ended by count, with gaps
    check(loaded, "loaded after 512 samples");
    read_all(ROWS);
    send(1, 0, 0);
    check(!loaded, "loaded clears when a new signal starts");
    send(39, 1, 0);                // finishes a 40-sample signal with TLAST
    check(loaded, "loaded after short signal");
    send(8, 0, 0);                 // next signal restarts at row 0
    read_all(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
