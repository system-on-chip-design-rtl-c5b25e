// Self-checking test of sync_fifo at its default depth of 128.
// Fills the FIFO to full (a 129th write must be refused), drains it and
// compares the order against a queue model, then runs random simultaneous
// reads and writes, checking data, valid/ready and count every clock.
module tb_sync_fifo;
  localparam int W = 16, D = 128;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] wr_data, rd_data;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int max_seen = 0, full_refusals = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one clock of traffic; compares against the model before the edge
  task automatic step(input bit w, input bit r);
    wr_valid = w;
    rd_ready = r; wr_data = W'($urandom);
    #1;
    check(count == model.size(), "count");
    check(wr_ready == (model.size() < D), "wr_ready");
    check(rd_valid == (model.size() > 0), "rd_valid");
    if (model.size() > 0) check(rd_data == model[0], "rd_data order");
    @(posedge clk);
    if (w && model.size() == D) full_refusals++;
    if (r && model.size() > 0) void'(model.pop_front());
    if (w && wr_ready) model.push_back(wr_data);
    if (model.size() > max_seen) max_seen = model.size();
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < D + 3; i++) step(1, 0);
    check(max_seen == D, "reached full depth");
    check(full_refusals == 3, "writes refused when full");
    for (int i = 0; i < D + 3; i++) step(0, 1);
    check(model.size() == 0, "drained");
    for (int i = 0; i < 5000; i++) step($urandom_range(0, 99) < 60, $urandom_range(0, 99) < 50);
    for (int i = 0; i < 5000; i++) step($urandom_range(0, 99) < 40, $urandom_range(0, 99) < 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
