// Cross-correlator ("Xcorr"): chirplet transform value of one chirplet.
//
// For each chirplet it forms CT = sum_t f(t) * psi(t) over the N_SAMPLES
// samples of the stored measured signal f and the generated chirplet psi,
// LANES products per clock, and delivers |CT|, the score the parameter search
// compares. The correlation, the lane parallelism and the |CT| output follow
// the document; the accumulator width, the output scaling and the handshake
// are this design's choices.
//
// How it works: when a beat is accepted its row index addresses the signal
// buffer (synchronous read); one clock later the LANES products are summed
// into a full-precision accumulator, which restarts at beat 0. After the last
// beat |acc| >> 15 (the chirplet samples are Q1.15), saturated to RES_W bits,
// is held in a result register until the result FIFO takes it.
//
// Interface: in is a chirp_if sink; sig_rd_* drives the signal buffer's read
// port; res_* is a valid/ready source. Timing: one beat per clock, result
// valid 2 clocks after the last beat is accepted. Input is refused only while
// a finished result waits for the FIFO. Needs N_SAMPLES/LANES >= 2.
module xcorr #(
  parameter int unsigned N_SAMPLES = 512,
  parameter int unsigned LANES     = 4,
  parameter int unsigned SAMPLE_W  = 16,
  parameter int unsigned RES_W     = 32,
  localparam int unsigned ROWS     = N_SAMPLES / LANES,
  localparam int unsigned ROW_W    = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  chirp_if.snk                       in,
  output logic                       sig_rd_en,
  output logic [ROW_W-1:0]           sig_rd_row,
  input  logic signed [SAMPLE_W-1:0] sig_rd_data [LANES],
  output logic [RES_W-1:0]           res_data,
  output logic                       res_valid,
  input  logic                       res_ready
);
  localparam int unsigned ACC_W = 2 * SAMPLE_W + $clog2(N_SAMPLES) + 1;

  logic                       v1_q, first1_q, last1_q;
  logic signed [SAMPLE_W-1:0] c1_q [LANES];
  logic signed [ACC_W-1:0]    acc_q, acc_nxt, sum;
  logic [ACC_W-1:0]           mag;
  logic                       accept;

  assign in.ready   = !res_valid || res_ready;
  assign accept     = in.valid && in.ready;
  assign sig_rd_en  = accept;
  assign sig_rd_row = ROW_W'(in.idx);

  always_comb begin
    sum = '0;
    for (int l = 0; l < LANES; l++) sum += ACC_W'(c1_q[l] * sig_rd_data[l]);
    acc_nxt = (first1_q ? '0 : acc_q) + sum;
    mag     = acc_nxt[ACC_W-1] ? ACC_W'(-acc_nxt) : ACC_W'(acc_nxt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      first1_q  <= 1'b0;
      last1_q   <= 1'b0;
      acc_q     <= '0;
      res_valid <= 1'b0;
      res_data  <= '0;
    end else begin
      v1_q <= accept;
      if (accept) begin
        first1_q <= (in.idx == '0);
        last1_q  <= in.last;
      end
      if (res_valid && res_ready) res_valid <= 1'b0;
      if (v1_q) begin
        acc_q <= acc_nxt;
        if (last1_q) begin
          res_valid <= 1'b1;
          res_data  <= ((mag >> 15) > ACC_W'({RES_W{1'b1}})) ? {RES_W{1'b1}} : RES_W'(mag >> 15);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) c1_q <= in.data;
  end
endmodule
