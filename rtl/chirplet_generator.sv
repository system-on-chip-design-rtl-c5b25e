// Chirplet generator ("Chirp Gen").
//
// Takes one parameter set theta = [beta, tau, fc, alpha1, alpha2, phi] from
// the parameter FIFO and produces the N_SAMPLES samples of the chirplet
//   beta * exp(-alpha1*(t-tau)^2) * cos(2*pi*(fc*(t-tau) + alpha2*(t-tau)^2 + phi))
// for t = 0 .. N_SAMPLES-1, LANES samples per clock. Generating several
// samples per clock in parallel lanes is the point of putting this in
// hardware; the chirplet model and its six parameters are the ones the
// decomposition method uses. Lane count, fixed-point formats (see ctm_pkg),
// table sizes and pipeline depth are this design's own choices.
//
// How it works: each lane computes d = t - tau in Q12.8 (saturated; for
// |t - tau| >= 4096 samples the sample is forced to 0), then d^2, the
// envelope exponent x = alpha1*d^2 and the phase fc*d + alpha2*d^2 + phi in
// turns (modulo 1). exp(-x) is the product of two tables, one for the integer
// part of x (0..15; x >= 16 gives 0) and one for its 8 fractional bits. The
// cosine comes from a 1024-entry table indexed by the top 10 phase bits.
// All tables are computed at elaboration from $exp and $cos. The result is
// scaled by beta and saturated to a signed SAMPLE_W-bit Q1.15 sample.
//
// Interface: theta_* is a valid/ready port to the parameter FIFO; out is a
// chirp_if source. Timing: a pipeline of LAT = 6 stages that stalls as a
// whole when out.ready is low. With out.ready high a chirplet takes
// N_SAMPLES/LANES cycles, and chirplets follow each other without a gap: the
// next theta is taken in the cycle the last beat of the previous one enters
// the pipeline.
module chirplet_generator
  import ctm_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 512,
  parameter int unsigned LANES     = 4,
  parameter int unsigned SAMPLE_W  = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  theta_t theta,
  input  logic   theta_valid,
  output logic   theta_ready,
  chirp_if.src   out,
  output logic   busy       // a set is waiting, being issued or in the pipeline
);
  localparam int unsigned BEATS   = N_SAMPLES / LANES;
  localparam int unsigned IDX_W   = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned LAT     = 6;
  localparam int unsigned COS_B   = 10;
  localparam int unsigned COS_N   = 1 << COS_B;
  localparam int unsigned EXPF_N  = 256;
  localparam int unsigned EXPI_N  = 16;
  localparam real         PI      = 3.14159265358979323846;

  // ---------------------------------------------------------------- tables
  typedef logic signed [15:0] cos_tab_t [COS_N];
  typedef logic [16:0]        expf_tab_t [EXPF_N];
  typedef logic [16:0]        expi_tab_t [EXPI_N];

  // cos(2*pi*i/1024) in Q1.15
  function automatic cos_tab_t mk_cos();
    cos_tab_t t;
    for (int i = 0; i < COS_N; i++)
      t[i] = 16'($rtoi($floor($cos(2.0 * PI * real'(i) / real'(COS_N)) * 32767.0 + 0.5)));
    return t;
  endfunction
  // exp(-i/256) in Q1.16
  function automatic expf_tab_t mk_expf();
    expf_tab_t t;
    for (int i = 0; i < EXPF_N; i++)
      t[i] = 17'($rtoi($floor($exp(-real'(i) / real'(EXPF_N)) * 65536.0 + 0.5)));
    return t;
  endfunction
  // exp(-i) in Q1.16
  function automatic expi_tab_t mk_expi();
    expi_tab_t t;
    for (int i = 0; i < EXPI_N; i++)
      t[i] = 17'($rtoi($floor($exp(-real'(i)) * 65536.0 + 0.5)));
    return t;
  endfunction

  localparam cos_tab_t  COS_TAB  = mk_cos();
  localparam expf_tab_t EXPF_TAB = mk_expf();
  localparam expi_tab_t EXPI_TAB = mk_expi();

  // ---------------------------------------------------------------- issue
  theta_t           th_q;
  logic [IDX_W-1:0] k_q;
  logic             active_q;
  logic             advance;
  logic             issue, issue_last;
  logic             sv [LAT];          // stage valid bits

  assign advance     = !sv[LAT-1] || out.ready;
  assign issue       = active_q && advance;
  assign issue_last  = issue && (k_q == IDX_W'(BEATS-1));
  assign theta_ready = advance && (!active_q || issue_last);
  // busy while a set waits, a chirplet is being issued or beats are in flight
  always_comb begin
    busy = active_q || theta_valid;
    for (int s = 0; s < LAT; s++) busy |= sv[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      k_q      <= '0;
      th_q     <= '0;
    end else begin
      if (issue) k_q <= issue_last ? '0 : k_q + 1'b1;
      if (theta_valid && theta_ready) begin
        th_q     <= theta;
        active_q <= 1'b1;
      end else if (issue_last) begin
        active_q <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- pipeline
  // Per-beat side information travelling with the samples.
  typedef struct packed {
    logic [IDX_W-1:0]   idx;
    logic               last;
    logic [15:0]        beta;
    logic [31:0]        fc;
    logic [31:0]        alpha1;
    logic signed [31:0] alpha2;
    logic [31:0]        phi;
  } side_t;

  side_t side [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT; s++) sv[s] <= 1'b0;
    end else if (advance) begin
      sv[0] <= issue;
      for (int s = 1; s < LAT; s++) sv[s] <= sv[s-1];
    end
  end

  always_ff @(posedge clk) begin
    if (advance) begin
      side[0] <= '{idx: k_q, last: (k_q == IDX_W'(BEATS-1)), beta: th_q.beta[15:0],
                   fc: th_q.fc, alpha1: th_q.alpha1, alpha2: th_q.alpha2, phi: th_q.phi};
      for (int s = 1; s < LAT; s++) side[s] <= side[s-1];
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    // stage 0: d = t - tau (Q12.8, saturated)
    logic signed [20:0] d_q;
    logic               far_q0;
    // stage 1: d^2 and linear phase term
    logic [40:0]        d2_q;
    logic [31:0]        ph_lin_q;
    logic               far_q1;
    // stage 2: exponent split and total phase
    logic [3:0]         xi_q;
    logic [7:0]         xf_q;
    logic               zero_q;
    logic [COS_B-1:0]   ph_q;
    // stage 3: table values
    logic [16:0]        ei_q, ef_q;
    logic signed [15:0] cos_q;
    logic               zero_q3;
    // stage 4: amplitude
    logic [16:0]        amp_q;
    logic signed [15:0] cos_q4;
    // stage 5: output sample
    logic signed [SAMPLE_W-1:0] smp_q;

    // combinational helpers
    logic signed [33:0] d_full;
    logic signed [53:0] lin_full;
    logic [72:0]        x_full;
    logic signed [73:0] quad_full;
    logic [31:0]        ph_tot;
    logic [33:0]        env_full;
    logic [32:0]        amp_full;
    logic signed [33:0] smp_full;
    logic signed [18:0] smp_sh;

    always_comb begin
      // t in Q16.8 minus tau in Q16.8
      d_full    = $signed({10'd0, 16'(k_q * LANES + l), 8'h00}) - $signed({10'd0, th_q.tau[31:8]});
      lin_full  = $signed({1'b0, side[0].fc}) * d_q;
      x_full    = side[1].alpha1 * d2_q;
      quad_full = side[1].alpha2 * $signed({1'b0, d2_q});
      ph_tot    = ph_lin_q + quad_full[47:16] + side[1].phi;
      env_full  = ei_q * ef_q;
      amp_full  = side[3].beta * env_full[32:16];
      smp_full  = $signed({1'b0, amp_q}) * cos_q4;
      smp_sh    = 19'(smp_full >>> 15);
    end

    always_ff @(posedge clk) begin
      if (advance) begin
        // stage 0
        far_q0 <= (d_full >= 34'sd1048576) || (d_full <= -34'sd1048576);
        d_q    <= d_full[20:0];
        // stage 1
        d2_q     <= 41'(d_q * d_q);
        ph_lin_q <= lin_full[39:8];
        far_q1   <= far_q0;
        // stage 2
        zero_q <= far_q1 || (x_full[72:52] != '0);
        xi_q   <= x_full[51:48];
        xf_q   <= x_full[47:40];
        ph_q   <= ph_tot[31:32-COS_B];
        // stage 3
        ei_q    <= EXPI_TAB[xi_q];
        ef_q    <= EXPF_TAB[xf_q];
        cos_q   <= COS_TAB[ph_q];
        zero_q3 <= zero_q;
        // stage 4
        amp_q  <= zero_q3 ? '0 : amp_full[32:16];
        cos_q4 <= cos_q;
        // stage 5
        if (smp_sh > $signed(19'((1 << (SAMPLE_W-1)) - 1)))
          smp_q <= SAMPLE_W'((1 << (SAMPLE_W-1)) - 1);
        else if (smp_sh < -$signed(19'(1 << (SAMPLE_W-1))))
          smp_q <= SAMPLE_W'(-(1 << (SAMPLE_W-1)));
        else
          smp_q <= SAMPLE_W'(smp_sh);
      end
    end

    assign out.data[l] = smp_q;
  end

  assign out.valid = sv[LAT-1];
  assign out.idx   = side[LAT-1].idx;
  assign out.last  = side[LAT-1].last;

endmodule
