// Chirplet Transform Module (CTM): the programmable-logic part of a
// system-on-chip for chirplet signal decomposition of ultrasonic echoes.
//
// The processor runs the decomposition loop: it buffers and windows the
// measured signal, searches for the chirplet parameters that best match the
// strongest echo, and subtracts each found chirplet from the signal. The two
// costly inner operations run here: generating a chirplet from its six
// parameters and correlating it with the windowed signal. The CTM has three
// bus ports:
//   - an AXI4-Lite register port (ctm_regs) for parameters, mode, status and
//     |CT| results;
//   - an AXI-Stream slave for the measured signal (from a DMA), stored by the
//     symbol expander;
//   - an AXI-Stream master for the estimated chirplet (to a DMA), used in
//     feedback mode.
// Inside, a parameter FIFO feeds the chirplet generator; the mode switch
// sends its samples either to the cross-correlator, whose |CT| results go
// into a result FIFO, or to the symbol decomposer and the output stream. This
// structure, the six parameters, the two FIFOs and their depth of 128, the
// 512-sample chirplet and the register-port use are the document's; lane
// count, sample width, number formats and the register map are this
// design's own choices (see the submodules).
//
// Timing: in correlation mode one chirplet takes N_SAMPLES/LANES clocks
// (128 at the defaults) and chirplets queued in the parameter FIFO run back
// to back; each |CT| reaches the result FIFO about 10 clocks after its last
// samples are generated. In feedback mode the output stream carries one
// sample per clock.
module chirplet_transform
  import ctm_pkg::*;
#(
  parameter int unsigned N_SAMPLES  = 512,
  parameter int unsigned LANES      = 4,
  parameter int unsigned SAMPLE_W   = 16,
  parameter int unsigned FIFO_DEPTH = 128,
  parameter int unsigned RES_W      = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite register interface
  input  logic [AXIL_AW-1:0]  s_axil_awaddr,
  input  logic                s_axil_awvalid,
  output logic                s_axil_awready,
  input  logic [AXIL_DW-1:0]  s_axil_wdata,
  input  logic [3:0]          s_axil_wstrb,
  input  logic                s_axil_wvalid,
  output logic                s_axil_wready,
  output logic [1:0]          s_axil_bresp,
  output logic                s_axil_bvalid,
  input  logic                s_axil_bready,
  input  logic [AXIL_AW-1:0]  s_axil_araddr,
  input  logic                s_axil_arvalid,
  output logic                s_axil_arready,
  output logic [AXIL_DW-1:0]  s_axil_rdata,
  output logic [1:0]          s_axil_rresp,
  output logic                s_axil_rvalid,
  input  logic                s_axil_rready,
  // measured signal, AXI-Stream slave
  input  logic [SAMPLE_W-1:0] s_axis_tdata,
  input  logic                s_axis_tvalid,
  output logic                s_axis_tready,
  input  logic                s_axis_tlast,
  // estimated chirplet, AXI-Stream master
  output logic [SAMPLE_W-1:0] m_axis_tdata,
  output logic                m_axis_tvalid,
  input  logic                m_axis_tready,
  output logic                m_axis_tlast
);
  localparam int unsigned ROWS  = N_SAMPLES / LANES;
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH) + 1;

  // register block <-> FIFOs
  theta_t           reg_theta, fifo_theta;
  logic             reg_theta_valid, reg_theta_ready;
  logic             fifo_theta_valid, gen_theta_ready;
  logic [CNT_W-1:0] param_count, result_count;
  logic [RES_W-1:0] xc_res, fifo_res;
  logic             xc_res_valid, xc_res_ready;
  logic             fifo_res_valid, reg_res_ready;
  logic             in_estimation, sig_loaded, gen_busy;

  // signal buffer read port
  logic                       sig_rd_en;
  logic [ROW_W-1:0]           sig_rd_row;
  logic signed [SAMPLE_W-1:0] sig_rd_data [LANES];

  chirp_if #(.LANES(LANES), .SAMPLE_W(SAMPLE_W), .IDX_W(ROW_W)) gen_s   (.clk, .rst_n);
  chirp_if #(.LANES(LANES), .SAMPLE_W(SAMPLE_W), .IDX_W(ROW_W)) xc_s    (.clk, .rst_n);
  chirp_if #(.LANES(LANES), .SAMPLE_W(SAMPLE_W), .IDX_W(ROW_W)) dec_s   (.clk, .rst_n);

  ctm_regs #(.CNT_W(CNT_W), .RES_W(RES_W)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .theta        (reg_theta),
    .theta_valid  (reg_theta_valid),
    .theta_ready  (reg_theta_ready),
    .param_count  (param_count),
    .result       (fifo_res),
    .result_valid (fifo_res_valid),
    .result_ready (reg_res_ready),
    .result_count (result_count),
    .in_estimation(in_estimation),
    .sig_loaded   (sig_loaded),
    .gen_busy     (gen_busy)
  );

  sync_fifo #(.WIDTH(THETA_W), .DEPTH(FIFO_DEPTH)) u_param_fifo (
    .clk, .rst_n,
    .wr_data (reg_theta),
    .wr_valid(reg_theta_valid),
    .wr_ready(reg_theta_ready),
    .rd_data (fifo_theta),
    .rd_valid(fifo_theta_valid),
    .rd_ready(gen_theta_ready),
    .count   (param_count)
  );

  chirplet_generator #(.N_SAMPLES(N_SAMPLES), .LANES(LANES), .SAMPLE_W(SAMPLE_W)) u_gen (
    .clk, .rst_n,
    .theta      (fifo_theta),
    .theta_valid(fifo_theta_valid),
    .theta_ready(gen_theta_ready),
    .out        (gen_s),
    .busy       (gen_busy)
  );

  chirp_demux u_demux (
    .clk, .rst_n,
    .in_estimation(in_estimation),
    .in           (gen_s),
    .to_xcorr     (xc_s),
    .to_decomp    (dec_s)
  );

  symbol_expander #(.N_SAMPLES(N_SAMPLES), .LANES(LANES), .SAMPLE_W(SAMPLE_W)) u_expander (
    .clk, .rst_n,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .rd_en  (sig_rd_en),
    .rd_row (sig_rd_row),
    .rd_data(sig_rd_data),
    .loaded (sig_loaded)
  );

  xcorr #(.N_SAMPLES(N_SAMPLES), .LANES(LANES), .SAMPLE_W(SAMPLE_W), .RES_W(RES_W)) u_xcorr (
    .clk, .rst_n,
    .in         (xc_s),
    .sig_rd_en  (sig_rd_en),
    .sig_rd_row (sig_rd_row),
    .sig_rd_data(sig_rd_data),
    .res_data   (xc_res),
    .res_valid  (xc_res_valid),
    .res_ready  (xc_res_ready)
  );

  sync_fifo #(.WIDTH(RES_W), .DEPTH(FIFO_DEPTH)) u_result_fifo (
    .clk, .rst_n,
    .wr_data (xc_res),
    .wr_valid(xc_res_valid),
    .wr_ready(xc_res_ready),
    .rd_data (fifo_res),
    .rd_valid(fifo_res_valid),
    .rd_ready(reg_res_ready),
    .count   (result_count)
  );

  symbol_decomp #(.LANES(LANES), .SAMPLE_W(SAMPLE_W)) u_decomp (
    .clk, .rst_n,
    .in           (dec_s),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast
  );
endmodule
