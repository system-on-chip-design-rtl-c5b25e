// Symbol decomposer: multi-lane chirplet beats to a one-sample AXI-Stream.
//
// In feedback mode the generated chirplet leaves the CTM as the "estimated
// chirp" stream towards a DMA and the processor. The generator produces
// LANES samples per beat; this block takes one beat at a time and sends its
// samples out one per transfer, lane 0 first, so the stream carries the
// chirplet in time order. TLAST marks the final sample of each chirplet.
// The block's place and name come from the CTM diagram; one sample per
// SAMPLE_W-bit stream word and the single beat buffer are this design's choices.
//
// Interface: in is a chirp_if sink; m_axis_* is an AXI-Stream master.
// Timing: a beat is accepted when the buffer is empty or its last sample is
// leaving, so with m_axis_tready high the output runs at one sample per clock
// and the generator is stalled for LANES-1 of every LANES cycles.
module symbol_decomp #(
  parameter int unsigned LANES    = 4,
  parameter int unsigned SAMPLE_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  chirp_if.snk                in,
  output logic [SAMPLE_W-1:0] m_axis_tdata,
  output logic                m_axis_tvalid,
  input  logic                m_axis_tready,
  output logic                m_axis_tlast
);
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1;

  logic signed [SAMPLE_W-1:0] buf_q [LANES];
  logic                       full_q;
  logic                       last_q;
  logic [LW-1:0]              lane_q;
  logic                       out_fire, final_lane;

  assign out_fire   = m_axis_tvalid && m_axis_tready;
  assign final_lane = (lane_q == LW'(LANES-1));
  assign in.ready   = !full_q || (out_fire && final_lane);

  assign m_axis_tvalid = full_q;
  assign m_axis_tdata  = buf_q[lane_q];
  assign m_axis_tlast  = full_q && last_q && final_lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= 1'b0;
      last_q <= 1'b0;
      lane_q <= '0;
    end else begin
      if (out_fire) lane_q <= final_lane ? '0 : lane_q + 1'b1;
      if (in.valid && in.ready) begin
        full_q <= 1'b1;
        last_q <= in.last;
      end else if (out_fire && final_lane) begin
        full_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in.valid && in.ready) buf_q <= in.data;
  end
endmodule
