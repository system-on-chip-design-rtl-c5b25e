// Symbol expander: measured-signal AXI-Stream into a multi-lane signal buffer.
//
// The measured (windowed) ultrasonic signal arrives from a DMA as an
// AXI-Stream, one sample per transfer. Every chirplet is correlated against
// the same signal, so it is stored once: sample i goes to bank i mod LANES,
// row i / LANES. The cross-correlator then reads one row, LANES consecutive
// samples, per clock, matching the generator's lanes. The block's place and
// name come from the CTM diagram; the banked buffer, one SAMPLE_W-bit sample
// per stream word and the TLAST handling are this design's choices.
//
// Interface: s_axis_* is an AXI-Stream slave that is always ready. TLAST, or
// the N_SAMPLES-th sample, ends a signal: the write position returns to 0
// and `loaded` is set. A new signal overwrites the old one sample by sample,
// so it should be sent while no correlation is running. rd_row/rd_data is a
// synchronous read port: rd_data holds row rd_row one clock after rd_en.
module symbol_expander #(
  parameter int unsigned N_SAMPLES = 512,
  parameter int unsigned LANES     = 4,
  parameter int unsigned SAMPLE_W  = 16,
  localparam int unsigned ROWS     = N_SAMPLES / LANES,
  localparam int unsigned ROW_W    = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [SAMPLE_W-1:0]        s_axis_tdata,
  input  logic                       s_axis_tvalid,
  output logic                       s_axis_tready,
  input  logic                       s_axis_tlast,
  input  logic                       rd_en,
  input  logic [ROW_W-1:0]           rd_row,
  output logic signed [SAMPLE_W-1:0] rd_data [LANES],
  output logic                       loaded
);
  localparam int unsigned PW = $clog2(N_SAMPLES);
  localparam int unsigned LW = PW - ROW_W;   // LANES is a power of two

  logic [PW-1:0] wpos_q;
  logic          wr, end_sig;

  assign s_axis_tready = 1'b1;
  assign wr            = s_axis_tvalid;
  assign end_sig       = wr && (s_axis_tlast || wpos_q == PW'(N_SAMPLES-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wpos_q <= '0;
      loaded <= 1'b0;
    end else if (wr) begin
      wpos_q <= end_sig ? '0 : wpos_q + 1'b1;
      if (end_sig)         loaded <= 1'b1;
      else if (wpos_q == '0) loaded <= 1'b0;
    end
  end

  for (genvar b = 0; b < LANES; b++) begin : g_bank
    logic signed [SAMPLE_W-1:0] mem [ROWS];
    always_ff @(posedge clk) begin
      if (wr && wpos_q[LW-1:0] == LW'(b)) mem[wpos_q[PW-1:PW-ROW_W]] <= s_axis_tdata;
      if (rd_en) rd_data[b] <= mem[rd_row];
    end
  end
endmodule
