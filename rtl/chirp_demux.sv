// Mode switch between cross-correlation and chirplet output.
//
// The generated chirplet goes to one of two places, chosen by the mode bit
// in_estimation: with 1 it is correlated against the measured signal (the
// parameter search), with 0 it leaves the module as the estimated chirplet
// that the processor subtracts from the signal (feedback mode). The two
// destinations and the select bit follow the CTM's block diagram; latching
// the select at the first beat of each chirplet, so that a mode change never
// splits one chirplet between the two paths, is this design's choice. So is
// the position of the output switch: it sits here, ahead of the symbol
// decomposer, rather than behind it, so in correlation mode the decomposer
// sees no beats and cannot hold the generator back.
//
// Interface: in is a chirp_if sink, to_xcorr and to_decomp are chirp_if
// sources. Purely combinational routing of data, valid and ready, plus one
// register for the latched select; no added latency.
module chirp_demux (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_estimation,
  chirp_if.snk  in,
  chirp_if.src  to_xcorr,
  chirp_if.src  to_decomp
);
  logic sel_q;     // select of the chirplet in flight
  logic sel;       // select applied to the current beat

  assign sel = (in.idx == '0) ? in_estimation : sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  sel_q <= 1'b1;
    else if (in.valid && in.ready) sel_q <= sel;
  end

  assign to_xcorr.data  = in.data;
  assign to_xcorr.idx   = in.idx;
  assign to_xcorr.last  = in.last;
  assign to_xcorr.valid = in.valid && sel;

  assign to_decomp.data  = in.data;
  assign to_decomp.idx   = in.idx;
  assign to_decomp.last  = in.last;
  assign to_decomp.valid = in.valid && !sel;

  assign in.ready = sel ? to_xcorr.ready : to_decomp.ready;
endmodule
