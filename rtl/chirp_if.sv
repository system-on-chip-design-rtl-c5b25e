// Multi-lane chirplet sample stream.
//
// One beat carries LANES consecutive samples of one chirplet: lane l of beat
// idx is sample idx*LANES + l. The beat with idx == 0 starts a chirplet and
// the beat with last == 1 ends it. Transfer happens on a clock edge with
// valid && ready; a source keeps the beat stable while valid && !ready.
// The chirplet generator drives this bundle into the mode switch, which
// passes it on to the cross-correlator or to the symbol decomposer.
interface chirp_if #(
  parameter int unsigned LANES    = 4,
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned IDX_W    = 7
) (
  input logic clk,
  input logic rst_n
);
  logic signed [SAMPLE_W-1:0] data [LANES];
  logic [IDX_W-1:0]           idx;
  logic                       last;
  logic                       valid;
  logic                       ready;

  modport src (output data, idx, last, valid, input ready);
  modport snk (input data, idx, last, valid, output ready);

  // A beat that is offered stays offered, unchanged, until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   valid && !ready |=> valid && $stable(idx) && $stable(last));
endinterface
