// Synchronous first-in first-out buffer.
//
// The CTM wraps its chirplet generator and cross-correlation in two of these:
// one holds chirplet parameter sets written by the processor, the other holds
// cross-correlation results until the processor reads them. Data written first
// is read first. The depth of 128 entries is the document's; a full FIFO
// refuses writes and an empty one refuses reads.
//
// Interface: valid/ready on both sides. A word is written on a clock edge with
// wr_valid && wr_ready and read with rd_valid && rd_ready. rd_data shows the
// oldest word combinationally (first-word fall-through). count gives the
// number of stored words, so a writer knows how many transfers it may make
// without asking again. Storage is a circular array with read and write
// pointers; a write into an empty FIFO is visible on rd_data the next cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_valid,
  input  logic                     rd_ready,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign wr_ready = (count < ($clog2(DEPTH)+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A FIFO never holds more than DEPTH words.
  assert property (@(posedge clk) disable iff (!rst_n) count <= ($clog2(DEPTH)+1)'(DEPTH));
endmodule
