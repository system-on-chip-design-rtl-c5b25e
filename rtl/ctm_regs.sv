// Register block of the CTM, an AXI4-Lite slave.
//
// The processor controls the CTM through these registers: it writes chirplet
// parameter sets, sets the mode bit, checks status and reads |CT| results.
// Parameter sets do not go to the generator directly but into the parameter
// FIFO, so the processor may write up to FIFO-depth sets without first
// asking whether the CTM is ready; results wait in the result FIFO. That use
// of the register bus and of the two FIFOs is the document's; the register
// map and the bit layout are this design's own.
//
// Register map (byte offsets, 32-bit registers):
//   0x00 BETA, 0x04 TAU, 0x08 FC, 0x0C ALPHA1, 0x10 ALPHA2  staged parameters (R/W)
//   0x14 PHI     (R/W) writing it pushes the staged set, with this phi, into
//                the parameter FIFO; if the FIFO is full the set is dropped,
//                the response is SLVERR and the overflow flag is set
//   0x18 CTRL    (R/W) bit 0 in_estimation (1: correlate, 0: output chirplet,
//                reset value 1); writing bit 1 as 1 clears the overflow flag
//   0x1C STATUS  (RO)  [9:0] parameter FIFO fill, [25:16] result FIFO fill,
//                28 signal loaded, 29 overflow, 30 generator busy,
//                31 result available
//   0x20 RESULT  (RO)  reading pops one |CT| from the result FIFO; reading it
//                empty returns 0 with SLVERR
// Other offsets read 0; writes to them are ignored. Both answered OKAY.
//
// Timing: a write is accepted when address and data are both valid and no
// response is pending (awready = wready in that cycle); the response follows
// one clock later. A read is accepted when no read data is pending and its
// data follows one clock later. The FIFO push or pop happens in the
// accepting clock.
module ctm_regs
  import ctm_pkg::*;
#(
  parameter int unsigned CNT_W = 8,
  parameter int unsigned RES_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [AXIL_AW-1:0] s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [AXIL_DW-1:0] s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [AXIL_AW-1:0] s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [AXIL_DW-1:0] s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // to the parameter FIFO
  output theta_t             theta,
  output logic               theta_valid,
  input  logic               theta_ready,
  input  logic [CNT_W-1:0]   param_count,
  // from the result FIFO
  input  logic [RES_W-1:0]   result,
  input  logic               result_valid,
  output logic               result_ready,
  input  logic [CNT_W-1:0]   result_count,
  // control and status
  output logic               in_estimation,
  input  logic               sig_loaded,
  input  logic               gen_busy
);
  theta_t            stage_q;
  logic              overflow_q;
  logic              wr_fire, rd_fire;
  logic [AXIL_DW-1:0] wmask;
  reg_addr_e         waddr, raddr;

  assign waddr = reg_addr_e'({s_axil_awaddr[AXIL_AW-1:2], 2'b00});
  assign raddr = reg_addr_e'({s_axil_araddr[AXIL_AW-1:2], 2'b00});
  assign wmask = {{8{s_axil_wstrb[3]}}, {8{s_axil_wstrb[2]}}, {8{s_axil_wstrb[1]}}, {8{s_axil_wstrb[0]}}};

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [31:0] m);
    return (old & ~m) | (nw & m);
  endfunction

  // ------------------------------------------------------------- write path
  assign wr_fire        = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_fire;
  assign s_axil_wready  = wr_fire;

  always_comb begin
    theta     = stage_q;
    theta.phi = merge(stage_q.phi, s_axil_wdata, wmask);
  end
  assign theta_valid = wr_fire && (waddr == REG_PHI);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q       <= '0;
      in_estimation <= 1'b1;
      overflow_q    <= 1'b0;
      s_axil_bvalid <= 1'b0;
      s_axil_bresp  <= RESP_OKAY;
    end else begin
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axil_bvalid <= 1'b1;
        s_axil_bresp  <= RESP_OKAY;
        unique case (waddr)
          REG_BETA:   stage_q.beta   <= merge(stage_q.beta,   s_axil_wdata, wmask);
          REG_TAU:    stage_q.tau    <= merge(stage_q.tau,    s_axil_wdata, wmask);
          REG_FC:     stage_q.fc     <= merge(stage_q.fc,     s_axil_wdata, wmask);
          REG_ALPHA1: stage_q.alpha1 <= merge(stage_q.alpha1, s_axil_wdata, wmask);
          REG_ALPHA2: stage_q.alpha2 <= merge(stage_q.alpha2, s_axil_wdata, wmask);
          REG_PHI: begin
            stage_q.phi <= theta.phi;
            if (!theta_ready) begin
              overflow_q   <= 1'b1;
              s_axil_bresp <= RESP_SLVERR;
            end
          end
          REG_CTRL: begin
            if (s_axil_wstrb[0]) begin
              in_estimation <= s_axil_wdata[0];
              if (s_axil_wdata[1]) overflow_q <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------- read path
  assign rd_fire        = s_axil_arvalid && !s_axil_rvalid;
  assign s_axil_arready = rd_fire;
  assign result_ready   = rd_fire && (raddr == REG_RESULT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      s_axil_rresp  <= RESP_OKAY;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (rd_fire) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rresp  <= RESP_OKAY;
        s_axil_rdata  <= '0;
        unique case (raddr)
          REG_BETA:   s_axil_rdata <= stage_q.beta;
          REG_TAU:    s_axil_rdata <= stage_q.tau;
          REG_FC:     s_axil_rdata <= stage_q.fc;
          REG_ALPHA1: s_axil_rdata <= stage_q.alpha1;
          REG_ALPHA2: s_axil_rdata <= stage_q.alpha2;
          REG_PHI:    s_axil_rdata <= stage_q.phi;
          REG_CTRL:   s_axil_rdata <= {31'd0, in_estimation};
          REG_STATUS: begin
            s_axil_rdata[9:0]   <= 10'(param_count);
            s_axil_rdata[25:16] <= 10'(result_count);
            s_axil_rdata[28]    <= sig_loaded;
            s_axil_rdata[29]    <= overflow_q;
            s_axil_rdata[30]    <= gen_busy;
            s_axil_rdata[31]    <= result_valid;
          end
          REG_RESULT: begin
            if (result_valid) s_axil_rdata <= AXIL_DW'(result);
            else              s_axil_rresp <= RESP_SLVERR;
          end
          default: ;
        endcase
      end
    end
  end

  // AXI4-Lite: a response, once offered, stays until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
endmodule
