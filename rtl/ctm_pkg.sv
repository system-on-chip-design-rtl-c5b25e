// Shared types and constants of the chirplet transform module (CTM).
//
// A chirplet is described by six parameters, theta = [beta, tau, fc, alpha1,
// alpha2, phi]: amplitude, time of arrival, centre frequency, envelope
// bandwidth factor, chirp rate and phase. The parameter set and its order are
// the ones the CTM register block carries; the fixed-point encoding of each
// word is this design's own choice, listed below:
//
//   beta   unsigned Q1.15 in bits [15:0]      amplitude (1.0 = 0x8000)
//   tau    unsigned Q16.16                    arrival time in samples
//   fc     unsigned Q0.32                     cycles per sample
//   alpha1 unsigned Q0.32                     envelope factor, 1/sample^2
//   alpha2 signed   Q0.32                     chirp rate, cycles/sample^2
//   phi    unsigned Q0.32                     phase in cycles (turns)
//
// With t the sample index, a chirplet sample is
//   beta * exp(-alpha1*(t-tau)^2) * cos(2*pi*(fc*(t-tau) + alpha2*(t-tau)^2 + phi)).
package ctm_pkg;

  localparam int unsigned PARAM_W = 32;   // width of one chirplet parameter word
  localparam int unsigned AXIL_AW = 6;    // byte address bits of the register block
  localparam int unsigned AXIL_DW = 32;

  typedef struct packed {
    logic [PARAM_W-1:0] beta;
    logic [PARAM_W-1:0] tau;
    logic [PARAM_W-1:0] fc;
    logic [PARAM_W-1:0] alpha1;
    logic [PARAM_W-1:0] alpha2;
    logic [PARAM_W-1:0] phi;
  } theta_t;

  localparam int unsigned THETA_W = $bits(theta_t);

  // Register map (byte offsets) of the AXI-Lite register interface.
  typedef enum logic [AXIL_AW-1:0] {
    REG_BETA   = 6'h00,
    REG_TAU    = 6'h04,
    REG_FC     = 6'h08,
    REG_ALPHA1 = 6'h0C,
    REG_ALPHA2 = 6'h10,
    REG_PHI    = 6'h14,   // writing phi pushes the staged theta into the parameter FIFO
    REG_CTRL   = 6'h18,   // bit 0: in_estimation (1 = cross-correlate, 0 = output chirplet)
    REG_STATUS = 6'h1C,   // read only, see ctm_regs
    REG_RESULT = 6'h20    // read only, reading pops one |CT| value
  } reg_addr_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_SLVERR = 2'b10
  } axi_resp_e;

endpackage
