// bs_fpga_top: the two Black-Scholes finite-difference accelerators side by side.
//
// The explicit solver and the implicit solver are separate accelerator
// configurations of the same FPGA; this top holds one array of each so that both
// can be built and simulated from one place:
//   * NEXP stencil_processor instances (explicit time marching, P stacked stencil
//     elements each: 3 processors of 80 elements in single precision, 1 of 85 in
//     double precision),
//   * NIMP thomas_processor instances (implicit time marching with the Thomas
//     algorithm, L = 67 interleaved options each: 11 processors in single
//     precision, 5 in double precision).
// DOUBLE = 0 (default) builds the binary32 configuration, DOUBLE = 1 the binary64
// one; the processor counts and stack depth follow DOUBLE unless overridden.
// Every processor works on its own options and has its own host port and start/done
// handshake, brought out as arrays indexed by processor number; the processors do
// not talk to each other. The host that fills the coefficient and value memories
// and reads back the prices is outside this design.
//
// Interface per processor (see stencil_processor / thomas_processor for timing):
// host_we, host_sel (0 = u, 1 = a, 2 = b, 3 = c), host_addr, host_wdata, host_rdata
// (one cycle after the address), start with the number of passes (explicit, P time
// steps each) or time steps (implicit), busy, and a one-cycle done pulse.
module bs_fpga_top
  import bs_pkg::*;
#(
  parameter bit          DOUBLE = 1'b0,                 // 0: binary32, 1: binary64
  parameter int unsigned NEXP   = DOUBLE ? 1 : 3,       // explicit processors
  parameter int unsigned P      = DOUBLE ? 85 : 80,     // stencil elements per explicit processor
  parameter int unsigned KE     = 256,                  // grid points per option, explicit
  parameter int unsigned OPTS_E = 2,                    // options stored per explicit processor
  parameter int unsigned NIMP   = DOUBLE ? 5 : 11,      // implicit processors
  parameter int unsigned L      = 67,                   // interleaved options per implicit processor
  parameter int unsigned KI     = 256,                  // grid points per option, implicit
  localparam int unsigned EW  = DOUBLE ? FP64_EW : FP32_EW,
  localparam int unsigned MW  = DOUBLE ? FP64_MW : FP32_MW,
  localparam int unsigned W   = 1 + EW + MW,
  localparam int unsigned AWE = $clog2(OPTS_E * KE),
  localparam int unsigned AWI = $clog2(L * KI)
) (
  input  logic             clk,
  input  logic             rst_n,
  // explicit processors
  input  logic [NEXP-1:0]  e_host_we,
  input  logic [1:0]       e_host_sel   [NEXP],
  input  logic [AWE-1:0]   e_host_addr  [NEXP],
  input  logic [W-1:0]     e_host_wdata [NEXP],
  output logic [W-1:0]     e_host_rdata [NEXP],
  input  logic [NEXP-1:0]  e_start,
  input  logic [15:0]      e_n_passes   [NEXP],
  output logic [NEXP-1:0]  e_busy,
  output logic [NEXP-1:0]  e_done,
  // implicit processors
  input  logic [NIMP-1:0]  i_host_we,
  input  logic [1:0]       i_host_sel   [NIMP],
  input  logic [AWI-1:0]   i_host_addr  [NIMP],
  input  logic [W-1:0]     i_host_wdata [NIMP],
  output logic [W-1:0]     i_host_rdata [NIMP],
  input  logic [NIMP-1:0]  i_start,
  input  logic [15:0]      i_n_steps    [NIMP],
  output logic [NIMP-1:0]  i_busy,
  output logic [NIMP-1:0]  i_done
);

  for (genvar e = 0; e < NEXP; e++) begin : g_exp
    stencil_processor #(.P(P), .K(KE), .OPTS(OPTS_E), .EW(EW), .MW(MW)) u_exp (
      .clk       (clk),
      .rst_n     (rst_n),
      .host_we   (e_host_we[e]),
      .host_sel  (e_host_sel[e]),
      .host_addr (e_host_addr[e]),
      .host_wdata(e_host_wdata[e]),
      .host_rdata(e_host_rdata[e]),
      .start     (e_start[e]),
      .n_passes  (e_n_passes[e]),
      .busy      (e_busy[e]),
      .done      (e_done[e])
    );
  end

  for (genvar i = 0; i < NIMP; i++) begin : g_imp
    thomas_processor #(.L(L), .K(KI), .EW(EW), .MW(MW)) u_imp (
      .clk       (clk),
      .rst_n     (rst_n),
      .host_we   (i_host_we[i]),
      .host_sel  (i_host_sel[i]),
      .host_addr (i_host_addr[i]),
      .host_wdata(i_host_wdata[i]),
      .host_rdata(i_host_rdata[i]),
      .start     (i_start[i]),
      .n_steps   (i_n_steps[i]),
      .busy      (i_busy[i]),
      .done      (i_done[i])
    );
  end

endmodule
