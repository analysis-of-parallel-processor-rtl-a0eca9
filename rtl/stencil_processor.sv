// stencil_processor: explicit time-marching processor for the one-factor
// Black-Scholes PDE, u^(n+1)_k = a_k u^(n)_{k-1} + b_k u^(n)_k + c_k u^(n)_{k+1}.
//
// P stencil_pe elements are stacked so that element p computes time step p of a
// pass: the grid of each option is streamed out of the on-chip memory one point per
// cycle, every element advances it by one step, and what leaves the last element is
// P time steps further on and is written back in place. A run of n_passes passes
// therefore advances every stored option by n_passes * P time steps. The OPTS
// options held in memory are streamed back to back in one pass. The coefficient
// arrays a, b, c are set up once per option by the host and travel down the stack
// with the values, so every element sees the coefficients of the point it works on.
//
// Number format: EW/MW, binary32 by default, binary64 with EW = 11, MW = 52.
//
// Memories: four arrays (u, a, b, c) of OPTS*K words, address
// opt*K + k, each with one read and one write port (block-RAM style, registered
// read). The host port (sel: 0 = u, 1 = a, 2 = b, 3 = c) is served only while the
// processor is idle; host_rdata is valid one cycle after the address.
//
// Timing: start (with n_passes >= 1) while idle begins the run; the first point of a
// pass reaches the end of the stack 2*P cycles after it enters (warm-up), the pass
// then delivers one point per cycle, so a pass takes OPTS*K + 2*P + 2 cycles and the
// next one starts once all results are written. done pulses for one cycle at the end.
// Grid points k = 0 and k = K-1 are held fixed (Dirichlet boundaries).
module stencil_processor
  import bs_pkg::*;
#(
  parameter int unsigned P    = 80,     // processing elements (time steps per pass)
  parameter int unsigned K    = 256,    // grid points per option
  parameter int unsigned OPTS = 2,      // options held in memory
  parameter int unsigned EW   = FP32_EW, // exponent bits of the number format
  parameter int unsigned MW   = FP32_MW, // fraction bits of the number format
  localparam int unsigned W     = 1 + EW + MW,
  localparam int unsigned EL    = elem_width(W),
  localparam int unsigned DEPTH = OPTS * K,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host access
  input  logic          host_we,
  input  logic [1:0]    host_sel,
  input  logic [AW-1:0] host_addr,
  input  logic [W-1:0]  host_wdata,
  output logic [W-1:0]  host_rdata,
  // control
  input  logic          start,
  input  logic [15:0]   n_passes,
  output logic          busy,
  output logic          done
);

  logic [W-1:0] u_mem [DEPTH];
  logic [W-1:0] a_mem [DEPTH];
  logic [W-1:0] b_mem [DEPTH];
  logic [W-1:0] c_mem [DEPTH];

  typedef enum logic [1:0] {S_IDLE, S_STREAM, S_DRAIN} state_t;
  state_t state;

  logic [AW-1:0] rd_addr, wr_addr;
  logic [$clog2(K)-1:0] rd_k;
  logic [15:0]   passes_left;
  logic          rd_en, rd_vld, rd_first, rd_last;
  logic [W-1:0]         rd_u, rd_a, rd_b, rd_c;

  logic          s_valid [P+1];
  logic [EL-1:0] s_elem  [P+1];

  assign busy = (state != S_IDLE);
  assign rd_en = (state == S_STREAM);

  // Memories: one synchronous read port (stream or host) and one write port
  // (results or host) each.
  logic [AW-1:0] mem_raddr;
  logic [1:0]    host_sel_q;
  assign mem_raddr = busy ? rd_addr : host_addr;

  always_ff @(posedge clk) begin
    rd_u <= u_mem[mem_raddr];
    rd_a <= a_mem[mem_raddr];
    rd_b <= b_mem[mem_raddr];
    rd_c <= c_mem[mem_raddr];
    if (s_valid[P]) begin
      u_mem[wr_addr] <= s_elem[P][EL-1 -: W];
    end else if (!busy && host_we) begin
      unique case (host_sel)
        2'd0: u_mem[host_addr] <= host_wdata;
        2'd1: a_mem[host_addr] <= host_wdata;
        2'd2: b_mem[host_addr] <= host_wdata;
        default: c_mem[host_addr] <= host_wdata;
      endcase
    end
  end

  always_ff @(posedge clk) host_sel_q <= host_sel;
  always_comb begin
    unique case (host_sel_q)
      2'd0: host_rdata = rd_u;
      2'd1: host_rdata = rd_a;
      2'd2: host_rdata = rd_b;
      default: host_rdata = rd_c;
    endcase
  end

  // Sequencer: stream all points, wait until every result is written, repeat.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rd_addr     <= '0;
      rd_k        <= '0;
      wr_addr     <= '0;
      passes_left <= '0;
      rd_vld      <= 1'b0;
      rd_first    <= 1'b0;
      rd_last     <= 1'b0;
      done        <= 1'b0;
    end else begin
      done     <= 1'b0;
      rd_vld   <= rd_en;
      rd_first <= (rd_k == '0);
      rd_last  <= (rd_k == ($clog2(K))'(K - 1));
      if (s_valid[P]) wr_addr <= (wr_addr == AW'(DEPTH - 1)) ? '0 : wr_addr + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (start && n_passes != 16'd0) begin
            state       <= S_STREAM;
            passes_left <= n_passes;
            rd_addr     <= '0;
            rd_k        <= '0;
            wr_addr     <= '0;
          end
        end
        S_STREAM: begin
          rd_addr <= rd_addr + 1'b1;
          rd_k    <= (rd_k == ($clog2(K))'(K - 1)) ? '0 : rd_k + 1'b1;
          if (rd_addr == AW'(DEPTH - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (s_valid[P] && wr_addr == AW'(DEPTH - 1)) begin
            rd_addr <= '0;
            rd_k    <= '0;
            if (passes_left == 16'd1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              passes_left <= passes_left - 1'b1;
              state       <= S_STREAM;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign s_valid[0] = rd_vld;
  assign s_elem[0]  = {rd_u, rd_a, rd_b, rd_c, rd_first, rd_last};

  for (genvar p = 0; p < P; p++) begin : g_pe
    stencil_pe #(.EW(EW), .MW(MW)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (s_valid[p]),
      .in_elem  (s_elem[p]),
      .out_valid(s_valid[p+1]),
      .out_elem (s_elem[p+1])
    );
  end

  a_no_write_while_streaming_ahead: assert property (@(posedge clk) disable iff (!rst_n)
    s_valid[P] |-> busy);

endmodule
