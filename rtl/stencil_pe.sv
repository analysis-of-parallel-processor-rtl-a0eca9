// stencil_pe: one processing element of the explicit time-marching pipeline.
//
// The element advances one option's price grid by one time step with the
// three-point stencil u_k' = a_k*u_{k-1} + b_k*u_k + c_k*u_{k+1}. Grid points arrive
// as a stream, one per valid cycle, in increasing k; each carries its own a_k, b_k,
// c_k and first/last markers. A two-entry FIFO holds u_{k-1} and
// u_k; when u_{k+1} arrives on the input, the new u_k is computed from the two held
// points and the arriving one (multiply-add in the configured format, evaluated as
// (a*u_{k-1} + b*u_k) + c*u_{k+1}) and registered. The result leaves with the
// coefficients of the same k, so the output stream has the same format as the
// input and a further element can be stacked behind it to advance the next time
// step (systolic stacking).
//
// Timing: for a gap-free input stream every point leaves 2 cycles after it was
// presented: it waits one cycle in the FIFO for its right neighbour, then spends one
// cycle in the output register. A stack of P elements therefore delays the stream
// by 2*P cycles. The last point of a grid has no right neighbour; it is sent from a
// tail register one cycle after it arrived, in the slot that the next grid's first
// point leaves free (a first point produces no output). Grids of different options
// may follow each other back to back, and idle cycles between points are allowed.
//
// Boundaries (this design's choice): the first and last point of each grid are
// held fixed, i.e. the Dirichlet values pass through unchanged. Grids need K >= 2.
//
// Number format: EW/MW (binary32 by default, binary64 with EW = 11, MW = 52). A
// stream word is {u, a, b, c, first, last}, u in the top W bits.
module stencil_pe
  import bs_pkg::*;
#(
  parameter int unsigned EW = FP32_EW,
  parameter int unsigned MW = FP32_MW,
  localparam int unsigned W  = 1 + EW + MW,
  localparam int unsigned EL = elem_width(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [EL-1:0] in_elem,
  output logic          out_valid,
  output logic [EL-1:0] out_elem
);

  typedef struct packed {
    logic [W-1:0] u;
    logic [W-1:0] a;
    logic [W-1:0] b;
    logic [W-1:0] c;
    logic         first;
    logic         last;
  } elem_t;

  elem_t        in_e, out_e;
  elem_t        h_prv, h_cur;             // FIFO: u_{k-1}, u_k
  elem_t        tail;
  logic         tail_pend;
  logic [W-1:0] p_a, p_b, p_c, s_ab, u_new;
  logic         fire;

  assign in_e     = in_elem;
  assign out_elem = out_e;

  fp_mul #(.EW(EW), .MW(MW)) m_a (.a(h_cur.a), .b(h_prv.u), .y(p_a));
  fp_mul #(.EW(EW), .MW(MW)) m_b (.a(h_cur.b), .b(h_cur.u), .y(p_b));
  fp_mul #(.EW(EW), .MW(MW)) m_c (.a(h_cur.c), .b(in_e.u),  .y(p_c));
  fp_add #(.EW(EW), .MW(MW)) s_1 (.a(p_a),  .b(p_b), .sub(1'b0), .y(s_ab));
  fp_add #(.EW(EW), .MW(MW)) s_2 (.a(s_ab), .b(p_c), .sub(1'b0), .y(u_new));

  // The held point h_cur is complete once its right neighbour of the same grid
  // arrives; a grid's first point has no left part to complete.
  assign fire = in_valid && !in_e.first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_prv     <= '0;
      h_cur     <= '0;
      tail      <= '0;
      tail_pend <= 1'b0;
      out_valid <= 1'b0;
      out_e     <= '0;
    end else begin
      if (in_valid) begin
        h_prv <= h_cur;
        h_cur <= in_e;
      end
      tail_pend <= in_valid && in_e.last;
      if (in_valid && in_e.last) tail <= in_e;
      if (fire) begin
        out_valid <= 1'b1;
        out_e     <= h_cur;
        if (!h_cur.first) out_e.u <= u_new;
      end else if (tail_pend) begin
        out_valid <= 1'b1;
        out_e     <= tail;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

  // A grid's last point is sent when the next grid's first point arrives (or in an
  // idle cycle), which never produces a result of its own: no collision.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(fire && tail_pend));

endmodule
