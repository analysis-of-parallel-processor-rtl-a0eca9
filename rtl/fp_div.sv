// fp_div: combinational IEEE-754 divider, y = a / b.
//
// Format: EW exponent and MW fraction bits, binary32 by default, binary64 with
// EW = 11, MW = 52. The significands are divided as integers,
// {ma, MW+3 zero bits} / mb, which gives an (MW+3)- or (MW+4)-bit quotient; a
// non-zero remainder joins the sticky bit and fp_round rounds to nearest-even.
// The implicit solver uses it for the reciprocal r = 1 / (b_i - a_i c*_{i-1}).
// Subnormals are flushed to zero, a zero divisor gives infinity; operands are
// assumed finite (this design's choices).
// Interface: a (dividend), b (divisor) in; y out, no clock.
module fp_div #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23,
  localparam int unsigned W  = 1 + EW + MW,
  localparam int unsigned NW = 2 * MW + 4           // width of the integer dividend
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam logic signed [EW+3:0] BIAS = (EW + 4)'((1 << (EW - 1)) - 1);

  logic [MW:0]          ma, mb, sig;
  logic [NW-1:0]        num, den, q, rem;
  logic signed [EW+3:0] e;
  logic [2:0]           grs;
  logic                 s, inexact;
  logic [W-1:0]         y_r;

  always_comb begin
    s   = a[W-1] ^ b[W-1];
    ma  = (a[W-2:MW] == '0) ? '0 : {1'b1, a[MW-1:0]};
    mb  = (b[W-2:MW] == '0) ? '0 : {1'b1, b[MW-1:0]};
    num = {ma, {(MW + 3){1'b0}}};
    den = {{(MW + 3){1'b0}}, mb};
    q   = (mb == '0) ? '0 : num / den;
    rem = (mb == '0) ? '0 : num % den;
    inexact = (rem != '0);
    e   = $signed({4'd0, a[W-2:MW]}) - $signed({4'd0, b[W-2:MW]}) + BIAS;
    if (q[MW+3]) begin
      sig = q[MW+3:3];
      grs = {q[2], q[1], q[0] | inexact};
    end else begin
      sig = q[MW+2:2];
      grs = {q[1], q[0], inexact};
      e   = e - $signed((EW + 4)'(1));
    end
  end

  fp_round #(.EW(EW), .MW(MW)) u_round (.sgn(s), .exp(e), .sig(sig), .grs(grs), .y(y_r));

  always_comb begin
    if (ma == '0)      y = {s, {(W - 1){1'b0}}};
    else if (mb == '0) y = {s, {EW{1'b1}}, {MW{1'b0}}};
    else               y = y_r;
  end

endmodule
