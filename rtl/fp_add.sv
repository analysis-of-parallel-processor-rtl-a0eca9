// fp_add: combinational IEEE-754 adder/subtractor, y = a + b or y = a - b (sub = 1).
//
// Format: EW exponent and MW fraction bits, binary32 by default (EW = 8, MW = 23),
// binary64 with EW = 11, MW = 52. The operand with the larger magnitude is kept,
// the other is aligned to it by a right shift that folds the shifted-out bits into
// a sticky bit, the significands are added or subtracted, the sum is renormalised
// (leading-zero count after a cancellation) and fp_round rounds to nearest-even.
// Subnormals are flushed to zero; operands are assumed finite. These choices are
// this design's own: the arithmetic operators themselves are not specified.
// Interface: a, b, sub in; y out, no clock. The solvers put registers around it.
module fp_add #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23,
  localparam int unsigned W  = 1 + EW + MW,
  localparam int unsigned SW = MW + 4             // significand + guard, round, sticky
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);

  logic          sa, sb, sx, sy;
  logic [EW-1:0] ea, eb, ex, ey, d;
  logic [MW:0]   ma, mb;
  logic [SW-1:0] mx, my, my_sh, norm;
  logic [SW:0]   sum;
  logic [$clog2(SW)-1:0] lz;
  logic signed [EW+3:0]  e;
  logic [W-1:0]  y_r;

  always_comb begin
    sa = a[W-1];
    sb = b[W-1] ^ sub;
    ea = a[W-2:MW];
    eb = b[W-2:MW];
    ma = (ea == '0) ? '0 : {1'b1, a[MW-1:0]};
    mb = (eb == '0) ? '0 : {1'b1, b[MW-1:0]};
    // Order by magnitude.
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = {ma, 3'b000};
      sy = sb; ey = eb; my = {mb, 3'b000};
    end else begin
      sx = sb; ex = eb; mx = {mb, 3'b000};
      sy = sa; ey = ea; my = {ma, 3'b000};
    end
    d = ex - ey;
    if (d >= EW'(SW)) my_sh = {{(SW - 1){1'b0}}, |my};
    else              my_sh = (my >> d) | {{(SW - 1){1'b0}}, |(my & ((SW'(1) << d) - SW'(1)))};

    e    = $signed({4'd0, ex});
    norm = '0;
    lz   = '0;
    if (sx == sy) begin
      sum = {1'b0, mx} + {1'b0, my_sh};
      if (sum[SW]) begin
        norm = {sum[SW:2], sum[1] | sum[0]};
        e    = e + $signed((EW + 4)'(1));
      end else begin
        norm = sum[SW-1:0];
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my_sh};
      // Leading-zero count of the difference: the highest set bit wins.
      for (int i = 0; i < SW; i++) begin
        if (sum[i]) lz = ($clog2(SW))'(SW - 1 - i);
      end
      norm = sum[SW-1:0] << lz;
      e    = e - $signed((EW + 4)'(lz));
    end
  end

  fp_round #(.EW(EW), .MW(MW)) u_round (
    .sgn(sx), .exp(e), .sig(norm[SW-1:3]), .grs(norm[2:0]), .y(y_r)
  );

  always_comb begin
    if (ma == '0 && mb == '0) y = {sa & sb, {(W - 1){1'b0}}};
    else if (norm == '0)      y = '0;
    else                      y = y_r;
  end

endmodule
