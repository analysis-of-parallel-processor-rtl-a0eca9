// fp_mul: combinational IEEE-754 multiplier, y = a * b.
//
// Format: EW exponent and MW fraction bits, binary32 by default, binary64 with
// EW = 11, MW = 52. The (MW+1)x(MW+1)-bit significand product is normalised by at
// most one position, the bits below the kept MW+1 become guard, round and sticky,
// and fp_round rounds to nearest-even. Subnormals are flushed to zero; operands
// are assumed finite (this design's choices).
// Interface: a, b in; y out, no clock.
module fp_mul #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23,
  localparam int unsigned W  = 1 + EW + MW,
  localparam int unsigned PW = 2 * (MW + 1)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam logic signed [EW+3:0] BIAS = (EW + 4)'((1 << (EW - 1)) - 1);

  logic [MW:0]          ma, mb, sig;
  logic [PW-1:0]        p;
  logic signed [EW+3:0] e;
  logic [2:0]           grs;
  logic                 s;
  logic [W-1:0]         y_r;

  always_comb begin
    s  = a[W-1] ^ b[W-1];
    ma = (a[W-2:MW] == '0) ? '0 : {1'b1, a[MW-1:0]};
    mb = (b[W-2:MW] == '0) ? '0 : {1'b1, b[MW-1:0]};
    p  = ma * mb;
    e  = $signed({4'd0, a[W-2:MW]}) + $signed({4'd0, b[W-2:MW]}) - BIAS;
    if (p[PW-1]) begin
      sig = p[PW-1:MW+1];
      grs = {p[MW], p[MW-1], |p[MW-2:0]};
      e   = e + $signed((EW + 4)'(1));
    end else begin
      sig = p[PW-2:MW];
      grs = {p[MW-1], p[MW-2], |p[MW-3:0]};
    end
  end

  fp_round #(.EW(EW), .MW(MW)) u_round (.sgn(s), .exp(e), .sig(sig), .grs(grs), .y(y_r));

  assign y = (ma == '0 || mb == '0) ? {s, {(W - 1){1'b0}}} : y_r;

endmodule
