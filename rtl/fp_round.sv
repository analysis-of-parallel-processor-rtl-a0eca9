// fp_round: rounding and packing stage shared by the floating-point units.
//
// Takes an unrounded result - sign, biased exponent of the leading significand
// bit (signed, may be out of range), the (MW+1)-bit significand with its leading
// one in the top bit, and the guard, round and sticky bits below it - and returns
// the IEEE-754 word with EW exponent and MW fraction bits (binary32 by default,
// binary64 with EW = 11, MW = 52). Rounding is to nearest, ties to even; a carry
// out of the significand bumps the exponent. Results below the normal range are
// flushed to signed zero, results above it become infinity.
// Purely combinational.
module fp_round #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic                 sgn,
  input  logic signed [EW+3:0] exp,
  input  logic [MW:0]          sig,
  input  logic [2:0]           grs,
  output logic [EW+MW:0]       y
);

  localparam logic signed [EW+3:0] EMAX = (EW + 4)'((1 << EW) - 1);

  logic [MW+1:0]        rsig;
  logic signed [EW+3:0] e;
  logic                 up;

  always_comb begin
    up   = grs[2] & (grs[1] | grs[0] | sig[0]);
    rsig = {1'b0, sig} + {{(MW + 1){1'b0}}, up};
    e    = exp;
    if (rsig[MW+1]) begin
      rsig = rsig >> 1;
      e    = e + $signed((EW + 4)'(1));
    end
    if (sig == '0 || e <= 0)  y = {sgn, {(EW + MW){1'b0}}};
    else if (e >= EMAX)       y = {sgn, {EW{1'b1}}, {MW{1'b0}}};
    else                      y = {sgn, e[EW-1:0], rsig[MW-1:0]};
  end

endmodule
