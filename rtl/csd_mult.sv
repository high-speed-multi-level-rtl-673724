// csd_mult: multiplication of a signed sample by a constant written in
// canonic signed digit (CSD) form, using only shifts and adders.
//
// Each non-zero digit i of the constant contributes a copy of the input with
// i zero bits appended on the right (x * 2^i): the first partial product is
// the input itself, the second has one zero appended, the n-th has n-1 zeros
// appended. Positive digits (POS) are added, negative digits (NEG) are
// subtracted; the partial products are summed in one combinational adder
// chain. Because the masks are parameters, synthesis keeps only the adders
// for the non-zero digits.
//
// Interface: x (IW bits, signed) in, p (IW+SW bits, signed) out, purely
// combinational; p = x * (sum POS[i]*2^i - sum NEG[i]*2^i) exactly.
// The shift-and-add structure follows the CSD scheme; the mask encoding
// of the digits is this design's choice. The masks must be canonic: no
// digit both positive and negative, and no two neighbouring non-zero digits.
module csd_mult #(
  parameter int unsigned   IW  = 16,
  parameter int unsigned   SW  = 4,
  parameter logic [SW-1:0] POS = 4'b1000,
  parameter logic [SW-1:0] NEG = 4'b0010
) (
  input  logic signed [IW-1:0]    x,
  output logic signed [IW+SW-1:0] p
);

  localparam int unsigned OW = IW + SW;
  localparam logic [SW-1:0] NZ = POS | NEG;

  if ((POS & NEG) != '0) begin : gen_chk_overlap
    $error("csd_mult: a digit is both positive and negative");
  end
  if ((NZ & (NZ >> 1)) != '0) begin : gen_chk_canonic
    $error("csd_mult: digits are not canonic (neighbouring non-zero digits)");
  end

  logic signed [OW-1:0] xe;
  assign xe = OW'(x);  // sign-extended input

  always_comb begin
    p = '0;
    for (int i = 0; i < int'(SW); i++) begin
      if (POS[i]) p = p + (xe <<< i);
      if (NEG[i]) p = p - (xe <<< i);
    end
  end

endmodule
