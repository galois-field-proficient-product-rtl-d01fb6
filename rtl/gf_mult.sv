// gf_mult: combinational GF(2^8) multiplier, p = a * b mod POLY.
//
// The multiplier bits are scanned from the most significant one down, as in
// shift-and-add (Horner) form: in each of the eight iterations the running
// value is shifted left by one; if that pushes a 1 into bit 8 the reduction
// polynomial is XORed in (subtraction in GF(2)), and then the multiplicand,
// ANDed with the current multiplier bit, is XORed in (addition in GF(2)).
// The iterations are unrolled into one block of logic, so the product is
// ready in the same cycle, matching the single-clock multiplier of the
// design. With the default polynomial 9'h11B, 23h * AAh = 79h.
//
// Interface: a, b are the two field elements, p their product. No clock.
module gf_mult #(
  parameter logic [8:0] POLY = gf_enc_pkg::GF_POLY
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] p
);

  always_comb begin
    logic [8:0] acc;
    acc = '0;
    for (int i = 7; i >= 0; i--) begin
      acc = {acc[7:0], 1'b0};
      if (acc[8]) acc = acc ^ POLY;
      acc[7:0] = acc[7:0] ^ (a & {8{b[i]}});
    end
    p = acc[7:0];
  end

endmodule
