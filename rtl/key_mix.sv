// key_mix: per-pixel key of the variable-key mode.
//
// The key from the cellular automaton is combined with the pixel about to be
// encrypted: by XOR on even pixel positions and by XNOR on odd ones, so the
// operation alternates from one pixel to the next. The result is the key the
// pixel is then multiplied with in GF(2^8). The alternation of XOR and XNOR
// follows the design description; which of the two takes the even pixels is
// this implementation's choice.
//
// Interface: key and pixel in, xnor_sel = 1 selects XNOR, mixed out. No clock.
module key_mix (
  input  logic [7:0] key,
  input  logic [7:0] pixel,
  input  logic       xnor_sel,
  output logic [7:0] mixed
);

  always_comb begin
    mixed = key ^ pixel;
    if (xnor_sel) mixed = ~mixed;
  end

endmodule
