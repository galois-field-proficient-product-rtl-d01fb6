// enc_datapath: the arithmetic pipeline of the image encryptor.
//
// Two register stages sit around the combinational key mixer and GF(2^8)
// multiplier. In the read cycle (rd_en) the pixel coming from the image store
// is captured into pix_q and the working key into key_q: in variable-key mode
// the working key is the automaton's key XORed (even pixel) or XNORed (odd
// pixel) with that same pixel; in fixed-key mode it is the automaton's
// register unchanged, which then simply holds the fixed key. In the multiply
// cycle (mult_en) the product key_q * pix_q is captured into cipher. The
// controller then writes cipher to the encrypted-image RAM. This split of one
// cycle for read+mix and one for multiply follows the cycle budget of the
// design; the register placement is this implementation's choice.
//
// Interface: clk/rst_n (asynchronous active-low reset), variable_key mode,
// ca_key from the key generator, pixel from the image store, xnor_sel,
// rd_en, mult_en; cipher is the registered encrypted pixel.
module enc_datapath (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       variable_key,
  input  logic [7:0] ca_key,
  input  logic [7:0] pixel,
  input  logic       xnor_sel,
  input  logic       rd_en,
  input  logic       mult_en,
  output logic [7:0] cipher
);

  logic [7:0] mixed, pix_q, key_q, product;

  key_mix u_mix (
    .key      (ca_key),
    .pixel    (pixel),
    .xnor_sel (xnor_sel),
    .mixed    (mixed)
  );

  gf_mult u_mult (
    .a (pix_q),
    .b (key_q),
    .p (product)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_q  <= '0;
      key_q  <= '0;
      cipher <= '0;
    end else begin
      if (rd_en) begin
        pix_q <= pixel;
        key_q <= variable_key ? mixed : ca_key;
      end
      if (mult_en) cipher <= product;
    end
  end

endmodule
