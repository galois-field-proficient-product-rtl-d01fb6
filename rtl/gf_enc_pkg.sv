// gf_enc_pkg: types and constants shared by the GF(2^8) image encryptor.
//
// The pixel is an 8-bit grayscale value and every arithmetic step works in
// GF(2^8) with the reduction polynomial x^8+x^4+x^3+x+1 (9'h11B). The image
// is 128 x 128 pixels, so a pixel address is 14 bits wide. The key generator
// is an 8-cell hybrid cellular automaton whose cells, from the most
// significant bit down, follow rules 90-90-150-90-150-90-150-90; the mask
// below has a 1 for each rule-150 cell. The polynomial, the image size and
// the rule sequence follow the design description; the bit order of the
// rule sequence (first rule on bit 7) is this implementation's choice.
package gf_enc_pkg;

  localparam int unsigned PIX_W    = 8;
  localparam int unsigned IMG_W    = 128;
  localparam int unsigned IMG_H    = 128;
  localparam int unsigned NPIX     = IMG_W * IMG_H;
  localparam logic [8:0]  GF_POLY  = 9'h11B;
  localparam logic [7:0]  CA_RULE150_MASK = 8'b0010_1010;

  typedef logic [PIX_W-1:0] pixel_t;

  // Per-pixel phase of the sequencer.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_KEYGEN = 3'd1,  // variable-key mode only: step the cellular automaton
    ST_READ   = 3'd2,  // read the pixel, mix it with the key
    ST_MULT   = 3'd3,  // GF(2^8) product of pixel and key
    ST_WRITE  = 3'd4,  // store the encrypted pixel
    ST_DONE   = 3'd5
  } ctrl_state_e;

endpackage
