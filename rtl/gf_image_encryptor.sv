// gf_image_encryptor: spatial-domain image encryptor built on a GF(2^8)
// multiplier, for a 128 x 128 8-bit grayscale image.
//
// Every pixel p is replaced by the field product p * k mod x^8+x^4+x^3+x+1.
// In fixed-key mode (variable_key = 0) k is the 8-bit key input for all
// pixels. In variable-key mode (variable_key = 1) the key input seeds an
// 8-cell hybrid cellular automaton (rules 90-90-150-90-150-90-150-90) that
// steps once per pixel, and k is the automaton's state XORed (even pixel) or
// XNORed (odd pixel) with p itself, so identical pixels in different places
// no longer map to identical cipher values.
//
// Blocks: image_store (secret image, asynchronous read), ca_keygen,
// enc_datapath (key_mix + gf_mult + registers), enc_ctrl (sequencer) and
// cipher_ram (encrypted image, registered read).
//
// Interface:
//   load_we/load_addr/load_data  write the secret image (only while !busy)
//   start, variable_key, key     begin an encryption; mode and key sampled
//                                at start (key must be non-zero in
//                                variable-key mode, or every key is 0)
//   busy, done                   done stays high from the end of a run
//                                until the next start
//   rd_addr/rd_data              read the encrypted image, one clock latency
// Timing: 3 cycles per pixel in fixed-key mode (49152 for the full image),
// 4 in variable-key mode (65536), counted from the start edge to done.
// The modes, cycle budgets and arithmetic follow the design description;
// the load and readback ports and the start/done handshake are this
// implementation's own.
module gf_image_encryptor #(
  parameter int unsigned IMG_W = gf_enc_pkg::IMG_W,
  parameter int unsigned IMG_H = gf_enc_pkg::IMG_H,
  localparam int unsigned NPIX_P = IMG_W * IMG_H,
  localparam int unsigned AW     = $clog2(NPIX_P)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          variable_key,
  input  logic [7:0]    key,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [7:0]    load_data,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data,
  output logic          busy,
  output logic          done
);

  logic          ca_load, ca_step, rd_en, mult_en, wr_en, xnor_sel, mode_var;
  logic [AW-1:0] addr;
  logic [7:0]    ca_key, pixel, cipher;

  enc_ctrl #(.NPIX_P(NPIX_P)) u_ctrl (
    .clk, .rst_n, .start, .variable_key,
    .ca_load, .ca_step, .rd_en, .mult_en, .wr_en, .xnor_sel,
    .addr, .busy, .done, .mode_variable(mode_var)
  );

  ca_keygen u_ca (
    .clk, .rst_n,
    .load (ca_load),
    .seed (key),
    .step (ca_step),
    .key  (ca_key)
  );

  image_store #(.DEPTH(NPIX_P)) u_img (
    .clk,
    .we    (load_we),
    .waddr (load_addr),
    .wdata (load_data),
    .raddr (addr),
    .rdata (pixel)
  );

  enc_datapath u_dp (
    .clk, .rst_n,
    .variable_key (mode_var),
    .ca_key, .pixel, .xnor_sel, .rd_en, .mult_en,
    .cipher
  );

  cipher_ram #(.DEPTH(NPIX_P)) u_ram (
    .clk,
    .we    (wr_en),
    .waddr (addr),
    .wdata (cipher),
    .raddr (rd_addr),
    .rdata (rd_data)
  );

  // The secret image may not change under a running encryption.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !load_we);

endmodule
