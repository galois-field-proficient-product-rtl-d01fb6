// image_store: the secret image, DEPTH pixels of 8 bits (128 x 128 by default).
//
// The encryptor reads it through an asynchronous read port, so the pixel of
// the current address is available in the same cycle, as from a table held
// in logic. A synchronous write port loads the image before encryption. In
// the original design the image was compiled into the device; the load port
// is this implementation's replacement for that, so that any image can be
// encrypted without rebuilding. Nothing is reset: the image must be loaded
// before it is read.
//
// Interface: we/waddr/wdata write one pixel per clock; raddr/rdata read.
module image_store #(
  parameter int unsigned DEPTH = gf_enc_pkg::NPIX,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
