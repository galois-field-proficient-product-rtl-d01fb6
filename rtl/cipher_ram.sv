// cipher_ram: on-chip RAM for the encrypted image, DEPTH x 8 bits
// (16384 x 8 = 131072 bits by default, the memory size of the design).
//
// A simple dual-port RAM in the style of an FPGA block RAM: the encryptor
// writes one encrypted pixel per write cycle through port A, and port B
// reads with one clock of latency (the address is sampled on the clock edge,
// rdata is valid after it). Port B stands in for the in-system memory viewer
// through which the encrypted image was inspected on the board. The RAM is
// not reset.
//
// Interface: we/waddr/wdata (write), raddr/rdata (registered read).
module cipher_ram #(
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
    rdata <= mem[raddr];
  end

endmodule
