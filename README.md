# GF(2^8) image encryptor

This design encrypts a 128 × 128 grayscale image, one 8-bit pixel at a time,
by multiplying each pixel with a key in the finite field GF(2^8). It is meant
for a small FPGA: the secret image sits in on-chip storage and the encrypted
image is written to a 16384 × 8 block RAM. It runs in one of two modes:

* **Fixed key**: every pixel is multiplied by the same 8-bit key.
  3 clock cycles per pixel, 49 152 cycles per image (0.983 ms at 50 MHz).
* **Variable key** (the main mode): an 8-bit cellular automaton produces a
  fresh key for every pixel. That key is XORed with the pixel (even pixels)
  or XNORed with it (odd pixels), and the pixel is multiplied by the result.
  4 clock cycles per pixel, 65 536 cycles per image (1.311 ms at 50 MHz).

The fixed key has an obvious weakness: equal pixels give equal cipher values,
so a flat background stays flat and the outline of a logo stays visible. The
variable key removes it, because the multiplier changes from pixel to pixel
and depends on the pixel itself.

## GF(2^8) multiplication (`gf_mult`)

Pixels and keys are elements of GF(2^8). Addition is XOR. Multiplication is
polynomial multiplication modulo the irreducible polynomial
x^8 + x^4 + x^3 + x + 1 (binary `1_0001_1011`, 11Bh).

`gf_mult` computes the product in shift-and-add form. It scans the
multiplier `b` from bit 7 down to bit 0. Each of the eight steps does three
things:

1. shift the running value left by one bit;
2. if a 1 moved into bit 8, XOR in 11Bh, which clears bit 8 (reduction);
3. XOR in `a` if the current bit of `b` is 1.

The eight steps are unrolled into one block of combinational logic, so a
product is ready within one clock cycle. It is about 8 AND and 7 XOR word
operations plus seven reduction multiplexers. Here is a worked example,
23h × AAh:

| step | b bit | after shift/reduce | after add |
|------|-------|--------------------|-----------|
| 1 | 1 | 00h | 23h |
| 2 | 0 | 46h | 46h |
| 3 | 1 | 8Ch | AFh |
| 4 | 0 | 15Eh → 45h | 45h |
| 5 | 1 | 8Ah | A9h |
| 6 | 0 | 152h → 49h | 49h |
| 7 | 1 | 92h | B1h |
| 8 | 0 | 162h → 79h | **79h** |

Other products with AAh used as test vectors: 5Fh → 31h, B7h → EFh,
FFh → EBh. The testbench checks all 65 536 operand pairs against a separate
model, a log/antilog table built from the generator 03h. For example,
log 23h = B5h and log AAh = 1Fh, which gives antilog(D4h) = 79h.

## Key generation (`ca_keygen`)

The key generator is an 8-cell hybrid cellular automaton. A **rule-90**
cell's next value is the XOR of its two neighbours. A **rule-150** cell's
next value is the XOR of both neighbours and itself.

* Cell order: the rule sequence is 90-90-150-90-150-90-150-90, from bit 7
  down to bit 0. As a mask, the rule-150 cells are `8'b0010_1010`.
* Boundary: the cells beyond both ends read as 0 (null boundary).

The automaton is linear. With this rule sequence and boundary it has the
maximal period: any non-zero state passes through all 255 non-zero states
before it repeats. The testbench checks this. A zero state stays zero
forever, so the seed must be non-zero.

Two choices here are this implementation's own: the bit order of the rule
sequence and the null boundary. The reversed order also gives period 255. At
start the automaton is loaded from the `key` input. It then takes one step
before each pixel, so pixel *i* uses the state after *i* + 1 steps.

## Per-pixel key and cipher value (`key_mix`, `enc_datapath`)

For pixel *p* at address *i*, the automaton state *s_i* gives:

```
k_i = s_i XOR p         (i even)
k_i = s_i XNOR p        (i odd)
c_i = p · k_i           in GF(2^8)
```

In fixed-key mode, k_i = key for every pixel and c_i = p · key.

`enc_datapath` holds two register stages:

* **Read cycle:** captures the pixel and its working key.
* **Multiply cycle:** captures the product.

In fixed-key mode the automaton is loaded with the key and never stepped, so
its register holds the fixed key. No separate key register is needed.

**Decryption.** Fixed-key encryption is invertible for any non-zero key:
multiply by the inverse of the key. The variable-key mapping is not. Since
p · (s ⊕ p) = p² ⊕ s·p, and squaring is linear over GF(2), the map from p to
c_i is GF(2)-linear. For s ≠ 0 its kernel is {0, s}, so exactly two pixel
values give each cipher value. The XNOR case is the same map with s replaced
by ~s.

A receiver who knows the key stream therefore cannot recover every pixel
uniquely. One bit per pixel is lost unless it is sent separately. This RTL
implements the encryption exactly as specified and includes no decryptor.

## Sequencing and timing (`enc_ctrl`)

The controller walks the addresses 0 … 16383 in row-major order and spends
one cycle per phase:

| mode | phases per pixel | cycles per image |
|------|------------------|------------------|
| fixed key | READ, MULT, WRITE | 16384 × 3 = 49 152 |
| variable key | KEYGEN, READ, MULT, WRITE | 16384 × 4 = 65 536 |

Pixels do not overlap. This keeps to the cycle budget above but is not the
fastest possible schedule: a pipelined version could finish one pixel per
clock.

* `xnor_sel` is the low address bit.
* `start` is accepted in IDLE or DONE. It loads the automaton and latches
  the mode; a `start` while busy is ignored.
* `done` rises exactly 3N or 4N clocks after the accepting edge, where N is
  the number of pixels. It stays high until the next start.

The controller carries assertions on the phase order. The top asserts that
the image is not loaded while a run is busy.

## Memories (`image_store`, `cipher_ram`)

**`image_store`** holds the secret image.

* Read: asynchronous, so the pixel is available in the same cycle, as from
  an image compiled into logic.
* Write: a synchronous port loads the image before a run. This port is this
  design's own addition: with it, one build can encrypt any image.

**`cipher_ram`** is a 16384 × 8 simple dual-port RAM (131 072 bits) that
maps onto FPGA block RAM.

* Port A: the encryptor writes each cipher pixel during its WRITE cycle.
* Port B: reads with one clock of latency, for reading the result back. It
  takes the place of a JTAG memory viewer.

A read and a write to the same address in the same cycle return the old
word. Neither memory is reset.

## Top level (`gf_image_encryptor`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock (50 MHz intended), asynchronous active-low reset |
| `start` | in | 1 | begin a run |
| `variable_key` | in | 1 | 0 = fixed key, 1 = variable key; sampled at start |
| `key` | in | 8 | fixed key, or automaton seed (non-zero); sampled at start |
| `load_we`, `load_addr`, `load_data` | in | 1, 14, 8 | write the secret image, only while not busy |
| `rd_addr` → `rd_data` | in → out | 14 → 8 | read the encrypted image, 1-clock latency |
| `busy`, `done` | out | 1 | run in progress / finished |

Parameters `IMG_W` and `IMG_H` (default 128 each) set the image size. All
address widths follow from them. Shared constants and the controller's phase
type live in `gf_enc_pkg`.

File map:

```
rtl/gf_enc_pkg.sv          constants, pixel type, controller phases
rtl/gf_mult.sv             combinational GF(2^8) multiplier
rtl/ca_keygen.sv           rule 90/150 cellular automaton
rtl/key_mix.sv             XOR / XNOR of key and pixel
rtl/enc_datapath.sv        read/mix and multiply registers
rtl/image_store.sv         secret image, asynchronous read
rtl/cipher_ram.sv          encrypted image RAM, registered read
rtl/enc_ctrl.sv            per-pixel phase sequencer
rtl/gf_image_encryptor.sv  top level
tb/gf_ref_pkg.sv           reference models (log/antilog GF tables, CA, mix)
tb/tb_*.sv                 one self-checking testbench per module
tb/tb_image_metrics.sv     image-quality evaluation (MSE, PSNR, correlations)
```

## Verification

Every testbench checks the module against reference models that do not share
code with the RTL. Each one prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_gf_mult` | all 65 536 products, plus the four worked products above |
| `tb_ca_keygen` | load, hold, steps against a cell-by-cell model, load-over-step priority, period 255 |
| `tb_key_mix` | exhaustive, both selections |
| `tb_enc_datapath` | random pixels and keys in both modes; output register holds |
| `tb_image_store`, `tb_cipher_ram` | full 16384-word fill and readback, read latency, read-during-write |
| `tb_enc_ctrl` | phase strobes, addresses, XNOR selection, cycle counts, ignored start, restart (with a 10-pixel image) |
| `tb_gf_image_encryptor` | full-size end-to-end test at default parameters, described below |

`tb_gf_image_encryptor` encrypts two generated images, each in both modes:

* a gradient image whose first four pixels are 23h 5Fh B7h FFh;
* a two-level "logo" image.

For each run it checks the cycle count (49 152 or 65 536) and every cipher
pixel. For the logo image it also measures two statistics. With the fixed
key, the cipher has 2 distinct values and a horizontal neighbour
correlation of 0.98. With the variable key, it has 256 distinct values and a
correlation of 0.002.

`tb_image_metrics` carries out an image-quality evaluation on three
generated images: a smooth pattern, a busy texture, and the two-level logo.
It encrypts each image in both modes and checks every cipher pixel against
the reference model. It then measures these statistics:

| image | key | MSE | PSNR (dB) | corr H | corr V | corr D | gray levels |
|-------|-----|-----|-----------|--------|--------|--------|-------------|
| smooth | fixed 53h | 6986 | 9.69 | 0.019 | 0.000 | -0.003 | 149 |
| smooth | variable, seed 9Dh | 6786 | 9.82 | 0.001 | 0.010 | 0.008 | 256 |
| texture | fixed 53h | 10236 | 8.03 | -0.010 | -0.006 | 0.026 | 223 |
| texture | variable, seed 9Dh | 10651 | 7.86 | -0.005 | 0.008 | 0.009 | 256 |
| logo | fixed 53h | 5365 | 10.84 | 0.982 | 0.945 | 0.927 | 2 |
| logo | variable, seed 9Dh | 17135 | 5.79 | -0.008 | 0.010 | -0.010 | 256 |

Column key:

* **MSE** and **PSNR** compare the cipher image with the plain image. A
  low PSNR means they differ strongly.
* **corr H / V / D** is the correlation between horizontally, vertically
  and diagonally adjacent cipher pixels.
* **gray levels** counts the distinct cipher values.

The fixed key leaves the logo fully structured. The variable key
decorrelates every image and spreads it over all gray levels.

The whole suite runs in seconds. To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_gf_image_encryptor rtl/gf_enc_pkg.sv tb/gf_ref_pkg.sv \
  tb/tb_gf_image_encryptor.sv
./obj_dir/Vtb_gf_image_encryptor
```

## Where this RTL makes its own choices

The arithmetic, the polynomial, the automaton rules, the XOR/XNOR
alternation, the image and memory sizes and the cycle budgets are those of
the original design. The following are this implementation's choices:

* **Alternation:** XOR/XNOR alternates per pixel, with XOR on even
  addresses. One description of the original says "alternate clock cycles";
  with one mix per pixel, alternating per pixel is the reading taken here.
* **Automaton:** null boundary, bit order, seed taken from the `key` input,
  and reset state 01h.
* **Interfaces:** the image load port, the readback port, the start/done
  handshake and reset behaviour.
* **Secret image storage:** the original compiled the image into the device.
  Here it is a loadable store with the same same-cycle read.
* **No decryptor.** The original describes none either, and the variable-key
  mapping is 2-to-1 (see above).

The original targets a Cyclone II FPGA at 50 MHz. No device-specific
primitives are used here: both memories are plain arrays that synthesis tools
map to block RAM or logic.
