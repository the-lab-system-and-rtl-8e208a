# A small OR1200-style lab computer with a JPEG DCT accelerator

Baseline JPEG compression of a raw 8-bit greyscale image spends nearly all of
its time in the 8x8 forward DCT and the quantisation that follows. Done in
software on a small RISC CPU, that costs more than 10 000 clocks per block.
A 512x400 image has 3200 blocks, so the whole image takes over 32 million
clocks. This RTL moves that step into a bus-attached accelerator. The
accelerator needs 18 clocks of arithmetic per block and has its own DMA, so
it can fetch a block straight out of the raster image in memory and write
the coefficients back.

Around the accelerator sits the memory system of the lab computer:
- instruction and data caches;
- a store buffer behind the write-through data cache;
- a shared Wishbone bus.

The CPU core and the memory chips are not part of the RTL. They connect
through ports.

The other stages of a JPEG coder stand beside the computer, each with its
own ports:
- colour conversion RGB -> YCbCr;
- 2x2 chroma averaging;
- an entropy coder: zig-zag scan, run-length coding, magnitude coding and
  Huffman coding into bytes.

## Top level: `lab_system`

```
 cpu_ic_* -> icache ---------------------------.
 cpu_dc_* -> dcache (line fills, uncached rd) --+-- wb_interconnect --+-- mem_*  (main memory)
             dcache -> store_buffer ------------+                     '-- jpeg_acc slave (0x96xx_xxxx)
 jpeg_acc DMA master ---------------------------'
 cc_* -> color_convert      cs_* -> chroma_subsample      ec_* -> jpeg_entropy_coder
```

| Parameter | Default | Meaning |
|---|---|---|
| `IC_LINES` | 512 | Instruction cache lines of 16 bytes (8 kB). |
| `DC_LINES` | 512 | Data cache lines of 16 bytes (8 kB). |
| `SB_DEPTH` | 4 | Store buffer entries. |

The bus types are structs in `wb_pkg`:
- `wb_m2s_t`: `cyc`, `stb`, `we`, `sel[3:0]`, `adr[31:0]`, `dat[31:0]`.
- `wb_s2m_t`: `ack`, `dat[31:0]`.

Every transfer is a single access. It ends with `ack`, which is high for one
clock. A slave never raises `ack` without `stb`, and drops it in the same
clock as `stb`. Assertions in the slaves check this rule.

`events` carries one-clock pulses for statistics:
- cache hits and misses;
- uncached accesses;
- store-buffer stalls;
- the current bus grant.

### Address map

| Address | Meaning |
|---|---|
| `adr[31] == 0` | Cacheable memory. |
| `adr[31] == 1` | Never cached. |
| `adr[31:24] == 0x96` | The accelerator. The rest of the upper half goes to main memory. |

Main memory sees the full address, so a buffer can be reached both cached
(below `0x8000_0000`) and uncached (at the same offset above it), if the
memory decodes it that way. The end-to-end testbench uses exactly this:
- The DMA writes results into memory behind the CPU's back.
- A cached copy of that line stays stale.
- The CPU therefore reads DMA output through the uncached alias.

The testbench counts the stale copy as a mechanism it must see.

## Caches and the store buffer

Both caches have the same layout:
- direct-mapped;
- 16-byte lines (4 words);
- tag and data RAMs with synchronous read;
- one valid flip-flop per line.

An address splits into tag, index and word offset: `adr[31:4+IW]`,
`adr[4+IW-1:4]` and `adr[3:2]`. With 256 lines (4 kB), `0x1234_5678` maps
to index `0x67` and tag `0x12345`. The tests check that example.

The request timing is the same for both caches:

| Clock | What happens |
|---|---|
| Request | The RAMs are read with the request address. |
| +1 | The tag is compared, and a hit is acknowledged in the same clock. |

So a hit costs two clocks. A CPU that keeps `stb` high can fetch at most one
word every two clocks. Reaching one fetch per clock would need a CPU that
presents the next address early, which a plain Wishbone port does not do.

On a miss, the line is fetched with four single bus reads. Then the word is
returned.

The data cache is write-through without write allocation:
- A store hit updates the selected bytes in the cache.
- Every store goes into the store buffer.
- The CPU gets its ack as soon as the buffer accepts the store, and stalls
  only while the buffer is full.
- The buffer is a FIFO (`sync_fifo`: read and write counters one bit wider
  than the address). It drains in order through single bus writes.
- A load that misses, and every uncached load, first waits until the buffer
  is empty. A load therefore never overtakes an older store to the same
  address.

The data cache never holds anything in the upper half of the address space.
That keeps the accelerator's registers and any DMA buffer out of it.

## Bus: `wb_interconnect`

There are four masters, with fixed priority in this order:
1. store buffer;
2. data cache;
3. instruction cache;
4. accelerator DMA.

A master that wins keeps the bus for as long as it holds `cyc`. The owner's
request goes to the accelerator if `adr[31:24] == 0x96`, and to main memory
otherwise. Only the owner sees `ack` and the read data. The address decode
and the response mux are two separate `always_comb` blocks. Merged into one,
they would form a false combinational loop through the DMA master.

## The accelerator: `jpeg_acc`

### What it computes

For an 8x8 block of pixels p:

1. Subtract 128 from every pixel.
2. Apply the 2-D DCT.
3. Divide each coefficient by its entry of the luminance quantisation table
   Q, rounding to the nearest integer. Halves round away from zero.

The 2-D DCT is two passes of a 1-D 8-point DCT: rows first, then columns.
The 1-D transform (`dct1d`) is the Loeffler flow graph, scaled so that:
- `X0` is the plain sum of the 8 inputs;
- every other output carries an extra factor sqrt(2).

That scaling removes most multiplications. After both passes, each output
is 8 times the orthonormal 2-D DCT coefficient. Quantisation therefore
divides by 8 x Q x 1/2 = 4Q. The factor 1/2 is a quality setting: it
halves every entry of the quantisation table. Each quantiser lane:
1. multiplies the magnitude by a constant `ceil(2^26 / 4Q)`, computed at
   elaboration time by `jpeg_pkg::recip_of`;
2. adds one half;
3. shifts;
4. restores the sign.

### Fixed point

`dct1d` works on 12-bit signed inputs and gives 16-bit signed outputs. The
rotator constants carry 13 fraction bits:

| Constant | Value | Real factor |
|---|---|---|
| `K_C1` | 8035 | cos(pi/16) |
| `K_S1` | 1598 | sin(pi/16) |
| `K_C3` | 6811 | cos(3pi/16) |
| `K_S3` | 4551 | sin(3pi/16) |
| `K_R2C6` | 4433 | sqrt2 cos(3pi/8) |
| `K_R2C2` | 10703 | sqrt2 cos(pi/8) |
| `K_R2` | 11585 | sqrt2 |

The sqrt(2) gain of the even-part rotator is folded into its two constants,
so that rotator costs no extra multiply. Each output is truncated once, by
an arithmetic shift at the end.

With these choices the reference block (pixels 1..64, row-major) gives:

| Stage | Values |
|---|---|
| After the row pass | `-988 -19 0 -2 0 -1 0 -1` for row 0 |
| After both passes | `-6112 -152 / -1167 ... -37 ... -10` |
| After quantisation | `-96`, `-3`, `-24` and `-2` at positions [0][0], [0][1], [1][0] and [3][0]; zero elsewhere |

The testbenches check these numbers exactly. On random blocks the results
stay within 1 of a real-valued reference.

### Schedule (18 clocks per block)

The input RAM (`block_ram_2p`) holds 16 words of 4 pixels. Pixel 0 of a row
is in bits 31:24.

1. **Rows.** Both RAM ports read words 2r and 2r+1 in the same clock, so a
   whole row arrives per clock. After subtracting 128, the row goes through
   the first `dct1d` and is written as a row of `transpose_mem`. This
   memory has a synchronous write and an asynchronous read. The pass takes
   9 clocks, because of the RAM's read latency.
2. **Columns.** `transpose_mem` is read one column per clock into a second
   `dct1d`. After a register stage come eight quantiser lanes, each
   selecting its own Q entry. The column is written into an output
   transpose memory, which turns it back into row order. This pass also
   takes 9 clocks.

### Registers

The registers sit at these offsets inside `0x96xx_xxxx`:

| Offset | Access | Meaning |
|---|---|---|
| `0x000-0x03C` | write | Input block: 16 words, 4 pixels each. |
| `0x800-0x87C` | read | Results: 32 words. Coefficient 2i in bits 31:16 of word i, coefficient 2i+1 in bits 15:0, row-major. |
| `0xC00` | write | bit0 starts the DCT on the input RAM. bit1 starts a DMA job. |
| `0xC00` | read | bit0 done (sticky until the next start), bit1 busy. |
| `0xC04` | read/write | DMA source address. |
| `0xC08` | read/write | DMA source pitch, in bytes. |
| `0xC0C` | read/write | DMA destination address. |

The slave acks every access after one wait state.

### DMA (`acc_dma`)

A DMA job runs in three steps:
1. Read the 16 words of a block out of a raster image, at
   `src + row*pitch + 4*half`, into the input RAM.
2. Start the DCT and wait until it is done.
3. Write the 32 result words to `dst`, `dst+4`, and so on.

Each result word is first copied into a register and only then driven onto
the bus. This keeps the bus data free of any combinational path back
through the interconnect.

For a 512-pixel-wide image, use:
- `pitch = 512`;
- `src` = image base + 8 x block column + 4096 x block row.

With the 3-clock memory model, a job holds the bus for about 190 clocks.

Measured on a whole 512x400 image (3200 blocks):
- Each block takes 358 clocks, from the CPU's start store to the done
  status it polls.
- The whole image takes about 1.15 million clocks.
- A software DCT and quantisation on the CPU needs more than 10 000 clocks
  per block.

## Entropy coding

`jpeg_entropy_coder` joins two parts with a valid/ready symbol stream.

### `rle_encoder`

It copies the block and walks it in zig-zag order, one symbol per clock.

1. **DC term.** It sends the difference to the DC term of the previous
   block. `new_image` resets that predictor to 0. The symbol is the size
   category, as coded by `magnitude_enc`:
   - the size is the bit count of |v|;
   - the raw bits are v for v > 0;
   - for v < 0, the raw bits are v-1 in `size` bits.
2. **AC terms.** Each non-zero AC term becomes the symbol
   `(zero run << 4) | size`, followed by its raw bits. A run of 16 or more
   zeros first sends `0xF0` once for every 16 zeros.
3. **End of block.** If the block ends in zeros, it sends `0x00`.

The standard example block:

```
22 12 0 -12 ...
0 0 -8 ...
4 ...
... 1 (row 3, col 7)
```

codes to this symbol sequence:

```
05 10110, 04 1100, 13 100, 24 0011, 04 0111, F0, F0, D1 1, 00
```

### `huffman_enc`

It keeps two writable tables, DC and AC, with 256 entries each. An entry is
a code of 1 to 16 bits plus its length. Software loads the tables.

For each symbol, it appends the code to a 64-bit accumulator, followed by
the raw bits unchanged. Whole bytes leave one per clock, first bit in
bit 7. `flush` pads the last byte with 1 bits and then raises `flush_done`.

The following are left to software:
- the JFIF markers;
- inserting `0x00` after an `0xFF` byte.

With the AC entry `0x04 -> 1011`, the symbol `04` with raw bits `1100`
gives the bits `10111100`.

## Colour stages

`color_convert` computes:

```
Y  =  0.299 R + 0.587 G + 0.114 B
Cb = -0.1687 R - 0.3313 G + 0.5 B + 128
Cr =  0.5 R - 0.4187 G - 0.0813 B + 128
```

It uses 16 fraction bits, rounds, clips to 0..255 and has one register
stage.

`chroma_subsample` averages a 2x2 group of chroma samples, rounding:
`(sum + 2) >> 2`. Keeping one Cb and one Cr per four pixels halves the data.

## Where this design makes its own choices

These points are engineering choices, not taken from a reference design:
- the bus priority;
- the register map;
- the pixel byte order;
- the 18-clock schedule, with a second DCT instance for the column pass;
- 13-bit constants;
- reciprocal-multiply quantisation;
- the store-buffer depth;
- padding with ones;
- the table-load port;
- every handshake.

The Y formula uses 0.114 for blue, so that the weights sum to 1.

A few details differ from a textbook version of this system:
- Cache lines are filled with four single reads, not a burst.
- The transpose memory has no read-enable input, because its read is
  asynchronous.
- The stages after quantisation are hardware here. They are fed from their
  own ports, not from the bus.

The following are not included:
- the CPU, including any custom instruction;
- the Ethernet controller;
- the boot ROM;
- the parallel port;
- a real memory controller.

`tb/wb_mem_model.sv` stands in for memory, with a fixed latency.

## Simulation

Every testbench checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`. Each has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb rtl/wb_pkg.sv rtl/jpeg_pkg.sv \
  tb/tb_lab_system.sv --top-module tb_lab_system -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

The testbenches are:

| Testbench | What it covers |
|---|---|
| `tb_lab_system` | The whole design at its default sizes. |
| `tb_image_workload` | A full 512x400 image (3200 blocks) through the DMA at the default sizes: every coefficient against a real-valued reference, plus the clock count. |
| `tb_jpeg_acc` | The reference block (exact, including the 18-clock latency), random blocks against a real-valued DCT, and a DMA job. |
| `tb_dct1d`, `tb_quantizer`, `tb_transpose_mem`, `tb_block_ram_2p` | The datapath parts. |
| `tb_icache`, `tb_dcache`, `tb_store_buffer`, `tb_sync_fifo`, `tb_wb_interconnect` | The memory system. |
| `tb_magnitude_enc`, `tb_rle_encoder`, `tb_huffman_enc`, `tb_jpeg_entropy_coder` | The entropy coder: exact examples, plus random streams against bit-level models. |
| `tb_color_convert`, `tb_chroma_subsample` | The colour stages. |

`tb_lab_system` goes through these steps:
1. Stores the reference block into a 512-byte-wide image.
2. Programs the DMA and checks the result.
3. Shows the stale cached copy.
4. Runs six more blocks through the slave port.
5. Entropy-codes all results and compares the bytes.
6. Converts 300 pixels.

It fails if any of these mechanisms never happened:
- a cache hit or miss;
- an uncached access;
- a store-buffer stall;
- DMA bus ownership;
- a bus wait;
- a zero-run symbol;
- an end-of-block symbol;
- a coder stall.
