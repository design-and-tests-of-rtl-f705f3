# VIPIC1 digital tier: dead-timeless, time-sliced photon hit readout

VIPIC1 is a 64 x 64 pixel readout chip for X-ray Photon Correlation
Spectroscopy. It is built as a two-tier 3D stack: the analog front ends sit on
one tier and the pixel logic on the other. The experiment has low occupancy,
a few photons per mm² per µs, but needs fine timing. So the chip does not
stream images. Instead it cuts time into coarse frames, 10 µs by default,
set by an external clock `TS_Clk`. For every frame it reports which pixels
were hit and how often, and it never stops counting while it reads the
previous frame out.

This repository is synthesizable SystemVerilog for the digital side of that
chip:

- the logic of each pixel;
- the priority-encoder "sparsifier" of each readout group;
- the serializers;
- the configuration chain that runs through all 4096 pixels.

The analog tier (amplifiers, shaper, discriminator, trim DACs), the LVDS
drivers and the 3D bonding structures are not logic. They are outside the
RTL. Their signals are ports of the top module `vipic1_top`.

## Organisation of the matrix

```
vipic1_top ── frame_sync (TS_Clk -> frame_start)
   └─ 16 x pixel_group        (rows 4g..4g+3, all 64 columns)
         ├─ 256 x pixel_digital
         │      ├─ pixel_config_reg    14-bit slice of the configuration chain + shadow
         │      ├─ pixel_hit_gate      frame-boundary gating of the discriminator
         │      ├─ pixel_hit_pipeline  waiting room -> service room (readout request)
         │      └─ pixel_counters      two alternating 5-bit counters
         ├─ sparsifier (256-input binary priority tree)
         └─ serializer (record builder, RStrobe, one serial line)
```

All 16 groups work in parallel and independently. Each one drives one serial
line, `sdata[g]`. Inside a group, a pixel's address is `row*64 + column`
(8 bits). At the top, discriminator input `dis_in[i]` and configuration
output `acfg[i]` are indexed by `i = row*64 + column`, with rows 0..63.
Group `g` holds `i = 256g .. 256g+255`.

## Inside a pixel: keeping frames apart without dead time

This is the part that needs the most care. A hit must land in exactly one
frame. Counting goes on while the previous frame waits for readout.

**Waiting room and service room.** The gated discriminator level sets the
waiting-room flip-flop, which means "this pixel saw a hit in the current
frame". At the frame boundary (`frame_start`):

- the waiting room's content moves into the service room;
- the waiting room starts the new frame empty.

The service room is the pixel's readout request (`req`, the chip's `inXX`).
It stays up until the group selects the pixel (`ack`, `aXX`) and the
serializer pulses `RStrobe`.

If a request is still unread when the next boundary comes, it is overwritten
by the new frame. The design assumes that readout finishes within a frame,
which holds at the intended occupancy (see *Throughput*).

**Boundary gating.** A discriminator pulse can still be high when the frame
changes. It has already been registered in the frame that ends, and without
gating its level would set the fresh waiting room again.

`pixel_hit_gate` prevents this with one flip-flop:

- At `frame_start` the flip-flop samples the discriminator.
- If the discriminator is high, its level is masked until it falls.

Counting uses rising edges of the gated level, so one pulse gives one count.

**Two counters.** `pixel_counters` holds two 5-bit counters:

- One counts the hits of the current frame.
- The other holds the previous frame's count for readout (`rd_count`).

To save switching power, they swap at a boundary only if the counting one
registered a hit. The counter that takes over counting starts at zero. When
there was no hit, the held counter is cleared instead, so an empty frame
reads as 0. Counters wrap at 32 with no saturation, as on the chip. Repeated
measurements are summed off chip.

**Set and reset bits.** Each pixel has two mask bits:

- `set_pix` forces the waiting room high every frame, so the pixel is read
  even with no hits. This is the basis of imaging and region-of-interest
  readout.
- `reset_pix`, when `set_pix` is low, removes the pixel from readout and also
  stops its counting.
- If both are set, the pixel is read every frame, but its counter stays at 0.

**Cycle-level timing of a boundary.** In the cycle where `frame_start` is
high:

- A rising discriminator edge in that cycle belongs to the frame that ends.
- The request and the held count of the finished frame are valid from the
  next cycle on.
- The cleared counter and the new waiting room take hits from the next cycle.

## Group readout: the sparsifier and the serial record

`sparsifier` is a binary tree over the 256 requests, with two passes:

- **Upwards**, every node ORs its children. The root is `HIT`: some pixel of
  the group waits.
- **Downwards**, the "Back" signal (`HIT` gated by `back_en`) enters at the
  root. Each node passes it to its lower-numbered child if that child has a
  request, otherwise to the other child.

Exactly one pixel receives a grant: the requesting pixel with the lowest
address. The 8-bit address is decoded from the one-hot grant. The logic is
static and purely combinational. The tree shape is the chip's. The chip
builds it from dynamic NAND/NOR stages with tri-state outputs.

The selected pixel drives its counter onto the group's counter bus. The bus
is an OR of per-pixel gated outputs, in place of the chip's tri-state lines.
`serializer` works as follows:

1. When `HIT` is high and `rd_en` is high, it captures a record from the
   selected pixel.
2. In the same cycle it pulses `RStrobe`. This clears that pixel's request,
   so the tree selects the next pixel while the record is shifted out.
3. The next record is captured in the cycle in which the last bit of the
   current one is on the line, so records follow back to back.

The record format is sent MSB first, and the line idles at 0:

| mode | bits | content | clocks per pixel |
|------|------|---------|------------------|
| sparsified | 16 | `010` START, 5-bit counter, 8-bit address | 16 (160 ns at 100 MHz) |
| imaging    | 8  | `010` START, 5-bit counter               | 8 (80 ns)              |

A receiver finds a record by the `1` of the START symbol. The bit before it
is the record's first bit.

In imaging mode, every pixel has `set_pix` on, so all 256 pixels of a group
are read in address order every frame. The address is redundant and is
dropped.

`rd_en` low withholds the Back signal. No new record starts, and a record
already in flight completes. This is the hook for holding off the data
acquisition system.

## Configuration chain

One shift register runs through every pixel. It enters at `cfg_din`, passes
group 0 pixel 0 first, and leaves at `cfg_dout` after pixel 4095. Each pixel
holds 14 bits, and its word (`pix_cfg_t`, MSB first) is laid out as follows:

| bits | field | use |
|------|-------|-----|
| 13 | `set_pix` | force into readout |
| 12 | `reset_pix` | remove from readout, stop counting |
| 11:9 | `fb_trim` | CSA feedback time-constant trim DAC |
| 8:2 | `thr_trim` | discriminator threshold trim DAC |
| 1 | `diff_en` | differential front end (replica CSA as reference) |
| 0 | `inj_en` | test charge injection enabled |

How the chain is loaded:

1. Hold `cfg_shift` high and send 4096 x 14 bits, pixel 4095's word first and
   MSB first.
2. Pulse `cfg_load`. This copies every pixel's shift stage into its shadow
   register.

Shifting alone changes nothing in operation. The 12 analog bits of each pixel
come out on `acfg[i]` towards the analog tier. A full load takes 57,344
clocks, about 0.57 ms at 100 MHz.

## Clocking

- Everything runs on one clock, the serial clock (100 MHz on the chip).
  `rst_n` is an asynchronous, active-low reset that clears all state.
- `TS_Clk` is asynchronous. `frame_sync` synchronises it with two
  flip-flops. `frame_start` is a one-cycle pulse, 2 to 3 clocks after each
  rising edge.
- `dis_in` is sampled by the same clock. Discriminator pulses must last at
  least one clock period. The front end's peaking time is about 250 ns, so
  this holds with a wide margin.

## How this RTL departs from the silicon

These are the points where the design makes its own choices. Each RTL file's
header says the same for its block.

- **Clocking.** The chip clocks its pixel flip-flops directly from `TS_Clk`
  and the discriminator, and uses toggle flip-flops with asynchronous hit
  removal. Here, all of that is synchronous to the serial clock. The
  behaviour per frame is the same. Timing is resolved to one clock.
- **Tri-state logic.** The tri-state buses and dynamic tree logic are
  replaced by static AND/OR logic. `aXX` is active high here; it is active
  low on the chip.
- **Configuration word.** The configuration word adds two bits to the
  12-bit register: set and reset. The two lowest bits of the 12
  (`diff_en`, `inj_en`) are this design's allocation. Only the 3-bit and
  7-bit trim codes and a per-pixel differential selection are fixed by the
  chip.
- **Ordering.** The chain order, the address numbering (`row*64+column`, low
  address first) and the bit order on the line are chosen here.
- **RStrobe and imaging mode.** RStrobe is generated inside the serializer,
  and imaging mode is a chip input that shortens the record. On the chip,
  imaging is obtained by issuing RStrobe before the address bits.
- **Counter clearing.** The counter clearing rules (clear on take-over, clear
  the held one when nothing happened) are this design's way of making a
  forced readout report an empty frame as 0.
- **Imaging rate.** Imaging records keep the START symbol, so a group frame
  is 2048 bits. At 100 MHz that is 20.48 µs, or 48.8 x 10³ frames/s. The
  chip's quoted figure is 50 x 10³ frames/s with "2000 bits per 20 µs". A
  record without START would meet it, but then a receiver could not find
  records on the line.

## Throughput

- **Sparsified.** 16 clocks per hit pixel per group, with 16 groups in
  parallel. A 10 µs frame at 100 MHz has room for 62 hit pixels per group,
  which is about 3.8 photons/mm²/µs spread evenly over the 26.2 mm² matrix.
- **Imaging.** 2048 clocks per frame per group. A 5-bit counter cannot wrap
  within 20.48 µs at the 1 MHz maximum pulse rate of the front end.

## Simulating

Every file has one module, package or interface. `rtl/vipic_pkg.sv` must be
read first. Testbenches are in `tb/`; `tb/serial_rx.sv` is a shared receiver
model that decodes serial lines. Verilator 5 can run any bench, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_pixel_group rtl/vipic_pkg.sv tb/tb_pixel_group.sv
./obj_dir/Vtb_pixel_group
```

Each bench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| bench | what it establishes |
|-------|---------------------|
| `tb_pixel_config_reg` | chain order, shadow updates only on load, field layout |
| `tb_pixel_hit_gate` | one hit per pulse; pulses across a boundary masked until they fall |
| `tb_pixel_hit_pipeline` | cycle-by-cycle reference of the waiting/service rooms, set/reset, RStrobe |
| `tb_pixel_counters` | per-frame counts modulo 32, swap only after hits, cleared empty frames |
| `tb_pixel_digital` | whole pixel against a frame-level reference with random pulses |
| `tb_sparsifier` | lowest-index grant and address on 256 and 32 inputs, gating, ascending walk |
| `tb_serializer` | record content, 16- and 8-clock record spacing, hold-off |
| `tb_frame_sync` | one pulse per TS_Clk edge, latency |
| `tb_pixel_group` | full group: random hits, readout order, counts, imaging of all 256 pixels |
| `tb_vipic1_top` | whole chip, default size: ring mask, sparsified mode with counter wrap, boundary pulses, reset pixels and hold-off, imaging of all 4096 pixels on 16 lines |

The chip-level bench runs at the top's default size (4096 pixels). Building
it with Verilator takes several minutes, and the run takes about a minute and
a half. The pixel-level mechanisms are also covered by the smaller benches,
which build in seconds.

## Not in the RTL

The following parts have no logic function or are process structures:

- the charge-sensitive amplifier and its replica;
- the two-stage shaper;
- the discriminator;
- the 3-bit and 7-bit trim DACs;
- the test-charge injection;
- the analog references;
- the LVDS drivers;
- the inter-tier bond points and TSVs.

The digital side of each of these appears as ports: `dis_in`, `acfg`, `sdata`.
