# A multi-chip AER vision chain in SystemVerilog

This is synthesizable SystemVerilog for a five-layer, event-driven vision
system. The layers are a temporal-contrast retina, two convolution chips, a
winner-take-all "object" chip, a delay-line chip and a competitive Hebbian
learning chip, joined by interface boards. The boards remap addresses, split
and merge buses, and capture, histogram or replay traffic.

All the stages speak the Address-Event Representation (AER). A spike is not a
sample on a wire: it is the *address* of the neuron or pixel that fired, sent
on a shared bus. Every layer is event-driven. A stage only works when an
address arrives, and it answers with addresses of its own. The chain sees a
moving object. The retina reports where brightness changes. The convolution
chips pick out circles of two sizes. The object chip keeps only the strongest
location in each feature map. The delay line turns time into position, so the
learning chip can learn which way the object moves.

The original chips are largely analog (log photoreceptors, current-mode
integrators, capacitive synapses). Here every layer is a clocked digital
equivalent of the chip's function, and the analog circuits are replaced by
counters and comparators. Where the original design only names a mechanism,
this RTL makes its own choice. Those choices are marked below and in the
opening comment of each file.

## The chain

```
 pix samples                                        ┌─> 7  capture monitor (host)
    │                                               │
 2 retina ─4-phase─> 3 mapper ──> 4 splitter 1:3 ───┼─> 5 conv chip ─> 8 histogram ─┐
                                                    └─> 6 conv chip ─> 9 histogram ─┤
                                                                                    v
 17 learning <── 16 mapper <── 15 delay line <── 14 mapper <── 13 capture <── 12 object <── 11 mapper <── 10 merger
    │                                                              monitor       chip
    └─4-phase─> learn_req / learn_ack / learn_bus_addr
```

The numbers are the piece numbers of the demonstration set-up, and
`caviar_top` instantiates the pieces in that order. Two further interface-board
functions stand beside the chain with their own output buses: a timestamped
sequence player and a frames-to-AER generator. They are not connected to it.

### Buses

- **Inside the design** every link is a synchronous valid/ready channel with a
  16-bit address. An event moves when `valid && ready` at a clock edge.
- **At the chip boundary** a real AER bus uses a 4-phase request/acknowledge
  handshake. `aer_tx` and `aer_rx` convert between the two forms, with
  two-flop synchronisers on the incoming handshake line. The retina's output
  bus and the learning chip's output bus use them. The protocol is
  return-to-zero with active-high levels, which is this design's assumption.

### Address formats (`aer_pkg`)

| bus | layout (bit 15 … 0) |
|---|---|
| retina out | `3'b0, y[5:0], x[5:0], on` |
| conv chip in (128×128 space) | `2'b0, y[6:0], x[6:0]` |
| conv chip out | `5'b0, neg, y[4:0], x[4:0]` |
| after merger | input port number in bits [15:14] |
| object chip neuron | `8'b0, y[3:0], x[3:0]`, feature map = `{y[3], x[3]}` |
| object chip inhibitory neuron | bit 8 set, bit 2 = layer (0 first, 1 second), bits [1:0] = map |
| delay line in/out | element number 0..879 |
| learning chip in | `5'b0, neuron[4:0], synapse[5:0]` |
| learning chip out | neuron number |

All of these layouts are this design's choice. The sizes come from the chips:
64×64 retina, 128×128 input space, 32×32 convolution array, 16×16 object chip,
880 delay elements, 32 × 64 synapses.

## The convolution chip (`conv_chip`)

This is the most structured block, and the only one whose internals are
described in detail. Each incoming event *splats* the kernel onto the pixel
array, centred on the event. Nothing is computed for pixels far from the
event, and nothing at all happens while no events arrive.

Parts, each in its own file:

| part | file | what it does |
|---|---|---|
| control block | `conv_control` | latches (x, y), computes the x shift and the range of rows covered, sequences copy → integrate → erase |
| kernel RAM | `conv_kernel_ram` | 32 × 32 signed 4-bit weights, one whole row read per cycle |
| x-neighbourhood | `conv_x_neighbourhood` | shifts a kernel row in x; columns that fall outside the kernel get weight 0 |
| y-decoder | `conv_y_decoder` | one-hot row enable for the pixel row being written |
| monostable | `conv_monostable` | fixed-length integration pulse (`PULSE` cycles, default 1) |
| pixel array | `conv_pixel_array` | per pixel a weight register and a signed integrate-and-fire accumulator |
| AER out | `conv_aer_out` | burst-mode output: row arbiter, line buffer, column arbiter |

**Geometry.** The input coordinate is first shifted by `X_OFF` / `Y_OFF`
(default 16). This puts the 32×32 array on the centre of a 64×64 retina.
Kernel element (16, 16) is the centre. For an event at array coordinate
(xr, yr), pixel (px, py) receives kernel element (py − yr + 16, px − xr + 16)
when that index lies in the kernel.

**Sequence per event.**

1. In the cycle the event is accepted, the controller latches it. It computes
   the shift `16 − xr` and the first and last rows `max(0, yr−16)` and
   `min(31, yr+15)`.
2. It spends one cycle per covered row. It reads kernel row `py − yr + 16`,
   shifts it, and writes it into the weight registers of pixel row `py`.
3. After the last row it fires the monostable. For each cycle of the pulse,
   every pixel adds its weight to its accumulator. This saturates at ±127, and
   there is no leak.
4. On the last pulse cycle all weight registers are cleared and the next event
   may be accepted.

An event whose kernel misses the array is accepted and dropped in one cycle.

**Timing.** With `PULSE = 1`, one event takes `2 + n_k` cycles, where n_k is
the number of kernel rows that land on the array. At a 50 MHz clock that is
40 + 20·n_k ns, which is the event cost measured on the original chip. The
testbench checks this count exactly for every event.

**Output.** A pixel whose accumulator reaches +`thresh` or −`thresh` raises a
firing flag. When the line buffer is empty, the row arbiter takes the lowest
row that has a firing pixel. It copies all that row's flags and signs into the
line buffer and resets those pixels in the same cycle. The column arbiter then
sends one event per buffered pixel, lowest column first, one per cycle. The
output side runs at the same time as the input side. A pixel that is reset in
the same cycle it integrates keeps the new weight.

## The object chip (`wta_object_chip`)

The chip has four 8×8 feature maps, laid out as one 16×16 array. It is a
digital integrate-and-fire network:

- An input event adds `w_exc` to the addressed neuron's membrane.
- A neuron that reaches `thresh` fires. Its map's first inhibitory neuron fires
  with it and resets every neuron of the map. The winner restarts from
  `self_exc`, which is the self-excitation that gives the current winner
  hysteresis. Only one neuron per map can be active at a time (a hard
  winner-take-all).
- When `global_en = 1`, each map also has a second inhibitory neuron. It counts
  the first-layer inhibitory spikes of the *other* maps and is cleared by its
  own map's. When it reaches `inh2_thresh` it fires and resets its map, so only
  the most active map keeps firing. With `global_en = 0` the maps compete
  independently, and several objects can be located at once.

A firing produces, one per cycle, the winner's event, the first-layer
inhibitory event, and any second-layer inhibitory events. No input is taken
meanwhile. Reset-style inhibition and integer membranes stand in for the
analog dynamics.

## The delay line (`delay_line_chip`)

There are 880 elements of 16 monostables each. Here a monostable is one bit of
a 14,080-bit shift register, which advances every `MONO_CYCLES` clocks
(default 4). A pulse therefore spends 64 cycles in each element.

- An input event with address *e* inserts a pulse at the first monostable of
  element *e*.
- When a pulse leaves an element, that element sends an event with its number.
- A break bit after an element (`brk_we/brk_idx/brk_val`, cleared by reset)
  stops pulses there. This lets one cascade be cut into several independent
  lines.
- Pending events are held as one flag per element and sent lowest element
  first. A second pulse leaving an element whose flag is still set merges with
  it and is counted in `dropped`.

## The learning chip (`hebbian_learning_chip`)

This is a behavioural stand-in, because only the chip's size and purpose are
known: 32 neurons, 64 synapses each, and weights held in a multi-level memory.

- Weights are 3-bit levels, starting at `(3n + 5s) mod 8`.
- An input event {neuron, synapse} adds 1 + weight to the neuron's potential
  and marks the synapse active.
- The first neuron to reach `thresh` fires. All potentials reset, which is the
  competition. The winner's active synapses step one level up and its inactive
  synapses step one level down. All activity marks then clear.

Neither the neuron model nor the learning rule is the original circuit's, and
the drift of the weak memory cells toward stable levels is not modelled. Treat
this block as a placeholder with the right interface and sizes.

## Interface-board functions

| module | function |
|---|---|
| `aer_mapper` | look-up-table remapping. The input table maps an address to {count, pointer}; the output table lists the addresses to emit. Count 0 discards, 1 remaps, and more fans out (up to 127). Tables are cleared after reset (`busy` for 65,536 cycles). One-to-one costs 3 cycles per event. |
| `aer_splitter` | 1-to-N copy (N = 2..4). The input is acknowledged when every output has taken the event, and outputs already served are not offered it again. |
| `aer_merger` | N-to-1 (N = 2..4) with round-robin arbitration. The input port number is written into bits [15:14]. |
| `aer_monitor` | pass-through with timestamped capture into a 1024-entry FIFO. It never stalls the bus, and overflow is counted. |
| `aer_histogram` | pass-through that counts events per address into 2048 saturating 8-bit bins. Reading a bin clears it. |
| `aer_player` | replays up to 1024 {timestamp, address} records in real time. Events delayed by a stalled bus are sent as soon as possible and counted as late. |
| `frame_to_aer` | rate-coded generation. In each raster scan a pixel adds its intensity to an 8-bit phase accumulator, and every carry sends one event. A pixel of intensity I sends I events per 256 scans. |
| `retina_tmpdiff` | behavioural retina. Each pixel keeps the log intensity of its last event. A later sample that differs by at least `thresh` sends ON or OFF and becomes the new level. The first sample after reset only sets the level. |

## How far to trust it

- The convolution chip, mapper, splitter, merger, monitors, player, frame
  generator, delay line and 4-phase link are each checked against a reference
  model or exact expectations in their testbench. The convolution chip's per-event
  cycle count is also checked.
- The object chip is checked against a model of *this* network. That model is
  a digital reading of the original, not a circuit-level model.
- The learning chip is a placeholder (see above).
- Every testbench was also run against a deliberately broken copy of its block
  and fails on it.
- The bus blocks (`aer_tx`, `aer_rx`, `aer_mapper`, `aer_splitter`,
  `conv_aer_out`) carry assertions for their handshake rules. Examples are
  "req held until ack", "offered event held until taken" and "no duplicate
  offers". They are checked whenever the simulator runs with `--assert`.

### Departures and open points

- A 50 MHz clock is assumed, so that `2 + n_k` cycles give the original
  40 + 20·n_k ns.
- The original convolution chip accepts input at up to 50 Mevent/s. Here an
  event is only accepted when the controller is idle, so the sustained input
  rate is 50/(2+n_k) Mevent/s, and there is no input buffer.
- The remapping board handles up to 25 Mevent/s. `aer_mapper` needs 3 cycles
  per one-to-one event, so it reaches that rate only at a 75 MHz clock or
  above.
- The analog parts have no RTL: the pixel front end, current sources,
  integrators and synapse memories. The convolution chip's on-chip clock
  oscillator, the PCI and USB host links, the microcontroller boards, the
  memory-card loader and the VGA output have none either.
- Integrator widths, thresholds and all address layouts are this design's
  choices.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With plain Verilator (5.x), from the folder
holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/aer_pkg.sv tb/tb_conv_chip.sv --top-module tb_conv_chip -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_*.sv`. The testbenches are:

- `tb_caviar_top` runs the whole chain at default sizes. It takes a few
  seconds.
  - The host programs the four mappers as in the demonstration set-up, loads
    two ring kernels of different radius, and moves a bright square across the
    retina and back, with competition across maps switched on for the way
    back.
  - It checks the captured traffic and the histograms.
  - It counts, and requires at least once: ON and OFF events, mapper discard
    and fan-out, splitter stall, positive and negative convolution output,
    merger contention, winners, both inhibitory layers, events at every
    delay tap, learning spikes, and the player and frame generator.
- `tb_conv_chip`, `tb_wta_object_chip`, `tb_delay_line_chip`,
  `tb_hebbian_learning_chip`, `tb_aer_mapper`, `tb_aer_splitter`,
  `tb_aer_merger`, `tb_aer_link` (tx + rx), `tb_retina_tmpdiff`,
  `tb_aer_monitor`, `tb_aer_histogram`, `tb_aer_player` and
  `tb_frame_to_aer` test the blocks one at a time.

Verilator runs with two-state logic. Everything that is read before being
written is reset, or is cleared by a sweep after reset (mapper tables,
histogram bins, retina pixel memory), except kernel RAM and frame memory,
which the host must write first.
