# Layer-at-a-time neural-network inference engine behind a UART

This design runs the forward pass of a small fully connected ReLU network in an
FPGA. A host computer trains the network and then sends it over a 115200-baud
serial link. It sends every layer's weights and biases, then an input vector.
The FPGA computes the network one layer at a time:

- all multiplications of a layer run in parallel (24 × 24 multipliers);
- each neuron's products are summed in its own pipelined adder tree;
- the results are fed back as the next layer's inputs.

When the last layer is done, the output vector goes back over the same link.
The whole exchange is a four-phase loop, and a soft reset at the end of each
output transfer starts the next round:

```
weight transfer -> input transfer -> network compute -> output transfer -> (soft reset)
```

The size limits are package parameters in `rtl/nn_pkg.sv`:

| symbol | parameter | default | meaning |
|---|---|---|---|
| I | `MAX_NET_WIDTH` | 24 | inputs per neuron, and neurons per layer |
| D | `MAX_NET_DEPTH` | 4 | layers |
| N | `INPUT_WIDTH` | 16 | signed activation / input width |
| M | `WEIGHT_WIDTH` | 24 | signed weight and bias width |
| S1 | `SHIFT_1` | 3 | arithmetic right shift of every product |
| S2 | `SHIFT_2` | 1 | arithmetic right shift of every neuron sum |

## The neuron arithmetic

Neuron k of a layer computes

```
y[k] = low_N( relu( ((sum_j (x[j] * w[k][j]) >>> S1) >>> S2) + b[k] ) )
```

- `x` are signed N-bit inputs and `w` are signed M-bit weights. Each product
  is N+M bits wide.
- Each product is shifted right by S1 before the sum. This keeps the adder
  tree narrower.
- The sum of 24 shifted products needs 5 extra bits, so it is
  N+M-S1+5 = 42 bits wide. It is then shifted right by S2.
- The bias word `b[k]` (the negated threshold, as the host stores it) is
  added after the S2 shift.
- The ReLU clears negative results. The low N bits become the new
  activation.

Keep this truncation in mind. A positive result of 2^15 or more wraps. The
next layer then reads it as a negative N-bit number. The host picks weights
and shifts so that this does not happen; the hardware does not saturate.

Every layer always multiplies all I inputs. Inputs a layer does not use must
therefore be zero:

- The host zero-pads the first input vector to I values.
- Between layers, the output pool clears every entry above the layer's
  largest neuron index.

The weights of unused inputs can then hold anything.

## Serial protocol

Everything on the link travels in 10-byte *packet streams*: one header byte,
then nine data bytes. Bytes are 8N1. Before each stream the line must have
been idle for 230 receiver samples, about 14 bit times. This idle gap is how
the receiver finds the start of a stream.

Header byte layout:

| bits | field | meaning |
|---|---|---|
| 1:0 | mode | 0 weights, 1 inputs, 2 outputs (FPGA to host), 3 debug |
| 2 | CRC_EN | ignored: no CRC is ever sent |
| 7:3 | mode data | layer id for weight streams, 0 otherwise |

Data values are sent least significant byte first. A value may straddle two
streams, and the last stream of an array is zero-padded.

- **Weights** (mode 0) are 3-byte words. Per layer, the host sends:
  1. the parallelism P;
  2. the largest neuron index (width − 1);
  3. for each neuron, its bias word followed by I weight words.

  A change of layer id in the header starts a new layer.
- **Inputs** (mode 1) are 2-byte words, I of them (48 bytes in 6 streams).
- **End of transfer** is a debug stream (mode 3) whose nine data bytes are
  all zero. The network depth is the last layer id + 1.
- **Outputs** (mode 2) go from the FPGA to the host. There are
  ceil(I·N/72) = 6 streams, output 0 first. Each stream is sent after 100
  idle bit times.

## Architecture

```
 uart_txd_in ─► communication_module ──weights──► memory_controller ─► weight_bram (96 × 600 bit)
                 (uart_rx/uart_tx/      ──P, max id──► param_pool ×2         │ P rows
                  uart_clkdiv)          ──inputs──► input_pool ◄──copy── output_pool
 uart_rxd_out ◄── output streams ◄──────────────────────────────────────┘ ▲
                                                                          │
 layer_controller: reads pools ─► requests rows ─► starts ─► layer_computation
                                                   (576 multipliers, 24 tree_adders, relu)
 system_fsm: phase (weight / input / compute / output)      reset_debounce: button → reset
```

- **communication_module** decodes each received stream one byte per clock.
  It assembles 3-byte words into a 600-bit neuron record: the bias word in
  bits [23:0], then weight j at bits [24(j+1) +: 24]. Each complete record
  causes one write pulse. The module also fills the input vector and detects
  the end-of-transfer stream. After the last layer it sends the output pool
  back to the host.
- **memory_controller / weight_bram**: neuron k of layer l goes to RAM row
  l·I + k. A layer's neurons are therefore consecutive rows, 96 rows of 600
  bits. A read request for (layer, first neuron, P) reads P consecutive rows,
  one per cycle. Row k goes to slot k of a 24-neuron weight bus and a bias
  bus, and unused slots are zero.
- **param_pool ×2** hold P and the largest neuron index for each layer.
- **layer_controller** is the sequencer. It waits for the end of the
  transfer, then runs this loop for each layer:
  1. read P and the largest index;
  2. read the weights of neurons cur_node .. cur_node+P−1;
  3. wait until the input pool is valid;
  4. start the computation and wait for it;
  5. if neurons remain (`cur_node + P <= max index`), advance cur_node by P
     and go back to step 2. Otherwise, if this is the last layer, raise
     `all_done`. Otherwise, copy the output pool into the input pool one
     cycle after the last write and go to the next layer.
- **layer_computation**:
  - When `start` arrives, all 24 × 24 products are shifted and registered.
  - Each neuron's 24 products go into a **tree_adder**: 24 inputs padded to
    32, five registered levels, each level one bit wider.
  - The sum is shifted by S2, the bias is added, and the **relu** is applied.
  - The results and a one-cycle write strobe go to the output pool.
- **output_pool** writes P results at the group's start address. It never
  writes above the layer's largest index, and it clears everything above the
  written range.
- **system_fsm** reports the current phase.
- **reset_debounce** cleans the push button. It also acts as the power-on
  reset.

The design's reset is `button | out_transfer_done`. After sending the outputs,
the whole system, including the weight write counters, returns to weight
transfer, so the host sends the weights again with every inference. The
weight RAM itself is not cleared.

In the normal configuration the host sends P equal to the layer width, so each
layer is one computation step. A smaller P splits a layer into
ceil(width/P) steps, and the output pool assembles the groups.

## Timing

| event | cycles (100 MHz) |
|---|---|
| one serial bit | 868 (115200 baud); receiver samples 16 times per bit, divider 54 |
| one 10-byte stream | about 8,700 plus the idle gap |
| weight read of P rows | result on the (P+3)-th edge after the request |
| one computation step (I = 24) | `out_valid` on the 8th edge after `start` |
| first output bit | 100 bit times after the last layer finishes |

The serial link dominates. A 24-neuron layer alone is 1,806 bytes (201
streams), while computing it takes a few tens of cycles.

The top's status LEDs show:

| LED | shows |
|---|---|
| [1:0] | low bits of the last received P and largest index |
| [2] | transfer complete |
| [3] | all layers computed |
| [4] | output transfer complete |
| [5] | first output byte non-zero |
| [6] | first input byte equal to 1 |

## Where this design makes its own choices

- **Word order.** The header byte comes first and values are least
  significant byte first. A partial word or neuron record left over when the
  stream type or layer changes is dropped. The zero padding at the end of a
  layer is such a leftover.
- **Network depth** is the number of layers (last id + 1). The controller
  finishes after layer depth − 1.
- **Group stepping.** A layer is finished when `cur_node + P > max index`, so
  a last group smaller than P is still computed. The weight read fetches
  exactly P rows, and the controller issues it only after P is known.
- **Bias** is added after the S2 shift and is not itself shifted. The ReLU
  output is truncated to N bits.
- **Output-to-input copy** happens one cycle after the output pool's last
  write, so the copy sees the new values.
- **CRC.** CRC_EN is ignored and no CRC checker exists. The FPGA sends no
  debug/error streams.
- **Debounce and power-up.** The debounce window is 1,000,000 cycles
  (10 ms). The system is held in reset from power-up until the button has
  been stable and released for that long.
- **Weight RAM.** It is an inferred single-port RAM with a one-cycle
  registered read, in place of a vendor block-RAM core.
- **Phase tracking.** The phase is one explicit FSM (`system_fsm`) rather
  than flags spread over the blocks. The input pool gets a `valid` flag.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/nn_pkg.sv tb/nn_ref_pkg.sv tb/tb_nn_fpga_top.sv \
    --top-module tb_nn_fpga_top -Mdir obj_top -o sim
obj_top/sim
```

Replace the testbench name for any other block; modules are found through
`-Irtl -Itb`. `-Wno-fatal` keeps width warnings from stopping the build; the
remaining warnings concern unused parameters and width extensions. Two files support the testbenches:

- `tb/nn_ref_pkg.sv` holds the reference neuron model and the byte
  encoding.
- `tb/tb_uart_host.sv` is a behavioural host. It sends bytes, streams and
  arrays, and decodes what the FPGA sends back.

| testbench | what it covers |
|---|---|
| `tb_nn_fpga_top` | End to end, at 16 clocks per bit (all other parameters default). Runs the 2-2-1, 2-3-2-1 and 2-10-10-5-1 example networks, a full 24 × 4 network with random P and full-range values, a button reset in the middle of a weight transfer, and P = 1 layers. Checks the output pool after every layer, the returned streams, the phases, the soft reset, the computation latency and the number of steps. It prints counters for each mechanism. |
| `tb_nn_fpga_top_full` | The top with no parameter overrides: 115200 baud, 1 M-cycle debounce, the 2-3-2-1 network. About 10 M cycles; checks the outputs, phases and the 100-bit transmit delay. |
| `tb_communication_module`, `tb_uart_rx`, `tb_uart_tx`, `tb_uart_clkdiv` | Stream decoding and encoding, framing, bit timing. |
| `tb_memory_controller`, `tb_weight_bram`, `tb_param_pool` | Row layout, P-row reads and their latency, pools. |
| `tb_layer_controller` | Step order, group stepping and copies against behavioural neighbours. |
| `tb_layer_computation`, `tb_tree_adder`, `tb_relu` | Arithmetic against the reference model, and latencies. |
| `tb_input_pool`, `tb_output_pool`, `tb_system_fsm`, `tb_reset_debounce` | The remaining blocks. |

The simulator used has two states, so every register the design reads is
reset. The reset button must be held at the start of a simulation for longer
than `DEBOUNCE_CYCLES`.

## Size and limits

At the defaults:

- 576 multipliers of 16 × 24 bits;
- 24 adder trees;
- a 57,600-bit weight RAM;
- about 14 kbit of registers for the weight and bias buses that feed the
  multipliers.

Networks up to 24 inputs, 24 neurons per layer and 4 layers fit. The three
example networks (2-2-1, 2-3-2-1 and 2-10-10-5-1) use at most 26 of the 96
RAM rows.

To change the size, change I, D, N or M. The stream format, the 6-stream
output, and the widths of P, the layer id and the largest index all follow
from them. `TX_BIT_CYCLES`, `CLK_DIV`, `RX_IDLE_SAMPLES` and
`TX_START_DELAY_BITS` on the top set the link timing for other clocks or
baud rates.
