# DiaNet multi-grained reconfigurable accelerator and spiking neuron blocks

This repository holds synthesizable SystemVerilog for three pieces of hardware:

- **`dianet_accel`** is the main design. It is an accelerator for bisection neural networks (DiaNets), built on a 20 × 20 array of processing elements (PEs).
- **`pif_neuron`** is a parametric integrate-and-fire neuron for ternary-weight spiking networks (TSNN).
- **`lif_pe`** is a DiaNet PE whose neuron is a leaky integrate-and-fire neuron, used for the temporal-spatial DiaNet4.0.

The top module `dianet_system` places all three side by side. They share only the clock and reset.

## Accelerator architecture

```
 external memory ──read──► config_loader ──serial──► scan chain through all PEs
        │                                              │
        └──read──► input_controller ► input FIFO ► data_router ─► PE array (20x20)
                                                                     │ z, z_valid
 external memory ◄─write─ output_controller ◄ output FIFO ◄ output_channel
                                   └──────► argmax_unit (one comparator per task)
 accel_ctrl sequences: configure → clear → stream inputs → wait for labels
```

### PE array

- **Layout.** Row r is a layer and column c is a neuron.
- **Bisection inputs.** A PE takes two activations from row r-1:
  - columns (c-1, c) when its `expand` bit is set, as in an expansion layer;
  - columns (c, c+1) otherwise, as in a shrinkage layer.
- **Extra inputs.** Every PE also has:
  - an input-feature synapse `wx·x`, which lets an input layer and a hidden layer be merged;
  - a weightless skip input, taken from the same column two rows above and added after the activation.
- **PE equation.**
  `z = sat16(act((w0·a0 + w1·a1 + wx·x) >>> 9 + b) + skip)`
  - The activation is identity, ReLU, or LeakyReLU with negative slope 1/8 or 1/16.
  - LeakyReLU is done with arithmetic shifts.
- **Number format.** Words are 16-bit signed fixed point with 9 fractional bits.
- **Firing.** There is no systolic schedule. A PE fires in the first cycle in which every input it uses is valid. `z_valid` rises one cycle later and holds until the PE's task is cleared.
- **Partitioning.** The array is split into DiaNets purely by configuration:
  - each enabled PE carries a 2-bit task id;
  - a DiaNet is a group of PEs with the same task id whose pair connections stay inside the group.
  - Up to four tasks run in parallel. Each one can be cleared and rerun without disturbing the others.

### Configuration scan chain

- Each PE holds an 80-bit `pe_cfg_t` in this order, MSB first:
  `en, expand, use_a0, use_a1, use_x, use_skip, act[2], is_out, label[4], task_id[2], spare, w0, w1, wx, bias`
- The chain runs through the PEs in row-major order, PE 0 first.
- The bitstream in memory is `{cfg[N-1], …, cfg[0]}`, sent MSB first in 32-bit words, with zero pad bits at the start.
- The whole array is 400 × 80 = 32,000 bits, which is 1000 words.

### Memory interface and formats

| Port | Handshake |
|---|---|
| Read | `rd_req`/`rd_addr` are held until `rd_gnt`. Data returns in order, any fixed number of cycles later, on `rd_rvalid`/`rd_rdata`. |
| Write | `wr_req`/`wr_addr`/`wr_data` are held until `wr_gnt`. |

| Word | Layout |
|---|---|
| Input word (`in_word_t`) | `{pad[6], row[5], col[5], data[16]}`. Words outside the array are dropped and counted. |
| Output word (`out_word_t`) | `{pad[10], task[2], label[4], data[16]}`, written to consecutive addresses from `out_base`. |

### One inference

1. Pulse `start` with `cfg_base`/`cfg_words`, `in_base`/`in_words`, `out_base`, `task_mask` and `task_labels`. `task_labels[t]` is the number of output neurons of task t.
2. The configuration is shifted in. This step is skipped when `cfg_words` is 0, so new inputs can run on an array that is already configured.
3. The tasks in `task_mask` are cleared and the input words are streamed in. The input controller issues reads on credit, so the input FIFO never overflows.
4. Output neurons are collected by a fixed-priority output channel, written back through the output FIFO, and compared per task.
5. `done` pulses when every selected task has its label (`result_label`, `result_value`). `cycles` gives the length of the run.

## Spiking neuron blocks

### `pif_neuron`

- **Update rule.**
  `u ← u + Σ o_j·T_j + b − Vth·o(t−1)`, and it fires when `u > Vth`.
  - The weights T are ternary, given as `w_pos`/`w_neg` masks.
  - The dot product only adds and subtracts; there are no multipliers.
  - The reset is soft: the threshold is subtracted after a spike.
- **Output mode.** In output mode the neuron accumulates and never fires.
- **Defaults.**
  - Fan-in is 1152 (3×3×128).
  - Inputs are 0..2, so a residual skip can add spikes.
  - There are 4 timesteps.

### `lif_pe`

- **Update rule.**
  `u ← 0.8·u·(1−o) + w0·s0 + w1·s1 + wx·x + b`, and it fires when `u > 0.3`.
  - The reset is hard.
  - The input feature x is a Poisson spike in {−1, 0, +1}.
- **Multi-spike counts.** The forwarded count is the neuron's own spike plus the count from its skip input, saturated to 4 bits.
- **Timesteps.** There are 8.

## Choices made in this design

The following are this design's own choices:

- the PE configuration encoding;
- the memory word formats and handshakes;
- the FIFO depths (16);
- the skip source column;
- truncating rounding and saturation;
- tie-breaking in the comparators (the earlier output wins);
- the PIF fan-in and word widths.

Where two descriptions of the spiking skip connection disagree, `lif_pe` follows the add-after-activation form: a neuron forwards its spike plus the count from two layers above.

## What fits on the array

| Network | PEs | Fits on 400 PEs? |
|---|---|---|
| Ionosphere | 44 | Yes |
| Waveform | 73 | Yes |
| Ionosphere and Waveform together | 117 | Yes |
| MNIST DiaNet3.0 (4660 synapses) | about 2330 | No |

The spiking networks are represented by their neuron blocks only.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints `TB_RESULT checks=… failures=…`.

The system testbenches (`tb_dianet_system`, `tb_dianet_accel` and `tb_dianet_system_full`) share `tb/dianet_system_tb_body.svh`. They do the following:

- map four DiaNets onto the array;
- run three inferences:
  - a full configuration;
  - new inputs for two tasks without reconfiguring;
  - a new configuration;
- check every PE against the reference model in `tb/dianet_ref_pkg.sv`;
- check the written-back words and the labels.

`tb_dianet_system_full` uses default parameters throughout. The memory model is `tb/ext_mem_model.sv`.

Example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dianet_pkg.sv $(ls rtl/*.sv | grep -v pkg) \
  tb/dianet_ref_pkg.sv tb/ext_mem_model.sv tb/tb_dianet_system.sv --top-module tb_dianet_system
./obj_dir/Vtb_dianet_system
```

Other testbenches are built the same way, with their own name as the top module.
