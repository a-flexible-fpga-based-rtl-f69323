# A precision-scalable 4x4 NPU

This design is a small neural processing unit. One array of 16 processing elements (PEs) runs at 16-, 8- or 4-bit precision, and the precision can change on every command. Each PE is built around a single radix-4 Booth multiplier. The multiplier computes one 16x16 product, or is split into two independent 8x8 products or four independent 4x4 products. A 32-bit adder made of eight 4-bit slices sits behind it. That adder works alone as a SIMD adder, or it accumulates the products lane by lane as a MAC. A control unit is driven by a start signal, an operation code and an 8-bit configuration word. It sequences 22 cases of operation and precision:

* 16 parallel multiplications, additions or MACs;
* a 4x4 matrix multiplication;
* a convolution of a 4x4 input with a 2x2, 3x3 or 4x4 kernel.

The architecture comes from the master's thesis *A Flexible FPGA-based Neural Processing Unit Architecture* (A. Palermo). The thesis targets a Xilinx Pynq-Z2 at 200 MHz and was written in VHDL. This is an independent SystemVerilog implementation. Where the thesis gives the structure (block diagrams, encodings, state names, simulation results), the RTL follows it. Where the thesis is silent, the choice made here is stated below and in each file's header.

## Operand packing: what a 16-bit word means

Everything hinges on how sub-word values are packed, so this comes first. Each PE receives an *input* word `a` and a *weight* word `b`, both 16 bits. All values are two's complement. The precision field selects how the words are split:

| precision (`cfg[4:2]`) | values per word | products per PE | multiplier output `out_multP` |
|---|---|---|---|
| `000` 16x16 | 1 x 16 bit | 1 | `a*b` |
| `010` 8x8 | 2 x 8 bit | 2 | `[31:16] = a[15:8]*b[7:0]`, `[15:0] = a[7:0]*b[15:8]` |
| `001` 4x4 | 4 x 4 bit | 4 | `[31:24] = a[15:12]*b[3:0]`, `[23:16] = a[11:8]*b[7:4]`, `[15:8] = a[7:4]*b[11:8]`, `[7:0] = a[3:0]*b[15:12]` |

The pairing is crossed: the top sub-word of `a` meets the bottom sub-word of `b`. This comes from the multiplier's structure. The Booth digits are taken from `b` starting at its least significant bit, and digit group *g* is given sub-word *N-1-g* of `a`. Each product fits its 8-, 16- or 32-bit slot exactly, so the products are kept apart ("sum apart"). They are not added into one dot product.

The MAC register orders the lanes the other way round. Lane *g* (bits `g*32/N` upward) accumulates `a[sub-word N-1-g] * b[sub-word g]`. For example, the 8x8 product word `0x00090003` is added to the accumulator as `0x00030009`. The original design's MAC results show this ordering too, and it is kept. In MAC mode each lane is as wide as its product (8, 16 or 32 bits) and wraps on its own. Carries never cross between lanes.

## Inside the multiplier

`final_multiplier` = `booth_multiplier` (combinational) + `pp_adder_tree` (registered).

* **Booth encoder.** `b` is read as eight overlapping triplets `(b[2k+1], b[2k], b[2k-1])`. Each triplet becomes a digit in {-2..+2}, coded as `{neg, one, two}`, using the standard radix-4 table. The encoder is made precision-aware by forcing the `b[2k-1]` bit of the first digit of every sub-word to 0. That is digit 0 at 16 bits, digits 0 and 4 at 8 bits, and digits 0, 2, 4 and 6 at 4 bits. Each sub-word of `b` is then encoded as an independent signed number.
* **Selector.** Digit *k* takes its sub-word of `a` and sign-extends it to 18 bits. It then passes 0, 1x or 2x of that value, and inverts it for a negative digit.
* **Sign correction.** This step adds the digit's `neg` bit, which turns the one's complement into the two's complement. The original design does this by adding constant 1s at fixed positions across the whole partial-product matrix. Here each partial product is completed on its own. The sums are the same, and the later tree can then add one sub-word at a time.
* **Adder tree.** The eight partial products are registered first. Three levels of adders follow, and each level shifts its upper operand:
  * `s1[j] = PP(2j) + PP(2j+1)<<2`: the four 4x4 products.
  * `s2[i] = s1[2i] + s1[2i+1]<<4`: the two 8x8 products.
  * `s3 = s2[0] + s2[1]<<8`: the 16x16 product.

  This works because the partial products of one sub-word carry weights 4^0, 4^1, ... *within that sub-word*. At lower precision the deeper levels would only produce meaningless cross-sub-word sums. Their inputs are therefore forced to zero: levels 2 and 3 at 4 bits, level 3 at 8 bits. This saves switching power. The output register of the active precision is loaded, and the other two are loaded with zero.

A product appears two clock edges after its operands: the partial-product registers, then the output register.

## The adder and the accumulator

`simd_adder` chains eight `adder4` slices. Each slice's carry-in multiplexer selects either 0 or the carry-out of the slice below. The selection depends on the partition: 8 x 4 bits, 4 x 8, 2 x 16 or 1 x 32.

With external operands, the 64-bit `ext_add_in` word of a PE holds X in bits 31:0 and Y in bits 63:32. Each lane writes its own output register, which includes the lane's unsigned carry-out:

| `cfg[7:5]` | operation | result register |
|---|---|---|
| `000` | 8 x (4+4) | `out_sum5[i]` = {carry, sum} |
| `001` | 4 x (8+8) | `out_sum9[i]` |
| `011` | 2 x (16+16) | `out_sum17[i]` |
| `110` | 32+32 | `out_sum33` |
| `010` | 32+32, no carry | `out_mac` |

External operands pass through an input register first. In MAC mode the same input register takes the multiplier product (in MAC lane order), and the second operand is the MAC register itself.

## Matrix multiplication and convolution

PE (r,c) computes element C[r][c] of C = A x W as four MACs. At step k it receives A[r][k] and W[k][c].

* **`input_adjustment`** captures the whole four-step schedule when the operation starts. For each step it stores the column of A repeated along the rows and the row of W repeated down the columns.
* **`load_input`** registers the step selected by Counter_1.

Matrices smaller than 4x4 are multiplied by padding them with zeros.

A convolution is a valid cross-correlation (no kernel flip) of the 4x4 `input_matrix` with the top-left KxK corner of `weight_matrix`. There are (5-K)² output pixels, one per PE in row-major order:

| kernel | output pixels | PEs used | steps | counter |
|---|---|---|---|---|
| 2x2 | 9 | 0..8 | 4 | Counter_1 |
| 3x3 | 4 | 0..3 | 9 | Counter_2 |
| 4x4 | 1 | 0 | 16 | Counter_2 |

`input_generation #(K)` builds, for each pixel, the list of its K·K window values, along with the kernel. `load_conv #(K)` sends step `cnt` of that list to the array and drives zeros into the unused PEs. The operation multiplexer in `datapath` hands the array one of five operand sets, chosen by `select_operation`: the user words, or the registered step of one of the four schedulers.

Results of all these operations are read from `out_mac`. Every precision works here too. For example, a 4x4-bit matrix multiplication yields four independent 8-bit-lane results per PE, each built from the lane pairing described above.

## Commands and timing

| input | meaning |
|---|---|
| `start` | begin an operation; while it stays high after a MAC, the next MAC follows directly |
| `select_operation` | `000` simple, `001` matrix multiplication, `010`/`011`/`100` convolution 2x2/3x3/4x4 |
| `config_mac_mult_adder[1:0]` | `00` multiply, `01` add external operands, `11` MAC |
| `config_mac_mult_adder[4:2]` | precision, see above |
| `config_mac_mult_adder[7:5]` | adder partition for additions; for a simple MAC, `100` keeps accumulating and any other value restarts from zero |

The control unit (`control_unit`) is a Moore FSM. It latches the command when an operation starts. An invalid command keeps it in IDLE. The unit asserts `done` during S_DONE. Cycle counts below run from the first state after IDLE to S_DONE:

| operation | states | cycles to S_DONE |
|---|---|---|
| multiply | `MULT_p, WAIT_MULT1, S_DONE` | 2 |
| add | `RES_SUM_w, WAIT_ADDER, S_DONE` | 2 |
| MAC | `SINGLE_MACp, WAIT1, WAIT2, EN_REG` (repeats) | 4 per MAC |
| matrix multiplication, conv 2x2 | `INPUT_GENERATION`, 4 x (`LOAD, MAC_p, WAIT1, WAIT2, EN_REG, DIS_REG`), `INC_CNT` between | 28 |
| conv 3x3 | same pattern, 9 steps | 63 |
| conv 4x4 | same pattern, 16 steps | 112 |

At 200 MHz these counts match the timings of the original design: 140 ns for the matrix multiplication, 315 ns for the 3x3 convolution, and 112 cycles for the 4x4 convolution. Counting the S_DONE cycle, a multiply or an add takes 3 cycles, as in the original. Results are valid from the DIS_REG state onward. All result registers keep their values until they are next written. `rst` is synchronous and active high, and clears every register.

## Files

`rtl/`:

| file | contents |
|---|---|
| `npu_pkg.sv` | encodings, control-word structs, state enum |
| `npu_top.sv` | `control_unit` + `datapath` |
| `datapath.sv` | schedulers, Counter_1/Counter_2 (`step_counter`), operation multiplexer, `pe_array` |
| `pe_array.sv` | 4x4 `mac_pe` |
| `mac_pe.sv` | `final_multiplier` + `simd_adder` |
| `final_multiplier.sv` | `booth_multiplier` (`booth_encoder`, `booth_selector`, `sign_correction`) + `pp_adder_tree` |
| `simd_adder.sv` | 8 x `adder4` |
| `input_adjustment.sv`, `load_input.sv` | matrix-multiplication schedule |
| `input_generation.sv`, `load_conv.sv` | convolution schedules |

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`) and `npu_ref_pkg.sv`, the reference arithmetic they share. The reference arithmetic works on plain integers and does not mirror the RTL structure. `npu_top_tb` runs the whole unit at its default size:

* every operation at every precision, with random operands;
* the cycle counts above;
* a lane that wraps in a packed accumulation, a lane carry-out, MAC chaining and rejected commands, each counted and required to occur at least once.

`npu_top_tb` also replays three worked examples published with the original design, and compares the result words they print:
* a 16x16 matrix multiplication whose result row 0 is `0x0a 0x12 0x1e 0x09`;
* a 3x3 convolution giving `0x30 0x1e 0x26 0x1d`;
* an 8x8-precision 2x2 convolution whose first pixel is `0x00190008`.

The block testbenches check the published multiply and MAC traces. Examples are `0x0203 x 0x0301 -> 0x00020009` (8x8) and the chained MAC `0x0006000C`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/npu_pkg.sv tb/npu_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v npu_pkg) tb/npu_top_tb.sv --top-module npu_top_tb -o sim
./obj_dir/sim
```

Replace `npu_top_tb` with any other testbench to test one block. Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The whole suite runs in seconds. Synthesized, the unit holds about 10.4k flip-flops. The original FPGA implementation reports 9118.

## Where this implementation departs from or extends the original

* **Configuration word width.** The configuration word is 8 bits wide (bits 7..0), as in the original simulation waveforms.
* **External adder operands.** They arrive on a separate 64-bit port per PE.
* **Convolution kernel.** It is taken from `weight_matrix` for all three kernel sizes, rather than from a dedicated kernel port.
* **Accumulate code.** In simple-MAC mode, `cfg[7:5] = 100` means "continue accumulating". The original simulations use this code for the second of two chained MACs, but do not define it.
* **Source code `10`.** `cfg[1:0] = 10` is treated as an invalid command.
* **Operation code `101`.** The original datapath drawing gives the operand multiplexer a sixth input code, `101`, but no sixth source. Here `select_operation = 101` (like `110` and `111`) is rejected, and 4x4 convolution uses `100`, as in the original simulations.
* **2x2 convolution timing.** The 2x2 convolution takes the same 28 cycles as the matrix multiplication. The original text gives it one cycle more (145 ns), but its own waveform shows the same state sequence as the matrix multiplication.
* **Sign correction.** Each partial product is sign-corrected on its own, instead of by adding constant 1s across the partial-product matrix as the original does.
* **No valid chain.** The adder slices have no "valid" handshake between them, because the ripple carry settles within one clock cycle. Lanes are joined by the carry-in multiplexers alone.
* **Result registers in IDLE.** Result registers are not cleared in IDLE. The original simulations show results held there.
* **FPGA-level numbers.** Power, energy and maximum frequency were measured on the FPGA and are outside what this RTL can reproduce.
