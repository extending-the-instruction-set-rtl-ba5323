# Array instructions for NTRU on a small RISC-V core

NTRU spends most of its time in polynomial arithmetic. In C that becomes loops over
coefficient arrays: add two arrays element by element, copy one array into another,
reduce every element modulo q. On a small two-stage RV32 core each of these loops
costs a load, an ALU or divider operation and a store per element, plus loop
overhead. This RTL adds three custom instructions that each do one of those loop
bodies for **three array elements at once**. The elements are read from and written
back to the data RAM by a small driver in the execution stage. Three parallel remainder
units do the modulus.

The extension sits beside the core's ALU and multiplier/divider. The core itself is
not included: every signal that would connect to it is a port of the top module.

## The instructions

All three are R-type instructions in the RISC-V `CUSTOM_0` opcode space
(`opcode = 0001011`), with `funct3 = 111`. `funct7` selects the operation:

| funct7 | name | effect, for k = 0, 1, 2 | rs1 | rs2 |
|---|---|---|---|---|
| `0x03` | ADD | `a1[k] = a1[k] + a2[k]` | byte address of a1 | byte address of a2 |
| `0x05` | EQU | `a1[k] = a2[k]` | byte address of a1 | byte address of a2 |
| `0x06` | MOD | `a1[k] = a1[k] mod m` (unsigned) | byte address of a1 | modulus m |

Every instruction returns its result in place. `rd` receives rs1, the address of a1.
With the GNU assembler, ADD is written
`.insn r CUSTOM_0, 0x7, 0x3, rd, rs1, rs2`. For example, `0x06b5750b` is ADD with
rd = rs1 = a0 and rs2 = a1.

The array length is fixed at three in hardware, because an R-type instruction has no
room for a third operand. Software handles arrays of any length with a wrapper: it
issues the instruction once per group of three (`&a1[3*i]`, `&a2[3*i]`) and then does
the last `n mod 3` elements with ordinary code. MOD works on unsigned words. A
negative coefficient must first be lifted into range by adding the modulus, which the
NTRU code already does before it reduces.

## How one instruction runs: the array driver

`custom_module` is an eight-state machine. It walks the RAM one word per access,
because the single-port RAM allows only one access per cycle and returns read data
one cycle after the request.

```
IDLE --custom_en--> ADDR -> WAIT1 -> [WAIT2 if first element] -> LOAD --(3 loaded)--> next pass / CALC
                     ^                                           |
                     +------------- next element ----------------+
CALC -> ADDR(write) x3 -> FIN1 -> FIN2 -> IDLE
```

* **IDLE** waits for `custom_en`. It then latches the operands: the word addresses
  rs1>>2 and rs2>>2, the modulus (the full rs2) and the opcode.
* **ADDR** drives the RAM address of element `i` of the array that the current pass
  walks. In the write pass it also drives the data and the write enable
  (`custom_valid`), so each write takes one cycle.
* **WAIT1** covers the RAM read latency. **WAIT2** adds one more cycle, but only for
  the first element of a read pass.
* **LOAD** captures the read word. In the first-array pass it goes to `data_reg1`. In
  the second-array pass it goes to `data_reg2` for ADD, or straight to `data_reg3`
  for EQU.
* **CALC** does the arithmetic. For ADD it computes `data_reg3 = data_reg1 + data_reg2`
  in one cycle. For MOD it raises `custom_mod_o` so that the three remainder units
  start on `data_reg1[0..2]` with the latched modulus. It then waits for `mod_valid`,
  the AND of the three units' valid outputs, and copies their results to `data_reg3`.
* **FIN1** raises `custom_final` for one cycle and puts the rs1 address on
  `custom_result`. **FIN2** clears the local registers.

The passes per instruction:

| instruction | passes |
|---|---|
| ADD | read a1 → read a2 → CALC (add) → write a1 |
| EQU | read a2 → write a1 |
| MOD | read a1 → CALC (remainder units) → write a1 |

All reads of an instruction finish before its first write. Overlapping arrays
therefore behave as if all three results were computed from the old values.

### Cycle counts

Counted from the first cycle in which the driver sees `custom_en` in IDLE to the
cycle in which `custom_final` is high (32-bit data, three elements):

| instruction | cycles to custom_final | cycles in decode, alone | cycles in decode, back to back |
|---|---|---|---|
| ADD | 25 | 26 | 27 |
| EQU | 14 | 15 | 16 |
| MOD | 15 + 33 = 48 | 49 | 50 |

A read pass costs 10 cycles: 4 + 3 + 3. MOD's CALC state lasts WIDTH + 2 = 34 cycles,
because the remainder units take 33 cycles and CALC needs one more to take their
results. An instruction that follows another custom instruction directly costs one
more cycle, because it waits out FIN2. Each 17-element call of the wrappers issues
5 instructions, so it stalls decode for 134 (ADD), 79 (EQU) or 249 (MOD) cycles.

## The remainder units

`remainder` computes `dividend mod divisor` on unsigned 32-bit operands with the
non-restoring division algorithm, one quotient bit per clock:

* The partial remainder `r` is a signed WIDTH+2-bit register.
* Each step shifts the next dividend bit into `r`. If `r` was non-negative, the step
  then subtracts the divisor; if `r` was negative, it adds the divisor.
* After WIDTH steps, a negative `r` is corrected by one addition of the divisor. This
  correction is combinational, on the output.
* Only the remainder is kept.

`enable` is a level signal. An idle unit loads its operands in the first cycle it
sees `enable` high. `valid` rises WIDTH + 1 cycles later and stays high, with a
stable result, for as long as `enable` stays high. When `enable` drops, the unit
returns to idle. A divisor of zero returns the dividend, as RISC-V `REM` does.

Three copies run in parallel, one per element, and all three share the modulus. The
core's own divider is not reused. Making it do this work in parallel would mean
copying it together with the ALU it depends on, which costs much more area than
three small shift-subtract units.

## Connection to the core

`ntru_ext_top` joins two parts:

* **`custom_decoder`** decodes the instruction in decode. It is purely
  combinational. For a legal CUSTOM_0 instruction it raises `custom_en`, passes
  `funct7` as the opcode and requests an `rd` write. Any other `funct3`/`funct7` in
  CUSTOM_0 raises `illegal_insn_o`. It also splits out the rs1, rs2 and rd fields.
* **`custom_ex_block`** holds the driver, the three remainder units, the AND of
  their valid outputs and the result select. The select gives `ex_result` as:
  * the custom result while `custom_en` is high;
  * otherwise the core's MUL/DIV result if `multdiv_sel` is high;
  * otherwise the ALU result.

The core handles a custom instruction the way it handles a multi-cycle divide.
`stall_o` (`custom_en && !custom_final`) holds fetch and decode, so `custom_en`
stays high until the driver finishes. In the final cycle, `stall_o` is low and
`rf_we_o` writes the rs1 address into rd. The core then moves on.

The RAM port (`ram_req_o`, `ram_we_o`, `ram_addr_o`, `ram_wdata_o`, `ram_rdata_i`)
connects directly to a single-port data RAM. That RAM has a 14-bit word address
(64 KiB) and one cycle of read latency, and its read data is held until the next
read. The driver uses the RAM only while the core is stalled. Muxing this port with
the core's own load/store port is left to the integration.

## Where this RTL makes its own choices

These points are not specified by the source design, or are resolved differently
here:

* **Timing and handshakes.** Resets are active-low and asynchronous. The
  enable/valid handshake of the remainder units, the `ram_req_o` request and the
  one-cycle write per element are this design's choices.
* **Remainder algorithm.** The remainder unit uses true non-restoring division.
  The described reference implementation compares and subtracts like a restoring
  divider instead. Results are identical.
* **End of instruction.** `custom_final` ends the stall and `custom_valid` is only
  the RAM write enable. The source description uses `custom_valid` for both roles
  in different places.
* **Decoder.** The decoder is a separate module next to the core's decoder, not a
  state inside it. Treating unknown CUSTOM_0 encodings as illegal is this design's
  rule.
* **Operands.** Element values are unsigned, and addresses are truncated to word
  address bits [15:2].

Not included, because the extension only connects to them:
* the host core: fetch, register file, ALU, MUL/DIV and load/store;
* the shared instruction/data RAM;
* the FPGA clock generator;
* the on-chip logic analyser used for measurements.

## Files

| file | contents |
|---|---|
| `rtl/ntru_ext_pkg.sv` | opcodes, funct7 enum, driver state and pass enums, sizes |
| `rtl/remainder.sv` | non-restoring remainder unit |
| `rtl/custom_module.sv` | eight-state array driver |
| `rtl/custom_ex_block.sv` | driver + three remainder units + result select + stall |
| `rtl/custom_decoder.sv` | CUSTOM_0 decoder extension |
| `rtl/ntru_ext_top.sv` | top: decoder + execution-stage extension |
| `tb/ram_1p_model.sv` | behavioural single-port RAM for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters (`ARRAY_LENGTH` = 3, `DATA_W` = 32, `ADDR_W` = 14, `WIDTH` = 32) default to
the sizes of the source design.

## Simulating

Every testbench checks its own results. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --top-module tb_ntru_ext_top -y rtl -y tb +libext+.sv \
    rtl/ntru_ext_pkg.sv tb/tb_ntru_ext_top.sv -o sim
./obj_dir/sim
```

Replace `tb_ntru_ext_top` with `tb_remainder`, `tb_custom_decoder`,
`tb_custom_module` or `tb_custom_ex_block` to test one module.

What the testbenches cover:

* **`tb_remainder`**: corner cases and 200 random operand pairs against `%`, the
  exact 33-cycle latency, a held result, and valid dropping with enable.
* **`tb_custom_decoder`**: every `funct3`/`funct7` pair in CUSTOM_0, other opcodes,
  and `instr_valid` low.
* **`tb_custom_module`**: random ADD/EQU/MOD against a reference memory, with
  behavioural remainder units. It checks the latency, back-to-back issue, and that
  nothing outside the target words is written.
* **`tb_custom_ex_block`**: the same checks with the real remainder units. It also
  checks the stall on every cycle and the ALU / MUL-DIV select.
* **`tb_ntru_ext_top`** runs at the default sizes. The testbench acts as the core:
  it provides a register file and a RAM, issues instruction words and runs the
  length-n wrappers. It runs three workloads:
  1. the 17-element example (add, then mod 7, then copy), with hand-computed
     expected arrays;
  2. a product of two degree-52 polynomials modulo q = 101 (N = 53, the NTRU
     parameter set this extension was measured with), built from 105-word rows
     with about 3800 custom instructions and compared with a direct convolution;
  3. lengths 52 and 16, which exercise the one-element tail.

  It checks the decode-stage occupancy and the rd value of every instruction. It
  also requires each mechanism to happen at least once: stall, each instruction,
  remainder wait, back-to-back issue, both tail lengths, illegal encodings, and both
  pass-through paths.

Only the extension is verified. No full NTRU program has been run on a core with
this extension in simulation, because the core is not part of this RTL.
