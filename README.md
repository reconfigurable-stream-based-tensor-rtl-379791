# Posit Reconfigurable Tensor Unit (RTL)

SystemVerilog model of a stream-based tensor unit built from a 4x4 array of processing elements (PEs).
Each PE contains a vector multiply-accumulate unit (VMA) that works on posit numbers.
One 64-bit word holds 1x posit64, 2x posit32, 4x posit16 or 8x posit8 values, and each PE chooses the precision every cycle.

## Structure
- `rtl/rtu_pkg.sv`: shared types, the control word layout, and scalar posit decode/encode functions.
- VMA pipeline, four stages with latency 4:
  - M: multiply (`vma_mul`, a Booth multiplier plus an exponent adder);
  - Q: quire align and add (`vma_quire`, 2048-bit quire with lanes);
  - EF1/EF2: extract the result from the quire (`vma_extract`).
- Quire support: `quire_splitter` reduces lanes; neighbouring PEs can forward their quires to each other.
- PE (`pe`): contains
  - a register file that loads from west, north, north-west and its own VMA output, and forwards to east, south and south-east (`pipe_regfile`);
  - the PRE scaling unit (`pre_proc`);
  - a sequencer of {control word, cycle count} tuples (`cfg_controller`).
- Per row (`stream_row`): three SRAM banks, three input stream generators, two storage units, posit decoders and encoders, and descriptor-driven address generators (`pattern_gen`).
- `rtu_top`: a 4x4 array with the rows wrapped vertically.

## Design choices (not from the source description)
- The exponent adder is 64 bits wide with 8-bit lanes.
- The CSA tree is a linear chain.
- Quire alignment shifts right; extraction normalises with a left shift.
- Results saturate at maxpos/minpos and are rounded to nearest even.
- NaR is treated as zero.

## Status
- Every block below the top has a self-checking testbench in `tb/`, and all of them pass.
- The top module compiles and lints cleanly.
- `tb/tb_rtu_top.sv` is an end-to-end dot-product run that also exercises PRE, mixed precision and storage. It was written, but its simulation build did not finish in the time available, so it has not been run.
- No fault-injection copies were made.
- Workload sizes were not evaluated.
