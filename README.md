# Flash memory cube controller

A controller for a stacked memory cube of 24 NAND Flash dies (32 Gb each, 768 Gb total) meant
for use in space. All 24 dies share one set of control lines and are run in lockstep, each die
on its own 8-bit data bus. One bus cycle therefore moves 192 bits. Every 512-byte sector of
every die's page is protected by a BCH[4382,4096] code that corrects 22 bits. On top of the
NAND controller sit the management functions that keep such a cube usable under radiation and
wear:

- a logical-to-physical block table;
- bad-block detection with relocation and program retry;
- a partial free-block table for wear levelling;
- a garbage-collection queue;
- a scrub policy;
- a majority voter for N-modular redundancy across cubes.

## Structure

```
flash_cube                       top: host port, translation, management
 ├─ ftl_lbt                      logical block table (2^24 x 32-bit entries)
 ├─ free_block_table             partial free-block table + round-robin fallback
 ├─ flash_ctrl                   24-die NAND controller
 │   ├─ nand_main_fsm            command sequencing, IO source select, ECC steering
 │   ├─ nand_timing_fsm          CLE/ALE/WE_n/RE_n/CE_n bus cycles
 │   └─ page_ecc x 24            per-die page ECC
 │       ├─ bch_encoder          byte-serial BCH encoder (LFSR, 8 bits/clock)
 │       └─ bch_decoder          syndromes, Berlekamp-Massey, Chien search
 ├─ bad_block_fifo (sync_fifo)   failing {die, block} entries, interrupt to the processor
 ├─ sync_fifo                    garbage-collection queue of relocated blocks
 ├─ scrub_policy                 rewrite / relocate request after a read
 └─ nmr_voter                    3-way bitwise majority of 192-bit words
```

`rtl/flash_pkg.sv` holds the shared constants and types:

- geometry, NAND opcodes and BCH constants;
- the generator polynomial;
- the command enums;
- the GF(2^13) multiply functions.

## Operation

**Host commands.** The host issues `cmd_code` with a logical sector address (`lsa`) and a page
number. `flash_cube` proceeds as follows:

1. It looks up `lsa[27:4]` in the logical block table. Each entry covers 16 sectors, i.e. 8 kB.
2. It sends the physical block to the controller.
3. It ends the command with `host_done`.

What happens depends on the command and the table entry:

| Case | Result |
| --- | --- |
| First program of a unit (table entry invalid) | Takes the next block from the free-block table and writes the new entry. |
| Read or erase of an unmapped unit | Refused, with `unmapped`. |
| Program fails on any die (status bit 0) | The old block goes to the garbage-collection queue. A WRITE_FAIL entry per failing die goes to the bad-block FIFO. The unit is remapped to a fresh block. `prog_retry` tells the host to send the same page again from its buffer. |
| Read | The per-die worst sector error count, and any uncorrectable sector, go to the bad-block FIFO (READ_ERR / READ_FAIL above `err_thr`). They also go to the scrub policy. That policy requests a rewrite, or a relocation if `pe_count >= pe_limit` or the read failed. |

**NAND bus.** The main FSM turns each command into timing operations (command, address,
data-in, data-out, wait for ready). It hands them to the timing FSM through `t_start`/`t_done`.
Each bus cycle lasts TWP+TWH clocks (write) or TRP+TREH clocks (read); the defaults are 2+2.
The five address cycles are column low, column high, then three row bytes: page and an
11-bit block. The command sequences are:

| Command | Sequence |
| --- | --- |
| Reset | FFh |
| Read ID | 90h 00h, then 5 bytes |
| Read status | 70h |
| Page read | 00h, address, 30h, wait, then 16384 data bytes and 1152 parity bytes |
| Page program | 80h, address, 16384 data bytes, 1152 parity bytes, 10h, wait, 70h |
| Block erase | 60h, 3 row bytes, D0h, wait, 70h |

**ECC.**

- *Program.* Each die's data bytes run through an encoder as they are sent. After the data, the
  36 parity bytes of each sector go to the spare area: 286 bits plus 2 pad bits, sector s at
  spare bytes 36s..36s+35.
- *Read.* The data is re-encoded as it comes in. Each stored parity byte is XORed with the
  recomputed one, and only these 36 difference bytes go to the decoder. The syndromes are
  unchanged by this, so the decoder finds the error positions of the whole 548-byte codeword.
  It then reports them as page columns: `corr_col` plus a 192-bit `corr_mask`, one byte per
  die. The host XORs these into the data it received on `rd_data`.
- *Decoder stages.*
  - 44 syndromes by Horner's rule, 8 bits per clock.
  - 44 inversionless Berlekamp-Massey iterations, one per clock.
  - Chien search, 8 positions per clock.
  - `done` comes 594 clocks after the last parity byte is accepted.

**Processor side.** The processor firmware and the RAM that holds the table in the real cube are
outside this design. Their connections are ports of the top:

- table updates;
- free-block slot writes;
- bad-block and GC queue pops with interrupts;
- error threshold and P/E limit.

After power-up the table contents are undefined. The processor loads the table before the
first command.

## What follows the document and what is this design's own

From the document:

- 24 dies in lockstep, 8-bit IO each, 192-bit bus cycles, 5 address cycles.
- The split into main FSM, timing FSM and ECC, and their signal names (`t_start`, `t_cmd`,
  `t_done`, `DOS_i`, `DIS`, `block_value`, `page_value`, `data_to_be_written`, ...).
- BCH[4382,4096] with t = 22 and 286 parity bits in the spare area.
- The 4-byte logical block table at 16-sector granularity, addressed by the upper bits of the
  sector address.
- Program-fail relocation with a small FIFO and an interrupt.
- The partial free-block table as a processor-written FIFO.
- The garbage-collection FIFO.
- The scrub rule: errors over a threshold lead to a rewrite or a relocation depending on the
  P/E count.
- Triple modular redundancy.

This design's own choices:

- bus timing values;
- opcodes (the common ONFI ones);
- the field polynomial and decoder architecture;
- the spare layout;
- the correction report;
- FIFO depths and entry formats;
- round-robin fallback when the free-block table is empty;
- the `unmapped` and `prog_retry` handshakes;
- the table entry format (bit 31 valid, bits 10:0 block).

The 11-bit block field addresses 2048 blocks of 4 MB. That is more than a 32 Gb die holds, so
the address is wide enough.

Not built:

- the Serial RapidIO interface and its SerDes (an external standard);
- the processor;
- the MRAM;
- the NAND dies themselves (a behavioural model, `tb/nand_die_model.sv`, stands in for them in
  simulation);
- the packaging layers.

## Verification

Each module has a self-checking testbench in `tb/`. BCH results are compared with an independent
reference built in `tb/bch_ref_pkg.sv` from the minimal polynomials. Random errors up to t, and
beyond t, are injected in data and parity.

`tb_flash_ctrl` and `tb_flash_cube` run against 24 die models, with a page shortened to 4 and 2
sectors. `tb_flash_cube` makes each management mechanism happen and counts it:

- mapping;
- unmapped refusal;
- correction;
- scrub request;
- bad-block entries;
- the GC queue;
- program retry;
- round-robin allocation;
- the vote.

`tb_flash_cube_full` runs the top at its default parameters: 32 sectors and a 28-bit address.
It does one program and one read with 22 errors in one sector. It checks:

- the stored page;
- the bus cycle counts;
- the corrected data;
- the bad-block and scrub reports.
