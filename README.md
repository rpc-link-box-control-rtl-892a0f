# Link Box control logic for the CMS RPC link system

The link electronics of the CMS RPC muon trigger sit next to the detector, in
Link Boxes. Each box has one Control Board and several Link Boards. Every
Link Board carries SRAM-based FPGAs, so they must be loaded at power-up. They
must also be reloaded from time to time, because radiation corrupts their
configuration memory. The only path to the control room is a slow,
radiation-hard CCU25 ring. This RTL is the digital part of the box that
copes with all of that:

* The configuration images live in FLASH memory on the boards themselves.
  The FPGAs load locally at full speed instead of over the link.
* The images are stored with a light error-detecting and error-correcting
  code. Background readers keep checking the FLASH and call for a refresh
  before the damage becomes uncorrectable.
* A small controller that is not itself an SRAM FPGA starts everything.
  This is the CBIC, meant for a one-time-programmable chip, with its state
  triplicated. If the FLASH contents are bad, it falls back to loading over
  the CCU25 link.
* The CCU25's 8-bit memory bus is stretched into a 16-bit Control Bus
  (CBus) that reaches every board in the box.

```
             CCU25 memory bus (8-bit, 50 ns strobes in block mode)
                                  |
  Control Board   +---------------v-------------------------------+
                  | CBIC  ccu_block_conv -> ccu_width_conv --+     |
                  |       local regs <-----------------------+     |
                  |       cbus_master <----------------------+     |
                  |       fpga_configurator (CB FLASH -> Select Map)|
                  |       tmr_reg state, 3 reset synchronisers     |
                  +----+--------------------------+----------------+
   CB FLASH <----------+  CBPC (cbus_slave, flash_writer, bg_checker)
                            |
        =================== Control Bus: 16-bit address, 16-bit data ==========
              |                         |                          |
  Link Board  LBC 0                     LBC 1        ...           LBC N_LB-1
              (cbus_slave, fpga_configurator for 2 FPGAs,
               flash_writer, bg_checker, irq, Internal Interface)
```

The top module is `rlbcs_link_box`. The CCU25, the TTCrx, the FLASH chips
and the FPGAs being loaded are outside it; their pins are its ports. All
logic runs on one clock, the 40 MHz TTC clock.

## Power-up: who loads whom

Only the CBIC is alive at power-up. Its sequence (`cbic.sv`) is:

1. **BOOT / CFG.** Load the images one after the other from the Control
   Board FLASH. Image 0 goes to the CBPC (the FPGA on the Control Board),
   and images 1..N_LB go to the LBC FPGA of each Link Board. Each load goes
   through the FLASH decoder into a Select Map port, one byte per clock.
   Image t starts at logical FLASH word `t * 2^17`.
2. **SLEEP.** If every load succeeded, the CBIC raises `cbpc_active` and
   `lbc_active` and goes idle. From then on the CBPC owns the Control Board
   FLASH. Each LBC, once active, loads its own two FPGAs from its own Link
   Board FLASH.
3. **EMERG.** A load can fail in three ways:
   - an uncorrectable FLASH group;
   - INIT_B falling, which is a CRC error in the FPGA;
   - DONE never rising.

   On a failure the CBIC still tries the remaining targets, then enters
   emergency mode:
   - The CCU25 alarm is raised.
   - The CCU25 selects a target through `EM_TARGET` and streams its image
     through `EM_DATA`, two bytes per 16-bit write.
   - Writing the *activate* bit of `CTRL` returns the CBIC to SLEEP.

   A CCU25 parallel-port line (`ccu_force_emerg`) or the force bit of `CTRL`
   sends the CBIC straight into emergency mode without touching the FLASH.
   Use this to load diagnostic images.

A TTC command (`ttc_reconf`) or the reconfigure bit of `CTRL` restarts the
sequence from BOOT. A second TTC line (`ttc_lb_reconf`) only asks the LBCs to
reload their FPGAs.

## The FLASH code

Radiation flips programmed FLASH bits almost only in one direction: a 0
becomes a 1. The code exploits that:

| FLASH word bits | content                                   |
|-----------------|-------------------------------------------|
| 31..5           | 27 payload bits                           |
| 4..0            | number of zero bits in the payload        |

Any 0→1 flip lowers the zero count, so it cannot go unnoticed. A flip inside
the count field can only raise the stored count, which no longer matches
either.

A *group* is three data words plus one parity word. The parity payload is
the XOR of the three data payloads. A group holds 81 bits: five 16-bit words
plus one spare bit.
- **One bad word:** the decoder rebuilds it from the other three
  (`flash_decoder.sv`). This holds whichever word is bad, the parity word
  included.
- **Two or more bad words:** the group is *fatal*.

The coding efficiency is 80/128 = 5/8.

Data bit j of a group sits in payload bit j mod 27 of word j/27, least
significant bit first. Configuration bytes leave the decoder low byte first,
ten per group.

A radiation hit usually damages neighbouring cells, so the four words of a
group must not sit next to each other. The package function `scatter_addr`,
used by both the reader and the FLASH controller, reverses the
lowest four bits of the word address. The words of one group (logical
offsets 0..3) therefore land at physical offsets 0, 8, 4 and 12. The upper
address bits are untouched, so a group and its sector stay together and
sector erase still works.

Counting 27 zeros does not fit comfortably in one 25 ns clock.
`zero_count_pipe` counts three 9-bit slices in one stage and adds them in the
next.

### Read rate

`flash_reader` holds each address for `RD_CYC` = 6 clocks (150 ns). A group
costs 4 × 6 + 1 = 25 clocks for 10 bytes. It reads the next group while the
current one is being sent, so the Select Map side is fed continuously at that
rate. An XC2S300E image has 1,875,648 bits = 234,456 bytes = 23,446 groups.
From FLASH that takes 23,446 × 25 × 25 ns = **14.65 ms**. The Select Map port
alone, at one byte per clock, would need 5.86 ms.

## Stretching the CCU25 bus

The CCU25 drives an asynchronous 8-bit memory bus. In block mode each access
cycle is 250 ns, but the read or write strobe lasts only 50 ns, and read
data must be valid before the strobe ends. That is far too fast for a
backplane bus with real address decoding. Two converters sit between the
CCU25 and the Control Bus.

**`ccu_block_conv` (the timing).** Strobes are synchronised to the 40 MHz
clock, and their falling edge starts an access.
- **Writes are posted.** Address and data are captured and the CBus write
  runs afterwards.
- **Reads are served from a hold register.** Each read strobe starts a real
  read, whose result replaces the hold register when it comes back.
  - In single mode the strobe is long enough for the new byte to arrive
    before it ends.
  - In block mode the byte comes too late. Each read therefore returns the
    byte of the *previous* read, and the first byte of a block is a dummy.
  - A block read of n bytes is done as n+1 byte reads, and the first result
    is dropped (see `tb_ccu_model.sv`).

**`ccu_width_conv` (the width).** Byte address bit 0 selects the byte, and
the low byte comes first.
- A low-byte write is only stored. The high-byte write issues the 16-bit
  write.
- A low-byte read issues the 16-bit read and keeps the high byte. The
  high-byte read returns the kept byte without a bus cycle.

The timing budget for block reads is tight and is the main reason for the
CBus timing chosen here. A read must come back within one 250 ns CCU25
cycle (10 clocks):
- about 3 clocks of synchronisation;
- 1 clock of setup and a 4-clock strobe in `cbus_master`, with data taken in
  the last strobe clock;
- a slave that drives its data for the whole strobe (`cbus_slave` answers as
  soon as the synchronised strobe is seen);
- one-clock acknowledges on the way back.

If you slow down the CBus, block reads break first. The `overrun` flag in
the CBIC STATUS register reports a strobe that arrived while the previous
access was still pending.

## The Control Bus and register map

The CBus is asynchronous, with a 16-bit word address, 16-bit data and
active-low `wr_n`/`rd_n` strobes. Inside the top, the master's data and the
slaves' read data are separate nets. Each slave drives zero unless it is
selected and read, and the read data are ORed together. This stands in for
the tri-state backplane.

A CCU25 byte address is `{word address, byte}` (17 bits). Word addresses:

| range               | owner                                            |
|---------------------|--------------------------------------------------|
| 0000h–00FFh         | CBIC registers (never put on the CBus)           |
| 0100h–7FFFh         | CBPC                                             |
| 8000h + 800h·k      | Link Board k (2K words each, k = 0..15)          |

**CBIC** (`cbic.sv`):

| addr | reg       | access | content |
|------|-----------|--------|---------|
| 00h  | STATUS    | r      | `{ok_mask[7:0], flash_err, overrun, em_full, cfg_busy, alarm, 0, state[1:0]}`; state values: 0 BOOT, 1 CFG, 2 SLEEP, 3 EMERG |
| 01h  | CTRL      | w      | bit0 force emergency, bit1 reconfigure, bit2 activate |
| 02h  | EM_TARGET | w      | start an emergency load of target `wdata` |
| 03h  | EM_DATA   | w      | two image bytes, low byte first |
| 04h  | EM_RESULT | r      | `{ok_mask[7:0], fail_mask[7:0]}` |

**CBPC** (`cbpc.sv`):

| addr        | reg               | access | content |
|-------------|-------------------|--------|---------|
| 100h–103h   | FLASH controller  |        | see below |
| 110h        | STATUS            | r      | `{corrupt, fatal, chk_en, wr_busy, wr_error, 0…}` |
| 111h        | CTRL              | w      | bit0 clear flags, bit1 checker enable |
| 112h        | SCANS             | r      | completed checker passes |

**LBC** (`lbc.sv`), offsets from its base:

| offset      | reg               | access | content |
|-------------|-------------------|--------|---------|
| 000h        | STATUS            | r      | `{cfg_busy, cfg_failed, corrupt, fatal, chk_en, wr_busy, wr_error, flash_err, ok_mask[7:0]}` |
| 001h        | CTRL              | w      | bit0 load the FPGAs, bit1 clear interrupt causes, bit2 checker enable |
| 002h        | SCANS             | r      | completed checker passes |
| 100h–103h   | FLASH controller  |        | see below |
| 400h–7FFh   | Internal Interface| r/w    | registers of the Link Board FPGAs |

The Internal Interface is how the control room reaches the link
electronics once they run. A CBus access in this window becomes:
- `ii_addr` = offset bits 9..0, with `ii_wdata`;
- a one-clock `ii_we` or `ii_re` pulse at the start of the strobe.

`ii_rdata` must follow `ii_addr` combinationally. The window is open only
while every FPGA of the board is loaded and no load is pending. Otherwise
writes are dropped and reads return 0.

**FLASH controller** (`flash_writer.sv`), in both the CBPC and the LBC:

| offset | reg      | access | content |
|--------|----------|--------|---------|
| +0     | GROUP_LO | r/w    | group index, low 16 bits; logical word = 4 × group |
| +1     | GROUP_HI | r/w    | group index, high bits |
| +2     | DATA     | w      | append one 16-bit word to the buffer (16 groups = 80 words) |
|        |          | r      | buffer fill |
| +3     | CMD      | w      | 1 program the buffered groups, 2 erase the sector of the current group, 3 clear the buffer |
|        |          | r      | `{busy, error, 0…}` |

The controller encodes and scatters the data itself. It runs the standard
NOR unlock sequences for the two operations:
- program: 555h/AA, 2AAh/55, 555h/A0, then address/data;
- sector erase: …/80, …/30.

It then waits for the chip's ready line. The CCU25 only ships raw data.

## Checking and refreshing an image

`bg_checker` re-reads all images whenever the FLASH is otherwise idle. It
sets `corrupt` if any word failed its zero count, even when the group could
still be corrected. It sets `fatal` for an uncorrectable group. Either flag
raises the CBPC alarm or the LBC interrupt. The CCU25 sees two alarm lines:
- `ccu_alarm`: CBIC emergency mode or a CBPC flag;
- `ccu_lb_alarm`: the OR of all Link Board interrupts, which also covers
  failed FPGA loads.

To refresh image i of a board over the CCU25:
1. Write GROUP = i·2^17/4 to GROUP_LO/GROUP_HI, write CMD = 2 (erase), and
   poll CMD until busy clears.
2. Block-write the image into DATA, 80 words at a time. Issue CMD = 1 after
   each buffer and poll.
3. Clear the flags (CTRL). On a Link Board, also ask for a reload (LBC CTRL
   bit0).

`tb_rlbcs_link_box` does exactly this for a Link Board and for the Control
Board.

Arbitration inside the LBC gives the FLASH to the configurator first, then
to the writer, then to the checker. A load waits for a running write, and a
write command is ignored during a load.

## Triple redundancy

`tmr_ff` is three flip-flops sharing D and the clock, each with its own
synchronous reset, followed by a 2-of-3 majority. The separate resets stop
synthesis from merging the copies. `tmr_reg` builds a register from them
with a load enable in front of D. A copy hit by an upset is therefore
rewritten with the voted value on the next clock. The CBIC creates its three
resets with three separate two-stage synchronisers, and keeps its state and
force bit in a `tmr_reg`.

## Modules

| module               | role |
|----------------------|------|
| `rlbcs_pkg`          | FLASH word and group types, zero count, address scattering |
| `tmr_ff`, `tmr_reg`  | triple redundant storage |
| `zero_count_pipe`    | 2-stage zero counter |
| `flash_encoder`      | 81 bits → 4 protected FLASH words |
| `flash_decoder`      | check, correct one word, flag fatal groups |
| `flash_reader`       | read + decode an image, byte stream out |
| `selectmap_cfg`      | Select Map master: PROG_B, INIT_B, byte per clock, DONE |
| `fpga_configurator`  | load a list of FPGAs from FLASH or from a stream |
| `ccu_block_conv`     | CCU25 strobe timing, posted writes, delayed reads |
| `ccu_width_conv`     | 2 × 8-bit → 16-bit |
| `cbus_master`, `cbus_slave` | Control Bus cycles |
| `flash_writer`       | block write and sector erase controller |
| `bg_checker`         | background FLASH scrubber check |
| `cbic`, `cbpc`, `lbc`| the three controllers |
| `rlbcs_link_box`     | top: Control Board + N_LB Link Boards on one CBus |

Top-level defaults:

| parameter   | default   | meaning |
|-------------|-----------|---------|
| `N_LB`      | 3         | Link Boards |
| `CFG_BYTES` | 234456    | XC2S300E image |
| `FLASH_AW`  | 21        | 2M words, 16 image slots |
| `RD_CYC`    | 6         | clocks per FLASH read |
| `PROG_CYC`  | 16        | PROG_B pulse width, in clocks |
| `TIMEOUT`   | 65536     | clocks to wait for INIT_B/DONE |

For 16 Link Boards, set `FLASH_AW` = 22, since 17 images no longer fit in
2M words. Note that the CBIC STATUS register shows the results of only the
first eight targets.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/rlbcs_pkg.sv tb/tb_ref_pkg.sv \
  --top-module tb_rlbcs_link_box tb/tb_rlbcs_link_box.sv -o sim
./obj_dir/sim
```

- **Unit tests:** one `tb_<module>` per module. `tb_flash_addr_scatter`
  tests the package's `scatter_addr` function.
- **`tb_rlbcs_link_box`** runs the whole box with two Link Boards and
  100-byte images. It counts fourteen mechanisms and fails if any of them
  never happened:
  - power-up load;
  - Link Board loads;
  - single-mode CCU25 access;
  - block write;
  - delayed block read;
  - checker alarms on both board types;
  - Link Board and Control Board image refresh over the CCU25;
  - TTC reload;
  - emergency mode and emergency load;
  - forced emergency;
  - block access to FPGA registers through the Internal Interface.

  The testbench also checks that the two alarm lines stay separate.
- **`tb_rlbcs_full`** uses the top with all defaults. It runs a complete
  power-up with real-size images:
  - four Control Board loads and six Link Board FPGA loads;
  - 234,456 bytes each;
  - each load checked to take 586,150 ± 100 clocks.

  It takes well under a minute.
- **`tb_rlbcs_link_workloads`** also uses the defaults, in two parts:
  - **Link load:** the box powers up in forced emergency mode, and a whole
    234,456-byte image is loaded over the CCU25 bus at the block-mode rate.
    It takes 58.6 ms of bus time, so the logic never throttles the link.
  - **Block transfers:** blocks of 8, 16, 32 and 64 bytes go to a Link
    Board's Internal Interface. Each is checked for data and for the n × 250
    ns (write) or (n + 1) × 250 ns (read) bus time.

  The real link adds the CCU25 ring's own latency on top of this.

The models in `tb/` provide the environment:
- `tb_flash_model`: NOR FLASH with computed image contents and a corruption
  hook;
- `tb_fpga_model`: Select Map FPGA that checks every byte;
- `tb_ccu_model`: CCU25 strobes;
- `tb_cbus_driver`, `tb_cbus_mem`: Control Bus master and memory;
- `tb_ref_pkg`: an independent reference of the code and the test images.

## What follows the original design and what is filled in

These follow the published system:
- the Link Box structure;
- the roles of the CBIC, CBPC and LBC;
- the power-up, emergency and forced-emergency sequences;
- the alarm on corruption and on failed loads;
- the two CCU25 converters, with the dummy first read and posted slow
  writes;
- the FLASH word format (27 data bits plus a 5-bit zero count);
- the three-plus-one group with 81 usable bits;
- address scattering by swapping low address bits;
- the pipelined zero counter;
- triple redundant flip-flops with three synchronous resets;
- Select Map loading and the XC2S300E sizes.

These are this design's own choices, because the original gives no detail:
- the parity rule (XOR) and the correction rule;
- bit order inside a group, and which address bits are swapped;
- all register maps and the CBus address map;
- CBus and FLASH timing (150 ns FLASH reads give the published "about
  15 ms");
- the FLASH command set;
- the emergency data path and the *activate* command;
- the signals and timing of the Link Board Internal Interface, which the
  original only names;
- the wired-OR model of the bus;
- how much of the CBIC is triplicated (its state and force bit; the
  converters and the configurator are plain logic).

Not included:
- the CCU25 and its redundant ring;
- the TTCrx, optohybrid and multiplexer;
- the I2C controller of the CBPC;
- the data-processing firmware of the Link Board FPGAs.

Lint notes: a few signals are unused on purpose, and Verilator reports them:
- the checker's byte stream, which is only checked, never used;
- the Control Bus read pulse in the CBPC, since its reads have no side
  effects;
- the upper address bits already matched by the slave's decoder;
- the LBC's configurator stream input, which the LBC never uses.

The Control Bus read pulse is used only by the Link Board Internal
Interface.
