# TriglaV SoC — radiation-tolerant microcontroller RTL

TriglaV is a small RISC-V microcontroller system-on-chip for the inside of
particle-physics detectors. There, ionising particles flip flip-flops and
SRAM cells all the time. The design copes with this in two ways:

* every register is **triplicated and majority-voted**, and the voted value is
  fed back, so an upset copy is repaired at the next clock edge;
* every memory word and every peripheral-bus word carries a **byte-level
  Hamming(13,8) code**. A scrubber sweeps both 32 kB memories in the background
  and repairs single upsets before a second one can hit the same byte.

Every repaired upset is also **counted per module**. Uncorrectable ("double")
errors raise a dedicated pin. The chip can therefore be used as its own
radiation monitor: the measured cross-sections come from these counters.

This repository holds synthesizable SystemVerilog for the SoC around the CPU:
the crossbar, the two memory protection units with their SRAMs, the protected
peripheral bus, the peripherals, the I2C access port and the upset counters.
Each module has a self-checking testbench, and one end-to-end testbench runs
the whole SoC at full size.

The architecture follows the published description of the TriglaV ASIC (a
28 nm prototype running at 250 MHz). That description gives the block diagram,
the protection scheme, the ECC code, the scrubber rate and the observability
features. It does not give register maps, bus timing, peripheral behaviour or
the I2C transfer format. All of those are this implementation's own choices,
listed under [Departures and own choices](#departures-and-own-choices).

## Block map

```
   Ibex instr  Ibex data   JTAG debug    I2C pins
   (port)      (port)      (port)          |
       |          |           |         i2c_obi
       +----------+-----+-----+-----------+
                        |
                 obi_xbar  (4 x 4, TMR state)
       +-----------+----+-------+-----------------+
       |           |            |                 |
  bootloader    mspu (I)     mspu (D)       apb_rt_bridge
   (port)      32 kB SRAM   32 kB SRAM            |  APB-RT: triplicated control,
                  ^             ^                  |  ECC address and data
                  |             |      +---+---+---+---+---+---+---+
                  |             |      |   |   |   |   |   |   |   |   apbrt_slv on each
                  +-------------+----- I   D  ctl  T0  T1 UART GPIO PLIC
                                     regs regs
```

| module | role |
|---|---|
| `triglav_top` | the SoC without CPU, debug unit and boot memory; their bus ports are top-level ports |
| `obi_xbar` | N x M OBI crossbar, round-robin per slave, in-order responses |
| `mspu` | Memory Scrubbing and Protection Unit: ECC on the bus port, scrubber on the second SRAM port, counters |
| `sram_dp` | dual-port SRAM, 8192 x 52 bits per MSPU |
| `ecc_enc32`, `ecc_dec32` | Hamming(13,8) per byte: encode, and correct or flag |
| `tmr_reg` | triplicated register with triplicated voters and voted feedback |
| `apb_rt_bridge` | OBI to protected APB (APB-RT) |
| `apbrt_slv` | protected APB to a plain APB port, one per peripheral |
| `soc_ctrl` | per-module TMR and ECC counters, double-error pin, program-return register |
| `timer`, `uart`, `gpio`, `plic` | peripherals |
| `i2c_obi` | I2C target with an OBI master port, used to load and configure the chip |
| `triglav_pkg` | shared types, address map, ECC functions |

## How a register survives an upset: `tmr_reg`

All state of every module, apart from the SRAM contents, lives in one
`tmr_reg` per module. The module packs its state into a struct. It computes the
next state from the **voted** value `q_o` and hands that next state back as
`d_i`. `tmr_reg` keeps three copies of the state. Each copy has its own
majority voter (`q3_o[0..2]`), so a voter is not a single point of failure.

Suppose a particle flips one bit of copy 1. The voters still output the old,
correct value. The next state is computed from that value, and at the next
clock edge all three copies load it, which overwrites the bad bit. An upset
therefore lasts at most one cycle. `err_o` is high in exactly that cycle.
`soc_ctrl` counts those cycles, one counter per module. If two copies are hit
in the same bit before a clock edge, the wrong value wins the vote. The
`tb_tmr_reg` testbench checks this case as well.

The published design triplicates the combinational logic too: a tool generates
the three-fold netlist from plain RTL. This RTL is the plain form: registers
and voters are triplicated, but the next-state logic is written once. A
transient in that logic can therefore still be latched into all three copies.
The APB-RT control lines are the exception: `apb_rt_bridge` drives each copy of
psel/penable/pwrite from its own voter output.

## The byte code: Hamming(13,8)

Each byte is coded on its own into 13 bits: a Hamming(12,8) code with parity
at positions 1, 2, 4 and 8, plus an overall parity bit.

* codeword bit `cw[p-1]` holds position `p` (1..12), and `cw[12]` is the XOR of
  all the others;
* data bits d0..d7 sit at positions 3, 5, 6, 7, 9, 10, 11, 12;
* parity at position 2^k is the XOR of the data positions whose index has bit
  k set.

On decode, the syndrome is the XOR of the positions of all set bits (1..12), and
`par` is the XOR of all 13 bits.

| par | syndrome | result |
|---|---|---|
| 0 | 0 | clean |
| 1 | 0 | the overall parity bit flipped; data is good |
| 1 | 1..12 | one flip at that position: corrected |
| 1 | 13..15 | uncorrectable (double error) |
| 0 | non-zero | two flips: double error |

A 32-bit word is four such codewords, 52 bits, with byte `b` in
`cw[13*b +: 13]`. Up to four flips per word are corrected, as long as they fall
in different bytes. Because each byte has its own code, a byte write needs no
read-modify-write: the SRAM has one write enable per 13-bit lane.

## The memory protection unit: `mspu`

Each MSPU wraps one dual-port SRAM of 8192 x 52 bits, which holds 32 kB of data.

**Bus port (SRAM port A).** Every request is granted at once, and the response
comes on the next cycle. Writes are encoded per byte, and only the enabled
lanes are written. Reads are decoded: single errors are repaired in the
returned data, and a double error sets the OBI `err` bit and pulses `de_o`.
A read does not write the repaired word back; the scrubber does that.

**Scrubber (SRAM port B).** It is a two-stage pipeline. In cycle *t* it reads
word `ptr`. In cycle *t+1* the word is decoded. If any byte holds a correctable
error, port B writes the repaired bytes back to the same address in that cycle,
and the next read waits one cycle. Otherwise the next word is read at once. So
the scrubber reads one word per cycle, and a correction costs two cycles.
The 8192 words take 8192 cycles, which is 32.8 µs at 250 MHz. This matches the
33 µs of the published design; the full-size testbench measures it. Three rules
keep the scrubber safe:

* only the corrected bytes are written back; a byte with a double error is never
  re-encoded, since that would hide it;
* if the bus port writes the same word in the read cycle or in the write-back
  cycle, the write-back is dropped, so fresh data is never overwritten by stale
  data;
* `DIV` slows the scrubber to one read every `DIV+1` cycles. `DIV = 0` is the
  maximum rate.

Scrubbing is off after reset, because SRAM contents are random at power-up and
would show up as double errors. Software clears the memory and then sets
`CTRL.0`.

MSPU registers, on the APB-RT:

| offset | name | meaning |
|---|---|---|
| 0x00 | CTRL | bit0 scrub enable |
| 0x04 | DIV | scrub interval − 1 |
| 0x08 | CORR_OBI | bytes corrected on bus reads (write clears) |
| 0x0C | CORR_SCRUB | bytes corrected by the scrubber (write clears) |
| 0x10 | DE_CNT | double-error bytes seen on either port (write clears) |
| 0x14 | SCRUB_PTR | next word to scrub |
| 0x18 | PASSES | completed sweeps (write clears) |

## The protected peripheral bus: APB-RT

The peripheral bus is not fully triplicated. Its control lines (psel, penable,
pwrite, pready, pslverr) are carried three times and voted at the receiver. Its
address, write data and read data are carried as 52-bit Hamming codewords
(`apbrt_req_t`, `apbrt_rsp_t` in `triglav_pkg`).

* `apb_rt_bridge` takes one OBI request at a time. It runs an APB setup cycle
  and an access cycle, waits for the voted pready, and answers on OBI one cycle
  later. For a zero-wait peripheral the response comes 3 cycles after the grant.
  A double error in read data becomes an OBI error.
* `apbrt_slv` sits in front of each peripheral. It is purely combinational: it
  votes the control lines, corrects the address and write data, and encodes the
  read data. If the address or write data has a double error, the peripheral is
  not selected and the access ends with pslverr.
* Peripheral slot = `addr[14:12]`, 4 KiB per slot. There are no byte strobes:
  writes are whole words.

## Upset observability: `soc_ctrl`

| offset | name | meaning |
|---|---|---|
| 0x000 | RETURN | program return value; writing it raises `ret_o` |
| 0x004 | STATUS | bit0 `ret_o`, bit1 `de_o`; write 1 to clear |
| 0x008 | DE_CNT | double errors from any source |
| 0x100 + 4i | TMR_CNT[i] | cycles in which module i's copies disagreed |
| 0x200 + 4i | ECC_CNT[i] | cycles in which module i corrected a byte |

TMR index: 0 crossbar, 1 I-MSPU, 2 D-MSPU, 3 APB-RT bridge, 4 soc_ctrl,
5 timer0, 6 timer1, 7 UART, 8 GPIO, 9 PLIC, 10 I2C.
ECC index: 0 I-MSPU, 1 D-MSPU, 2 APB-RT read data, 3 APB-RT address and write
data at the peripherals.

`de_o` is sticky until software clears it, so a tester sees every double error.
`ret_o` and `retval_o` let a test setup see that a program finished, and how,
without any bus access.

## Address map

| base | slave |
|---|---|
| 0x0000_0000 | bootloader (external port) |
| 0x0001_0000 | I-MSPU, 32 kB |
| 0x0002_0000 | D-MSPU, 32 kB |
| 0x1000_0000 + 0x1000·k | APB-RT slot k: 0 soc_ctrl, 1 timer0, 2 timer1, 3 UART, 4 GPIO, 5 PLIC, 6 I-MSPU regs, 7 D-MSPU regs |

An address that no slave owns gets an OBI error response from the crossbar.

## Crossbar: `obi_xbar`

Each slave has its own round-robin arbiter, so masters that target different
slaves are served in the same cycle. Each master may have one transaction
outstanding. It may issue its next request in the cycle its response arrives,
so a master streaming to an MSPU keeps one transfer per cycle. Each slave
queues up to two granted masters and returns responses in order. The grant is
combinational from the request, as OBI requires. Because of this, lint tools
may report a loop through the packed slave-response array in `triglav_top`. It
is not a real loop: the rvalid that the crossbar looks at is registered.

## Loading the chip over I2C: `i2c_obi`

The I2C target answers to device address 0x50 and turns I2C transfers into OBI
transfers:

```
write: S | 0x50+W | A31..24 A23..16 A15..8 A7..0 | D31..24 .. D7..0 | D31..24 .. | P
read:  S | 0x50+R | D31..24 .. D7..0 | D31..24 .. | P      (address set by a preceding write)
```

Every four data bytes of a write become one 32-bit OBI write, and the address
then advances by 4. A read fetches the word first, holding SCL low (clock
stretching) while the OBI read is under way. When the controller acknowledges
a word's last byte, the target fetches the next word; a not-acknowledge ends
the read. SCL and SDA are sampled by the system clock through two-flop
synchronisers, so the system clock must run at least about 8 times faster than
SCL.

## Peripherals

The published design only names these, so each is the plain form. All are
plain-APB slaves with zero wait states, and all keep their state in a `tmr_reg`.

* `timer`: CTRL (enable, auto-reload, irq enable), PRESC, COUNT, CMP, STATUS
  (match flag, write 1 to clear). The count advances every PRESC+1 cycles.
* `uart`: 8N1. TXDATA, RXDATA, STATUS (tx busy, rx valid, overrun), DIV (cycles
  per bit − 1; reset value 2169, which is 115200 baud at 250 MHz). The receiver
  samples mid-bit.
* `gpio`: OUT, OE, IN (after two synchroniser flops), IE (level interrupt).
* `plic`: edge-captured pending bits, enable mask, and a CLAIM read that returns
  the lowest enabled pending source + 1 and clears it. There are no priorities.
  Sources: 0 timer0, 1 timer1, 2 UART, 3 GPIO.

## Not in this RTL

* **The CPU.** This is the Ibex RV32IMC core, triplicated with a tool. Its
  instruction and data OBI ports and its interrupt line are ports of
  `triglav_top`.
* **The JTAG debug unit.** Its OBI master port is a top-level port.
* **The bootloader.** Its contents and organisation are not published. Its OBI
  slave port is a top-level port.
* **The pad ring** (including the power-on reset cell) **and the triplicated
  reset tree.** These are physical-design items. The 10 µm spacing of TMR
  flip-flops is also a placement rule, not RTL.

## Departures and own choices

Taken from the published design: the block diagram, the 4 x 4 OBI crossbar, the
32 kB dual-port SRAM per MSPU, byte-level Hamming(13,8), the triplicated voters
with voted feedback, the APB-RT split (control triplicated, address and data
ECC), the scrubber rate (one word per cycle, two cycles per correction, one
sweep in 33 µs), per-module TMR and ECC counters, the double-error pin, and the
program-return signal and register.

This design's own choices:

* the combinational logic is not triplicated;
* the OBI buses are single wires that carry voted values; in the published
  chip the whole OBI interface is triplicated, so a transient on a bus wire
  is not masked here;
* the codeword bit order;
* register maps and the address map;
* bus timing and arbitration;
* the collision and write-back rules of the scrubber;
* the error policy of the APB-RT;
* the I2C transfer format;
* all peripheral behaviour;
* the asynchronous active-low reset.

## Simulating

Everything is plain SystemVerilog-2017. The tests need Verilator 5 with
`--timing`. The package must come first, and `-y` lets Verilator find the
other modules:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/triglav_pkg.sv tb/tb_triglav_top.sv --top-module tb_triglav_top
./obj_dir/Vtb_triglav_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`.

| testbench | what it proves |
|---|---|
| `tb_ecc` | all 256 byte values: the encoder matches hand-written parity equations; every single flip is corrected and every double flip is flagged |
| `tb_tmr_reg` | upsets in one copy are out-voted and repaired in one cycle; `err_o` shows them |
| `tb_sram_dp` | both ports at once, lane enables, against a reference array |
| `tb_mspu` | bus reads and writes with one-cycle latency; read correction; scrubber repair; a sweep of exactly WORDS cycles (4·WORDS at DIV=3); double errors not written back; traffic during scrubbing |
| `tb_obi_xbar` | 4 masters against 3 fast slaves and 1 slow one: data integrity, decode errors, arbitration, parallel grants, back-to-back grants, state upsets |
| `tb_apb_rt` | bridge + slave ports: 3-cycle latency, single flips on address, data and control corrected, double flips turned into errors |
| `tb_soc_ctrl`, `tb_timer`, `tb_uart`, `tb_gpio`, `tb_plic`, `tb_i2c_obi` | each block's registers and protocol |
| `tb_triglav_top` | full size at 250 MHz: memory clear, loading over I2C under bus contention, a scrub sweep measured at 8192 cycles / 32.8 µs, SRAM upsets corrected and counted per module, the double-error pin, TMR upsets counted per module, a timer interrupt through the PLIC, UART loopback, GPIO, program return |
| `tb_seu_campaign` | a simulated irradiation run at full size: 300 upsets in the triplicated state of all 11 modules and about 400 in the two SRAMs, while both CPU ports read and both scrubbers sweep. Every module's TMR counter must equal the upsets it received, each scrubber count the upsets in its memory, every read must return correct data, and double upsets must raise `de_o` and a bus error until software rewrites the word |

The testbenches inject upsets by writing directly into the SRAM array
(`u_sram.mem`) and into one copy of a module's triplicated state
(`u_state.r[copy]`).

`tb_obi_mem`, `tb_obi_master` and `tb_apb_regs` are behavioural helpers: a
memory slave, a bus master and an APB register file.
