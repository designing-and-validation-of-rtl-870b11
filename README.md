# Four-bit true dual-port block RAM

A small synchronous block RAM of the kind an FPGA provides: 256 words of
4 bits, reached through two completely independent ports that share one
clock. Each port has its own chip select (CS), write (WR) and read (RD)
controls, an 8-bit address, a 4-bit data input and a 4-bit data output. Used
through one port, it is a single-port memory that reads or writes once per
cycle. With both ports in use, a read and a write (or two reads, or two
writes) take place in the same clock cycle.

## Port behaviour

Each port samples its controls on the rising edge of `clk`:

| CS | WR | RD | operation at the edge                                         |
|----|----|----|---------------------------------------------------------------|
| 0  | x  | x  | nothing; data out holds                                       |
| 1  | 0  | 0  | nothing; data out holds                                       |
| 1  | 1  | 0  | write data in to the addressed word; data out holds           |
| 1  | 0  | 1  | read the addressed word into the data out register            |
| 1  | 1  | 1  | write, as above; the read is suppressed (WR wins over RD)     |

Timing of a read: the address is sampled on edge *k*, and the word appears on
the data output just after edge *k*. It stays there until the port's next
read. The read latency is therefore one clock, the latency of a registered
FPGA block RAM output. A write takes effect at the edge. A read of the same
word through either port in any later cycle returns the new value.

When the two ports meet at the same word in the same cycle:

* **Read on one port, write on the other:** the read returns the word as it
  was before the write (read-before-write).
* **Write on both ports:** port A's data is stored.

Power-up and reset:

* Every word powers up as 0000.
* `rst_n` is a synchronous, active-low reset. It clears only the two data out
  registers. The stored words survive a reset, as they do in an FPGA block RAM.

## Structure

```
bram_top
 ├─ bram_port_ctrl  u_ctrl_a   CS/WR/RD of port A -> write enable, read enable
 ├─ bram_port_ctrl  u_ctrl_b   same for port B
 └─ bram_array      u_array    2**ADDR_W x DATA_W words, two read/write ports,
                               registered read data
```

* **`bram_pkg`** holds the default geometry (`DATA_W_DEF = 4`,
  `ADDR_W_DEF = 8`) and `port_op_e`, the decoded operation of a port
  (`OP_IDLE`, `OP_WRITE`, `OP_READ`).
* **`bram_port_ctrl`** is the control logic of one port. It is purely
  combinational: `we = cs & wr`, `re = cs & rd & ~wr`. An immediate
  assertion checks that a port never reads and writes in the same cycle.
* **`bram_array`** is the storage, written as an array so that synthesis
  infers a true dual-port block RAM. Port B's write is issued before port A's
  in the same process, which is how port A wins a clash. The read registers
  sample the array before the cycle's writes land, which gives
  read-before-write.
* **`bram_top`** wires two decoders to the array. It also brings out `a_op`
  and `b_op`, the decoded operation of each port for the coming edge, for
  monitoring.

Parameters of `bram_top` and `bram_array`: `DATA_W` (word width, default 4)
and `ADDR_W` (address width, default 8, giving 256 words). Both can be changed
freely. Synthesised at the defaults, the design is one 1024-bit memory plus a
handful of gates.

## What is specified and what is chosen here

These points come from the design as specified:

* the 4-bit word and the 8-bit address;
* the CS, WR and RD controls and the conditions for a write and a read;
* two independent ports with simultaneous operation;
* all-zero initial contents;
* data out holding at 0000 while writes are in progress.

The rest is this implementation's choice:

* **Read latency:** data appears one clock after the address is sampled. The
  tables of the original design list data out on the same row as its address,
  without a clock-edge reference. A registered output was chosen because it
  is how block RAM behaves.
* **WR and RD together on one port:** the specification says both that all
  controls go high for simultaneous read and write, and that the read port is
  disabled as soon as WR goes high. Here WR wins on a single port. Simultaneous
  read and write is done through the two ports, at different addresses, as the
  dual-port description has it.
* **Same-address behaviour between ports** (read-before-write, port A winning
  a write clash): chosen here, not specified.
* **The reset input:** not specified; added here.
* **The `a_op`/`b_op` status outputs:** not specified; added here.
* **The write and read sequences** (described under Verification) address
  locations 1 to 8 with data 1 to 8. The eighth location is taken to be
  address 00001000.

## Verification

Each testbench checks its results itself and ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench            | what it does                                                                 |
|----------------------|------------------------------------------------------------------------------|
| `tb_bram_port_ctrl`  | all eight CS/WR/RD combinations against the truth table above               |
| `tb_bram_array`      | power-up zero, then 3000 random cycles on both ports against a reference model, with frequent same-address clashes; reset clears data out but keeps the contents |
| `tb_bram_tables`     | writes locations 1..8 with 1..8, then reads them back with data in held at 1000, through port A alone; prints each cycle as a table row and checks data out, including that it does not change before the clock edge |
| `tb_bram_top`        | the full design at its default size, against a reference model (details below) |

`tb_bram_top` runs the following sequence:

1. the write and read sequences;
2. directed cases: a write with CS low, WR and RD together, and every
   two-port combination, including both kinds of same-address clash;
3. a sweep that writes all 256 words through port A while port B reads each
   word back one cycle later;
4. 4000 random cycles.

It also checks `a_op`/`b_op` every cycle. It counts how often each behaviour
in the tables above occurred, and fails if any of them never did.

To simulate with Verilator, for example the full-design test:

```
verilator --binary --timing --assert -Irtl rtl/bram_pkg.sv tb/tb_bram_top.sv --top-module tb_bram_top
./obj_dir/Vtb_bram_top
```

Use the same command for the other testbenches, with their own name. For a
lint check of the RTL, run
`verilator --lint-only -Wall -Irtl rtl/bram_pkg.sv rtl/bram_top.sv`. The
linter notes that the memory array has both an initial value and procedural
writes. This is intended: it is the usual way to give a block RAM its
power-up contents.
