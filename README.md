# Parallel Block matrix multiplication coprocessor

A small, resource-lean coprocessor that computes `C = A x B` for integer
matrices. It uses very little arithmetic: four multiply-accumulate units.
The operands are sent to them serially. The work is cut into 2 x 2 blocks of
`C`. For one block, the controller walks the inner dimension `k` one step at a
time. At each step it sends two elements of column `k` of `A` and two elements
of row `k` of `B`, and the four units each add one product to their element of
the block. After `K` steps the block is finished. Its four elements go out to
the result memory one per clock, the units are cleared, and the next block
starts. This is the Parallel Block (PB) schedule with block size Si = Sj = 2.

The default configuration is an 8 x 8 by 8 x 8 product of signed 8-bit
elements with 36-bit results. That is 16 blocks of 45 clocks, 720 clocks in
all.

```
             +--------------------- main processor ----------------------+
 host ports  |  Matrix A (operand_mem)  --word-->+                       |
 ----------> |  Matrix B (operand_mem)  --word-->+--> FIFO A / FIFO B ---+--+
             |  Matrix C (result_mem)  <--DATA--------------------------+  |  |
             |  main_controller: Reset main, Main1..Main12, Check-request |  |  |
             +------------------------------------------------------------+  |  |
                  data_ack, done_from_main, S1/S2 |  ^ data_req             |  |
             +--------------------- slave processor -----------------------+  |
             |  slave_controller: Check-ack, Slave1..Slave6               |<-+
             |  operand regs -> 4 x processing_element -> 4:1 mux -> DATA  |
             +------------------------------------------------------------+
```

## The block schedule

For block `(rb, cb)`, processing element `p = 2r + c` (with `r, c` in {0, 1})
accumulates

```
C[2rb + r][2cb + c] = sum over k of A[2rb + r][k] * B[k][2cb + c]
```

The main controller moves over the blocks row by row. It does every block
column of block row 0, then every block column of block row 1, and so on. At
step `k`, the slave needs one word from each operand memory:

| memory   | word address | contents (high byte, low byte)     |
|----------|--------------|------------------------------------|
| Matrix A | `rb*K + k`   | `A[2rb+1][k]`, `A[2rb][k]`         |
| Matrix B | `cb*K + k`   | `B[k][2cb+1]`, `B[k][2cb]`         |
| Matrix C | `4n + s`     | element `s = 2r + c` of block `n`  |

Here `n = rb*(J/2) + cb` is the block's position in the schedule. **The host
must load `A` and `B` in this layout.** The words of one block row of `A`, or
of one block column of `B`, are consecutive in `k`, so the controller reads
them with a counter. The controller keeps element addresses, which step by two
per read (two elements per word). The memory gets the element address divided
by two. `C` is stored block by block, not row-major.

Between blocks, the controller reloads its address counters:

| state  | used when                              | A address              | B address              |
|--------|----------------------------------------|------------------------|------------------------|
| Main10 | next block column, block row 0         | reset to 0             | preset to next column  |
| Main11 | last block column done, next block row | preset to next row     | preset to column 0     |
| Main12 | next block column, later block row     | preset to current row  | preset to next column  |

With a 4 x 4 result there are four blocks, and the sequence is Main10, Main11,
Main12, then back to Reset main. That is the run drawn in the original state
diagram.

## The two controllers and their handshake

The main and slave state machines work in lock-step through three signals:

- `data_ack`: main to slave. FIFO A and FIFO B have just been loaded.
- `data_req`: slave to main. The slave is waiting for operands.
- `done_from_main`: main to slave. The step just sent was the last of the
  block.

The select `S1,S2` (`sel`) chooses which processing element drives the 36-bit
`DATA` bus.

One step of the inner dimension, clock by clock:

| clock | main state        | slave state | what happens                                        |
|-------|-------------------|-------------|-----------------------------------------------------|
| t     | Main1             | Check-ack   | read A and B words; element addresses += 2          |
| t+1   | Main2             | Check-ack   | words into FIFO A/B; `data_ack`; N count += 1       |
| t+2   | Main3             | Slave1      | FIFO registers into operand registers               |
| t+3   | Check-request     | Slave2      | all four PEs multiply-accumulate; `data_req` low    |
| t+4   | Check-request     | Check-ack   | `data_req` high, so main goes to Main1 at t+5       |

A step takes 5 clocks. On the last step of a block, Main3 goes to Main4
instead. Main4 falls in the same clock as Slave2, and `done_from_main` is high
there. The slave then runs Slave3..Slave6 in step with the main's Main5..Main8.
In each of those clocks the slave presents one element on `DATA` and the main
stores it in Matrix C at the next C address. Slave6 clears the processing
elements as it leaves, and Main9 picks the next block. So a block takes
`5K + 5` clocks. From the first Main1, a run reaches `done` after
`(I/2)(J/2)(5K+5) - 2` clocks.

The lock-step timing has no slack. The slave tests `done_from_main` in exactly
one clock, and the stored set must be the one the slave is sending. Two
assertions in `matmul_top` guard these rules:

- `data_ack` is only raised while `data_req` is high.
- Every write to C happens while the slave is sending the set that `sel`
  names.

If you change either state machine, keep the Main4/Slave2 and Main5/Slave3
alignment.

## Numbers

- **Operands.** Elements are signed two's-complement 8-bit integers. Any
  fixed-point scaling is up to the user.
- **Accumulators.** Each processing element keeps a full-precision 36-bit
  accumulator. The worst 8 x 8 result, `8 * (-128) * (-128) = 131072`, needs
  19 bits. 36 bits cover any `K` up to 2^20.
- **Overflow.** Nothing saturates, and nothing reports overflow.

## Size

At the default parameters, a generic synthesis gives:

- about 290 flip-flop bits;
- 3328 memory bits: two 32 x 16 operand memories and one 64 x 36 result
  memory;
- four 8 x 8 multipliers.

Most of the flip-flops are the four 36-bit accumulators. The rest are the
one-word FIFOs and operand registers, the read registers of the memories and
the `c_out` register.

For comparison, the original implementation on a Spartan-3E was reported at
176 flip-flops and about 300 four-input LUTs. That implementation had no host
ports.

## Top-level interface (`matmul_top`)

| port          | dir | width              | meaning                                                                 |
|---------------|-----|--------------------|-------------------------------------------------------------------------|
| `clk`         | in  | 1                  | clock                                                                   |
| `rst`         | in  | 1                  | synchronous, active high; hold for at least one clock before use        |
| `start`       | in  | 1                  | level; seen in Reset main, the run starts the next clock                |
| `c_out`       | out | ACC_W              | element of C written last (updates one clock after each store)          |
| `busy`        | out | 1                  | high from the clock after `start` until the end of the run              |
| `done`        | out | 1                  | one-clock pulse when the last block has been stored                     |
| `host_a_we`   | in  | 1                  | write `host_wdata` to Matrix A word `host_a_addr`                       |
| `host_b_we`   | in  | 1                  | write `host_wdata` to Matrix B word `host_b_addr`                       |
| `host_wdata`  | in  | 2*DATA_W           | two elements, layout as above                                           |
| `host_c_addr` | in  | log2(I*J)          | Matrix C read address                                                   |
| `host_c_data` | out | ACC_W              | Matrix C word, one clock after the address                              |

Load the operand memories only while the coprocessor is idle. While it is in
Reset main, the controller holds the slave processor in reset. If `start` is
still high when a run ends, a new run begins at once.

Parameters:

- `DIM_I`, `DIM_K`, `DIM_J`: matrix sizes, default 8 each. `DIM_I` and
  `DIM_J` must be even.
- `DATA_W`: element width, default 8.
- `ACC_W`: result width, default 36.

The 2 x 2 block shape is fixed in `matmul_pkg`. The four unload states depend
on it.

## Modules

| file                     | role                                                                   |
|--------------------------|------------------------------------------------------------------------|
| `matmul_pkg.sv`          | block shape, state enumerations of both controllers                    |
| `matmul_top.sv`          | wiring of the main and slave processors, host ports, handshake assertions |
| `main_controller.sv`     | main state machine and the strobes of its five counters                 |
| `ctrl_counter.sv`        | reset / enable / preset counter: address A, B, C, N count, final count  |
| `operand_mem.sv`         | Matrix A or B: synchronous-read word memory with a host write port     |
| `result_mem.sv`          | Matrix C: word memory, host read port, last-written register (`c_out`) |
| `slave_processor.sv`     | FIFO A/B, operand registers, four PEs, result multiplexer              |
| `slave_controller.sv`    | slave state machine                                                    |
| `processing_element.sv`  | one signed multiply-accumulate with clear                              |

## Simulation

Every testbench in `tb/` checks itself. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/matmul_pkg.sv tb/tb_matmul_top.sv --top-module tb_matmul_top
./obj_dir/Vtb_matmul_top
```

| testbench                | what it runs                                                                       |
|--------------------------|------------------------------------------------------------------------------------|
| `tb_matmul_top`          | default 8 x 8 design end to end; details below                                     |
| `tb_matmul_top_4blk`     | 4 x 8 times 8 x 4 (four blocks); also checks the Main10/Main11/Main12/Reset branch order |
| `tb_matmul_top_fig1`     | 4 x 4 times 4 x 4 in 2 x 2 blocks, the small example of the PB scheme              |
| `tb_main_controller`     | address sequence, C writes, branches and clock count against a stand-in slave      |
| `tb_slave_processor`     | MAC unit against a reference 2 x 2 block product, with the main's timing           |
| `tb_slave_controller`    | state sequence and outputs                                                         |
| `tb_processing_element`  | the accumulator, including the extreme values                                      |
| `tb_operand_mem`         | operand memory                                                                     |
| `tb_result_mem`          | result memory                                                                      |

`tb_matmul_top` runs five operand sets: random, all -128, 127 x -128, identity
x random, and random again. It checks every element of C, `c_out`, and the
clock count. It also counts each mechanism (request waits, the three
block-change states, unloads, PE clears, return to Reset main, negative and
wide results) and fails if any of them never happens.

Every testbench runs in well under a second.

## How this design reads its source, and where it is its own

The original description gives the algorithm, the block diagram and both
state machines state by state. It does not give bit-level details. These
choices are this design's own:

- **Matrix size.** The description names an 8 x 8 multiplier with four
  processing elements. Its main state machine, however, stops after four
  blocks, and its simulation shows a 16-word result memory: that is a 4 x 4
  result. The 8 x 8 size is the default here. The block sequencing is
  generalised so that `DIM_I = DIM_J = 4` reproduces the four-block run
  exactly (`tb_matmul_top_4blk`).
- **N count.** The state list says to stop "when N count = 7" right after
  incrementing it. Read literally, that sends only seven steps. Here the
  count is compared with `K` after its increment, so all eight steps are
  sent, the last being step 7.
- **Branch after each block.** The text and the state diagram disagree on
  which final count leads to which of Main10/11/12. The text is followed.
  The preset values are this design's: a preset loads the start address of
  the target block row or column, so Main11's preset of B loads 0.
- **Result multiplexer.** It is described as 2:1, but it has four inputs and
  two select lines (S1, S2). It is built as a 4:1 multiplexer. The main
  controller drives its select.
- **Data request.** The slave's request is high exactly while it waits for
  operands.
- **Handshake timing.** The clock-by-clock alignment in the table above is
  derived here.
- **Not specified in the source:**
  - the memory layouts and preset addresses;
  - signed arithmetic;
  - the host ports, `busy` and `done`;
  - one-word-deep FIFOs;
  - the order of the four result sets.

The original FPGA implementation had only the clock, reset, start and 36-bit
result pins. This RTL adds the host ports so that the matrices can be loaded
and read.
