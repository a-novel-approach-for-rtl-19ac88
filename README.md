# March C+ memory BIST for an embedded RAM

Embedded memories take up most of a modern SoC's area, and the only practical way to
test them at speed is built-in self-test (BIST): logic next to the memory that writes
patterns, reads them back and flags any word that returns the wrong value. This design
is such a BIST, wrapped around a 256 x 8 RAM. It runs the March C+ algorithm, which
checks for stuck-at, transition and coupling faults, and for stuck-open faults thanks
to its extra reads. The algorithm sits in a small microcode table, so a different
march test needs a new table, not a new controller.

March C+ is six *march elements*. Each one visits every address in a fixed order and
applies the same short sequence of reads and writes at each address:

| # | order | operations at each address | element code |
|---|-------|----------------------------|--------------|
| 0 | up    | w0                         | `00`         |
| 1 | up    | r0, w1, r1                 | `01`         |
| 2 | up    | r1, w0, r0                 | `10`         |
| 3 | down  | r0, w1, r1                 | `01`         |
| 4 | down  | r1, w0, r0                 | `10`         |
| 5 | up    | r0                         | `11`         |

"w1" writes all ones, "r0" reads and expects all zeros, and so on. That makes 14
operations per word: 5n writes and 9n reads for an n-word memory.

## Structure

```
             start_test                                       sys_addr/data/ctrl
                 |                                                   |
          +------v-------+  march_ele, updown_order  +-------------+ |  +-----------+
          | control unit |-------------------------->| access unit |-+->| memory    |
          |  + microcode |  start_march              |  addr cnt   | MIU|  interface|--> RAM
          |    table     |<--------------------------|  seq cnt    |    |  unit     |<-- (256x8)
          +--------------+  end_march                |  Moore FSM  |    | comparator|
                 |                                   +-------------+    +-----------+
              end_test                                                     pass_fail, diag_addr
```

* **Control unit** (`mbist_control_unit`, with `mbist_microcode_rom`). This unit
  sequences the elements. It presents one microcode word (element code plus address
  order) and raises `start_march`. It then waits for `end_march`, drops `start_march`
  for one cycle and moves on to the next word. After the word marked *last*, it raises
  `end_test`.
* **Access unit** (`mbist_access_unit`). This unit turns one element into one memory
  operation per clock. It has three parts:
  * **Address counter** (`mbist_address_counter`). Between elements it is preset to 0
    (up) or 255 (down). It steps once the last operation at an address is done. Its
    `done` output is high while it stands at the element's final address.
  * **Sequence counter** (`mbist_sequence_counter`). It holds the index of the current
    operation within the element: always 0 for one-operation elements, and 0, 1, 2 for
    three-operation elements.
  * **Moore machine** (`mbist_moore_machine`). It has five states: idle, w0, r0, w1 and
    r1. Its state alone sets the read/write control and the data (all zeros or all
    ones). It moves to the next state from the element code, the operation index and
    `done`. After the last operation at the last address it goes back to idle and
    pulses `end_march`.
* **Memory interface unit** (`mbist_miu`). Three registers capture the access unit's
  outputs each clock:
  * the address register (called the Address Generation Block);
  * the Data register;
  * the Control register, plus an operation-valid bit.

  Three 2:1 multiplexers choose between these registers (`start_test` = 1) and the
  system's own address, data and write signals (`start_test` = 0). The memory is
  therefore usable as an ordinary RAM whenever no test runs.
* **Comparator** (`mbist_comparator`). During a test read, it compares the memory
  output with the Data register.
* **Memory** (`mbist_sram`). A 2^ADDR_W x DATA_W array with synchronous write and
  combinational read. It has a fault hook that makes one cell faulty, so that the fail
  path and the algorithm's fault coverage can be exercised (see below).

`mbist_pkg` holds the shared element-code enum, the microcode word struct, the
pass/fail codes and the read/write polarity.

## How an element runs: the Moore machine

This is the part worth reading closely. The machine's next state depends on the
element code `S` and the operation index `Ct` (the sequence counter):

| from  | condition                     | to                        |
|-------|-------------------------------|---------------------------|
| idle  | start_march, S=00             | w0                        |
| idle  | start_march, S=01 or S=11     | r0                        |
| idle  | start_march, S=10             | r1                        |
| r0    | S=01, Ct=0                    | w1                        |
| w1    | S=01, Ct=1                    | r1                        |
| r1    | S=01, Ct=2                    | r0, or idle if done       |
| r1    | S=10, Ct=0                    | w0                        |
| w0    | S=10, Ct=1                    | r0                        |
| r0    | S=10, Ct=2                    | r1, or idle if done       |
| w0    | S=00                          | w0, or idle if done       |
| r0    | S=11                          | r0, or idle if done       |

Any state goes to idle if `start_march` falls, which abandons the element without an
`end_march` pulse. In idle the machine ignores `start_march` while `end_march` is
still high: for that one cycle the control unit has not yet seen the end of the
element.

The address counter steps on the same clock edge at which the sequence counter wraps
to 0. So while the machine sits in the last operation of an address, `done` already
tells whether this was the final address. No extra cycle is needed at the end of an
element.

## Timing

* One memory operation per clock. An element of k operations over n words takes k·n
  cycles, plus one cycle to start.
* The hand-over between elements costs 3 cycles: the `end_march` pulse, one cycle with
  `start_march` low, and the start cycle. A full test of the 256-word memory takes
  3584 operations, which is 3602 clock cycles from `start_test` to `end_test`.
* The access unit issues an operation in cycle t. The MIU registers it, so the memory
  sees it in cycle t+1. A write takes effect at the end of t+1. A read's `pass_fail`
  and `diag_addr` are valid during t+1.
* `end_test` stays high until `start_test` is taken low. Taking `start_test` low at
  any time stops the test and returns control of the memory to the system port.
  Raising it again starts from the first element.

## Interface of `mbist_top`

| port          | dir | width  | meaning |
|---------------|-----|--------|---------|
| `clk`         | in  | 1      | clock, rising edge |
| `reset_n`     | in  | 1      | asynchronous reset, active low |
| `start_test`  | in  | 1      | 1 runs the test and gives the BIST the memory; 0 gives the memory to the system |
| `end_test`    | out | 1      | test finished |
| `pass_fail`   | out | 2      | `11` read matched, `10` read mismatched, `00` no comparison this cycle |
| `diag_addr`   | out | ADDR_W | address of the word being compared: log it when `pass_fail` = `10` |
| `sys_addr`, `sys_data`, `sys_ctrl` | in | ADDR_W, DATA_W, 1 | system access in normal mode (`sys_ctrl` = 1 writes) |
| `mem_rdata`   | out | DATA_W | memory read data |
| `fi_en`, `fi_type`, `fi_addr`, `fi_agg`, `fi_bit`, `fi_val` | in | 1, 2, ADDR_W, ADDR_W, log2(DATA_W), 1 | memory fault hook (next section); tie `fi_en` to 0 in use |

Parameters: `ADDR_W` = 8 and `DATA_W` = 8.

`pass_fail` is a per-read result, not a sticky flag. Anything that needs a summary
must gather it, for example by OR-ing the fail code over the test.

## Fault hook and fault coverage

The memory model can carry one fault at a time. The faulty cell (the *victim*) is bit
`fi_bit` of word `fi_addr`. `fi_type` selects the fault:

| `fi_type` | fault | behaviour |
|-----------|-------|-----------|
| 0 | stuck-at | the victim reads as `fi_val` |
| 1 | transition | a write cannot change the victim to `fi_val` |
| 2 | inversion coupling | a write that changes bit `fi_bit` of word `fi_agg` (the *aggressor*) to `fi_val` inverts the victim |
| 3 | idempotent coupling | the same aggressor transition forces the victim to `fi_val` |

These are the classic unlinked faults a march test is built to catch. March C+ should
detect every one of them, in either polarity and with the aggressor above or below
the victim. `tb_mbist_fault_coverage` checks this with 24 random faults per class,
each through a complete test. Every fault is detected, and every failing read names
the victim word. Stuck-open and timing faults, which the extra reads of March C+
also target, need an electrical model and are not represented. Neither are
neighbourhood pattern-sensitive faults.

## Where the design follows its source and where it chooses

These points follow the published design:

* The three-unit split, the signal names (start_test, end_test, start_march,
  end_march, updown_order, march_ele) and their meanings.
* The 8-bit address and data widths.
* The Moore machine's states and transitions.
* The all-0 and all-1 data backgrounds.
* The comparator comparing only when the control signal is 0.
* The two-bit pass/fail codes.
* The test/system multiplexers steered by start_test.

These points are this design's own, made where the source is silent or unclear:

* **Element list and count.** The source names March C+ but gives no element list.
  The standard 14n form above is used; it matches the element codes of the state
  machine. A 13n count is also mentioned in the source; it is not what the state
  machine implements.
* **Operation index.** The counter flowcharts of the source count operations 1..3.
  The state machine indexes them 0..2, and the state machine was followed.
* **Microcode table.** Its word layout (`{last, updown, ele}`) is this design's own.
  The up order is also used for the two elements whose order is free (the first and
  the last).
* **Handshake details.** These are this design's choices:
  * the one-cycle gap on `start_march`;
  * `end_march` as a registered one-cycle pulse;
  * abandoning an element when `start_march` falls;
  * `end_test` held until `start_test` falls.
* **Counter control.**
  * The address counter is preset while the Moore machine is idle.
  * The sequence counter is cleared while the Moore machine is idle.
  * The sequence counter has no `done` input.
* **Operation-valid bit.** The MIU carries this bit and gates the memory write enable
  and the comparator with it. Without it, idle cycles would be compared as reads.
* **Memory model.** The read timing (combinational) and the fault hook are this
  design's choices. The source gives the memory no size beyond the 8-bit address
  and data.
* **Reset.** Reset is asynchronous.

## Changing the algorithm

Edit the `case` in `rtl/mbist_microcode_rom.sv`. Each word is an element code (one of
the four sequences the Moore machine knows) plus an address order. Set `last` on the
final word and raise `UC_DEPTH` of the control unit if the program grows. Elements
with other operation sequences, such as other data backgrounds or more operations per
address, would need new Moore machine states. The fixed sequences are the limit of
this controller's flexibility.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/mbist_pkg.sv tb/tb_mbist_top.sv \
          --top-module tb_mbist_top -o sim
./obj_dir/sim
```

`tb_mbist_top` runs the whole design at its default size:

* It compares each reported comparison, in order, against a March C+ reference
  expansion of the expected reads.
* It runs a fault-free test and expects 9n passes and 5n writes within the expected
  cycle count.
* It injects a stuck-at-0 cell and expects exactly the 4 r1 reads of that word to
  fail. It injects a stuck-at-1 cell and expects exactly the 5 r0 reads to fail.
* It stops a test half-way and reruns it.
* It accesses the memory in normal mode through the system port.
* It checks that every element code, both address orders, pass, fail, end of element
  and end of test all occurred.

`tb_mbist_fault_coverage` runs the fault-coverage campaign described above.

The unit testbenches check each block against models written independently of the
RTL. Some run at reduced address widths (`tb_mbist_address_counter` at 4 bits,
`tb_mbist_access_unit` at 5 bits) to keep them short.
