# Multi-master OCP interconnect with AXI bridging and clock-domain crossing

Five bus masters share three slaves over one OCP (Open Core Protocol) path. Two masters speak
AXI, three speak OCP, and every master and slave may run on its own clock. The AXI masters
reach the OCP path through AXI-to-OCP converters. Clock bridges carry every transaction between
clock domains. A ring-counter arbiter serves the masters one at a time, and an address decoder
picks the slave from the top three bits of the address. Because all traffic is expressed in one
protocol, an IP core with either interface can be attached without designing a new interface
each time.

```
 AXI master 0 -- axi2ocp -- bridge --+                              +-- bridge -- memory        (SID 000)
 AXI master 1 -- axi2ocp -- bridge --+                              |
 OCP master 2 ------------- bridge --+-- ring arbiter -- decoder ---+-- bridge -- FIFO          (SID 001)
 OCP master 3 ------------- bridge --+      (clk_ic)     (clk_ic)   |
                                                                    +-- bridge -- dual-port FIFO (SID 010)
   clk_m[0..3]                                                        clk_s[0..2]         |
                                                               fixed OCP master (clk_s[2])
```

The number of AXI and OCP masters on the arbiter is set by parameters of the top. The address
and data widths are set in the shared package. The default is the system described above: two
AXI masters, two arbitrated OCP masters, one OCP master fixed on the dual-port FIFO, three slaves,
16-bit address and data.

## The OCP transaction used everywhere

Every block between the masters and the slaves passes two bundles (`ocp_pkg`):

| bundle | direction | fields |
|---|---|---|
| `ocp_req_t` | master to slave | `mcmd` (3 bits), `maddr` (16), `mdata` (16), `mdatavalid`, `mrespaccept` |
| `ocp_rsp_t` | slave to master | `scmdaccept`, `sdataaccept`, `sresp` (2 bits), `sdata` (16) |

Commands (MCmd): `000` Idle, `001` Write (posted), `010` Read, `101` Write non-post.
Responses (SResp): `00` NULL, `01` DVA (data valid / done), `10` FAIL, `11` ERR.

The handshake rule, which all blocks rely on:

1. The master holds MCmd, MAddr and MData (with MDataValid for writes) until a rising edge at
   which SCmdAccept is high. SDataAccept rises together with SCmdAccept for writes.
2. A posted Write is finished at that edge. A Read or a Write non-post gets exactly one response:
   SResp other than NULL, held by the slave until an edge where MRespAccept is high.
3. A master has at most one transaction outstanding.

The slaves accept combinationally in the cycle a command appears (when no response is pending)
and answer one cycle later. `ocp_master` raises MRespAccept as soon as SResp is non-NULL. A
slave wired directly to `ocp_master` therefore completes a Read in three cycles from the
user's command: command on the bus, response, and the `done` pulse.

## Ring-counter arbiter (`ocp_arbiter`)

A one-hot token starts at master 0 after reset. At each edge of `clk_ic`:

* if the granted master shows MCmd = Idle and owes no response, the token moves to the next
  master (rotating left, wrapping around);
* otherwise it stays, so a master with back-to-back commands keeps the path until it goes idle.

Masters are served strictly in turn, and an idle master costs one cycle of the round. The
"owes no response" condition is an addition. Without it the token could move between a Read's
accept and its response, and the response would go to the wrong master. Only the granted master
sees SCmdAccept and responses; the others see an idle response bundle.

## Address decoder (`ocp_addr_decoder`)

The slave ID (SID) is `maddr[15:13]`. The decoder compares it with a parameter table
`SLAVE_IDS` (default 000, 001, 010) and forwards the request to the matching slave port. The SID
bits are cleared, so each slave sees a 13-bit offset. The chosen slave's response bundle goes back.
While a Read or Write non-post is outstanding, the decoder keeps routing from the slave that took
it. A command whose SID is not in the table is accepted by the decoder itself; a Read or Write
non-post to it is answered with ERR (a posted Write is silently dropped).

## Clock bridges (`ocp_clock_bridge`)

Seven bridges sit in the default system: one between each arbitrated master's clock and
`clk_ic`, and one between `clk_ic` and each slave's clock. A bridge carries one transaction at a
time, and the command and response never cross as multi-bit signals that change under the
receiving clock:

1. Master side (`m_clk`): when a command appears and the bridge is idle, the whole request is
   copied into a holding register and a request toggle flips. SCmdAccept is not given yet, so the
   master keeps waiting.
2. The toggle goes through a `SYNC_STAGES`-flop synchronizer (default 2) into `s_clk`. The
   slave side sees the change and drives the held request on `s_req` until the slave accepts it.
   For a Read or Write non-post it then waits for SResp, takes it with MRespAccept, and copies
   SResp/SData into a holding register. It then flips an acknowledge toggle.
3. The acknowledge toggle is synchronized back into `m_clk`. The master side now raises
   SCmdAccept (and SDataAccept for writes) for one cycle. For a Read or Write non-post it then
   presents the stored response until MRespAccept.

The holding registers do not change while their toggle is in flight, and each is sampled only
after its toggle has been synchronized. The only signals that cross clock domains are therefore
the two toggle bits. The price is latency. A transaction costs roughly two synchronizer delays in
each direction, plus the far side's own cycles. A master also sees SCmdAccept only after the far
slave has accepted, even for a posted write. In the full system a transaction crosses two bridges.

`rst_n` is applied to both sides asynchronously. It must be released while no clock edge is near,
or be synchronized per domain outside the design.

## AXI side (`axi_master`, `axi2ocp`)

`axi_master` has two independent state machines, one per direction. Each transaction is an
incrementing burst of 1 to 16 beats, with a 4-bit AxLEN as in AXI 1.0/AXI3:

* write: raise AWVALID with the address and AWLEN. After AWREADY, send the beats with WVALID,
  with WLAST on the last. After the last WREADY, raise BREADY and wait for BVALID.
* read: raise ARVALID with ARLEN. After ARREADY, keep RREADY high and collect beats until RLAST.

The user side streams data: `wr_data` holds the current beat until `wr_next` pulses, and each
read beat comes out with `rd_beat` (`rd_last`/`rd_done` on the last one). IDs, sizes, strobes and
burst types other than incrementing are not modelled. Addresses count words, not bytes, and go up
by one per beat, like the OCP side.

`axi2ocp` captures write beats and read bursts independently and issues them on OCP one
transaction at a time:

* each AXI write beat becomes one OCP **Write non-post** at AWADDR + beat. The next beat is taken
  from the W channel only after the previous beat's response. BRESP is SLVERR if any beat failed.
* each AXI read beat becomes one OCP **Read** at ARADDR + beat. SData becomes that beat's RDATA,
  and RLAST is set on the last beat.
* DVA maps to OKAY, and FAIL or ERR map to SLVERR.

When a write beat and a read beat are both waiting, the kind not issued last goes first. A posted
OCP Write is never produced from AXI, because AXI needs a write response.

## Slaves

* **Memory** (`ocp_mem_slave`, SID 000): `DEPTH` words (default 8192, the full 13-bit offset
  space). It serves all three commands and answers DVA.
* **FIFO** (`ocp_fifo_slave`, SID 001): a memory with auto-incrementing read and write pointers
  (one extra pointer bit tells full from empty). Every offset reaches the same FIFO. A write to a
  full FIFO is dropped and, if non-posted, answered with FAIL. A read from an empty FIFO returns
  FAIL with zero data. Default depth 16.
* **Dual-port FIFO** (`ocp_dpfifo_slave`, SID 010): one FIFO with two OCP slave ports. Port 1
  comes from the interconnect, port 2 from the fixed OCP master. Each cycle it can push once and
  pop once:
  * a write on one port and a read on the other are accepted together (states `M1_WRRD_ST`:
    port 1 writes and port 2 reads, `M2_WRRD_ST`: the reverse);
  * two writes, or two reads, in the same cycle are arbitrated. One port is accepted and the
    other's command stays on its bus for a later cycle. Priority alternates: the loser of a
    conflict wins the next conflict of the same kind.

  The pop sees the FIFO as it was before the same cycle's push, so a read that coincides with the
  first write into an empty FIFO underflows. `state_next` names the operation of the current
  cycle (`M1_WRITE_ST`, `M2_READ_ST`, ...) and `state` is its registered copy.

## Top level (`ocp_interconnect_top`)

Ports:

* clocks: `clk_m[N_AXI+N_OCP]` (one per arbitrated master), `clk_ic`, `clk_s[3]`;
  `clk_s[2]` also clocks the fixed OCP master;
* `rst_n`, asynchronous and active low;
* AXI user ports `axi_wr_*`, `axi_rd_*`, arrays of `N_AXI`, streaming burst beats as in
  `axi_master`;
* OCP user ports `ocp_*`, arrays of `N_OCP+1`, where the last entry is the fixed master;
* observation outputs: `grant`, `dpf_state`, `dpf_state_next`, `fifo_count`, `dpf_count`.

Parameters: `N_AXI` (2), `N_OCP` (2), `MEM_DEPTH` (8192), `FIFO_DEPTH` (16), `DPFIFO_DEPTH` (16).
Arbiter index `i < N_AXI` is AXI master `i`; higher indices are the OCP masters. The three slaves
are fixed types, so the slave count of the top is three, but `ocp_addr_decoder` itself takes any
`NS` and ID table. After synthesis the default top has about 1,400 word-level cells, 1,080
flip-flops and 128 Kbit of memory (almost all of it the memory slave).

## What follows the source design and what was chosen here

Taken from the design description:

* the block structure and connections;
* the five-master / three-slave configuration;
* the MCmd codes, 16-bit address and data, and the 3-bit SID with IDs 000/001/010;
* the ring-counter arbitration rule (hold while MCmd is not Idle);
* the two independent AXI sub-FSMs;
* the OCP master issuing command, address and data together;
* the FIFO built from a memory with auto-incrementing pointers;
* the dual-port FIFO's simultaneous write/read, its write and read arbitration, and its state
  names.

Chosen here, where the description is silent:

* the SResp codes and the exact handshake timing;
* the clock bridge circuit;
* the AXI-to-OCP mapping: every burst beat becomes one Write non-post or Read;
* the AXI burst form: incrementing bursts, word addresses, 4-bit length (the source calls AXI
  burst-based but says nothing more);
* the arbiter holding the grant until an outstanding response returns;
* the decoder's ERR for unknown IDs;
* FIFO depths, memory depth, and overflow/underflow answers;
* the alternating priority in the dual-port FIFO;
* asynchronous reset;
* the user command ports of the masters.

Where this design knowingly differs from the source:

* The slave ID table is a constant parameter of the decoder. The source keeps the IDs in a memory,
  but gives no way to write that memory.
* In the source's dual-port FIFO waveform, port 1 shows SResp = DVA through a run of writes, and
  SDataAccept stays high across several cycles. Here a posted Write gets no response, and
  SDataAccept is high only in the cycle a write is accepted. Traffic from the AXI masters uses
  Write non-post, so it is answered with DVA as in that waveform.
* The source numbers masters from 1; here they are indexed from 0. Master 0 holds the grant
  after reset.
* The source built its blocks in VHDL. This design is SystemVerilog, and its inner blocks pass packed
  request/response structs rather than separate signals.

## Verification

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_ocp_mem_slave` | data against a model, same-cycle accept, one-cycle response, response held until MRespAccept |
| `tb_ocp_fifo_slave` | FIFO order, fill level, FAIL on overflow and underflow (both forced) |
| `tb_ocp_dpfifo_slave` | two masters at once: scoreboard from the accept handshakes, one push and one pop per cycle, alternating priority, WRRD states |
| `tb_ocp_master` | command/address/data presented together and held, MDataValid, done/rdata/resp |
| `tb_ocp_clock_bridge` | two bridges (slave clock slower and faster than the master's): every command crosses once and unchanged, read data, bounded latency |
| `tb_ocp_arbiter` | grant against a reference ring counter every cycle, isolation of ungranted masters, read data per master |
| `tb_ocp_addr_decoder` | routing by SID, cleared SID bits, ERR for unused IDs |
| `tb_axi_master` | random burst lengths, valid held until ready, no data before the address handshake, WLAST/RLAST placement, exact cycle counts |
| `tb_axi2ocp` | each burst beat mapped to one OCP command at the right address, response mapping, one transaction in flight, read/write alternation |
| `tb_ocp_interconnect_top` | the whole system at default parameters on eight different clocks (see below) |

The system test runs in phases:

1. error paths: FIFO underflow, and unknown slave IDs through both AXI and OCP masters;
2. all four arbitrated masters write and read back their own memory regions at the same time;
   the AXI masters do this with 8-beat bursts, and also overlap a read with a write;
3. all masters fill the FIFO, one more write overflows, and the masters drain it; the values read
   back must be exactly the values written;
4. the fixed master and the arbitrated masters use the dual-port FIFO at the same time.

The test counts every mechanism and fails if one never happened: grant moves and holds, each
command type, crossings to every slave, decoder misses, overflow and underflow, dual-port write
and read conflicts, and write-with-read cycles. It runs in well under a second.

To run a testbench with Verilator (version 5):

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv \
    rtl/ocp_pkg.sv tb/tb_ocp_interconnect_top.sv --top-module tb_ocp_interconnect_top
./obj_dir/Vtb_ocp_interconnect_top
```

Replace the testbench name to run any of the others. Several unit testbenches use smaller memory
and FIFO depths than the defaults to reach full and empty quickly; the system test uses the
defaults.

Limits to keep in mind:

* The simulations are two-state, and clock-domain crossings are checked functionally only.
  Metastability is not modelled.
* No timing or area figures come from the source. The design has not been taken through place
  and route.
