# A pipelined rule processor for network intrusion detection

Intrusion-detection rules such as Snort's combine two kinds of evidence. A
*header rule* says which packets are of interest, for example TCP from outside
to port 80. One or more *signatures* are strings or regular expressions that
must appear in the payload. This design separates the two jobs.

- Independent scanning modules do the expensive matching. Header classifiers
  and string or regex scanners report only small numbers:
  - header IDs (HIDs) for header rules that matched;
  - content IDs (CIDs) for signatures that were found.
- The rule processor described here turns those ID streams into rule matches,
  keeping track per TCP flow.

A rule has the form

    RID:  HID  and  CID_1  and  ...  and  CID_n        (0 <= n <= 15)

It fires in a flow once its header rule has matched in that flow and each of
its n signatures has been seen there since the rule last fired.

The processor supports 32,768 rule, content and header IDs. It keeps the state
of one flow in on-chip bit-vectors and counters. When the next message belongs
to a different flow, it swaps that state to off-chip memory. Rules are
programmed at run time through a control interface, without rebuilding
anything.

## Interfaces

All three external interfaces use the same *wrapper bus* (`rp_pkg::wbus_t`):

| signal | meaning |
|---|---|
| `sod`, `eod` | first and last word of a message |
| `en` | a word is present |
| `data[31:0]` | the word |
| `vb[2:0]` | number of valid bytes in `data`: 4, or 2 for a lone 16-bit ID |
| `stop` (reverse direction) | busy: the receiver takes no word this cycle |

A word moves in every cycle where `en` is high and `stop` is low.
`comm_wrapper` puts a small FIFO on each interface, so a sender may react to
`stop` late.

**ID messages** (`id_in`) come from the scanning modules, one message per
packet and module:

    word 0    flags[15:0] | flow[15:0]     flags bit 0 = 1: a list of HIDs, else CIDs
    word 1    ID_1[15:0]  | ID_2[15:0]
    ...
    last      ID_N[15:0]  | 0              (vb = 2 when N is odd)

- Flow 0 means stateless traffic, such as UDP. Every header message of flow 0
  starts from empty state.
- A packet's header message must come before its content messages, so the
  header bits are set when its rules are checked.

**Control messages** (`ctl_in`) are two words:

    word 0    op[3:0] | data[35:32] | 000000 | addr[17:0]
    word 1    data[31:0]

The opcodes are listed in `rp_pkg::op_e`:

- write or read an SRAM word in bank A or bank B;
- write or read a rule's required signature count;
- write the configuration register (bit 0 enables the header check; it is 1
  after reset);
- read event counter `addr`;
- write an entry or a table word of the frequent-CID unit (`WR_FCAM`,
  `WR_FTAB`, see below).

Each read returns two words on the alert interface:
`{4'hC, data[35:32], 6'b0, addr}`, then `data[31:0]`.

**Alerts** (`alert_out`) carry the matched rules of one message:

- word 0 is `{flags, flow}`, where flags bit 0 marks an alert;
- the RIDs follow, two per word;
- at most `MAX_RIDS` (256) RIDs are listed. If more rules matched, flags
  bit 1 is set.

A message that matched nothing produces no alert.

**Memories.**
- The two SRAM banks (`sa_*`, `sb_*`) are 36-bit words with an 18-bit
  address. A read returns its data in the cycle after the address. A `*_gnt`
  input lets the surrounding system take a bank away for a cycle.
- The context memory port (`sd_*`) moves 128-bit words. A write happens when
  `sd_req`, `sd_we` and `sd_gnt` are all high. A granted read returns its data
  later with `sd_rvalid`, with one read outstanding at a time. Memory for a flow
  that was never saved must read as zero.

## How software lays out a rule

Bank A is a **reverse index from signatures to rules**. The word at address
CID is the head of a linked list. Each node is `rp_pkg::node_t`:

    {valid, RID[14:0], next_valid, next[17:0]}

- Further nodes live at addresses of 32,768 and above. Software manages them,
  including a free list.
- A CID whose head word has `valid = 0` belongs to no rule.

Bank B holds one word per rule at address RID, in the same layout. The ID
field holds the rule's HID. The pointer leads to a second list: the rule's own
CIDs, again stored above 32,768. The processor needs that list after a match,
to clear the rule's signatures (see stage 6).

The required count of each rule, the number of signatures n, is written with
the `WR_REQ` opcode.

**Header-only rules** have no signatures. HIDs from `HO_BASE` (32,512) to
32,767 are reserved for them. Their HID is also their RID, and their arrival
is itself a match.

## The pipeline

    ID messages --> [1 FIFO + parser] --CIDs--> [2 CID check] --> [3 RID lookup] --> [4 HID mapping]
                           |                        ^   (bank A)          (bank B)          |
                           |                        |  clear                                v
                           +---------HIDs-----------|-----------------------------> [5 HID check]
                                                    |                                       |
    control --> [1 control FSM]                     +---------------------------- [6 count check]
                                                                                            |
    alerts  <---------------------------------------------------------------------- [7 alert bundling]

Tokens (`rp_pkg::tok_t`) move between stages with valid/ready handshakes. Each
stage handles one token per cycle and adds one cycle of latency.

1. **Input** (`id_input`, `ctrl_fsm`)
   - ID messages are buffered in a 512-word FIFO. Its fill level is the flow
     control towards the scanning modules.
   - The parser takes one ID per cycle:
     - CIDs go to stage 2;
     - HIDs go directly to stage 5;
     - an end-of-message token closes each content message.
   - The control FSM raises `hold`, so no new message starts. It then waits
     until the pipeline is empty before touching any memory.
2. **CID check** (`cid_check`)
   - One bit per CID.
   - A CID whose bit is already set was seen before in this flow and is
     dropped.
   - Otherwise the bit is set and the CID moves on.
   - As a result, each signature counts at most once per flow towards each
     rule.
   - Between stages 2 and 3 sits the frequent-CID unit (`freq_cid`, see below).
     It replaces a frequent CID by the RIDs whose header matched.
3. **RID retrieval** (`rid_retrieval`) walks the CID's list in bank A. It emits
   one RID per node, one per cycle after the first read. RIDs that come from
   the frequent-CID unit pass through without a read.
4. **HID mapping** (`hid_mapping`) reads the rule's word in bank B. It attaches
   the HID and the CID-list pointer, and drops RIDs that are not programmed.
5. **HID check** (`hid_check`)
   - One bit per HID, set by the HIDs from stage 1.
   - A RID passes only if its rule's header bit is set.
   - A header-only HID produces a match token at once.
   - With the header check disabled, every RID passes.
6. **Count check** (`count_check`)
   - There are two counters per rule: the required count, set by software, and
     the current count for this flow.
   - The current count goes up by one. If it reaches the required count:
     - the rule matches;
     - its current count returns to zero;
     - a *clear walk* follows the rule's CID list in bank B and clears those
       bits in stage 2, so the rule can fire again on new occurrences.
   - The stage takes no new tokens during the walk.
7. **Alert bundling** (`alert_gen`)
   - Collects the matched RIDs until the end-of-message token.
   - Then sends one alert.
   - Control read responses are sent between alerts.

The SRAM banks are shared:
- bank A: the control FSM first, then stage 3;
- bank B: the control FSM first, then the stage-6 clear walk, then stage 4.

## Flow context

Stages 2, 5 and 6 hold the state of exactly one flow. Copying three full
32K-entry vectors per packet is out of the question: about 192 Kbit per flow.
Instead, `context_storage` keeps a list of every location set for the current
flow:
- a CID bit set in stage 2;
- an HID bit set in stage 5;
- a rule whose current count became non-zero in stage 6.

A second bit per CID and per rule, the *listed* bit, makes sure each location
is listed only once, even when a rule fires and its CIDs are set again.

When a message for another flow arrives, the parser waits until stages 2 to 7
are empty. Then the context storage:

1. **saves** the list:
   - for each listed location it reads the current value and clears it;
   - it packs entries of `{type, value[3:0], id[14:0]}` (`rp_pkg::ctx_entry_t`),
     four to a 128-bit word;
   - it writes them at `{old flow, word}`.

   A flow has 32 words (512 bytes, 128 entries). The writes stop after the
   word that holds the first empty entry.
2. **restores** the new flow:
   - it reads its words back in order;
   - it writes each entry's value into its stage;
   - it stops at the first empty entry.

Flow 0 is cleared, never saved. The time a switch takes grows with the number
of entries, about one cycle each plus the memory latency, rather than being a
fixed 32 cycles.

If a flow sets more than 128 locations, the extra ones are not recorded. The
`CTX_OVF` event counts them. Those locations stay set after the switch, so
they leak into the next flow. A flow this busy is far outside what the Snort
rule set produces: at most 10 matching headers per packet.

## Event counters

Software can read eleven 32-bit counters with `RD_EVT`, in this order:
1. IDs received;
2. CIDs forwarded;
3. CIDs dropped as repeats;
4. RIDs retrieved;
5. RIDs dropped by the header check;
6. rule matches;
7. alerts;
8. context switches;
9. context entries lost;
10. frequent CIDs taken by the frequent-CID unit;
11. header groups it skipped.

## Frequent signatures (`freq_cid`)

A few signatures appear in many rules: `|00 00 00 00|` is in 135 Snort rules.
Walking such a list costs one cycle per rule, and most of those rules are
dropped at stage 5 anyway. The frequent-CID unit holds up to 18 such CIDs
(`NUM_FREQ`) on chip.

- Each entry is written with `WR_FCAM` at address 0..17:
  `{valid (bit 31), CID (30:16), table start (15:0)}`.
- The table (`FREQ_TAB` = 1024 words) is written with `WR_FTAB`:
  `{last (bit 24), group (bit 23), n (22:15), id (14:0)}`.
- A CID's rules are stored grouped by header rule. Each group is a group word
  (id = HID, n = number of RIDs) followed by n RID words.
- `last` on a group word marks the last group. On a RID word it marks the very
  last word.

When a CID that hits an entry leaves stage 2, the unit takes it and visits its
groups. It reads each group's header bit through a second read port of the
stage-5 bit-vector.
- A group whose header is not set costs one cycle and is skipped.
- A group whose header is set hands on its RIDs, one per cycle.
- The RIDs then go through stages 3 to 7 like any other.

A CID loaded into the unit never reaches stage 3, so its bank-A list is not
used. The published design describes such modules in one paragraph.
The table layout, the grouping by header and the placement after stage 2 are
this design's choices. One difference: all RIDs of a matching group enter the
pipeline, so more than ten can enter when several rules share a header.

## Departures from the published architecture, and limits

- **One context storage block.** The published block diagram shows two, both
  attached to stage 6; this design uses one shared list. Saving and restoring
  take about one cycle per entry instead of a fixed 32-cycle transfer.
- **Combinational block-RAM reads.** The bit-vectors and counters are written
  as arrays read in the same cycle. That keeps every stage at one token per
  cycle without bypass logic. A real FPGA mapping would need registered reads,
  with forwarding between neighbouring tokens.
- **CID lists in bank B.** The processor needs the rule's CIDs to clear them
  after a match. This design keeps them as a linked list in bank B, next to the
  RID-to-HID word.
- **Clear race.**
  - Stage 6 clears a fired rule's CIDs a few cycles after the match, while
    later CIDs keep flowing.
  - Suppose a CID already set in the flow belongs to a rule that has just fired
    and arrives again within those cycles, either later in the same message or
    at the start of the next message of the same flow. It can then be taken as
    a repeat and not counted.
  - A change of flow always waits for the clear.
- **Frequent signatures.** One shared unit with one table replaces the
  published "specialized modules". While it expands a CID, no other token
  passes it. The alert then lists the CID's RIDs in group order.
- **Not included:** the scanning modules themselves, TCP reassembly, the SRAM
  and SDRAM chips, and their controllers. The testbench folder has simple
  models of the memories.

After coarse synthesis at the default size, the top is about 950 word-level
cells and 1,500 flip-flop bits (470 of them the 18 frequent-CID entries). It
has about 435 Kbit of memory:
- the CID and HID bit-vectors with their listed bits;
- two 32K x 4-bit count arrays;
- the FIFOs;
- the alert list;
- the context list;
- the frequent-CID table.

No timing analysis was done.

## Files

`rtl/`:

| file | content |
|---|---|
| `rp_pkg.sv` | widths, message encodings, token and node types |
| `rule_processor.sv` | top level: stage wiring, memory sharing, event counters |
| `comm_wrapper.sv`, `sync_fifo.sv` | wrapper bus FIFO, generic FIFO |
| `id_input.sv`, `ctrl_fsm.sv` | stage 1 |
| `cid_check.sv`, `rid_retrieval.sv`, `hid_mapping.sv`, `hid_check.sv`, `count_check.sv`, `alert_gen.sv` | stages 2 to 7 |
| `freq_cid.sv` | frequent-CID unit between stages 2 and 3 |
| `context_storage.sv` | flow context save and restore |

`tb/` holds one self-checking testbench per block (`tb_<module>.sv`), plus
models of an SRAM bank (`zbt_sram_model.sv`) and of the context memory
(`ctx_mem_model.sv`).

`tb_rule_processor.sv` runs the whole processor at its default size:
1. It programs a random rule set through the control interface. It loads the
   two CIDs with the most rules into the frequent-CID unit.
2. It sends interleaved packets of seven flows and compares every alert with a
   reference model of the rule semantics.
3. It drives alert overflow, context overflow, a burst against a stopped alert
   output, and the header-check bypass.
4. It reads back the event counters.

The test fails if any of these mechanisms never happens:
- repeated CID;
- multi-rule list;
- header drop;
- header-only rule;
- rule refiring;
- context restore;
- flow 0;
- both overflows;
- both stops;
- a frequent CID taken;
- a frequent-CID group skipped.

`tb_worst_case.sv` runs the slowest case for the processor: back-to-back
minimum-size packets, each from another flow, each holding the one signature
shared by 135 rules. Ten of those rules match each packet. Measured at full
size:

| CID handled by | cycles per packet |
|---|---|
| list walk in bank A | 179 |
| frequent-CID unit | 74 |

Most of the remaining 74 cycles go to the context switch.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5 (two-state, so every testbench resets or initialises what it
reads):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/rp_pkg.sv tb/tb_rule_processor.sv --top-module tb_rule_processor
    obj_dir/Vtb_rule_processor +verilator+rand+reset+2

Replace `tb_rule_processor` with any other `tb_*` name to test one block. The
end-to-end test takes about a second. `+verilator+seed+N` picks another random
sequence.
