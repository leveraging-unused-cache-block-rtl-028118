# Word-aware packet composition for a CMP mesh interconnect

In a chip multiprocessor, a large share of the interconnect's dynamic power goes into moving
cache lines between the private L1 caches and the banks of the shared L2. Many words of those
lines are never touched before the line is evicted again. This RTL implements a network
interface that uses that fact in two ways:

* **flit-drop**: a body flit whose four words are all predicted unused is not sent at all;
* **word-repeat**: an unused word is replaced by the word that crossed the same wires in the
  previous flit, so those wires do not toggle and use no dynamic energy.

The two can be combined. What is unused comes from a **used-word predictor** for fills (a read
miss asks only for the words the line used last times it was cached) and from a **per-word
dirty vector** for spills (an eviction sends only the written words). A prediction that turns
out too small is repaired by a **refill**, a second request for the missing words.

The design is a 4x4 mesh: sixteen tiles, each with a router and a network interface. The
processor, the L1 caches and the L2 banks are not part of this RTL; each tile has ports for them.

## Flit format

The link is 136 bits wide: a 128-bit payload plus one flow-control byte that gives the flit type.
Byte 0 is the most significant byte of a flit.

| byte  | head / atomic flit     | body / tail flit |
|-------|------------------------|------------------|
| 0     | flit type              | flit type        |
| 1     | source node            | word 4g (bytes 1-4) |
| 2     | destination node       | |
| 3     | event                  | |
| 4-7   | block address          | word 4g+1 (bytes 5-8) |
| 8-9   | used-vector            | word 4g+2 (bytes 9-12) |
| 10-16 | spare                  | word 4g+3 (bytes 13-16) |

A 64-byte line is 16 words, so a packet carrying a line is a head flit and up to four body flits.
The last one is typed TAIL. Requests, write-back acknowledgements and invalidations are one
atomic flit. The **used-vector** has word 0 in bit 15: `16'hFF00` means "words 0-7 only".
Flit-type and event codes are in `rtl/noc_pkg.sv`:

* flit types: HEAD 1, BODY 2, TAIL 3, ATOM 4;
* events: READ_REQ 1, READ_RESP 2, WRITE_REQ 3, WB_RESP 4, INVAL 5.

## How a line is encoded (the part to read carefully)

Take a read response for block `0x1234` whose request carried the used-vector `0xFC0A`
(`1111 1100 0000 1010`). That means words 0-5, 12 and 14 are used. Body group *g* holds words
4g to 4g+3, and its four used bits are bits 15-4g down to 12-4g of the vector.

| group | words | used bits | flit-drop | word-repeat |
|-------|-------|-----------|-----------|-------------|
| 0 | 0-3   | 1111 | sent | four real words |
| 1 | 4-7   | 1100 | sent whole: words 6 and 7 are real data | words 6 and 7 replaced by words 2 and 3 |
| 2 | 8-11  | 0000 | dropped | all four lanes repeat group 1's flit |
| 3 | 12-15 | 1010 | sent (TAIL) | words 13 and 15 repeat the lanes of the flit before |

With flit-drop the packet is 4 flits long instead of 5. With word-repeat it stays 5 flits long,
but group 2's flit toggles no payload wire. With both, group 2 is dropped, and group 3 repeats
lanes from group 1's flit, because that was the last flit on the link.

Points that matter when you change this logic:

* "Previous flit" means the previous flit this interface put on its link. That can be the head
  flit, or a flit of the previous packet. The `repeat_buffer` holds the four payload lanes of that
  flit. It is loaded whenever the link accepts a flit.
* Under word-repeat, the seven spare bytes of every head and atomic flit are also copied from the
  previous flit. Without word-repeat they are zero.
* Under flit-drop, a line packet whose used-vector is zero is sent as a single atomic flit.
* The receiver has to know the scheme. Under flit-drop it gives the k-th body flit to the k-th
  group whose used bits are non-zero. It marks as valid every word of a received group under
  flit-drop alone, and only the used words when word-repeat is on. Words that were not sent
  read as zero.
* All tiles share one `scheme` input. Change it only when no packet is in flight.

## Predicting used words

`used_word_predictor` is a table with 2^15 entries, indexed by bits [20:6] of the byte address.
Those are the 15 low bits of the 26-bit block number of a 32-bit address. Entries have no tag, so
blocks that share those bits share an entry. Each entry keeps the used-vectors of the two most
recent evictions that mapped to it. The prediction is their OR. An entry that was never written
predicts `16'hFFFF`, and that case is counted as a cold prediction. A lookup answers one cycle
later. On the first write to an entry the older vector is cleared.

`word_state_array` holds three 16-bit vectors for each of the 1024 lines of a 64 KB L1 with
64-byte lines:

* **valid**: the word is present in the line;
* **used**: the word was read or written;
* **dirty**: the word was written.

A read of an absent word returns `acc_hit = 0`. That is a false negative: the L1 must issue a
REFILL. The word is still marked used, so the predictor learns it. A write makes the word
present, used and dirty without fetching it.

## The tile interface (`tile_nic`)

The L1 hands the interface one request at a time, of one of three kinds:

| kind   | what the interface does |
|--------|-------------------------|
| FILL   | looks up the predictor and sends READ_REQ with the predicted vector to `home` |
| REFILL | sends READ_REQ whose vector is `~valid` of the line: the words still missing |
| EVICT  | writes the line's used vector into the predictor; if the dirty vector is non-zero, sends WRITE_REQ with the dirty vector as used-vector and the line data; a clean line sends nothing |

The request is offered to the encoder two cycles after it is accepted.

The L2 bank sends its own packets on `l2_tx_*`: READ_RESP, WB_RESP and INVAL. A READ_RESP should
carry the used-vector of the request it answers. The L1 and the L2 take turns at the encoder,
round-robin, one whole packet at a time.

Incoming READ_REQ and WRITE_REQ go to `l2_rx_valid`; everything else goes to `l1_rx_valid`. Both
share the `rx_pkt` bus. The L1 reports the words that arrive for a line on `l1_fill_*`. Use
`fill_new` for the first response to a miss and plain merges for refills. The interface does not
know L1 set/way mapping; that stays in the cache.

Counters per tile:

* `cnt_false_neg`: reads of absent words;
* `cnt_spill_words`: dirty words sent;
* `cnt_cold`: fills that had no predictor record.

## The network (`router`, `mesh_noc`)

Each router has five ports: local, north (y-1), east (x+1), south (y+1) and west (x-1). Each
input has a 4-entry FIFO. The router uses:

* **XY routing**: first along x, then along y;
* **wormhole switching**: an output stays with one input from HEAD to TAIL, and a new owner is
  chosen round-robin among inputs whose waiting flit is a HEAD or ATOM.

Links use valid/ready. Node id is `y*4 + x`. Output registers change only when a flit moves, so
an idle link holds its last value. This keeps word-repeat effective across routers: a flit's
wires toggle against the previous flit on the same link.

Latency with no load: a flit spends two cycles in each router. Corner to corner, 7 routers, takes
15 cycles from injection to ejection. The encoder offers a head flit one cycle after it accepts a
packet, then one flit per cycle.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | widths, flit structs, event and flit-type codes, request/packet structs |
| `rtl/cmp_top.sv` | 4x4 mesh plus 16 tile interfaces; cache-side ports as arrays by node id |
| `rtl/tile_nic.sv` | interface of one tile: request FSM, arbitration, encoder, decoder, predictor, word state |
| `rtl/flit_encoder.sv`, `rtl/repeat_buffer.sv` | packet to flits, flit-drop and word-repeat |
| `rtl/flit_decoder.sv` | flits to packet, valid-word mask |
| `rtl/used_word_predictor.sv` | two-history used-word predictor |
| `rtl/word_state_array.sv` | valid/used/dirty vectors per L1 line |
| `rtl/router.sv`, `rtl/flit_fifo.sv`, `rtl/mesh_noc.sv` | wormhole XY mesh |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb/tb_ref_pkg.sv` is a byte-level reference encoder |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_ref_pkg.sv tb/tb_flit_encoder.sv --top-module tb_flit_encoder
./obj_dir/Vtb_flit_encoder
```

`tb_cmp_top` runs the whole design at its default sizes:

* 16 tiles, with behavioural L1 and L2 models written in the testbench;
* eight blocks per tile, each visited six times;
* one run each for flit-drop plus word-repeat, flit-drop alone and word-repeat alone.

It checks every valid word it receives against a memory model. It also counts each mechanism:
dropped flits, repeated lanes and header bytes, cold and trained predictions, false negatives and
refills, dirty spills, clean evictions, link stalls and scheme switches. It fails if any count is
zero. It also prints the link toggle count for each scheme. In one run the totals were about
137k toggles for both schemes together, 252k for flit-drop alone and 152k for word-repeat alone.
These come from synthetic usage patterns, not real workloads. Building `tb_cmp_top` takes about
2.5 minutes; running it takes under a second.

## Where this RTL departs from, or adds to, the scheme it implements

* The scheme leaves these points open, and this RTL chooses them:
  * the valid/ready handshake;
  * XY as the deterministic routing;
  * FIFO depth;
  * the flit-type and event codes;
  * byte order within a flit;
  * the zero-vector and spare-byte rules;
  * the request kinds and steering in `tile_nic`;
  * reset values.
* The receiver (`flit_decoder`) is this design's own. Only the sender's behaviour is defined by
  the scheme.
* The predictor has the scheme's 2^15 entries and no replacement policy. Each tile's table holds
  2^15 x 33 bits, about 1 Mbit.
* The processor, the L1 caches (tags, data, replacement) and the L2 banks are not implemented.
  Only their ports exist.
* A perfect (oracle) predictor is not a hardware block. It can be emulated by having the L2 side
  return the true usage vector in READ_RESP.
* The baseline encoding, which always sends all five flits, is not built. It is what the encoder
  does when the used-vector is `16'hFFFF`.
* There are no virtual channels, so packets on one link are never interleaved.
