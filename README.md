# JSON to Apache Arrow in hardware

This is synthesizable SystemVerilog for turning newline-separated JSON documents
into Apache Arrow columns at line rate. It does not use a general JSON parser. Each
schema gets its own parser, built from a few small streaming components: an object
parser, a key filter, an array parser, and integer, boolean and string parsers. Raw
bytes go in, up to eight per clock cycle. The output is one stream per Arrow column.
Each parser is small, so many copies fit on one FPGA, and throughput scales with the
number of copies.

The design follows a published FPGA accelerator that converts JSON to Arrow. That
accelerator uses Tydi-style streams and Fletcher-generated Arrow column writers, and
was measured on an Intel Arria 10 GX board over PCIe and on a Xilinx VU37P board over
OpenCAPI. The parts here are:

- the parsing hardware of its two use cases:
  - a "simple" schema: one integer array per document;
  - a "complex" schema: twelve members per document;
- the nested example parser it uses to explain the method.

The memory interfaces, DMA engines, control registers and host software are not
included. The top level ends at byte-stream inputs and column-stream outputs (see
*Not included*).

## How structure travels: lanes and last bits

Every stream between components carries `EPC` = 8 lanes per transfer (`json_pkg::beat_t`).
Each lane has four fields:

| Field | Meaning |
|---|---|
| `strb` | the lane holds a byte |
| `tag` | the byte belongs to an object key (1) or to a value (0) |
| `data` | the byte |
| `last[NL-1:0]` | the nesting levels that close after this lane |

Bit 0 is the innermost level. A lane may also carry `last` bits with `strb` low. This
is how an end is signalled where no byte belongs to it: for example, the end of an
array element at the comma that separates it from the next.

The input to a parser is the raw content of one host buffer. The only mark is
`last[0]` on the lane of the buffer's final byte. Each component then changes the
levels in a fixed way:

| component | output last bits |
|---|---|
| object parser | `{in.last[NL-3:0], object_end, member_value_end}`: adds two levels |
| array parser | `{in.last[NL-2:0], element_end}`: adds one level |
| key filter, string parser | unchanged |
| integer and boolean parsers | `in.last >> 1`: the value level is used up |

So where a given end appears at the output depends on what is above it. Take the voltage
parser (object → key filter → array → integer):

- Buffer end: input bit 0 becomes bit 2 after the object parser, bit 3 after the
  array parser, and bit 2 again after the integer parser.
- Record end: appears at bit 1.
- List end: appears at bit 0.

Every schema parser renames these positions onto one uniform field stream,
`json_pkg::fld_t`:

| Bit | Meaning |
|---|---|
| `last[0]` | list or string end |
| `last[1]` | record end |
| `last[2]` | buffer end |

The conversion functions `int_to_fld`, `bool_to_fld` and `beat_to_fld` in `json_pkg`
take these positions as arguments. Everything after the parsers (multiplexers and
column adapters) therefore sees one format.

A member that is absent from a document still produces a record end on its output. The
key filter drops the bytes and the value end of members that do not match, but passes
every higher-level `last` bit. Records stay countable in every column.

## The components

**Object parser** (`json_object_parser`)

- Tracks three pieces of state:
  - the nesting depth;
  - whether the current byte is inside a string (with a backslash escape flag);
  - whether it is in the key or the value part of a member.
- Drops the outer braces, the colon, the member commas and white space. Keeps every
  byte of a nested value, including its own braces.
- Marks the value end on the comma or closing brace that ends a member. Marks the
  object end on the closing brace.
- Chains its state across the eight lanes in one cycle, so it never stalls.

**Key filter** (`json_key_filter`, parameters `KEY_LEN`, `KEY`)

- Compares the key bytes of each member with the expected key, quotation marks
  included. The decision is taken at the first value byte.
- Passes only the value bytes of the matching member.

**Stream synchroniser** (`stream_sync`)

- Copies one stream to N outputs, one per member.
- Keeps a done flag per output and releases the input once every output has taken
  the transfer. A slow member therefore throttles the whole parser.

**Array parser** (`json_array_parser`)

- Drops the brackets and the commas between elements.
- Marks each element end, and the list end on the lane that closes the member value.
- An empty array gives a list end with no element.

**Integer parser** (`json_int_parser`)

- Builds `acc = 10*acc + digit`, with an optional leading minus, into a 64-bit value.
- Emits at most one value per cycle.
- Keeps a lane pointer into the current transfer, so a transfer that closes several
  values (for example `1,2,3]`) is held one cycle per value. That is two cycles of
  back-pressure for three values.
- Digits after the last value end in a transfer start the next value in the same
  cycle. A transfer that closes only one value therefore never stalls.

**Boolean parser** (`json_bool_parser`)

- Same pointer scheme as the integer parser. The first byte decides the value (`t`
  gives 1).

**String parser** (`json_string_parser`)

- Removes the quotation marks and keeps escape sequences as raw bytes.
- `null` gives an empty string.

## Parsers for three schemas

**Example parser** (`listing1_parser`) reads documents such as
`{"id": 11, "message": "Hi FPT!", "read": false, "meta": {"refs": [42, 1337], "tag": null}}`:

- A four-way synchroniser feeds key filters for `id`, `message`, `read` and `meta`.
- `meta` goes into a second object parser and a two-way synchroniser, then to `refs`
  (array → integer) and `tag` (string).
- The nested object parser adds two more levels, so the record and buffer ends of
  `refs` and `tag` sit at bits 3 and 4.

**Simple schema** (`battery_parser`) reads `{"voltage": [..integers..]}`:

- object → key filter → array → integer. There is one member, so no synchroniser is
  needed.

**Complex schema** (`trip_parser`) reads vehicle-trip documents with twelve members:

- A twelve-way synchroniser feeds one key filter and one value parser per member.
- The members are one string, four integers, two booleans and five integer arrays.
- The member names and types are in the `FIELD_KEY`, `FIELD_KLEN` and `FIELD_TYPE`
  tables. Only five names are known from the source (timestamp, odometer,
  hypermiling, avgspeed, sec_in_band). The other seven names are placeholders, so
  edit the tables for real data.
- Members may appear in any order.

## Sharing column streams between parsers

This is the hardest part of the design.

One trip parser has twelve output columns. Giving each of P parsers its own twelve
column writers costs 12·P DMA engines, which is too large. The complex kernel
(`trip_kernel`) instead merges the P parsers onto one set of twelve columns. The merge
must keep the rows of all columns aligned: row r of every column must come from the
same document.

**Record multiplexers.** Each column has a `record_mux`. It serves one parser at a
time. It forwards that parser's transfers up to and including the record end, then
moves to the next entry of a shared *record order*. Every multiplexer follows the same
order, so the rows line up. The order reaches each multiplexer through a small FIFO
(8 entries). Different columns can therefore be at different rows: a column of short
values runs ahead of a column of long lists.

**Where the order comes from.** An obvious choice is to let one column's multiplexer
pick the next parser whenever that column has a record waiting. This does not work. A
parser's synchroniser stops when any of its member branches is full. If the chosen
column's member comes late in the document, for example the timestamp last, the
parser blocks before that member ever appears. The picker would wait forever, or at
best serve one document at a time.

The kernel therefore builds the order from all twelve fields:

- Per parser it counts the records ordered so far (`ord_cnt`).
- Per parser and field it counts the record ends that field's multiplexer has taken
  (`done_cnt`).
- A field presents a record that has not been ordered yet when its count has caught
  up with the ordered count and it shows a transfer (other than a lone buffer end).
- A parser with such a field is a candidate. Candidates are ordered round robin, one
  per cycle, while every multiplexer's FIFO has room.

Why this cannot deadlock: take the oldest record not yet taken by every multiplexer.
Every multiplexer still missing it is serving its parser. A branch of that parser can
only be full if it holds bytes of the *next* document. Then the synchroniser has
already passed every byte of the current one, so the waiting multiplexers get their
data.

**FIFOs.** Each parser output passes a 16-entry FIFO (`stream_fifo`) before its
multiplexer. Without it, a parser could run only a few transfers ahead of the slowest
multiplexer, and the parsers would take turns instead of working in parallel. With
it, eight parsers reach about 46 bytes per cycle; without it they reached about 8.

**Buffer ends.** A parser's buffer end is not forwarded on its own:

- Each multiplexer counts buffer ends per parser. A transfer that carries only a
  buffer end is absorbed as soon as it reaches the head of a stream that is not being
  served.
- Once every parser has ended a buffer (counted on field 0), the order gets a *flush*
  entry.
- A multiplexer that reaches the flush entry waits until it has a buffer end from
  every parser. It then emits one transfer that only closes its column.

All twelve columns are thus closed after the same row. That row may already contain
records of a parser's next buffer if that parser was faster.

`record_mux` also has a stand-alone leader mode, which picks parsers from its own
inputs. It suits parsers whose fields do not block each other. The complex kernel
does not use it.

## From field streams to Arrow buffers

`arrow_col_adapter` splits a field stream into the two streams that an Arrow column
writer consumes:

| Stream | Type | Contents |
|---|---|---|
| values | `col_t` | Every transfer that carries data. `last` is set on the buffer end. |
| lengths | `len_t` | Only for string and list columns (`IS_LIST`). One element count per record, emitted at the record end. A buffer end without a record end gives `dvalid = 0, last = 1`. |

Arrow offsets are the running sum of the lengths, which the column writer forms.
Integers and booleans use one value lane of the 64-bit data word. String characters
keep their lane positions and their `strb` bits.

## Top level

`json_arrow_accel` puts three independent parts side by side, each with its own ports:

| Prefix | Parameter | Contents |
|---|---|---|
| `s_*` | `NUM_SIMPLE` = 32 | Voltage kernels. Each has its own input stream and its own value and length streams. |
| `c_*` | `NUM_COMPLEX` = 8 | One trip kernel with that many parsers, on twelve shared columns. |
| `e_*` | — | The example parser with five columns. |

The defaults are the parser counts of the larger (VU37P) build. The smaller
(Arria 10) build used 8 and 6.

Each input stream is the byte content of one host buffer. The column writers, DMA,
control registers and host link would connect at these ports.

## Performance

These numbers come from simulation of the default top (`tb_json_arrow_accel`), with
every output always ready:

- **Simple kernels:** 32 kernels took 250 bytes per cycle, close to the ceiling of
  32 × 8 = 256. That is 50 GB/s at 200 MHz. The published system peaked at 19.4 GB/s
  because of its host link.
- **Complex kernel:** 8 parsers took 46 bytes per cycle, 9.2 GB/s at 200 MHz. The
  published mean is 10.1 GB/s, so this is about 9% lower. It is limited by the
  multiplexers, which spend one idle cycle between records and one cycle per array
  value.
- **One parser:** about 8 bytes per cycle. The exception is a transfer that closes
  more than one value, which costs one extra cycle per extra value.

## Departures and limits

- Numbers are integers only (no fraction or exponent). Values wrap modulo 2^64.
- Strings are not unescaped. `null` gives an empty string or list. There are no
  validity bitmaps.
- A scalar member missing from a document gives no value in its column, so that
  column's rows shift. The trip schema always has all members.
- The document separator is the closing brace. Newlines are ordinary white space.
- Object nesting is limited to 255 levels (`DEPTH_W` = 8).
- The record-order logic, the FIFOs, the flush entries and the length-stream
  encoding are this design's own. The published work only says that parser outputs
  are multiplexed onto one bundle of streams.
- The complex kernel's throughput is about 9% below the published mean (see above).

## Not included

These parts are missing:

- the Fletcher-generated Arrow column readers and writers, and their DMA engines;
- the MMIO control registers;
- the FPGA shell, and the PCIe or OpenCAPI host link;
- the host software that fills buffers and builds Arrow RecordBatches.

They are vendor- or tool-generated IP, or software. The kernel ports are where they
would connect.

## Simulating

Each component has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Shared helpers are in `tb/tb_json_pkg.sv`:

- text-to-transfer conversion;
- renderers that turn output streams into strings for comparison;
- a random trip-document generator;
- a row-by-row checker for the merged columns.

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/json_pkg.sv tb/tb_json_pkg.sv tb/tb_trip_kernel.sv --top-module tb_trip_kernel
./obj_dir/Vtb_trip_kernel
```

What the testbenches check:

- **Component testbenches:** documents with nested objects, strings holding braces,
  commas and escaped quotes, empty arrays, members in any order and random white
  space. Inputs are cut into random transfers with random idle cycles, and outputs
  are back-pressured at random.
- **Throughput:** full-rate behaviour (one transfer per cycle) and the multi-value
  stall.
- **`tb_json_arrow_accel`:** runs the full-size top. It checks every column of all
  three parts against the generated documents, and the throughputs above. It counts
  how often each mechanism occurred, and fails if any never did:
  - back-pressure;
  - input stalls;
  - multi-value holds;
  - parser interleaving on the shared columns;
  - merged buffer ends;
  - nested values;
  - null strings;
  - empty arrays.

  Building it takes about two minutes.
