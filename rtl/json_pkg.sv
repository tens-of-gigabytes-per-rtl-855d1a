// json_pkg: types and constants shared by the JSON-to-Arrow parser components.
//
// All parser components exchange valid/ready streams. Byte-oriented streams carry
// EPC lanes per transfer (eight bytes per handshake, as in the reference design).
// Every lane has its own strobe and its own set of NL "last" bits, so that a
// single transfer can end several values: last[0] is the innermost level of
// nesting that the stream has (end of a member value, of an array element, of a
// string), higher bits are the levels around it (end of object/record, end of the
// input buffer, ...). A lane may carry last bits with its strobe low, which is how
// a stripped delimiter (',' or '}') still marks where a value ended.
// Value streams (integers, booleans) carry one value per transfer with the same
// kind of last bits. Lane format, strobe-plus-last encoding and NL are this
// design's choices; the multi-level last signals themselves follow the reference
// design's use of nested-stream ("Tydi") interfaces.
package json_pkg;

  // Bytes per transfer on every byte stream.
  parameter int EPC = 8;
  // Number of last bits carried by every stream (deepest nesting supported).
  parameter int NL  = 8;
  // Width of parsed integers.
  parameter int IW  = 64;

  // One byte lane of a byte stream.
  typedef struct packed {
    logic          strb;   // lane holds a byte
    logic          tag;    // object-member key byte (1) or value byte (0)
    logic [NL-1:0] last;   // nesting levels closed after this lane
    logic [7:0]    data;
  } lane_t;

  typedef lane_t [EPC-1:0] beat_t;

  // One parsed integer per transfer.
  typedef struct packed {
    logic          strb;   // transfer holds a value
    logic [NL-1:0] last;
    logic [IW-1:0] value;
  } int_t;

  // One parsed boolean per transfer.
  typedef struct packed {
    logic          strb;
    logic [NL-1:0] last;
    logic          value;
  } bool_t;

  // Uniform field stream leaving a schema-specific parser. Every field of every
  // schema is normalised to the same three levels so that the multiplexers and
  // Arrow column adapters can be shared:
  //   last[0] end of a list element sequence (arrays) or of a string
  //   last[1] end of the record (top-level JSON object)
  //   last[2] end of the input buffer
  // For integers and booleans strb[0] marks a value in data; for strings strb
  // marks the lanes of data that hold characters.
  typedef struct packed {
    logic [2:0]       last;
    logic [EPC-1:0]   strb;
    logic [8*EPC-1:0] data;
  } fld_t;

  // Arrow value stream: values to append to a column buffer, the column
  // closed after this transfer when last is set.
  typedef struct packed {
    logic             last;
    logic [EPC-1:0]   strb;
    logic [8*EPC-1:0] data;
  } col_t;

  // Arrow length stream for list and string columns: one length per record.
  typedef struct packed {
    logic        last;
    logic        dvalid;  // 0: transfer only closes the stream
    logic [31:0] len;
  } len_t;

  // ASCII characters the parsers react to.
  localparam logic [7:0] CH_LBRACE = 8'h7B;  // {
  localparam logic [7:0] CH_RBRACE = 8'h7D;  // }
  localparam logic [7:0] CH_LBRACK = 8'h5B;  // [
  localparam logic [7:0] CH_RBRACK = 8'h5D;  // ]
  localparam logic [7:0] CH_QUOTE  = 8'h22;  // "
  localparam logic [7:0] CH_BSLASH = 8'h5C;  // backslash
  localparam logic [7:0] CH_COLON  = 8'h3A;  // :
  localparam logic [7:0] CH_COMMA  = 8'h2C;  // ,
  localparam logic [7:0] CH_MINUS  = 8'h2D;  // -

  function automatic logic is_space(logic [7:0] c);
    return c == 8'h20 || c == 8'h09 || c == 8'h0A || c == 8'h0D;
  endfunction

  function automatic logic is_digit(logic [7:0] c);
    return c >= 8'h30 && c <= 8'h39;
  endfunction

  function automatic logic is_open(logic [7:0] c);
    return c == CH_LBRACE || c == CH_LBRACK;
  endfunction

  function automatic logic is_close(logic [7:0] c);
    return c == CH_RBRACE || c == CH_RBRACK;
  endfunction

  // Conversion of parser outputs to the uniform field stream. lb, rb and bb are
  // the positions, in the source's last bits, of the list/string end, the record
  // end and the buffer end; has_list = 0 for a scalar field (lb unused).
  localparam int LW = $clog2(NL);
  function automatic fld_t int_to_fld(int_t x, logic has_list, logic [LW-1:0] lb,
                                      logic [LW-1:0] rb, logic [LW-1:0] bb);
    fld_t f = '0;
    f.strb[0]  = x.strb;
    f.data     = (8*EPC)'(x.value);
    f.last[0]  = has_list & x.last[lb];
    f.last[1]  = x.last[rb];
    f.last[2]  = x.last[bb];
    return f;
  endfunction

  function automatic fld_t bool_to_fld(bool_t x, logic [LW-1:0] rb, logic [LW-1:0] bb);
    fld_t f = '0;
    f.strb[0] = x.strb;
    f.data[0] = x.value;
    f.last[1] = x.last[rb];
    f.last[2] = x.last[bb];
    return f;
  endfunction

  function automatic fld_t beat_to_fld(beat_t b, logic [LW-1:0] lb, logic [LW-1:0] rb,
                                       logic [LW-1:0] bb);
    fld_t f = '0;
    for (int i = 0; i < EPC; i++) begin
      f.strb[i]        = b[i].strb;
      f.data[8*i +: 8] = b[i].data;
      f.last[0]       |= b[i].last[lb];
      f.last[1]       |= b[i].last[rb];
      f.last[2]       |= b[i].last[bb];
    end
    return f;
  endfunction

  // Any lane of a beat that carries a byte or a last bit.
  function automatic logic beat_nonempty(beat_t b);
    logic r = 1'b0;
    for (int i = 0; i < EPC; i++) r |= b[i].strb | (|b[i].last);
    return r;
  endfunction

endpackage
