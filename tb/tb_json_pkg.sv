// tb_json_pkg: testbench helpers for the JSON parser components.
//
// beats_from_text cuts a text into input transfers of 1..max_bytes bytes, placed
// at a random lane offset (so lanes without strobe occur), with last[0] on the
// lane of the final byte. The render_* functions turn output transfers into text
// that is easy to compare with a hand-written expectation: strobed bytes appear as
// themselves, last bits as <hex>, integers in decimal, booleans as T/F, and every
// transfer of a value stream ends with a space.
package tb_json_pkg;
  import json_pkg::*;

  // Test texts are written with ( ) ' standing for { } and the double quote,
  // which keeps them readable inside string literals; j() maps them back.
  function automatic string j(string s);
    string r = s;
    for (int i = 0; i < r.len(); i++) begin
      if (r[i] == "(")       r[i] = 8'h7B;
      else if (r[i] == ")")  r[i] = 8'h7D;
      else if (r[i] == "'")  r[i] = 8'h22;
    end
    return r;
  endfunction

  function automatic void beats_from_text(string s, int max_bytes, ref beat_t q[$]);
    int pos = 0;
    while (pos < s.len()) begin
      beat_t b = '0;
      int n   = 1 + ($urandom % max_bytes);
      int off;
      if (n > s.len() - pos) n = s.len() - pos;
      off = $urandom % (EPC - n + 1);
      for (int i = 0; i < n; i++) begin
        b[off+i].strb = 1'b1;
        b[off+i].data = s[pos+i];
        if (pos + i == s.len() - 1) b[off+i].last[0] = 1'b1;
      end
      pos += n;
      q.push_back(b);
    end
  endfunction

  function automatic string render_beat(beat_t b);
    string r = "";
    for (int i = 0; i < EPC; i++) begin
      if (b[i].strb) r = {r, string'(b[i].data)};
      if (b[i].last != '0) r = {r, $sformatf("<%0h>", b[i].last)};
    end
    return r;
  endfunction

  // key/value tags of the strobed bytes: k or v
  function automatic string render_tags(beat_t b);
    string r = "";
    for (int i = 0; i < EPC; i++)
      if (b[i].strb) r = {r, b[i].tag ? "k" : "v"};
    return r;
  endfunction

  function automatic string render_int(int_t x);
    string r = "";
    if (x.strb) r = $sformatf("%0d", $signed(x.value));
    if (x.last != '0) r = {r, $sformatf("<%0h>", x.last)};
    return {r, " "};
  endfunction

  function automatic string render_bool(bool_t x);
    string r = "";
    if (x.strb) r = x.value ? "T" : "F";
    if (x.last != '0) r = {r, $sformatf("<%0h>", x.last)};
    return {r, " "};
  endfunction

  // last bits of a field stream, one marker per level: <1> list/string end,
  // <2> record end, <4> buffer end
  function automatic string fld_marks(fld_t x);
    string r = "";
    if (x.last[0]) r = {r, "<1>"};
    if (x.last[1]) r = {r, "<2>"};
    if (x.last[2]) r = {r, "<4>"};
    return r;
  endfunction

  // field stream, integer view (strb[0] and data as a signed integer); transfers
  // that carry nothing are skipped
  function automatic string render_fld_int(fld_t x);
    string r = "";
    if (x.strb == '0 && x.last == '0) return "";
    if (x.strb[0]) r = $sformatf("%0d", $signed(x.data));
    return {r, fld_marks(x), " "};
  endfunction

  // field stream, character view
  function automatic string render_fld_str(fld_t x);
    string r = "";
    for (int i = 0; i < EPC; i++)
      if (x.strb[i]) r = {r, string'(x.data[8*i +: 8])};
    return {r, fld_marks(x)};
  endfunction

  // ---------------------------------------------------------------------------
  // Vehicle-trip documents (complex schema): twelve members, see trip_parser.
  // Member f: 0 string, 1 3 5 6 integers, 2 7 booleans, 4 8 9 10 11 integer arrays.
  localparam string TRIP_KEY [12] = '{
    "timestamp", "odometer", "hypermiling", "avgspeed", "sec_in_band", "timezone",
    "vin", "orientation", "miles_in_time_range", "const_speed_miles_in_band",
    "vary_speed_miles_in_band", "sec_decel"
  };
  localparam int TRIP_KIND [12] = '{0, 1, 2, 1, 3, 1, 1, 2, 3, 3, 3, 3};  // 0 str 1 int 2 bool 3 list

  class trip_doc;
    string  ts;
    longint num [12];     // integer and boolean members
    longint lst [12][$];  // array members
    int     order [12];   // member order in the text
    string  txt;

    // id goes into the odometer member so that rows can be traced
    function new(longint id, int max_list);
      int n, t;
      ts = $sformatf("20%02d-%02d-%02dT%02d:%02d:%02d", $urandom % 30, 1 + $urandom % 12,
                     1 + $urandom % 28, $urandom % 24, $urandom % 60, $urandom % 60);
      if (($urandom % 4) == 0) ts = {ts, "+01:00"};
      for (int f = 0; f < 12; f++) begin
        order[f] = f;
        num[f]   = longint'({$urandom, $urandom} >> (1 + $urandom % 63));
        if (TRIP_KIND[f] == 2) num[f] = $urandom % 2;
        if (TRIP_KIND[f] == 3) begin
          n = $urandom % (max_list + 1);
          for (int e = 0; e < n; e++) lst[f].push_back(longint'($urandom % 100000));
        end
      end
      num[1] = id;
      // shuffle the member order half of the time
      if (($urandom % 2) != 0)
        for (int f = 11; f > 0; f--) begin
          n = $urandom % (f + 1);
          t = order[f];
          order[f] = order[n];
          order[n] = t;
        end
      txt = "{";
      for (int k = 0; k < 12; k++) begin
        int f;
        f = order[k];
        txt = {txt, (k > 0) ? "," : "", ws(), "\"", TRIP_KEY[f], "\"", ws(), ":", ws()};
        case (TRIP_KIND[f])
          0: txt = {txt, "\"", ts, "\""};
          1: txt = {txt, $sformatf("%0d", num[f])};
          2: txt = {txt, (num[f] != 0) ? "true" : "false"};
          default: begin
            txt = {txt, "["};
            foreach (lst[f][e]) txt = {txt, (e > 0) ? "," : "", ws(), $sformatf("%0d", lst[f][e])};
            txt = {txt, "]"};
          end
        endcase
        txt = {txt, ws()};
      end
      txt = {txt, "}\n"};
    endfunction

    // rendered field stream expected from trip_parser for member f
    function string exp_fld(int f);
      string r;
      bit    is_last;
      is_last = order[11] == f;
      case (TRIP_KIND[f])
        0: r = {ts, "<1><2>"};
        1, 2: r = $sformatf(is_last ? "%0d<2> " : "%0d <2> ", num[f]);
        default: begin
          r = "";
          foreach (lst[f][e]) r = {r, $sformatf("%0d ", lst[f][e])};
          r = {r, is_last ? "<1><2> " : "<1> <2> "};
        end
      endcase
      return r;
    endfunction
  endclass

  function automatic string ws();
    case ($urandom % 5)
      0: return " ";
      1: return "\n";
      default: return "";
    endcase
  endfunction

  // Collects the twelve merged Arrow column streams of a trip kernel and checks
  // them row by row against the documents that were sent (keyed by the id in
  // the odometer member, id / 10000 = parser index).
  class trip_cols;
    byte unsigned ts_bytes[$];
    longint       vals [12][$];
    int           lens [12][$];
    int           val_lasts [12];
    int           len_lasts [12];
    int           close_rows [12][$];  // rows in the column when it was closed
    int           switches;   // rows whose parser differs from the previous row's
    int           empty_lists;

    function new();
      for (int f = 0; f < 12; f++) begin
        val_lasts[f] = 0;
        len_lasts[f] = 0;
      end
      switches    = 0;
      empty_lists = 0;
    endfunction

    function void take_val(int f, col_t c);
      if (f == 0) begin
        for (int i = 0; i < EPC; i++) if (c.strb[i]) ts_bytes.push_back(c.data[8*i +: 8]);
      end else if (c.strb[0]) begin
        vals[f].push_back(longint'(c.data));
      end
      if (c.last) val_lasts[f]++;
      if (c.last && TRIP_KIND[f] != 3 && f != 0) close_rows[f].push_back(vals[f].size());
    endfunction

    function void take_len(int f, len_t l);
      if (l.dvalid) lens[f].push_back(int'(l.len));
      if (l.last) len_lasts[f]++;
      if (l.last) close_rows[f].push_back(lens[f].size());
    endfunction

    // returns the number of errors; nbuf = buffers sent per parser
    function int check(ref trip_doc docs[longint], input int nbuf);
      int     err = 0, rows, tpos = 0, prev_p = -1;
      int     lpos [12];
      longint last_id [int];
      bit     seen [longint];
      rows = vals[1].size();
      for (int f = 0; f < 12; f++) lpos[f] = 0;
      if (rows != docs.num()) begin
        err++;
        $display("  rows: %0d, documents sent: %0d", rows, docs.num());
      end
      for (int f = 0; f < 12; f++) begin
        if (TRIP_KIND[f] != 3 && f != 0 && vals[f].size() != rows) begin
          err++;
          $display("  member %0d has %0d values for %0d rows", f, vals[f].size(), rows);
        end
        if ((TRIP_KIND[f] == 3 || f == 0) && lens[f].size() != rows) begin
          err++;
          $display("  member %0d has %0d lengths for %0d rows", f, lens[f].size(), rows);
        end
        if (val_lasts[f] != nbuf || ((TRIP_KIND[f] == 3 || f == 0) ? len_lasts[f] != nbuf : len_lasts[f] != 0)) begin
          err++;
          $display("  member %0d closed %0d/%0d times, expected %0d", f, val_lasts[f], len_lasts[f], nbuf);
        end
      end
      for (int f = 1; f < 12; f++)
        if (close_rows[f] != close_rows[0]) begin
          err++;
          $display("  member %0d closed after other rows than member 0", f);
        end
      if (err != 0) return err;
      for (int r = 0; r < rows; r++) begin
        longint  id;
        int      p;
        trip_doc d;
        string   t;
        id = vals[1][r];
        p  = int'(id / 10000);
        if (!docs.exists(id) || seen.exists(id)) begin
          err++;
          $display("  row %0d: unknown or repeated id %0d", r, id);
          return err;
        end
        seen[id] = 1'b1;
        if (last_id.exists(p) && last_id[p] >= id) begin
          err++;
          $display("  row %0d: id %0d after %0d from the same parser", r, id, last_id[p]);
        end
        last_id[p] = id;
        if (prev_p >= 0 && p != prev_p) switches++;
        prev_p = p;
        d = docs[id];
        t = "";
        for (int i = 0; i < lens[0][r]; i++) t = {t, string'(ts_bytes[tpos + i])};
        tpos += lens[0][r];
        if (t != d.ts) begin
          err++;
          $display("  row %0d id %0d: timestamp %s, expected %s", r, id, t, d.ts);
        end
        for (int f = 2; f < 12; f++) begin
          if (TRIP_KIND[f] == 3) begin
            if (lens[f][r] != d.lst[f].size()) begin
              err++;
              $display("  row %0d id %0d member %0d: length %0d, expected %0d", r, id, f,
                       lens[f][r], d.lst[f].size());
              return err;
            end
            if (lens[f][r] == 0) empty_lists++;
            foreach (d.lst[f][e])
              if (vals[f][lpos[f] + e] != d.lst[f][e]) begin
                err++;
                $display("  row %0d id %0d member %0d element %0d wrong", r, id, f, e);
              end
            lpos[f] += lens[f][r];
          end else begin
            longint v;
            v = vals[f][r];
            if (TRIP_KIND[f] == 2) v = v & 1;
            if (v != d.num[f]) begin
              err++;
              $display("  row %0d id %0d member %0d: %0d, expected %0d", r, id, f, v, d.num[f]);
            end
          end
        end
      end
      return err;
    endfunction
  endclass

endpackage
