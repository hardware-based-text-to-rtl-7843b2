// braille_pkg: types, constants and the grade-2 rule table shared by the
// text-to-Braille translator.
//
// A rule has the form  left-context [focus] right-context = output.  The
// translator looks up the rules whose focus starts with the first
// untranslated character and tries them in table order; the first rule whose
// focus, left context and right context all match the text is applied.  The
// rule format and the "first matching rule wins, rules grouped by first focus
// character in ASCII order" discipline follow the translator's description.
// The rule contents below are this design's own: a compact subset of English
// grade-2 contractions (whole-word and part-word signs) written in North
// American Braille ASCII.  Letters are handled in upper case.
//
// Context characters are literal, except two classes:
//   '~'  matches any non-letter (space, punctuation, or text boundary)
//   '!'  matches any letter A-Z
//
// Table layout (computed at elaboration by build_rules):
//   rule_t.focus[0] is the first focus character, left[0] the character
//   immediately before the focus, right[0] the one immediately after it,
//   out[0] the first output code.  Unused table slots have focus_len = 0.
//   Every rule's output is no longer than its focus, so a group of N text
//   characters never yields more than N codes.
package braille_pkg;

  localparam int unsigned FOCUS_MAX = 6;   // longest focus, in characters
  localparam int unsigned LEFT_MAX  = 2;   // left context: one or two characters
  localparam int unsigned RIGHT_MAX = 2;   // longest right context
  localparam int unsigned OUT_MAX   = 2;   // longest output, in Braille cells
  localparam int unsigned NUM_RULES = 128; // rule table depth
  localparam int unsigned RULE_AW   = $clog2(NUM_RULES);

  localparam logic [7:0] CLS_BOUNDARY = 8'h7E; // '~'
  localparam logic [7:0] CLS_LETTER   = 8'h21; // '!'
  localparam logic [7:0] CH_SPACE     = 8'h20;
  localparam logic [7:0] CH_LF        = 8'h0A;
  localparam logic [7:0] CH_CR        = 8'h0D;

  typedef logic [7:0]         char_t;
  typedef logic [RULE_AW-1:0] rule_addr_t;

  typedef struct packed {
    logic [1:0]                 left_len;
    char_t [LEFT_MAX-1:0]       left;
    logic [2:0]                 focus_len;
    char_t [FOCUS_MAX-1:0]      focus;
    logic [1:0]                 right_len;
    char_t [RIGHT_MAX-1:0]      right;
    logic [1:0]                 out_len;
    char_t [OUT_MAX-1:0]        out;
  } rule_t;

  typedef rule_t [NUM_RULES-1:0] rule_table_t;

  // One find-entry slot: whether any rule starts with this character, and
  // the address of the first (highest-priority) one.
  typedef struct packed {
    logic       present;
    rule_addr_t addr;
  } entry_t;

  typedef entry_t [255:0] entry_table_t;

  function automatic logic is_letter(char_t c);
    return (c >= 8'h41) && (c <= 8'h5A);
  endfunction

  // Context comparison with the two character classes.
  function automatic logic ctx_match(char_t pat, char_t c);
    if (pat == CLS_BOUNDARY) return !is_letter(c);
    if (pat == CLS_LETTER)   return is_letter(c);
    return pat == c;
  endfunction

  // Fold a lower-case ASCII letter to upper case.
  function automatic char_t to_upper(char_t c);
    if ((c >= 8'h61) && (c <= 8'h7A)) return c - 8'h20;
    return c;
  endfunction

  // Number of non-zero bytes in a right-justified packed string literal.
  function automatic int unsigned str_len(logic [8*FOCUS_MAX-1:0] s);
    int unsigned n;
    n = 0;
    for (int i = 0; i < FOCUS_MAX; i++)
      if (s[8*i +: 8] != 8'h00) n = i + 1;
    return n;
  endfunction

  // Build one rule from string literals written left to right, e.g.
  // mk("~", "BUT", "~", "B") for  ~[BUT]~ = B.
  function automatic rule_t mk(logic [8*LEFT_MAX-1:0]  l,
                               logic [8*FOCUS_MAX-1:0] f,
                               logic [8*RIGHT_MAX-1:0] r,
                               logic [8*OUT_MAX-1:0]   o);
    rule_t       x;
    int unsigned ll, fl, rl, ol;
    x  = '0;
    ll = str_len({{(8*(FOCUS_MAX-LEFT_MAX)){1'b0}}, l});
    fl = str_len(f);
    rl = str_len({{(8*(FOCUS_MAX-RIGHT_MAX)){1'b0}}, r});
    ol = str_len({{(8*(FOCUS_MAX-OUT_MAX)){1'b0}}, o});
    x.left_len  = 2'(ll);
    x.focus_len = 3'(fl);
    x.right_len = 2'(rl);
    x.out_len   = 2'(ol);
    // left[0] is the character nearest the focus: the last one written.
    for (int i = 0; i < LEFT_MAX; i++)  if (i < ll) x.left[i]  = l[8*i +: 8];
    for (int i = 0; i < FOCUS_MAX; i++) if (i < fl) x.focus[i] = f[8*(fl-1-i) +: 8];
    for (int i = 0; i < RIGHT_MAX; i++) if (i < rl) x.right[i] = r[8*(rl-1-i) +: 8];
    for (int i = 0; i < OUT_MAX; i++)   if (i < ol) x.out[i]   = o[8*(ol-1-i) +: 8];
    return x;
  endfunction

  // The rule table, grouped by first focus character in ASCII order; within
  // a group, earlier rules have priority.  Each group ends with a rule that
  // translates the single letter to itself.  Characters with no group
  // (space, digits, punctuation, X, Z) take the find-entry fail path and are
  // copied to the output untranslated.
  function automatic rule_table_t build_rules();
    rule_table_t t;
    int n;
    for (int i = 0; i < NUM_RULES; i++) t[i] = '0;
    n = 0;
    t[n] = mk("",  "AND",    "",  "&"); n++;
    t[n] = mk("",  "AR",     "",  ">"); n++;
    t[n] = mk("~", "AS",     "~", "Z"); n++;
    t[n] = mk("",  "A",      "",  "A"); n++;
    t[n] = mk("!", "BB",     "!", "2"); n++;
    t[n] = mk("~", "BUT",    "~", "B"); n++;
    t[n] = mk("",  "B",      "",  "B"); n++;
    t[n] = mk("~", "CAN",    "~", "C"); n++;
    t[n] = mk("!", "CC",     "!", "3"); n++;
    t[n] = mk("",  "CH",     "",  "*"); n++;
    t[n] = mk("",  "C",      "",  "C"); n++;
    t[n] = mk("~", "DO",     "~", "D"); n++;
    t[n] = mk("",  "D",      "",  "D"); n++;
    t[n] = mk("!", "EA",     "!", "1"); n++;
    t[n] = mk("",  "ED",     "",  "$"); n++;
    t[n] = mk("",  "ER",     "",  "]"); n++;
    t[n] = mk("~", "EVERY",  "~", "E"); n++;
    t[n] = mk("",  "E",      "",  "E"); n++;
    t[n] = mk("!", "FF",     "!", "6"); n++;
    t[n] = mk("",  "FOR",    "",  "="); n++;
    t[n] = mk("~", "FROM",   "~", "F"); n++;
    t[n] = mk("",  "F",      "",  "F"); n++;
    t[n] = mk("!", "GG",     "!", "7"); n++;
    t[n] = mk("",  "GH",     "",  "<"); n++;
    t[n] = mk("~", "GO",     "~", "G"); n++;
    t[n] = mk("",  "G",      "",  "G"); n++;
    t[n] = mk("~", "HAVE",   "~", "H"); n++;
    t[n] = mk("",  "H",      "",  "H"); n++;
    t[n] = mk("!", "ING",    "",  "+"); n++;
    t[n] = mk("~", "IT",     "~", "X"); n++;
    t[n] = mk("",  "I",      "",  "I"); n++;
    t[n] = mk("~", "JUST",   "~", "J"); n++;
    t[n] = mk("",  "J",      "",  "J"); n++;
    t[n] = mk("",  "K",      "",  "K"); n++;
    t[n] = mk("~", "LIKE",   "~", "L"); n++;
    t[n] = mk("",  "L",      "",  "L"); n++;
    t[n] = mk("~", "MORE",   "~", "M"); n++;
    t[n] = mk("",  "M",      "",  "M"); n++;
    t[n] = mk("~", "NOT",    "~", "N"); n++;
    t[n] = mk("",  "N",      "",  "N"); n++;
    t[n] = mk("",  "OF",     "",  "("); n++;
    t[n] = mk("",  "OU",     "",  "\\"); n++;
    t[n] = mk("",  "OW",     "",  "["); n++;
    t[n] = mk("",  "O",      "",  "O"); n++;
    t[n] = mk("~", "PEOPLE", "~", "P"); n++;
    t[n] = mk("",  "P",      "",  "P"); n++;
    t[n] = mk("~", "QUITE",  "~", "Q"); n++;
    t[n] = mk("",  "Q",      "",  "Q"); n++;
    t[n] = mk("~", "RATHER", "~", "R"); n++;
    t[n] = mk("",  "R",      "",  "R"); n++;
    t[n] = mk("",  "SH",     "",  "%"); n++;
    t[n] = mk("~", "SO",     "~", "S"); n++;
    t[n] = mk("",  "ST",     "",  "/"); n++;
    t[n] = mk("",  "S",      "",  "S"); n++;
    t[n] = mk("~", "THAT",   "~", "T"); n++;
    t[n] = mk("",  "THE",    "",  "!"); n++;
    t[n] = mk("",  "TH",     "",  "?"); n++;
    t[n] = mk("",  "T",      "",  "T"); n++;
    t[n] = mk("~", "US",     "~", "U"); n++;
    t[n] = mk("",  "U",      "",  "U"); n++;
    t[n] = mk("~", "VERY",   "~", "V"); n++;
    t[n] = mk("",  "V",      "",  "V"); n++;
    t[n] = mk("",  "WH",     "",  ":"); n++;
    t[n] = mk("~", "WILL",   "~", "W"); n++;
    t[n] = mk("",  "WITH",   "",  ")"); n++;
    t[n] = mk("",  "W",      "",  "W"); n++;
    t[n] = mk("~", "YOU",    "~", "Y"); n++;
    t[n] = mk("",  "Y",      "",  "Y"); n++;
    return t;
  endfunction

  // Find-entry table: for every character, the first rule whose focus
  // starts with it.
  function automatic entry_table_t build_entries(rule_table_t t);
    entry_table_t e;
    e = '0;
    for (int i = 0; i < NUM_RULES; i++) begin
      if (t[i].focus_len != 0 && !e[t[i].focus[0]].present) begin
        e[t[i].focus[0]].present = 1'b1;
        e[t[i].focus[0]].addr    = rule_addr_t'(i);
      end
    end
    return e;
  endfunction

endpackage
