// braille_pkg: types, constants and the built-in rule table shared by the
// text-to-Braille translator.
//
// A translation rule has the form  left-context [focus] right-context = codes.
// Every rule is stored with the same length: four fields of FIELD_LEN bytes,
// each part ended by an ASCII 0 byte (or by the end of its field). The fixed
// length and the 0 end-sign follow the design description; the field length
// of 10 bytes (long enough for the longest focus, "knowledge") is this
// design's choice.
//
// Field layout (field_t is packed, element 0 = least significant byte):
//   focus[0]  first character of the focus, focus[1] the next, ...
//   right[0]  character directly after the focus, ...
//   left[0]   character directly before the focus, left[1] the one before
//             that: the left context is stored nearest-first so that the
//             left-context check walks it with the same index as the others
//   codes[0]  first Braille ASCII code to emit, ...
//
// Context wildcards (this design's choice of a small set; each stands for
// exactly one text position):
//   '~'  word boundary: a space or punctuation, or a position outside the text
//   '!'  any letter a-z
//   '#'  any digit 0-9
//
// The built-in table is a small grade 2 English table written for this design:
// letters, digits with the number sign, common punctuation, the single-cell
// whole-word contractions and the common group signs, in North American
// Braille ASCII. Rules that share a first focus character are contiguous and
// are tried in table order, so the more specific rules come first.
package braille_pkg;

  localparam int FIELD_LEN  = 10;
  localparam int RULE_BYTES = 4 * FIELD_LEN;
  localparam int RULE_BITS  = 8 * RULE_BYTES;

  typedef logic [7:0]                char_t;
  typedef logic [FIELD_LEN-1:0][7:0] field_t;

  // Byte order of the packed struct: codes in the least significant bits,
  // then right, focus and left. A rule loaded over the serial link arrives
  // least significant byte first (codes[0] first, left[FIELD_LEN-1] last).
  typedef struct packed {
    field_t left;
    field_t focus;
    field_t right;
    field_t codes;
  } rule_t;

  localparam char_t WC_BOUNDARY = 8'h7E;  // '~'
  localparam char_t WC_LETTER   = 8'h21;  // '!'
  localparam char_t WC_DIGIT    = 8'h23;  // '#'

  function automatic logic is_letter(char_t c);
    return (c >= 8'h61 && c <= 8'h7A);
  endfunction

  function automatic logic is_digit(char_t c);
    return (c >= 8'h30 && c <= 8'h39);
  endfunction

  // Does context pattern byte `pat` accept the text character `c`?
  // `present` is 0 for a position before the first or after the last character.
  function automatic logic ctx_match(char_t pat, logic present, char_t c);
    logic m;
    unique case (pat)
      WC_BOUNDARY: m = !present || !(is_letter(c) || is_digit(c));
      WC_LETTER:   m = present && is_letter(c);
      WC_DIGIT:    m = present && is_digit(c);
      default:     m = present && (c == pat);
    endcase
    return m;
  endfunction

  // ---------------------------------------------------------------------
  // Building rules from text. A string literal assigned to a packed vector
  // is right-justified, so the last character sits in the lowest byte.
  // ---------------------------------------------------------------------
  typedef logic [8*FIELD_LEN-1:0] text_t;

  function automatic int unsigned text_length(text_t s);
    int unsigned n;
    n = 0;
    for (int i = 0; i < FIELD_LEN; i++)
      if (s[8*i +: 8] != 8'h00) n = i + 1;
    return n;
  endfunction

  // First character of the text into element 0.
  function automatic field_t forward_field(text_t s);
    field_t      f;
    int unsigned n;
    f = '0;
    n = text_length(s);
    for (int i = 0; i < FIELD_LEN; i++)
      if (i < n) f[i] = s[8*(n-1-i) +: 8];
    return f;
  endfunction

  // Last character of the text into element 0 (left context, nearest first).
  function automatic field_t backward_field(text_t s);
    return field_t'(s);
  endfunction

  function automatic rule_t mk_rule(text_t l, text_t f, text_t r, text_t o);
    rule_t x;
    x.left  = backward_field(l);
    x.focus = forward_field(f);
    x.right = forward_field(r);
    x.codes = forward_field(o);
    return x;
  endfunction

  localparam int N_DEFAULT_RULES = 95;
  localparam int FIRST_DIGIT_RULE = 9;

  // Rule i of the built-in table; an all-zero rule past the end.
  function automatic rule_t default_rule(int i);
    rule_t r;
    r = '0;
    if (i >= FIRST_DIGIT_RULE && i < FIRST_DIGIT_RULE + 20) begin
      // Digits 1..9,0 are Braille letters a..j. After another digit the
      // letter alone; otherwise the number sign '#' comes first.
      int d;
      char_t digit, letter;
      d      = (i - FIRST_DIGIT_RULE) / 2;          // 0 -> '1', ..., 9 -> '0'
      digit  = (d == 9) ? 8'h30 : char_t'(32'h31 + d);
      letter = char_t'(32'h61 + d);
      if (((i - FIRST_DIGIT_RULE) % 2) == 0)
        r = mk_rule("#", text_t'(digit), "", text_t'(letter));
      else
        r = mk_rule("", text_t'(digit), "", text_t'({8'h23, letter}));
    end else begin
      unique case (i)
        0:  r = mk_rule("", " ", "", " ");
        1:  r = mk_rule("", ",", "", "1");
        2:  r = mk_rule("", ".", "", "4");
        3:  r = mk_rule("", "?", "", "8");
        4:  r = mk_rule("", "!", "", "6");
        5:  r = mk_rule("", ";", "", "2");
        6:  r = mk_rule("", ":", "", "3");
        7:  r = mk_rule("", "'", "", "'");
        8:  r = mk_rule("", "-", "", "-");
        // 9..28: digits, above
        29: r = mk_rule("",  "and",   "",  "&");
        30: r = mk_rule("~", "as",    "~", "z");
        31: r = mk_rule("",  "ar",    "",  ">");
        32: r = mk_rule("",  "a",     "",  "a");
        33: r = mk_rule("~", "but",   "~", "b");
        34: r = mk_rule("",  "b",     "",  "b");
        35: r = mk_rule("~", "can",   "~", "c");
        36: r = mk_rule("",  "ch",    "",  "*");
        37: r = mk_rule("",  "c",     "",  "c");
        38: r = mk_rule("~", "do",    "~", "d");
        39: r = mk_rule("",  "d",     "",  "d");
        40: r = mk_rule("~", "every", "~", "e");
        41: r = mk_rule("",  "ed",    "",  "$");
        42: r = mk_rule("",  "er",    "",  "]");
        43: r = mk_rule("",  "e",     "",  "e");
        44: r = mk_rule("",  "for",   "",  "=");
        45: r = mk_rule("~", "from",  "~", "f");
        46: r = mk_rule("",  "f",     "",  "f");
        47: r = mk_rule("~", "go",    "~", "g");
        48: r = mk_rule("",  "gh",    "",  "<");
        49: r = mk_rule("",  "g",     "",  "g");
        50: r = mk_rule("~", "have",  "~", "h");
        51: r = mk_rule("",  "h",     "",  "h");
        52: r = mk_rule("!", "ing",   "",  "+");
        53: r = mk_rule("~", "it",    "~", "x");
        54: r = mk_rule("",  "i",     "",  "i");
        55: r = mk_rule("~", "just",  "~", "j");
        56: r = mk_rule("",  "j",     "",  "j");
        57: r = mk_rule("~", "knowledge", "~", "k");
        58: r = mk_rule("",  "k",     "",  "k");
        59: r = mk_rule("~", "like",  "~", "l");
        60: r = mk_rule("",  "l",     "",  "l");
        61: r = mk_rule("~", "more",  "~", "m");
        62: r = mk_rule("",  "m",     "",  "m");
        63: r = mk_rule("~", "not",   "~", "n");
        64: r = mk_rule("",  "n",     "",  "n");
        65: r = mk_rule("",  "of",    "",  "(");
        66: r = mk_rule("",  "ou",    "",  "\\");
        67: r = mk_rule("",  "ow",    "",  "[");
        68: r = mk_rule("",  "o",     "",  "o");
        69: r = mk_rule("~", "people", "~", "p");
        70: r = mk_rule("",  "p",     "",  "p");
        71: r = mk_rule("~", "quite", "~", "q");
        72: r = mk_rule("",  "q",     "",  "q");
        73: r = mk_rule("~", "rather", "~", "r");
        74: r = mk_rule("",  "r",     "",  "r");
        75: r = mk_rule("~", "so",    "~", "s");
        76: r = mk_rule("",  "sh",    "",  "%");
        77: r = mk_rule("",  "st",    "",  "/");
        78: r = mk_rule("",  "s",     "",  "s");
        79: r = mk_rule("~", "that",  "~", "t");
        80: r = mk_rule("",  "the",   "",  "!");
        81: r = mk_rule("",  "th",    "",  "?");
        82: r = mk_rule("",  "t",     "",  "t");
        83: r = mk_rule("~", "us",    "~", "u");
        84: r = mk_rule("",  "u",     "",  "u");
        85: r = mk_rule("~", "very",  "~", "v");
        86: r = mk_rule("",  "v",     "",  "v");
        87: r = mk_rule("",  "with",  "",  ")");
        88: r = mk_rule("~", "will",  "~", "w");
        89: r = mk_rule("",  "wh",    "",  ":");
        90: r = mk_rule("",  "w",     "",  "w");
        91: r = mk_rule("",  "x",     "",  "x");
        92: r = mk_rule("~", "you",   "~", "y");
        93: r = mk_rule("",  "y",     "",  "y");
        94: r = mk_rule("",  "z",     "",  "z");
        default: r = '0;
      endcase
    end
    return r;
  endfunction

  // Entry-address table entry: where the rules for one character begin.
  localparam int ENTRY_CHARS = 128;   // 7-bit ASCII entry characters

endpackage
