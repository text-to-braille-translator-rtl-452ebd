// Reference translator for the testbenches: applies a rule list to a text
// the slow, obvious way, with string operations. For each position it scans
// the rules in order and takes the first one whose focus equals the text
// there and whose left and right contexts are accepted; a character that no
// rule translates is copied unchanged. Rules are given as strings
// (ref_left is written as it reads in the text, farthest character first).

string ref_left  [$];
string ref_focus [$];
string ref_right [$];
string ref_codes [$];

function automatic bit ref_pos(byte pat, string t, int q);
  bit present, letter, digit;
  byte c;
  present = (q >= 0) && (q < t.len());
  c       = present ? t[q] : 8'h00;
  letter  = present && (c inside {["a":"z"]});
  digit   = present && (c inside {["0":"9"]});
  case (pat)
    "~":     return !letter && !digit;
    "!":     return letter;
    "#":     return digit;
    default: return present && c == pat;
  endcase
endfunction

function automatic string ref_field(braille_pkg::field_t f, bit reverse);
  string s = "";
  for (int i = 0; i < braille_pkg::FIELD_LEN && f[i] != 8'h00; i++)
    s = reverse ? {string'(f[i]), s} : {s, string'(f[i])};
  return s;
endfunction

// Fill the rule list from rule_t values (used for the built-in table and
// for loaded tables).
function automatic void ref_add(braille_pkg::rule_t r);
  ref_left.push_back(ref_field(r.left, 1));
  ref_focus.push_back(ref_field(r.focus, 0));
  ref_right.push_back(ref_field(r.right, 0));
  ref_codes.push_back(ref_field(r.codes, 0));
endfunction

function automatic string ref_translate(string t);
  string out = "";
  int p = 0;
  while (p < t.len()) begin
    bit done = 0;
    foreach (ref_focus[k]) begin
      string f, l, r;
      bit ok;
      if (done) continue;
      f = ref_focus[k]; l = ref_left[k]; r = ref_right[k];
      if (f.len() == 0 || p + f.len() > t.len()) continue;
      if (t.substr(p, p + f.len() - 1) != f) continue;
      ok = 1;
      for (int i = 0; i < r.len(); i++) if (!ref_pos(r[i], t, p + f.len() + i)) ok = 0;
      for (int i = 0; i < l.len(); i++) if (!ref_pos(l[i], t, p - l.len() + i)) ok = 0;
      if (ok) begin
        out  = {out, ref_codes[k]};
        p   += f.len();
        done = 1;
      end
    end
    if (!done) begin
      out = {out, string'(t[p])};
      p++;
    end
  end
  return out;
endfunction

// Words that exercise the built-in rules: whole-word contractions, group
// signs, digits, punctuation and characters without rules.
function automatic string ref_random_word();
  string pieces [] = '{"the", "and", "ing", "ch", "sh", "th", "st", "er", "ou", "ow",
                       "for", "with", "of", "knowledge", "but", "you", "it", "as",
                       "a", "e", "i", "o", "s", "t", "n", "r", "l", "d", "12", "7",
                       "90", ",", ".", "?", "@", "wh", "gh", "ed", "ar", "people"};
  string w = "";
  int n = $urandom_range(1, 3);
  for (int i = 0; i < n; i++) w = {w, pieces[$urandom_range(pieces.size() - 1)]};
  return w;
endfunction
