// Reference model of one context position for the context-check
// testbenches, written independently of the design's package: '~' accepts a
// position outside the text or a character that is neither a lower-case
// letter nor a digit, '!' a lower-case letter, '#' a digit; any other
// pattern byte must equal the character.
function automatic bit ref_ctx(byte pat, bit present, byte c);
  bit letter, digit;
  letter = present && (c inside {["a":"z"]});
  digit  = present && (c inside {["0":"9"]});
  case (pat)
    "~":     return !letter && !digit;
    "!":     return letter;
    "#":     return digit;
    default: return present && c == pat;
  endcase
endfunction

function automatic byte pick_text();
  string alphabet = "ab 1,";
  return alphabet[$urandom_range(alphabet.len() - 1)];
endfunction

function automatic byte pick_pattern();
  string alphabet = "ab 1,~!#";
  return alphabet[$urandom_range(alphabet.len() - 1)];
endfunction
