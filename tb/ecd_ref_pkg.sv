// Reference models used by the testbenches, written independently of the RTL.
//
// Instead of simulating an automaton, they decide a match from the last three
// characters seen. With the start state looping on every character, the
// example expression (a|b)*(cd) as drawn matches at a position exactly when
// that character is of class "d", the one before is of class "c" and the one
// before that of class "a|b". The second example, c+d, matches when a "d"
// follows a "c". Classes are given by a per-byte class table that the
// testbench keeps itself, so that table updates can be modelled.
package ecd_ref_pkg;

  typedef enum int {CL_AB = 0, CL_C = 1, CL_D = 2, CL_OTHER = 3} abcd_class_e;

  // Reference class of a byte for (a|b)*(cd), before any update.
  function automatic int abcd_class(int c);
    if (c == 97 || c == 98) return CL_AB;  // 'a', 'b'
    if (c == 99)            return CL_C;   // 'c'
    if (c == 100)           return CL_D;   // 'd'
    return CL_OTHER;
  endfunction

  // Reference class of a byte for c+d: c -> 0, d -> 1, others -> 2.
  function automatic int cd_class(int c);
    if (c == 99)  return 0;
    if (c == 100) return 1;
    return 2;
  endfunction

  // h2, h1, h0: classes of the last three characters (h0 newest); n: how many
  // characters have been seen since reset.
  function automatic bit abcd_match(int h2, int h1, int h0, int n);
    return n >= 3 && h0 == CL_D && h1 == CL_C && h2 == CL_AB;
  endfunction

  function automatic bit cd_match(int h1, int h0, int n);
    return n >= 2 && h0 == 1 && h1 == 0;
  endfunction

  // A random byte, mostly from the characters the examples care about.
  function automatic logic [7:0] pick_byte();
    int r;
    r = $urandom_range(0, 9);
    case (r)
      0, 1:    return 8'h61;  // a
      2:       return 8'h62;  // b
      3, 4, 5: return 8'h63;  // c
      6, 7:    return 8'h64;  // d
      8:       return 8'h65;  // e
      default: return 8'($urandom_range(0, 255));
    endcase
  endfunction

endpackage
