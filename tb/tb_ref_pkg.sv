// tb_ref_pkg: reference models shared by the testbenches.
//
// Written independently of the RTL: the seven-segment patterns are built
// from the names of the lit segments, the display reading from integer
// division, and the signature from the register's update rule.
package tb_ref_pkg;

  // Lit segments of each digit, by letter (a = top, g = middle).
  function automatic logic [6:0] seg_from_letters(string s);
    logic [6:0] r = '0;
    for (int i = 0; i < s.len(); i++) r[3'(s[i] - "a")] = 1'b1;
    return r;
  endfunction

  function automatic logic [6:0] seg_ref(int d);
    case (d)
      0: return seg_from_letters("abcdef");
      1: return seg_from_letters("bc");
      2: return seg_from_letters("abdeg");
      3: return seg_from_letters("abcdg");
      4: return seg_from_letters("bcfg");
      5: return seg_from_letters("acdfg");
      6: return seg_from_letters("acdefg");
      7: return seg_from_letters("abc");
      8: return seg_from_letters("abcdefg");
      9: return seg_from_letters("abcdfg");
      default: return 7'd0;
    endcase
  endfunction

  // The 21 segment lines the chip shows for approximation code c
  // (pH tenths = c + 11, leading zero blanked).
  function automatic logic [20:0] display_ref(int c);
    int v = c + 11;
    int h = v / 100;
    return {(h == 0) ? 7'd0 : seg_ref(h), seg_ref((v / 10) % 10), seg_ref(v % 10)};
  endfunction

  function automatic logic [20:0] misr_step(logic [20:0] s, logic [20:0] d);
    return {s[19:0], 1'b0} ^ (s[20] ? 21'h5 : 21'h0) ^ d;
  endfunction

  // Signature over the fault-free self test, counter values 0..127.
  function automatic logic [20:0] good_signature();
    logic [20:0] s = '0;
    for (int c = 0; c < 128; c++) s = misr_step(s, display_ref(c));
    return s;
  endfunction

endpackage
