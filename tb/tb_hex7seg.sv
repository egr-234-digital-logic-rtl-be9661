// tb_hex7seg: self-checking testbench for hex7seg.
// For every input 0..F the expected lit segments are written as a string of
// segment letters (a..g) and turned into the active-low pattern
// (bit 0 = a ... bit 6 = g) by the testbench; the decoder must match.
module tb_hex7seg;
  import clock_pkg::*;

  digit_t hex;
  seg7_t  seg;
  int     checks = 0, failures = 0;

  hex7seg dut (.hex(hex), .seg(seg));

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic seg7_t pattern(input string s);
    seg7_t p = '1;
    for (int i = 0; i < s.len(); i++) p[3'(s[i] - "a")] = 1'b0;
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      hex = digit_t'(v);
      #1;
      checks++;
      if (seg !== pattern(lit[v])) begin
        failures++;
        $display("FAIL hex=%h seg=%b expected %b", hex, seg, pattern(lit[v]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
