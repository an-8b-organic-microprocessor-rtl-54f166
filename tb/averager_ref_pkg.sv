// averager_ref_pkg: expected ten-bit words of the running-averager program,
// written out bit by bit from the instruction table (don't-care bits as 0),
// and a reference model of one pass of the averager loop. Used by the
// testbenches as a reference independent of the RTL's encoding helpers.
package averager_ref_pkg;
  localparam logic [9:0] EXP_WORDS [16] = '{
  10'b0110100011,  //  0 LD A,C3
  10'b0110100101,  //  1 SUB A,C3
  10'b0011001000,  //  2 LD C1,A
  10'b0001000000,  //  3 LD C0,IN
  10'b0000100011,  //  4 LD A,C0
  10'b0010100100,  //  5 ADD A,C1
  10'b0110100100,  //  6 INC A
  10'b0000100110,  //  7 LSR A
  10'b0011001000,  //  8 LD C1,A
  10'b0001000000,  //  9 LD C0,IN
  10'b0000100011,  // 10 LD A,C0
  10'b0010100100,  // 11 ADD A,C1
  10'b0000010000,  // 12 LD OUT,A
  10'b0000100110,  // 13 LSR A
  10'b1000000010,  // 14 JUMP 2
  10'b0000000000   // 15 unused: NOOP
};

  // One loop of the program with the input held at x: s is the value left in
  // A by the previous loop's final LSR (0 after reset). The rounded half-sum
  // h = (x + s + 1) >> 1 becomes C1; the output is x + h (twice the new
  // average) and A is left at that value shifted right. Arithmetic wraps at
  // 8 bits like the hardware.
  function automatic void avg_loop(input int x, inout int s, output int out);
    int h;
    h   = ((x + s) % 256 + 1) % 256 / 2;
    out = (x + h) % 256;
    s   = out / 2;
  endfunction

endpackage
