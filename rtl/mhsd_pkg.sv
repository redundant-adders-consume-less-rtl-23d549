// Shared types and helpers of the modified hybrid signed digit (MHSD) adder.
//
// A radix-2 signed digit takes the values -1, 0 and +1 and is carried on two
// wires, a sign bit s and a magnitude bit a: -1 = {s,a} = 11, 0 = 00,
// +1 = 01. The code 10 is not used. This encoding follows the document. An
// unsigned digit position uses only the magnitude bit; its sign bit is
// ignored on the inputs and driven to 0 on the outputs (a choice of this
// design, so that every position of a word has the same two-wire layout).
//
// Which positions are signed is set by the distance D between two
// consecutive signed digits: position i (0 = least significant) is signed
// when i mod (D+1) == D. D = 0 makes every position signed, D = 1 every odd
// position, D >= N none (a plain ripple-carry adder). This placement follows
// the document's description of its 32-bit adders.
package mhsd_pkg;

  typedef struct packed {
    logic s;  // sign bit: 1 for the digit -1
    logic a;  // magnitude bit: 1 for the digits -1 and +1
  } sd_digit_t;

  // True when position pos holds a signed digit for distance d.
  function automatic bit is_signed_pos(int unsigned pos, int unsigned d);
    return (pos % (d + 1)) == d;
  endfunction

endpackage
