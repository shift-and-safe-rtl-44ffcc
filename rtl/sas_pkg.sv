// sas_pkg: types, constants and the bit transforms shared by the
// Shift-and-Safe activation memory and the accelerator around it.
//
// Activations and weights are 16-bit sign-magnitude fixed-point words: bit 15
// is the sign, bits 14:0 the magnitude (the worked examples of the technique
// read 1_0011_110 as -3.75). The memory stores 16 consecutive activations per
// row (32 bytes) and two control (C) bits per word that say how the word was
// encoded when it was written:
//   C = 00  reliable word, stored as is
//   C = 01  L word (faulty cells only in the low byte): stored shifted left by
//           two with the sign kept, i.e. {a[15], a[12:0], 2'b00}
//   C = 10  H word (faulty cells only in the high byte): shifted as for L,
//           then bit-reversed (bit 15 <-> bit 0, 14 <-> 1, ...)
//   C = 11  L&H word (faults in both bytes): the value goes to the safe bank
// Reading reverses the transform; the two magnitude bits lost by the shift
// come back as zeros, so a read L/H word is {a[15], 2'b00, stored[14:2]}.
// The 2-bit shift amount follows the document; the sign-magnitude reading of
// the format is taken from its worked examples.
package sas_pkg;

  localparam int unsigned ACT_W  = 16;  // activation / weight word width
  localparam int unsigned LANES  = 16;  // words per memory row (32 B)
  localparam int unsigned SHIFT  = 2;   // fixed shift of L and H words

  typedef logic [ACT_W-1:0] word_t;
  typedef word_t [LANES-1:0] row_t;

  // Kind of a memory word, as recorded by its C bits.
  typedef enum logic [1:0] {
    C_OK = 2'b00,  // reliable
    C_L  = 2'b01,  // faults in the least significant byte
    C_H  = 2'b10,  // faults in the most significant byte
    C_LH = 2'b11   // faults in both bytes: kept in the safe bank
  } cbits_t;

  typedef cbits_t [LANES-1:0] crow_t;

  // Bit reversal ("flip"): bit i goes to bit ACT_W-1-i.
  function automatic word_t flip(input word_t a);
    word_t r;
    for (int i = 0; i < ACT_W; i++) r[i] = a[ACT_W-1-i];
    return r;
  endfunction

  // Left shift by SHIFT keeping the sign bit in place.
  function automatic word_t shl_keep_sign(input word_t a);
    return {a[ACT_W-1], a[ACT_W-2-SHIFT:0], {SHIFT{1'b0}}};
  endfunction

  // Right shift by SHIFT keeping the sign, zeros into bits 14:13.
  function automatic word_t shr_keep_sign(input word_t a);
    return {a[ACT_W-1], {SHIFT{1'b0}}, a[ACT_W-2:SHIFT]};
  endfunction

  // Word as it is written into the undervolted array (C = 11 words are not
  // written there; their value is returned unchanged).
  function automatic word_t encode(input word_t a, input cbits_t c);
    unique case (c)
      C_L:     return shl_keep_sign(a);
      C_H:     return flip(shl_keep_sign(a));
      default: return a;
    endcase
  endfunction

  // Word as it is forwarded to the dispatcher, for C = 00, 01 and 10.
  function automatic word_t decode(input word_t s, input cbits_t c);
    unique case (c)
      C_L:     return shr_keep_sign(s);
      C_H:     return shr_keep_sign(flip(s));
      default: return s;
    endcase
  endfunction

endpackage
