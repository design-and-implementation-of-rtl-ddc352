// sbox_pkg: sizes and code-construction helpers shared by the S-BOX link
// encoder and decoder.
//
// The S-BOX code protects a 32-bit message on an on-chip link. The message is
// first encoded with a (39,32) extended Hamming SEC-DED code (32 data bits,
// 6 Hamming check bits C1..C6, 1 overall parity bit) and every code bit is
// then sent three times, giving 3*39 = 117 wires. The 32/39/117 sizes, the
// 6 syndrome bits and the triplication follow the description of the code;
// the bit layout below is this design's own choice.
//
// Code-word layout (index j of a 39-bit code word):
//   j = 0..37  : Hamming position p = j+1. Positions that are powers of two
//                (1,2,4,8,16,32) hold check bits C1..C6, all others hold data
//                bits in ascending order (data bit 0 at position 3).
//   j = 38     : overall (even) parity over bits 0..37.
// Check bit Ck (k = 0..5) makes the XOR of all positions whose index has bit k
// set equal to zero, so a single error at position p gives syndrome p.
//
// Wire layout (index w of the 117-bit link): w = 3*j + g carries copy g of
// code bit j, with g = 0, 1, 2 being groups A, B and C. The three copies of a
// bit sit on adjacent wires, so they switch together.
package sbox_pkg;

  localparam int unsigned MSG_W   = 32;              // message bits
  localparam int unsigned CHK_W   = 6;               // Hamming check bits C1..C6
  localparam int unsigned HAM_W   = MSG_W + CHK_W;   // 38 Hamming bits
  localparam int unsigned CW_W    = HAM_W + 1;       // 39 with overall parity
  localparam int unsigned COPIES  = 3;               // triplication
  localparam int unsigned LINK_W  = COPIES * CW_W;   // 117 wires
  localparam int unsigned SYN_W   = CHK_W + 1;       // syndrome plus parity check

  // Which copy the multiplexer forwards.
  typedef enum logic [1:0] {
    SEL_A = 2'd0,
    SEL_B = 2'd1,
    SEL_C = 2'd2
  } copy_sel_e;

  // True when Hamming position p (1-based) is a check-bit position.
  function automatic bit is_check_pos(int unsigned p);
    return (p & (p - 1)) == 0;
  endfunction

  // Hamming position (1-based) of data bit d.
  function automatic int unsigned data_pos(int unsigned d);
    int unsigned cnt;
    int unsigned pos;
    cnt = 0;
    pos = 0;
    for (int unsigned p = 1; p <= HAM_W; p++) begin
      if (!is_check_pos(p)) begin
        if (cnt == d) pos = p;
        cnt++;
      end
    end
    return pos;
  endfunction

endpackage
