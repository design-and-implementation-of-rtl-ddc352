// syndrome_computation: Hamming syndrome of one received (39,32) copy.
//
// Takes the 38 Hamming bits of a received code word (overall parity bit
// excluded) and recomputes the six parity checks: syndrome bit C(k+1) is the
// XOR of all received Hamming positions whose 1-based index has bit k set,
// check bit included. With the layout of sbox_pkg a single error at position
// p gives syn_o == p, and an error-free word gives zero. The 38-bit input and
// the six outputs C1..C6 follow the decoder block diagram; the position
// assignment is this design's choice.
//
// Interface: ham_i (38 bits) in, syn_o (6 bits, syn_o[k] = C(k+1)) out.
// Timing: purely combinational.
module syndrome_computation
  import sbox_pkg::*;
(
  input  logic [HAM_W-1:0] ham_i,
  output logic [CHK_W-1:0] syn_o
);

  always_comb begin
    syn_o = '0;
    for (int unsigned p = 1; p <= HAM_W; p++) begin
      for (int unsigned k = 0; k < CHK_W; k++) begin
        if (((p >> k) & 1) == 1) syn_o[k] ^= ham_i[p - 1];
      end
    end
  end

endmodule
