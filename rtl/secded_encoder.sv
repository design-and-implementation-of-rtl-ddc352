// secded_encoder: (39,32) extended Hamming SEC-DED encoder.
//
// Places the 32 message bits at the non-power-of-two Hamming positions 3..38,
// computes check bit Ck (k = 0..5, named C1..C6) at position 2^k as the XOR of
// every data position whose index has bit k set, and appends an even overall
// parity bit over the 38 Hamming bits as code bit 38 (layout in sbox_pkg).
// The (39,32) size and the SEC-DED property (single-error correction,
// double-error detection, minimum distance 4) are those of the S-BOX code;
// the exact position assignment is this design's choice.
//
// Interface: msg_i (32 bits) in, cw_o (39 bits) out.
// Timing: purely combinational.
module secded_encoder
  import sbox_pkg::*;
(
  input  logic [MSG_W-1:0] msg_i,
  output logic [CW_W-1:0]  cw_o
);

  logic [HAM_W-1:0] ham;

  always_comb begin
    ham = '0;
    // data bits into their Hamming positions
    for (int unsigned d = 0; d < MSG_W; d++) begin
      ham[data_pos(d) - 1] = msg_i[d];
    end
    // check bits at positions 1,2,4,...,32
    for (int unsigned k = 0; k < CHK_W; k++) begin
      logic c;
      c = 1'b0;
      for (int unsigned p = 1; p <= HAM_W; p++) begin
        if (!is_check_pos(p) && ((p >> k) & 1) == 1) c ^= ham[p - 1];
      end
      ham[(1 << k) - 1] = c;
    end
    cw_o = {^ham, ham};
  end

endmodule
