// secded_decoder: SEC-DED decoder for one copy (group) of the S-BOX code.
//
// Structure, following the decoder block diagram:
//   syndrome computation : C1..C6 from the 38 Hamming bits
//   syndrome decoder     : one-hot location of a single error
//   XOR block            : flips the located bit
//   message decoder      : keeps the 32 data bits of the 39 (drops the
//                          6 check bits and the overall parity bit)
//   double-error detect  : syndrome non-zero while the overall parity over
//                          all 39 received bits is even
// A single error anywhere in the 39 bits is corrected (an error in the overall
// parity bit alone gives a zero syndrome and needs no flip). Two errors set
// double_err_o. The XOR correction is applied whatever the double-error flag
// says, as in the block diagram; the S-BOX multiplexer never forwards a copy
// whose double-error flag is set while a better one exists.
//
// syn_o is the full 7-bit syndrome {overall-parity check, C6..C1}; it is zero
// exactly when the received copy is a valid code word. The multiplexer uses
// it to tell an error-free copy from one showing an odd number of errors.
//
// Interface: cw_i (39 bits) in; msg_o (32 bits), syn_o (7 bits),
// double_err_o out. Timing: purely combinational.
module secded_decoder
  import sbox_pkg::*;
(
  input  logic [CW_W-1:0]  cw_i,
  output logic [MSG_W-1:0] msg_o,
  output logic [SYN_W-1:0] syn_o,
  output logic             double_err_o
);

  logic [CHK_W-1:0] syn;
  logic [HAM_W-1:0] loc;
  logic [HAM_W-1:0] corrected;
  logic             parity_err;

  syndrome_computation u_syn (
    .ham_i (cw_i[HAM_W-1:0]),
    .syn_o (syn)
  );

  syndrome_decoder u_loc (
    .syn_i (syn),
    .loc_o (loc)
  );

  // XOR block
  assign corrected  = cw_i[HAM_W-1:0] ^ loc;
  // overall parity check over all 39 received bits (even parity expected)
  assign parity_err = ^cw_i;

  // message decoder: pick the data positions
  always_comb begin
    for (int unsigned d = 0; d < MSG_W; d++) begin
      msg_o[d] = corrected[data_pos(d) - 1];
    end
  end

  assign double_err_o = (syn != '0) && !parity_err;
  assign syn_o        = {parity_err, syn};

endmodule
