// sbox_decoder: receive side of the S-BOX link.
//
// The group separator splits the 117 received wires into the three copies A,
// B and C of the 39-bit code word (wire 3*j+g is bit j of group g); it is
// wiring only. Each group goes through its own SEC-DED decoder, which gives a
// decoded 32-bit message, the 7-bit syndrome and a double-error flag. The
// comparator derives Received_Not_eq (all three received groups differ) and
// DecodeA_eq_DecodeB, and the multiplexer forwards the copy that is error
// free. Any pattern of up to five wrong wires, random, burst or mixed, is
// corrected. The block structure and its signal names follow the description
// of the decoder; the selection rules in copy_select_mux are this design's
// own.
//
// Interface: link_i (117 bits) in; msg_o (32 bits), sel_o (copy forwarded),
// double_err_o ({C,B,A} double-error flags), received_not_eq_o and
// dec_a_eq_dec_b_o out. Timing: purely combinational.
module sbox_decoder
  import sbox_pkg::*;
(
  input  logic [LINK_W-1:0] link_i,
  output logic [MSG_W-1:0]  msg_o,
  output copy_sel_e         sel_o,
  output logic [COPIES-1:0] double_err_o,
  output logic              received_not_eq_o,
  output logic              dec_a_eq_dec_b_o
);

  logic [CW_W-1:0]  rx  [COPIES];
  logic [MSG_W-1:0] dec [COPIES];
  logic [SYN_W-1:0] syn [COPIES];

  // group separator
  always_comb begin
    for (int unsigned g = 0; g < COPIES; g++) begin
      for (int unsigned j = 0; j < CW_W; j++) begin
        rx[g][j] = link_i[COPIES*j + g];
      end
    end
  end

  for (genvar g = 0; g < COPIES; g++) begin : g_dec
    secded_decoder u_dec (
      .cw_i         (rx[g]),
      .msg_o        (dec[g]),
      .syn_o        (syn[g]),
      .double_err_o (double_err_o[g])
    );
  end

  group_comparator u_cmp (
    .rx_a_i            (rx[0]),
    .rx_b_i            (rx[1]),
    .rx_c_i            (rx[2]),
    .dec_a_i           (dec[0]),
    .dec_b_i           (dec[1]),
    .received_not_eq_o (received_not_eq_o),
    .dec_a_eq_dec_b_o  (dec_a_eq_dec_b_o)
  );

  copy_select_mux u_mux (
    .dec_a_i          (dec[0]),
    .dec_b_i          (dec[1]),
    .dec_c_i          (dec[2]),
    .syn_a_i          (syn[0]),
    .syn_b_i          (syn[1]),
    .syn_c_i          (syn[2]),
    .de_a_i           (double_err_o[0]),
    .de_b_i           (double_err_o[1]),
    .de_c_i           (double_err_o[2]),
    .dec_a_eq_dec_b_i (dec_a_eq_dec_b_o),
    .msg_o            (msg_o),
    .sel_o            (sel_o)
  );

endmodule
