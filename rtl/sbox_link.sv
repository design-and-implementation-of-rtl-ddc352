// sbox_link: one S-BOX protected on-chip link, transmitter and receiver.
//
// The S-BOX code protects a 32-bit message crossing an on-chip interconnect
// link against random errors, burst errors and mixes of both, up to five
// wrong wires in all, while also keeping the worst crosstalk off the wires.
// The transmit side (sbox_encoder) SEC-DED encodes the message to 39 bits
// and triplicates every bit onto 117 wires; the receive side (sbox_decoder)
// decodes each copy separately and forwards a copy that is error free.
// The wires themselves are physical and lie outside this module: link_o
// drives them at the sender and link_i receives them at the far end. Tie
// link_i to link_o for a noiseless link.
//
// Interface: tx_msg_i (32) -> link_o (117); link_i (117) -> rx_msg_o (32),
// rx_sel_o (copy forwarded), rx_double_err_o ({C,B,A}),
// rx_received_not_eq_o, rx_dec_a_eq_dec_b_o.
// Timing: purely combinational in both directions; neither the code nor its
// decoder is described with registers, so any pipelining is left to the
// surrounding design.
module sbox_link
  import sbox_pkg::*;
(
  input  logic [MSG_W-1:0]  tx_msg_i,
  output logic [LINK_W-1:0] link_o,
  input  logic [LINK_W-1:0] link_i,
  output logic [MSG_W-1:0]  rx_msg_o,
  output copy_sel_e         rx_sel_o,
  output logic [COPIES-1:0] rx_double_err_o,
  output logic              rx_received_not_eq_o,
  output logic              rx_dec_a_eq_dec_b_o
);

  sbox_encoder u_tx (
    .msg_i  (tx_msg_i),
    .link_o (link_o)
  );

  sbox_decoder u_rx (
    .link_i            (link_i),
    .msg_o             (rx_msg_o),
    .sel_o             (rx_sel_o),
    .double_err_o      (rx_double_err_o),
    .received_not_eq_o (rx_received_not_eq_o),
    .dec_a_eq_dec_b_o  (rx_dec_a_eq_dec_b_o)
  );

endmodule
