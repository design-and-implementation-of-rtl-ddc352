// copy_select_mux: selects the error-free decoded copy in the S-BOX decoder.
//
// Each of the three copies A, B, C has been through its own SEC-DED decoder,
// which corrects one error and flags two (double_err). With at most five
// wire errors in total at least one copy holds at most one error and so
// decodes correctly; the job here is to find one. The selection uses the
// double-error flags, the 7-bit syndromes and the DecodeA_eq_DecodeB compare,
// and first asks whether copy A shows a double error, as the S-BOX decoding
// flow does. The individual branches below are this design's own derivation
// (the reasoning assumes at most five errors over the 117 wires):
//
//   A clean, B clean, dec A == dec B : A    (two clean copies cannot both be
//                                            wrong, a wrong one needs >= 3)
//   A clean, B clean, A != B, C clean: C    (one of A/B holds >= 3 errors,
//                                            so C holds <= 1)
//   A clean, B clean, A != B, C flag : the one of A/B with zero syndrome
//                                            (the case is 3+0+2 errors)
//   A clean, B flag,  C flag         : A
//   A clean, B flag,  C clean        : A if its syndrome is zero, else C if
//                                      its syndrome is zero, else A
//   A flag,  B flag                  : C
//   A flag,  B clean, C flag         : B
//   A flag,  B clean, C clean        : B if its syndrome is zero, else C if
//                                      its syndrome is zero, else B
// "Clean" means double_err is 0; "zero syndrome" means the copy was received
// as a valid code word. Received_Not_eq is not needed by these rules; the
// decoder brings it out as a status signal.
//
// Interface: the three decoded messages, 7-bit syndromes and double-error
// flags plus dec_a_eq_dec_b_i in; msg_o (32 bits) and sel_o (which copy) out.
// Timing: purely combinational.
module copy_select_mux
  import sbox_pkg::*;
(
  input  logic [MSG_W-1:0] dec_a_i,
  input  logic [MSG_W-1:0] dec_b_i,
  input  logic [MSG_W-1:0] dec_c_i,
  input  logic [SYN_W-1:0] syn_a_i,
  input  logic [SYN_W-1:0] syn_b_i,
  input  logic [SYN_W-1:0] syn_c_i,
  input  logic             de_a_i,
  input  logic             de_b_i,
  input  logic             de_c_i,
  input  logic             dec_a_eq_dec_b_i,
  output logic [MSG_W-1:0] msg_o,
  output copy_sel_e        sel_o
);

  logic zero_a, zero_b, zero_c;

  assign zero_a = (syn_a_i == '0);
  assign zero_b = (syn_b_i == '0);
  assign zero_c = (syn_c_i == '0);

  always_comb begin
    if (!de_a_i) begin
      if (!de_b_i) begin
        if (dec_a_eq_dec_b_i) sel_o = SEL_A;
        else if (!de_c_i)     sel_o = SEL_C;
        else if (zero_a)      sel_o = SEL_A;
        else                  sel_o = SEL_B;
      end else begin
        if (de_c_i)           sel_o = SEL_A;
        else if (zero_a)      sel_o = SEL_A;
        else if (zero_c)      sel_o = SEL_C;
        else                  sel_o = SEL_A;
      end
    end else begin
      if (de_b_i)             sel_o = SEL_C;
      else if (de_c_i)        sel_o = SEL_B;
      else if (zero_b)        sel_o = SEL_B;
      else if (zero_c)        sel_o = SEL_C;
      else                    sel_o = SEL_B;
    end
  end

  always_comb begin
    unique case (sel_o)
      SEL_A:   msg_o = dec_a_i;
      SEL_B:   msg_o = dec_b_i;
      default: msg_o = dec_c_i;
    endcase
  end

endmodule
