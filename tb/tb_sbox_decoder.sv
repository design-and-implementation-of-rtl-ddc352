// tb_sbox_decoder: the whole receive side. Reference code words are sent over
// a modelled link that flips chosen wires: every split (a,b,c) of up to five
// errors over the three groups, random errors, bursts of up to five adjacent
// wires and random-plus-burst mixes. The decoded message must equal the one
// sent; the double-error flags, Received_Not_eq and DecodeA_eq_DecodeB are
// checked against the reference model.
module tb_sbox_decoder;
  import sbox_ref_pkg::*;
  import sbox_pkg::copy_sel_e;

  int checks = 0, failures = 0;
  lnk_t       lnk;
  msg_t       mo;
  copy_sel_e  sel;
  logic [2:0] de;
  logic       rne, aeqb;

  sbox_decoder dut (.link_i(lnk), .msg_o(mo), .sel_o(sel), .double_err_o(de),
                    .received_not_eq_o(rne), .dec_a_eq_dec_b_o(aeqb));

  task automatic run(lnk_t err);
    msg_t m = rand_msg();
    dec_t r[3];
    cw_t  g[3];
    lnk = ref_triplicate(ref_encode(m)) ^ err;
    for (int i = 0; i < 3; i++) begin
      g[i] = ref_group(lnk, i);
      r[i] = ref_decode(g[i]);
    end
    #1;
    checks++;
    if (mo !== m) begin
      failures++;
      $display("FAIL errors (%0d,%0d,%0d) got %h sent %h", group_errors(err, 0),
               group_errors(err, 1), group_errors(err, 2), mo, m);
    end
    checks++;
    if (de !== {r[2].de, r[1].de, r[0].de} || aeqb !== (r[0].msg == r[1].msg) ||
        rne !== (g[0] != g[1] && g[1] != g[2] && g[0] != g[2])) begin
      failures++;
      $display("FAIL status de=%b rne=%b aeqb=%b", de, rne, aeqb);
    end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 5; a++)
      for (int b = 0; a + b <= 5; b++)
        for (int c = 0; a + b + c <= 5; c++)
          for (int t = 0; t < 200; t++) run(rand_dist(a, b, c));
    for (int t = 0; t < 5000; t++) run(rand_errors(t % 6));
    for (int t = 0; t < 2000; t++) run(rand_burst(1 + t % 5));
    for (int t = 0; t < 2000; t++) begin
      automatic int   bl = 2 + t % 3;
      automatic lnk_t e  = rand_burst(bl);
      while ($countones(e) < 5) e[$urandom_range(LNK-1)] = 1'b1;
      run(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
