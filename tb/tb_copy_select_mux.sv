// tb_copy_select_mux: drives the multiplexer with the reference decoder's
// outputs for three copies of a code word hit by up to five wire errors:
// every split (a,b,c) of up to five errors over groups A/B/C, random
// patterns and bursts. The forwarded message must be the one sent, and
// sel_o must name the copy forwarded.
module tb_copy_select_mux;
  import sbox_ref_pkg::*;
  import sbox_pkg::copy_sel_e;

  int checks = 0, failures = 0;
  msg_t       da, db, dc, mo;
  logic [6:0] sa, sb, sc;
  logic       ea, eb, ec, aeqb;
  copy_sel_e  sel;

  copy_select_mux dut (
    .dec_a_i(da), .dec_b_i(db), .dec_c_i(dc),
    .syn_a_i(sa), .syn_b_i(sb), .syn_c_i(sc),
    .de_a_i(ea), .de_b_i(eb), .de_c_i(ec),
    .dec_a_eq_dec_b_i(aeqb), .msg_o(mo), .sel_o(sel));

  task automatic run(lnk_t err);
    msg_t m = rand_msg();
    lnk_t l = ref_triplicate(ref_encode(m)) ^ err;
    dec_t r[3];
    for (int g = 0; g < 3; g++) r[g] = ref_decode(ref_group(l, g));
    da = r[0].msg; db = r[1].msg; dc = r[2].msg;
    sa = r[0].syn; sb = r[1].syn; sc = r[2].syn;
    ea = r[0].de;  eb = r[1].de;  ec = r[2].de;
    aeqb = (r[0].msg == r[1].msg);
    #1;
    checks++;
    if (mo !== m) begin
      failures++;
      $display("FAIL errors (%0d,%0d,%0d) sel=%0d got %h sent %h", group_errors(err, 0),
               group_errors(err, 1), group_errors(err, 2), sel, mo, m);
    end
    checks++;
    if (mo !== r[int'(sel)].msg) begin
      failures++;
      $display("FAIL sel=%0d does not name the forwarded copy", sel);
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
          for (int t = 0; t < 400; t++) run(rand_dist(a, b, c));
    for (int t = 0; t < 5000; t++) run(rand_errors(t % 6));
    for (int t = 0; t < 2000; t++) run(rand_burst(1 + t % 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
