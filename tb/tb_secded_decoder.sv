// tb_secded_decoder: one SEC-DED copy. For random messages it applies no
// error, every single error over the 39 bits and every double error, and
// checks: no error or one error -> message restored, double flag clear;
// two errors -> double flag set; syndrome matches the reference. Also
// checks decoded data against the reference decoder for random 3-5 errors.
module tb_secded_decoder;
  import sbox_ref_pkg::*;

  int checks = 0, failures = 0;
  cw_t        cw;
  msg_t       msg;
  logic [6:0] syn;
  logic       de;

  secded_decoder dut (.cw_i(cw), .msg_o(msg), .syn_o(syn), .double_err_o(de));

  task automatic check(cw_t w, msg_t m, int nerr);
    dec_t r;
    cw = w;
    #1;
    r = ref_decode(w);
    checks++;
    if (syn !== r.syn || de !== r.de) begin
      failures++;
      $display("FAIL syn=%h/%h de=%b/%b nerr=%0d", syn, r.syn, de, r.de, nerr);
    end
    checks++;
    if (nerr <= 1 && (msg !== m || de)) begin
      failures++;
      $display("FAIL %0d error(s) not corrected: %h vs %h", nerr, msg, m);
    end else if (nerr == 2 && !de) begin
      failures++;
      $display("FAIL double error not flagged");
    end else if (nerr > 2 && msg !== r.msg) begin
      failures++;
      $display("FAIL data differs from reference for %0d errors", nerr);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      automatic msg_t m = rand_msg();
      automatic cw_t  w = ref_encode(m);
      check(w, m, 0);
      for (int i = 0; i < CW; i++) begin
        check(w ^ (cw_t'(1) << i), m, 1);
        for (int j = i + 1; j < CW; j++) check(w ^ (cw_t'(1) << i) ^ (cw_t'(1) << j), m, 2);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      automatic msg_t m = rand_msg();
      automatic cw_t  e = '0;
      automatic int   k = 3 + (t % 3);
      while ($countones(e) < k) e[$urandom_range(CW-1)] = 1'b1;
      check(ref_encode(m) ^ e, m, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
