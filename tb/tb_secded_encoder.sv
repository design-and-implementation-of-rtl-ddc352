// tb_secded_encoder: checks the (39,32) SEC-DED encoder against the
// reference model: corner messages, every single-bit message and random
// messages. Also checks the code properties directly: the XOR of the indices
// of all set Hamming bits is zero, overall parity is even, and the data bits
// appear unchanged at their positions.
module tb_secded_encoder;
  import sbox_ref_pkg::*;

  int checks = 0, failures = 0;
  msg_t msg;
  cw_t  cw;

  secded_encoder dut (.msg_i(msg), .cw_o(cw));

  task automatic check_one(msg_t m);
    cw_t exp;
    msg = m;
    #1;
    exp = ref_encode(m);
    checks++;
    if (cw !== exp) begin
      failures++;
      $display("FAIL msg=%h cw=%h exp=%h", m, cw, exp);
    end
    checks++;
    if (index_xor(cw) != 0 || ^cw != 1'b0) begin
      failures++;
      $display("FAIL code property msg=%h cw=%h", m, cw);
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
    check_one('0);
    check_one('1);
    check_one(32'hAAAA_5555);
    for (int i = 0; i < MSG; i++) check_one(msg_t'(1) << i);
    for (int i = 0; i < 2000; i++) check_one(rand_msg());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
