// tb_batch_norm: random and corner inputs to the batch-normalisation unit, checked
// against n = sat(floor(b1*m / 2^16) + b2).
module tb_batch_norm;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  feat_t m, n;
  bnc_t b1, b2;
  int checks = 0, failures = 0;

  batch_norm dut (.*);

  task automatic check1(input longint mm, input longint bb1, input longint bb2);
    m = feat_t'(mm); b1 = bnc_t'(bb1); b2 = bnc_t'(bb2);
    #1;
    checks++;
    if (longint'(n) != ref_bn(longint'(m), longint'(b1), longint'(b2))) begin
      failures++;
      $display("m=%0d b1=%0d b2=%0d got %0d exp %0d", m, b1, b2, n,
               ref_bn(longint'(m), longint'(b1), longint'(b2)));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check1(65536, 65536, 0);                 // 1*1+0
    check1(-65536 * 3, 32768, 65536);        // -3*0.5+1
    check1(32'sh7FFF_FFFF, 21'sh0F_FFFF, 0); // saturates high
    check1(-32'sh8000_0000, 21'sh0F_FFFF, 0);// saturates low
    for (int i = 0; i < 2000; i++)
      check1(rnd_signed(64'sd2147483647), rnd_signed(2097151), rnd_signed(2097151));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
