// tb_leaky_relu: positive, negative and zero inputs to the Leaky ReLU unit, checked
// against z for z >= 0 and floor(z*655 / 2^16) for z < 0.
module tb_leaky_relu;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  feat_t z, f;
  int checks = 0, failures = 0;

  leaky_relu dut (.*);

  task automatic check1(input longint zz);
    z = feat_t'(zz);
    #1;
    checks++;
    if (longint'(f) != ref_lrelu(longint'(z))) begin
      failures++;
      $display("z=%0d got %0d exp %0d", z, f, ref_lrelu(longint'(z)));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check1(0);
    check1(-65536 * 100);   // -100 -> -0.99945...
    check1(65536 * 100);
    check1(-1);
    check1(-64'sd2147483648);
    for (int i = 0; i < 2000; i++) check1(rnd_signed(64'sd2147483647));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
