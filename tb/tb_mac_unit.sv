// tb_mac_unit: drives random kernel/feature streams into a MAC unit, with and
// without gaps, and compares every pixel result with a 64-bit reference sum; also
// checks that the result appears the cycle after the last operand, and saturation.
module tb_mac_unit;
  import yolo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  ker_t kernel = '0;
  feat_t feature = '0;
  logic out_valid;
  feat_t out_data;
  int checks = 0, failures = 0;

  mac_unit #(.N_OPS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pixel(input int kmag, input int fmag, input bit gaps, input bit big);
    longint acc = 0;
    for (int n = 0; n < N; n++) begin
      if (gaps && ($urandom % 2)) begin
        in_valid <= 0;
        @(posedge clk);
      end
      kernel   <= big ? ker_t'(19'sh3FFFF) : ker_t'(rnd_signed(kmag));
      feature  <= big ? feat_t'(32'sh7FFF0000) : feat_t'(rnd_signed(fmag));
      in_valid <= 1;
      @(negedge clk);
      acc += longint'(kernel) * longint'(feature);
      if (n > 0 && out_valid) begin
        failures++;
        $display("early out_valid");
      end
      @(posedge clk);
    end
    in_valid <= 0;
    #1;
    checks++;
    if (!out_valid || longint'(out_data) != sat32(shr16(acc))) begin
      failures++;
      $display("pixel: got %0d valid %0b exp %0d", out_data, out_valid, sat32(shr16(acc)));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < 50; p++) run_pixel(200000, 1 << 22, 1'b0, 1'b0);
    for (int p = 0; p < 50; p++) run_pixel(200000, 1 << 30, 1'b1, 1'b0);
    run_pixel(0, 0, 1'b0, 1'b1);   // saturating pixel
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
