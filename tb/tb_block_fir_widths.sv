// Runs block_fir_dsp built for 8-bit and 24-bit data, the two other
// multiplier sizes at which the block scheme was evaluated (the default
// build is 16-bit), with filter lengths 32 and 89 and block sizes 2 to 16.
// Every output is compared with the convolution sum.
module tb_block_fir_widths;
  int c8, f8, c24, f24;
  bit d8, d24;
  int checks, failures;

  fir_width_harness #(.W(8))  u_w8  (.checks(c8),  .failures(f8),  .done(d8));
  fir_width_harness #(.W(24)) u_w24 (.checks(c24), .failures(f24), .done(d24));

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c24, f8 + f24 + 1);
    $finish;
  end

  initial begin
    wait (d8 && d24);
    checks = c8 + c24;
    failures = f8 + f24;
    if (c8 == 0 || c24 == 0) failures++;
    $display("8-bit: %0d outputs checked, 24-bit: %0d outputs checked", c8, c24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
