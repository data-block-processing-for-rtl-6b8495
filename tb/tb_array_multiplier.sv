// Self-checking test of array_multiplier: all 65536 operand pairs at 8 bits,
// and random pairs plus the corner values at 16 and 24 bits, compared with
// the simulator's signed product.
module tb_array_multiplier;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;
  logic [23:0] a24, b24; logic [47:0] p24;

  array_multiplier #(.W(8))  u8  (.a(a8),  .b(b8),  .p(p8));
  array_multiplier #(.W(16)) u16 (.a(a16), .b(b16), .p(p16));
  array_multiplier #(.W(24)) u24 (.a(a24), .b(b24), .p(p24));

  task automatic chk16(input logic [15:0] a, input logic [15:0] b);
    longint exp;
    a16 = a; b16 = b; #1;
    exp = longint'($signed(a)) * longint'($signed(b));
    checks++;
    if (p16 !== exp[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL W16 %0d*%0d got %0d", $signed(a), $signed(b), $signed(p16));
    end
  endtask

  task automatic chk24(input logic [23:0] a, input logic [23:0] b);
    longint exp;
    a24 = a; b24 = b; #1;
    exp = longint'($signed(a)) * longint'($signed(b));
    checks++;
    if (p24 !== exp[47:0]) begin
      failures++;
      if (failures < 10) $display("FAIL W24 %0d*%0d got %0d", $signed(a), $signed(b), $signed(p24));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 256; k++) begin
        a8 = 8'(i); b8 = 8'(k); #1;
        exp = int'($signed(a8)) * int'($signed(b8));
        checks++;
        if (p8 !== exp[15:0]) begin
          failures++;
          if (failures < 10) $display("FAIL W8 %0d*%0d got %0d", $signed(a8), $signed(b8), $signed(p8));
        end
      end
    end
    chk16(16'h8000, 16'h8000); chk16(16'h7fff, 16'h8000); chk16(16'hffff, 16'hffff);
    chk16(16'h7fff, 16'h7fff); chk16(16'h0000, 16'h8000);
    chk24(24'h800000, 24'h800000); chk24(24'h7fffff, 24'h800000); chk24(24'hffffff, 24'h7fffff);
    for (int n = 0; n < 20000; n++) begin
      chk16(16'($urandom), 16'($urandom));
      chk24(24'($urandom), 24'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
