// tb_wallace_mult: exhaustive self-checking testbench of the wallace multiplier: all 65536 signed
// 8-bit operand pairs are compared with the * operator.
module tb_wallace_mult;
  logic signed [7:0]  a, b;
  logic signed [15:0] p;

  wallace_mult #(.N(8)) dut (.a(a), .b(b), .p(p));

  int checks = 0;
  int failures = 0;

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
