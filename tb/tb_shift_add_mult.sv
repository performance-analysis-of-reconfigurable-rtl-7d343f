// tb_shift_add_mult: self-checking testbench of the sequential shift-and-add multiplier.
//
// All 65536 signed 8-bit operand pairs are multiplied one after another. For each, start is
// pulsed, done must come exactly N + 1 = 9 cycles later, busy must be high in between, and the
// product must equal the * operator. Some starts are issued while busy and must be ignored.
module tb_shift_add_mult;
  localparam int N = 8;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic               start, busy, done;
  logic signed [7:0]  a, b;
  logic signed [15:0] p;

  shift_add_mult #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                               .busy(busy), .done(done), .p(p));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    rst_n = 1'b0;
    start = 1'b0;
    a = '0;
    b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        @(negedge clk);
        a = 8'(i);
        b = 8'(j);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        lat = 1;
        while (!done) begin
          check(busy, "busy low before done");
          // a stray start while busy, with other operands, must be ignored
          if (lat == 3 && ((i + j) % 5 == 0)) begin
            a = 8'(j + 1);
            b = 8'(i - 1);
            start = 1'b1;
            @(negedge clk);
            start = 1'b0;
          end else begin
            @(negedge clk);
          end
          lat++;
          if (lat > 3 * N) break;
        end
        check(lat == N + 1, $sformatf("latency %0d for %0d*%0d", lat, i, j));
        check(p == 16'(i * j), $sformatf("%0d * %0d = %0d", i, j, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
