// tb_reconfig_mult_unit: self-checking testbench of the reconfigurable multiplier unit.
//
// Random signed operands are multiplied with every multiplier type, in random order so the
// select code switches often. Each product is compared with the * operator, done must come
// 1 cycle after start for the Wallace, Booth and Dadda trees and N + 1 = 9 cycles after start
// for shift-and-add, and while one structure is selected the operands of the unselected
// trees must be held at zero (operand isolation).
module tb_reconfig_mult_unit;
  import rfir_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic               start, busy, done;
  mult_sel_e          sel;
  logic signed [7:0]  a, b;
  logic signed [15:0] p;

  reconfig_mult_unit #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .sel(sel),
                                   .a(a), .b(b), .busy(busy), .done(done), .p(p));

  int checks = 0;
  int failures = 0;
  int used [4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, exp_lat;
    int ia, ib;
    rst_n = 1'b0;
    start = 1'b0;
    sel   = MUL_WALLACE;
    a     = '0;
    b     = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      sel = mult_sel_e'(k < 8 ? k % 4 : $urandom_range(0, 3));
      ia  = (k % 50 == 0) ? -128 : $signed(8'($urandom));
      ib  = (k % 70 == 0) ? -128 : $signed(8'($urandom));
      a   = 8'(ia);
      b   = 8'(ib);
      used[sel]++;
      start = 1'b1;
      #1;
      check((sel == MUL_WALLACE || (dut.a_w == 0 && dut.b_w == 0)) &&
            (sel == MUL_BOOTH   || (dut.a_b == 0 && dut.b_b == 0)) &&
            (sel == MUL_DADDA   || (dut.a_d == 0 && dut.b_d == 0)), "operand isolation");
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 40) begin
        @(negedge clk);
        lat++;
      end
      exp_lat = (sel == MUL_SHIFT_ADD) ? N + 1 : 1;
      check(lat == exp_lat, $sformatf("latency %0d expected %0d sel %0d", lat, exp_lat, sel));
      check(p == 16'(ia * ib), $sformatf("sel %0d: %0d * %0d = %0d", sel, ia, ib, p));
    end
    for (int s = 0; s < 4; s++) check(used[s] > 0, $sformatf("type %0d never used", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
