// tb_rfir_mac: self-checking testbench of the accumulator on the retimed carry-select adder.
//
// Groups of 1 to 16 random signed 16-bit products are accumulated, the first of each group
// with clear high. ready must drop for the add in flight, out_valid must pulse exactly two
// cycles after the add (adder cutset, then accumulator register) and acc must equal the
// running sum worked out in the testbench. Extreme products check the sign extension.
module tb_rfir_mac;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                add, clear, ready, out_valid;
  logic signed [15:0]  product;
  logic signed [19:0]  acc;

  rfir_mac #(.N(8), .NTAP(16)) dut (.clk(clk), .rst_n(rst_n), .add(add), .clear(clear),
                                    .product(product), .ready(ready), .out_valid(out_valid),
                                    .acc(acc));

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, len, lat, pv;
    rst_n = 1'b0;
    add = 1'b0;
    clear = 1'b0;
    product = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 500; g++) begin
      len = $urandom_range(1, 16);
      expected = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        check(ready, "ready low while idle");
        case ($urandom_range(0, 9))
          0:       pv = -16384;   // -128 * 128 range end: most negative product of 8-bit operands
          1:       pv = 16384;
          default: pv = $signed(16'($urandom));
        endcase
        product = 16'(pv);
        clear = (k == 0);
        add = 1'b1;
        expected = (k == 0) ? pv : expected + pv;
        @(negedge clk);
        add = 1'b0;
        check(!ready, "ready high with an add in flight");
        lat = 1;
        while (!out_valid && lat < 10) begin
          @(negedge clk);
          lat++;
        end
        check(lat == 2, $sformatf("latency %0d", lat));
        check(acc == 20'(expected), $sformatf("acc %0d expected %0d", acc, expected));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
