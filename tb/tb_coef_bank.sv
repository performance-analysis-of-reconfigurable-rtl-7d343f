// tb_coef_bank: self-checking testbench of the coefficient registers.
//
// After reset every coefficient must read zero. Random writes are then applied while a
// shadow array in the testbench tracks the expected contents; every cycle a random address
// is read back and compared, including reads of the address being written (which must
// still return the old value until the clock edge).
module tb_coef_bank;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic              we;
  logic [3:0]        waddr, raddr;
  logic signed [7:0] wdata, rdata;
  logic signed [7:0] shadow [16];

  coef_bank #(.N(8), .NTAP(16)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
                                     .wdata(wdata), .raddr(raddr), .rdata(rdata));

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
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 16; k++) begin
      shadow[k] = '0;
      raddr = 4'(k);
      #1;
      check(rdata == 0, $sformatf("reset value H(%0d)", k));
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we    = (k < 16) || ($urandom_range(0, 2) == 0);
      waddr = (k < 16) ? 4'(k) : 4'($urandom);
      wdata = 8'($urandom);
      raddr = (k % 3 == 0) ? waddr : 4'($urandom);
      #1;
      check(rdata == shadow[raddr], $sformatf("read H(%0d) = %0d, expected %0d", raddr, rdata, shadow[raddr]));
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
