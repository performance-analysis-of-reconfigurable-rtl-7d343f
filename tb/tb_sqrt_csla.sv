// tb_sqrt_csla: self-checking testbench of the square-root carry-select adder.
//
// Two instances are tested side by side: a combinational 16-bit adder (the multipliers'
// final adder) and a retimed 20-bit adder (the accumulation adder, one cycle latency).
// Random and corner-case operands are compared with the + operator; for the retimed adder
// the expected result is delayed by one cycle and out_valid must follow in_valid by
// exactly one cycle.
module tb_sqrt_csla;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // combinational 16-bit
  logic [15:0] a16, b16, s16;
  logic        cin16, co16, v16;
  sqrt_csla #(.WIDTH(16), .RETIME(1'b0)) u_comb (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a16), .b(b16), .cin(cin16),
    .out_valid(v16), .sum(s16), .cout(co16));

  // retimed 20-bit
  logic [19:0] a20, b20, s20;
  logic        cin20, co20, vin20, vout20;
  sqrt_csla #(.WIDTH(20), .RETIME(1'b1)) u_ret (
    .clk(clk), .rst_n(rst_n), .in_valid(vin20), .a(a20), .b(b20), .cin(cin20),
    .out_valid(vout20), .sum(s20), .cout(co20));

  logic [20:0] exp20_q = '0;
  logic        expv_q = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    vin20 = 1'b0; a20 = '0; b20 = '0; cin20 = 1'b0;
    a16 = '0; b16 = '0; cin16 = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // combinational: corner cases then random
    for (int k = 0; k < 3000; k++) begin
      case (k)
        0: begin a16 = 16'hFFFF; b16 = 16'h0001; cin16 = 1'b0; end
        1: begin a16 = 16'hFFFF; b16 = 16'hFFFF; cin16 = 1'b1; end
        2: begin a16 = 16'h0000; b16 = 16'h0000; cin16 = 1'b1; end
        3: begin a16 = 16'h7FFF; b16 = 16'h0001; cin16 = 1'b0; end
        4: begin a16 = 16'h0FFF; b16 = 16'h0000; cin16 = 1'b1; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom); end
      endcase
      #1;
      check({co16, s16} == 17'(a16) + 17'(b16) + 17'(cin16), $sformatf("comb %h+%h+%b", a16, b16, cin16));
    end
    // retimed: drive random values at each edge, check the previous one
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (expv_q) check(vout20 && ({co20, s20} == exp20_q), $sformatf("retimed k=%0d", k));
      else        check(!vout20, "retimed out_valid without input");
      vin20 = (k % 7) != 3;
      a20   = (k == 5) ? 20'hFFFFF : 20'($urandom);
      b20   = (k == 5) ? 20'h00001 : 20'($urandom);
      cin20 = 1'($urandom);
      @(posedge clk);
      exp20_q <= 21'(a20) + 21'(b20) + 21'(cin20);
      expv_q  <= vin20;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
