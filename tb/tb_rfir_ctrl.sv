// tb_rfir_ctrl: self-checking testbench of the time-multiplexing controller.
//
// The controller runs against models kept in this testbench: delay lines and coefficients as
// plain arrays, a multiplier that answers 1 cycle after start (tree types) or N + 1 cycles
// after start (shift-and-add) with x * h of the addressed channel and tap, and an
// accumulator that answers two cycles after each add. For random input vectors and random
// per-channel multiplier types the testbench checks the product addresses, that every
// channel's output equals sum_k H(k) x[n-k], that outputs come in channel order, and that a
// vector takes exactly 1 + sum over channels of TAPS * (4 or N + 4) cycles.
module tb_rfir_ctrl;
  import rfir_pkg::*;
  localparam int N = 8;
  localparam int NTAP = 16;
  localparam int NCH = 8;
  localparam int ACC_W = 20;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                    in_valid, in_ready, shift;
  mult_sel_e               mode [NCH];
  logic [2:0]              rd_ch;
  logic [3:0]              rd_tap;
  logic                    mul_start, mul_done;
  mult_sel_e               mul_sel;
  logic                    mac_add, mac_clear, mac_valid;
  logic signed [ACC_W-1:0] mac_acc;
  logic                    y_valid;
  logic [2:0]              y_ch;
  logic signed [ACC_W-1:0] y_data;

  rfir_ctrl #(.N(N), .NTAP(NTAP), .NCH(NCH), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .mode(mode),
    .shift(shift), .rd_ch(rd_ch), .rd_tap(rd_tap), .mul_start(mul_start), .mul_sel(mul_sel),
    .mul_done(mul_done), .mac_add(mac_add), .mac_clear(mac_clear), .mac_valid(mac_valid),
    .mac_acc(mac_acc), .y_valid(y_valid), .y_ch(y_ch), .y_data(y_data));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // models
  int xs [NCH][NTAP];
  int hs [NTAP];
  int mul_cnt;
  int mul_p;
  int acc_m;
  logic [1:0] mac_pipe;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mul_cnt  <= 0;
      mul_done <= 1'b0;
      mac_pipe <= '0;
      acc_m    <= 0;
    end else begin
      mul_done <= 1'b0;
      if (mul_start) begin
        check(mul_sel == mode[rd_ch], "multiplier type of channel");
        mul_p   <= xs[rd_ch][rd_tap] * hs[rd_tap];
        mul_cnt <= (mul_sel == MUL_SHIFT_ADD) ? N + 1 : 1;
        if (mul_sel != MUL_SHIFT_ADD) mul_done <= 1'b1;
      end else if (mul_cnt > 0) begin
        mul_cnt <= mul_cnt - 1;
        if (mul_cnt == 2) mul_done <= 1'b1;
      end
      mac_pipe <= {mac_pipe[0], mac_add};
      if (mac_add) acc_m <= mac_clear ? mul_p : acc_m + mul_p;
    end
  end
  assign mac_valid = mac_pipe[1];
  assign mac_acc   = ACC_W'(acc_m);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cycles, cycles, next_ch, expected, sa_channels;
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int c = 0; c < NCH; c++) begin
      mode[c] = MUL_WALLACE;
      for (int t = 0; t < NTAP; t++) xs[c][t] = 0;
    end
    for (int t = 0; t < NTAP; t++) hs[t] = $signed(8'($urandom));
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    sa_channels = 0;
    for (int v = 0; v < 60; v++) begin
      @(negedge clk);
      check(in_ready, "in_ready while idle");
      exp_cycles = 1;
      for (int c = 0; c < NCH; c++) begin
        mode[c] = mult_sel_e'($urandom_range(0, 3));
        if (mode[c] == MUL_SHIFT_ADD) sa_channels++;
        exp_cycles += NTAP * ((mode[c] == MUL_SHIFT_ADD) ? N + 4 : 4);
      end
      in_valid = 1'b1;
      #1;
      check(shift, "shift on accepted vector");
      @(posedge clk);
      // model the delay lines
      for (int c = 0; c < NCH; c++) begin
        for (int t = NTAP - 1; t > 0; t--) xs[c][t] = xs[c][t-1];
        xs[c][0] = $signed(8'($urandom));
      end
      @(negedge clk);
      in_valid = 1'b0;
      cycles = 1;
      next_ch = 0;
      while (!in_ready && cycles < 5000) begin
        check(!shift, "shift while busy");
        if (y_valid) begin
          expected = 0;
          for (int t = 0; t < NTAP; t++) expected += hs[t] * xs[next_ch][t];
          check(y_ch == 3'(next_ch), $sformatf("output channel %0d expected %0d", y_ch, next_ch));
          check(y_data == ACC_W'(expected), $sformatf("ch %0d y %0d expected %0d", next_ch, y_data, expected));
          next_ch++;
        end
        @(negedge clk);
        cycles++;
      end
      // the last channel's output appears together with the return to idle
      if (y_valid) begin
        expected = 0;
        for (int t = 0; t < NTAP; t++) expected += hs[t] * xs[next_ch][t];
        check(y_data == ACC_W'(expected), "last channel output");
        next_ch++;
      end
      check(next_ch == NCH, $sformatf("%0d outputs for one vector", next_ch));
      check(cycles == exp_cycles, $sformatf("vector took %0d cycles, expected %0d", cycles, exp_cycles));
    end
    check(sa_channels > 0, "shift-and-add never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
