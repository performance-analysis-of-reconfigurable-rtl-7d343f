// tb_rfir_top: end-to-end self-checking testbench of the reconfigurable multichannel FIR
// filter, at the design's default sizes (8-bit data, 16 taps, 8 channels).
//
// A reference model in the testbench keeps its own delay lines and coefficients and works
// out y[n] = sum_k H(k) x[n-k] for every channel with the * operator. The testbench programs
// the coefficients, sends input vectors with random per-channel multiplier types and checks
// every output sample, the channel order and the cycles each vector takes
// (1 + sum over channels of TAPS * (4 for a tree multiplier, N + 4 for shift-and-add)).
// It also makes each mechanism of the design happen and counts it: every multiplier type,
// switching a channel's multiplier type between vectors, reprogramming coefficients between
// vectors, an input vector held back while the filter is busy (in_valid high, in_ready
// low), and extreme operands (-128 everywhere) at full accumulation range. The last 20
// vectors run the 8-bit 7-tap configuration (H(7)..H(15) programmed to zero) next to the
// 16-tap one.
module tb_rfir_top;
  import rfir_pkg::*;
  localparam int N = DATA_W;
  localparam int NTAP = TAPS;
  localparam int NCH = CHANNELS;
  localparam int ACC_W = 2 * N + $clog2(NTAP);
  localparam int NVEC = 80;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                    coef_we;
  logic [$clog2(NTAP)-1:0] coef_addr;
  logic signed [N-1:0]     coef_wdata;
  mult_sel_e               mode [NCH];
  logic                    in_valid, in_ready;
  logic signed [N-1:0]     x_in [NCH];
  logic                    y_valid;
  logic [$clog2(NCH)-1:0]  y_ch;
  logic signed [ACC_W-1:0] y_data;

  rfir_top dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_wdata(coef_wdata), .mode(mode), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .y_valid(y_valid), .y_ch(y_ch), .y_data(y_data));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // reference model
  int xs [NCH][NTAP];
  int hs [NTAP];
  mult_sel_e prev_mode [NCH];

  // mechanism counters
  int n_type [4];
  int n_mode_switch = 0;
  int n_coef_reload = 0;
  int n_stall_cycles = 0;
  int n_extreme = 0;
  int n_7tap = 0;

  task automatic write_coef(input int k, input int value);
    @(negedge clk);
    coef_we    = 1'b1;
    coef_addr  = ($clog2(NTAP))'(k);
    coef_wdata = N'(value);
    @(posedge clk);
    hs[k] = value;
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cycles, cycles, next_ch, expected, sample;
    bit extreme;
    rst_n = 1'b0;
    in_valid = 1'b0;
    coef_we = 1'b0;
    coef_addr = '0;
    coef_wdata = '0;
    for (int c = 0; c < NCH; c++) begin
      mode[c] = MUL_WALLACE;
      prev_mode[c] = MUL_WALLACE;
      x_in[c] = '0;
      for (int t = 0; t < NTAP; t++) xs[c][t] = 0;
    end
    for (int t = 0; t < NTAP; t++) hs[t] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < NTAP; t++) write_coef(t, $signed(N'($urandom)));

    for (int v = 0; v < NVEC; v++) begin
      extreme = (v >= 20 && v < 20 + NTAP);   // a run of -128 samples with -128 coefficients
      // reprogram coefficients between vectors
      if (v == 60) begin
        // the 7-tap configuration: H(7)..H(15) programmed to zero
        for (int t = 0; t < NTAP; t++) write_coef(t, (t < 7) ? $signed(N'($urandom)) : 0);
        n_coef_reload++;
      end
      if (v == 10 || v == 40) begin
        for (int t = 0; t < NTAP; t++) write_coef(t, $signed(N'($urandom)));
        n_coef_reload++;
      end
      if (v == 20) begin
        for (int t = 0; t < NTAP; t++) write_coef(t, -128);
        n_coef_reload++;
      end
      if (v == 20 + NTAP) begin
        for (int t = 0; t < NTAP; t++) write_coef(t, $signed(N'($urandom)));
        n_coef_reload++;
      end
      @(negedge clk);
      exp_cycles = 1;
      for (int c = 0; c < NCH; c++) begin
        mode[c] = (v < 4) ? mult_sel_e'(v) : mult_sel_e'($urandom_range(0, 3));
        if (v > 0 && mode[c] != prev_mode[c]) n_mode_switch++;
        prev_mode[c] = mode[c];
        n_type[mode[c]]++;
        exp_cycles += NTAP * ((mode[c] == MUL_SHIFT_ADD) ? N + 4 : 4);
        sample = extreme ? -128 : $signed(N'($urandom));
        x_in[c] = N'(sample);
      end
      if (v >= 60) n_7tap++;
      in_valid = 1'b1;
      check(in_ready, "in_ready before vector");
      @(posedge clk);
      for (int c = 0; c < NCH; c++) begin
        for (int t = NTAP - 1; t > 0; t--) xs[c][t] = xs[c][t-1];
        xs[c][0] = $signed(x_in[c]);
      end
      @(negedge clk);
      // on odd vectors the next vector is already offered while this one is computed;
      // its samples change only when it is accepted, which the model assumes
      in_valid = (v % 2 == 1) && (v != NVEC - 1);
      cycles = 1;
      next_ch = 0;
      while (!in_ready && cycles < 5000) begin
        if (in_valid) n_stall_cycles++;
        if (y_valid) begin
          expected = 0;
          for (int t = 0; t < NTAP; t++) expected += hs[t] * xs[next_ch][t];
          if (extreme && expected == 16 * 16384) n_extreme++;
          check(y_ch == ($clog2(NCH))'(next_ch), $sformatf("output channel %0d expected %0d", y_ch, next_ch));
          check(y_data == ACC_W'(expected), $sformatf("vector %0d ch %0d: y %0d expected %0d", v, next_ch, y_data, expected));
          next_ch++;
        end
        @(negedge clk);
        cycles++;
      end
      if (y_valid) begin
        expected = 0;
        for (int t = 0; t < NTAP; t++) expected += hs[t] * xs[next_ch][t];
        if (extreme && expected == 16 * 16384) n_extreme++;
        check(y_data == ACC_W'(expected), $sformatf("vector %0d last channel", v));
        next_ch++;
      end
      in_valid = 1'b0;
      check(next_ch == NCH, $sformatf("%0d outputs for one vector", next_ch));
      check(cycles == exp_cycles, $sformatf("vector %0d took %0d cycles, expected %0d", v, cycles, exp_cycles));
    end

    $display("mechanisms: wallace=%0d booth=%0d shift_add=%0d dadda=%0d mode_switches=%0d coef_reloads=%0d stall_cycles=%0d full_range_outputs=%0d seven_tap_vectors=%0d",
             n_type[MUL_WALLACE], n_type[MUL_BOOTH], n_type[MUL_SHIFT_ADD], n_type[MUL_DADDA],
             n_mode_switch, n_coef_reload, n_stall_cycles, n_extreme, n_7tap);
    for (int s = 0; s < 4; s++) check(n_type[s] > 0, $sformatf("multiplier type %0d never used", s));
    check(n_mode_switch > 0, "no multiplier type switch");
    check(n_coef_reload > 0, "no coefficient reload");
    check(n_stall_cycles > 0, "no input stall");
    check(n_extreme > 0, "full accumulation range never reached");
    check(n_7tap > 0, "7-tap configuration never run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
