// tb_sample_delay_line: self-checking testbench of the per-channel tapped delay lines.
//
// Random sample vectors are shifted in, sometimes with shift low (contents must then hold).
// A testbench history of every channel's samples gives the expected x[n-k]; after every
// clock all channel/tap positions are read back through the read port and compared.
module tb_sample_delay_line;
  localparam int NCH = 8;
  localparam int NTAP = 16;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic              shift;
  logic signed [7:0] x_in [NCH];
  logic [2:0]        rd_ch;
  logic [3:0]        rd_tap;
  logic signed [7:0] rd_data;
  logic signed [7:0] hist [NCH][NTAP];

  sample_delay_line #(.N(8), .NTAP(NTAP), .NCH(NCH)) dut (
    .clk(clk), .rst_n(rst_n), .shift(shift), .x_in(x_in), .rd_ch(rd_ch), .rd_tap(rd_tap),
    .rd_data(rd_data));

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
    shift = 1'b0;
    rd_ch = '0;
    rd_tap = '0;
    for (int c = 0; c < NCH; c++) begin
      x_in[c] = '0;
      for (int t = 0; t < NTAP; t++) hist[c][t] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      shift = (k % 4) != 2;
      for (int c = 0; c < NCH; c++) x_in[c] = 8'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int c = 0; c < NCH; c++) begin
          for (int t = NTAP - 1; t > 0; t--) hist[c][t] = hist[c][t-1];
          hist[c][0] = x_in[c];
        end
      end
      @(negedge clk);
      shift = 1'b0;
      for (int c = 0; c < NCH; c++) begin
        for (int t = 0; t < NTAP; t++) begin
          rd_ch  = 3'(c);
          rd_tap = 4'(t);
          #1;
          check(rd_data == hist[c][t], $sformatf("ch %0d tap %0d = %0d, expected %0d", c, t, rd_data, hist[c][t]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
