// sample_delay_line: tapped delay lines of the multichannel FIR filter.
//
// For each of the NCH input channels a chain of NTAP sample registers holds x[n], x[n-1],
// ..., x[n-NTAP+1], the delay elements of the direct-form FIR equation
// y[n] = sum_k H(k) x[n-k]. When shift is high all channels take their new sample x_in[ch]
// into position 0 together and every older sample moves one position down. A combinational
// read port returns the sample of one channel and one tap (rd_ch, rd_tap -> rd_data), so a
// single shared multiplier can visit the samples one by one. All samples reset to zero.
//
// Timing: shift takes effect at the clock edge; reads see the registered contents.
// Sharing one read port among all channels and taps is this design's choice.
module sample_delay_line
  import rfir_pkg::*;
#(
  parameter int unsigned N    = DATA_W,
  parameter int unsigned NTAP = TAPS,
  parameter int unsigned NCH  = CHANNELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shift,
  input  logic signed [N-1:0]     x_in [NCH],
  input  logic [$clog2(NCH)-1:0]  rd_ch,
  input  logic [$clog2(NTAP)-1:0] rd_tap,
  output logic signed [N-1:0]     rd_data
);

  logic signed [N-1:0] x_q [NCH][NTAP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < NCH; c++)
        for (int unsigned k = 0; k < NTAP; k++) x_q[c][k] <= '0;
    end else if (shift) begin
      for (int unsigned c = 0; c < NCH; c++) begin
        x_q[c][0] <= x_in[c];
        for (int unsigned k = 1; k < NTAP; k++) x_q[c][k] <= x_q[c][k-1];
      end
    end
  end

  assign rd_data = x_q[rd_ch][rd_tap];

endmodule
