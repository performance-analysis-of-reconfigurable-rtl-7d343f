// coef_bank: programmable coefficient registers H(0) .. H(TAPS-1) of the FIR filter.
//
// The filter coefficients are not fixed: they are written one at a time through a simple
// write port (we, waddr, wdata) and can be reprogrammed at any time, which is what makes the
// filter reconfigurable. The tap sequencer reads one coefficient per product through an
// asynchronous read port (raddr -> rdata, combinational). All coefficients reset to zero.
//
// Timing: a write takes effect at the clock edge; a read in the same cycle returns the old
// value. The write/read port organisation and reset value are this design's choices.
module coef_bank
  import rfir_pkg::*;
#(
  parameter int unsigned N    = DATA_W,
  parameter int unsigned NTAP = TAPS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(NTAP)-1:0]  waddr,
  input  logic signed [N-1:0]      wdata,
  input  logic [$clog2(NTAP)-1:0]  raddr,
  output logic signed [N-1:0]      rdata
);

  logic signed [N-1:0] h_q [NTAP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NTAP; k++) h_q[k] <= '0;
    end else if (we) begin
      h_q[waddr] <= wdata;
    end
  end

  assign rdata = h_q[raddr];

endmodule
