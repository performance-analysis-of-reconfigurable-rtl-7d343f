// rfir_mac: multiply-accumulate adder of the FIR filter, built on the retimed SQRT CSLA.
//
// The products leaving the multiplier mux are summed tap by tap. Each add request feeds the
// accumulator and the sign-extended product into a square-root carry-select adder with a
// register cutset between its ripple groups and its carry-select muxes. With clear high the
// accumulator input is replaced by zero, which starts a new output sample.
//
// Interface and timing: add (with product and clear) is accepted when ready is high. The
// sum leaves the retimed adder one cycle later; then acc holds it and out_valid pulses for
// one cycle. ready is low while an add is in flight, so at most one add is outstanding and
// the accumulator loop never sees a stale value. ACC_W = 2N + log2(TAPS) bits hold any sum
// of TAPS products without overflow.
// Using the retimed carry-select adder as the accumulation adder follows the filter's
// structure; accumulator width, clear and handshake are this design's choices.
module rfir_mac
  import rfir_pkg::*;
#(
  parameter int unsigned N     = DATA_W,
  parameter int unsigned NTAP  = TAPS,
  parameter int unsigned ACC_W = 2 * N + $clog2(NTAP)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    add,
  input  logic                    clear,
  input  logic signed [2*N-1:0]   product,
  output logic                    ready,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] acc
);

  logic             fire;
  logic             inflight_q;
  logic [ACC_W-1:0] opa, opb, sum;
  logic             sum_valid;
  logic             unused_cout;

  assign ready = !inflight_q;
  assign fire  = add && ready;
  assign opa   = clear ? '0 : acc;
  assign opb   = ACC_W'(product);   // sign extension (product is signed)

  sqrt_csla #(.WIDTH(ACC_W), .RETIME(1'b1)) u_add (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fire),
    .a        (opa),
    .b        (opb),
    .cin      (1'b0),
    .out_valid(sum_valid),
    .sum      (sum),
    .cout     (unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      out_valid  <= 1'b0;
      inflight_q <= 1'b0;
    end else begin
      out_valid <= sum_valid;
      if (fire) inflight_q <= 1'b1;
      if (sum_valid) begin
        acc        <= signed'(sum);
        inflight_q <= 1'b0;
      end
    end
  end

endmodule
