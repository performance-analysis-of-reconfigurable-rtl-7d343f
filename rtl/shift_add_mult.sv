// shift_add_mult: signed N x N sequential shift-and-add multiplier.
//
// A product register {hi, lo} holds the running partial sum in hi (N+1 bits, so the sum
// never overflows) and the multiplier Q in lo. Every cycle the least significant bit of the
// register is examined: if it is 1 the multiplicand M is added to hi, and then the whole
// register is shifted right by one bit (arithmetic shift, so the sign of the partial sum is
// kept). After N steps the register holds the 2N-bit product. For two's-complement operands
// the last step, which sees the sign bit of Q, subtracts M instead of adding it. The add or
// subtract is done by a square-root carry-select adder (subtraction as hi + ~M + 1).
//
// Interface and timing: pulse start for one cycle with a and b valid; busy is high while
// the multiplier works, done pulses for one cycle N + 1 cycles after the start cycle (one
// cycle to load the operands, N add-and-shift steps) and
// p holds the product from then until the next start. A start while busy is ignored.
// The add-then-shift loop follows the shift-and-add algorithm; the signed last step and the
// start/busy/done handshake are this design's choices.
module shift_add_mult #(
  parameter int unsigned N = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*N-1:0] p
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic signed [N-1:0] m_q;      // multiplicand M
  logic        [N:0]   hi_q;     // partial sum
  logic        [N-1:0] lo_q;     // multiplier Q, shifted out bit by bit
  logic        [CW-1:0] cnt_q;

  // hi + M or hi - M
  logic         last_step;
  logic [N:0]   addend;
  logic [N:0]   hi_sum;
  logic         unused_cout;
  logic         unused_valid;

  assign last_step = (cnt_q == CW'(N - 1));
  assign addend    = last_step ? ~{m_q[N-1], m_q} : {m_q[N-1], m_q};

  sqrt_csla #(.WIDTH(N + 1), .RETIME(1'b0)) u_add (
    .clk      (1'b0),
    .rst_n    (1'b1),
    .in_valid (1'b0),
    .a        (hi_q),
    .b        (addend),
    .cin      (last_step),
    .out_valid(unused_valid),
    .sum      (hi_sum),
    .cout     (unused_cout)
  );

  // add M only when the bit of Q under examination is 1
  logic [N:0] hi_next;
  assign hi_next = lo_q[0] ? hi_sum : hi_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q   <= '0;
      hi_q  <= '0;
      lo_q  <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          m_q   <= a;
          hi_q  <= '0;
          lo_q  <= b;
          cnt_q <= '0;
          busy  <= 1'b1;
        end
      end else begin
        {hi_q, lo_q} <= {hi_next[N], hi_next, lo_q[N-1:1]};
        cnt_q <= cnt_q + 1'b1;
        if (last_step) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign p = signed'({hi_q[N-1:0], lo_q});

endmodule
