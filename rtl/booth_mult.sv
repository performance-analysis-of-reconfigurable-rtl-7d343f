// booth_mult: signed N x N radix-4 (modified) Booth multiplier (combinational).
//
// The multiplier b is scanned in overlapping bit triples {b[2i+1], b[2i], b[2i-1]} with an
// extra bit b[-1] = 0 to the right. Each triple is recoded into one radix-4 digit in
// {-2, -1, 0, +1, +2}: 000/111 -> 0, 001/010 -> +1, 011 -> +2, 100 -> -2, 101/110 -> -1.
// Digit i selects 0, a or 2a (sign-extended to 2N bits), inverts it for a negative digit and
// shifts it left by 2i; the +1 that completes each two's-complement negation is collected in
// a separate correction row. The N/2 partial-product rows and the correction row are
// combined by a chain of carry-save adders and a square-root carry-select adder produces the
// product. Halving the number of partial products is what makes radix-4 recoding attractive.
//
// Interface: a (multiplicand), b (multiplier), both signed N-bit with N even; p signed 2N-bit;
// no clock, latency 0.
// The add / subtract / skip decisions per digit and the two-position shift per step follow
// the Booth algorithm as the multiplier unit uses it; the standard radix-4 triple recoding,
// the carry-save chain and the carry-select final adder are how this design realises it.
module booth_mult #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  localparam int unsigned W   = 2 * N;
  localparam int unsigned NPP = N / 2;

  logic [W-1:0] rows [NPP+1];

  // Booth recoding and partial-product selection
  always_comb begin
    logic [N:0]   bx;      // b with b[-1] = 0 appended
    logic [2:0]   trip;
    logic [W-1:0] m;
    logic         neg;
    bx = {b, 1'b0};
    rows[NPP] = '0;        // correction row
    for (int unsigned i = 0; i < NPP; i++) begin
      trip = bx[2*i +: 3];
      neg  = trip[2] & ~(trip[1] & trip[0]);
      unique case (trip)
        3'b001, 3'b010, 3'b101, 3'b110: m = W'(a);               // |digit| = 1
        3'b011, 3'b100:                 m = W'(a) << 1;          // |digit| = 2
        default:                        m = '0;                  // digit 0
      endcase
      rows[i]        = (neg ? ~m : m) << (2 * i);
      rows[NPP][2*i] = neg;
    end
  end

  // Carry-save chain down to two rows
  logic [W-1:0] cs_s, cs_c;

  always_comb begin
    logic [W-1:0] s, c, x;
    s = rows[0];
    c = rows[1];
    for (int unsigned k = 2; k <= NPP; k++) begin
      x = rows[k];
      {s, c} = {s ^ c ^ x, ((s & c) | (c & x) | (s & x)) << 1};
    end
    cs_s = s;
    cs_c = c;
  end

  logic [W-1:0] sum;
  logic         unused_cout;
  logic         unused_valid;

  sqrt_csla #(.WIDTH(W), .RETIME(1'b0)) u_final_add (
    .clk      (1'b0),
    .rst_n    (1'b1),
    .in_valid (1'b0),
    .a        (cs_s),
    .b        (cs_c),
    .cin      (1'b0),
    .out_valid(unused_valid),
    .sum      (sum),
    .cout     (unused_cout)
  );

  assign p = signed'(sum);

endmodule
