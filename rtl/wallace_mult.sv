// wallace_mult: signed N x N Wallace-tree multiplier (combinational).
//
// Partial products are formed as a[j] & b[i] in modified Baugh-Wooley form: the terms that
// pair exactly one sign bit are inverted and a constant 1 is added in columns N and 2N-1,
// which makes the unsigned sum of all rows equal the two's-complement product mod 2^(2N).
// The N partial-product rows and the constant row are then reduced Wallace style: in every
// layer the rows are taken three at a time and each triple becomes a bit-wise sum row
// (a ^ b ^ c) and a bit-wise carry row (majority, shifted left one column); rows left over
// pass unchanged. Layers repeat until two rows remain (9 -> 6 -> 4 -> 3 -> 2 for N = 8),
// and a square-root carry-select adder adds those two rows.
//
// Interface: a, b signed N-bit in, p signed 2N-bit out, no clock, latency 0.
// The row-triple reduction and the carry-select final adder follow the reconfigurable
// multiplier's description; the signed (Baugh-Wooley) partial products are this design's choice.
module wallace_mult #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  localparam int unsigned W     = 2 * N;
  localparam int unsigned ROWS0 = N + 1;   // N partial-product rows + constant row

  // rows remaining after l layers
  function automatic int unsigned rows_after(int unsigned l);
    int unsigned r;
    r = ROWS0;
    for (int unsigned k = 0; k < l; k++) r = 2 * (r / 3) + (r % 3);
    return r;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned l;
    l = 0;
    while (rows_after(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned NL = num_layers();

  logic [W-1:0] pp_rows [ROWS0];

  // Layer 0: Baugh-Wooley partial-product rows
  for (genvar i = 0; i < N; i++) begin : g_pp
    logic [N-1:0] row;
    for (genvar j = 0; j < N; j++) begin : g_bit
      if ((i == N - 1) ^ (j == N - 1)) begin : g_inv
        assign row[j] = ~(a[j] & b[i]);
      end else begin : g_pos
        assign row[j] = a[j] & b[i];
      end
    end
    assign pp_rows[i] = W'({{N{1'b0}}, row}) << i;
  end
  assign pp_rows[N] = (W'(1) << N) | (W'(1) << (W - 1));

  // Reduction layers
  for (genvar l = 0; l < NL; l++) begin : g_layer
    localparam int unsigned RIN  = rows_after(l);
    localparam int unsigned NGRP = RIN / 3;
    logic [W-1:0] rin  [ROWS0];
    logic [W-1:0] rout [ROWS0];
    if (l == 0) begin : g_first
      assign rin = pp_rows;
    end else begin : g_next
      assign rin = g_layer[l-1].rout;
    end
    for (genvar k = 0; k < NGRP; k++) begin : g_csa
      logic [W-1:0] x, y, z;
      assign x = rin[3*k];
      assign y = rin[3*k+1];
      assign z = rin[3*k+2];
      assign rout[2*k]   = x ^ y ^ z;
      assign rout[2*k+1] = ((x & y) | (y & z) | (x & z)) << 1;
    end
    for (genvar k = 3 * NGRP; k < RIN; k++) begin : g_pass
      assign rout[2*NGRP + k - 3*NGRP] = rin[k];
    end
    for (genvar k = rows_after(l + 1); k < ROWS0; k++) begin : g_unused
      assign rout[k] = '0;
    end
  end

  // Final carry-propagate addition
  logic [W-1:0] sum;
  logic         unused_cout;
  logic         unused_valid;

  sqrt_csla #(.WIDTH(W), .RETIME(1'b0)) u_final_add (
    .clk      (1'b0),
    .rst_n    (1'b1),
    .in_valid (1'b0),
    .a        (g_layer[NL-1].rout[0]),
    .b        (g_layer[NL-1].rout[1]),
    .cin      (1'b0),
    .out_valid(unused_valid),
    .sum      (sum),
    .cout     (unused_cout)
  );

  assign p = signed'(sum);

endmodule
