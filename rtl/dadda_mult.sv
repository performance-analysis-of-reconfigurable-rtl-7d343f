// dadda_mult: signed N x N Dadda multiplier (combinational).
//
// The partial-product bits a[j] & b[i] (modified Baugh-Wooley form: terms that pair exactly
// one sign bit are inverted, constant 1s are added in columns N and 2N-1) are sorted into
// 2N columns by weight. Dadda reduction then lowers the column heights stage by stage to the
// Dadda sequence ..., 13, 9, 6, 4, 3, 2: in each stage a column is only reduced as far as the
// stage's target height, using a full adder (3 bits -> sum here, carry to the next column)
// while the excess is two or more and a half adder when it is one. Carries produced in a
// column count towards the next column's height in the same stage. With all columns at
// height two, a square-root carry-select adder forms the product. The reduction schedule
// (how many full and half adders each column gets in each stage) is computed by constant
// functions at elaboration, and the adders are placed by generate loops.
//
// Interface: a, b signed N-bit in, p signed 2N-bit out, no clock, latency 0.
// Partial-product generation, carry-save reduction and the final addition follow the
// multiplier's description; the signed partial-product form is this design's choice.
module dadda_mult #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  localparam int unsigned W    = 2 * N;
  localparam int unsigned MAXH = N + 2;   // tallest column, with room for incoming carries

  // Number of Dadda stages: targets d_1 = 2, d_{k+1} = floor(1.5 d_k), used while below N.
  function automatic int unsigned num_stages();
    int unsigned d;
    int unsigned k;
    d = 2;
    k = 0;
    while (d < N) begin
      k = k + 1;
      d = (3 * d) / 2;
    end
    return k;
  endfunction

  function automatic int unsigned stage_target(int unsigned k);
    int unsigned d;
    d = 2;
    for (int unsigned i = 0; i < k; i++) d = (3 * d) / 2;
    return d;
  endfunction

  localparam int unsigned NS = num_stages();

  // The reduction schedule is worked out at elaboration time. sched(s, c, what) returns, for
  // stage s (0 = first, tallest target) and column c: what = 0 the column height entering
  // the stage, 1 the number of full adders, 2 the number of half adders, 3 the height
  // leaving the stage.
  function automatic int unsigned sched(int unsigned s_req, int unsigned c_req, int unsigned what);
    int unsigned h  [W];
    int unsigned ho [W];
    int unsigned cin, avail, total, fa, ha, d;
    for (int unsigned c = 0; c < W; c++) h[c] = 0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++) h[i+j] = h[i+j] + 1;
    h[N]   = h[N] + 1;
    h[W-1] = h[W-1] + 1;
    for (int unsigned s = 0; s < NS; s++) begin
      d   = stage_target(NS - 1 - s);
      cin = 0;
      for (int unsigned c = 0; c < W; c++) begin
        avail = h[c];
        total = h[c] + cin;
        fa = 0;
        ha = 0;
        while (total > d) begin
          if ((total - d >= 2) && (avail >= 3)) begin
            fa    = fa + 1;
            avail = avail - 3;
            total = total - 2;
          end else begin
            ha    = ha + 1;
            avail = avail - 2;
            total = total - 1;
          end
        end
        if (s == s_req && c == c_req) begin
          case (what)
            0:       return h[c];
            1:       return fa;
            2:       return ha;
            default: return total;
          endcase
        end
        ho[c] = total;
        cin   = fa + ha;
      end
      for (int unsigned c = 0; c < W; c++) h[c] = ho[c];
    end
    return 0;
  endfunction

  // Partial-product columns, column c = i + j, constants last
  for (genvar c = 0; c < W; c++) begin : g_pp
    localparam int unsigned ILO = (c >= N) ? c - N + 1 : 0;
    localparam int unsigned IHI = (c < N) ? c : N - 1;
    logic [MAXH-1:0] v;
    for (genvar i = ILO; i <= IHI; i++) begin : g_bit
      localparam int unsigned J = c - i;
      if ((i == N - 1) ^ (J == N - 1)) begin : g_inv
        assign v[i-ILO] = ~(a[J] & b[i]);
      end else begin : g_pos
        assign v[i-ILO] = a[J] & b[i];
      end
    end
    if (c == N || c == W - 1) begin : g_one
      assign v[IHI-ILO+1] = 1'b1;
      assign v[MAXH-1:IHI-ILO+2] = '0;
    end else begin : g_zero
      assign v[MAXH-1:IHI-ILO+1] = '0;
    end
  end

  // Reduction stages
  for (genvar s = 0; s < NS; s++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int unsigned HIN  = sched(s, c, 0);
      localparam int unsigned FA   = sched(s, c, 1);
      localparam int unsigned HA   = sched(s, c, 2);
      localparam int unsigned HOUT = sched(s, c, 3);
      localparam int unsigned CIN  = (c == 0) ? 0 : sched(s, c - 1, 1) + sched(s, c - 1, 2);
      localparam int unsigned PASS = HIN - 3 * FA - 2 * HA;
      logic [MAXH-1:0] v;    // column bits entering the stage
      logic [MAXH-1:0] o;    // column bits leaving the stage
      logic [MAXH:0]   cy;   // carries sent to column c + 1
      if (s == 0) begin : g_from_pp
        assign v = g_pp[c].v;
      end else begin : g_from_stage
        assign v = g_stage[s-1].g_col[c].o;
      end
      for (genvar k = 0; k < FA; k++) begin : g_fa
        assign o[k] = v[3*k] ^ v[3*k+1] ^ v[3*k+2];
        assign cy[k] = (v[3*k] & v[3*k+1]) | (v[3*k+1] & v[3*k+2]) | (v[3*k] & v[3*k+2]);
      end
      for (genvar k = 0; k < HA; k++) begin : g_ha
        assign o[FA+k] = v[3*FA+2*k] ^ v[3*FA+2*k+1];
        assign cy[FA+k] = v[3*FA+2*k] & v[3*FA+2*k+1];
      end
      assign cy[MAXH:FA+HA] = '0;
      for (genvar k = 0; k < CIN; k++) begin : g_cin
        assign o[FA+HA+k] = g_stage[s].g_col[c-1].cy[k];
      end
      for (genvar k = 0; k < PASS; k++) begin : g_pass
        assign o[FA+HA+CIN+k] = v[3*FA+2*HA+k];
      end
      if (HOUT < MAXH) begin : g_rest
        assign o[MAXH-1:HOUT] = '0;
      end
    end
  end

  // Two rows left after the last stage
  logic [W-1:0] row0, row1;
  for (genvar c = 0; c < W; c++) begin : g_rows
    assign row0[c] = g_stage[NS-1].g_col[c].o[0];
    assign row1[c] = g_stage[NS-1].g_col[c].o[1];
  end

  logic [W-1:0] sum;
  logic         unused_cout;
  logic         unused_valid;

  sqrt_csla #(.WIDTH(W), .RETIME(1'b0)) u_final_add (
    .clk      (1'b0),
    .rst_n    (1'b1),
    .in_valid (1'b0),
    .a        (row0),
    .b        (row1),
    .cin      (1'b0),
    .out_valid(unused_valid),
    .sum      (sum),
    .cout     (unused_cout)
  );

  assign p = signed'(sum);

endmodule
