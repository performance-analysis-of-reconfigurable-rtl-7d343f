// sqrt_csla: square-root carry-select adder (SQRT CSLA) with an optional retiming cutset.
//
// The operand bits are split into ripple-carry groups of growing size (2, 2, 3, 4, 5, ...
// bits; five groups for 16 bits). Group 1 ripples with the real carry-in. Every later group
// computes two conditional results in parallel, one assuming a carry-in of 0 and one of 1,
// and a chain of 2:1 multiplexers picks one result per group from the carry of the group
// below. This is the classic square-root carry-select organisation.
//
// RETIME = 1 places a register cutset between the conditional-sum ripple groups and the
// carry-select multiplexer chain, so the long ripple paths and the mux chain sit in
// different clock cycles (latency 1 cycle, one result per cycle). RETIME = 0 gives the plain
// combinational adder (latency 0; clk, rst_n and in_valid are then unused and out_valid
// simply follows in_valid).
//
// Interface: a + b + cin -> {cout, sum}. in_valid/out_valid travel with the data.
// Where the cutset goes (between the ripple groups and the select muxes) and the exact group
// sizes are this design's reading of the retimed adder; the group-wise structure follows the
// square-root carry-select scheme.
module sqrt_csla
  import rfir_pkg::*;
#(
  parameter int unsigned WIDTH  = 16,
  parameter bit          RETIME = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG = csla_num_groups(WIDTH);
  localparam logic [63:0] FIRST_M = csla_first_mask(WIDTH);
  // last bit of a group: the next bit starts a group, or the word ends
  localparam logic [WIDTH-1:0] FIRST = FIRST_M[WIDTH-1:0];
  localparam logic [WIDTH-1:0] LAST  = {1'b1, FIRST[WIDTH-1:1]};

  // Conditional sums and group carries (stage A)
  logic [WIDTH-1:0] s0_d, s1_d;
  logic [NG-1:0]    c0_d, c1_d;
  // The same after the optional cutset (stage B inputs)
  logic [WIDTH-1:0] s0_q, s1_q;
  logic [NG-1:0]    c0_q, c1_q;
  logic             v_q;

  always_comb begin
    logic r0, r1;
    int unsigned g;
    r0   = 1'b0;
    r1   = 1'b1;
    g    = 0;
    s0_d = '0;
    s1_d = '0;
    c0_d = '0;
    c1_d = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (FIRST[i]) begin
        if (i != 0) g = g + 1;
        // group 1 ripples with the real carry-in on both rails
        r0 = (i == 0) ? cin : 1'b0;
        r1 = (i == 0) ? cin : 1'b1;
      end
      s0_d[i] = a[i] ^ b[i] ^ r0;
      s1_d[i] = a[i] ^ b[i] ^ r1;
      r0      = (a[i] & b[i]) | (a[i] & r0) | (b[i] & r0);
      r1      = (a[i] & b[i]) | (a[i] & r1) | (b[i] & r1);
      if (LAST[i]) begin
        c0_d[g] = r0;
        c1_d[g] = r1;
      end
    end
  end

  if (RETIME) begin : g_cutset
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s0_q <= '0;
        s1_q <= '0;
        c0_q <= '0;
        c1_q <= '0;
        v_q  <= 1'b0;
      end else begin
        s0_q <= s0_d;
        s1_q <= s1_d;
        c0_q <= c0_d;
        c1_q <= c1_d;
        v_q  <= in_valid;
      end
    end
  end else begin : g_comb
    assign s0_q = s0_d;
    assign s1_q = s1_d;
    assign c0_q = c0_d;
    assign c1_q = c1_d;
    assign v_q  = in_valid;
  end

  // Stage B: carry-select multiplexer chain
  always_comb begin
    logic carry;
    logic sel;
    int unsigned g;
    carry = 1'b0;
    sel   = 1'b0;
    g     = 0;
    sum   = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (FIRST[i] && (i != 0)) begin
        g   = g + 1;
        sel = carry;
      end
      sum[i] = sel ? s1_q[i] : s0_q[i];
      if (LAST[i]) carry = sel ? c1_q[g] : c0_q[g];
    end
    cout = carry;
  end

  assign out_valid = v_q;

endmodule
