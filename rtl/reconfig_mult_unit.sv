// reconfig_mult_unit: reconfigurable multiplier unit of the FIR filter.
//
// Four multiplier structures sit side by side: Wallace tree, radix-4 Booth, sequential
// shift-and-add and Dadda. The control code sel picks one of them through the multiplier
// mux. To save power only the selected structure sees the operands: the inputs of the three
// combinational trees are forced to zero unless selected (operand isolation), and the
// shift-and-add unit is only started when selected, so unused structures do not toggle.
//
// Interface and timing: pulse start for one cycle with sel, a and b valid. For a tree
// multiplier (Wallace, Booth, Dadda) the product is registered and done pulses one cycle
// after start; for shift-and-add done pulses N + 1 cycles after start. p holds the last product
// until the next start (shift-and-add) or the next done. busy is high while the shift-and-add unit works; starts while busy are ignored.
// A tree multiplier accepts a new start every cycle.
// sel is sampled with start and kept for the whole operation.
// The four structures and the select mux follow the reconfigurable multiplier unit; operand
// isolation, the output register and the handshake are this design's choices.
module reconfig_mult_unit
  import rfir_pkg::*;
#(
  parameter int unsigned N = DATA_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  mult_sel_e             sel,
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*N-1:0] p
);

  logic signed [N-1:0]   a_w, b_w, a_b, b_b, a_d, b_d;
  logic signed [2*N-1:0] p_w, p_b, p_d, p_s;
  logic                  sa_busy, sa_done;
  mult_sel_e             sel_q;

  // operand isolation
  assign a_w = (sel == MUL_WALLACE) ? a : '0;
  assign b_w = (sel == MUL_WALLACE) ? b : '0;
  assign a_b = (sel == MUL_BOOTH)   ? a : '0;
  assign b_b = (sel == MUL_BOOTH)   ? b : '0;
  assign a_d = (sel == MUL_DADDA)   ? a : '0;
  assign b_d = (sel == MUL_DADDA)   ? b : '0;

  wallace_mult   #(.N(N)) u_wallace (.a(a_w), .b(b_w), .p(p_w));
  booth_mult     #(.N(N)) u_booth   (.a(a_b), .b(b_b), .p(p_b));
  dadda_mult     #(.N(N)) u_dadda   (.a(a_d), .b(b_d), .p(p_d));
  shift_add_mult #(.N(N)) u_shadd (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start && !busy && (sel == MUL_SHIFT_ADD)),
    .a    (a),
    .b    (b),
    .busy (sa_busy),
    .done (sa_done),
    .p    (p_s)
  );

  assign busy = sa_busy;

  logic signed [2*N-1:0] p_tree_q;
  logic                  tree_done_q;

  // tree multipliers: register the selected product at start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_tree_q    <= '0;
      tree_done_q <= 1'b0;
      sel_q       <= MUL_WALLACE;
    end else begin
      tree_done_q <= 1'b0;
      if (start && !busy) begin
        sel_q <= sel;
        unique case (sel)
          MUL_WALLACE: begin p_tree_q <= p_w; tree_done_q <= 1'b1; end
          MUL_BOOTH:   begin p_tree_q <= p_b; tree_done_q <= 1'b1; end
          MUL_DADDA:   begin p_tree_q <= p_d; tree_done_q <= 1'b1; end
          default:     ;
        endcase
      end
    end
  end

  // multiplier mux: the product of the structure used last
  assign p    = (sel_q == MUL_SHIFT_ADD) ? p_s : p_tree_q;
  assign done = tree_done_q | (sa_done && (sel_q == MUL_SHIFT_ADD));

endmodule
