// rfir_top: reconfigurable multichannel FIR filter with a shared, switchable multiplier.
//
// NCH input channels (CH1..CH8) are filtered by the same NTAP-tap FIR
// y[n] = sum_k H(k) x[n-k] with programmable coefficients H(0)..H(15). One reconfigurable
// multiplier unit (Wallace tree, radix-4 Booth, shift-and-add or Dadda, chosen per channel
// by the control inputs mode[ch]) and one accumulation adder, a square-root carry-select
// adder with a retiming cutset, are shared in time by all channels and taps.
//
// Ports:
//   coef_we/coef_addr/coef_wdata  write H(coef_addr); allowed at any time, takes effect for
//                                 products started after the write
//   mode[ch]                      multiplier type used for channel ch, latched per vector
//   in_valid/in_ready, x_in[ch]   one input sample per channel (accepted when both high)
//   y_valid, y_ch, y_data         one filtered sample per channel and vector, ACC_W bits,
//                                 full precision (no rounding or saturation)
// Timing: see rfir_ctrl; with tree multipliers a vector takes 1 + 4*NTAP*NCH cycles.
// The block structure follows the reconfigurable FIR filter; widths of the output, the
// processing order and the handshakes are this design's choices.
module rfir_top
  import rfir_pkg::*;
#(
  parameter int unsigned N     = DATA_W,
  parameter int unsigned NTAP  = TAPS,
  parameter int unsigned NCH   = CHANNELS,
  parameter int unsigned ACC_W = 2 * N + $clog2(NTAP)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    coef_we,
  input  logic [$clog2(NTAP)-1:0] coef_addr,
  input  logic signed [N-1:0]     coef_wdata,
  input  mult_sel_e               mode [NCH],
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [N-1:0]     x_in [NCH],
  output logic                    y_valid,
  output logic [$clog2(NCH)-1:0]  y_ch,
  output logic signed [ACC_W-1:0] y_data
);

  logic                    shift;
  logic [$clog2(NCH)-1:0]  rd_ch;
  logic [$clog2(NTAP)-1:0] rd_tap;
  logic signed [N-1:0]     x_rd, h_rd;
  logic                    mul_start, mul_done, mul_busy;
  mult_sel_e               mul_sel;
  logic signed [2*N-1:0]   product;
  logic                    mac_add, mac_clear, mac_ready, mac_valid;
  logic signed [ACC_W-1:0] mac_acc;

  coef_bank #(.N(N), .NTAP(NTAP)) u_coef (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (coef_we),
    .waddr(coef_addr),
    .wdata(coef_wdata),
    .raddr(rd_tap),
    .rdata(h_rd)
  );

  sample_delay_line #(.N(N), .NTAP(NTAP), .NCH(NCH)) u_delay (
    .clk    (clk),
    .rst_n  (rst_n),
    .shift  (shift),
    .x_in   (x_in),
    .rd_ch  (rd_ch),
    .rd_tap (rd_tap),
    .rd_data(x_rd)
  );

  reconfig_mult_unit #(.N(N)) u_rmu (
    .clk  (clk),
    .rst_n(rst_n),
    .start(mul_start),
    .sel  (mul_sel),
    .a    (h_rd),
    .b    (x_rd),
    .busy (mul_busy),
    .done (mul_done),
    .p    (product)
  );

  rfir_mac #(.N(N), .NTAP(NTAP), .ACC_W(ACC_W)) u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .add      (mac_add),
    .clear    (mac_clear),
    .product  (product),
    .ready    (mac_ready),
    .out_valid(mac_valid),
    .acc      (mac_acc)
  );

  rfir_ctrl #(.N(N), .NTAP(NTAP), .NCH(NCH), .ACC_W(ACC_W)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .mode     (mode),
    .shift    (shift),
    .rd_ch    (rd_ch),
    .rd_tap   (rd_tap),
    .mul_start(mul_start),
    .mul_sel  (mul_sel),
    .mul_done (mul_done),
    .mac_add  (mac_add),
    .mac_clear(mac_clear),
    .mac_valid(mac_valid),
    .mac_acc  (mac_acc),
    .y_valid  (y_valid),
    .y_ch     (y_ch),
    .y_data   (y_data)
  );

  // the controller never starts the multiplier while it is busy, nor adds while the adder is busy
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !mul_busy);
  a_no_add_busy:   assert property (@(posedge clk) disable iff (!rst_n) mac_add |-> mac_ready);

endmodule
