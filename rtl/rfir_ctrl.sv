// rfir_ctrl: time-multiplexing controller of the multichannel FIR filter.
//
// The filter has one multiplier unit and one accumulation adder shared by every channel and
// every tap (resource sharing). For each new input vector (one sample per channel) this
// controller shifts the delay lines, then walks channel by channel and, inside a channel,
// tap by tap: it addresses x[n-k] of the channel and H(k), starts the multiplier with that
// channel's multiplier type, hands the product to the accumulator (clearing it at tap 0) and,
// after the last tap, emits y[n] of the channel on the output port.
//
// The multiplier type of every channel comes from the control inputs mode[ch] and is latched
// when an input vector is accepted, so one vector is always computed with one configuration
// while the next may use another.
//
// Timing: in_ready is high only in the idle state; an input vector is accepted in a cycle
// with in_valid && in_ready. Each product takes 4 cycles with a tree multiplier (start, product
// register, adder cutset, accumulator) and N + 4 cycles with the shift-and-add multiplier, so
// a whole vector takes 1 + sum over channels of TAPS * (4 or N + 4) cycles. y_valid pulses
// once per channel, channels in order 0 .. NCH-1.
// The channel-then-tap order and the handshakes are this design's choices.
module rfir_ctrl
  import rfir_pkg::*;
#(
  parameter int unsigned N     = DATA_W,
  parameter int unsigned NTAP  = TAPS,
  parameter int unsigned NCH   = CHANNELS,
  parameter int unsigned ACC_W = 2 * N + $clog2(NTAP)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input vector handshake
  input  logic                    in_valid,
  output logic                    in_ready,
  input  mult_sel_e               mode [NCH],
  // delay lines and coefficient bank
  output logic                    shift,
  output logic [$clog2(NCH)-1:0]  rd_ch,
  output logic [$clog2(NTAP)-1:0] rd_tap,
  // reconfigurable multiplier unit
  output logic                    mul_start,
  output mult_sel_e               mul_sel,
  input  logic                    mul_done,
  // accumulator
  output logic                    mac_add,
  output logic                    mac_clear,
  input  logic                    mac_valid,
  input  logic signed [ACC_W-1:0] mac_acc,
  // filtered output
  output logic                    y_valid,
  output logic [$clog2(NCH)-1:0]  y_ch,
  output logic signed [ACC_W-1:0] y_data
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_WAIT_MUL, S_WAIT_ACC} state_e;

  state_e                  state_q;
  logic [$clog2(NCH)-1:0]  ch_q;
  logic [$clog2(NTAP)-1:0] tap_q;
  mult_sel_e               mode_q [NCH];

  assign in_ready  = (state_q == S_IDLE);
  assign shift     = in_valid && in_ready;
  assign rd_ch     = ch_q;
  assign rd_tap    = tap_q;
  assign mul_start = (state_q == S_MUL);
  assign mul_sel   = mode_q[ch_q];
  assign mac_add   = (state_q == S_WAIT_MUL) && mul_done;
  assign mac_clear = (tap_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      ch_q    <= '0;
      tap_q   <= '0;
      y_valid <= 1'b0;
      y_ch    <= '0;
      y_data  <= '0;
      for (int unsigned c = 0; c < NCH; c++) mode_q[c] <= MUL_WALLACE;
    end else begin
      y_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (in_valid) begin
            mode_q  <= mode;
            ch_q    <= '0;
            tap_q   <= '0;
            state_q <= S_MUL;
          end
        end
        S_MUL: state_q <= S_WAIT_MUL;
        S_WAIT_MUL: begin
          if (mul_done) state_q <= S_WAIT_ACC;
        end
        S_WAIT_ACC: begin
          if (mac_valid) begin
            if (tap_q == ($clog2(NTAP))'(NTAP - 1)) begin
              y_valid <= 1'b1;
              y_ch    <= ch_q;
              y_data  <= mac_acc;
              tap_q   <= '0;
              if (ch_q == ($clog2(NCH))'(NCH - 1)) begin
                state_q <= S_IDLE;
              end else begin
                ch_q    <= ch_q + 1'b1;
                state_q <= S_MUL;
              end
            end else begin
              tap_q   <= tap_q + 1'b1;
              state_q <= S_MUL;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the accumulator result must only arrive while a sum is awaited
  a_mac_valid_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mac_valid |-> (state_q == S_WAIT_ACC));

endmodule
