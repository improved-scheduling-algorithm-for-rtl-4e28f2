// iir_lowpower_top: the resource-scheduled IIR filters side by side.
//
// Three filters share the clock and the reset and otherwise have ports of
// their own:
//
//   s_*   iir_sched_filter: the first-order filter of the single-assignment
//         form, scheduled over five clock steps onto two multipliers and one
//         adder (one sample per six clocks).
//   b_*   iir_behav: the same filter computed in one clock with all its
//         multipliers and adders (ORDER = 1 here), one sample per clock.
//   hp_*  iir_hp_biquad: the high-pass filter with the document's
//         coefficients, 48-bit data, Q30 coefficients, four guard bits,
//         scheduled the same way onto two multipliers and one adder.
//
// With the same input sequence, s_dout and b_dout carry the same outputs, so
// the scheduled datapath can be compared with the unshared one on the same
// chip. Each filter's handshake is described in its own module: a one-clock
// strobe with the input sample, a valid/done flag with the output. Reset is
// asynchronous and active low.
module iir_lowpower_top #(
  parameter int unsigned DATA_W         = 32,
  parameter int unsigned FRAC           = 10,
  parameter int unsigned HP_INPUT_WIDTH = 48,
  parameter int unsigned HP_QFORMAT     = 30
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // scheduled first-order filter
  input  logic                             s_strobe,
  input  logic signed [DATA_W-1:0]         s_din,
  output logic signed [DATA_W-1:0]         s_dout,
  output logic                             s_valid,
  output logic                             s_busy,
  // one-clock behavioural filter
  input  logic                             b_strobe,
  input  logic signed [DATA_W-1:0]         b_din,
  output logic signed [DATA_W-1:0]         b_dout,
  output logic                             b_valid,
  // high-pass filter
  input  logic                             hp_new_value,
  input  logic signed [HP_INPUT_WIDTH-1:0] hp_rx,
  output logic                             hp_done,
  output logic signed [HP_INPUT_WIDTH-1:0] hp_tx
);

  iir_sched_filter #(
    .DATA_W(DATA_W),
    .FRAC  (FRAC)
  ) u_sched (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(s_strobe),
    .din   (s_din),
    .dout  (s_dout),
    .valid (s_valid),
    .busy  (s_busy)
  );

  iir_behav #(
    .DATA_W(DATA_W),
    .FRAC  (FRAC),
    .ORDER (1)
  ) u_behav (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(b_strobe),
    .din   (b_din),
    .dout  (b_dout),
    .valid (b_valid)
  );

  iir_hp_biquad #(
    .INPUT_WIDTH(HP_INPUT_WIDTH),
    .QFORMAT    (HP_QFORMAT)
  ) u_hp (
    .iCLK     (clk),
    .iRESET_N (rst_n),
    .iNewValue(hp_new_value),
    .iIIR_RX  (hp_rx),
    .oDone    (hp_done),
    .oIIR_TX  (hp_tx)
  );

endmodule
