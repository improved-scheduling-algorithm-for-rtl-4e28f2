// iir_sched_filter: first-order IIR filter scheduled onto two multipliers and
// one adder.
//
// Each sample runs the filter's single-assignment form,
//
//   input_sum = input + delay(0)*coeffb(0)/2**FRAC
//   output    = input_sum*coeffa(1)/2**FRAC + delay(0)*coeffa(0)/2**FRAC
//             + delay(1)*coeffa(1)/2**FRAC
//   delay(0) <= delay(1);  delay(1) <= input_sum
//
// over five clock steps: iir_sched_ctrl steps through the schedule and
// iir_sched_datapath holds the shared multipliers, adder, multiplexers and
// registers. Computed all at once, the same formulas take four multipliers
// and three adders; here two multipliers and one adder are shared, and six
// registers hold the values that cross from one step to the next.
//
// Interface: present `din` with a one-clock `strobe` while `busy` is low (a
// strobe while busy is ignored). `dout` changes on the fifth rising edge after
// the one that samples the strobe, and `valid` is high for the clock that
// follows. The next strobe can be sampled on the edge after that, so samples
// can follow each other every six clocks. Coefficients are parameters, with integer values
// carrying FRAC fraction bits. Reset is asynchronous and active low.
module iir_sched_filter
  import iir_pkg::*;
#(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned FRAC    = 10,
  parameter int          COEFFB0 = -512,
  parameter int          COEFFA0 = 256,
  parameter int          COEFFA1 = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     strobe,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] dout,
  output logic                     valid,
  output logic                     busy
);

  sched_ctrl_t ctrl;

  iir_sched_ctrl u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .strobe(strobe),
    .ctrl  (ctrl),
    .busy  (busy),
    .done  (valid)
  );

  iir_sched_datapath #(
    .DATA_W (DATA_W),
    .FRAC   (FRAC),
    .COEFFB0(COEFFB0),
    .COEFFA0(COEFFA0),
    .COEFFA1(COEFFA1)
  ) u_dp (
    .clk   (clk),
    .rst_n (rst_n),
    .ctrl  (ctrl),
    .din   (din),
    .dout  (dout)
  );

endmodule
