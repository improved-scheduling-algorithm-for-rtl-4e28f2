// iir_behav: IIR filter of generic order, all operations in one clock.
//
// This is the filter's behavioural description carried over to hardware
// without any resource sharing. On each strobe it computes
//
//   input_sum  = input + sum_{j=0}^{ORDER-1} delay(j)*coeffb(j)/2**FRAC
//   output_sum = input_sum*coeffa(ORDER)/2**FRAC
//              + sum_{k=0}^{ORDER} delay(k)*coeffa(k)/2**FRAC
//   delay(l)  <= delay(l+1) for l < ORDER;  delay(ORDER) <= input_sum
//
// with ORDER multipliers on the feedback side, ORDER+2 on the output side and
// a chain of adders, all combinational between the delay registers and the
// output register. Every product is divided by 2**FRAC separately, with
// truncation toward zero (iir_qmul). The formulas, the order of the
// coefficient lists and the 1024 divisor are the description's; the widths,
// the wrap-around on overflow, the reset and the default order and
// coefficients are this design's.
//
// With ORDER = 1 it computes exactly what the five-step scheduled filter
// (iir_sched_filter) computes, in one clock with four multipliers and three
// adders instead of five clocks with two and one.
//
// Interface: `din` is sampled with a one-clock `strobe`; `dout` is loaded on
// the same rising edge and `valid` is high in the clock that follows, so a
// sample can be accepted every clock. Reset is asynchronous, active low, and
// clears the delay line and the output.
module iir_behav #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned FRAC   = 10,
  parameter int unsigned ORDER  = 1,
  // coeffa(k) is COEFFA[32*k +: 32], coeffb(j) is COEFFB[32*j +: 32].
  parameter logic [32*(ORDER+1)-1:0] COEFFA = {32'sd512, 32'sd256},
  parameter logic [32*ORDER-1:0]     COEFFB = {-32'sd512}
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     strobe,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] dout,
  output logic                     valid
);

  typedef logic signed [DATA_W-1:0] data_t;

  data_t delay_q [ORDER+1];
  data_t fb_p    [ORDER];      // delay(j)*coeffb(j)
  data_t ff_p    [ORDER+1];    // delay(k)*coeffa(k)
  data_t top_p;                // input_sum*coeffa(ORDER)
  data_t input_sum, output_sum;
  data_t out_q;

  for (genvar j = 0; j < ORDER; j++) begin : g_fb
    iir_qmul #(.A_W(DATA_W), .B_W(32), .FRAC(FRAC), .OUT_W(DATA_W)) u_mul (
      .a(delay_q[j]), .b(COEFFB[32*j +: 32]), .p(fb_p[j])
    );
  end

  for (genvar k = 0; k <= ORDER; k++) begin : g_ff
    iir_qmul #(.A_W(DATA_W), .B_W(32), .FRAC(FRAC), .OUT_W(DATA_W)) u_mul (
      .a(delay_q[k]), .b(COEFFA[32*k +: 32]), .p(ff_p[k])
    );
  end

  iir_qmul #(.A_W(DATA_W), .B_W(32), .FRAC(FRAC), .OUT_W(DATA_W)) u_top (
    .a(input_sum), .b(COEFFA[32*ORDER +: 32]), .p(top_p)
  );

  always_comb begin
    input_sum = din;
    for (int j = 0; j < int'(ORDER); j++) input_sum = input_sum + fb_p[j];
    output_sum = top_p;
    for (int k = 0; k <= int'(ORDER); k++) output_sum = output_sum + ff_p[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l <= int'(ORDER); l++) delay_q[l] <= '0;
      out_q <= '0;
      valid <= 1'b0;
    end else begin
      valid <= strobe;
      if (strobe) begin
        for (int l = 0; l < int'(ORDER); l++) delay_q[l] <= delay_q[l+1];
        delay_q[ORDER] <= input_sum;
        out_q          <= output_sum;
      end
    end
  end

  assign dout = out_q;

endmodule
