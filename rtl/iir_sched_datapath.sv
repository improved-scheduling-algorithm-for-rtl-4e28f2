// iir_sched_datapath: shared datapath of the scheduled first-order IIR filter.
//
// Two fixed-point multipliers and one adder compute, over five clock steps,
//
//   input_sum = input + delay(0)*coeffb(0)
//   output    = input_sum*coeffa(1) + delay(0)*coeffa(0) + delay(1)*coeffa(1)
//   delay(0) <= delay(1);  delay(1) <= input_sum
//
// where every product is divided by 2**FRAC (1024 by default). Each operand
// comes through a small multiplexer: M1 takes delay(0) or the fed-back adder
// register times coeffb(0) or coeffa(1); M2 takes delay(0) or delay(1) times
// coeffa(0) or coeffa(1); the adder takes R1, R2/R7 or R4/R10 on the left and
// R2/R7 or R8/R11 on the right. Six registers hold the eleven values that
// cross a clock boundary in the schedule, two values per register where the
// lifetimes do not overlap: R1, R2/R7 (after M1), R3/R6 -> R5/R9 -> R8/R11
// (a chain after M2) and R4/R10 (after the adder). This structure is the
// document's; the delay registers, which its datapath drawing leaves out,
// and the output register are this design's.
//
// Interface: `ctrl` (from iir_sched_ctrl) selects operands and enables the
// register loads of the current step; everything loads on the rising clock
// edge. `dout` is the output register, loaded in step 5. Coefficients are
// parameters, as in the description's generic list. Data are DATA_W-bit two's
// complement and wrap on overflow. Reset (asynchronous, active low) clears all
// registers, so the filter starts from a zero state.
module iir_sched_datapath
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
  input  sched_ctrl_t              ctrl,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] dout
);

  typedef logic signed [DATA_W-1:0] data_t;

  data_t r1, r2r7, r3r6, r5r9, r8r11, r4r10;
  data_t d0_q, d1_q, out_q;

  data_t m1_a, m2_a, m1_p, m2_p;
  logic signed [31:0] m1_b, m2_b;
  data_t add_a, add_b, add_s;

  // Operand multiplexers.
  always_comb begin
    m1_a = (ctrl.m1a == M1A_R4R10)   ? r4r10 : d0_q;
    m1_b = (ctrl.m1b == M1B_COEFFA1) ? 32'(COEFFA1) : 32'(COEFFB0);
    m2_a = (ctrl.m2a == M2A_DELAY1)  ? d1_q : d0_q;
    m2_b = (ctrl.m2b == M2B_COEFFA1) ? 32'(COEFFA1) : 32'(COEFFA0);
    unique case (ctrl.adda)
      ADDA_R2R7:  add_a = r2r7;
      ADDA_R4R10: add_a = r4r10;
      default:    add_a = r1;
    endcase
    add_b = (ctrl.addb == ADDB_R8R11) ? r8r11 : r2r7;
    add_s = add_a + add_b;
  end

  iir_qmul #(.A_W(DATA_W), .B_W(32), .FRAC(FRAC), .OUT_W(DATA_W)) u_m1 (
    .a(m1_a), .b(m1_b), .p(m1_p)
  );

  iir_qmul #(.A_W(DATA_W), .B_W(32), .FRAC(FRAC), .OUT_W(DATA_W)) u_m2 (
    .a(m2_a), .b(m2_b), .p(m2_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1    <= '0;
      r2r7  <= '0;
      r3r6  <= '0;
      r5r9  <= '0;
      r8r11 <= '0;
      r4r10 <= '0;
      d0_q  <= '0;
      d1_q  <= '0;
      out_q <= '0;
    end else begin
      if (ctrl.ld_r1)    r1   <= din;
      if (ctrl.ld_r2r7)  r2r7 <= m1_p;
      if (ctrl.ld_r3r6)  r3r6 <= m2_p;
      if (ctrl.shift_chain) begin
        r5r9  <= r3r6;
        r8r11 <= r5r9;
      end
      if (ctrl.ld_r4r10) r4r10 <= add_s;
      if (ctrl.ld_delay) begin
        d0_q <= d1_q;
        d1_q <= add_s;
      end
      if (ctrl.ld_out)   out_q <= add_s;
    end
  end

  assign dout = out_q;

endmodule
