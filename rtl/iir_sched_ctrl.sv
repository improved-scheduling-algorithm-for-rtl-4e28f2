// iir_sched_ctrl: five-step schedule controller of the first-order IIR filter.
//
// The filter's single-assignment form has four multiplications and three
// additions. The schedule maps them onto two multipliers (M1, M2) and one
// adder, with latency five:
//
//   strobe: input -> R1
//   step 1: M1 = delay(0)*coeffb(0) -> R2     M2 = delay(0)*coeffa(0) -> R3
//   step 2: add R1 + R2 -> R4 (input_sum)    M2 = delay(1)*coeffa(1) -> R6
//           delay(0) <= delay(1), delay(1) <= input_sum
//   step 3: M1 = R4*coeffa(1) -> R7
//   step 4: add R7 + R8 -> R10
//   step 5: add R10 + R11 -> output
//
// R3/R6 -> R5/R9 -> R8/R11 is a three-register chain that shifts in steps
// 1 to 4, so a product of M2 reaches the adder three steps after the step
// that made it. The step sequence and the operand of every multiplexer follow the
// schedule; the encoding of the steps, the idle state and the moment of the
// delay-line update are this design's own.
//
// Interface: `strobe` (one clock) starts a sample when the controller is idle
// and is ignored while busy. `ctrl` is the control word of the current step,
// decoded combinationally from the step register. `busy` is high in steps
// 1..5; `done` is high for one clock, in the clock after step 5, when the
// new output is in the datapath's output register. Reset is asynchronous,
// active low.
module iir_sched_ctrl
  import iir_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        strobe,
  output sched_ctrl_t ctrl,
  output logic        busy,
  output logic        done
);

  sched_step_e step_q, step_d;

  always_comb begin
    unique case (step_q)
      ST_IDLE: step_d = strobe ? ST_C1 : ST_IDLE;
      ST_C1:   step_d = ST_C2;
      ST_C2:   step_d = ST_C3;
      ST_C3:   step_d = ST_C4;
      ST_C4:   step_d = ST_C5;
      ST_C5:   step_d = ST_IDLE;
      default: step_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= ST_IDLE;
      done   <= 1'b0;
    end else begin
      step_q <= step_d;
      done   <= (step_q == ST_C5);
    end
  end

  // The sample is captured into R1 on the clock edge that accepts the strobe
  // (one edge earlier than the schedule needs it), so the input only has to
  // be valid together with the strobe.
  always_comb begin
    ctrl = SCHED_CTRL_NOP;
    unique case (step_q)
      ST_IDLE: ctrl.ld_r1 = strobe;
      ST_C1: begin
        ctrl.m1a         = M1A_DELAY0;
        ctrl.m1b         = M1B_COEFFB0;
        ctrl.m2a         = M2A_DELAY0;
        ctrl.m2b         = M2B_COEFFA0;
        ctrl.ld_r2r7     = 1'b1;
        ctrl.ld_r3r6     = 1'b1;
        ctrl.shift_chain = 1'b1;
      end
      ST_C2: begin
        ctrl.adda        = ADDA_R1;
        ctrl.addb        = ADDB_R2R7;
        ctrl.ld_r4r10    = 1'b1;
        ctrl.ld_delay    = 1'b1;
        ctrl.m2a         = M2A_DELAY1;
        ctrl.m2b         = M2B_COEFFA1;
        ctrl.ld_r3r6     = 1'b1;
        ctrl.shift_chain = 1'b1;
      end
      ST_C3: begin
        ctrl.m1a         = M1A_R4R10;
        ctrl.m1b         = M1B_COEFFA1;
        ctrl.ld_r2r7     = 1'b1;
        ctrl.shift_chain = 1'b1;
      end
      ST_C4: begin
        ctrl.adda        = ADDA_R2R7;
        ctrl.addb        = ADDB_R8R11;
        ctrl.ld_r4r10    = 1'b1;
        ctrl.shift_chain = 1'b1;
      end
      ST_C5: begin
        ctrl.adda        = ADDA_R4R10;
        ctrl.addb        = ADDB_R8R11;
        ctrl.ld_out      = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (step_q != ST_IDLE);

  // A sample is never longer than five steps.
  a_len: assert property (@(posedge clk) (step_q == ST_C5) |=> (step_q == ST_IDLE));

endmodule
