// tb_iir_sched_ctrl: self-checking testbench of the five-step schedule
// controller.
//
// For a series of strobes, some spaced out and some back to back, it follows
// the controller step by step and compares the control word with the
// schedule written out here independently: which multiplexer input each
// multiplier and the adder take and which registers load in steps 1..5.
// It checks that busy covers exactly the five steps, that done is a single
// clock right after step 5, and that a strobe while busy starts nothing.
module tb_iir_sched_ctrl;
  import iir_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        strobe = 1'b0;
  sched_ctrl_t ctrl;
  logic        busy, done;

  int checks = 0;
  int failures = 0;

  iir_sched_ctrl dut (.clk(clk), .rst_n(rst_n), .strobe(strobe), .ctrl(ctrl),
                      .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Expected control word of schedule step s (1..5); the muxes are only
  // compared where the step uses them.
  task automatic check_step(input int s);
    unique case (s)
      1: begin
        check(ctrl.m1a == M1A_DELAY0 && ctrl.m1b == M1B_COEFFB0, "s1 M1 operands");
        check(ctrl.m2a == M2A_DELAY0 && ctrl.m2b == M2B_COEFFA0, "s1 M2 operands");
        check(ctrl.ld_r2r7 && ctrl.ld_r3r6 && ctrl.shift_chain, "s1 loads");
        check(!ctrl.ld_r4r10 && !ctrl.ld_out && !ctrl.ld_delay && !ctrl.ld_r1, "s1 no adder");
      end
      2: begin
        check(ctrl.adda == ADDA_R1 && ctrl.addb == ADDB_R2R7, "s2 adder operands");
        check(ctrl.m2a == M2A_DELAY1 && ctrl.m2b == M2B_COEFFA1, "s2 M2 operands");
        check(ctrl.ld_r4r10 && ctrl.ld_delay && ctrl.ld_r3r6 && ctrl.shift_chain, "s2 loads");
        check(!ctrl.ld_r2r7 && !ctrl.ld_out, "s2 no M1 / out");
      end
      3: begin
        check(ctrl.m1a == M1A_R4R10 && ctrl.m1b == M1B_COEFFA1, "s3 M1 operands");
        check(ctrl.ld_r2r7 && ctrl.shift_chain, "s3 loads");
        check(!ctrl.ld_r4r10 && !ctrl.ld_r3r6 && !ctrl.ld_out && !ctrl.ld_delay, "s3 no others");
      end
      4: begin
        check(ctrl.adda == ADDA_R2R7 && ctrl.addb == ADDB_R8R11, "s4 adder operands");
        check(ctrl.ld_r4r10 && ctrl.shift_chain, "s4 loads");
        check(!ctrl.ld_r2r7 && !ctrl.ld_r3r6 && !ctrl.ld_out && !ctrl.ld_delay, "s4 no others");
      end
      5: begin
        check(ctrl.adda == ADDA_R4R10 && ctrl.addb == ADDB_R8R11, "s5 adder operands");
        check(ctrl.ld_out, "s5 output load");
        check(!ctrl.ld_r2r7 && !ctrl.ld_r3r6 && !ctrl.ld_r4r10 && !ctrl.shift_chain
              && !ctrl.ld_delay, "s5 no others");
      end
      default: ;
    endcase
  endtask

  // One sample: strobe, then five steps; optional strobe in a busy step.
  task automatic run_sample(input int gap, input int busy_strobe_step);
    repeat (gap) begin
      @(negedge clk);
      check(!busy && !ctrl.ld_r2r7 && !ctrl.ld_r4r10 && !ctrl.ld_out, "idle is quiet");
    end
    @(negedge clk);
    strobe = 1'b1;
    #1 check(ctrl.ld_r1, "R1 loads with the accepted strobe");
    for (int s = 1; s <= 5; s++) begin
      @(negedge clk);
      strobe = (s == busy_strobe_step);
      check(busy, $sformatf("busy in step %0d", s));
      check(!done, $sformatf("no done in step %0d", s));
      check(!ctrl.ld_r1, "R1 holds while busy");
      check_step(s);
    end
    @(negedge clk);
    strobe = 1'b0;
    check(!busy, "idle after step 5");
    check(done, "done after step 5");
    @(negedge clk);
    check(!done, "done lasts one clock");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_sample(2, 0);
    run_sample(0, 3);
    run_sample(0, 1);
    run_sample(4, 5);
    for (int i = 0; i < 20; i++) run_sample(int'($urandom_range(0, 3)), int'($urandom_range(0, 5)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
