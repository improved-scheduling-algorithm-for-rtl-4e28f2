// tb_iir_sched_datapath: self-checking testbench of the shared datapath of the
// scheduled first-order filter.
//
// The testbench plays the controller: for every sample it applies the five
// control words of the schedule by hand (operand selects and register loads)
// and then compares the datapath's output register with a model of the
// filter equations computed here with 64-bit integers, each product divided
// by 1024 with truncation toward zero. It runs with two coefficient sets
// and random inputs, including large ones, so that the feedback, the
// register chain and the delay line are all exercised.
module tb_iir_sched_datapath;
  import iir_pkg::*;

  localparam int DATA_W = 32;
  localparam int CB0 = -700;
  localparam int CA0 = 333;
  localparam int CA1 = -901;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  sched_ctrl_t ctrl = SCHED_CTRL_NOP;
  logic signed [DATA_W-1:0] din = '0;
  logic signed [DATA_W-1:0] dout;

  int checks = 0;
  int failures = 0;

  iir_sched_datapath #(.DATA_W(DATA_W), .FRAC(10), .COEFFB0(CB0), .COEFFA0(CA0),
                       .COEFFA1(CA1)) dut (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .din(din), .dout(dout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state.
  int m_d0 = 0;
  int m_d1 = 0;

  function automatic int qm(input int a, input int c);
    longint p;
    p = longint'(a) * longint'(c);
    return int'(p / 1024);  // SystemVerilog integer division truncates toward zero
  endfunction

  function automatic int model(input int x);
    int s, y;
    s = x + qm(m_d0, CB0);
    y = qm(s, CA1) + qm(m_d0, CA0) + qm(m_d1, CA1);
    m_d0 = m_d1;
    m_d1 = s;
    return y;
  endfunction

  task automatic apply(input sched_ctrl_t c);
    @(negedge clk);
    ctrl = c;
  endtask

  task automatic one_sample(input int x);
    sched_ctrl_t c;
    int expect_y;
    // load R1 with the sample
    @(negedge clk);
    din = x;
    c = SCHED_CTRL_NOP; c.ld_r1 = 1'b1; ctrl = c;
    // step 1
    c = SCHED_CTRL_NOP;
    c.m1a = M1A_DELAY0; c.m1b = M1B_COEFFB0; c.m2a = M2A_DELAY0; c.m2b = M2B_COEFFA0;
    c.ld_r2r7 = 1'b1; c.ld_r3r6 = 1'b1; c.shift_chain = 1'b1;
    apply(c);
    din = $urandom;  // the datapath must not look at din after R1
    // step 2
    c = SCHED_CTRL_NOP;
    c.adda = ADDA_R1; c.addb = ADDB_R2R7; c.ld_r4r10 = 1'b1; c.ld_delay = 1'b1;
    c.m2a = M2A_DELAY1; c.m2b = M2B_COEFFA1; c.ld_r3r6 = 1'b1; c.shift_chain = 1'b1;
    apply(c);
    // step 3
    c = SCHED_CTRL_NOP;
    c.m1a = M1A_R4R10; c.m1b = M1B_COEFFA1; c.ld_r2r7 = 1'b1; c.shift_chain = 1'b1;
    apply(c);
    // step 4
    c = SCHED_CTRL_NOP;
    c.adda = ADDA_R2R7; c.addb = ADDB_R8R11; c.ld_r4r10 = 1'b1; c.shift_chain = 1'b1;
    apply(c);
    // step 5
    c = SCHED_CTRL_NOP;
    c.adda = ADDA_R4R10; c.addb = ADDB_R8R11; c.ld_out = 1'b1;
    apply(c);
    apply(SCHED_CTRL_NOP);
    expect_y = model(x);
    checks++;
    if (dout !== expect_y) begin
      failures++;
      $display("FAIL x=%0d dout=%0d expected=%0d", x, dout, expect_y);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // impulse, then step
    one_sample(1000);
    for (int i = 0; i < 10; i++) one_sample(0);
    for (int i = 0; i < 20; i++) one_sample(-5000);
    // random, small and large
    for (int i = 0; i < 200; i++) one_sample(int'($urandom_range(0, 20000)) - 10000);
    for (int i = 0; i < 100; i++) one_sample(int'($urandom) >>> 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
