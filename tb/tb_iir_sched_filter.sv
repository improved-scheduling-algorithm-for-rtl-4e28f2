// tb_iir_sched_filter: self-checking testbench of the scheduled first-order
// IIR filter (controller and datapath together).
//
// Random samples are strobed in, at the highest rate and with random gaps,
// and every output is compared with a 64-bit integer model of the filter
// equations. The testbench also checks the timing: the output appears on the
// fifth rising edge after the one that accepts the strobe (valid one clock
// later), busy lasts five clocks, and a strobe given while busy is ignored
// and leaves the filter state alone.
module tb_iir_sched_filter;

  localparam int DATA_W = 32;
  localparam int CB0 = 612;
  localparam int CA0 = -250;
  localparam int CA1 = 777;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic strobe = 1'b0;
  logic signed [DATA_W-1:0] din = '0;
  logic signed [DATA_W-1:0] dout;
  logic valid, busy;

  int checks = 0;
  int failures = 0;
  int ignored = 0;

  iir_sched_filter #(.DATA_W(DATA_W), .FRAC(10), .COEFFB0(CB0), .COEFFA0(CA0),
                     .COEFFA1(CA1)) dut (
    .clk(clk), .rst_n(rst_n), .strobe(strobe), .din(din), .dout(dout),
    .valid(valid), .busy(busy)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_d0 = 0;
  int m_d1 = 0;

  function automatic int qm(input int a, input int c);
    longint p;
    p = longint'(a) * longint'(c);
    return int'(p / 1024);
  endfunction

  function automatic int model(input int x);
    int s, y;
    s = x + qm(m_d0, CB0);
    y = qm(s, CA1) + qm(m_d0, CA0) + qm(m_d1, CA1);
    m_d0 = m_d1;
    m_d1 = s;
    return y;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Strobe one sample; optionally strobe a junk sample while busy.
  task automatic one_sample(input int x, input int gap, input bit poke_busy);
    int expect_y;
    int cycles;
    repeat (gap) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle before strobe");
    strobe = 1'b1;
    din = x;
    @(posedge clk);  // the accepting edge
    @(negedge clk);
    strobe = 1'b0;
    din = $urandom;
    cycles = 0;
    while (!valid && cycles < 20) begin
      if (poke_busy && cycles == 2) begin
        check(busy, "busy while computing");
        strobe = 1'b1;
        ignored++;
      end else begin
        strobe = 1'b0;
      end
      @(negedge clk);
      cycles++;
    end
    strobe = 1'b0;
    // valid is seen at the negedge after the fifth posedge after acceptance
    check(cycles == 5, $sformatf("latency: valid %0d clocks after accept+1", cycles));
    expect_y = model(x);
    check(dout == expect_y, $sformatf("x=%0d dout=%0d expected=%0d", x, dout, expect_y));
    check(!busy, "idle with valid");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    one_sample(1 << 12, 0, 1'b0);
    for (int i = 0; i < 12; i++) one_sample(0, 0, 1'b0);
    for (int i = 0; i < 300; i++)
      one_sample(int'($urandom_range(0, 200000)) - 100000, int'($urandom_range(0, 2)),
                 ($urandom_range(0, 3) == 0));
    check(ignored > 0, "a strobe while busy was tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
