// tb_iir_behav: self-checking testbench of the one-clock generic-order IIR
// filter.
//
// Two instances run side by side: one with the module's defaults (order 1)
// and one of order 3 with coefficients chosen here. Both get random samples,
// mostly one per clock and sometimes with gaps, and their outputs are
// compared with a 64-bit integer model of the behavioural equations (each
// product divided by 1024, truncated toward zero). The testbench also checks
// that valid follows each strobe by exactly one clock.
module tb_iir_behav;

  localparam int N3 = 3;
  localparam int CA3 [N3+1] = '{120, -300, 200, 410};
  localparam int CB3 [N3]   = '{-150, 90, 260};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic strobe = 1'b0;
  logic signed [31:0] din = '0;
  logic signed [31:0] dout1, dout3;
  logic valid1, valid3;

  int checks = 0;
  int failures = 0;

  iir_behav dut1 (
    .clk(clk), .rst_n(rst_n), .strobe(strobe), .din(din), .dout(dout1), .valid(valid1)
  );

  iir_behav #(
    .ORDER (N3),
    .COEFFA({32'(CA3[3]), 32'(CA3[2]), 32'(CA3[1]), 32'(CA3[0])}),
    .COEFFB({32'(CB3[2]), 32'(CB3[1]), 32'(CB3[0])})
  ) dut3 (
    .clk(clk), .rst_n(rst_n), .strobe(strobe), .din(din), .dout(dout3), .valid(valid3)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The defaults of iir_behav, written out: coeffa = {256, 512}, coeffb = {-512}.
  int d1 [2];
  int d3 [N3+1];

  function automatic int qm(input int a, input int c);
    return int'((longint'(a) * longint'(c)) / 1024);
  endfunction

  function automatic int model1(input int x);
    int s, y;
    s = x + qm(d1[0], -512);
    y = qm(s, 512) + qm(d1[0], 256) + qm(d1[1], 512);
    d1[0] = d1[1];
    d1[1] = s;
    return y;
  endfunction

  function automatic int model3(input int x);
    int s, y;
    s = x;
    for (int j = 0; j < N3; j++) s += qm(d3[j], CB3[j]);
    y = qm(s, CA3[N3]);
    for (int k = 0; k <= N3; k++) y += qm(d3[k], CA3[k]);
    for (int l = 0; l < N3; l++) d3[l] = d3[l+1];
    d3[N3] = s;
    return y;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  int e1, e3;
  bit pending = 1'b0;

  initial begin
    foreach (d1[i]) d1[i] = 0;
    foreach (d3[i]) d3[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      bit s;
      int x;
      s = (i < 5) ? 1'b1 : ($urandom_range(0, 4) != 0);
      x = (i == 0) ? 3000 : (i < 5 ? 0 : int'($urandom_range(0, 100000)) - 50000);
      strobe = s;
      din = x;
      @(negedge clk);
      // outputs of the strobe just taken
      check(valid1 == s && valid3 == s, "valid one clock after strobe");
      if (s) begin
        e1 = model1(x);
        e3 = model3(x);
        check(dout1 == e1, $sformatf("order 1: x=%0d dout=%0d expected=%0d", x, dout1, e1));
        check(dout3 == e3, $sformatf("order 3: x=%0d dout=%0d expected=%0d", x, dout3, e3));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
