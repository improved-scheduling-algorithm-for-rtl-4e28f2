// tb_iir_hp_step_fig: step response of the high-pass filter with the second
// coefficient set of the original simulation.
//
// The original simulation of the 48-bit, Q30 high-pass filter used the
// coefficients B0 = B2 = 1058580589, B1 = -2117171916, A1 = -2116957168,
// A2 = 1043644841 and a full-scale step input of 140737488355327 (2**47 - 1);
// its output had reached -3509187271274. This testbench repeats that run:
// every output is compared with an exact 128-bit model, and the settled
// output must lie within 1 % of that value. The set's DC gain,
// (B0+B1+B2)/(2**30+A1+A2) = -10738/429497 = -0.0250, predicts
// -3.519e12. The response must also start near B0/2**30 = 0.986 of full
// scale and undershoot its final value, as a high-pass step response does.
module tb_iir_hp_step_fig;

  localparam int W = 48;
  localparam longint FB0 = 1058580589;
  localparam longint FB1 = -2117171916;
  localparam longint FB2 = 1058580589;
  localparam longint FA1 = -2116957168;
  localparam longint FA2 = 1043644841;
  localparam longint Y_FINAL = -64'sd3509187271274;
  localparam int N_SAMPLES = 2000;

  typedef logic signed [127:0] wide_t;
  typedef logic signed [W-1:0] data_t;

  localparam data_t X_MAX = {1'b0, {(W-1){1'b1}}};
  localparam data_t X_MIN = {1'b1, {(W-1){1'b0}}};

  logic iCLK = 1'b0;
  logic iRESET_N = 1'b0;
  logic iNewValue = 1'b0;
  data_t iIIR_RX = '0;
  logic oDone;
  data_t oIIR_TX;

  int checks = 0;
  int failures = 0;

  iir_hp_biquad #(.B0(FB0), .B1(FB1), .B2(FB2), .A1(FA1), .A2(FA2)) dut (
    .iCLK(iCLK), .iRESET_N(iRESET_N), .iNewValue(iNewValue), .iIIR_RX(iIIR_RX),
    .oDone(oDone), .oIIR_TX(oIIR_TX)
  );

  always #50 iCLK = ~iCLK;

  initial begin
    repeat (N_SAMPLES * 10 + 100) @(posedge iCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wide_t x1 = 0, x2 = 0, y1 = 0, y2 = 0;

  function automatic data_t model(input data_t x);
    wide_t acc, y;
    acc = wide_t'(FB0) * wide_t'(x) + wide_t'(FB1) * x1 + wide_t'(FB2) * x2
        - wide_t'(FA1) * y1 - wide_t'(FA2) * y2;
    y = acc >>> 30;
    if (y > wide_t'(X_MAX)) y = wide_t'(X_MAX);
    else if (y < wide_t'(X_MIN)) y = wide_t'(X_MIN);
    x2 = x1; x1 = wide_t'(x);
    y2 = y1; y1 = y;
    return data_t'(y);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    data_t e, first, lowest;
    longint diff;
    repeat (3) @(posedge iCLK);
    @(negedge iCLK) iRESET_N = 1'b1;
    lowest = X_MAX;
    for (int n = 0; n < N_SAMPLES; n++) begin
      @(negedge iCLK);
      iNewValue = 1'b1;
      iIIR_RX = X_MAX;
      @(negedge iCLK);
      iNewValue = 1'b0;
      while (!oDone) @(negedge iCLK);
      e = model(X_MAX);
      check(oIIR_TX == e, $sformatf("n=%0d y=%0d expected=%0d", n, oIIR_TX, e));
      if (n == 0) first = oIIR_TX;
      if (oIIR_TX < lowest) lowest = oIIR_TX;
    end
    diff = longint'(oIIR_TX) - Y_FINAL;
    if (diff < 0) diff = -diff;
    $display("first=%0d lowest=%0d final=%0d (recorded %0d)", first, lowest, oIIR_TX, Y_FINAL);
    check(first > X_MAX / 1000 * 985 && first < X_MAX / 1000 * 987, "starts at 0.986 of full scale");
    check(lowest < oIIR_TX, "undershoots the final value");
    check(diff < -(Y_FINAL / 100), "settles within 1 % of the recorded output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
