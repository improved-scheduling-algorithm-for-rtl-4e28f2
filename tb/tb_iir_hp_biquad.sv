// tb_iir_hp_biquad: self-checking testbench of the high-pass filter.
//
// The filter runs with its default parameters (48-bit data, Q30
// coefficients). Every output is compared with an exact model computed here
// in 128-bit integers: y = sat48((B0*x0 + B1*x1 + B2*x2 - A1*y1 - A2*y2) >>> 30),
// with the coefficients recomputed from their decimal values. The stimuli:
//   - a full-scale positive step (the input is 2**47 - 1), whose response
//     must start near 0.966 of full scale, swing negative and settle at the
//     filter's residual DC gain of -0.0044, since a high-pass filter blocks DC;
//   - an alternating +-A sequence at half the sample rate, which must come
//     out with unit gain;
//   - a step from negative to positive full scale, which drives the output
//     into saturation;
//   - random samples.
// It also checks the handshake: the output on the fifth edge after the
// accepting one, oDone set there and cleared by the next accepted sample,
// and iNewValue ignored while the filter is busy.
module tb_iir_hp_biquad;

  localparam int W = 48;
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
  int saturations = 0;
  int ignored = 0;

  iir_hp_biquad dut (
    .iCLK(iCLK), .iRESET_N(iRESET_N), .iNewValue(iNewValue), .iIIR_RX(iIIR_RX),
    .oDone(oDone), .oIIR_TX(oIIR_TX)
  );

  always #5 iCLK = ~iCLK;

  initial begin
    repeat (200000) @(posedge iCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Coefficients from their decimal values, rounded to Q30.
  function automatic wide_t q30(input real v);
    return wide_t'(longint'($floor(v * 1073741824.0 + 0.5)));
  endfunction

  wide_t cB0, cB1, cB2, cA1, cA2;
  wide_t x1 = 0, x2 = 0, y1 = 0, y2 = 0;

  function automatic data_t model(input data_t x);
    wide_t acc, y;
    acc = cB0 * wide_t'(x) + cB1 * x1 + cB2 * x2 - cA1 * y1 - cA2 * y2;
    y = acc >>> 30;
    if (y > wide_t'(X_MAX)) begin y = wide_t'(X_MAX); saturations++; end
    else if (y < wide_t'(X_MIN)) begin y = wide_t'(X_MIN); saturations++; end
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

  data_t last_y;

  task automatic one_sample(input data_t x, input bit poke_busy);
    int cycles;
    data_t e;
    @(negedge iCLK);
    iNewValue = 1'b1;
    iIIR_RX = x;
    @(negedge iCLK);
    iNewValue = 1'b0;
    iIIR_RX = {$urandom, $urandom};
    check(!oDone, "oDone cleared by the accepted sample");
    cycles = 0;
    while (!oDone && cycles < 20) begin
      iNewValue = poke_busy && (cycles == 2);
      if (iNewValue) ignored++;
      @(negedge iCLK);
      cycles++;
    end
    iNewValue = 1'b0;
    check(cycles == 5, $sformatf("latency %0d", cycles));
    e = model(x);
    check(oIIR_TX == e, $sformatf("x=%0d y=%0d expected=%0d", x, oIIR_TX, e));
    last_y = oIIR_TX;
    @(negedge iCLK);
    check(oDone, "oDone holds while idle");
  endtask

  initial begin
    data_t peak_neg;
    data_t a;
    cB0 = q30(0.96645); cB1 = q30(-1.93291); cB2 = q30(0.96645);
    cA1 = q30(-1.93178); cA2 = q30(0.93403);
    repeat (3) @(posedge iCLK);
    @(negedge iCLK) iRESET_N = 1'b1;

    // Full-scale step.
    one_sample(X_MAX, 1'b0);
    check(last_y > data_t'(X_MAX / 100 * 95) && last_y < X_MAX, "step: first output near 0.966");
    peak_neg = '0;
    for (int i = 0; i < 1500; i++) begin
      one_sample(X_MAX, (i % 7) == 3);
      if (last_y < peak_neg) peak_neg = last_y;
    end
    check(peak_neg < 0, "step: response swings negative");
    // The rounded coefficients leave a DC gain of
    // (B0+B1+B2)/(1+A1+A2) = -0.00001/0.00225 = -0.0044 (-47 dB).
    check(last_y < -(X_MAX / 1000 * 4) && last_y > -(X_MAX / 1000 * 5),
          $sformatf("step: DC blocked to -0.0044, last y=%0d", last_y));

    // Half the sample rate: unit gain.
    a = data_t'(48'sd1 <<< 40);
    for (int i = 0; i < 400; i++) one_sample((i % 2) ? -a : a, 1'b0);
    check(last_y < -(a - a / 100) && last_y > -(a + a / 100),
          $sformatf("Nyquist gain: y=%0d for x=-%0d", last_y, a));

    // Negative to positive full scale: saturates.
    for (int i = 0; i < 200; i++) one_sample(X_MIN, 1'b0);
    for (int i = 0; i < 5; i++) one_sample(X_MAX, 1'b0);
    check(saturations > 0, "output saturation reached");

    // Random.
    for (int i = 0; i < 500; i++) one_sample({$urandom, $urandom}, ($urandom_range(0, 4) == 0));
    check(ignored > 0, "iNewValue while busy was tried");
    $display("saturations=%0d ignored=%0d", saturations, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
