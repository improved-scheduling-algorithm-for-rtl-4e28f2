// tb_iir_lowpower_top: end-to-end testbench of the top level at its default
// parameters.
//
// A 10 MHz clock (100 ns period) runs the three filters at once:
//   - the scheduled first-order filter and the one-clock behavioural filter
//     get the same random samples; both outputs are compared with an integer
//     model of the filter equations and with each other, and the scheduled
//     filter's latency (output five edges after the accepting edge) is
//     checked. Some strobes are given while the scheduled filter is busy and
//     must be ignored.
//   - the high-pass filter gets a new sample every 127 clocks, about 79 kHz,
//     the sample rate the filter was designed for: a full-scale step, then a
//     negative-to-positive full-scale jump that saturates the output, then
//     random data, each output compared with an exact 128-bit model.
// Every mechanism is counted (scheduled samples, ignored strobes, agreement
// of the scheduled and unshared filters, high-pass samples, saturations) and
// a mechanism that never happened counts as a failure.
module tb_iir_lowpower_top;

  localparam int HPW = 48;
  localparam int HP_PERIOD = 127;  // 10 MHz / 127 = 78.7 kHz
  typedef logic signed [127:0] wide_t;
  typedef logic signed [HPW-1:0] hp_t;

  localparam hp_t X_MAX = {1'b0, {(HPW-1){1'b1}}};
  localparam hp_t X_MIN = {1'b1, {(HPW-1){1'b0}}};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic s_strobe = 1'b0, b_strobe = 1'b0, hp_new_value = 1'b0;
  logic signed [31:0] s_din = '0, b_din = '0;
  logic signed [31:0] s_dout, b_dout;
  logic s_valid, s_busy, b_valid, hp_done;
  hp_t hp_rx = '0;
  hp_t hp_tx;

  int checks = 0;
  int failures = 0;
  int n_sched = 0, n_ignored = 0, n_agree = 0, n_hp = 0, n_sat = 0;

  iir_lowpower_top dut (
    .clk(clk), .rst_n(rst_n),
    .s_strobe(s_strobe), .s_din(s_din), .s_dout(s_dout), .s_valid(s_valid), .s_busy(s_busy),
    .b_strobe(b_strobe), .b_din(b_din), .b_dout(b_dout), .b_valid(b_valid),
    .hp_new_value(hp_new_value), .hp_rx(hp_rx), .hp_done(hp_done), .hp_tx(hp_tx)
  );

  always #50 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---- first-order filter model (default coefficients -512, 256, 512 / 1024)
  int m_d0 = 0, m_d1 = 0;

  function automatic int qm(input int a, input int c);
    return int'((longint'(a) * longint'(c)) / 1024);
  endfunction

  function automatic int model1(input int x);
    int s, y;
    s = x + qm(m_d0, -512);
    y = qm(s, 512) + qm(m_d0, 256) + qm(m_d1, 512);
    m_d0 = m_d1;
    m_d1 = s;
    return y;
  endfunction

  // ---- high-pass model, coefficients from their decimal values in Q30
  wide_t cB0, cB1, cB2, cA1, cA2;
  wide_t x1 = 0, x2 = 0, y1 = 0, y2 = 0;

  function automatic wide_t q30(input real v);
    return wide_t'(longint'($floor(v * 1073741824.0 + 0.5)));
  endfunction

  function automatic hp_t model_hp(input hp_t x);
    wide_t acc, y;
    acc = cB0 * wide_t'(x) + cB1 * x1 + cB2 * x2 - cA1 * y1 - cA2 * y2;
    y = acc >>> 30;
    if (y > wide_t'(X_MAX)) begin y = wide_t'(X_MAX); n_sat++; end
    else if (y < wide_t'(X_MIN)) begin y = wide_t'(X_MIN); n_sat++; end
    x2 = x1; x1 = wide_t'(x);
    y2 = y1; y1 = y;
    return hp_t'(y);
  endfunction

  task automatic sched_thread();
    for (int i = 0; i < 400; i++) begin
      int x, e, cycles;
      bit poke;
      x = (i == 0) ? 20000 : int'($urandom_range(0, 2000000)) - 1000000;
      poke = ($urandom_range(0, 3) == 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      @(negedge clk);
      s_strobe = 1'b1; s_din = x;
      b_strobe = 1'b1; b_din = x;
      @(negedge clk);
      s_strobe = 1'b0; s_din = $urandom;
      b_strobe = 1'b0; b_din = $urandom;
      e = model1(x);
      check(b_valid && b_dout == e, $sformatf("behav x=%0d y=%0d expected=%0d", x, b_dout, e));
      cycles = 0;
      while (!s_valid && cycles < 20) begin
        s_strobe = poke && (cycles == 3);
        if (s_strobe) begin
          check(s_busy, "strobe given while busy");
          n_ignored++;
        end
        @(negedge clk);
        cycles++;
      end
      s_strobe = 1'b0;
      check(cycles == 5, $sformatf("scheduled latency %0d", cycles));
      check(s_dout == e, $sformatf("sched x=%0d y=%0d expected=%0d", x, s_dout, e));
      check(s_dout == b_dout, "scheduled and unshared filters agree");
      if (s_dout == b_dout) n_agree++;
      n_sched++;
    end
  endtask

  task automatic hp_sample(input hp_t x);
    hp_t e;
    int cycles;
    @(negedge clk);
    hp_new_value = 1'b1; hp_rx = x;
    @(negedge clk);
    hp_new_value = 1'b0; hp_rx = {$urandom, $urandom};
    cycles = 0;
    while (!hp_done && cycles < 20) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 5, $sformatf("high-pass latency %0d", cycles));
    e = model_hp(x);
    check(hp_tx == e, $sformatf("hp x=%0d y=%0d expected=%0d", x, hp_tx, e));
    n_hp++;
    repeat (HP_PERIOD - cycles - 2) @(negedge clk);
  endtask

  task automatic hp_thread();
    hp_t first;
    for (int i = 0; i < 120; i++) begin
      hp_sample(X_MAX);
      if (i == 0) first = hp_tx;
    end
    check(first > X_MAX / 100 * 95, "high-pass step starts near 0.966 of full scale");
    check(hp_tx < first / 4, "high-pass step decays");
    for (int i = 0; i < 60; i++) hp_sample(X_MIN);
    for (int i = 0; i < 3; i++) hp_sample(X_MAX);
    for (int i = 0; i < 100; i++) hp_sample({$urandom, $urandom} >>> 4);
  endtask

  initial begin
    cB0 = q30(0.96645); cB1 = q30(-1.93291); cB2 = q30(0.96645);
    cA1 = q30(-1.93178); cA2 = q30(0.93403);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      sched_thread();
      hp_thread();
    join
    $display("scheduled=%0d ignored_strobes=%0d agree=%0d highpass=%0d saturations=%0d",
             n_sched, n_ignored, n_agree, n_hp, n_sat);
    check(n_sched > 0, "scheduled filter ran");
    check(n_ignored > 0, "strobe while busy happened");
    check(n_agree > 0, "scheduled and unshared filters compared");
    check(n_hp > 0, "high-pass filter ran");
    check(n_sat > 0, "high-pass saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
