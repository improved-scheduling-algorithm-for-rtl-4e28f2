// iir_hp_biquad: high-pass IIR filter on two multipliers and one adder.
//
// The filter is the difference equation
//
//   y[n] = B0*x[n] + B1*x[n-1] + B2*x[n-2] - A1*y[n-1] - A2*y[n-2]
//
// with coefficients in Q(QFORMAT) fixed point. The defaults are the
// high-pass coefficients B0 = B2 = 0.96645, B1 = -1.93291, A1 = -1.93178,
// A2 = 0.93403 rounded to Q30 (value * 2**30): unity gain at half the sample
// rate, a zero pair at DC and a pole pair of radius 0.966 close to it.
//
// Like the scheduled first-order filter, the five multiplications and four
// additions are spread over five clock steps so that two multipliers and one
// adder/subtractor do all the work:
//
//   S1: P1 = B0*x[n]          P2 = B1*x[n-1]
//   S2: ACC = P1 + P2         P1 = B2*x[n-2]   P2 = A1*y[n-1]
//   S3: ACC = ACC + P1        P1 = A2*y[n-2]
//   S4: ACC = ACC - P2
//   S5: ACC - P1 -> y[n];  shift the x and y delay lines
//
// Products are kept at full precision (INPUT_WIDTH + COEF_W bits) and the
// accumulator has GUARD_BITS more, so no partial sum can overflow. The
// result is ACC >>> QFORMAT (truncated toward minus infinity) saturated to
// INPUT_WIDTH bits; the saturated value is also what is fed back as y[n].
// The equation, the coefficient values, the port names, the 48-bit data
// width, the Q30 format and the four guard bits follow the document; the
// step sequence, the full-precision products, truncation, saturation and the
// handshake are this design's own.
//
// Interface: iIIR_RX is sampled on the rising edge of iCLK where iNewValue is
// high and the filter is idle (iNewValue is ignored while busy). oIIR_TX takes
// the new output on the fifth rising edge after that one; oDone rises on that
// same edge and stays high until the next sample is accepted. At most one
// sample every six clocks. iRESET_N is an asynchronous active-low reset that
// clears the delay lines, the output and oDone.
module iir_hp_biquad
  import iir_pkg::*;
#(
  parameter int unsigned INPUT_WIDTH = 48,
  parameter int unsigned QFORMAT     = 30,
  parameter int unsigned COEF_W      = 32,
  parameter int unsigned GUARD_BITS  = 4,
  parameter longint      B0          = 1037717786,
  parameter longint      B1          = -2075446309,
  parameter longint      B2          = 1037717786,
  parameter longint      A1          = -2074232981,
  parameter longint      A2          = 1002907076
) (
  input  logic                          iCLK,
  input  logic                          iRESET_N,
  input  logic                          iNewValue,
  input  logic signed [INPUT_WIDTH-1:0] iIIR_RX,
  output logic                          oDone,
  output logic signed [INPUT_WIDTH-1:0] oIIR_TX
);

  localparam int unsigned PW    = INPUT_WIDTH + COEF_W;
  localparam int unsigned ACC_W = PW + GUARD_BITS;

  typedef logic signed [INPUT_WIDTH-1:0] data_t;
  typedef logic signed [COEF_W-1:0]      coef_t;
  typedef logic signed [PW-1:0]          prod_t;
  typedef logic signed [ACC_W-1:0]       acc_t;

  localparam data_t Y_MAX = {1'b0, {(INPUT_WIDTH-1){1'b1}}};
  localparam data_t Y_MIN = {1'b1, {(INPUT_WIDTH-1){1'b0}}};

  hp_state_e state, state_d;

  // Delay lines: nZX0 = x[n], nZX1 = x[n-1], nZX2 = x[n-2]; nZY1, nZY2 = y.
  data_t nZX0, nZX1, nZX2, nZY1, nZY2;
  prod_t p1, p2;
  acc_t  acc;

  data_t m1_a, m2_a;
  coef_t m1_b, m2_b;
  prod_t m1_p, m2_p;
  acc_t  add_a, add_b, add_s;
  logic  add_sub;
  acc_t  y_full;
  data_t nYOUT;

  always_comb begin
    unique case (state)
      HP_IDLE: state_d = iNewValue ? HP_S1 : HP_IDLE;
      HP_S1:   state_d = HP_S2;
      HP_S2:   state_d = HP_S3;
      HP_S3:   state_d = HP_S4;
      HP_S4:   state_d = HP_S5;
      HP_S5:   state_d = HP_IDLE;
      default: state_d = HP_IDLE;
    endcase
  end

  // Multiplier operand selection.
  always_comb begin
    unique case (state)
      HP_S2:   begin m1_a = nZX2; m1_b = coef_t'(B2); end
      HP_S3:   begin m1_a = nZY2; m1_b = coef_t'(A2); end
      default: begin m1_a = nZX0; m1_b = coef_t'(B0); end
    endcase
    if (state == HP_S2) begin
      m2_a = nZY1; m2_b = coef_t'(A1);
    end else begin
      m2_a = nZX1; m2_b = coef_t'(B1);
    end
    m1_p = prod_t'(m1_a) * prod_t'(m1_b);
    m2_p = prod_t'(m2_a) * prod_t'(m2_b);
  end

  // The single adder/subtractor and the output scaling.
  always_comb begin
    add_a   = (state == HP_S2) ? acc_t'(p1) : acc;
    add_b   = (state == HP_S2 || state == HP_S4) ? acc_t'(p2) : acc_t'(p1);
    add_sub = (state == HP_S4) || (state == HP_S5);
    add_s   = add_sub ? add_a - add_b : add_a + add_b;
    y_full  = add_s >>> QFORMAT;
    if (y_full > acc_t'(Y_MAX))      nYOUT = Y_MAX;
    else if (y_full < acc_t'(Y_MIN)) nYOUT = Y_MIN;
    else                             nYOUT = y_full[INPUT_WIDTH-1:0];
  end

  always_ff @(posedge iCLK or negedge iRESET_N) begin
    if (!iRESET_N) begin
      state   <= HP_IDLE;
      nZX0    <= '0;
      nZX1    <= '0;
      nZX2    <= '0;
      nZY1    <= '0;
      nZY2    <= '0;
      p1      <= '0;
      p2      <= '0;
      acc     <= '0;
      oIIR_TX <= '0;
      oDone   <= 1'b0;
    end else begin
      state <= state_d;
      unique case (state)
        HP_IDLE: if (iNewValue) begin
          nZX0  <= iIIR_RX;
          oDone <= 1'b0;
        end
        HP_S1: begin
          p1 <= m1_p;
          p2 <= m2_p;
        end
        HP_S2: begin
          acc <= add_s;
          p1  <= m1_p;
          p2  <= m2_p;
        end
        HP_S3: begin
          acc <= add_s;
          p1  <= m1_p;
        end
        HP_S4: acc <= add_s;
        HP_S5: begin
          oIIR_TX <= nYOUT;
          oDone   <= 1'b1;
          nZX2    <= nZX1;
          nZX1    <= nZX0;
          nZY2    <= nZY1;
          nZY1    <= nYOUT;
        end
        default: ;
      endcase
    end
  end

endmodule
