// farrow_fir: input latch, tapped delay line and filter bank (C * x) of the
// Farrow structure.
//
// On every rising edge of src_clk the input sample x_in is latched into tap 0
// of a delay line of ORDER+1 registers and the older taps shift by one, so
// that tap n holds x[k-n]. The state vector x is the content of the delay
// line. The NUM_FILT filter outputs x~_l = sum_n C[l][n] * x[k-n] are formed
// combinationally from the registers, so they change only right after a
// src_clk edge and are stable for the rest of the period (the ring buffers
// latch them on the next src_clk edge).
//
// Arithmetic: full-precision sum of products, then an arithmetic shift right
// by COEF_FRAC (truncation towards minus infinity) and saturation to SIG_W
// bits. The document gives the structure (delay line, one FIR filter per row
// of C, four filters of order 8) and the widths; the coefficients it used are
// not reproduced, so COEFFS defaults to cubic Lagrange interpolation (see
// farrow_pkg). Rounding, saturation and reset to zero are this design's own.
//
// Interface: src_clk, rst_n (asynchronous, active low), x_in (signed);
// x_tilde[l] (signed), valid one src_clk cycle after the sample was latched.
module farrow_fir #(
  parameter int                    SIG_W     = farrow_pkg::SIG_W,
  parameter int                    COEF_W    = farrow_pkg::COEF_W,
  parameter int                    COEF_FRAC = farrow_pkg::COEF_FRAC,
  parameter int                    NUM_FILT  = farrow_pkg::NUM_FILT,
  parameter int                    ORDER     = farrow_pkg::ORDER,
  parameter farrow_pkg::coef_mat_t COEFFS    = farrow_pkg::LAGRANGE3_COEFFS
) (
  input  logic                    src_clk,
  input  logic                    rst_n,
  input  logic signed [SIG_W-1:0] x_in,
  output logic signed [SIG_W-1:0] x_tilde [NUM_FILT]
);

  localparam int ACC_W = SIG_W + COEF_W + $clog2(ORDER + 1) + 1;
  // largest and smallest SIG_W-bit values, sign-extended to ACC_W bits
  localparam logic signed [ACC_W-1:0] SAT_MAX = ACC_W'({1'b0, {(SIG_W-1){1'b1}}});
  localparam logic signed [ACC_W-1:0] SAT_MIN = ~SAT_MAX;

  logic signed [SIG_W-1:0] taps [ORDER+1];

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n <= ORDER; n++) taps[n] <= '0;
    end else begin
      taps[0] <= x_in;
      for (int n = 1; n <= ORDER; n++) taps[n] <= taps[n-1];
    end
  end

  always_comb begin
    for (int l = 0; l < NUM_FILT; l++) begin
      logic signed [ACC_W-1:0] acc;
      logic signed [ACC_W-1:0] scaled;
      acc = '0;
      for (int n = 0; n <= ORDER; n++) begin
        acc += ACC_W'(taps[n]) * ACC_W'(signed'(COEF_W'(COEFFS[l][n])));
      end
      scaled = acc >>> COEF_FRAC;
      if (scaled > SAT_MAX)      x_tilde[l] = SAT_MAX[SIG_W-1:0];
      else if (scaled < SAT_MIN) x_tilde[l] = SAT_MIN[SIG_W-1:0];
      else                       x_tilde[l] = scaled[SIG_W-1:0];
    end
  end

endmodule
