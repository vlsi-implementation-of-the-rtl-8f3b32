// approximator: evaluates the Farrow polynomial
//     y[m] = sum_{l=0}^{NUM_FILT-1} x~_l * mu^l
// in Horner form, y = ((x~_3 * mu + x~_2) * mu + x~_1) * mu + x~_0, as the
// chain of multipliers and adders of the Farrow structure. The x~_l come from
// the ring buffers (already selected by ctl) and mu from the ORC.
//
// Arithmetic: each product with mu (an unsigned ISP_W-bit fraction) is
// shifted right arithmetically by ISP_W bits (truncation), the sum is
// saturated to SIG_W bits. The result is registered on tgt_clk, so y_out
// belongs to the mu and ctl of the previous tgt_clk cycle (latency one
// tgt_clk cycle). The document fixes the structure and the widths; the
// truncation, saturation and the output register are this design's choices.
//
// Interface: tgt_clk, rst_n (asynchronous, active low), c[l] (signed), mu;
// y_out (signed, registered).
module approximator #(
  parameter int SIG_W    = farrow_pkg::SIG_W,
  parameter int ISP_W    = farrow_pkg::ISP_W,
  parameter int NUM_FILT = farrow_pkg::NUM_FILT
) (
  input  logic                    tgt_clk,
  input  logic                    rst_n,
  input  logic signed [SIG_W-1:0] c [NUM_FILT],
  input  logic [ISP_W-1:0]        mu,
  output logic signed [SIG_W-1:0] y_out
);

  localparam int P_W = SIG_W + ISP_W + 2;
  // largest and smallest SIG_W-bit values, sign-extended to P_W bits
  localparam logic signed [P_W-1:0] SAT_MAX = P_W'({1'b0, {(SIG_W-1){1'b1}}});
  localparam logic signed [P_W-1:0] SAT_MIN = ~SAT_MAX;

  logic signed [SIG_W-1:0] y_comb;

  always_comb begin
    logic signed [SIG_W-1:0] v;
    logic signed [P_W-1:0]   p;
    v = c[NUM_FILT-1];
    for (int l = NUM_FILT - 2; l >= 0; l--) begin
      p = ((P_W'(v) * signed'(P_W'({1'b0, mu}))) >>> ISP_W) + P_W'(c[l]);
      if (p > SAT_MAX)      v = SAT_MAX[SIG_W-1:0];
      else if (p < SAT_MIN) v = SAT_MIN[SIG_W-1:0];
      else                  v = p[SIG_W-1:0];
    end
    y_comb = v;
  end

  always_ff @(posedge tgt_clk or negedge rst_n) begin
    if (!rst_n) y_out <= '0;
    else        y_out <= y_comb;
  end

endmodule
