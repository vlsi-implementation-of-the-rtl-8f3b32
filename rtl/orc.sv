// orc: output ring controller (read side of the ring buffers).
//
// Holds the inter-sample position mu as an unsigned MUSTEP_W-bit fraction and
// updates it on every rising edge of tgt_clk by
//     mu_m = (mu_{m-1} + mu_step) mod 1,
// the recursion of the Farrow interpolator with mu_0 = 0 after reset. A carry
// out of the addition (mu_m < mu_{m-1}) means that the next source sample is
// due: the enable adv is then high and the modulo-RB_DEPTH read address ctl
// advances at the same edge (in the document a clock-gating cell gates the
// counter's clock with this enable; here it is a clock enable). The
// approximator gets only the ISP_W most significant bits of mu; the full
// MUSTEP_W bits are kept in the accumulator so that the read address keeps
// pace with the write address.
//
// The document states the wrap condition once as "mu_{m-1} + mu_step > 1"
// and once as "mu_m < mu_{m-1}"; they differ only when the sum is exactly 1,
// and this design follows the second (a sum of exactly 1 wraps to 0 and
// advances ctl), which yields the same interpolation instant.
//
// Interface: tgt_clk, rst_n (asynchronous, active low), mu_step; mu, ctl, adv,
// all registered (valid right after the tgt_clk edge of sample m).
module orc #(
  parameter int ISP_W    = farrow_pkg::ISP_W,
  parameter int MUSTEP_W = farrow_pkg::MUSTEP_W,
  parameter int RB_DEPTH = farrow_pkg::RB_DEPTH,
  parameter int ADDR_W   = farrow_pkg::ADDR_W
) (
  input  logic                tgt_clk,
  input  logic                rst_n,
  input  logic [MUSTEP_W-1:0] mu_step,
  output logic [ISP_W-1:0]    mu,
  output logic [ADDR_W-1:0]   ctl,
  output logic                adv
);

  logic [MUSTEP_W-1:0] mu_acc;
  logic [MUSTEP_W:0]   sum;
  logic                wrap;

  assign sum  = {1'b0, mu_acc} + {1'b0, mu_step};
  assign wrap = sum[MUSTEP_W];

  always_ff @(posedge tgt_clk or negedge rst_n) begin
    if (!rst_n) begin
      mu_acc <= '0;
      adv    <= 1'b0;
    end else begin
      mu_acc <= sum[MUSTEP_W-1:0];
      adv    <= wrap;
    end
  end

  // read-address counter, advanced only when mu wraps
  always_ff @(posedge tgt_clk or negedge rst_n) begin
    if (!rst_n)                                ctl <= '0;
    else if (wrap) begin
      if (ctl == ADDR_W'(RB_DEPTH - 1))        ctl <= '0;
      else                                     ctl <= ctl + 1'b1;
    end
  end

  assign mu = mu_acc[MUSTEP_W-1 -: ISP_W];

  initial assert (ISP_W <= MUSTEP_W)
    else $error("orc: ISP_W must not exceed MUSTEP_W");

endmodule
