// farrow_src_top: Farrow interpolator for sample-rate conversion between two
// free-running clocks (src_clk for the input, the faster tgt_clk for the
// output), extended with ring buffers so that it works for any phase relation
// of the clocks.
//
// Source domain (src_clk): farrow_fir latches x[k] and computes the NUM_FILT
// filter outputs x~_l; the IRC write-address counter selects which of the
// RB_DEPTH registers of every ring_buffer takes them at the next edge, all
// ring buffers at the same address.
// Target domain (tgt_clk): the ORC accumulates mu and advances the read
// address ctl each time mu wraps; the ring buffers show the registers at ctl
// and the approximator evaluates the polynomial in mu, registering y[m].
// The only signals that cross between the domains are the ring-buffer
// registers, which are written one src_clk period before they are first read
// and left alone for RB_DEPTH src_clk periods; and the two toggle flags of the
// mu_step_meter, each through a two-flop synchroniser.
//
// mu_step comes either from the input mu_step_in (a value known at design
// time) or, when use_measured_step is 1 and a measurement is valid, from the
// mu_step_meter. The read and write addresses stay aligned only if mu_step is
// exact to the MUSTEP_W-bit precision of the accumulator.
//
// Timing: y_out changes on tgt_clk, one cycle after mu and ctl; a sample
// latched at src_clk edge k reaches a ring buffer at edge k+1 and is read
// from roughly one src_clk period later. rst_n is an asynchronous active-low
// reset shared by both domains and must be released while neither clock is
// near an edge (for example with both clocks stopped, or synchronised per
// domain outside).
//
// Structure, widths and the 3-register ring buffers follow the document; the
// number formats, the reset alignment of the read and write addresses and the
// selection between given and measured mu_step are this design's own.
module farrow_src_top #(
  parameter int SIG_W     = farrow_pkg::SIG_W,
  parameter int COEF_W    = farrow_pkg::COEF_W,
  parameter int COEF_FRAC = farrow_pkg::COEF_FRAC,
  parameter int ISP_W     = farrow_pkg::ISP_W,
  parameter int MUSTEP_W  = farrow_pkg::MUSTEP_W,
  parameter int NUM_FILT  = farrow_pkg::NUM_FILT,
  parameter int ORDER     = farrow_pkg::ORDER,
  parameter int RB_DEPTH  = farrow_pkg::RB_DEPTH,
  parameter int ADDR_W    = farrow_pkg::ADDR_W
) (
  input  logic                    src_clk,
  input  logic                    tgt_clk,
  input  logic                    rst_n,
  input  logic signed [SIG_W-1:0] x_in,
  input  logic [MUSTEP_W-1:0]     mu_step_in,
  input  logic                    use_measured_step,
  output logic signed [SIG_W-1:0] y_out,
  output logic [ISP_W-1:0]        mu,
  output logic [ADDR_W-1:0]       ctl,
  output logic                    rd_adv,
  output logic [ADDR_W-1:0]       wr_addr,
  output logic [MUSTEP_W-1:0]     mu_step_meas,
  output logic                    meas_valid
);

  logic signed [SIG_W-1:0] x_tilde [NUM_FILT];
  logic signed [SIG_W-1:0] c_sel   [NUM_FILT];
  logic [RB_DEPTH-1:0]     wr_sel;
  logic [MUSTEP_W-1:0]     mu_step;

  farrow_fir #(
    .SIG_W(SIG_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC),
    .NUM_FILT(NUM_FILT), .ORDER(ORDER)
  ) u_fir (
    .src_clk, .rst_n, .x_in, .x_tilde
  );

  irc #(.RB_DEPTH(RB_DEPTH), .ADDR_W(ADDR_W)) u_irc (
    .src_clk, .rst_n, .wr_addr, .wr_sel
  );

  for (genvar l = 0; l < NUM_FILT; l++) begin : g_rb
    ring_buffer #(.SIG_W(SIG_W), .RB_DEPTH(RB_DEPTH), .ADDR_W(ADDR_W)) u_rb (
      .src_clk, .rst_n, .wr_sel, .d(x_tilde[l]), .ctl, .rd_data(c_sel[l])
    );
  end

  mu_step_meter #(.B(MUSTEP_W)) u_meter (
    .src_clk, .tgt_clk, .rst_n, .mu_step_meas, .meas_valid
  );

  assign mu_step = (use_measured_step && meas_valid) ? mu_step_meas : mu_step_in;

  orc #(
    .ISP_W(ISP_W), .MUSTEP_W(MUSTEP_W), .RB_DEPTH(RB_DEPTH), .ADDR_W(ADDR_W)
  ) u_orc (
    .tgt_clk, .rst_n, .mu_step, .mu, .ctl, .adv(rd_adv)
  );

  approximator #(.SIG_W(SIG_W), .ISP_W(ISP_W), .NUM_FILT(NUM_FILT)) u_approx (
    .tgt_clk, .rst_n, .c(c_sel), .mu, .y_out
  );

endmodule
