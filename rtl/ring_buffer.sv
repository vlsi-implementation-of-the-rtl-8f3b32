// ring_buffer: the RB_DEPTH registers that hold one filter output x~_l
// between the source and the target clock domain.
//
// Writing: on a rising edge of src_clk, the register whose bit of wr_sel is
// set (the register addressed by the IRC) takes the filter output d; all
// others keep their value. Reading: rd_data shows the register addressed by
// ctl from the ORC, through a multiplexer and without a clock, so the
// approximator sees a value that was latched at least one src_clk period ago
// and stays untouched for RB_DEPTH src_clk periods.
//
// The document draws the input and output switches and the three registers;
// using wr_sel as a clock enable instead of a gated clock, resetting the
// registers to zero and reading 0 for an unused ctl value are this design's
// choices.
//
// Interface: src_clk, rst_n (asynchronous, active low), wr_sel (one-hot),
// d (signed); ctl, rd_data (signed, combinational from ctl).
module ring_buffer #(
  parameter int SIG_W    = farrow_pkg::SIG_W,
  parameter int RB_DEPTH = farrow_pkg::RB_DEPTH,
  parameter int ADDR_W   = farrow_pkg::ADDR_W
) (
  input  logic                    src_clk,
  input  logic                    rst_n,
  input  logic [RB_DEPTH-1:0]     wr_sel,
  input  logic signed [SIG_W-1:0] d,
  input  logic [ADDR_W-1:0]       ctl,
  output logic signed [SIG_W-1:0] rd_data
);

  logic signed [SIG_W-1:0] regs [RB_DEPTH];

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RB_DEPTH; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < RB_DEPTH; i++)
        if (wr_sel[i]) regs[i] <= d;
    end
  end

  always_comb begin
    rd_data = '0;
    for (int i = 0; i < RB_DEPTH; i++)
      if (ctl == ADDR_W'(i)) rd_data = regs[i];
  end

endmodule
