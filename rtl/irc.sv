// irc: input ring controller (write side of the ring buffers).
//
// A modulo-RB_DEPTH counter that advances on every rising edge of src_clk,
// i.e. every time a new sample arrives; after RB_DEPTH-1 it wraps to 0. Its
// value wr_addr names the ring-buffer register written at the next src_clk
// edge, and wr_sel is the same address decoded one-hot: bit i stands for the
// gated clock of register i. The document gates src_clk per register with a
// clock-gating cell; here wr_sel is used as a clock enable, which has the same
// effect on the stored data.
//
// Reset value: WR_RESET (default 1), one register ahead of the read address
// ctl of the ORC, which resets to 0. This lag of one register gives the
// reader about one src_clk period after a register is written before it
// switches to it, and the writer at most three src_clk periods before it
// overwrites it; the reset values are this design's choice.
//
// Interface: src_clk, rst_n (asynchronous, active low); wr_addr, wr_sel.
module irc #(
  parameter int RB_DEPTH = farrow_pkg::RB_DEPTH,
  parameter int ADDR_W   = farrow_pkg::ADDR_W,
  parameter int WR_RESET = 1
) (
  input  logic              src_clk,
  input  logic              rst_n,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [RB_DEPTH-1:0] wr_sel
);

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n)                                 wr_addr <= ADDR_W'(WR_RESET);
    else if (wr_addr == ADDR_W'(RB_DEPTH - 1))  wr_addr <= '0;
    else                                        wr_addr <= wr_addr + 1'b1;
  end

  always_comb begin
    wr_sel = '0;
    wr_sel[wr_addr] = 1'b1;
  end

endmodule
