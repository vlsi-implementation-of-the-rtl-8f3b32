// tb_irc: checks the write-address counter of the input ring controller.
// After reset the address must be 1, then advance 2, 0, 1, ... on every
// src_clk edge; wr_sel must be the one-hot decode of the address. The
// expected address is kept as a running count of edges modulo 3.
module tb_irc;
  logic       src_clk = 1'b0;
  logic       rst_n   = 1'b0;
  logic [1:0] wr_addr;
  logic [2:0] wr_sel;
  int checks = 0, failures = 0;
  int edges = 0;

  irc dut (.src_clk, .rst_n, .wr_addr, .wr_sel);

  always #5 src_clk = ~src_clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    repeat (40) begin
      #1;
      checks++;
      if (wr_addr != 2'((1 + edges) % 3) || wr_sel != (3'b001 << ((1 + edges) % 3))) begin
        failures++;
        $display("edge %0d: wr_addr=%0d wr_sel=%b", edges, wr_addr, wr_sel);
      end
      @(posedge src_clk);
      edges++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
