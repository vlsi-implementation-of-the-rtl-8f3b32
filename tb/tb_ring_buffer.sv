// tb_ring_buffer: writes random words into the three registers of one ring
// buffer in a random one-hot order (sometimes none) and reads every address
// after each write, comparing with a copy kept in the testbench. Address 3,
// which names no register, must read as zero, and reset must clear all.
module tb_ring_buffer;
  logic               src_clk = 1'b0;
  logic               rst_n   = 1'b0;
  logic [2:0]         wr_sel  = '0;
  logic signed [15:0] d       = '0;
  logic [1:0]         ctl     = '0;
  logic signed [15:0] rd_data;
  logic signed [15:0] model [3] = '{default: '0};
  int checks = 0, failures = 0;

  ring_buffer dut (.src_clk, .rst_n, .wr_sel, .d, .ctl, .rd_data);

  always #5 src_clk = ~src_clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 4; a++) begin
      ctl = 2'(a);
      #1;
      checks++;
      if (rd_data !== ((a < 3) ? model[a] : 16'sd0)) begin
        failures++;
        $display("ctl=%0d read %0d expected %0d", a, rd_data, (a < 3) ? model[a] : 0);
      end
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    check_all();
    for (int i = 0; i < 300; i++) begin
      @(negedge src_clk);
      d = 16'($urandom);
      case ($urandom % 4)
        0: wr_sel = 3'b001;
        1: wr_sel = 3'b010;
        2: wr_sel = 3'b100;
        default: wr_sel = 3'b000;
      endcase
      @(posedge src_clk);
      for (int r = 0; r < 3; r++) if (wr_sel[r]) model[r] = d;
      #1;
      check_all();
    end
    rst_n = 1'b0;
    model = '{default: '0};
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
