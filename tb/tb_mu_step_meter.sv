// tb_mu_step_meter: runs the two clocks at known ratios T_tgt/T_src =
// step/1024 (src period 2048 ps, tgt period 2*step ps, with the edges of the
// two clocks never coinciding) and checks that the measured mu_step is
// within one count of step once meas_valid rises, and that meas_valid does
// not rise before two full windows of 1024 tgt_clk periods have passed.
module tb_mu_step_meter;
  timeunit 1ps;
  timeprecision 1ps;
  logic       src_clk = 1'b0;
  logic       tgt_clk = 1'b0;
  logic       rst_n   = 1'b1;  // falls below, giving the asynchronous reset an edge
  logic [9:0] mu_step_meas;
  logic       meas_valid;
  int checks = 0, failures = 0;
  int step;
  bit run = 1'b0;
  int tgt_cycles;
  int steps [5] = '{973, 788, 666, 573, 1000};

  mu_step_meter dut (.src_clk, .tgt_clk, .rst_n, .mu_step_meas, .meas_valid);

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge tgt_clk) tgt_cycles++;

  initial begin
    foreach (steps[s]) begin
      step = steps[s];
      rst_n = 1'b0;
      #10000;
      rst_n = 1'b1;
      tgt_cycles = 0;
      run = 1'b1;
      fork
        begin : g_src
          #1;
          while (run) begin #1024 src_clk = 1'b1; #1024 src_clk = 1'b0; end
        end
        begin : g_tgt
          while (run) begin #(step) tgt_clk = 1'b0; #(step) tgt_clk = 1'b1; end
          tgt_clk = 1'b0;
        end
        begin : g_chk
          @(posedge meas_valid);
          checks++;
          if (tgt_cycles < 2048) begin
            failures++;
            $display("valid after only %0d tgt cycles", tgt_cycles);
          end
          repeat (3) begin
            checks++;
            if (int'(mu_step_meas) > step + 1 || int'(mu_step_meas) < step - 1) begin
              failures++;
              $display("step %0d: measured %0d", step, mu_step_meas);
            end else $display("step %0d: measured %0d", step, mu_step_meas);
            repeat (1100) @(posedge tgt_clk);
          end
          run = 1'b0;
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
