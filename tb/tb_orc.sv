// tb_orc: drives the output ring controller with several values of mu_step
// (including values close to 1 and the ratios 0.95, 0.77, 0.65, 0.56) and
// checks after every tgt_clk edge m that
//   mu  = top 7 bits of (m * mu_step mod 1024),
//   ctl = floor(m * mu_step / 1024) mod 3,
//   adv = 1 exactly when floor(m * mu_step / 1024) grew at that edge.
// The expectation is computed in closed form from m, not by accumulation.
module tb_orc;
  logic       tgt_clk = 1'b0;
  logic       rst_n   = 1'b0;
  logic [9:0] mu_step = '0;
  logic [6:0] mu;
  logic [1:0] ctl;
  logic       adv;
  int checks = 0, failures = 0;
  int n_adv = 0, n_hold = 0;
  int steps [6] = '{973, 788, 666, 573, 1023, 1};

  orc dut (.tgt_clk, .rst_n, .mu_step, .mu, .ctl, .adv);

  always #5 tgt_clk = ~tgt_clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (steps[s]) begin
      rst_n   = 1'b0;
      mu_step = 10'(steps[s]);
      @(negedge tgt_clk);
      rst_n = 1'b1;
      for (longint m = 1; m <= 3000; m++) begin
        longint tot, prev;
        @(posedge tgt_clk);
        #1;
        tot  = m * steps[s];
        prev = (m - 1) * steps[s];
        checks++;
        if (mu != 7'((tot % 1024) / 8) || ctl != 2'((tot / 1024) % 3) ||
            adv != ((tot / 1024) != (prev / 1024))) begin
          failures++;
          if (failures < 10)
            $display("step %0d m %0d: mu=%0d ctl=%0d adv=%0b", steps[s], m, mu, ctl, adv);
        end
        if (adv) n_adv++; else n_hold++;
      end
    end
    checks++;
    if (n_adv == 0 || n_hold == 0) failures++;
    $display("read-address advances %0d, holds %0d", n_adv, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
