// tb_approximator: applies random filter outputs x~_0..x~_3 and random mu and
// checks y one tgt_clk edge later against a model here that evaluates
// x~_0 + mu*(x~_1 + mu*(x~_2 + mu*x~_3)) with mu = value/128, each product
// rounded towards minus infinity and each partial sum clipped to 16 bits.
// A second check compares with the exact real-valued polynomial: the error
// must stay within the few LSBs that truncation can add.
module tb_approximator;
  logic               tgt_clk = 1'b0;
  logic               rst_n   = 1'b0;
  logic signed [15:0] c [4]   = '{default: '0};
  logic [6:0]         mu      = '0;
  logic signed [15:0] y_out;
  int checks = 0, failures = 0;

  approximator dut (.tgt_clk, .rst_n, .c, .mu, .y_out);

  always #5 tgt_clk = ~tgt_clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  function automatic longint fdiv128(longint a);
    if (a >= 0) return a / 128;
    return -((-a + 127) / 128);
  endfunction

  initial begin
    #12 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      longint e, cc [4];
      real    r;
      bit     big;
      @(negedge tgt_clk);
      big = (i % 5 == 4);
      for (int l = 0; l < 4; l++)
        c[l] = big ? 16'($urandom) : 16'(signed'(16'($urandom)) >>> 3);
      mu = 7'($urandom);
      if (i % 50 == 0) mu = 7'd0;
      if (i % 50 == 1) mu = 7'd127;
      for (int l = 0; l < 4; l++) cc[l] = longint'(c[l]);
      e = cc[3];
      for (int l = 2; l >= 0; l--) e = clip16(fdiv128(e * longint'(mu)) + cc[l]);
      r = 0.0;
      for (int l = 3; l >= 0; l--) r = r * (real'(mu) / 128.0) + real'(cc[l]);
      @(posedge tgt_clk);
      #1;
      checks++;
      if (longint'(y_out) != e) begin
        failures++;
        if (failures < 10) $display("i=%0d mu=%0d got %0d expected %0d", i, mu, y_out, e);
      end
      if (!big) begin
        checks++;
        if ((real'(y_out) - r) > 0.5 || (real'(y_out) - r) < -4.0) begin
          failures++;
          $display("i=%0d y=%0d exact %f", i, y_out, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
