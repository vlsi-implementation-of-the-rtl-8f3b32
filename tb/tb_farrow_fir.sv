// tb_farrow_fir: feeds the filter bank with random samples (small ones, and
// stretches of full-scale ones that drive the outputs into saturation) and
// compares every output after each src_clk edge with a model built here:
// the coefficients are recomputed from the cubic Lagrange formulas
// (value * 512, rounded), the taps are the last nine inputs, and each output
// is floor(sum / 512) clipped to 16 bits.
module tb_farrow_fir;
  logic               src_clk = 1'b0;
  logic               rst_n   = 1'b0;
  logic signed [15:0] x_in    = '0;
  logic signed [15:0] x_tilde [4];
  longint hist [9] = '{default: 0};   // hist[n] = x[k-n] as held in the taps
  longint cm [4][9];
  int checks = 0, failures = 0, n_sat = 0;

  farrow_fir dut (.src_clk, .rst_n, .x_in, .x_tilde);

  always #5 src_clk = ~src_clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd512(real v);
    return longint'($floor(v * 512.0 + 0.5));
  endfunction

  function automatic longint floor_div512(longint a);
    if (a >= 0) return a / 512;
    return -((-a + 511) / 512);
  endfunction

  initial begin
    foreach (cm[l, n]) cm[l][n] = 0;
    // p_-1 = tap 5, p0 = tap 4, p1 = tap 3, p2 = tap 2
    cm[0][4] = rnd512(1.0);
    cm[1][5] = rnd512(-1.0/3.0); cm[1][4] = rnd512(-0.5); cm[1][3] = rnd512(1.0); cm[1][2] = rnd512(-1.0/6.0);
    cm[2][5] = rnd512(0.5);      cm[2][4] = rnd512(-1.0); cm[2][3] = rnd512(0.5);
    cm[3][5] = rnd512(-1.0/6.0); cm[3][4] = rnd512(0.5);  cm[3][3] = rnd512(-0.5); cm[3][2] = rnd512(1.0/6.0);

    #12 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge src_clk);
      if ((i / 100) % 3 == 2) x_in = ($urandom % 2) ? 16'sh7fff : 16'sh8000;
      else                    x_in = 16'(signed'(16'($urandom)) >>> 2);
      @(posedge src_clk);
      for (int n = 8; n > 0; n--) hist[n] = hist[n-1];
      hist[0] = longint'(x_in);
      #1;
      for (int l = 0; l < 4; l++) begin
        longint acc, e;
        acc = 0;
        for (int n = 0; n < 9; n++) acc += cm[l][n] * hist[n];
        e = floor_div512(acc);
        if (e > 32767)  begin e = 32767;  n_sat++; end
        if (e < -32768) begin e = -32768; n_sat++; end
        checks++;
        if (longint'(x_tilde[l]) != e) begin
          failures++;
          if (failures < 10) $display("k=%0d l=%0d got %0d expected %0d", i, l, x_tilde[l], e);
        end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never reached"); end
    $display("saturated outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
