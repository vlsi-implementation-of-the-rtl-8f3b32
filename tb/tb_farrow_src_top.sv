// tb_farrow_src_top: end-to-end test of the Farrow sample-rate converter at
// its default parameters.
//
// Clocks: src_clk has a period of 2048 ps, tgt_clk of 2*step ps, so that
// mu_step = T_tgt/T_src = step/1024 exactly. After each reset both clocks
// start together; src_clk edges fall on odd and tgt_clk edges on even
// picoseconds, so no two edges ever coincide, and src_clk lags by about half
// a period.
//
// Reference model (written independently of the RTL): input sample e is the
// value presented before the e-th src_clk edge; the e-th edge writes the
// filter outputs of taps x[e-1..e-9] into the ring buffers. At tgt_clk edge m
// the position is P = m*step (accumulated with whatever step is in use), the
// read sample is W = floor(P/1024) and mu = P mod 1024; y after edge m+1 is
// the polynomial of write W at mu/1024 (7-bit mu), computed with the filter
// coefficients rebuilt from the cubic Lagrange formulas. Every output, mu and
// ctl is compared, and the timing rule of the ring buffers is checked: write
// W must already have happened and write W+3 not yet.
//
// Phases: (1) a root-raised-cosine pulse (roll-off 0.35, 30 symbols, 4
// samples per symbol) at the ratios 0.95, 0.77, 0.65 and 0.56; the RMS error
// of y against the exact pulse at the output instants is printed for each;
// (2) random full-scale input at 1020/1024, the nearly equal clocks that are
// the worst case for the ring buffers, then at random ratios and random
// phases of the two clocks; (3) random input at 0.9 until the
// run-time measurement of mu_step is valid, then a switch to the measured
// value. Counted mechanisms: read-address advance and hold, wrap of both
// addresses, use of the measured mu_step.
module tb_farrow_src_top;
  timeunit 1ps;
  timeprecision 1ps;

  logic               src_clk = 1'b0;
  logic               tgt_clk = 1'b0;
  logic               rst_n   = 1'b1;  // falls in start(), giving the asynchronous reset an edge
  logic signed [15:0] x_in    = '0;
  logic [9:0]         mu_step_in = '0;
  logic               use_measured_step = 1'b0;
  logic signed [15:0] y_out;
  logic [6:0]         mu;
  logic [1:0]         ctl, wr_addr;
  logic               rd_adv;
  logic [9:0]         mu_step_meas;
  logic               meas_valid;

  farrow_src_top dut (
    .src_clk, .tgt_clk, .rst_n, .x_in, .mu_step_in, .use_measured_step,
    .y_out, .mu, .ctl, .rd_adv, .wr_addr, .mu_step_meas, .meas_valid
  );

  int checks = 0, failures = 0;
  int n_adv = 0, n_hold = 0, n_ctl_wrap = 0, n_wr_wrap = 0, n_measured = 0;

  // ---------------- stimulus storage and model state ----------------------
  localparam int MAXS = 8192;
  longint xs [MAXS];          // xs[e]: sample latched at src edge e (1-based)
  longint cm [4][9];
  int     src_edges;          // src_clk edges since reset
  longint pos;                // accumulated position, units of 1/1024 sample
  int     tgt_edges;
  int     step;               // tgt half period in ps = mu_step * 1024
  int     step_used;          // mu_step the ORC uses at the coming edge
  bit     run = 1'b0;
  bit     rrc_mode;
  real    rrc_amp;
  int     rrc_e0;
  real    err2;
  int     nerr;
  logic [1:0] ctl_prev, wr_prev;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd512(real v);
    return longint'($floor(v * 512.0 + 0.5));
  endfunction

  function automatic longint fdiv(longint a, longint d);
    if (a >= 0) return a / d;
    return -((-a + d - 1) / d);
  endfunction

  function automatic longint clip16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  function automatic real rrc(real t);   // t in symbols, roll-off 0.35
    real b, pi;
    b  = 0.35;
    pi = 3.14159265358979;
    if (t > -1e-9 && t < 1e-9) return 1.0 - b + 4.0 * b / pi;
    if ((4.0 * b * t - 1.0) ** 2 < 1e-12 || (4.0 * b * t + 1.0) ** 2 < 1e-12)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * b)) +
                               (1.0 - 2.0 / pi) * $cos(pi / (4.0 * b)));
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b))) /
           (pi * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  function automatic real pulse(real e);  // continuous input, index units
    real t;
    t = (e - real'(rrc_e0)) / 4.0 - 15.0;
    if (t < -15.0 || t > 15.0) return 0.0;
    return rrc_amp * rrc(t);
  endfunction

  function automatic longint sample(int e);
    return (e >= 1 && e < MAXS) ? xs[e] : 0;
  endfunction

  // model output for write w at 7-bit mu m7
  function automatic longint model_y(int w, int m7);
    longint xt [4], v, acc;
    for (int l = 0; l < 4; l++) begin
      acc = 0;
      for (int n = 0; n < 9; n++) acc += cm[l][n] * (w >= 1 ? sample(w - 1 - n) : 0);
      xt[l] = clip16(fdiv(acc, 512));
    end
    v = xt[3];
    for (int l = 2; l >= 0; l--) v = clip16(fdiv(v * m7, 128) + xt[l]);
    return v;
  endfunction

  // ---------------- input drive: next sample after every src edge --------
  always @(posedge src_clk) begin
    if (run) begin
      src_edges <= src_edges + 1;
      x_in <= 16'(sample(src_edges + 2));
      wr_prev <= wr_addr;
      if (src_edges > 0 && wr_addr == 2'd0) n_wr_wrap++;
    end
  end

  always @(negedge tgt_clk)
    step_used = (use_measured_step && meas_valid) ? int'(mu_step_meas) : int'(mu_step_in);

  // ---------------- output check after every tgt edge ----------------------
  int  prev_w, prev_m7;
  always @(posedge tgt_clk) begin
    if (run) begin
      longint e;
      int w, m7;
      real ideal;
      if (use_measured_step && meas_valid) n_measured++;
      pos = pos + longint'(step_used);
      tgt_edges++;
      w  = int'(pos / 1024);
      m7 = int'((pos % 1024) / 8);
      #1;
      // y belongs to the previous edge
      e = model_y(prev_w, prev_m7);
      checks++;
      if (longint'(y_out) != e) begin
        failures++;
        if (failures < 10) $display("t=%0t m=%0d y=%0d expected %0d (w=%0d)", $time, tgt_edges, y_out, e, prev_w);
      end
      checks++;
      if (src_edges < prev_w || src_edges >= prev_w + 3) begin
        failures++;
        $display("ring buffer timing violated: read write %0d after %0d writes", prev_w, src_edges);
      end
      if (rrc_mode) begin
        ideal = pulse(real'(prev_w - 5) + real'(pos - longint'(step_used)) / 1024.0
                           - real'(longint'(prev_w) * 1024) / 1024.0);
        err2 += (real'(y_out) / 32768.0 - ideal) ** 2;
        nerr++;
      end
      checks++;
      if (mu != 7'(m7) || ctl != 2'(w % 3) || rd_adv != (w != prev_w)) begin
        failures++;
        if (failures < 10) $display("m=%0d mu=%0d/%0d ctl=%0d/%0d", tgt_edges, mu, m7, ctl, w % 3);
      end
      if (rd_adv) n_adv++; else n_hold++;
      if (rd_adv && ctl == 2'd0) n_ctl_wrap++;
      prev_w  = w;
      prev_m7 = m7;
    end
  end

  task automatic start(int st, int off = 1025);
    run = 1'b0;
    #20000;
    rst_n = 1'b0;
    step  = st;
    mu_step_in = 10'(st);
    src_edges = 0; tgt_edges = 0; pos = 0; prev_w = 0; prev_m7 = 0;
    step_used = st;
    x_in = 16'(sample(1));
    #10000;
    rst_n = 1'b1;
    run = 1'b1;
    fork
      begin
        #(off) src_clk = 1'b1;
        while (run) begin #1024 src_clk = 1'b0; #1024 src_clk = 1'b1; end
        src_clk = 1'b0;
      end
      begin
        while (run) begin #(step) tgt_clk = 1'b0; #(step) tgt_clk = 1'b1; end
        tgt_clk = 1'b0;
      end
    join_none
  endtask

  int ratios [4] = '{973, 788, 666, 573};

  initial begin
    foreach (cm[l, n]) cm[l][n] = 0;
    cm[0][4] = rnd512(1.0);
    cm[1][5] = rnd512(-1.0/3.0); cm[1][4] = rnd512(-0.5); cm[1][3] = rnd512(1.0); cm[1][2] = rnd512(-1.0/6.0);
    cm[2][5] = rnd512(0.5);      cm[2][4] = rnd512(-1.0); cm[2][3] = rnd512(0.5);
    cm[3][5] = rnd512(-1.0/6.0); cm[3][4] = rnd512(0.5);  cm[3][3] = rnd512(-0.5); cm[3][2] = rnd512(1.0/6.0);

    // (1) RRC pulse at the four ratios
    rrc_amp = 0.5 / rrc(0.0);
    rrc_e0  = 20;
    for (int e = 0; e < MAXS; e++)
      xs[e] = longint'($floor(pulse(real'(e)) * 32768.0 + 0.5));
    foreach (ratios[r]) begin
      err2 = 0.0; nerr = 0;
      rrc_mode = 1'b0;
      start(ratios[r]);
      repeat (25) @(posedge src_clk);
      rrc_mode = 1'b1;
      repeat (140) @(posedge src_clk);
      rrc_mode = 1'b0;
      $display("mu_step %0d/1024: RMSE %e over %0d outputs", ratios[r], $sqrt(err2 / nerr), nerr);
      checks++;
      if ($sqrt(err2 / nerr) > 2.0e-3) failures++;
    end

    // (2) nearly equal clocks, random full-scale input, and random ratios,
    //     each with a random phase of src_clk (first edge at an odd time
    //     between 1 and 2047 ps after the start of tgt_clk)
    for (int e = 0; e < MAXS; e++) xs[e] = longint'(signed'(16'($urandom)));
    start(1020);
    repeat (1500) @(posedge tgt_clk);
    for (int i = 0; i < 12; i++) begin
      start((i % 2 == 0) ? 1020 + int'($urandom % 4) : 512 + int'($urandom % 508),
            2 * int'($urandom % 1024) + 1);
      repeat (400) @(posedge tgt_clk);
    end

    // (3) measured mu_step
    start(922);
    wait (meas_valid);
    repeat (5) @(posedge tgt_clk);
    checks++;
    if (int'(mu_step_meas) > 923 || int'(mu_step_meas) < 921) begin
      failures++;
      $display("measured mu_step %0d, expected 922 +- 1", mu_step_meas);
    end
    @(negedge tgt_clk);
    use_measured_step = 1'b1;
    repeat (600) @(posedge tgt_clk);
    run = 1'b0;
    #10000;

    $display("read-address advances %0d, holds %0d, ctl wraps %0d, write-address wraps %0d, cycles on measured mu_step %0d",
             n_adv, n_hold, n_ctl_wrap, n_wr_wrap, n_measured);
    checks++;
    if (n_adv == 0 || n_hold == 0 || n_ctl_wrap == 0 || n_wr_wrap == 0 || n_measured == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
