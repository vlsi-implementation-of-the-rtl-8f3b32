// mu_step_meter: measures the clock-period ratio mu_step = T_tgt / T_src at
// run time with two counters, one per clock.
//
// A B-bit counter on tgt_clk marks windows of 2^B tgt_clk periods by toggling
// a flag each time it wraps. A counter on src_clk counts src_clk edges; when
// the (two-flop synchronised) flag is seen to change, the count of edges in
// the window just ended is captured and the counter restarts. Since a window
// lasts 2^B * T_tgt, the count is 2^B * T_tgt / T_src, i.e. mu_step as a B-bit
// fraction, to within one count (the synchroniser delay is the same at both
// ends of a window, but the edges can fall either side of it). The captured
// value is handed back to the tgt_clk domain with a second toggle flag and
// its own two-flop synchroniser; the value itself is stable for 2^B tgt_clk
// periods and needs none. The first window after reset is incomplete, so
// meas_valid rises only with the second result. The count saturates at
// 2^B - 1.
//
// The document gives the principle (two B-bit counters, src count after 2^B
// tgt periods equals mu_step); the window toggles, synchronisers and the
// valid flag are this design's own.
//
// Interface: src_clk, tgt_clk, rst_n (asynchronous, active low);
// mu_step_meas, meas_valid (both in the tgt_clk domain).
module mu_step_meter #(
  parameter int B = farrow_pkg::MUSTEP_W
) (
  input  logic         src_clk,
  input  logic         tgt_clk,
  input  logic         rst_n,
  output logic [B-1:0] mu_step_meas,
  output logic         meas_valid
);

  // ---- tgt_clk domain: window counter -----------------------------------
  logic [B-1:0] cnt_t;
  logic         win_t;

  always_ff @(posedge tgt_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_t <= '0;
      win_t <= 1'b0;
    end else begin
      cnt_t <= cnt_t + 1'b1;
      if (cnt_t == '1) win_t <= ~win_t;
    end
  end

  // ---- src_clk domain: edge counter -------------------------------------
  logic [2:0]   win_s;      // two synchroniser flops and one for edge detection
  logic [B:0]   cnt_s;
  logic [B-1:0] meas_s;
  logic         done_s;

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n) begin
      win_s  <= '0;
      cnt_s  <= '0;
      meas_s <= '0;
      done_s <= 1'b0;
    end else begin
      win_s <= {win_s[1:0], win_t};
      if (win_s[2] != win_s[1]) begin
        // this edge is the last one of the window
        meas_s <= (cnt_s + 1'b1 > (B+1)'((1 << B) - 1)) ? B'((1 << B) - 1)
                                                       : B'(cnt_s + 1'b1);
        done_s <= ~done_s;
        cnt_s  <= '0;
      end else if (cnt_s != '1) begin
        cnt_s <= cnt_s + 1'b1;
      end
    end
  end

  // ---- back to the tgt_clk domain ---------------------------------------
  logic [2:0] done_t;
  logic       first_seen;

  always_ff @(posedge tgt_clk or negedge rst_n) begin
    if (!rst_n) begin
      done_t       <= '0;
      mu_step_meas <= '0;
      meas_valid   <= 1'b0;
      first_seen   <= 1'b0;
    end else begin
      done_t <= {done_t[1:0], done_s};
      if (done_t[2] != done_t[1]) begin
        mu_step_meas <= meas_s;
        first_seen   <= 1'b1;
        if (first_seen) meas_valid <= 1'b1;
      end
    end
  end

endmodule
