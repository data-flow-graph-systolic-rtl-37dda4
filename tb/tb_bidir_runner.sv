// tb_bidir_runner: stimulus and checker for one bidirectional systolic FIR
// array (fir_bidir_array or the bi_ side of sa_fir_top).
//
// Each of RUNS runs loads TAPS random weights, pulses start and offers x1 ..
// x_NS in the periods the array marks with x_take, driving random values in
// every other period (the array must ignore them). Every period it checks
// x_take against 0^(TAPS-1)(10)*, y_valid against 0^TAPS(10)* and x_out_valid
// against 0(10)*; where valid, y_out against y(n) = sum_k a_k x(n-k) computed
// here, with the result one period after x(n) was taken, and x_out against
// the sample stream with TAPS-1 zeros prepended (the FBY nodes). From the
// second run on, start is pulsed while the old stream is still flowing, so
// the first results are right only if start restores the zero initial
// conditions.
module tb_bidir_runner #(
  parameter int unsigned TAPS   = 3,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned ACC_W  = 34,
  parameter int unsigned IDX_W  = 2,
  parameter int unsigned NS     = 40,
  parameter int unsigned RUNS   = 3,
  parameter int unsigned SEED   = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     start,
  output logic                     w_we,
  output logic [IDX_W-1:0]         w_idx,
  output logic signed [COEF_W-1:0] w_data,
  output logic signed [DATA_W-1:0] x_in,
  input  logic                     x_take,
  input  logic signed [ACC_W-1:0]  y_out,
  input  logic                     y_valid,
  input  logic signed [DATA_W-1:0] x_out,
  input  logic                     x_out_valid,
  output logic                     done,
  output int                       checks,
  output int                       failures,
  output int                       n_results,
  output int                       n_restarts,
  output int                       n_reloads,
  output int                       n_ignored,
  output int                       n_fby_zeros
);
  longint a [TAPS];
  longint xs [NS + 1];

  function automatic longint expect_y(int n);
    longint s = 0;
    for (int k = 0; k < TAPS; k++)
      if (n - k >= 1) s += a[k] * xs[n - k];
    return s;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[bidir TAPS=%0d] FAIL %s at %0t", TAPS, what, $time);
    end
  endtask

  initial begin
    int unsigned seed = SEED;
    void'($urandom(seed));
    start = 0; w_we = 0; w_idx = '0; w_data = '0; x_in = '0; done = 0;
    checks = 0; failures = 0; n_results = 0; n_restarts = 0; n_reloads = 0;
    n_ignored = 0; n_fby_zeros = 0;
    wait (rst_n);
    for (int r = 0; r < RUNS; r++) begin
      for (int k = 0; k < TAPS; k++) begin
        @(negedge clk);
        a[k]   = longint'($signed(COEF_W'($urandom)));
        w_we   = 1; w_idx = IDX_W'(k); w_data = COEF_W'(a[k]);
        x_in   = DATA_W'($urandom);
        if (r > 0) n_reloads++;
      end
      for (int n = 1; n <= NS; n++) xs[n] = longint'($signed(DATA_W'($urandom)));
      @(negedge clk);
      w_we = 0; start = 1; x_in = DATA_W'($urandom);
      if (r > 0) n_restarts++;
      @(negedge clk);
      start = 0;
      // runs before the last are cut short, so the next start comes mid-stream
      for (int t = 0; t < ((r == int'(RUNS) - 1) ? int'(2 * NS + TAPS + 2) : int'(2 * NS + TAPS + 2) / 2); t++) begin
        bit take_exp, yv_exp, xv_exp;
        if (t > 0) @(negedge clk);
        take_exp = (t >= int'(TAPS) - 1) && ((t - int'(TAPS) + 1) % 2 == 0);
        yv_exp   = (t >= int'(TAPS)) && ((t - int'(TAPS)) % 2 == 0);
        xv_exp   = (t >= 1) && ((t - 1) % 2 == 0);
        if (take_exp) begin
          automatic int n = (t - int'(TAPS) + 1) / 2 + 1;
          x_in = (n <= int'(NS)) ? DATA_W'(xs[n]) : '0;
        end else begin
          x_in = DATA_W'($urandom | 1);   // never zero: must be ignored
        end
        #1;
        check(x_take == take_exp, "x_take pattern 0^(N-1)(10)*");
        check(y_valid == yv_exp, "y_valid pattern 0^N(10)*");
        check(x_out_valid == xv_exp, "x_out_valid pattern 0(10)*");
        if (!x_take) n_ignored++;
        if (y_valid) begin
          automatic int n = (t - int'(TAPS)) / 2 + 1;
          if (n <= int'(NS)) begin
            check(longint'(y_out) == expect_y(n), $sformatf("y(%0d)", n));
            n_results++;
          end
        end
        if (x_out_valid) begin
          automatic int m = (t - 1) / 2;     // element m of the leftward output stream
          automatic int n = m - int'(TAPS) + 2;
          if (n < 1) begin
            check(x_out == '0, $sformatf("prepended zero %0d", m));
            n_fby_zeros++;
          end else if (n <= int'(NS)) begin
            check(longint'(x_out) == xs[n], $sformatf("x_out(%0d)", n));
          end
        end
      end
    end
    done = 1;
  end
endmodule
