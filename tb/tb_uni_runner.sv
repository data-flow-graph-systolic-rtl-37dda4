// tb_uni_runner: stimulus and checker for one unidirectional systolic FIR
// array (fir_uni_array or the uni_ side of sa_fir_top).
//
// Each of RUNS runs loads TAPS random weights, pulses start and sends the
// stream 0^TAPS x1 .. x_NS. Every clock period it checks the sampling strobes
// against the patterns (1)* for the input and 0^(2*TAPS)(1)* for the outputs,
// and, where valid, y_out against y(n) = sum_k a_k x(n-k) computed here, the
// result for x(n) arriving exactly TAPS periods after x(n) is sent (period
// n + 2*TAPS - 1), and x_out against x(n). From the second run on, start is pulsed while the
// previous stream is still flowing. Inputs are driven on the falling edge and
// outputs checked shortly after it.
module tb_uni_runner #(
  parameter int unsigned TAPS   = 3,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned ACC_W  = 34,
  parameter int unsigned IDX_W  = 2,
  parameter int unsigned NS     = 40,
  parameter int unsigned RUNS   = 3,
  parameter int unsigned SEED   = 1
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
  output int                       n_reloads
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
      if (failures < 20) $display("[uni TAPS=%0d] FAIL %s at %0t", TAPS, what, $time);
    end
  endtask

  initial begin
    int unsigned seed = SEED;
    void'($urandom(seed));
    start = 0; w_we = 0; w_idx = '0; w_data = '0; x_in = '0; done = 0;
    checks = 0; failures = 0; n_results = 0; n_restarts = 0; n_reloads = 0;
    wait (rst_n);
    for (int r = 0; r < RUNS; r++) begin
      // new weights; in later runs they are loaded while the old stream flows
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
      // period t = 0 is this cycle
      // runs before the last are cut short, so the next start comes mid-stream
      for (int t = 0; t < ((r == int'(RUNS) - 1) ? int'(NS + 2 * TAPS) : int'(NS + 2 * TAPS) / 2); t++) begin
        int n;
        if (t > 0) @(negedge clk);
        n    = t - int'(TAPS) + 1;
        x_in = (n >= 1 && n <= int'(NS)) ? DATA_W'(xs[n]) : '0;
        #1;
        check(x_take == 1'b1, "x_take pattern (1)*");
        check(y_valid == (t >= int'(2 * TAPS)), "y_valid pattern 0^2N(1)*");
        check(x_out_valid == (t >= int'(2 * TAPS)), "x_out_valid pattern");
        if (y_valid) begin
          automatic int m = t - int'(2 * TAPS) + 1;
          check(longint'(y_out) == expect_y(m), $sformatf("y(%0d)", m));
          check(longint'(x_out) == xs[m], $sformatf("x_out(%0d)", m));
          n_results++;
        end
      end
    end
    done = 1;
  end
endmodule
