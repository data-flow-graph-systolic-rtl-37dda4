// tb_fir_bidir_array: self-checking test of fir_bidir_array.
//
// Three arrays, at the default 3 taps and at 2 and 5 taps, each driven and
// checked by tb_bidir_runner: sampling patterns, filter results against a
// direct evaluation of the FIR sum, latency, and restarts with new weights
// while a stream is still in flight. A watchdog ends the run if a runner
// never finishes.
module tb_fir_bidir_array;
  import sa_pkg::*;
  localparam int unsigned NT = 3;
  localparam int unsigned T [NT] = '{3, 2, 5};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [NT-1:0] done;
  int c [NT];
  int f [NT];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NT; g++) begin : g_t
    localparam int unsigned TAPS = T[g];
    localparam int unsigned AW = acc_width(16, 16, TAPS);
    localparam int unsigned IW = (TAPS > 1) ? $clog2(TAPS) : 1;
    logic start, w_we, x_take, y_valid, x_out_valid;
    logic [IW-1:0] w_idx;
    logic signed [15:0] w_data, x_in, x_out;
    logic signed [AW-1:0] y_out;
    int nr, nrs, nrl, nig, nfz;

    if (g == 0) begin : g_def
      // default parameters
      fir_bidir_array dut (
        .clk, .rst_n, .start, .w_we, .w_idx, .w_data, .x_in, .x_take,
        .y_out, .y_valid, .x_out, .x_out_valid
      );
    end else begin : g_par
      fir_bidir_array #(.TAPS(TAPS)) dut (
        .clk, .rst_n, .start, .w_we, .w_idx, .w_data, .x_in, .x_take,
        .y_out, .y_valid, .x_out, .x_out_valid
      );
    end

    tb_bidir_runner #(
      .TAPS(TAPS), .ACC_W(AW), .IDX_W(IW), .NS(30 + 4 * g), .RUNS(3), .SEED(11 + g)
    ) run (
      .clk, .rst_n, .start, .w_we, .w_idx, .w_data, .x_in, .x_take,
      .y_out, .y_valid, .x_out, .x_out_valid,
      .done(done[g]), .checks(c[g]), .failures(f[g]),
      .n_results(nr), .n_restarts(nrs), .n_reloads(nrl),
      .n_ignored(nig), .n_fby_zeros(nfz)
    );
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    @(negedge clk);
    for (int g = 0; g < int'(NT); g++) begin
      checks += c[g];
      failures += f[g];
    end
    // every configuration produced results and was restarted
    checks++; if (g_t[0].nr == 0 || g_t[0].nrs == 0 || g_t[0].nrl == 0) failures++;
    checks++; if (g_t[1].nr == 0 || g_t[1].nrs == 0) failures++;
    checks++; if (g_t[2].nr == 0 || g_t[2].nrs == 0) failures++;
    // the array ignored off-pattern input and emitted the FBY zeros
    checks++; if (g_t[0].nig == 0 || g_t[0].nfz == 0) failures++;
    checks++; if (g_t[2].nig == 0 || g_t[2].nfz == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
