// tb_sa_fir_top: end-to-end test of sa_fir_top at its default parameters.
//
// Both arrays run at once, each driven and checked by its runner: weights are
// loaded, the stream is started, every output sample is compared with a
// direct evaluation of y(n) = a0 x(n) + a1 x(n-1) + a2 x(n-2), and every
// sampling strobe with its systolic pattern stream. The test counts how often
// each mechanism of the design happened and fails if one never did: results
// at full rate (unidirectional) and at half rate (bidirectional), restarts
// while a stream is in flight, weight reloads, input periods the
// bidirectional array ignores, and the zeros its FBY initial conditions
// put on the leftward sample stream.
module tb_sa_fir_top;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic        uni_start, uni_w_we, uni_x_take, uni_y_valid, uni_x_out_valid;
  logic [1:0]  uni_w_idx;
  logic signed [15:0] uni_w_data, uni_x_in, uni_x_out;
  logic signed [33:0] uni_y_out;
  logic        bi_start, bi_w_we, bi_x_take, bi_y_valid, bi_x_out_valid;
  logic [1:0]  bi_w_idx;
  logic signed [15:0] bi_w_data, bi_x_in, bi_x_out;
  logic signed [33:0] bi_y_out;

  logic u_done, b_done;
  int u_c, u_f, u_res, u_rs, u_rl;
  int b_c, b_f, b_res, b_rs, b_rl, b_ig, b_fz;
  int u_cycles, b_cycles;

  always #5 clk = ~clk;

  sa_fir_top dut (.*);

  tb_uni_runner #(.TAPS(3), .ACC_W(34), .IDX_W(2), .NS(200), .RUNS(4), .SEED(5)) u_run (
    .clk, .rst_n,
    .start(uni_start), .w_we(uni_w_we), .w_idx(uni_w_idx), .w_data(uni_w_data),
    .x_in(uni_x_in), .x_take(uni_x_take), .y_out(uni_y_out), .y_valid(uni_y_valid),
    .x_out(uni_x_out), .x_out_valid(uni_x_out_valid),
    .done(u_done), .checks(u_c), .failures(u_f),
    .n_results(u_res), .n_restarts(u_rs), .n_reloads(u_rl)
  );

  tb_bidir_runner #(.TAPS(3), .ACC_W(34), .IDX_W(2), .NS(200), .RUNS(4), .SEED(6)) b_run (
    .clk, .rst_n,
    .start(bi_start), .w_we(bi_w_we), .w_idx(bi_w_idx), .w_data(bi_w_data),
    .x_in(bi_x_in), .x_take(bi_x_take), .y_out(bi_y_out), .y_valid(bi_y_valid),
    .x_out(bi_x_out), .x_out_valid(bi_x_out_valid),
    .done(b_done), .checks(b_c), .failures(b_f),
    .n_results(b_res), .n_restarts(b_rs), .n_reloads(b_rl),
    .n_ignored(b_ig), .n_fby_zeros(b_fz)
  );

  // cycles each array spent between its first start and its runner finishing
  always @(posedge clk) begin
    if (rst_n && !u_done) u_cycles++;
    if (rst_n && !b_done) b_cycles++;
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("  FAIL: %s never happened", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u_cycles = 0; b_cycles = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (u_done && b_done);
    @(negedge clk);
    checks   += u_c + b_c;
    failures += u_f + b_f;
    $display("mechanisms:");
    need("uni results (full rate)", u_res);
    need("uni restarts in flight", u_rs);
    need("uni weight reloads", u_rl);
    need("bidir results (half rate)", b_res);
    need("bidir restarts in flight", b_rs);
    need("bidir weight reloads", b_rl);
    need("bidir ignored input periods", b_ig);
    need("bidir FBY zeros on x_out", b_fz);
    // throughput: the same number of samples takes about twice as long
    checks++;
    if (!(2 * b_cycles > 3 * u_cycles)) begin
      failures++;
      $display("FAIL: rates, uni %0d cycles, bidir %0d cycles", u_cycles, b_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
