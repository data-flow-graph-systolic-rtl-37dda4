// tb_sa_cell: self-checking test of the systolic cell.
//
// Drives random partial sums, samples and weight loads and checks, every
// clock period, y_out = y_in(t-1) + w * x_in(t-1) and x_out = x_in(t-1), with
// the weight the one last loaded. After a clear it checks that the sample
// buffer holds its initial value (7 here) and the partial-sum buffer zero, so
// y_out = w * 7, and that the weight survives the clear.
module tb_sa_cell;
  localparam int unsigned DW = 16, CW = 16, AW = 34;
  localparam logic [DW-1:0] XI = 16'sd7;

  logic clk = 0, rst_n = 0, clr = 0, w_we = 0;
  logic signed [CW-1:0] w_in = '0;
  logic signed [AW-1:0] y_in = '0, y_out;
  logic signed [DW-1:0] x_in = '0, x_out;
  longint w_ref = 0, y_prev = 0, x_prev = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sa_cell #(.DATA_W(DW), .COEF_W(CW), .ACC_W(AW), .X_INIT(XI)) dut (
    .clk, .rst_n, .clr, .w_we, .w_in, .y_in, .x_in, .y_out, .x_out
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load a weight
    w_in = 16'sh8001; w_we = 1; w_ref = longint'(w_in);
    @(negedge clk); w_we = 0;
    for (int i = 0; i < 500; i++) begin
      bit do_clr;
      @(negedge clk);
      // effect of what was sampled at the last edge
      #1;
      if (w_we) w_ref = longint'(w_in);   // loaded at the last edge
      if (clr) begin
        check(longint'(x_out) == longint'($signed(XI)), "x initial value after clear");
        check(longint'(y_out) == w_ref * longint'($signed(XI)), "y after clear");
      end else begin
        check(longint'(x_out) == x_prev, "x_out = x_in delayed");
        check(longint'(y_out) == y_prev + w_ref * x_prev, "y_out = y + w*x");
      end
      // new inputs for the next edge
      do_clr = ($urandom % 31) == 0;
      clr    = do_clr;
      y_in   = AW'($signed(32'($urandom)));
      x_in   = DW'($urandom);
      w_we   = ($urandom % 9) == 0;
      w_in   = CW'($urandom);
      y_prev = longint'(y_in);
      x_prev = longint'(x_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
