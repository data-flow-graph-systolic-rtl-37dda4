// tb_sa_buffer: self-checking test of the pipelining buffer.
//
// Two buffers, DEPTH 1 and DEPTH 3 (the latter with a non-zero initial value),
// get random data every clock period. A delay line kept here gives the
// expected output: q(t) = d(t - DEPTH), and after a synchronous clear the
// initial value for DEPTH periods. The clear is pulsed at random.
module tb_sa_buffer;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] INIT3 = 8'h5A;

  logic clk = 0, rst_n = 0, clr = 0;
  logic [W-1:0] d = '0, q1, q3;
  logic [W-1:0] hist1 [1];
  logic [W-1:0] hist3 [3];
  int checks = 0, failures = 0, n_clr = 0;

  always #5 clk = ~clk;

  sa_buffer #(.WIDTH(W), .DEPTH(1), .INIT('0))  dut1 (.clk, .rst_n, .clr, .d, .q(q1));
  sa_buffer #(.WIDTH(W), .DEPTH(3), .INIT(INIT3)) dut3 (.clk, .rst_n, .clr, .d, .q(q3));

  // reference delay lines
  always @(posedge clk) begin
    if (!rst_n || clr) begin
      hist1[0] <= '0;
      for (int i = 0; i < 3; i++) hist3[i] <= INIT3;
    end else begin
      hist1[0] <= d;
      hist3[0] <= d;
      hist3[1] <= hist3[0];
      hist3[2] <= hist3[1];
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // right after reset both hold their initial values
    #1;
    checks++; if (q1 != '0)    failures++;
    checks++; if (q3 != INIT3) failures++;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d   = W'($urandom);
      clr = ($urandom % 23) == 0;
      if (clr) n_clr++;
      #1;
      checks++; if (q1 != hist1[0]) begin failures++; $display("q1 mismatch at %0t", $time); end
      checks++; if (q3 != hist3[2]) begin failures++; $display("q3 mismatch at %0t", $time); end
    end
    checks++; if (n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
