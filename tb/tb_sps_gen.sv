// tb_sps_gen: self-checking test of the systolic-pattern-stream generator.
//
// Six generators with the patterns the FIR arrays use, (1)*, 0^6(1)*, (10)*
// shifted by 1, 2 and 3, and one with period 3, are started together and
// restarted at random times. Each strobe is compared every clock period with
// the expected bit of 0^PREFIX (1 0^(PERIOD-1))*, counting periods from the
// cycle after start; before the first start every strobe must be low.
module tb_sps_gen;
  localparam int NG = 6;
  localparam int PRE [NG] = '{0, 6, 1, 2, 3, 4};
  localparam int PER [NG] = '{1, 1, 2, 2, 2, 3};

  logic clk = 0, rst_n = 0, start = 0;
  logic [NG-1:0] strobe;
  int checks = 0, failures = 0, n_starts = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NG; g++) begin : g_dut
    sps_gen #(.PREFIX(PRE[g]), .PERIOD(PER[g])) dut (.clk, .rst_n, .start, .strobe(strobe[g]));
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = -1;          // -1: not started yet
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      // start was sampled at the last edge: this cycle is period 0
      if (start) t = 0; else if (t >= 0) t++;
      start = (i == 10) || (i > 10 && ($urandom % 97) == 0);
      if (start) n_starts++;
      #1;
      for (int g = 0; g < NG; g++) begin
        automatic bit e = !start && t >= PRE[g] && ((t - PRE[g]) % PER[g]) == 0;
        checks++;
        if (strobe[g] != e) begin
          failures++;
          $display("FAIL gen %0d period %0d: strobe %0b expected %0b", g, t, strobe[g], e);
        end
      end
    end
    checks++; if (n_starts < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
