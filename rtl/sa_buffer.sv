// sa_buffer: pipelining buffer of a systolic array.
//
// A chain of DEPTH registers clocked by the single-phase global clock: the
// output is the input delayed by DEPTH clock periods. Each register stands for
// one master-slave flip-flop stage, the default buffer of the target arrays;
// DEPTH > 1 gives the extra delay buffers inserted on an arc between cells
// whose patterns of valid data differ (one register per clock period of
// difference between the first valid data at the two ends).
//
// Interface: d/q data, clr a synchronous clear that loads INIT into every
// stage. INIT is the buffer's initial condition; a buffer that realizes an
// FBY node (stream "a followed by X") holds the constant a as its initial
// value. rst_n is an asynchronous active-low reset that also loads INIT; it is
// this design's own choice, the method only requires a clocked buffer.
// Timing: q(t) = d(t - DEPTH) after the last clear.
module sa_buffer #(
  parameter int unsigned    WIDTH = 16,
  parameter int unsigned    DEPTH = 1,
  parameter logic [WIDTH-1:0] INIT = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  initial assert (DEPTH >= 1) else $error("sa_buffer: DEPTH must be at least 1");

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= INIT;
    end else if (clr) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= INIT;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];
endmodule
