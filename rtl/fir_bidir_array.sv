// fir_bidir_array: bidirectional systolic FIR filter (partial sums travel left
// to right, samples right to left).
//
// This array comes from a reshaped graph. A REST node on one stream can be
// replaced by an FBY node on the reversed stream (FBY(a, X) is the stream "a
// followed by X"), so the samples enter at the right and each cell but the
// rightmost prepends a zero to the stream it passes left. The sample stream
// and the partial sums now meet head-on, so valid data can only be one
// clock period in every two: the interval equals the two-period block cycle.
// The patterns (SPSs) for TAPS = 3, reading the cells left to right, are
//   partial sum (rightward): (10)* -> 0(10)* -> 00(10)* -> 0^3(10)*
//   samples     (leftward) : 0(10)* <- 00(10)* <- 0^3(10)* <- 00(10)*
// Both arcs between neighbours already agree, so no extra buffers are needed:
// each cell has only its input buffers. An FBY node becomes the initial value
// (zero) of the sample buffer in its cell, cleared at start. With cell j
// holding a_(TAPS-1-j) the output is
//   y_out(t) = sum_k a_k * x_in(t - 1 - 2k).
//
// Interface and timing (t = clock periods after the start pulse):
//   x_take  : SPS of the sample input, 0^(TAPS-1)(10)*; x1, x2, ... are read
//             in these periods. Outside them the array feeds zero, so what
//             the host drives there does not matter and the initial zeros of
//             the FBY nodes are kept.
//   y_valid : SPS of the output, 0^TAPS(10)*; y(n) = a0*x(n) + a1*x(n-1) + ...
//             appears one period after x(n) was taken, one result every two
//             periods.
//   x_out, x_out_valid : the sample stream leaving the leftmost cell, SPS
//             0(10)*, carrying the TAPS-1 prepended zeros and then x1 x2 ...
//   w_we/w_idx/w_data : load weight a_(w_idx) into its cell's register.
// The sampling strobes, the zero feed outside x_take and the weight-load port
// are this design's own choices; the cells, their wiring and the patterns
// follow the method.
module fir_bidir_array
  import sa_pkg::*;
#(
  parameter int unsigned TAPS   = TAPS_DEF,
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned ACC_W  = acc_width(DATA_W, COEF_W, TAPS),
  parameter int unsigned IDX_W  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     w_we,
  input  logic [IDX_W-1:0]         w_idx,
  input  logic signed [COEF_W-1:0] w_data,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     x_take,
  output logic signed [ACC_W-1:0]  y_out,
  output logic                     y_valid,
  output logic signed [DATA_W-1:0] x_out,
  output logic                     x_out_valid
);
  logic signed [ACC_W-1:0]  y_c [TAPS];   // partial sum leaving cell j (rightward)
  logic signed [ACC_W-1:0]  y_b [TAPS];   // partial sum entering cell j
  logic signed [DATA_W-1:0] x_c [TAPS];   // sample leaving cell j (leftward)
  logic signed [DATA_W-1:0] x_b [TAPS];   // sample entering cell j
  logic signed [DATA_W-1:0] x_feed;

  sps_gen #(.PREFIX(TAPS - 1), .PERIOD(2)) u_take (
    .clk, .rst_n, .start, .strobe(x_take)
  );
  sps_gen #(.PREFIX(TAPS), .PERIOD(2)) u_yv (
    .clk, .rst_n, .start, .strobe(y_valid)
  );
  sps_gen #(.PREFIX(1), .PERIOD(2)) u_xv (
    .clk, .rst_n, .start, .strobe(x_out_valid)
  );

  assign x_feed = x_take ? x_in : '0;

  for (genvar j = 0; j < TAPS; j++) begin : g_cell
    if (j == 0) begin : g_yl
      assign y_b[j] = '0;                  // the graph's constant-zero partial-sum input
    end else begin : g_yc
      assign y_b[j] = y_c[j-1];
    end
    if (j == TAPS - 1) begin : g_xr
      assign x_b[j] = x_feed;
    end else begin : g_xc
      assign x_b[j] = x_c[j+1];
    end

    // Cells 0 .. TAPS-2 hold an FBY node: their sample buffer starts at zero.
    sa_cell #(
      .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .X_INIT('0)
    ) u_cell (
      .clk, .rst_n,
      .clr   (start),
      .w_we  (w_we && (w_idx == IDX_W'(TAPS - 1 - j))),
      .w_in  (w_data),
      .y_in  (y_b[j]),
      .x_in  (x_b[j]),
      .y_out (y_c[j]),
      .x_out (x_c[j])
    );
  end

  assign y_out = y_c[TAPS-1];
  assign x_out = x_c[0];

  // Half rate: a valid output is never followed by another in the next period.
  a_half_rate: assert property (@(posedge clk) disable iff (!rst_n)
    y_valid |=> !y_valid);
  a_take_half_rate: assert property (@(posedge clk) disable iff (!rst_n)
    x_take |=> !x_take);
endmodule
