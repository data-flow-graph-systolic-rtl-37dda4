// fir_uni_array: unidirectional systolic FIR filter (samples and partial sums
// both travel left to right).
//
// The data-flow graph is a row of TAPS identical blocks. Block j (0 = leftmost)
// adds a_(TAPS-1-j) * x to the partial sum and passes the sample stream on
// through a REST node, which drops the stream's first element. The patterns of
// valid data (SPSs) derived for this graph are, for TAPS = 3,
//   partial sum: 0(1)* -> 00(1)* | 0^3(1)* -> 0^4(1)* | 0^5(1)* -> 0^6(1)*
//   samples    : (1)*  -> 00(1)* |           0^4(1)* |           0^6(1)*
// (| marks a cell boundary). At each boundary the partial-sum arc lags the
// sample arc by one clock period, so one extra buffer B sits on the
// partial-sum arc between neighbouring cells; the sample arc needs none. The
// REST nodes disappear: dropping the first element is done by when the output
// is sampled. With every cell buffering its inputs, the output is
//   y_out(t) = sum_k a_k * x(t - TAPS - k),  t counted from start.
//
// Interface and timing (t = clock periods after the start pulse):
//   x_take  : SPS of the sample input, (1)*; the array reads x_in in these
//             periods and feeds zero otherwise. The host sends the stream
//             0^TAPS x1 x2 ..., TAPS zeros first as in the graph's input
//             stream (one is removed by the first REST, the rest are the
//             filter's initial conditions).
//   y_valid : SPS of the output, 0^(2*TAPS)(1)*; y_out = y(n) =
//             a0*x(n) + a1*x(n-1) + ... in period t = n + 2*TAPS - 1,
//             so one result per clock period.
//   x_out, x_out_valid : the sample stream leaving the last cell,
//             SPS 0^(2*TAPS)(1)*, carrying x1 x2 ... .
//   w_we/w_idx/w_data : load weight a_(w_idx) into its cell's register.
// The sampling strobes, the zero feed outside x_take and the weight-load port
// are this design's own choices; the cell structure, the B buffers and the
// patterns follow the method.
module fir_uni_array
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
  // Delay between the first valid datum leaving a cell on the partial-sum arc
  // and the one the next cell needs: 0^(2j+1) against 0^(2j), one period.
  localparam int unsigned B_DEPTH = 1;

  logic signed [ACC_W-1:0]  y_c [TAPS];   // partial sum leaving cell j
  logic signed [ACC_W-1:0]  y_b [TAPS];   // partial sum entering cell j
  logic signed [DATA_W-1:0] x_c [TAPS];   // sample leaving cell j
  logic signed [DATA_W-1:0] x_b [TAPS];   // sample entering cell j
  logic signed [DATA_W-1:0] x_feed;

  sps_gen #(.PREFIX(0), .PERIOD(1)) u_take (
    .clk, .rst_n, .start, .strobe(x_take)
  );
  sps_gen #(.PREFIX(2 * TAPS), .PERIOD(1)) u_yv (
    .clk, .rst_n, .start, .strobe(y_valid)
  );

  assign x_feed      = x_take ? x_in : '0;
  assign y_b[0]      = '0;                  // the graph's constant-zero partial-sum input
  assign x_out_valid = y_valid;

  for (genvar j = 0; j < TAPS; j++) begin : g_cell
    if (j == 0) begin : g_x0
      assign x_b[j] = x_feed;
    end else begin : g_xc
      assign x_b[j] = x_c[j-1];
    end

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

    if (j > 0) begin : g_b
      sa_buffer #(.WIDTH(ACC_W), .DEPTH(B_DEPTH), .INIT('0)) u_b (
        .clk, .rst_n, .clr(start), .d(y_c[j-1]), .q(y_b[j])
      );
    end
  end

  assign y_out = y_c[TAPS-1];
  assign x_out = x_c[TAPS-1];

  // Full rate: once the output pattern has begun it continues every period.
  a_full_rate: assert property (@(posedge clk) disable iff (!rst_n)
    (y_valid && !start) |=> (y_valid || start));
endmodule
