// sa_cell: one cell of a systolic FIR array, the realization of one DFG block.
//
// The block of the data-flow graph has a multiplier, an adder and one stream
// node (REST in the unidirectional array, FBY in the bidirectional one). After
// mapping, only the multiplier and the adder remain as logic; the stream node
// becomes a matter of when data are sampled (REST) or of a buffer's initial
// value (FBY). Each input port has a pipelining buffer, as the method places
// the master-slave buffers at the input ports of a cell:
//
//   y_buf <= y_in          x_buf <= x_in           (one clock period each)
//   y_out  = y_buf + w * x_buf                     (no delay through the nodes)
//   x_out  = x_buf
//
// The weight does not change in time, so it sits in a register, loaded when
// w_we is high (the load port is this design's own choice). clr clears both
// data buffers to their initial conditions (X_INIT for the sample buffer, zero
// for the partial sum) and leaves the weight alone. Samples and weights are
// signed two's complement; y is the full-precision partial sum. The cell does
// not know the direction of the sample stream: the array wires x_in/x_out to
// the left or right neighbour.
module sa_cell
  import sa_pkg::*;
#(
  parameter int unsigned       DATA_W = DATA_W_DEF,
  parameter int unsigned       COEF_W = COEF_W_DEF,
  parameter int unsigned       ACC_W  = ACC_W_DEF,
  parameter logic [DATA_W-1:0] X_INIT = '0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     w_we,
  input  logic signed [COEF_W-1:0] w_in,
  input  logic signed [ACC_W-1:0]  y_in,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [ACC_W-1:0]  y_out,
  output logic signed [DATA_W-1:0] x_out
);
  localparam int unsigned PROD_W = DATA_W + COEF_W;
  initial assert (ACC_W >= PROD_W) else $error("sa_cell: ACC_W narrower than a product");

  logic signed [ACC_W-1:0]  y_buf;
  logic signed [DATA_W-1:0] x_buf;
  logic signed [PROD_W-1:0] prod;
  logic signed [COEF_W-1:0] w_q;

  sa_buffer #(.WIDTH(ACC_W), .DEPTH(1), .INIT('0)) u_ybuf (
    .clk, .rst_n, .clr, .d(y_in), .q(y_buf)
  );

  sa_buffer #(.WIDTH(DATA_W), .DEPTH(1), .INIT(X_INIT)) u_xbuf (
    .clk, .rst_n, .clr, .d(x_in), .q(x_buf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    w_q <= '0;
    else if (w_we) w_q <= w_in;
  end

  always_comb begin
    prod  = x_buf * w_q;
    y_out = y_buf + ACC_W'(prod);
  end

  assign x_out = x_buf;
endmodule
