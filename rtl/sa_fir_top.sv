// sa_fir_top: the two systolic realizations of the same FIR filter, side by
// side.
//
// u_uni is the unidirectional array (samples and partial sums both move
// right, one result per clock period); u_bidir is the bidirectional array
// (samples move left against the partial sums, one result every two clock
// periods, no extra delay buffers). They share only the clock and the reset;
// each has its own start, weight-load, input and output ports, prefixed uni_
// and bi_. The ports and timing of each are described in fir_uni_array and
// fir_bidir_array. Putting both in one top is this design's own choice; the
// method derives them as two alternative arrays for one filter.
module sa_fir_top
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
  // unidirectional array
  input  logic                     uni_start,
  input  logic                     uni_w_we,
  input  logic [IDX_W-1:0]         uni_w_idx,
  input  logic signed [COEF_W-1:0] uni_w_data,
  input  logic signed [DATA_W-1:0] uni_x_in,
  output logic                     uni_x_take,
  output logic signed [ACC_W-1:0]  uni_y_out,
  output logic                     uni_y_valid,
  output logic signed [DATA_W-1:0] uni_x_out,
  output logic                     uni_x_out_valid,
  // bidirectional array
  input  logic                     bi_start,
  input  logic                     bi_w_we,
  input  logic [IDX_W-1:0]         bi_w_idx,
  input  logic signed [COEF_W-1:0] bi_w_data,
  input  logic signed [DATA_W-1:0] bi_x_in,
  output logic                     bi_x_take,
  output logic signed [ACC_W-1:0]  bi_y_out,
  output logic                     bi_y_valid,
  output logic signed [DATA_W-1:0] bi_x_out,
  output logic                     bi_x_out_valid
);
  fir_uni_array #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .IDX_W(IDX_W)
  ) u_uni (
    .clk, .rst_n,
    .start       (uni_start),
    .w_we        (uni_w_we),
    .w_idx       (uni_w_idx),
    .w_data      (uni_w_data),
    .x_in        (uni_x_in),
    .x_take      (uni_x_take),
    .y_out       (uni_y_out),
    .y_valid     (uni_y_valid),
    .x_out       (uni_x_out),
    .x_out_valid (uni_x_out_valid)
  );

  fir_bidir_array #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .IDX_W(IDX_W)
  ) u_bidir (
    .clk, .rst_n,
    .start       (bi_start),
    .w_we        (bi_w_we),
    .w_idx       (bi_w_idx),
    .w_data      (bi_w_data),
    .x_in        (bi_x_in),
    .x_take      (bi_x_take),
    .y_out       (bi_y_out),
    .y_valid     (bi_y_valid),
    .x_out       (bi_x_out),
    .x_out_valid (bi_x_out_valid)
  );
endmodule
