// sps_gen: generator of a systolic pattern stream (SPS).
//
// An SPS is a stream of bits, one per clock period, telling whether an arc of
// the array carries a valid datum in that period. Every arc of the two FIR
// arrays has a pattern of the form 0^PREFIX (1 0^(PERIOD-1))*: PREFIX empty
// periods, then one valid datum every PERIOD periods. The arrays sample their
// inputs and outputs at the times this module marks.
//
// Interface: start (one cycle) restarts the pattern; the first cycle after
// start is period 0. strobe is high in the periods whose SPS bit is 1. Before
// the first start after reset strobe stays low. PERIOD = 1 gives (1)*,
// PERIOD = 2 gives (10)*. Counting from start is this design's own choice.
module sps_gen #(
  parameter int unsigned PREFIX = 0,
  parameter int unsigned PERIOD = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic strobe
);
  localparam int unsigned CW = $clog2(PREFIX + 2);
  localparam int unsigned PW = $clog2(PERIOD + 1);
  localparam logic [CW-1:0] PRE_END = CW'(PREFIX);
  localparam logic [PW-1:0] PH_END  = PW'(PERIOD - 1);

  initial assert (PERIOD >= 1) else $error("sps_gen: PERIOD must be at least 1");

  logic          running;
  logic [CW-1:0] pre;
  logic [PW-1:0] ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      pre     <= '0;
      ph      <= '0;
    end else if (start) begin
      running <= 1'b1;
      pre     <= '0;
      ph      <= '0;
    end else if (running) begin
      if (pre != PRE_END) pre <= pre + 1'b1;
      else                ph  <= (ph == PH_END) ? '0 : ph + 1'b1;
    end
  end

  assign strobe = running && !start && (pre == PRE_END) && (ph == '0);
endmodule
