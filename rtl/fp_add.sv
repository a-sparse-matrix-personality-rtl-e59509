// fp_add: pipelined IEEE-754 double-precision adder, the single adder around
// which the reduction circuit is built. The sum is formed in the first stage
// (round to nearest even, subnormals flushed to zero) and then carried
// through LAT-1 further register stages, so a new operand pair can enter
// every cycle and its sum leaves exactly LAT cycles later. A side-band word
// (the accumulation set ID) and a valid bit travel with each operand pair.
// The whole pipe advances only while `en` is high, which lets the
// surrounding accumulator freeze when its output is back-pressured.
// The description uses a vendor-generated core and does not give its
// latency; LAT = 14 is this design's choice.
module fp_add #(
  parameter int unsigned LAT    = 14,
  parameter int unsigned SIDE_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  logic [63:0]       a,
  input  logic [63:0]       b,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  output logic [63:0]       sum,
  output logic [SIDE_W-1:0] out_side
);
  import spmv_pkg::*;

  logic [LAT-1:0]             v_q;
  logic [LAT-1:0][63:0]       d_q;
  logic [LAT-1:0][SIDE_W-1:0] s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      d_q <= '0;
      s_q <= '0;
    end else if (en) begin
      v_q[0] <= in_valid;
      d_q[0] <= dp_add(a, b);
      s_q[0] <= in_side;
      for (int i = 1; i < LAT; i++) begin
        v_q[i] <= v_q[i-1];
        d_q[i] <= d_q[i-1];
        s_q[i] <= s_q[i-1];
      end
    end
  end

  assign out_valid = v_q[LAT-1];
  assign sum       = d_q[LAT-1];
  assign out_side  = s_q[LAT-1];
endmodule
