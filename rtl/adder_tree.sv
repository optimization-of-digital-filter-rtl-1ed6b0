// adder_tree: five-input adder of the biquad, two clock cycles of latency.
//
// Stage 1 registers in1+in2 and in3+in4 (one guard bit each) and delays in5.
// Stage 2 adds the two partial sums and the delayed in5 into a full-precision
// fix_67_56 result. `en` freezes both stages (the biquad drops it for unused
// stages). The pairing of the inputs and the full precision follow the original
// adder tree; the exact placement of the registers is this design's choice.
// Inputs and output are fix_64_56 / fix_67_56 (binary point unchanged).
module adder_tree
  import iir_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  data_t in1,
  input  data_t in2,
  input  data_t in3,
  input  data_t in4,
  input  data_t in5,
  output sum_t  out
);

  logic signed [DATA_W:0] s12, s34;
  data_t                  d5;

  always_ff @(posedge clk) begin
    if (en) begin
      s12 <= (DATA_W+1)'(in1) + (DATA_W+1)'(in2);
      s34 <= (DATA_W+1)'(in3) + (DATA_W+1)'(in4);
      d5  <= in5;
      out <= sum_t'(s12) + sum_t'(s34) + sum_t'(d5);
    end
  end

endmodule
