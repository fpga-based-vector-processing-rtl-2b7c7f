// fp_add_model: behavioural model of one IEEE 754 single-precision adder IP core.
//
// Not synthesizable logic of this design: it stands in for the purchased FP adder in
// simulation. It is a LAT-stage pipeline that accepts an operation every clock; y shows
// a + b, rounded to single precision, LAT clocks after a and b were presented.
module fp_add_model #(
  parameter int unsigned LAT = 4
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [31:0] pipe [LAT];

  always_ff @(posedge clk) begin
    pipe[0] <= $shortrealtobits($bitstoshortreal(a) + $bitstoshortreal(b));
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign y = pipe[LAT-1];
endmodule
