// Lead-one detector: position of the most significant set bit of a word.
//
// Combinational priority encoder. pos is the index of the highest 1 in x and
// zero flags an all-zero input (pos is then 0). Used by the log_pow unit to find
// the base-2 exponent of a linear value.
module lead_one_detector #(
  parameter int W = 32,
  localparam int PW = $clog2(W)
) (
  input  logic [W-1:0]  x,
  output logic [PW-1:0] pos,
  output logic          zero
);
  always_comb begin
    pos  = '0;
    zero = (x == '0);
    for (int i = 0; i < W; i++)
      if (x[i]) pos = PW'(i);
  end
endmodule
