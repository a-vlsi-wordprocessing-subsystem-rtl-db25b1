// minpla: choose the best of three predecessor sums.
//
// From the comparison ring a<=b (fisecom), b<=c (sethcom), c<=a (thficom)
// it selects a smallest of the three sums and registers the choice at
// stage 5, where it drives the predecessor multiplexer of outmindp and, as
// sela/selb, the tag multiplexer of the backtrace processor. Code {selb,sela}:
// 00 first, 01 second, 10 third, read from the select table of the design's
// block diagram. The decode below is this implementation's: any value it
// picks is a minimum; with all three equal it picks the first.
module minpla (
  input  logic clk,
  input  logic en,
  input  logic fisecom,
  input  logic sethcom,
  input  logic thficom,
  output logic sela,
  output logic selb
);
  logic [1:0] code;

  always_comb begin
    if (fisecom && !thficom)      code = 2'b00;
    else if (sethcom && !fisecom) code = 2'b01;
    else if (thficom && !sethcom) code = 2'b10;
    else                          code = 2'b00;
  end

  always_ff @(posedge clk)
    if (en) {selb, sela} <= code;
endmodule
