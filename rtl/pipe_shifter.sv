// pipe_shifter: the shift unit of a PIPE processor (Ri <- Rj << Rk).
//
// Combinational barrel shifter working next to the ALU in the execute
// stage. It shifts `a` left by the unsigned value of `count`, filling with
// zeros; a count of 32 or more gives 0 (the document does not say what a
// large count does, this is this design's choice). It is built as five
// stages of 2:1 multiplexers, one per count bit, like a layout-friendly
// VLSI shifter.
module pipe_shifter
  import pipe_pkg::*;
(
  input  word_t a,
  input  word_t count,
  output word_t y
);
  word_t stage [6];
  always_comb begin
    stage[0] = a;
    for (int s = 0; s < 5; s++)
      stage[s+1] = count[s] ? (stage[s] << (1 << s)) : stage[s];
    y = (count[31:5] != '0) ? '0 : stage[5];
  end
endmodule
