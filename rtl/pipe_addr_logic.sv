// pipe_addr_logic: effective address of PIPE loads and stores.
//
// The address is base + offset, where the base is Ri (or the literal 0 when
// the Ri field is 0) and the offset is the displacement (32-bit format) or
// Rj (16-bit format). Plain form: address = base + offset. Pre-increment:
// address = base + offset and Ri receives that sum. Post-increment: address
// = base and Ri receives base + offset. Combinational; the issue stage uses
// it in the clock an access issues, the new Ri is written at the end of the
// execute stage. All of this follows the document, except that an
// autoincrement with Ri = 0 writes no register (the document is silent).
module pipe_addr_logic
  import pipe_pkg::*;
(
  input  am_e   mode,
  input  logic  ri_zero,
  input  word_t base,
  input  word_t offset,
  output word_t ea,
  output word_t new_base,
  output logic  writes_base
);
  word_t b, sum;
  always_comb begin
    b           = ri_zero ? '0 : base;
    sum         = b + offset;
    new_base    = sum;
    ea          = (mode == AM_POST) ? b : sum;
    writes_base = (mode != AM_PLAIN) && !ri_zero;
  end
endmodule
