// pipe_asm_pkg: a small two-pass assembler for PIPE test programs.
//
// A program is written as a task that calls the emit methods of a
// pipe_asm object. It is run twice: the first pass records the parcel
// address of every label, the second pass emits the final parcels with
// branch displacements resolved (displacement = target - address of the
// branch, in 16-bit parcels). Encodings follow pipe_pkg.
package pipe_asm_pkg;
  import pipe_pkg::*;

  class pipe_asm;
    logic [15:0] parcels[$];
    int          lbl[string];
    int          origin;

    function new(int org);
      origin = org;
    endfunction

    function void restart();
      parcels.delete();
    endfunction

    function int here();
      return origin + parcels.size();
    endfunction

    function void label(string n);
      lbl[n] = here();
    endfunction

    function int at(string n);
      return lbl.exists(n) ? lbl[n] : 0;
    endfunction

    function void i16(opcode_e op, bit e, int ri, int rj, int rk);
      parcels.push_back({op, e, 3'(ri), 3'(rj), 3'(rk)});
    endfunction

    function void i32(opcode_e op, bit e, int ri, int disp);
      logic [21:0] d22;
      d22 = 22'(disp);
      parcels.push_back({op, e, 3'(ri), d22[21:16]});
      parcels.push_back(d22[15:0]);
    endfunction

    // PC-relative prepare-to-branch / call to a label
    function void br(opcode_e op, bit e, int ri, string target);
      i32(op, e, ri, at(target) - here());
    endfunction
  endclass
endpackage
