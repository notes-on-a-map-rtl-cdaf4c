// map_asm_pkg: instruction-word builders for the MAP testbenches.
// They pack fields in the layout described in map_pkg:
//   memory format    {op, R[3:0], X[2:0], I, ADDR[15:0]}
//   register format  {op, R3, R1, R2, D, 11'b0}
//   immediate format {op, R, OPD[19:0]}
//   associative      {op, KEY, MASK, N, R[2:0], R2[2:0], 1'b0}
//   CU branch        memory format with R = {R1[1:0], R2[1:0]}
package map_asm_pkg;
  function automatic logic [31:0] i_mem(logic [7:0] op, logic [3:0] r,
                                        logic [2:0] x, logic ind, logic [15:0] adr);
    return {op, r, x, ind, adr};
  endfunction
  function automatic logic [31:0] i_reg(logic [7:0] op, logic [3:0] r3,
                                        logic [3:0] r1, logic [3:0] r2, logic d = 1'b0);
    return {op, r3, r1, r2, d, 11'b0};
  endfunction
  function automatic logic [31:0] i_imm(logic [7:0] op, logic [3:0] r, int opd);
    return {op, r, opd[19:0]};
  endfunction
  function automatic logic [31:0] i_asc(logic [7:0] op, logic [7:0] key,
                                        logic [7:0] mask, logic n, logic [2:0] r,
                                        logic [2:0] r2 = 3'd0);
    return {op, key, mask, n, r, r2, 1'b0};
  endfunction
  function automatic logic [31:0] i_br(logic [7:0] op, logic [1:0] r1, logic [1:0] r2,
                                       logic [15:0] adr);
    return {op, r1, r2, 3'd0, 1'b0, adr};
  endfunction
endpackage
