// osc_model_pkg: process-variation model for simulating the oscillating
// cells. Not hardware: on silicon the behaviour of a cell comes from its
// transistors; in simulation each cell takes its delay (RO) or its number
// of transient oscillations (TERO) from a hash of a device seed, the block
// (0 = A, 1 = B) and the cell index. Changing the seed models another die.
//
//   ro_half_ps      half period of an RO cell, 900..1100 ps (about 500 MHz)
//   tero_osc_count  oscillations of a TERO cell after ctrl rises, 100..399
//   tero_final      level a TERO cell settles at after its transient
//
// All values are this model's own choice; they are not measured data.
`timescale 1ns / 1ps
package osc_model_pkg;

  // 32-bit integer mixing function (xorshift-multiply).
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  function automatic int unsigned cell_hash(input int unsigned seed,
                                            input int unsigned block,
                                            input int unsigned idx,
                                            input int unsigned salt);
    return mix32(mix32(seed ^ (salt << 24)) ^ (block << 16) ^ idx);
  endfunction

  function automatic int unsigned ro_half_ps(input int unsigned seed,
                                             input int unsigned block,
                                             input int unsigned idx);
    return 900 + cell_hash(seed, block, idx, 1) % 201;
  endfunction

  function automatic int unsigned tero_osc_count(input int unsigned seed,
                                                 input int unsigned block,
                                                 input int unsigned idx);
    return 100 + cell_hash(seed, block, idx, 2) % 300;
  endfunction

  function automatic bit tero_final(input int unsigned seed,
                                    input int unsigned block,
                                    input int unsigned idx);
    return cell_hash(seed, block, idx, 3) % 2 == 1;
  endfunction

endpackage
