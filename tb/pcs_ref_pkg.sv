// pcs_ref_pkg: reference model of the pseudo-chaotic sequence generator for
// the testbenches, written independently of the RTL cell structure.
//
// State: r[1..8] are the eight 8-bit registers. One step:
//   chip        = XOR of all bits of (r1 ^ r2)
//   r7 <- r8,  r5 <- r7 ^ r8,  r3 <- r5 ^ r6,  r1 <- r3 ^ r4
//   {r8,r6,r4,r2} <- {r8,r6,r4,r2} << 1 | chip   (one 32-bit shift chain)
package pcs_ref_pkg;

  typedef logic [7:0] regs_t [1:8];

  function automatic logic chip_of(input regs_t r);
    return ^(r[1] ^ r[2]);
  endfunction

  function automatic regs_t step(input regs_t r);
    regs_t       n;
    logic [31:0] chain;
    logic        c;
    c     = chip_of(r);
    chain = {r[8], r[6], r[4], r[2]};
    chain = {chain[30:0], c};
    n[7]  = r[8];
    n[5]  = r[7] ^ r[8];
    n[3]  = r[5] ^ r[6];
    n[1]  = r[3] ^ r[4];
    n[8]  = chain[31:24];
    n[6]  = chain[23:16];
    n[4]  = chain[15:8];
    n[2]  = chain[7:0];
    return n;
  endfunction

  // Default seed of the generator: R1..R8.
  function automatic regs_t default_seed();
    regs_t r;
    r[1] = 8'h5A; r[2] = 8'hC3; r[3] = 8'h96; r[4] = 8'h3C;
    r[5] = 8'hA5; r[6] = 8'h69; r[7] = 8'h0F; r[8] = 8'hE1;
    return r;
  endfunction

endpackage
