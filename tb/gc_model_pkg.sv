// gc_model_pkg: garbler model for the testbenches. Labels follow free
// XOR (the true label of a wire is its false label XOR a global delta
// whose lowest bit is 1, so the two labels of a wire have opposite color
// bits). An AND gate is garbled with point-and-permute and row
// reduction: the row addressed by the color bits {color(A), color(B)} of
// the input labels holds AES_A(B) XOR the output label, and row 0 is made
// zero by choosing the output labels from it.
package gc_model_pkg;
  import aes_ref_pkg::*;

  typedef struct {
    logic [127:0] c0;        // false label of the output wire
    logic [127:0] ct [4];    // rows 1..3 are sent; row 0 is zero
  } and_gate_t;

  function automatic and_gate_t garble_and(input logic [127:0] a0, input logic [127:0] b0,
                                           input logic [127:0] delta);
    and_gate_t g;
    logic [127:0] h [4], la, lb;
    logic         v [4];
    logic [1:0]   row;
    for (int i = 0; i < 4; i++) begin
      logic va, vb;
      va = i[1];
      vb = i[0];
      la = a0 ^ (va ? delta : '0);
      lb = b0 ^ (vb ? delta : '0);
      row = {la[0], lb[0]};
      h[row] = encrypt(la, lb);
      v[row] = va & vb;
    end
    g.c0 = v[0] ? h[0] ^ delta : h[0];
    for (int r = 0; r < 4; r++) g.ct[r] = h[r] ^ (v[r] ? g.c0 ^ delta : g.c0);
    return g;
  endfunction

endpackage
