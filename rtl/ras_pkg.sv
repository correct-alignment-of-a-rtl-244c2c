// ras_pkg: types shared by the return-address-stack predictor.
//
// A branch is classified by how it touches the return-address stack (RAS):
// a call pushes its return address, a return pops the top entry, and every
// other control transfer (conditional branch, direct or indirect jump) leaves
// the stack alone. That three-way split is exactly what the recovery rule
// needs. The 2-bit encoding is this design's own choice.
package ras_pkg;

  typedef enum logic [1:0] {
    BR_OTHER  = 2'd0,   // conditional branch or any branch that does not touch the RAS
    BR_CALL   = 2'd1,   // pushes the return address
    BR_RETURN = 2'd2    // pops the predicted return address
  } br_type_e;

endpackage
