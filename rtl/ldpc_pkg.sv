// ldpc_pkg: types shared by the LDPC early-stopping logic.
package ldpc_pkg;
  // Why decoding of a block ended.
  typedef enum logic [1:0] {
    STOP_NONE        = 2'd0,  // still decoding
    STOP_VALID       = 2'd1,  // all parity checks satisfied
    STOP_MAXITER     = 2'd2,  // iteration limit reached
    STOP_UNDECODABLE = 2'd3   // early stop: block judged undecodable
  } stop_reason_e;
endpackage
