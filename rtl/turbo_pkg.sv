// turbo_pkg - types and constants shared by the LTE turbo encoder and decoder.
//
// The constituent code is the 8-state recursive systematic code of the LTE
// turbo code: feedback polynomial g0(D) = 1 + D^2 + D^3, parity polynomial
// g1(D) = 1 + D + D^3. A polynomial is stored with bit i holding the
// coefficient of D^i. The encoder state is {r1, r2, r3}, r1 being the newest
// register bit, packed as state[2] = r1, state[1] = r2, state[0] = r3.
//
// Fixed-point formats (a design choice; the polynomials are the only numbers
// here that come from the LTE code definition):
//   soft symbol   3-bit unsigned, 0 = confident '0' ... 7 = confident '1'
//   channel LLR   4-bit signed, L = 2*soft - 7 (odd, -7..+7), positive = '1'
//   extrinsic     8-bit signed, saturated
//   branch metric 10-bit signed
//   state metric  12-bit signed, renormalised every step against state 0
package turbo_pkg;

  localparam int NS        = 8;   // trellis states
  localparam logic [3:0] G0_POLY = 4'b1101;  // 1 + D^2 + D^3 (feedback)
  localparam logic [3:0] G1_POLY = 4'b1011;  // 1 + D + D^3   (parity)

  localparam int SOFT_W = 3;
  localparam int LLR_W  = 4;
  localparam int EXT_W  = 8;
  localparam int BM_W   = 10;
  localparam int SM_W   = 12;
  localparam int APP_W  = 16;      // a-posteriori LLR before saturation

  typedef logic        [SOFT_W-1:0] soft_t;
  typedef logic signed [LLR_W-1:0]  llr_t;
  typedef logic signed [EXT_W-1:0]  ext_t;
  typedef logic signed [BM_W-1:0]   bm_t;
  typedef logic signed [SM_W-1:0]   sm_t;
  typedef logic signed [APP_W-1:0]  app_t;
  typedef logic        [2:0]        state_t;

  // Branch metrics of one trellis step, indexed by {u, p}.
  typedef bm_t    bm_vec_t   [4];
  // One metric per trellis state.
  typedef sm_t    sm_vec_t   [NS];
  // Trellis tables indexed [state][u].
  typedef state_t next_tab_t [NS][2];
  typedef logic   par_tab_t  [NS][2];

  // Metric given to the states a terminated trellis cannot be in.
  localparam sm_t SM_NEG = sm_t'(-1024);

  typedef enum logic {SMU_FWD = 1'b0, SMU_BWD = 1'b1} smu_dir_e;

  // 3-bit soft symbol to signed channel LLR.
  function automatic llr_t soft_to_llr(soft_t s);
    return llr_t'(2 * $signed({1'b0, s}) - 7);
  endfunction

  // Saturate an a-posteriori quantity to the extrinsic width.
  function automatic ext_t sat_ext(app_t v);
    if (v > app_t'(127))  return ext_t'(127);
    if (v < app_t'(-127)) return ext_t'(-127);
    return ext_t'(v);
  endfunction

endpackage
