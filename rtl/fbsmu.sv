// fbsmu - forward/backward state metric unit.
//
// Holds the eight state metrics of a max-log-MAP recursion in a register and
// advances them by one trellis step per cycle with step = 1. Each state's
// new metric comes from one acs block (an SMU: acs plus its register).
//   DIR = SMU_BWD: beta_k(s)  = max_u beta_k+1(next(s,u)) + bm[{u,par(s,u)}]
//   DIR = SMU_FWD: alpha_k+1(s') = max over the two branches (s,u) that end
//                  in s' of alpha_k(s) + bm[{u,par(s,u)}]
// The predecessors of s' = {a, r1, r2} are s = {r1, r2, j}, j = 0/1, as in
// any shift-register trellis; the input bit of each branch is read from the
// next-state table. After the selection the metric of state 0 is subtracted
// from all eight (renormalisation), so the register stays in range.
// init = 1 loads init_sm (zero for state 0, SM_NEG elsewhere for a
// terminated trellis). The tables nxt/par come from trellis_gen.
// Timing: sm shows the metrics after the last step; one step per clock.
// Reset: asynchronous, active high.
module fbsmu
  import turbo_pkg::*;
#(
  parameter smu_dir_e DIR = SMU_BWD
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      init,
  input  sm_vec_t   init_sm,
  input  logic      step,
  input  bm_vec_t   bm,
  input  next_tab_t nxt,
  input  par_tab_t  par,
  output sm_vec_t   sm
);
  sm_t     cm0 [NS];
  sm_t     cm1 [NS];
  bm_t     cb0 [NS];
  bm_t     cb1 [NS];
  sm_vec_t sel_m;

  // Route metrics and branch metrics to the two inputs of each ACS.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      if (DIR == SMU_BWD) begin
        cm0[s] = sm[nxt[s][0]];
        cb0[s] = bm[{1'b0, par[s][0]}];
        cm1[s] = sm[nxt[s][1]];
        cb1[s] = bm[{1'b1, par[s][1]}];
      end else begin
        state_t p0, p1;
        logic   u0, u1;
        p0 = {state_t'(s) << 1} | 3'd0;
        p1 = {state_t'(s) << 1} | 3'd1;
        u0 = (nxt[p0][1] == state_t'(s));
        u1 = (nxt[p1][1] == state_t'(s));
        cm0[s] = sm[p0];
        cb0[s] = bm[{u0, par[p0][u0]}];
        cm1[s] = sm[p1];
        cb1[s] = bm[{u1, par[p1][u1]}];
      end
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_acs
    acs u_acs (
      .m0(cm0[s]), .b0(cb0[s]), .m1(cm1[s]), .b1(cb1[s]),
      .m_out(sel_m[s]), .sel()
    );
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int s = 0; s < NS; s++) sm[s] <= '0;
    end else if (init) begin
      sm <= init_sm;
    end else if (step) begin
      for (int s = 0; s < NS; s++) sm[s] <= sel_m[s] - sel_m[0];
    end
  end
endmodule
