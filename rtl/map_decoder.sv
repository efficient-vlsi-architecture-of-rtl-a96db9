// map_decoder - soft-in soft-out max-log-MAP decoder of one constituent code.
//
// A block of K trellis steps plus the 3 termination steps is decoded in
// three passes, all one trellis step per clock:
//   LOAD  K+3 cycles with in_valid: systematic LLR ls, parity LLR lp and
//         a-priori LLR la of step n are stored in the input buffer.
// Each cycle of BWD and FWD reads one step from the input buffer; its
// branch metrics (bmr) are registered, and the state metric units and the
// decision unit work on them in the next cycle.
//   BWD   K+3 cycles: the backward fbsmu runs from step K+2 down to 0,
//         starting in state 0 (the trellis is terminated); beta of steps
//         1..K is stored in the state metric buffer (virtual_memory).
//   FWD   K cycles: the forward fbsmu runs from step 0 (state 0); each
//         cycle the decision_unit combines alpha_k, the branch metrics of
//         step k and the stored beta_k+1 into the a-posteriori LLR, the
//         hard decision and the extrinsic value of bit k.
// Branch metrics come from the bmr block; the trellis tables from 16
// trellis_gen instances.
//
// Interface: start (one cycle, with blk_len = K) opens a block; the K+3
// inputs follow with in_valid, in any spacing. Results leave in order
// k = 0..K-1 with out_valid, one register after the decision unit; done
// pulses with the last one. The first output follows the last input by
// K+5 cycles; with continuous input, done rises 3K+8 cycles after the
// cycle in which start is sampled. busy is high from start until done.
// Reset: asynchronous rst or synchronous srst, both active high.
module map_decoder
  import turbo_pkg::*;
#(
  parameter int KMAX = 6144,
  parameter int KW   = $clog2(KMAX + 4)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          srst,
  input  logic          start,
  input  logic [KW-1:0] blk_len,
  input  logic          in_valid,
  input  llr_t          in_ls,
  input  llr_t          in_lp,
  input  ext_t          in_la,
  output logic          busy,
  output logic          out_valid,
  output logic [KW-1:0] out_idx,
  output app_t          out_llr,
  output ext_t          out_ext,
  output logic          out_hard,
  output logic          done
);
  localparam int IN_W = 2 * LLR_W + EXT_W;
  localparam int IAW  = $clog2(KMAX + 3);
  localparam int BAW  = $clog2(KMAX);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_BWD, S_FWD, S_DRAIN} st_e;
  st_e st;

  logic [KW-1:0] k_len, idx;

  // ---------------------------------------------------------------- trellis
  next_tab_t nxt;
  par_tab_t  par;
  for (genvar s = 0; s < NS; s++) begin : g_tr_s
    for (genvar u = 0; u < 2; u++) begin : g_tr_u
      logic unused_sys;
      trellis_gen u_tg (
        .state(state_t'(s)), .u(1'(u)), .term(1'b0),
        .next_state(nxt[s][u]), .parity(par[s][u]), .sys(unused_sys)
      );
    end
  end

  // ----------------------------------------------------------- input buffer
  logic [IN_W-1:0] in_wdata, in_rdata;
  logic            in_we;
  llr_t            r_ls, r_lp;
  ext_t            r_la;

  assign in_we    = (st == S_LOAD) && in_valid;
  assign in_wdata = {in_ls, in_lp, in_la};

  virtual_memory #(.WIDTH(IN_W), .DEPTH(KMAX + 3)) u_in_mem (
    .clk(clk), .we(in_we), .waddr(IAW'(idx)), .wdata(in_wdata),
    .raddr(IAW'(idx)), .rdata(in_rdata)
  );
  assign {r_ls, r_lp, r_la} = in_rdata;

  bm_vec_t bm;
  bmr u_bmr (.ls(r_ls), .lp(r_lp), .la(r_la), .bm(bm));

  // Branch metric register: the recursions and the decision work on the
  // step read in the previous cycle.
  bm_vec_t       bm_q;
  llr_t          ls_q;
  ext_t          la_q;
  logic [KW-1:0] idx_q;
  logic          bwd_q, fwd_q;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) bm_q[i] <= '0;
      ls_q <= '0; la_q <= '0; idx_q <= '0; bwd_q <= 1'b0; fwd_q <= 1'b0;
    end else begin
      bm_q  <= bm;
      ls_q  <= r_ls;
      la_q  <= r_la;
      idx_q <= idx;
      bwd_q <= (st == S_BWD) && !srst;
      fwd_q <= (st == S_FWD) && !srst;
    end
  end

  // ------------------------------------------------------ state metric units
  sm_vec_t init_sm, beta, alpha, beta_rd;
  logic    last_load, bwd_step, fwd_step;

  always_comb begin
    for (int s = 0; s < NS; s++) init_sm[s] = (s == 0) ? '0 : SM_NEG;
  end

  assign last_load = in_we && (idx == k_len + KW'(2));
  assign bwd_step  = bwd_q;
  assign fwd_step  = fwd_q;

  fbsmu #(.DIR(SMU_BWD)) u_bwd (
    .clk(clk), .rst(rst), .init(last_load), .init_sm(init_sm),
    .step(bwd_step), .bm(bm_q), .nxt(nxt), .par(par), .sm(beta)
  );
  fbsmu #(.DIR(SMU_FWD)) u_fwd (
    .clk(clk), .rst(rst), .init(last_load), .init_sm(init_sm),
    .step(fwd_step), .bm(bm_q), .nxt(nxt), .par(par), .sm(alpha)
  );

  // beta_k+1 is stored at address k (k < K) during the backward pass
  logic [NS*SM_W-1:0] beta_wdata, beta_rdata;
  logic               beta_we;
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      beta_wdata[s*SM_W +: SM_W] = beta[s];
      beta_rd[s] = sm_t'(beta_rdata[s*SM_W +: SM_W]);
    end
  end
  assign beta_we = bwd_step && (idx_q < k_len);

  virtual_memory #(.WIDTH(NS * SM_W), .DEPTH(KMAX)) u_beta_mem (
    .clk(clk), .we(beta_we), .waddr(BAW'(idx_q)), .wdata(beta_wdata),
    .raddr(BAW'(idx_q)), .rdata(beta_rdata)
  );

  // ----------------------------------------------------------- decision unit
  app_t d_llr;
  ext_t d_ext;
  logic d_hard;
  decision_unit u_dec (
    .alpha(alpha), .beta_next(beta_rd), .bm(bm_q), .nxt(nxt), .par(par),
    .ls(ls_q), .la(la_q), .llr(d_llr), .ext(d_ext), .hard(d_hard)
  );

  // -------------------------------------------------------------- control
  assign busy = (st != S_IDLE);

  // A block may only be opened while the decoder is idle, and inputs are
  // only taken while a block is being loaded.
  a_start_idle: assert property (@(posedge clk) disable iff (rst || srst)
    start |-> st == S_IDLE);
  a_input_in_load: assert property (@(posedge clk) disable iff (rst || srst)
    in_valid |-> st == S_LOAD);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st <= S_IDLE; k_len <= '0; idx <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_llr <= '0; out_ext <= '0;
      out_hard <= 1'b0; done <= 1'b0;
    end else if (srst) begin
      st <= S_IDLE; k_len <= '0; idx <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_llr <= '0; out_ext <= '0;
      out_hard <= 1'b0; done <= 1'b0;
    end else begin
      out_valid <= fwd_q;
      done      <= fwd_q && (idx_q == k_len - 1'b1);
      if (fwd_q) begin
        out_idx  <= idx_q;
        out_llr  <= d_llr;
        out_ext  <= d_ext;
        out_hard <= d_hard;
      end
      unique case (st)
        S_IDLE: if (start) begin
          k_len <= blk_len;
          idx   <= '0;
          st    <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          if (last_load) st <= S_BWD;
          else           idx <= idx + 1'b1;
        end
        S_BWD: begin
          if (idx == '0) st <= S_FWD;
          else           idx <= idx - 1'b1;
        end
        S_FWD: begin
          if (idx == k_len - 1'b1) st <= S_DRAIN;
          else                     idx <= idx + 1'b1;
        end
        S_DRAIN: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
