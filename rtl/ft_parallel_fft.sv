// ft_parallel_fft: K parallel FFTs protected against a single soft fault by
// one parity FFT and Parseval (sum-of-squares, SOS) checks.
//
// Idea: the DFT is linear, so an extra "parity" FFT fed with x1+...+xK
// produces X1+...+XK. If one FFT's output is wrong, it can be rebuilt as
// Xp minus the others. Which one is wrong is found with SOS checks, which
// compare the energy of a block before and after the transform:
//   PARITY_SOS     (SCHEME = 0): one SOS check per FFT, K checks.
//   PARITY_SOS_ECC (SCHEME = 1): NC Hamming-coded checks, check c watching
//                  the sum of the FFTs whose code column has bit c set
//                  (for K = 4: c1 = {1,2,3}, c2 = {1,2,4}, c3 = {1,3,4});
//                  the syndrome names the faulty FFT.
// Dataflow: the K inputs arrive in lockstep, one complex sample per FFT per
// cycle (in_valid/in_ready); the same samples, summed, feed the parity
// core. All K+1 cores run in step (see fft_r4_core for the per-block
// timing). Their outputs go to one block buffer per core and, through the
// check adders, to the SOS checks. When the checks finish at the end of the
// output block, their flags are latched three times; three fault_corrector
// copies read the buffers and a tmr_voter takes the majority, so one upset
// in the location/correction logic cannot reach the outputs. The corrected
// block then streams out (out_valid, out_last) N+3 cycles after the cores'
// output, with the block's verdict on the status outputs. In the
// Hamming-coded scheme the adders in front of the checks are tripled and
// voted too. Faults in the parity FFT never reach the outputs; a fault in
// an SOS check at most causes a harmless correction (PARITY_SOS) or a
// weight-one syndrome that is ignored (PARITY_SOS_ECC).
// Widths: data FFTs 12-bit in / 14-bit out, parity FFT 14 / 16, 39-bit
// check accumulators, as in the document; tau is a run-time tolerance in
// squared output LSBs.
// Fault-injection ports (fi_*) reach the memories and coefficient registers
// of any core (fi_fft = K selects the parity core), the accumulator of any
// check and one flag copy of the TMR, for testing.
// Follows the document: the two schemes, the parity FFT, the SOS checks,
// Table I coding, correction by eq. (3)/(4), TMR on the detection and
// correction logic. This design's choices: the block buffers (the document
// does not say how outputs are held until the checks end), the handshake,
// the status outputs and the fault-injection ports.
module ft_parallel_fft #(
  parameter ft_fft_pkg::scheme_e SCHEME = ft_fft_pkg::PARITY_SOS_ECC,
  parameter int unsigned K         = 4,
  parameter int unsigned IN_W      = 12,
  parameter int unsigned OUT_W     = 14,
  parameter int unsigned LOG4_NMAX = 5,
  parameter int unsigned TW_W      = 16,
  parameter int unsigned ACC_W     = 39,
  localparam int unsigned NC    = ft_fft_pkg::num_checks(SCHEME, K),
  localparam int unsigned AW    = 2 * LOG4_NMAX,
  localparam int unsigned SW    = $clog2(LOG4_NMAX + 1),
  localparam int unsigned PIN_W = IN_W + $clog2(K),
  localparam int unsigned POUT_W = OUT_W + $clog2(K),
  localparam int unsigned LW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned FW    = $clog2(K + 1),
  localparam int unsigned BW    = $clog2(2 * POUT_W),
  localparam int unsigned TBW   = $clog2(2 * TW_W),
  localparam int unsigned CW    = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned ABW   = $clog2(ACC_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [SW-1:0]           cfg_stages,
  input  logic [ACC_W-1:0]        tau,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_re [K],
  input  logic signed [IN_W-1:0]  in_im [K],
  output logic                    out_valid,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_re [K],
  output logic signed [OUT_W-1:0] out_im [K],
  output logic [NC-1:0]           st_flags,
  output logic                    st_corrected,
  output logic [LW-1:0]           st_loc,
  output logic                    st_check_fault,
  output logic                    st_uncorrectable,
  output logic                    st_tmr_mismatch,
  input  logic [FW-1:0]           fi_fft,
  input  logic                    fi_ram_arm,
  input  logic [AW-1:0]           fi_addr,
  input  logic [BW-1:0]           fi_bit,
  input  logic                    fi_tw_arm,
  input  logic [TBW-1:0]          fi_tw_bit,
  input  logic                    fi_sos_arm,
  input  logic [CW-1:0]           fi_sos_idx,
  input  logic [ABW-1:0]          fi_sos_bit,
  input  logic                    fi_tmr_arm
);
  import ft_fft_pkg::*;

  localparam int unsigned NMAX = 1 << AW;
  // widths seen by the SOS checks: single FFTs or sums of FFTs
  localparam int unsigned CIN_W  = (SCHEME == PARITY_SOS) ? IN_W  : PIN_W;
  localparam int unsigned COUT_W = (SCHEME == PARITY_SOS) ? OUT_W : POUT_W;

  // ------------------------------------------------------------ block count
  logic [SW-1:0] blk_stg;
  logic [AW-1:0] in_cnt, in_last_idx;
  logic          in_first, accept, in_last;

  always_comb begin
    accept      = in_valid && in_ready;
    in_last_idx = AW'((NMAX >> (2 * (LOG4_NMAX - 32'(blk_stg)))) - 1);
    in_last     = accept && !in_first && (in_cnt == in_last_idx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_first <= 1'b1;
      in_cnt   <= '0;
      blk_stg  <= SW'(LOG4_NMAX);
    end else if (accept) begin
      if (in_first) begin
        blk_stg  <= (cfg_stages == 0 || cfg_stages > SW'(LOG4_NMAX)) ?
                    SW'(LOG4_NMAX) : cfg_stages;
        in_first <= 1'b0;
        in_cnt   <= AW'(1);
      end else if (in_cnt == in_last_idx) begin
        in_first <= 1'b1;
        in_cnt   <= '0;
      end else begin
        in_cnt <= in_cnt + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ cores
  logic signed [OUT_W-1:0]  x_re [K], x_im [K];
  logic signed [POUT_W-1:0] xp_re, xp_im;
  logic signed [PIN_W-1:0]  pin_re, pin_im;
  logic [K:0]               c_ready, c_ovalid, c_olast;

  stream_combiner #(.K(K), .IW(IN_W), .OW(PIN_W), .MASK(32'((64'(1) << K) - 1)))
    u_par_in (.in_re(in_re), .in_im(in_im), .sum_re(pin_re), .sum_im(pin_im));

  for (genvar m = 0; m <= K; m++) begin : g_core
    logic sel;
    assign sel = (fi_fft == FW'(m));
    if (m < K) begin : g_data
      fft_r4_core #(.IN_W(IN_W), .OUT_W(OUT_W), .LOG4_NMAX(LOG4_NMAX), .TW_W(TW_W)) u_core (
        .clk(clk), .rst_n(rst_n), .cfg_stages(cfg_stages),
        .in_valid(in_valid), .in_ready(c_ready[m]),
        .in_re(in_re[m]), .in_im(in_im[m]),
        .out_valid(c_ovalid[m]), .out_last(c_olast[m]),
        .out_re(x_re[m]), .out_im(x_im[m]), .busy(),
        .fi_ram_arm(fi_ram_arm && sel), .fi_addr(fi_addr),
        .fi_bit($clog2(2 * OUT_W)'(fi_bit)),
        .fi_tw_arm(fi_tw_arm && sel), .fi_tw_bit(fi_tw_bit)
      );
    end else begin : g_parity
      fft_r4_core #(.IN_W(PIN_W), .OUT_W(POUT_W), .LOG4_NMAX(LOG4_NMAX), .TW_W(TW_W)) u_core (
        .clk(clk), .rst_n(rst_n), .cfg_stages(cfg_stages),
        .in_valid(in_valid), .in_ready(c_ready[m]),
        .in_re(pin_re), .in_im(pin_im),
        .out_valid(c_ovalid[m]), .out_last(c_olast[m]),
        .out_re(xp_re), .out_im(xp_im), .busy(),
        .fi_ram_arm(fi_ram_arm && sel), .fi_addr(fi_addr),
        .fi_bit(fi_bit),
        .fi_tw_arm(fi_tw_arm && sel), .fi_tw_bit(fi_tw_bit)
      );
    end
  end

  assign in_ready = c_ready[0];

  logic o_valid, o_last;
  assign o_valid = c_ovalid[0];
  assign o_last  = c_olast[0];

  // ------------------------------------------------------------- SOS checks
  logic [NC-1:0] chk_done, chk_fault;

  for (genvar c = 0; c < NC; c++) begin : g_chk
    logic signed [CIN_W-1:0]  ci_re, ci_im;
    logic signed [COUT_W-1:0] co_re, co_im;
    if (SCHEME == PARITY_SOS) begin : g_single
      assign ci_re = in_re[c];
      assign ci_im = in_im[c];
      assign co_re = x_re[c];
      assign co_im = x_im[c];
    end else begin : g_sum
      // adders feeding the check, tripled and voted
      localparam logic [31:0] MSK = check_mask(SCHEME, K, c);
      logic [2*(CIN_W+COUT_W)-1:0] sums [3];
      logic [2*(CIN_W+COUT_W)-1:0] voted;
      for (genvar r = 0; r < 3; r++) begin : g_rep
        logic signed [CIN_W-1:0]  si_re, si_im;
        logic signed [COUT_W-1:0] so_re, so_im;
        stream_combiner #(.K(K), .IW(IN_W), .OW(CIN_W), .MASK(MSK))
          u_cin (.in_re(in_re), .in_im(in_im), .sum_re(si_re), .sum_im(si_im));
        stream_combiner #(.K(K), .IW(OUT_W), .OW(COUT_W), .MASK(MSK))
          u_cout (.in_re(x_re), .in_im(x_im), .sum_re(so_re), .sum_im(so_im));
        assign sums[r] = {si_re, si_im, so_re, so_im};
      end
      tmr_voter #(.W(2 * (CIN_W + COUT_W))) u_vote (
        .a(sums[0]), .b(sums[1]), .c(sums[2]), .y(voted), .mismatch()
      );
      assign {ci_re, ci_im, co_re, co_im} = voted;
    end

    sos_check #(.IW(CIN_W), .OW(COUT_W), .ACC_W(ACC_W)) u_sos (
      .clk(clk), .rst_n(rst_n),
      .in_valid(accept), .in_last(in_last), .in_re(ci_re), .in_im(ci_im),
      .out_valid(o_valid), .out_last(o_last), .out_re(co_re), .out_im(co_im),
      .tau(tau), .done(chk_done[c]), .fault(chk_fault[c]),
      .fi_arm(fi_sos_arm && fi_sos_idx == CW'(c)), .fi_bit(fi_sos_bit)
    );
  end

  // ---------------------------------------------------------- block buffers
  logic [AW-1:0] ob_wcnt, ob_rcnt;
  logic          rd_act, rd_v1, rd_last1;
  logic [2*OUT_W-1:0]  bd [K];
  logic [2*POUT_W-1:0] bp;

  logic [AW-1:0] ob_last;   // index of the last bin of the buffered block

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ob_wcnt <= '0;
      ob_last <= '0;
    end else if (o_valid) begin
      ob_wcnt <= o_last ? '0 : ob_wcnt + 1'b1;
      if (o_last) ob_last <= ob_wcnt;
    end
  end

  for (genvar m = 0; m < K; m++) begin : g_buf
    fft_ram #(.DEPTH(NMAX), .WIDTH(2 * OUT_W)) u_buf (
      .clk(clk), .we(o_valid), .waddr(ob_wcnt), .wdata({x_re[m], x_im[m]}),
      .re(rd_act), .raddr(ob_rcnt), .rdata(bd[m])
    );
  end
  fft_ram #(.DEPTH(NMAX), .WIDTH(2 * POUT_W)) u_pbuf (
    .clk(clk), .we(o_valid), .waddr(ob_wcnt), .wdata({xp_re, xp_im}),
    .re(rd_act), .raddr(ob_rcnt), .rdata(bp)
  );

  // ------------------------------------------- verdict latch and read-back
  logic [NC-1:0] flags_q [3];
  logic          fi_tmr_pend;
  logic [AW-1:0] blk_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act      <= 1'b0;
      ob_rcnt     <= '0;
      rd_v1       <= 1'b0;
      rd_last1    <= 1'b0;
      blk_last    <= '0;
      fi_tmr_pend <= 1'b0;
      for (int r = 0; r < 3; r++) flags_q[r] <= '0;
    end else begin
      rd_v1    <= rd_act;
      rd_last1 <= rd_act && (ob_rcnt == blk_last);
      if (fi_tmr_arm) fi_tmr_pend <= 1'b1;
      if (chk_done[0]) begin
        for (int r = 0; r < 3; r++) flags_q[r] <= chk_fault;
        if (fi_tmr_pend) begin
          flags_q[0][0] <= ~chk_fault[0];
          fi_tmr_pend   <= 1'b0;
        end
        rd_act   <= 1'b1;
        ob_rcnt  <= '0;
        blk_last <= ob_last;
      end else if (rd_act) begin
        if (ob_rcnt == blk_last) rd_act <= 1'b0;
        ob_rcnt <= ob_rcnt + 1'b1;
      end
    end
  end

  // All cores run in lockstep, so core 0 speaks for all of them.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (c_ready == {(K+1){c_ready[0]}}) && (c_ovalid == {(K+1){o_valid}}) &&
                   (c_olast == {(K+1){o_last}}));

  // The checks of one block always finish together.
  assert property (@(posedge clk) disable iff (!rst_n)
                   chk_done[0] |-> (chk_done == '1));

  // --------------------------------------------- tripled location/correction
  localparam int unsigned VW = K * 2 * OUT_W + NC + LW + 3;
  logic [VW-1:0] cor_vec [3];
  logic [VW-1:0] cor_voted;
  logic          cor_mismatch;
  logic signed [OUT_W-1:0] b_re [K], b_im [K];
  logic signed [POUT_W-1:0] bp_re, bp_im;

  always_comb begin
    for (int m = 0; m < K; m++) begin
      b_re[m] = bd[m][2*OUT_W-1:OUT_W];
      b_im[m] = bd[m][OUT_W-1:0];
    end
    bp_re = bp[2*POUT_W-1:POUT_W];
    bp_im = bp[POUT_W-1:0];
  end

  for (genvar r = 0; r < 3; r++) begin : g_tmr
    logic signed [OUT_W-1:0] y_re [K], y_im [K];
    logic                    lv, cf, uc;
    logic [LW-1:0]           lc;
    fault_corrector #(.SCHEME(SCHEME), .K(K), .OW(OUT_W), .PW(POUT_W)) u_cor (
      .flags(flags_q[r]), .x_re(b_re), .x_im(b_im), .xp_re(bp_re), .xp_im(bp_im),
      .y_re(y_re), .y_im(y_im), .loc_valid(lv), .loc(lc),
      .check_fault(cf), .uncorrectable(uc)
    );
    always_comb begin
      cor_vec[r] = '0;
      for (int m = 0; m < K; m++)
        cor_vec[r][m*2*OUT_W +: 2*OUT_W] = {y_re[m], y_im[m]};
      cor_vec[r][K*2*OUT_W +: NC + LW + 3] = {flags_q[r], lc, lv, cf, uc};
    end
  end

  tmr_voter #(.W(VW)) u_cor_vote (
    .a(cor_vec[0]), .b(cor_vec[1]), .c(cor_vec[2]), .y(cor_voted),
    .mismatch(cor_mismatch)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid        <= 1'b0;
      out_last         <= 1'b0;
      st_flags         <= '0;
      st_loc           <= '0;
      st_corrected     <= 1'b0;
      st_check_fault   <= 1'b0;
      st_uncorrectable <= 1'b0;
      st_tmr_mismatch  <= 1'b0;
      for (int m = 0; m < K; m++) begin
        out_re[m] <= '0;
        out_im[m] <= '0;
      end
    end else begin
      out_valid <= rd_v1;
      out_last  <= rd_last1;
      if (rd_v1) begin
        for (int m = 0; m < K; m++)
          {out_re[m], out_im[m]} <= cor_voted[m*2*OUT_W +: 2*OUT_W];
        {st_flags, st_loc, st_corrected, st_check_fault, st_uncorrectable} <=
          cor_voted[K*2*OUT_W +: NC + LW + 3];
        st_tmr_mismatch <= cor_mismatch;
      end
    end
  end

endmodule
