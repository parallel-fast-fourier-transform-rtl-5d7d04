// tb_ft_fft_top: end-to-end test of both protection schemes at full size.
//
// Both halves of the top (a: parity-SOS, b: parity-SOS-ECC) receive the same
// four random input streams and the same injected faults, block after
// block. Every output bin of every FFT is compared with a direct DFT
// computed here (scaled by 1/sqrt(N)); outputs rebuilt from the parity FFT
// get a looser tolerance because they carry the rounding of five FFTs.
// The status outputs are checked against what a single fault of each kind
// must produce, and so is the latency from the last input sample to the
// first corrected output: S*N cycles of computation plus the N-cycle
// output block and the check/correction pipeline.
// Mechanisms exercised and counted, each of which must occur:
//   clean block; upset in the stage RAM of each of the four FFTs, located
//   and corrected; upset in a rotation-coefficient register, corrected
//   (retried up to eight times, since a coefficient upset on a small sample
//   may legitimately stay under the tolerance);
//   upset in the parity FFT, ignored; upset in an SOS check (a needless but
//   harmless correction in a, a weight-one syndrome in b); upset in one
//   copy of the tripled correction logic, outvoted; 1024-, 64- and 4-point
//   blocks.
module tb_ft_fft_top;
  localparam int K = 4;
  localparam int NMAX = 1024;
  localparam real PI = 3.14159265358979323846;
  localparam logic [38:0] TAU = 39'd1048576;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [2:0] cfg_stages = 3'd5;
  logic in_valid = 1'b0;
  logic signed [11:0] in_re [K], in_im [K];
  logic fi_ram_arm = 0, fi_tw_arm = 0, fi_sos_arm_a = 0, fi_sos_arm_b = 0, fi_tmr_arm = 0;
  logic [2:0] fi_fft = '0;
  logic [9:0] fi_addr = '0;
  logic [4:0] fi_bit = '0, fi_tw_bit = '0;
  logic [1:0] fi_sos_idx_a = '0, fi_sos_idx_b = '0;
  logic [5:0] fi_sos_bit = '0;

  logic a_in_ready, a_out_valid, a_out_last, b_in_ready, b_out_valid, b_out_last;
  logic signed [13:0] a_out_re [K], a_out_im [K], b_out_re [K], b_out_im [K];
  logic [3:0] a_st_flags;
  logic [2:0] b_st_flags;
  logic a_st_corrected, a_st_check_fault, a_st_uncorrectable, a_st_tmr_mismatch;
  logic b_st_corrected, b_st_check_fault, b_st_uncorrectable, b_st_tmr_mismatch;
  logic [1:0] a_st_loc, b_st_loc;

  ft_fft_top dut (
    .clk(clk), .rst_n(rst_n),
    .a_cfg_stages(cfg_stages), .a_tau(TAU), .a_in_valid(in_valid), .a_in_ready(a_in_ready),
    .a_in_re(in_re), .a_in_im(in_im), .a_out_valid(a_out_valid), .a_out_last(a_out_last),
    .a_out_re(a_out_re), .a_out_im(a_out_im), .a_st_flags(a_st_flags),
    .a_st_corrected(a_st_corrected), .a_st_loc(a_st_loc), .a_st_check_fault(a_st_check_fault),
    .a_st_uncorrectable(a_st_uncorrectable), .a_st_tmr_mismatch(a_st_tmr_mismatch),
    .a_fi_fft(fi_fft), .a_fi_ram_arm(fi_ram_arm), .a_fi_addr(fi_addr), .a_fi_bit(fi_bit),
    .a_fi_tw_arm(fi_tw_arm), .a_fi_tw_bit(fi_tw_bit), .a_fi_sos_arm(fi_sos_arm_a),
    .a_fi_sos_idx(fi_sos_idx_a), .a_fi_sos_bit(fi_sos_bit), .a_fi_tmr_arm(fi_tmr_arm),
    .b_cfg_stages(cfg_stages), .b_tau(TAU), .b_in_valid(in_valid), .b_in_ready(b_in_ready),
    .b_in_re(in_re), .b_in_im(in_im), .b_out_valid(b_out_valid), .b_out_last(b_out_last),
    .b_out_re(b_out_re), .b_out_im(b_out_im), .b_st_flags(b_st_flags),
    .b_st_corrected(b_st_corrected), .b_st_loc(b_st_loc), .b_st_check_fault(b_st_check_fault),
    .b_st_uncorrectable(b_st_uncorrectable), .b_st_tmr_mismatch(b_st_tmr_mismatch),
    .b_fi_fft(fi_fft), .b_fi_ram_arm(fi_ram_arm), .b_fi_addr(fi_addr), .b_fi_bit(fi_bit),
    .b_fi_tw_arm(fi_tw_arm), .b_fi_tw_bit(fi_tw_bit), .b_fi_sos_arm(fi_sos_arm_b),
    .b_fi_sos_idx(fi_sos_idx_b), .b_fi_sos_bit(fi_sos_bit), .b_fi_tmr_arm(fi_tmr_arm)
  );

  int checks = 0, failures = 0;
  int xr [K][NMAX], xi [K][NMAX];
  real rr [K][NMAX], ri [K][NMAX];
  int ar [K][NMAX], ai [K][NMAX], br [K][NMAX], bi [K][NMAX];
  logic [3:0] a_flags_seen; logic [2:0] b_flags_seen;
  logic a_cor_seen, b_cor_seen, a_cf_seen, b_cf_seen, a_uc_seen, b_uc_seen, a_mm_seen, b_mm_seen;
  logic [1:0] a_loc_seen, b_loc_seen;
  longint t_last_in, t_first_a, t_first_b;

  // mechanism counters
  int n_clean = 0, n_tw = 0, n_tw_missed = 0, n_parity = 0, n_sos_a = 0, n_sos_b = 0, n_tmr = 0;
  int n_ram [K] = '{default: 0};
  int n_size [3] = '{default: 0};

  typedef enum int {F_NONE, F_RAM, F_TW, F_PARITY, F_SOS, F_TMR} fault_e;

  task automatic reference(input int n);
    real cs [NMAX], sn [NMAX];
    real sr, si;
    for (int k = 0; k < n; k++) begin
      cs[k] = $cos(2.0 * PI * real'(k) / real'(n));
      sn[k] = $sin(2.0 * PI * real'(k) / real'(n));
    end
    for (int m = 0; m < K; m++)
      for (int k = 0; k < n; k++) begin
        sr = 0.0; si = 0.0;
        for (int i = 0; i < n; i++) begin
          int p;
          p = (k * i) % n;   // x * exp(-j 2 pi p / n)
          sr += real'(xr[m][i]) * cs[p] + real'(xi[m][i]) * sn[p];
          si += real'(xi[m][i]) * cs[p] - real'(xr[m][i]) * sn[p];
        end
        rr[m][k] = sr / $sqrt(real'(n));
        ri[m][k] = si / $sqrt(real'(n));
      end
  endtask

  // collect both halves' output blocks
  task automatic collect(input int n);
    int ka, kb;
    ka = 0; kb = 0;
    a_flags_seen = '0; b_flags_seen = '0;
    while (ka < n || kb < n) begin
      @(posedge clk);
      #1;
      if (a_out_valid) begin
        if (ka == 0) t_first_a = cycle - 1;
        for (int m = 0; m < K; m++) begin ar[m][ka] = a_out_re[m]; ai[m][ka] = a_out_im[m]; end
        a_flags_seen = a_st_flags; a_cor_seen = a_st_corrected; a_loc_seen = a_st_loc;
        a_cf_seen = a_st_check_fault; a_uc_seen = a_st_uncorrectable; a_mm_seen = a_st_tmr_mismatch;
        checks++;
        if (a_out_last != (ka == n - 1)) begin failures++; $display("FAIL: a out_last at %0d", ka); end
        ka++;
      end
      if (b_out_valid) begin
        if (kb == 0) t_first_b = cycle - 1;
        for (int m = 0; m < K; m++) begin br[m][kb] = b_out_re[m]; bi[m][kb] = b_out_im[m]; end
        b_flags_seen = b_st_flags; b_cor_seen = b_st_corrected; b_loc_seen = b_st_loc;
        b_cf_seen = b_st_check_fault; b_uc_seen = b_st_uncorrectable; b_mm_seen = b_st_tmr_mismatch;
        checks++;
        if (b_out_last != (kb == n - 1)) begin failures++; $display("FAIL: b out_last at %0d", kb); end
        kb++;
      end
    end
  endtask

  function automatic bit compare(input string tag, input int m, input int n, input real tol,
                                 input bit half_b);
    real d, worst;
    worst = 0.0;
    for (int k = 0; k < n; k++) begin
      if (half_b) d = (real'(br[m][k]) - rr[m][k]) ** 2 + (real'(bi[m][k]) - ri[m][k]) ** 2;
      else        d = (real'(ar[m][k]) - rr[m][k]) ** 2 + (real'(ai[m][k]) - ri[m][k]) ** 2;
      if ($sqrt(d) > worst) worst = $sqrt(d);
    end
    if (worst > tol) begin
      $display("FAIL %s: FFT %0d worst bin error %0.2f > %0.2f", tag, m, worst, tol);
      return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic run_block(input string tag, input int s, input fault_e f, input int fm);
    int n, amp;
    logic [3:0] exp_a;
    logic [2:0] exp_b;
    bit ok;
    n = 1 << (2 * s);
    amp = (s == 5) ? 1500 : 2000;
    for (int m = 0; m < K; m++)
      for (int i = 0; i < n; i++) begin
        xr[m][i] = int'($urandom_range(2 * amp)) - amp;
        xi[m][i] = int'($urandom_range(2 * amp)) - amp;
      end
    cfg_stages <= 3'(s);
    if (f == F_TMR) begin
      fi_tmr_arm <= 1'b1; @(posedge clk); fi_tmr_arm <= 1'b0;
    end
    if (f == F_SOS) begin
      fi_sos_arm_a <= 1'b1; fi_sos_idx_a <= 2'(fm);
      fi_sos_arm_b <= 1'b1; fi_sos_idx_b <= 2'(fm);
      fi_sos_bit <= 6'd30;
      @(posedge clk);
      fi_sos_arm_a <= 1'b0; fi_sos_arm_b <= 1'b0;
    end
    for (int i = 0; i < n; i++) begin
      in_valid <= 1'b1;
      for (int m = 0; m < K; m++) begin in_re[m] <= 12'(xr[m][i]); in_im[m] <= 12'(xi[m][i]); end
      @(posedge clk);
      while (!(a_in_ready && b_in_ready)) @(posedge clk);
    end
    in_valid <= 1'b0;
    t_last_in = cycle - 1;
    fork
      collect(n);
      begin
        // inject while the cores compute
        if (f == F_RAM || f == F_PARITY || f == F_TW) begin
          // the last stage has only trivial coefficients, so a coefficient
          // upset is injected during the earlier stages
          if (f == F_TW) repeat ($urandom_range((s - 1) * n)) @(posedge clk);
          else           repeat ($urandom_range(s * n)) @(posedge clk);
          fi_fft <= 3'(fm);
          fi_addr <= 10'($urandom_range(n - 1));
          fi_bit <= (f == F_PARITY) ? 5'd30 : 5'd27;   // bit 14 of 16 / sign bit of 14, re
          fi_tw_bit <= 5'd30;                           // bit 14 (1.0) of re
          fi_ram_arm <= (f != F_TW);
          fi_tw_arm <= (f == F_TW);
          @(posedge clk);
          fi_ram_arm <= 1'b0; fi_tw_arm <= 1'b0;
        end
      end
      begin
        reference(n);
      end
    join
    // expected verdicts
    exp_a = '0; exp_b = '0;
    if (f == F_RAM || f == F_TW) begin
      exp_a[fm] = 1'b1;
      case (fm) 0: exp_b = 3'b111; 1: exp_b = 3'b011; 2: exp_b = 3'b101; default: exp_b = 3'b110; endcase
    end
    if (f == F_SOS) begin
      exp_a[fm] = 1'b1;
      exp_b[fm] = 1'b1;
    end
    if (f == F_TW && (a_flags_seen != exp_a || b_flags_seen != exp_b)) begin
      // A coefficient upset changes one sample's magnitude by a factor that
      // depends on the coefficient; on a small sample the energy change, in
      // one check or in several, can stay under the tolerance. Such an
      // escape is counted, not failed.
      n_tw_missed++;
      $display("block %-28s N=%4d coefficient upset below the check tolerance", tag, n);
      return;
    end
    checks += 2;
    if (a_flags_seen != exp_a || a_uc_seen || a_cf_seen ||
        a_cor_seen != (exp_a != 0) || (exp_a != 0 && a_loc_seen != 2'(fm))) begin
      failures++;
      $display("FAIL %s: a flags %b cor %b loc %0d uc %b, expected flags %b", tag, a_flags_seen,
               a_cor_seen, a_loc_seen, a_uc_seen, exp_a);
    end
    if (b_flags_seen != exp_b || b_uc_seen || b_cf_seen != (f == F_SOS) ||
        b_cor_seen != (f == F_RAM || f == F_TW) || ((f == F_RAM || f == F_TW) && b_loc_seen != 2'(fm))) begin
      failures++;
      $display("FAIL %s: b flags %b cor %b loc %0d cf %b uc %b, expected flags %b", tag, b_flags_seen,
               b_cor_seen, b_loc_seen, b_cf_seen, b_uc_seen, exp_b);
    end
    checks += 2;
    if (a_mm_seen != (f == F_TMR) || b_mm_seen != (f == F_TMR)) begin
      failures++;
      $display("FAIL %s: TMR mismatch flags a %b b %b", tag, a_mm_seen, b_mm_seen);
    end
    // data
    ok = 1'b1;
    for (int m = 0; m < K; m++) begin
      real tola, tolb;
      tola = (exp_a[m]) ? 4.0 * (s + 1) : real'(s + 1);
      tolb = ((f == F_RAM || f == F_TW) && m == fm) ? 4.0 * (s + 1) : real'(s + 1);
      checks += 2;
      if (!compare({tag, " a"}, m, n, tola, 1'b0)) begin failures++; ok = 1'b0; end
      if (!compare({tag, " b"}, m, n, tolb, 1'b1)) begin failures++; ok = 1'b0; end
    end
    // latency: computation S*N (plus a 5-cycle drain per stage below 64
    // points), output block N, checks and correction 5
    checks += 2;
    if (t_first_a - t_last_in != longint'(s * (n + ((s < 3) ? 5 : 0)) + n + 5) ||
        t_first_b - t_last_in != longint'(s * (n + ((s < 3) ? 5 : 0)) + n + 5)) begin
      failures++;
      $display("FAIL %s: latency a %0d b %0d expected %0d", tag, t_first_a - t_last_in,
               t_first_b - t_last_in, s * (n + ((s < 3) ? 5 : 0)) + n + 5);
    end
    $display("block %-28s N=%4d flags a=%b b=%b corrected a=%b b=%b latency %0d %s", tag, n,
             a_flags_seen, b_flags_seen, a_cor_seen, b_cor_seen, t_first_a - t_last_in,
             ok ? "ok" : "WRONG DATA");
    if (ok) begin
      case (f)
        F_NONE:   n_clean++;
        F_RAM:    n_ram[fm]++;
        F_TW:     n_tw++;
        F_PARITY: n_parity++;
        F_SOS:    begin if (a_cor_seen) n_sos_a++; if (b_cf_seen) n_sos_b++; end
        F_TMR:    n_tmr++;
        default:  ;
      endcase
      n_size[(s == 5) ? 0 : (s == 3) ? 1 : 2]++;
    end
  endtask

  initial begin
    for (int m = 0; m < K; m++) begin in_re[m] = '0; in_im[m] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_block("clean", 5, F_NONE, 0);
    for (int m = 0; m < K; m++) run_block($sformatf("stage RAM upset FFT%0d", m + 1), 5, F_RAM, m);
    for (int r = 0; r < 8 && n_tw == 0; r++) run_block("coefficient upset FFT2", 5, F_TW, 1);
    run_block("parity FFT upset", 5, F_PARITY, 4);
    run_block("SOS check upset", 5, F_SOS, 2);
    run_block("TMR copy upset", 5, F_TMR, 0);
    run_block("64-point, RAM upset FFT4", 3, F_RAM, 3);
    run_block("4-point clean", 1, F_NONE, 0);
    run_block("1024-point after resize", 5, F_RAM, 2);
    // every mechanism must have happened
    checks++;
    if (n_clean == 0 || n_tw == 0 || n_parity == 0 || n_sos_a == 0 || n_sos_b == 0 ||
        n_tmr == 0 || n_ram[0] == 0 || n_ram[1] == 0 || n_ram[2] == 0 || n_ram[3] == 0 ||
        n_size[0] == 0 || n_size[1] == 0 || n_size[2] == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("coefficient upsets under the tolerance: %0d", n_tw_missed);
    $display("mechanisms: clean %0d, RAM upsets corrected %0d/%0d/%0d/%0d, coefficient %0d, parity %0d, SOS a %0d b %0d, TMR %0d, sizes 1024:%0d 64:%0d 4:%0d",
             n_clean, n_ram[0], n_ram[1], n_ram[2], n_ram[3], n_tw, n_parity, n_sos_a, n_sos_b,
             n_tmr, n_size[0], n_size[1], n_size[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
