// ft_campaign_harness: random single-fault injection campaign on one
// ft_parallel_fft (K = 4, 1024 points) of the given scheme; used by
// tb_fault_campaign.
//
// Each run streams one block of random 12-bit data (uniform in +-1000) and
// injects exactly one upset while the block is computed: either a bit flip
// in a word of a stage RAM (random core including the parity core, random
// address, random bit) or a bit flip in a coefficient register (random
// core, random bit, armed early enough to land in this block). Every output
// bin of every FFT is then compared with a direct DFT scaled by 1/sqrt(N).
// A run is classed as
//   masked    - no check fired and the outputs are right (the flip was too
//               small to matter, or it hit the parity core, or it missed)
//   corrected - a check fired and the outputs are right
//   wrong     - some output is wrong (detected or not)
// Coverage is (masked + corrected) / runs; it must reach MIN_COVERAGE.
// checks/failures valid at done.
module ft_campaign_harness #(
  parameter ft_fft_pkg::scheme_e SCHEME = ft_fft_pkg::PARITY_SOS,
  parameter int unsigned RUNS = 100,
  parameter real MIN_COVERAGE = 0.6,
  parameter longint TAU = 262144
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import ft_fft_pkg::*;
  localparam int K = 4;
  localparam int N = 1024;
  localparam int S = 5;
  localparam int NC = (SCHEME == PARITY_SOS) ? K : 3;
  localparam real PI = 3.14159265358979323846;

  logic in_valid = 1'b0, in_ready, out_valid, out_last;
  logic signed [11:0] in_re [K], in_im [K];
  logic signed [13:0] out_re [K], out_im [K];
  logic [NC-1:0] st_flags;
  logic st_corrected, st_check_fault, st_uncorrectable, st_tmr_mismatch;
  logic [1:0] st_loc;
  logic [2:0] fi_fft = '0;
  logic fi_ram_arm = 1'b0, fi_tw_arm = 1'b0;
  logic [9:0] fi_addr = '0;
  logic [4:0] fi_bit = '0, fi_tw_bit = '0;

  ft_parallel_fft #(.SCHEME(SCHEME), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_stages(3'd5), .tau(39'(TAU)),
    .in_valid(in_valid), .in_ready(in_ready), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_last(out_last), .out_re(out_re), .out_im(out_im),
    .st_flags(st_flags), .st_corrected(st_corrected), .st_loc(st_loc),
    .st_check_fault(st_check_fault), .st_uncorrectable(st_uncorrectable),
    .st_tmr_mismatch(st_tmr_mismatch),
    .fi_fft(fi_fft), .fi_ram_arm(fi_ram_arm), .fi_addr(fi_addr), .fi_bit(fi_bit),
    .fi_tw_arm(fi_tw_arm), .fi_tw_bit(fi_tw_bit), .fi_sos_arm(1'b0), .fi_sos_idx('0),
    .fi_sos_bit('0), .fi_tmr_arm(1'b0)
  );

  int xr [K][N], xi [K][N], yr [K][N], yi [K][N];
  real cs [N], sn [N];
  int n_masked = 0, n_corrected = 0, n_wrong = 0, n_wrong_detected = 0;
  int n_ram = 0, n_tw = 0, n_flagged_clean = 0;

  // one block with one upset; returns 1 when the outputs are right
  task automatic run_once(output bit ok, output bit flagged, output real err);
    int fm;
    bit use_tw;
    logic [NC-1:0] flags;
    int k;
    real sr, si, d, worst, tol;
    for (int m = 0; m < K; m++)
      for (int i = 0; i < N; i++) begin
        xr[m][i] = int'($urandom_range(2000)) - 1000;
        xi[m][i] = int'($urandom_range(2000)) - 1000;
      end
    fm = int'($urandom_range(K));           // K = parity core
    use_tw = 1'($urandom_range(1));
    for (int i = 0; i < N; i++) begin
      in_valid <= 1'b1;
      for (int m = 0; m < K; m++) begin
        in_re[m] <= 12'(xr[m][i]);
        in_im[m] <= 12'(xi[m][i]);
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    fi_fft <= 3'(fm);
    if (use_tw) begin
      // the last stage uses only trivial coefficients, so arm before it
      repeat ($urandom_range((S - 1) * N - 16)) @(posedge clk);
      fi_tw_bit <= 5'($urandom_range(31));
      fi_tw_arm <= 1'b1;
      n_tw++;
    end else begin
      repeat ($urandom_range(S * N)) @(posedge clk);
      fi_addr <= 10'($urandom_range(N - 1));
      fi_bit <= 5'($urandom_range((fm == K) ? 31 : 27));
      fi_ram_arm <= 1'b1;
      n_ram++;
    end
    @(posedge clk);
    fi_ram_arm <= 1'b0;
    fi_tw_arm <= 1'b0;
    k = 0;
    while (k < N) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        for (int m = 0; m < K; m++) begin yr[m][k] = int'(out_re[m]); yi[m][k] = int'(out_im[m]); end
        flags = st_flags;
        k++;
      end
    end
    flagged = (flags != '0);
    ok = 1'b1;
    err = 0.0;
    for (int m = 0; m < K; m++) begin
      worst = 0.0;
      for (int b = 0; b < N; b++) begin
        sr = 0.0; si = 0.0;
        for (int i = 0; i < N; i++) begin
          int p;
          p = (b * i) % N;
          sr += real'(xr[m][i]) * cs[p] + real'(xi[m][i]) * sn[p];
          si += real'(xi[m][i]) * cs[p] - real'(xr[m][i]) * sn[p];
        end
        d = (real'(yr[m][b]) - sr / 32.0) ** 2 + (real'(yi[m][b]) - si / 32.0) ** 2;
        if ($sqrt(d) > worst) worst = $sqrt(d);
      end
      // a rebuilt output carries the rounding of all K + 1 FFTs
      tol = (st_corrected && int'(st_loc) == m) ? 6.0 * $sqrt(real'(K + 1)) : 6.0;
      if (worst > tol) ok = 1'b0;
      if (worst > err) err = worst;
    end
  endtask

  initial begin
    bit ok, flagged;
    real err;
    real cov;
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int m = 0; m < K; m++) begin in_re[m] = '0; in_im[m] = '0; end
    for (int i = 0; i < N; i++) begin
      cs[i] = $cos(2.0 * PI * real'(i) / real'(N));
      sn[i] = $sin(2.0 * PI * real'(i) / real'(N));
    end
    @(posedge rst_n);
    @(posedge clk);
    for (int r = 0; r < RUNS; r++) begin
      run_once(ok, flagged, err);
      if (!ok) $display("%s wrong: flagged=%0d worst error %0.1f", SCHEME.name(), flagged, err);
      if (ok && !flagged) n_masked++;
      else if (ok) n_corrected++;
      else begin
        n_wrong++;
        if (flagged) n_wrong_detected++;
      end
    end
    cov = real'(n_masked + n_corrected) / real'(RUNS);
    $display("%s: %0d upsets (%0d stage RAM, %0d coefficient): masked %0d, corrected %0d, wrong %0d (%0d of them flagged), coverage %0.4f",
             SCHEME.name(), RUNS, n_ram, n_tw, n_masked, n_corrected, n_wrong,
             n_wrong_detected, cov);
    checks++;
    if (cov < MIN_COVERAGE) begin
      failures++;
      $display("FAIL %s: coverage %0.4f below %0.2f", SCHEME.name(), cov, MIN_COVERAGE);
    end
    checks++;
    if (n_corrected == 0) begin
      failures++;
      $display("FAIL %s: no upset was detected and corrected", SCHEME.name());
    end
    done = 1'b1;
  end
endmodule
