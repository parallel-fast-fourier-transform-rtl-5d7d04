// ft_parallel_harness: drives one ft_parallel_fft of a given scheme and
// size K through 1024-point blocks and checks it; used by
// tb_ft_parallel_fft to cover the parallel-FFT counts 4, 6, 8 and 11.
//
// Blocks: one clean, then one stage-RAM upset (sign bit of a sample) in
// each of two randomly chosen FFTs. Every output bin is compared with a
// direct DFT scaled by 1/sqrt(N); the flags must name the faulty FFT: a
// one-hot flag for PARITY_SOS, the FFT's Hamming column for PARITY_SOS_ECC.
// The Hamming columns are enumerated here independently: the numbers from
// 2^C - 1 down to 1 with at least two bits set, in that order.
// checks/failures are valid when done is set.
module ft_parallel_harness #(
  parameter ft_fft_pkg::scheme_e SCHEME = ft_fft_pkg::PARITY_SOS,
  parameter int unsigned K = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import ft_fft_pkg::*;
  localparam int N = 1024;
  localparam int C = (K <= 4) ? 3 : (K <= 11) ? 4 : 5;
  localparam int NC = (SCHEME == PARITY_SOS) ? K : C;
  localparam real PI = 3.14159265358979323846;
  localparam int PB = $clog2(2 * (14 + $clog2(K)));

  logic in_valid = 1'b0, in_ready, out_valid, out_last;
  logic signed [11:0] in_re [K], in_im [K];
  logic signed [13:0] out_re [K], out_im [K];
  logic [NC-1:0] st_flags;
  logic st_corrected, st_check_fault, st_uncorrectable, st_tmr_mismatch;
  logic [$clog2(K)-1:0] st_loc;
  logic [$clog2(K+1)-1:0] fi_fft = '0;
  logic fi_ram_arm = 1'b0;
  logic [9:0] fi_addr = '0;

  ft_parallel_fft #(.SCHEME(SCHEME), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_stages(3'd5), .tau(39'd1048576),
    .in_valid(in_valid), .in_ready(in_ready), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_last(out_last), .out_re(out_re), .out_im(out_im),
    .st_flags(st_flags), .st_corrected(st_corrected), .st_loc(st_loc),
    .st_check_fault(st_check_fault), .st_uncorrectable(st_uncorrectable),
    .st_tmr_mismatch(st_tmr_mismatch),
    .fi_fft(fi_fft), .fi_ram_arm(fi_ram_arm), .fi_addr(fi_addr), .fi_bit(PB'(27)),
    .fi_tw_arm(1'b0), .fi_tw_bit('0), .fi_sos_arm(1'b0), .fi_sos_idx('0),
    .fi_sos_bit('0), .fi_tmr_arm(1'b0)
  );

  int xr [K][N], xi [K][N], yr [K][N], yi [K][N];
  real cs [N], sn [N];

  function automatic int column(input int m);
    int found;
    found = 0;
    for (int v = (1 << C) - 1; v > 0; v--)
      if ($countones(v) >= 2) begin
        if (found == m) return v;
        found++;
      end
    return 0;
  endfunction

  task automatic run_block(input int fm);   // fm < 0: no fault
    logic [NC-1:0] flags;
    logic [NC-1:0] expf;
    int k;
    real sr, si, d, worst, tol;
    for (int m = 0; m < K; m++)
      for (int i = 0; i < N; i++) begin
        xr[m][i] = int'($urandom_range(2000)) - 1000;
        xi[m][i] = int'($urandom_range(2000)) - 1000;
      end
    for (int i = 0; i < N; i++) begin
      in_valid <= 1'b1;
      for (int m = 0; m < K; m++) begin in_re[m] <= 12'(xr[m][i]); in_im[m] <= 12'(xi[m][i]); end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    if (fm >= 0) begin
      repeat ($urandom_range(5 * N)) @(posedge clk);
      fi_fft <= ($clog2(K+1))'(fm);
      fi_addr <= 10'($urandom_range(N - 1));
      fi_ram_arm <= 1'b1;
      @(posedge clk);
      fi_ram_arm <= 1'b0;
    end
    k = 0;
    while (k < N) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        for (int m = 0; m < K; m++) begin yr[m][k] = out_re[m]; yi[m][k] = out_im[m]; end
        flags = st_flags;
        k++;
      end
    end
    expf = '0;
    if (fm >= 0) begin
      if (SCHEME == PARITY_SOS) expf[fm] = 1'b1;
      else for (int c = 0; c < C; c++) expf[c] = column(fm)[C-1-c];
    end
    checks++;
    if (flags != expf || st_uncorrectable || (st_corrected != (fm >= 0)) ||
        (fm >= 0 && int'(st_loc) != fm)) begin
      failures++;
      $display("FAIL %s K=%0d: flags %b expected %b", SCHEME.name(), K, flags, expf);
    end
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
      // rebuilt outputs carry the rounding of all K + 1 FFTs
      tol = (m == fm) ? 6.0 * $sqrt(real'(K + 1)) : 6.0;
      checks++;
      if (worst > tol) begin
        failures++;
        $display("FAIL %s K=%0d: FFT %0d worst bin error %0.2f", SCHEME.name(), K, m, worst);
      end
    end
    $display("%s K=%0d block fault=%0d flags=%b corrected=%b", SCHEME.name(), K, fm, flags,
             st_corrected);
  endtask

  initial begin
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
    run_block(-1);
    run_block(int'($urandom_range(K - 1)));
    run_block(K - 1);
    done = 1'b1;
  end
endmodule
