// tb_fft_r4_core: self-checking test of the iterative radix-4 FFT core.
//
// Transforms random blocks of 1024, 256, 64, 16 and 4 points and compares every
// output bin with a direct DFT computed here in floating point and scaled by
// 1/sqrt(N), the core's scaling. Each bin may differ by a few LSBs of
// fixed-point rounding. Also checks that the output energy matches the input
// energy (the property the Parseval check relies on) and that the compute
// phase lasts S*N cycles (5120 at 1024 points), or S*(N+5) for the sizes
// under 64 points that wait for the 5-cycle pipeline to drain after each
// stage (the measured gap from last input to first output adds two cycles
// of I/O).
module tb_fft_r4_core;
  localparam int unsigned LOG4_NMAX = 5;
  localparam int unsigned NMAX = 1 << (2 * LOG4_NMAX);
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0] cfg_stages;
  logic in_valid, in_ready, out_valid, out_last, busy;
  logic signed [11:0] in_re, in_im;
  logic signed [13:0] out_re, out_im;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fft_r4_core dut (
    .clk(clk), .rst_n(rst_n), .cfg_stages(cfg_stages),
    .in_valid(in_valid), .in_ready(in_ready), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_last(out_last), .out_re(out_re), .out_im(out_im),
    .busy(busy),
    .fi_ram_arm(1'b0), .fi_addr('0), .fi_bit('0),
    .fi_tw_arm(1'b0), .fi_tw_bit('0)
  );

  int xr [NMAX];
  int xi [NMAX];
  int yr [NMAX];
  int yi [NMAX];

  task automatic run_block(input int s, input int amp);
    int n;
    longint t_last_in, t_first_out;
    real er, ei, ang, ein, eout, maxerr, d;
    int k;
    int exp_lat;
    n = 1 << (2 * s);
    for (int i = 0; i < n; i++) begin
      xr[i] = int'($urandom_range(2 * amp)) - amp;
      xi[i] = int'($urandom_range(2 * amp)) - amp;
    end
    cfg_stages = 3'(s);
    for (int i = 0; i < n; i++) begin
      in_valid <= 1'b1;
      in_re <= 12'(xr[i]);
      in_im <= 12'(xi[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    t_last_in = cycle - 1;
    in_valid <= 1'b0;
    k = 0;
    t_first_out = 0;
    while (k < n) begin
      @(posedge clk);
      if (out_valid) begin
        if (k == 0) t_first_out = cycle - 1;
        yr[k] = int'(out_re);
        yi[k] = int'(out_im);
        checks++;
        if (out_last != (k == n - 1)) begin
          failures++;
          $display("FAIL: out_last wrong at bin %0d", k);
        end
        k++;
      end
    end
    // reference DFT / sqrt(N)
    maxerr = 0.0; ein = 0.0; eout = 0.0;
    for (int b = 0; b < n; b++) begin
      er = 0.0; ei = 0.0;
      for (int i = 0; i < n; i++) begin
        ang = -2.0 * PI * real'((longint'(b) * i) % n) / real'(n);
        er += real'(xr[i]) * $cos(ang) - real'(xi[i]) * $sin(ang);
        ei += real'(xr[i]) * $sin(ang) + real'(xi[i]) * $cos(ang);
      end
      er = er / $sqrt(real'(n));
      ei = ei / $sqrt(real'(n));
      d = (er - real'(yr[b])) ** 2 + (ei - real'(yi[b])) ** 2;
      if ($sqrt(d) > maxerr) maxerr = $sqrt(d);
      checks++;
      if ($sqrt(d) > real'(s) + 1.0) begin
        failures++;
        if (failures < 10)
          $display("FAIL: N=%0d bin %0d got (%0d,%0d) expected (%0.1f,%0.1f)",
                   n, b, yr[b], yi[b], er, ei);
      end
      eout += real'(yr[b]) ** 2 + real'(yi[b]) ** 2;
      ein += real'(xr[b]) ** 2 + real'(xi[b]) ** 2;
    end
    checks++;
    if ((ein - eout) > 0.001 * ein || (eout - ein) > 0.001 * ein) begin
      failures++;
      $display("FAIL: N=%0d energy in %0.0f out %0.0f", n, ein, eout);
    end
    checks++;
    exp_lat = s * (n + ((s < 3) ? 5 : 0)) + 2;
    if (t_first_out - t_last_in != longint'(exp_lat)) begin
      failures++;
      $display("FAIL: N=%0d compute latency %0d, expected %0d", n,
               t_first_out - t_last_in, exp_lat);
    end
    $display("N=%0d max bin error %0.2f LSB, latency %0d cycles", n, maxerr,
             t_first_out - t_last_in);
  endtask

  initial begin
    in_valid = 1'b0;
    in_re = '0;
    in_im = '0;
    cfg_stages = 3'd5;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_block(5, 1500);
    run_block(3, 2000);
    run_block(1, 2047);
    run_block(2, 1800);
    run_block(4, 1000);
    run_block(5, 300);
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
