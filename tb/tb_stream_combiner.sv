// tb_stream_combiner: sums of the selected streams for two masks (all four
// streams, as for the parity FFT input, and streams 1, 2 and 4, as for the
// second Hamming check), with random and full-scale samples.
module tb_stream_combiner;
  localparam int K = 4, IW = 12, OW = 14;
  logic signed [IW-1:0] in_re [K], in_im [K];
  logic signed [OW-1:0] s0_re, s0_im, s1_re, s1_im;
  int checks = 0, failures = 0;

  stream_combiner #(.K(K), .IW(IW), .OW(OW), .MASK(32'hF)) dut_all (
    .in_re(in_re), .in_im(in_im), .sum_re(s0_re), .sum_im(s0_im));
  stream_combiner #(.K(K), .IW(IW), .OW(OW), .MASK(32'b1011)) dut_sub (
    .in_re(in_re), .in_im(in_im), .sum_re(s1_re), .sum_im(s1_im));

  initial begin
    int er0, ei0, er1, ei1;
    for (int t = 0; t < 3000; t++) begin
      for (int m = 0; m < K; m++) begin
        if (t == 0) begin in_re[m] = -12'sd2048; in_im[m] = 12'sd2047; end
        else begin in_re[m] = IW'($urandom); in_im[m] = IW'($urandom); end
      end
      #1;
      er0 = 0; ei0 = 0;
      for (int m = 0; m < K; m++) begin er0 += in_re[m]; ei0 += in_im[m]; end
      er1 = in_re[0] + in_re[1] + in_re[3];
      ei1 = in_im[0] + in_im[1] + in_im[3];
      checks += 2;
      if (int'(s0_re) != er0 || int'(s0_im) != ei0) begin
        failures++; $display("FAIL: full sum (%0d,%0d) expected (%0d,%0d)", s0_re, s0_im, er0, ei0);
      end
      if (int'(s1_re) != er1 || int'(s1_im) != ei1) begin
        failures++; $display("FAIL: subset sum (%0d,%0d) expected (%0d,%0d)", s1_re, s1_im, er1, ei1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
