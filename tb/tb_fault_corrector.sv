// tb_fault_corrector: every flag pattern for both schemes with K = 4.
// PARITY_SOS: a single flag m must replace output m by Xp minus the other
// three; several flags are uncorrectable. PARITY_SOS_ECC: the syndrome
// c1c2c3 is decoded by the table 111 -> FFT1, 110 -> FFT2, 101 -> FFT3,
// 011 -> FFT4; weight-one syndromes mean an upset check and change nothing.
// Rebuilt values saturate to 14 bits. Expected values are written out here from that table, not from the
// package function the design uses.
module tb_fault_corrector;
  import ft_fft_pkg::*;
  localparam int K = 4, OW = 14, PW = 16;
  logic [3:0] fa;
  logic [2:0] fb;
  logic signed [OW-1:0] x_re [K], x_im [K];
  logic signed [PW-1:0] xp_re, xp_im;
  logic signed [OW-1:0] ya_re [K], ya_im [K], yb_re [K], yb_im [K];
  logic lva, lvb, cfa, cfb, uca, ucb;
  logic [1:0] lca, lcb;
  int checks = 0, failures = 0;

  fault_corrector #(.SCHEME(PARITY_SOS), .K(K), .OW(OW), .PW(PW)) dut_a (
    .flags(fa), .x_re(x_re), .x_im(x_im), .xp_re(xp_re), .xp_im(xp_im),
    .y_re(ya_re), .y_im(ya_im), .loc_valid(lva), .loc(lca),
    .check_fault(cfa), .uncorrectable(uca));
  fault_corrector #(.SCHEME(PARITY_SOS_ECC), .K(K), .OW(OW), .PW(PW)) dut_b (
    .flags(fb), .x_re(x_re), .x_im(x_im), .xp_re(xp_re), .xp_im(xp_im),
    .y_re(yb_re), .y_im(yb_im), .loc_valid(lvb), .loc(lcb),
    .check_fault(cfb), .uncorrectable(ucb));

  task automatic expect_out(input string tag, input int loc,
                            input logic signed [OW-1:0] y_re [K],
                            input logic signed [OW-1:0] y_im [K]);
    int er, ei;
    for (int m = 0; m < K; m++) begin
      er = x_re[m]; ei = x_im[m];
      if (m == loc) begin
        er = xp_re; ei = xp_im;
        for (int j = 0; j < K; j++) if (j != m) begin er -= x_re[j]; ei -= x_im[j]; end
        // rebuilt values saturate to the output width
        if (er > 8191) er = 8191;
        if (er < -8192) er = -8192;
        if (ei > 8191) ei = 8191;
        if (ei < -8192) ei = -8192;
      end
      checks++;
      if (int'(y_re[m]) != er || int'(y_im[m]) != ei) begin
        failures++;
        $display("FAIL %s: out %0d (%0d,%0d) expected (%0d,%0d)", tag, m,
                 y_re[m], y_im[m], er, ei);
      end
    end
  endtask

  initial begin
    int loc_b;
    for (int t = 0; t < 200; t++) begin
      xp_re = '0; xp_im = '0;
      for (int m = 0; m < K; m++) begin
        x_re[m] = OW'(int'($urandom_range(4000)) - 2000);
        x_im[m] = OW'(int'($urandom_range(4000)) - 2000);
        xp_re += PW'(x_re[m]);
        xp_im += PW'(x_im[m]);
      end
      xp_re += PW'(int'($urandom_range(6)) - 3);
      xp_im += PW'(int'($urandom_range(6)) - 3);
      // a faulty FFT output
      x_re[t % K] = OW'($urandom);
      for (int f = 0; f < 16; f++) begin
        fa = 4'(f);
        #1;
        checks++;
        if ($countones(fa) == 1) begin
          if (!lva || lca != 2'($clog2(f)) || uca) begin failures++; $display("FAIL: A loc for %b", fa); end
          expect_out("A", $clog2(f), ya_re, ya_im);
        end else begin
          if (lva || uca != (f != 0)) begin failures++; $display("FAIL: A flags for %b", fa); end
          expect_out("A", -1, ya_re, ya_im);
        end
      end
      for (int f = 0; f < 8; f++) begin
        // fb[0] is check c1, the syndrome's first digit
        fb = {f[0], f[1], f[2]};
        #1;
        case (f)
          3'b111: loc_b = 0;
          3'b110: loc_b = 1;
          3'b101: loc_b = 2;
          3'b011: loc_b = 3;
          default: loc_b = -1;
        endcase
        checks++;
        if (lvb != (loc_b >= 0) || (loc_b >= 0 && lcb != 2'(loc_b)) ||
            cfb != (f == 1 || f == 2 || f == 4) || ucb) begin
          failures++;
          $display("FAIL: B decode for syndrome %b: lv=%b loc=%0d cf=%b uc=%b", 3'(f), lvb, lcb, cfb, ucb);
        end
        expect_out("B", loc_b, yb_re, yb_im);
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
