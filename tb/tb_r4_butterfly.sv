// tb_r4_butterfly: checks the four-point DFT against a direct evaluation
// sum_m x_m * (-j)^(q*m) for random and extreme inputs.
module tb_r4_butterfly;
  localparam int W = 14;
  logic signed [W-1:0] x_re [4], x_im [4];
  logic signed [W+1:0] a_re [4], a_im [4];
  int checks = 0, failures = 0;

  r4_butterfly #(.W(W)) dut (.x_re(x_re), .x_im(x_im), .a_re(a_re), .a_im(a_im));

  task automatic check_one();
    int er, ei, p;
    for (int q = 0; q < 4; q++) begin
      er = 0; ei = 0;
      for (int m = 0; m < 4; m++) begin
        p = (q * m) % 4;   // (-j)^p
        case (p)
          0: begin er += x_re[m]; ei += x_im[m]; end
          1: begin er += x_im[m]; ei -= x_re[m]; end
          2: begin er -= x_re[m]; ei -= x_im[m]; end
          default: begin er -= x_im[m]; ei += x_re[m]; end
        endcase
      end
      checks++;
      if (int'(a_re[q]) != er || int'(a_im[q]) != ei) begin
        failures++;
        $display("FAIL: a%0d = (%0d,%0d), expected (%0d,%0d)", q, a_re[q], a_im[q], er, ei);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int m = 0; m < 4; m++) begin
        if (t < 4) begin
          x_re[m] = (t[0]) ? -(1 <<< (W - 1)) : (1 <<< (W - 1)) - 1;
          x_im[m] = (t[1] ^ m[0]) ? -(1 <<< (W - 1)) : (1 <<< (W - 1)) - 1;
        end else begin
          x_re[m] = W'($urandom);
          x_im[m] = W'($urandom);
        end
      end
      #1;
      check_one();
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
