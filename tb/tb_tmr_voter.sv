// tb_tmr_voter: random triples, with one copy corrupted most of the time;
// the output must equal the two agreeing copies and mismatch must flag any
// disagreement. Also checks a bit-by-bit majority of three distinct words.
module tb_tmr_voter;
  localparam int W = 24;
  logic [W-1:0] a, b, c, y;
  logic mismatch;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a(a), .b(b), .c(c), .y(y), .mismatch(mismatch));

  initial begin
    logic [W-1:0] good, expv;
    int n;
    for (int t = 0; t < 3000; t++) begin
      good = W'($urandom);
      a = good; b = good; c = good;
      case (t % 5)
        0: a = good ^ W'($urandom);
        1: b = good ^ W'($urandom);
        2: c = good ^ W'($urandom);
        3: ;
        default: begin a = W'($urandom); b = W'($urandom); c = W'($urandom); end
      endcase
      #1;
      for (int i = 0; i < W; i++) begin
        n = int'(a[i]) + int'(b[i]) + int'(c[i]);
        expv[i] = (n >= 2);
      end
      checks += 2;
      if (y !== expv) begin failures++; $display("FAIL: y %h expected %h", y, expv); end
      if (mismatch !== ((a != b) || (b != c))) begin failures++; $display("FAIL: mismatch"); end
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
