// tb_twiddle_gen: compares the CORDIC coefficient generator with
// exp(-j*2*pi*p/1024) rounded to 14 fraction bits, over every phase, and
// checks the two-cycle latency with a back-to-back phase stream.
module tb_twiddle_gen;
  localparam int PH_W = 10;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [PH_W-1:0] phase = '0;
  logic out_valid;
  logic signed [15:0] tw_re, tw_im;
  int checks = 0, failures = 0;
  int exp_q [$];
  int maxerr = 0;

  always #5 clk = ~clk;

  twiddle_gen #(.PH_W(PH_W), .TW_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .phase(phase),
    .out_valid(out_valid), .tw_re(tw_re), .tw_im(tw_im)
  );

  // scoreboard: the phase issued two edges earlier must come out now
  logic [PH_W-1:0] ph_d1, ph_d2;
  logic v_d1 = 1'b0, v_d2 = 1'b0;
  always @(posedge clk) begin
    ph_d1 <= phase; ph_d2 <= ph_d1;
    v_d1 <= in_valid; v_d2 <= v_d1;
  end

  always @(negedge clk) begin
    real ang;
    int er, ei, d;
    checks++;
    if (out_valid !== v_d2) begin
      failures++;
      $display("FAIL: out_valid latency");
    end
    if (v_d2) begin
      ang = 2.0 * PI * real'(ph_d2) / real'(1 << PH_W);
      er = $rtoi($floor($cos(ang) * 16384.0 + 0.5));
      ei = $rtoi($floor(-$sin(ang) * 16384.0 + 0.5));
      d = (int'(tw_re) - er);
      if (d < 0) d = -d;
      if (d > maxerr) maxerr = d;
      if (d > 2) begin failures++; $display("FAIL: p=%0d re %0d exp %0d", ph_d2, tw_re, er); end
      d = (int'(tw_im) - ei);
      if (d < 0) d = -d;
      if (d > maxerr) maxerr = d;
      if (d > 2) begin failures++; $display("FAIL: p=%0d im %0d exp %0d", ph_d2, tw_im, ei); end
      checks += 2;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int p = 0; p < (1 << PH_W); p++) begin
      in_valid <= 1'b1;
      phase <= PH_W'(p);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    $display("max coefficient error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
