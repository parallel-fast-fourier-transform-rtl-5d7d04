// tb_ft_parallel_fft: the protected parallel-FFT block for 4, 6, 8 and 11
// parallel 1024-point FFTs, each with both schemes (PARITY_SOS with K
// checks, PARITY_SOS_ECC with 3 or 4 Hamming-coded checks). Each instance
// runs a clean block and two blocks with an upset in the stage RAM of one
// FFT, which must be located and corrected (see ft_parallel_harness).
module tb_ft_parallel_fft;
  import ft_fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 8;
  int hc [NH], hf [NH];
  logic [NH-1:0] hd;

  ft_parallel_harness #(.SCHEME(PARITY_SOS),     .K(4))  h0 (.clk(clk), .rst_n(rst_n), .checks(hc[0]), .failures(hf[0]), .done(hd[0]));
  ft_parallel_harness #(.SCHEME(PARITY_SOS_ECC), .K(4))  h1 (.clk(clk), .rst_n(rst_n), .checks(hc[1]), .failures(hf[1]), .done(hd[1]));
  ft_parallel_harness #(.SCHEME(PARITY_SOS),     .K(6))  h2 (.clk(clk), .rst_n(rst_n), .checks(hc[2]), .failures(hf[2]), .done(hd[2]));
  ft_parallel_harness #(.SCHEME(PARITY_SOS_ECC), .K(6))  h3 (.clk(clk), .rst_n(rst_n), .checks(hc[3]), .failures(hf[3]), .done(hd[3]));
  ft_parallel_harness #(.SCHEME(PARITY_SOS),     .K(8))  h4 (.clk(clk), .rst_n(rst_n), .checks(hc[4]), .failures(hf[4]), .done(hd[4]));
  ft_parallel_harness #(.SCHEME(PARITY_SOS_ECC), .K(8))  h5 (.clk(clk), .rst_n(rst_n), .checks(hc[5]), .failures(hf[5]), .done(hd[5]));
  ft_parallel_harness #(.SCHEME(PARITY_SOS),     .K(11)) h6 (.clk(clk), .rst_n(rst_n), .checks(hc[6]), .failures(hf[6]), .done(hd[6]));
  ft_parallel_harness #(.SCHEME(PARITY_SOS_ECC), .K(11)) h7 (.clk(clk), .rst_n(rst_n), .checks(hc[7]), .failures(hf[7]), .done(hd[7]));

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (hd == '1);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += hc[i]; failures += hf[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks;
    repeat (100000) @(posedge clk);
    checks = 0;
    for (int i = 0; i < NH; i++) checks += hc[i];
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, 1);
    $finish;
  end
endmodule
