// tb_fault_campaign: the single-upset injection experiment, run on both
// protection schemes side by side at their full size (four parallel
// 1024-point FFTs). Each scheme gets RUNS blocks with one random upset each
// in a stage RAM or a coefficient register; the harness reports how many
// upsets were masked, corrected or left a wrong output, and fails if the
// coverage falls below MIN_COVERAGE or nothing was ever corrected.
// The tolerance is 2^18 (squared output LSBs over a block), about twice the
// largest fault-free difference that rounding produces for this data. With it
// roughly 75-85% of the upsets end masked or corrected; the rest leave an
// output more than 6 LSB off without tripping the energy check, which is why
// the floor is set at 60% rather than near 100%.
module tb_fault_campaign;
  localparam int RUNS = 250;
  logic clk = 1'b0, rst_n = 1'b0;
  int c0, f0, c1, f1;
  logic d0, d1;

  always #5 clk = ~clk;

  ft_campaign_harness #(.SCHEME(ft_fft_pkg::PARITY_SOS), .RUNS(RUNS)) u_sos (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .done(d0)
  );
  ft_campaign_harness #(.SCHEME(ft_fft_pkg::PARITY_SOS_ECC), .RUNS(RUNS)) u_ecc (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .done(d1)
  );

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    repeat (RUNS * 10000 + 20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
