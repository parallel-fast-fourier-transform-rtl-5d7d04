// tb_fft_ram: writes random words, reads them back through the synchronous
// read port (one-cycle latency) against a model array, and checks that a
// read of the address being written returns the old word.
module tb_fft_ram;
  localparam int DEPTH = 1024, WIDTH = 28;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .rdata(rdata)
  );

  initial begin
    logic [WIDTH-1:0] expv;
    for (int a = 0; a < DEPTH; a++) begin
      we <= 1'b1; waddr <= 10'(a); wdata <= WIDTH'($urandom);
      @(posedge clk);
      model[a] = wdata;
    end
    we <= 1'b0;
    for (int t = 0; t < 3000; t++) begin
      raddr <= 10'($urandom);
      re <= 1'b1;
      // simultaneous write to a random address, sometimes the same one
      we <= 1'b1;
      waddr <= (t % 3 == 0) ? raddr : 10'($urandom);
      wdata <= WIDTH'($urandom);
      @(posedge clk);
      expv = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== expv) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", raddr, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
