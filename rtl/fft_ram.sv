// fft_ram: sample memory of the iterative FFT core.
//
// Holds one block of complex samples: the loaded input, then the result of
// every stage in turn (the core works in place), and finally the
// digit-reversed transform that is read out.
// One write port and one read port on the same clock; the read is
// synchronous, so data appear the cycle after the address. A read and a
// write of the same address in one cycle return the old word.
// The document names the stage-result RAMs; depth, width and the port
// arrangement are this design's choice (one read and one write per cycle
// is what a one-sample-per-cycle radix-4 core needs).
module fft_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 28,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
