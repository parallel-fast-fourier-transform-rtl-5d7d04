// stream_combiner: adds a chosen subset of the parallel sample streams.
//
// Because the DFT is linear, the transform of a sum of inputs equals the sum
// of the transforms. The protection schemes use that in two places: the
// parity FFT is fed with the sum of all K inputs, and in the Hamming-coded
// scheme each SOS check watches the sum of the inputs, and of the outputs,
// of the FFTs its code bit covers. Bit m of MASK selects stream m.
// The sum is OW bits wide (wide enough for the selected streams at the
// defaults: 4 x 12-bit inputs need 14 bits, 3 x 14-bit outputs 16).
// Combinational, complex (re and im summed separately).
// Follows the document: the sums of eq. (1) and of Figs. 2 and 3. The mask
// parameter is this design's way of choosing the subset.
module stream_combiner #(
  parameter int unsigned K    = 4,
  parameter int unsigned IW   = 12,
  parameter int unsigned OW   = 14,
  parameter logic [31:0] MASK = 32'hF
) (
  input  logic signed [IW-1:0] in_re [K],
  input  logic signed [IW-1:0] in_im [K],
  output logic signed [OW-1:0] sum_re,
  output logic signed [OW-1:0] sum_im
);
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int m = 0; m < K; m++) begin
      if (MASK[m]) begin
        sum_re = sum_re + OW'(in_re[m]);
        sum_im = sum_im + OW'(in_im[m]);
      end
    end
  end
endmodule
