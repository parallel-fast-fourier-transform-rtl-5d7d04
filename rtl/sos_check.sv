// sos_check: Parseval (sum-of-squares) check of one FFT, or of a sum of FFTs.
//
// Parseval's theorem says a block's energy is the same before and after the
// transform, up to a known scale; with the FFT core's 1/sqrt(N) scaling the
// two sums are equal. Samples enter and leave the FFT one per cycle, so the
// check is sequential: one accumulator adds re^2 + im^2 of every input
// sample, another of every output sample. When the input block ends
// (in_last) its total is set aside, so the next block may already stream in;
// when the output block ends (out_last) the two totals are compared and
// fault is set if they differ by more than the tolerance tau. done pulses
// one cycle after out_last with the verdict in fault, which holds until the
// next done. Accumulators are ACC_W bits and saturate instead of wrapping.
// fi_arm/fi_bit flip one bit of the output accumulator at the next output
// sample, to test what an upset in the check itself does.
// Follows the document: sequential accumulators compared at the end of the
// block, 39-bit accumulators, tolerance test on the absolute difference.
// This design's choices: saturation, the run-time tau port, the handshake.
module sos_check #(
  parameter int unsigned IW    = 12,
  parameter int unsigned OW    = 14,
  parameter int unsigned ACC_W = 39,
  localparam int unsigned FBW  = $clog2(ACC_W)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_last,
  input  logic signed [IW-1:0]   in_re,
  input  logic signed [IW-1:0]   in_im,
  input  logic                   out_valid,
  input  logic                   out_last,
  input  logic signed [OW-1:0]   out_re,
  input  logic signed [OW-1:0]   out_im,
  input  logic [ACC_W-1:0]       tau,
  output logic                   done,
  output logic                   fault,
  input  logic                   fi_arm,
  input  logic [FBW-1:0]         fi_bit
);
  localparam logic [ACC_W:0] ACC_MAX = {1'b0, {ACC_W{1'b1}}};

  logic [ACC_W-1:0] in_acc, in_energy, out_acc;
  logic [ACC_W:0]   in_sum, out_sum;
  logic [2*IW:0]    in_sq;
  logic [2*OW:0]    out_sq;
  logic [ACC_W-1:0] in_next, out_next, out_flip;
  logic             fi_pend;
  logic [FBW-1:0]   fi_bit_q;

  always_comb begin
    in_sq   = (2*IW+1)'(in_re * in_re) + (2*IW+1)'(in_im * in_im);
    out_sq  = (2*OW+1)'(out_re * out_re) + (2*OW+1)'(out_im * out_im);
    in_sum  = (ACC_W+1)'(in_acc) + (ACC_W+1)'(in_sq);
    out_flip = out_acc;
    if (fi_pend) out_flip[fi_bit_q] = ~out_acc[fi_bit_q];
    out_sum = (ACC_W+1)'(out_flip) + (ACC_W+1)'(out_sq);
    in_next  = (in_sum  > ACC_MAX) ? ACC_MAX[ACC_W-1:0] : in_sum[ACC_W-1:0];
    out_next = (out_sum > ACC_MAX) ? ACC_MAX[ACC_W-1:0] : out_sum[ACC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_acc    <= '0;
      in_energy <= '0;
      out_acc   <= '0;
      done      <= 1'b0;
      fault     <= 1'b0;
      fi_pend   <= 1'b0;
      fi_bit_q  <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          in_energy <= in_next;
          in_acc    <= '0;
        end else begin
          in_acc <= in_next;
        end
      end
      if (out_valid) begin
        if (out_last) begin
          out_acc <= '0;
          done    <= 1'b1;
          fault   <= ((out_next > in_energy) ? out_next - in_energy
                                             : in_energy - out_next) > tau;
        end else begin
          out_acc <= out_next;
        end
      end
      if (fi_arm) begin
        fi_pend  <= 1'b1;
        fi_bit_q <= fi_bit;
      end else if (out_valid) begin
        fi_pend <= 1'b0;
      end
    end
  end

endmodule
