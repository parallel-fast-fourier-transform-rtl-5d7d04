// fault_corrector: locates the faulty FFT from the check results and
// rebuilds its output from the parity FFT.
//
// Location. With the PARITY_SOS scheme there is one SOS check per FFT, so a
// single raised flag names the faulty FFT. With PARITY_SOS_ECC the NC flags
// form a Hamming syndrome (flag 0 is check c1, the syndrome's top bit); FFT
// m is faulty when the syndrome equals its code column (for four FFTs
// 111, 110, 101, 011), a syndrome of weight one means that one SOS check
// itself was upset and nothing needs correcting. No flag means no fault.
// Any other pattern cannot come from a single fault: it is reported as
// uncorrectable and the data pass unchanged.
// Correction. The faulty output is replaced by Xp - sum of the other
// outputs, Xp being the parity FFT output (it transforms the sum of all
// inputs); the result is saturated to OW bits. All other outputs pass.
// Combinational; the flags must be stable for the whole block being read.
// Follows the document: eq. (3)/(4), Table I and the multiplexer structure.
// This design's choices: the saturation and the uncorrectable flag.
module fault_corrector #(
  parameter ft_fft_pkg::scheme_e SCHEME = ft_fft_pkg::PARITY_SOS_ECC,
  parameter int unsigned K  = 4,
  parameter int unsigned OW = 14,
  parameter int unsigned PW = 16,
  localparam int unsigned NC = ft_fft_pkg::num_checks(SCHEME, K),
  localparam int unsigned LW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [NC-1:0]        flags,
  input  logic signed [OW-1:0] x_re [K],
  input  logic signed [OW-1:0] x_im [K],
  input  logic signed [PW-1:0] xp_re,
  input  logic signed [PW-1:0] xp_im,
  output logic signed [OW-1:0] y_re [K],
  output logic signed [OW-1:0] y_im [K],
  output logic                 loc_valid,
  output logic [LW-1:0]        loc,
  output logic                 check_fault,
  output logic                 uncorrectable
);
  import ft_fft_pkg::*;

  localparam int unsigned SW2 = PW + $clog2(K + 1) + 1;
  localparam logic signed [SW2-1:0] VMAX = SW2'((longint'(1) << (OW - 1)) - 1);
  localparam logic signed [SW2-1:0] VMIN = -SW2'(longint'(1) << (OW - 1));

  logic [NC-1:0]         syn;
  logic signed [SW2-1:0] rec_re, rec_im;

  always_comb begin
    loc_valid     = 1'b0;
    loc           = '0;
    check_fault   = 1'b0;
    uncorrectable = 1'b0;
    for (int c = 0; c < NC; c++) syn[NC-1-c] = flags[c];
    if (flags != '0) begin
      if (SCHEME == PARITY_SOS) begin
        if ($countones(flags) == 1) begin
          loc_valid = 1'b1;
          for (int m = 0; m < K; m++) if (flags[m]) loc = LW'(m);
        end else begin
          uncorrectable = 1'b1;
        end
      end else begin
        for (int m = 0; m < K; m++) begin
          if (32'(syn) == hamming_code(NC, m)) begin
            loc_valid = 1'b1;
            loc       = LW'(m);
          end
        end
        if (!loc_valid) begin
          if ($countones(syn) == 1) check_fault = 1'b1;
          else                      uncorrectable = 1'b1;
        end
      end
    end
  end

  always_comb begin
    rec_re = SW2'(xp_re);
    rec_im = SW2'(xp_im);
    for (int m = 0; m < K; m++) begin
      if (LW'(m) != loc) begin
        rec_re = rec_re - SW2'(x_re[m]);
        rec_im = rec_im - SW2'(x_im[m]);
      end
    end
    for (int m = 0; m < K; m++) begin
      y_re[m] = x_re[m];
      y_im[m] = x_im[m];
      if (loc_valid && loc == LW'(m)) begin
        y_re[m] = (rec_re > VMAX) ? OW'(VMAX) : (rec_re < VMIN) ? OW'(VMIN) : OW'(rec_re);
        y_im[m] = (rec_im > VMAX) ? OW'(VMAX) : (rec_im < VMIN) ? OW'(VMIN) : OW'(rec_im);
      end
    end
  end

endmodule
