// ft_fft_top: the two proposed protection schemes for parallel FFTs, side
// by side.
//
// Each half protects four 1024-point FFTs (12-bit complex inputs, 14-bit
// outputs) with one parity FFT and Parseval checks, and corrects a single
// faulty FFT per block:
//   a_* : PARITY_SOS     - four SOS checks, one per FFT.
//   b_* : PARITY_SOS_ECC - three SOS checks on Hamming-coded sums of FFTs.
// The halves share only the clock and reset; every port of each is brought
// out with its prefix. See ft_parallel_fft for the data flow, timing and
// status outputs, and fft_r4_core for the FFT itself. The number of points
// is chosen per block with cfg_stages (N = 4^cfg_stages, 0 meaning 1024).
// The document presents the two schemes as alternatives evaluated on the
// same FFT; putting both in one top is this design's choice.
module ft_fft_top #(
  parameter int unsigned K         = 4,
  parameter int unsigned IN_W      = 12,
  parameter int unsigned OUT_W     = 14,
  parameter int unsigned LOG4_NMAX = 5,
  parameter int unsigned TW_W      = 16,
  parameter int unsigned ACC_W     = 39,
  localparam int unsigned NC_A  = ft_fft_pkg::num_checks(ft_fft_pkg::PARITY_SOS, K),
  localparam int unsigned NC_B  = ft_fft_pkg::num_checks(ft_fft_pkg::PARITY_SOS_ECC, K),
  localparam int unsigned AW    = 2 * LOG4_NMAX,
  localparam int unsigned SW    = $clog2(LOG4_NMAX + 1),
  localparam int unsigned LW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned FW    = $clog2(K + 1),
  localparam int unsigned BW    = $clog2(2 * (OUT_W + $clog2(K))),
  localparam int unsigned TBW   = $clog2(2 * TW_W),
  localparam int unsigned CW_A  = (NC_A > 1) ? $clog2(NC_A) : 1,
  localparam int unsigned CW_B  = (NC_B > 1) ? $clog2(NC_B) : 1,
  localparam int unsigned ABW   = $clog2(ACC_W)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [SW-1:0]              a_cfg_stages,
  input  logic [ACC_W-1:0]           a_tau,
  input  logic                       a_in_valid,
  output logic                       a_in_ready,
  input  logic signed [IN_W-1:0]     a_in_re [K],
  input  logic signed [IN_W-1:0]     a_in_im [K],
  output logic                       a_out_valid,
  output logic                       a_out_last,
  output logic signed [OUT_W-1:0]    a_out_re [K],
  output logic signed [OUT_W-1:0]    a_out_im [K],
  output logic [NC_A-1:0]            a_st_flags,
  output logic                       a_st_corrected,
  output logic [LW-1:0]              a_st_loc,
  output logic                       a_st_check_fault,
  output logic                       a_st_uncorrectable,
  output logic                       a_st_tmr_mismatch,
  input  logic [FW-1:0]              a_fi_fft,
  input  logic                       a_fi_ram_arm,
  input  logic [AW-1:0]              a_fi_addr,
  input  logic [BW-1:0]              a_fi_bit,
  input  logic                       a_fi_tw_arm,
  input  logic [TBW-1:0]             a_fi_tw_bit,
  input  logic                       a_fi_sos_arm,
  input  logic [CW_A-1:0]            a_fi_sos_idx,
  input  logic [ABW-1:0]             a_fi_sos_bit,
  input  logic                       a_fi_tmr_arm,
  input  logic [SW-1:0]              b_cfg_stages,
  input  logic [ACC_W-1:0]           b_tau,
  input  logic                       b_in_valid,
  output logic                       b_in_ready,
  input  logic signed [IN_W-1:0]     b_in_re [K],
  input  logic signed [IN_W-1:0]     b_in_im [K],
  output logic                       b_out_valid,
  output logic                       b_out_last,
  output logic signed [OUT_W-1:0]    b_out_re [K],
  output logic signed [OUT_W-1:0]    b_out_im [K],
  output logic [NC_B-1:0]            b_st_flags,
  output logic                       b_st_corrected,
  output logic [LW-1:0]              b_st_loc,
  output logic                       b_st_check_fault,
  output logic                       b_st_uncorrectable,
  output logic                       b_st_tmr_mismatch,
  input  logic [FW-1:0]              b_fi_fft,
  input  logic                       b_fi_ram_arm,
  input  logic [AW-1:0]              b_fi_addr,
  input  logic [BW-1:0]              b_fi_bit,
  input  logic                       b_fi_tw_arm,
  input  logic [TBW-1:0]             b_fi_tw_bit,
  input  logic                       b_fi_sos_arm,
  input  logic [CW_B-1:0]            b_fi_sos_idx,
  input  logic [ABW-1:0]             b_fi_sos_bit,
  input  logic                       b_fi_tmr_arm
);

  ft_parallel_fft #(
    .SCHEME(ft_fft_pkg::PARITY_SOS), .K(K), .IN_W(IN_W), .OUT_W(OUT_W),
    .LOG4_NMAX(LOG4_NMAX), .TW_W(TW_W), .ACC_W(ACC_W)
  ) u_parity_sos (
    .clk(clk),
    .rst_n(rst_n),
    .cfg_stages(a_cfg_stages),
    .tau(a_tau),
    .in_valid(a_in_valid),
    .in_ready(a_in_ready),
    .in_re(a_in_re),
    .in_im(a_in_im),
    .out_valid(a_out_valid),
    .out_last(a_out_last),
    .out_re(a_out_re),
    .out_im(a_out_im),
    .st_flags(a_st_flags),
    .st_corrected(a_st_corrected),
    .st_loc(a_st_loc),
    .st_check_fault(a_st_check_fault),
    .st_uncorrectable(a_st_uncorrectable),
    .st_tmr_mismatch(a_st_tmr_mismatch),
    .fi_fft(a_fi_fft),
    .fi_ram_arm(a_fi_ram_arm),
    .fi_addr(a_fi_addr),
    .fi_bit(a_fi_bit),
    .fi_tw_arm(a_fi_tw_arm),
    .fi_tw_bit(a_fi_tw_bit),
    .fi_sos_arm(a_fi_sos_arm),
    .fi_sos_idx(a_fi_sos_idx),
    .fi_sos_bit(a_fi_sos_bit),
    .fi_tmr_arm(a_fi_tmr_arm)
  );

  ft_parallel_fft #(
    .SCHEME(ft_fft_pkg::PARITY_SOS_ECC), .K(K), .IN_W(IN_W), .OUT_W(OUT_W),
    .LOG4_NMAX(LOG4_NMAX), .TW_W(TW_W), .ACC_W(ACC_W)
  ) u_parity_sos_ecc (
    .clk(clk),
    .rst_n(rst_n),
    .cfg_stages(b_cfg_stages),
    .tau(b_tau),
    .in_valid(b_in_valid),
    .in_ready(b_in_ready),
    .in_re(b_in_re),
    .in_im(b_in_im),
    .out_valid(b_out_valid),
    .out_last(b_out_last),
    .out_re(b_out_re),
    .out_im(b_out_im),
    .st_flags(b_st_flags),
    .st_corrected(b_st_corrected),
    .st_loc(b_st_loc),
    .st_check_fault(b_st_check_fault),
    .st_uncorrectable(b_st_uncorrectable),
    .st_tmr_mismatch(b_st_tmr_mismatch),
    .fi_fft(b_fi_fft),
    .fi_ram_arm(b_fi_ram_arm),
    .fi_addr(b_fi_addr),
    .fi_bit(b_fi_bit),
    .fi_tw_arm(b_fi_tw_arm),
    .fi_tw_bit(b_fi_tw_bit),
    .fi_sos_arm(b_fi_sos_arm),
    .fi_sos_idx(b_fi_sos_idx),
    .fi_sos_bit(b_fi_sos_bit),
    .fi_tmr_arm(b_fi_tmr_arm)
  );

endmodule
