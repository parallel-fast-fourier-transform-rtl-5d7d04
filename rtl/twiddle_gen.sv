// twiddle_gen: on-line generator of FFT rotation (twiddle) coefficients.
//
// For a phase p given as a fraction of a full turn (PH_W bits, p/2^PH_W)
// it returns W = exp(-j*2*pi*p) as signed fixed point with TW_W bits and
// TW_W-2 fraction bits (1.0 = 2^(TW_W-2)).
// How: the two top phase bits pick the quadrant; the rest, an angle in
// [0, 90) degrees, is rotated by an unrolled CORDIC of NIT iterations
// started from the gain-compensated vector (1/K, 0). The CORDIC carries four
// guard bits. The quadrant is then applied by swapping and negating.
// The CORDIC arctangent table holds round(atan(2^-i) / (2*pi) * 2^24), the
// angle of each micro-rotation in units of 2^-24 of a turn.
// Timing: the phase is registered on entry and the coefficient on exit, so
// a result appears two cycles after its phase; one phase per cycle. Only the
// valid pipeline is reset (asynchronous, active low).
// The document says only that the coefficients are calculated on-line for
// each stage and held in registers; the CORDIC and all widths are this
// design's choice.
module twiddle_gen #(
  parameter int unsigned PH_W = 10,
  parameter int unsigned TW_W = 16,
  parameter int unsigned NIT  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [PH_W-1:0]        phase,
  output logic                   out_valid,
  output logic signed [TW_W-1:0] tw_re,
  output logic signed [TW_W-1:0] tw_im
);
  localparam int unsigned ZA  = 24;          // angle units: 2^-ZA turn
  localparam int unsigned XW  = TW_W + 4;    // CORDIC datapath width
  localparam int unsigned GB  = 4;           // guard bits
  localparam logic signed [XW-1:0] X0 =
    XW'(longint'(0.6072529351031394 * real'(longint'(1) << (TW_W + 2)) + 0.5));

  localparam logic [ZA-1:0] ATAN [16] = '{
    24'd2097152, 24'd1238021, 24'd654136, 24'd332050,
    24'd166669,  24'd83416,   24'd41718,  24'd20860,
    24'd10430,   24'd5215,    24'd2608,   24'd1304,
    24'd652,     24'd326,     24'd163,    24'd81
  };

  logic              v_q;
  logic [PH_W-1:0]   ph_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  always_ff @(posedge clk) ph_q <= phase;

  logic [1:0]               quad;
  logic signed [XW-1:0]     x, y, xn, yn;
  logic signed [ZA+1:0]     z;
  logic signed [XW-1:0]     c_r, s_r;
  logic signed [TW_W-1:0]   c_t, s_t;
  logic signed [TW_W-1:0]   re_n, im_n;

  always_comb begin
    quad = ph_q[PH_W-1 -: 2];
    // angle inside the quadrant, in 2^-ZA turn units (quarter turn = 2^(ZA-2))
    z = (ZA+2)'({ph_q[PH_W-3:0], {(ZA - PH_W){1'b0}}});
    x = X0;
    y = '0;
    for (int i = 0; i < NIT && i < 16; i++) begin
      if (z >= 0) begin
        xn = x - (y >>> i);
        yn = y + (x >>> i);
        z  = z - (ZA+2)'(ATAN[i]);
      end else begin
        xn = x + (y >>> i);
        yn = y - (x >>> i);
        z  = z + (ZA+2)'(ATAN[i]);
      end
      x = xn;
      y = yn;
    end
    c_r = (x + XW'(1 << (GB - 1))) >>> GB;
    s_r = (y + XW'(1 << (GB - 1))) >>> GB;
    c_t = TW_W'(c_r);
    s_t = TW_W'(s_r);
    // exp(-j(q*90deg + a)) = (-j)^q * (cos a - j sin a)
    unique case (quad)
      2'd0: begin re_n =  c_t; im_n = -s_t; end
      2'd1: begin re_n = -s_t; im_n = -c_t; end
      2'd2: begin re_n = -c_t; im_n =  s_t; end
      default: begin re_n = s_t; im_n = c_t; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
  end

  always_ff @(posedge clk) begin
    tw_re     <= re_n;
    tw_im     <= im_n;
  end

endmodule
