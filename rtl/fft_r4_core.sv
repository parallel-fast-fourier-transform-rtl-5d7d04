// fft_r4_core: iterative radix-4 decimation-in-frequency FFT core.
//
// One core transforms blocks of N = 4^S complex samples, S programmable from
// 1 to LOG4_NMAX (N = 4 .. 1024 at the defaults), using a single four-point
// DIF butterfly and one sample memory (fft_ram) that it works on in place.
// A block goes through three phases:
//   load    : N input samples, natural order, one per cycle while in_ready;
//   compute : S stages; each stage streams the whole memory through the
//             butterfly, one sample read and one written per cycle, so a
//             stage takes N cycles (S*N in all: 5120 for 1024 points). The
//             butterfly pipeline is 5 cycles from read to write; for N >= 64
//             the next stage never reads a word still in flight, so stages
//             run back to back. Only 16-point blocks wait 5 cycles for the
//             pipeline to drain after each stage (S*(N+5) in all);
//   output  : N transform bins in natural order (digit-reversed reads),
//             one per cycle, out_last on the final one.
// Stage s (span L = 4^(S-1-s)) reads butterfly b as samples
// g*4L + n + q*L, q = 0..3 (g = b/L, n = b mod L), forms the four-point DFT,
// and writes output q multiplied by exp(-j*2*pi*q*n/(4L)) back to the same
// address. The rotation coefficients come from twiddle_gen, which computes
// them on line; each is held in a register until its multiply.
// Scaling: every butterfly output is halved (rounded half to even and
// saturated), so the result is DFT(x)/sqrt(N). That keeps the transform energy-preserving,
// sum|X|^2 = sum|x|^2, which is what the Parseval (SOS) check compares.
// Inputs are IN_W bits, the internal words and outputs OUT_W bits
// (12 and 14 for the data FFTs, 14 and 16 for the parity FFT).
// Fault injection (for testing the protection): fi_ram_arm flips bit fi_bit
// of the word at fi_addr at its next read, which is what an upset of the
// stored word does; fi_tw_arm flips bit fi_tw_bit of the next non-trivial
// rotation coefficient held in its register.
// Follows the document: radix-4 DIF, iterative, programmable N, coefficients
// computed on line and registered, N cycles per stage, 12/14-bit widths.
// This design's choices: the memory organisation, the 1/sqrt(N) scaling,
// coefficient width TW_W, the drain gap for small N and the fault-injection
// ports.
module fft_r4_core #(
  parameter int unsigned IN_W      = 12,
  parameter int unsigned OUT_W     = 14,
  parameter int unsigned LOG4_NMAX = 5,
  parameter int unsigned TW_W      = 16,
  localparam int unsigned AW   = 2 * LOG4_NMAX,
  localparam int unsigned SW   = $clog2(LOG4_NMAX + 1),
  localparam int unsigned DW   = OUT_W,
  localparam int unsigned BW   = $clog2(2 * DW),
  localparam int unsigned TBW  = $clog2(2 * TW_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [SW-1:0]           cfg_stages,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic                    busy,
  input  logic                    fi_ram_arm,
  input  logic [AW-1:0]           fi_addr,
  input  logic [BW-1:0]           fi_bit,
  input  logic                    fi_tw_arm,
  input  logic [TBW-1:0]          fi_tw_bit
);
  import ft_fft_pkg::*;

  localparam int unsigned NMAX  = 1 << AW;
  localparam int unsigned DRAIN = 5;
  localparam int unsigned WD    = 5;   // read-to-write distance in cycles
  // From this many stages (N >= 64) no sample written in the last WD cycles
  // of a stage is read in the first WD cycles of the next one (or of the
  // output phase), so stages follow back to back without a drain.
  localparam int unsigned NODRAIN_STG = 3;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN, S_OUT} state_e;
  state_e state;

  logic [SW-1:0]  nstg;      // stages of the current block
  logic [SW-1:0]  stg;       // current stage
  logic [AW-1:0]  cnt;
  logic [2:0]     dcnt;
  logic [AW-1:0]  last_idx;  // N-1

  always_comb last_idx = AW'((NMAX >> (2 * (LOG4_NMAX - 32'(nstg)))) - 1);

  // ---------------------------------------------------------------- control
  logic accept;
  always_comb accept = in_valid && in_ready;
  always_comb in_ready = (state == S_IDLE) || (state == S_LOAD);
  always_comb busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      nstg  <= SW'(LOG4_NMAX);
      stg   <= '0;
      cnt   <= '0;
      dcnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          nstg  <= (cfg_stages == 0 || cfg_stages > SW'(LOG4_NMAX)) ?
                   SW'(LOG4_NMAX) : cfg_stages;
          cnt   <= AW'(1);
          state <= S_LOAD;
        end
        S_LOAD: if (accept) begin
          cnt <= cnt + 1'b1;
          if (cnt == last_idx) begin
            cnt   <= '0;
            stg   <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == last_idx) begin
            cnt   <= '0;
            dcnt  <= '0;
            if (nstg < SW'(NODRAIN_STG)) state <= S_DRAIN;
            else if (stg == nstg - 1'b1) state <= S_OUT;
            else stg <= stg + 1'b1;
          end
        end
        S_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 3'(DRAIN - 1)) begin
            if (stg == nstg - 1'b1) state <= S_OUT;
            else begin
              stg   <= stg + 1'b1;
              state <= S_RUN;
            end
          end
        end
        S_OUT: begin
          cnt <= cnt + 1'b1;
          if (cnt == last_idx) begin
            cnt   <= '0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- read address generation
  logic [AW-1:0]   rd_addr;
  logic            rd_en;
  logic [1:0]      rd_q;
  logic [AW-1:0]   rd_phase;
  logic [AW-1:0]   ls;        // log2 of the span L
  logic [AW-1:0]   bfly, n_idx, g_idx;
  logic [AW+1:0]   qn;

  always_comb begin
    ls       = AW'(2 * (32'(nstg) - 1 - 32'(stg)));
    bfly     = cnt >> 2;
    rd_q     = cnt[1:0];
    n_idx    = bfly & ((AW'(1) << ls) - 1'b1);
    g_idx    = bfly >> ls;
    qn       = (AW+2)'(rd_q) * (AW+2)'(n_idx);
    rd_phase = AW'(qn << (AW - 32'(ls) - 2));
    rd_en    = 1'b0;
    rd_addr  = cnt;
    if (state == S_RUN) begin
      rd_en   = 1'b1;
      rd_addr = (g_idx << (ls + 2)) | (AW'(rd_q) << ls) | n_idx;
    end else if (state == S_OUT) begin
      rd_en   = 1'b1;
      rd_addr = AW'(digit_rev4(16'(cnt), nstg));
    end
  end

  // ----------------------------------------------------------------- memory
  logic [2*DW-1:0] ram_rdata, ram_wdata;
  logic [AW-1:0]   ram_waddr;
  logic            ram_we;

  fft_ram #(.DEPTH(NMAX), .WIDTH(2 * DW)) u_ram (
    .clk   (clk),
    .we    (ram_we),
    .waddr (ram_waddr),
    .wdata (ram_wdata),
    .re    (rd_en),
    .raddr (rd_addr),
    .rdata (ram_rdata)
  );

  // ------------------------------------------- pipeline tags (read -> write)
  logic [WD-1:0]   tag_v;      // compute-phase sample in flight
  logic [AW-1:0]   tag_addr [WD];
  logic [WD-1:0]   tag_triv;   // coefficient is exactly 1
  logic [1:0]      q1;
  logic            out_rd1;    // output-phase read, one cycle ago
  logic            out_last1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_v     <= '0;
      tag_triv  <= '0;
      out_rd1   <= 1'b0;
      out_last1 <= 1'b0;
      q1        <= '0;
      for (int i = 0; i < WD; i++) tag_addr[i] <= '0;
    end else begin
      tag_v       <= {tag_v[WD-2:0], (state == S_RUN)};
      tag_triv    <= {tag_triv[WD-2:0], (rd_phase == '0)};
      tag_addr[0] <= rd_addr;
      for (int i = 1; i < WD; i++) tag_addr[i] <= tag_addr[i-1];
      q1          <= rd_q;
      out_rd1     <= (state == S_OUT);
      out_last1   <= (state == S_OUT) && (cnt == last_idx);
    end
  end

  // ------------------------------------------------ fault injection (RAM)
  logic            fi_ram_pend;
  logic [AW-1:0]   fi_ram_addr_q;
  logic [BW-1:0]   fi_ram_bit_q;
  logic [2*DW-1:0] rdata_f;
  logic            fi_hit;

  always_comb begin
    fi_hit  = fi_ram_pend && (tag_v[0] || out_rd1) && (tag_addr[0] == fi_ram_addr_q);
    rdata_f = ram_rdata;
    if (fi_hit) rdata_f[fi_ram_bit_q] = ~ram_rdata[fi_ram_bit_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fi_ram_pend   <= 1'b0;
      fi_ram_addr_q <= '0;
      fi_ram_bit_q  <= '0;
    end else if (fi_ram_arm) begin
      fi_ram_pend   <= 1'b1;
      fi_ram_addr_q <= fi_addr;
      fi_ram_bit_q  <= fi_bit;
    end else if (fi_hit) begin
      fi_ram_pend <= 1'b0;
    end
  end

  // -------------------------------------------------------------- butterfly
  logic signed [DW-1:0] x_re [4], x_im [4];
  logic signed [DW-1:0] xr_q [3], xi_q [3];
  logic signed [DW+1:0] a_re [4], a_im [4];
  logic signed [DW+1:0] ar_q [4], ai_q [4];

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      x_re[i] = xr_q[i];
      x_im[i] = xi_q[i];
    end
    x_re[3] = rdata_f[2*DW-1:DW];
    x_im[3] = rdata_f[DW-1:0];
  end

  r4_butterfly #(.W(DW)) u_bfly (
    .x_re (x_re),
    .x_im (x_im),
    .a_re (a_re),
    .a_im (a_im)
  );

  always_ff @(posedge clk) begin
    if (tag_v[0] && q1 != 2'd3) begin
      xr_q[q1] <= rdata_f[2*DW-1:DW];
      xi_q[q1] <= rdata_f[DW-1:0];
    end
    if (tag_v[0] && q1 == 2'd3) begin
      ar_q <= a_re;
      ai_q <= a_im;
    end
  end

  // --------------------------------------------------- rotation coefficients
  logic                   tw_v;
  logic signed [TW_W-1:0] tw_re, tw_im;
  logic signed [TW_W-1:0] twr_d [3], twi_d [3];
  logic                   fi_tw_pend;
  logic [TBW-1:0]         fi_tw_bit_q;
  logic [2*TW_W-1:0]      tw_word;
  logic                   fi_tw_hit;

  twiddle_gen #(.PH_W(AW), .TW_W(TW_W)) u_tw (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (state == S_RUN),
    .phase     (rd_phase),
    .out_valid (tw_v),
    .tw_re     (tw_re),
    .tw_im     (tw_im)
  );

  always_comb begin
    fi_tw_hit = fi_tw_pend && tag_v[3] && !tag_triv[3];
    tw_word   = {twr_d[1], twi_d[1]};
    if (fi_tw_hit) tw_word[fi_tw_bit_q] = ~tw_word[fi_tw_bit_q];
  end

  always_ff @(posedge clk) begin
    twr_d[0] <= tw_re;
    twi_d[0] <= tw_im;
    twr_d[1] <= twr_d[0];
    twi_d[1] <= twi_d[0];
    // coefficient register feeding the multiplier
    twr_d[2] <= tw_word[2*TW_W-1:TW_W];
    twi_d[2] <= tw_word[TW_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fi_tw_pend  <= 1'b0;
      fi_tw_bit_q <= '0;
    end else if (fi_tw_arm) begin
      fi_tw_pend  <= 1'b1;
      fi_tw_bit_q <= fi_tw_bit;
    end else if (fi_tw_hit) begin
      fi_tw_pend <= 1'b0;
    end
  end

  // ------------------------------------------- rotate, scale, write back
  localparam int unsigned PW = DW + 2 + TW_W + 1;
  logic [1:0]              wq;
  logic signed [DW+1:0]    sel_re, sel_im;
  logic signed [PW-1:0]    p_re, p_im;
  logic signed [PW-1:0]    rnd_re, rnd_im;
  logic signed [DW-1:0]    w_re, w_im;

  localparam logic signed [PW-1:0] VMAX = PW'((longint'(1) << (DW - 1)) - 1);
  localparam logic signed [PW-1:0] VMIN = -PW'(longint'(1) << (DW - 1));

  // Drop TW_W-1 fraction bits, rounding half to even: plain round-half-up
  // would add a bias that piles up in the DC bin over the stages.
  function automatic logic signed [PW-1:0] rne(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] q;
    logic [TW_W-2:0]      rem;
    q   = v >>> (TW_W - 1);
    rem = v[TW_W-2:0];
    if (rem[TW_W-2] && (rem[TW_W-3:0] != '0 || q[0])) q = q + 1'b1;
    return q;
  endfunction

  function automatic logic signed [DW-1:0] sat(input logic signed [PW-1:0] v);
    if (v > VMAX)      return DW'(VMAX);
    else if (v < VMIN) return DW'(VMIN);
    else               return DW'(v);
  endfunction

  // write index q of the butterfly whose results are in ar_q/ai_q
  logic [1:0] wq_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              wq_cnt <= '0;
    else if (tag_v[WD-1])    wq_cnt <= wq_cnt + 1'b1;
    else                     wq_cnt <= '0;
  end

  always_comb begin
    wq     = wq_cnt;
    sel_re = ar_q[wq];
    sel_im = ai_q[wq];
    if (tag_triv[WD-1]) begin
      // coefficient 1: only the halving
      p_re = PW'(sel_re) <<< (TW_W - 2);
      p_im = PW'(sel_im) <<< (TW_W - 2);
    end else begin
      p_re = PW'(sel_re) * PW'(twr_d[2]) - PW'(sel_im) * PW'(twi_d[2]);
      p_im = PW'(sel_re) * PW'(twi_d[2]) + PW'(sel_im) * PW'(twr_d[2]);
    end
    rnd_re = rne(p_re);
    rnd_im = rne(p_im);
    w_re   = sat(rnd_re);
    w_im   = sat(rnd_im);
  end

  always_comb begin
    if (state == S_LOAD || state == S_IDLE) begin
      ram_we    = accept;
      ram_waddr = (state == S_IDLE) ? '0 : cnt;
      ram_wdata = {DW'(in_re), DW'(in_im)};
    end else begin
      ram_we    = tag_v[WD-1];
      ram_waddr = tag_addr[WD-1];
      ram_wdata = {w_re, w_im};
    end
  end

  // ----------------------------------------------------------------- output
  always_comb begin
    out_valid = out_rd1;
    out_last  = out_last1;
    out_re    = rdata_f[2*DW-1:DW];
    out_im    = rdata_f[DW-1:0];
  end

  // Coefficients arrive two cycles after their read, in step with the data.
  assert property (@(posedge clk) disable iff (!rst_n) tw_v == tag_v[1]);

  // The write pipeline must be empty whenever a new block is loaded.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_LOAD) |-> !tag_v[WD-1]);

endmodule
