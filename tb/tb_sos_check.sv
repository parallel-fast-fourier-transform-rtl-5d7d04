// tb_sos_check: streams blocks of 64 input and 64 output samples and
// compares the fault verdict with energies summed here: equal blocks pass,
// blocks whose output energy differs by more than tau fail, a difference
// of exactly tau passes. Also checks that the next block's input may arrive
// before the current output ends, that done comes one cycle after out_last,
// that a full-scale output block against a tiny input is flagged, and that
// an injected accumulator upset is flagged. Finally 300 random blocks with
// unrelated input and output data and a random tolerance are checked against
// |sum|x|^2 - sum|y|^2| > tau worked out here.
module tb_sos_check;
  localparam int IW = 12, OW = 14, ACC_W = 39, N = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0, out_valid = 1'b0, out_last = 1'b0;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic signed [OW-1:0] out_re = '0, out_im = '0;
  logic [ACC_W-1:0] tau = 39'd1;
  logic done, fault;
  logic fi_arm = 1'b0;
  logic [5:0] fi_bit = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sos_check #(.IW(IW), .OW(OW), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
    .in_re(in_re), .in_im(in_im), .out_valid(out_valid), .out_last(out_last),
    .out_re(out_re), .out_im(out_im), .tau(tau), .done(done), .fault(fault),
    .fi_arm(fi_arm), .fi_bit(fi_bit));

  int ir [N], ii [N], orr [N], oi [N];

  task automatic send_in();
    for (int i = 0; i < N; i++) begin
      in_valid <= 1'b1; in_last <= (i == N - 1);
      in_re <= IW'(ir[i]); in_im <= IW'(ii[i]);
      @(posedge clk);
    end
    in_valid <= 1'b0; in_last <= 1'b0;
  endtask

  task automatic send_out(input bit exp_fault, input string what);
    for (int i = 0; i < N; i++) begin
      out_valid <= 1'b1; out_last <= (i == N - 1);
      out_re <= OW'(orr[i]); out_im <= OW'(oi[i]);
      @(posedge clk);
    end
    out_valid <= 1'b0; out_last <= 1'b0;
    @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL %s: done not one cycle after out_last", what); end
    checks++;
    if (fault != exp_fault) begin failures++; $display("FAIL %s: fault=%b expected %b", what, fault, exp_fault); end
    @(posedge clk);
  endtask

  // a block whose output is a permutation with sign flips: same energy
  task automatic make_block(input int amp);
    for (int i = 0; i < N; i++) begin
      ir[i] = int'($urandom_range(2 * amp)) - amp;
      ii[i] = int'($urandom_range(2 * amp)) - amp;
    end
    for (int i = 0; i < N; i++) begin
      orr[i] = -ii[N - 1 - i];
      oi[i]  = ir[N - 1 - i];
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    make_block(2000);
    send_in();
    send_out(1'b0, "equal energy");
    // output energy larger by 2*3+1 = 7 (one sample +1 on a value of 3)
    make_block(2000);
    ir[5] = 3; orr[N - 1 - 5] = 0; oi[N - 1 - 5] = 4;  // in: 9+ii^2, out: 16+ii^2
    ii[5] = 0;
    tau <= 39'd7;
    send_in();
    send_out(1'b0, "difference equal to tau");
    make_block(2000);
    ir[5] = 3; ii[5] = 0; orr[N - 1 - 5] = 0; oi[N - 1 - 5] = 4;
    tau <= 39'd6;
    send_in();
    send_out(1'b1, "difference above tau");
    // overlapping blocks: next input streams while the output is pending
    tau <= 39'd1;
    make_block(1500);
    send_in();
    fork
      send_out(1'b0, "overlap, first block");
      begin
        int sr [N], si [N];
        for (int i = 0; i < N; i++) begin sr[i] = ir[i] + 1; si[i] = ii[i]; end
        for (int i = 0; i < N; i++) begin
          in_valid <= 1'b1; in_last <= (i == N - 1);
          in_re <= IW'(sr[i]); in_im <= IW'(si[i]);
          @(posedge clk);
        end
        in_valid <= 1'b0; in_last <= 1'b0;
        for (int i = 0; i < N; i++) begin ir[i] = sr[i]; ii[i] = si[i]; end
      end
    join
    for (int i = 0; i < N; i++) begin orr[i] = ir[i]; oi[i] = ii[i]; end
    send_out(1'b0, "overlap, second block");
    // injected upset in the output accumulator (bit 20)
    make_block(2000);
    send_in();
    fi_arm <= 1'b1; fi_bit <= 6'd20;
    @(posedge clk);
    fi_arm <= 1'b0;
    send_out(1'b1, "injected accumulator upset");
    // full-scale outputs against a tiny input energy
    for (int i = 0; i < N; i++) begin ir[i] = 0; ii[i] = 1; orr[i] = -8192; oi[i] = -8192; end
    tau <= 39'd1000;
    send_in();
    send_out(1'b1, "large output energy");
    // random blocks: output a lightly perturbed copy of the input, so the
    // energy difference lands near the random tolerance
    for (int r = 0; r < 300; r++) begin
      longint ein, eout, diff;
      int pert;
      make_block(int'($urandom_range(2047)));
      pert = int'($urandom_range(40));
      for (int i = 0; i < N; i++) begin
        orr[i] = orr[i] + int'($urandom_range(2 * pert)) - pert;
        oi[i]  = oi[i] + int'($urandom_range(2 * pert)) - pert;
      end
      ein = 0; eout = 0;
      for (int i = 0; i < N; i++) begin
        ein  += longint'(ir[i]) * ir[i] + longint'(ii[i]) * ii[i];
        eout += longint'(orr[i]) * orr[i] + longint'(oi[i]) * oi[i];
      end
      diff = (ein > eout) ? ein - eout : eout - ein;
      tau <= 39'($urandom_range(200000));
      @(posedge clk);
      send_in();
      send_out(diff > longint'(tau), $sformatf("random block %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
