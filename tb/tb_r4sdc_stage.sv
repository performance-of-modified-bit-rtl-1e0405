// tb_r4sdc_stage: one R4SDC stage with span L=4 fed by a random stream with
// random idle cycles. Every output must be butterfly output k of butterfly n
// of the right input block, in the order k*L + n; the first output must
// appear on the clock that accepts sample 3L (latency 3L samples plus the
// register), and while in_valid stays high one output must leave per clock.
module tb_r4sdc_stage;
  import tb_ref_pkg::*;
  localparam int L = 4;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic signed [W-1:0] in_re, in_im;
  logic out_valid;
  logic signed [W+1:0] out_re, out_im;
  logic [1:0] out_k, out_n;
  int checks = 0, failures = 0;
  int accepted = 0, produced = 0, stalls = 0;
  longint hist_re [4096], hist_im [4096];

  r4sdc_stage #(.L(L), .IN_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    in_re = 0; in_im = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (accepted < 48 * L) begin
      in_valid = (accepted < 8 * L) || ($urandom % 4 != 0);
      en = in_valid;
      in_re = W'($urandom);
      in_im = W'($urandom);
      if (in_valid) begin
        hist_re[accepted] = longint'(in_re);
        hist_im[accepted] = longint'(in_im);
      end else stalls++;
      @(posedge clk);
      if (in_valid) accepted++;
      @(negedge clk);
    end
    in_valid = 0; en = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (produced != accepted - 3 * L) begin
      failures++; $display("FAIL produced %0d for %0d accepted", produced, accepted);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no idle cycle exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker, sampling just after each clock edge's update
  always @(posedge clk) begin
    #1;
    if (rst_n && en && out_valid) begin
      cplx_t a[4], e;
      automatic int blk = produced / (4 * L);
      automatic int t   = produced % (4 * L);
      automatic int kk  = t / L;
      automatic int nn  = t % L;
      for (int q = 0; q < 4; q++) begin
        a[q].re = hist_re[blk * 4 * L + nn + q * L];
        a[q].im = hist_im[blk * 4 * L + nn + q * L];
      end
      e = ref_bfly(a, kk);
      checks++;
      if (longint'(out_re) != e.re || longint'(out_im) != e.im || out_k != 2'(kk) || out_n != 2'(nn)) begin
        failures++;
        $display("FAIL out %0d: (%0d,%0d) k=%0d n=%0d exp (%0d,%0d) k=%0d n=%0d", produced,
                 out_re, out_im, out_k, out_n, e.re, e.im, kk, nn);
      end
      // latency: output number j leaves on the clock accepting sample 3L + j
      checks++;
      if (accepted != 3 * L + produced + 1) begin
        failures++; $display("FAIL latency: output %0d after %0d accepted", produced, accepted);
      end
      produced++;
    end
  end
endmodule
