// tb_twiddle_mult: random samples through the twiddle rotation for every
// (k, n) pair. Each result is compared bit for bit with floor-division
// arithmetic of the same shift/add constants, and against the ideal
// rotation by exp(-j*2*pi*n*k/16) within 3 % of the magnitude plus 2.
// The one-clock latency and the valid pipe are checked too.
module tb_twiddle_mult;
  import tb_ref_pkg::*;
  localparam int W = 18;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic signed [W-1:0] in_re, in_im;
  logic [1:0] k, n;
  logic out_valid;
  logic signed [W:0] out_re, out_im;
  int checks = 0, failures = 0;
  int used [16];

  twiddle_mult #(.IN_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t x, e;
    real ang, ir, ii, mag, tol;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      in_valid = 1'($urandom);
      k = 2'($urandom);
      n = 2'($urandom);
      if (i < 16) begin   // full-scale corners
        in_re = (i % 2 != 0) ? -(2 ** (W - 1)) : 2 ** (W - 1) - 1;
        in_im = (i % 4 < 2) ? -(2 ** (W - 1)) : 2 ** (W - 1) - 1;
        k = 2'(i / 4); n = 2'(i % 4);
      end else begin
        in_re = W'($urandom);
        in_im = W'($urandom);
      end
      x.re = longint'(in_re);
      x.im = longint'(in_im);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("FAIL valid"); end
      e = ref_rot(x, int'(k) * int'(n));
      used[int'(k) * int'(n)]++;
      checks++;
      if (longint'(out_re) != e.re || longint'(out_im) != e.im) begin
        failures++;
        $display("FAIL k=%0d n=%0d x=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)", k, n, x.re, x.im,
                 out_re, out_im, e.re, e.im);
      end
      ang = -2.0 * 3.14159265358979 * real'(int'(k) * int'(n)) / 16.0;
      ir  = real'(x.re) * $cos(ang) - real'(x.im) * $sin(ang);
      ii  = real'(x.re) * $sin(ang) + real'(x.im) * $cos(ang);
      mag = $sqrt(real'(x.re) * real'(x.re) + real'(x.im) * real'(x.im));
      tol = 0.03 * mag + 2.0;
      checks++;
      if ((real'(out_re) - ir) > tol || (ir - real'(out_re)) > tol ||
          (real'(out_im) - ii) > tol || (ii - real'(out_im)) > tol) begin
        failures++;
        $display("FAIL accuracy e=%0d got (%0d,%0d) ideal (%f,%f)", int'(k) * int'(n), out_re, out_im, ir, ii);
      end
      @(negedge clk);
    end
    foreach (used[e2]) if (e2 inside {0, 1, 2, 3, 4, 6, 9}) begin
      checks++;
      if (used[e2] == 0) begin failures++; $display("FAIL exponent %0d never used", e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
