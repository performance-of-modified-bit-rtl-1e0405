// tb_r4_butterfly: random operands, including full-scale ones, for all four
// outputs k of the programmable radix-4 butterfly, compared with the 4-point
// DFT sum.
module tb_r4_butterfly;
  import tb_ref_pkg::*;
  localparam int W = 16;
  logic signed [3:0][W-1:0] a_re, a_im;
  logic [1:0]               k;
  logic signed [W+1:0]      y_re, y_im;
  int checks = 0, failures = 0;

  r4_butterfly #(.W(W)) dut (.a_re, .a_im, .k, .y_re, .y_im);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t a[4], e;
    for (int i = 0; i < 3000; i++) begin
      for (int q = 0; q < 4; q++) begin
        if (i < 8) begin   // extremes
          a_re[q] = (i % 2 != 0) ? 16'sh8000 : 16'sh7fff;
          a_im[q] = (i % 4 < 2) ? 16'sh8000 : 16'sh7fff;
          if (q % 2 == 1 && i >= 4) begin a_re[q] = -a_re[q]; a_im[q] = ~a_im[q]; end
        end else begin
          a_re[q] = W'($urandom);
          a_im[q] = W'($urandom);
        end
        a[q].re = longint'(signed'(a_re[q]));
        a[q].im = longint'(signed'(a_im[q]));
      end
      for (int kk = 0; kk < 4; kk++) begin
        k = 2'(kk);
        #1;
        e = ref_bfly(a, kk);
        checks++;
        if (longint'(y_re) != e.re || longint'(y_im) != e.im) begin
          failures++;
          $display("FAIL k=%0d got (%0d,%0d) exp (%0d,%0d)", kk, y_re, y_im, e.re, e.im);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
