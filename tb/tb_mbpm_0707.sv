// tb_mbpm_0707: checks the 0.707 shift/add multiplier against floor-division
// arithmetic, exhaustively over 12-bit inputs and randomly at 19 bits, and
// checks that the result stays within 3 % (+2) of x/sqrt(2).
module tb_mbpm_0707;
  import tb_ref_pkg::*;
  logic signed [18:0] x, y;
  logic signed [11:0] xs, ys;
  int checks = 0, failures = 0;

  mbpm_0707 dut (.x, .y);
  mbpm_0707 #(.W(12)) dut_s (.x(xs), .y(ys));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err;
    for (int v = -2048; v < 2048; v++) begin
      xs = 12'(v);
      #1;
      checks++;
      if (longint'(ys) != ref_m707(longint'(v))) begin
        failures++;
        $display("FAIL x=%0d y=%0d exp=%0d", v, ys, ref_m707(longint'(v)));
      end
      err = real'(ys) - real'(v) * 0.70710678;
      checks++;
      if (err > 0.03 * real'(v < 0 ? -v : v) + 2.0 || err < -(0.03 * real'(v < 0 ? -v : v) + 2.0)) begin
        failures++;
        $display("FAIL accuracy x=%0d y=%0d", v, ys);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      x = 19'($urandom);
      #1;
      checks++;
      if (longint'(y) != ref_m707(longint'(x))) begin
        failures++;
        $display("FAIL x=%0d y=%0d exp=%0d", x, y, ref_m707(longint'(x)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
