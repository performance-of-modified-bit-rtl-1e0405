// tb_r4sdc_fft16: end-to-end test of the 16-point R4SDC FFT at its default
// parameters.
//
// Frame 0 is the ramp x[i] = i + j*i, whose hardware spectrum is also held
// against a published simulation of this architecture (within +-2, since
// that run rounded differently). Then come random frames, frames at full
// scale, and a stretch with random idle cycles (in_valid low). The stream
// ends with zero frames to flush the pipeline.
// Every bin is checked bit for bit against a reference FFT that rounds the
// way the design does, and against the exact DFT within 3 % of the input
// energy bound. The bin order, the latency of 17 accepted samples to the
// first bin, and one bin per clock while input is continuous are checked.
// Each mechanism must occur at least once: idle cycles, the commutator's
// direct path and its hold path in both stages, every twiddle exponent, and
// back-to-back frames.
module tb_r4sdc_fft16;
  import tb_ref_pkg::*;
  localparam int DW = 16;
  localparam int NF = 40;            // frames with data
  localparam int NZ = 2;             // flush frames
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] real_in = 0, imag_in = 0;
  logic out_valid;
  logic signed [DW+4:0] real_out, imag_out;
  logic [3:0] out_bin;
  int checks = 0, failures = 0;
  int accepted = 0, produced = 0;
  int n_stall = 0, n_tw [16], n_s1_direct = 0, n_s1_hold = 0, n_s2_direct = 0, n_s2_hold = 0;
  int n_cont_out = 0;
  cplx_t frames [NF + NZ][16];
  cplx_t spec [NF + NZ][16];

  // bins of the ramp frame as printed by the published simulation
  int fig_re [16] = '{120, -47, -28, -19, -16, -13, -12, -9, -8, -7, -4, -3, 0, 3, 12, 31};
  int fig_im [16] = '{120,  31,  12,   3,   0,  -3,  -4, -7, -8, -9, -12, -13, -16, -19, -28, -47};

  r4sdc_fft16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF + NZ; f++) begin
      for (int i = 0; i < 16; i++) begin
        if (f == 0) begin
          frames[f][i].re = longint'(i); frames[f][i].im = longint'(i);
        end else if (f >= NF) begin
          frames[f][i].re = 0; frames[f][i].im = 0;
        end else if (f % 8 == 3) begin   // full scale, alternating signs
          frames[f][i].re = ($urandom % 2 != 0) ? -(2 ** (DW - 1)) : 2 ** (DW - 1) - 1;
          frames[f][i].im = ($urandom % 2 != 0) ? -(2 ** (DW - 1)) : 2 ** (DW - 1) - 1;
        end else begin
          frames[f][i].re = longint'(signed'(DW'($urandom)));
          frames[f][i].im = longint'(signed'(DW'($urandom)));
        end
      end
      ref_fft16(frames[f], spec[f]);
    end
  end

  // driver: frames 0..9 continuous, then random idle cycles
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (accepted < (NF + NZ) * 16) begin
      in_valid = (accepted < 10 * 16) || ($urandom % 3 != 0);
      if (in_valid) begin
        real_in = DW'(frames[accepted / 16][accepted % 16].re);
        imag_in = DW'(frames[accepted / 16][accepted % 16].im);
      end else begin
        real_in = DW'($urandom); imag_in = DW'($urandom);
        n_stall++;
      end
      @(posedge clk);
      if (in_valid) accepted++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (produced != (NF + NZ) * 16 - r4sdc_pkg::LATENCY) begin
      failures++; $display("FAIL produced %0d bins", produced);
    end
    // every mechanism must have happened
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no idle cycles"); end
    checks++; if (n_s1_direct == 0 || n_s1_hold == 0) begin failures++; $display("FAIL stage 1 paths"); end
    checks++; if (n_s2_direct == 0 || n_s2_hold == 0) begin failures++; $display("FAIL stage 2 paths"); end
    checks++; if (n_cont_out < 16 * 8) begin failures++; $display("FAIL continuous output %0d", n_cont_out); end
    foreach (n_tw[e]) if (e inside {0, 1, 2, 3, 4, 6, 9}) begin
      checks++;
      if (n_tw[e] == 0) begin failures++; $display("FAIL twiddle W^%0d never used", e); end
    end
    $display("mechanisms: idle=%0d s1 direct/hold=%0d/%0d s2 direct/hold=%0d/%0d bins-at-full-rate=%0d",
             n_stall, n_s1_direct, n_s1_hold, n_s2_direct, n_s2_hold, n_cont_out);
    $display("twiddle uses W^0..W^9: %0d %0d %0d %0d %0d - %0d - - %0d", n_tw[0], n_tw[1], n_tw[2],
             n_tw[3], n_tw[4], n_tw[6], n_tw[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled on the clock edge
  always @(posedge clk) if (rst_n && in_valid) begin
    if (dut.u_stage1.u_comm.op_valid) begin
      if (dut.u_stage1.u_comm.k == 0) n_s1_direct++; else n_s1_hold++;
    end
    if (dut.u_stage2.u_comm.op_valid) begin
      if (dut.u_stage2.u_comm.k == 0) n_s2_direct++; else n_s2_hold++;
    end
    if (dut.u_twiddle.in_valid) n_tw[dut.u_twiddle.e]++;
  end

  // output checker
  logic prev_valid = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      automatic int f = produced / 16;
      automatic int t = produced % 16;
      automatic int kb = 4 * (t % 4) + t / 4;
      real er, ei, tol, sabs;
      checks++;
      if (out_bin != 4'(kb)) begin failures++; $display("FAIL bin order: slot %0d says bin %0d", t, out_bin); end
      checks++;
      if (longint'(real_out) != spec[f][kb].re || longint'(imag_out) != spec[f][kb].im) begin
        failures++;
        $display("FAIL frame %0d bin %0d: (%0d,%0d) exp (%0d,%0d)", f, kb, real_out, imag_out,
                 spec[f][kb].re, spec[f][kb].im);
      end
      exact_dft(frames[f], kb, er, ei);
      sabs = 0.0;
      for (int i = 0; i < 16; i++)
        sabs += $sqrt(real'(frames[f][i].re) ** 2 + real'(frames[f][i].im) ** 2);
      tol = 0.03 * sabs + 6.0;
      checks++;
      if ((real'(real_out) - er) > tol || (er - real'(real_out)) > tol ||
          (real'(imag_out) - ei) > tol || (ei - real'(imag_out)) > tol) begin
        failures++; $display("FAIL accuracy frame %0d bin %0d: (%0d,%0d) exact (%f,%f)", f, kb, real_out, imag_out, er, ei);
      end
      if (f == 0) begin
        checks++;
        if (int'(real_out) - fig_re[kb] > 2 || fig_re[kb] - int'(real_out) > 2 ||
            int'(imag_out) - fig_im[kb] > 2 || fig_im[kb] - int'(imag_out) > 2) begin
          failures++; $display("FAIL ramp bin %0d: (%0d,%0d) published (%0d,%0d)", kb, real_out, imag_out, fig_re[kb], fig_im[kb]);
        end
      end
      // latency: bin slot j leaves on the clock accepting sample LATENCY + j
      checks++;
      if (accepted != r4sdc_pkg::LATENCY + 1 + produced) begin
        failures++; $display("FAIL latency: bin %0d after %0d samples", produced, accepted);
      end
      if (prev_valid && accepted <= 10 * 16) n_cont_out++;
      produced++;
    end
    prev_valid = out_valid;
  end
endmodule
