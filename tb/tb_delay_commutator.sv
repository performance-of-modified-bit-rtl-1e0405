// tb_delay_commutator: streams random samples (with random idle cycles) into
// the L=4 delay commutator and checks, on every accepted sample, that the
// offered operands, k and n are those of the butterfly the stage must form
// next: during quarter 3 of block b the group of block b for k=0, during
// quarters 0..2 of block b+1 the same groups for k=1..3. Also checks that
// op_valid stays low until the first group is complete, and that the
// idle cycles (in_valid low) really freeze the state.
module tb_delay_commutator;
  localparam int L = 4;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic signed [W-1:0] in_re, in_im;
  logic signed [3:0][W-1:0] op_re, op_im;
  logic op_valid;
  logic [1:0] k, n;
  int checks = 0, failures = 0, stalls = 0;
  logic signed [W-1:0] hist_re [4096], hist_im [4096];

  delay_commutator #(.L(L), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int i = 0;
    in_re = 0; in_im = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (i < 40 * L) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      en = 1'b1;
      if (!in_valid) begin
        stalls++;
        in_re = W'($urandom); in_im = W'($urandom);   // must be ignored
        @(posedge clk);
        continue;
      end
      in_re = W'($urandom);
      in_im = W'($urandom);
      hist_re[i] = in_re;
      hist_im[i] = in_im;
      #1;
      begin
        automatic int blk = i / (4 * L);
        automatic int t   = i % (4 * L);
        int ek, en_, src;
        ek  = (t / L + 1) % 4;
        en_ = t % L;
        src = (t / L == 3) ? blk : blk - 1;
        checks++;
        if (op_valid !== (src >= 0)) begin
          failures++; $display("FAIL op_valid=%b at sample %0d", op_valid, i);
        end
        if (src >= 0) begin
          checks++;
          if (k != 2'(ek) || n != 2'(en_)) begin
            failures++; $display("FAIL k/n %0d/%0d exp %0d/%0d at %0d", k, n, ek, en_, i);
          end
          for (int q = 0; q < 4; q++) begin
            checks++;
            if (op_re[q] != hist_re[src * 4 * L + en_ + q * L] || op_im[q] != hist_im[src * 4 * L + en_ + q * L]) begin
              failures++; $display("FAIL operand %0d at sample %0d", q, i);
            end
          end
        end
      end
      @(posedge clk);
      i++;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no idle cycle exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
