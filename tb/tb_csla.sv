// tb_csla: random and corner-case check of the carry-select adder/subtractor
// at the default width (18 bits, 4-bit blocks) and at an odd width
// (11 bits, 3-bit blocks, last block shorter).
module tb_csla;
  logic [17:0] a, b, s;
  logic [10:0] a2, b2, s2;
  logic        sub;
  int checks = 0, failures = 0;

  csla dut (.a, .b, .sub, .s);
  csla #(.W(11), .BLK(3)) dut2 (.a(a2), .b(b2), .sub, .s(s2));

  task automatic check_one();
    logic [17:0] e;
    logic [10:0] e2;
    #1;
    e  = sub ? a - b : a + b;
    e2 = sub ? a2 - b2 : a2 + b2;
    checks += 2;
    if (s !== e)   begin failures++; $display("FAIL W18 a=%h b=%h sub=%b s=%h exp=%h", a, b, sub, s, e); end
    if (s2 !== e2) begin failures++; $display("FAIL W11 a=%h b=%h sub=%b s=%h exp=%h", a2, b2, sub, s2, e2); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // carries rippling through every block
    a = '1; b = 18'd1; a2 = '1; b2 = 11'd1; sub = 0; check_one();
    a = '0; b = 18'd1; a2 = '0; b2 = 11'd1; sub = 1; check_one();
    for (int i = 0; i < 4000; i++) begin
      a = 18'($urandom); b = 18'($urandom); a2 = 11'($urandom); b2 = 11'($urandom);
      sub = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
