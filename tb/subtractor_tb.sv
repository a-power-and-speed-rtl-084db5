// subtractor_tb - random 17-bit operands; expected difference and borrow
// from the - operator and a comparison.
module subtractor_tb;
  int checks = 0, failures = 0;

  logic [16:0] a, b, d;
  logic        borrow;

  subtractor #(.W(17)) dut (.a(a), .b(b), .d(d), .borrow(borrow));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = 17'($urandom);
      b = (n % 4 == 0) ? a : 17'($urandom);
      #1;
      checks++;
      if (d !== 17'(a - b) || borrow !== (b > a)) begin
        failures++;
        $display("%0d-%0d: d=%0d borrow=%b", a, b, d, borrow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
