// sign_detector_tb - exhaustive check of the sign detector at 8 bits, in the
// signed and the unsigned configuration. The expected sign and magnitude come
// from $signed arithmetic on the operand.
module sign_detector_tb;
  int checks = 0, failures = 0;

  logic [7:0] x;
  logic       s_sg, s_us;
  logic [7:0] m_sg, m_us;

  sign_detector #(.N(8), .SIGNED(1'b1)) dut_s (.x(x), .sign(s_sg), .mag(m_sg));
  sign_detector #(.N(8), .SIGNED(1'b0)) dut_u (.x(x), .sign(s_us), .mag(m_us));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int sv;
      logic [7:0] exp_mag;
      x = 8'(v);
      #1;
      sv = (v >= 128) ? v - 256 : v;
      exp_mag = 8'((sv < 0) ? -sv : sv);
      checks++;
      if (s_sg !== (sv < 0) || m_sg !== exp_mag) begin
        failures++;
        $display("signed x=%0d: sign=%b mag=%0d, expected %b %0d", sv, s_sg, m_sg, sv < 0, exp_mag);
      end
      checks++;
      if (s_us !== 1'b0 || m_us !== 8'(v)) begin
        failures++;
        $display("unsigned x=%0d: sign=%b mag=%0d", v, s_us, m_us);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
