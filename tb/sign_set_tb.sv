// sign_set_tb - every sign combination on random magnitudes, signed and
// unsigned configurations; expected value from integer negation.
module sign_set_tb;
  int checks = 0, failures = 0;

  logic [16:0] mag, ys, yu;
  logic        sa, sb;

  sign_set #(.W(17), .SIGNED(1'b1)) dut_s (.mag(mag), .sign_a(sa), .sign_b(sb), .y(ys));
  sign_set #(.W(17), .SIGNED(1'b0)) dut_u (.mag(mag), .sign_a(sa), .sign_b(sb), .y(yu));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int m;
      m   = int'($urandom % 65536);
      mag = 17'(m);
      sa  = n[0];
      sb  = n[1];
      #1;
      checks++;
      if ($signed(ys) !== 17'((sa ^ sb) ? -m : m)) begin
        failures++;
        $display("mag=%0d sa=%b sb=%b: y=%0d", m, sa, sb, $signed(ys));
      end
      checks++;
      if (yu !== mag) begin
        failures++;
        $display("unsigned mag=%0d: y=%0d", m, yu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
