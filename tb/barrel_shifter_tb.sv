// barrel_shifter_tb - random data and shift amounts at the widths the 8-bit
// multiplier uses; the expected value is the shift operator on a wide copy.
module barrel_shifter_tb;
  int checks = 0, failures = 0;

  logic [8:0]  d;
  logic [3:0]  sh;
  logic        en;
  logic [16:0] y;

  barrel_shifter #(.DW(9), .SW(4), .OW(17)) dut (.d(d), .sh(sh), .en(en), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] e;
      d  = 9'($urandom);
      sh = 4'($urandom % 9);
      en = ($urandom % 8) != 0;
      #1;
      e = en ? ({23'd0, d} << sh) : 32'd0;
      checks++;
      if (y !== e[16:0]) begin
        failures++;
        $display("d=%0d sh=%0d en=%b: y=%0d expected %0d", d, sh, en, y, e[16:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
