// prefix_adder_tb - random operands and carry-in at 17 and 64 bits, plus
// all-ones carry chains; the expected sum is the + operator on wider values.
module prefix_adder_tb;
  int checks = 0, failures = 0;

  logic [16:0] a17, b17, s17;
  logic        c17, co17;
  logic [63:0] a64, b64, s64;
  logic        c64, co64;

  prefix_adder #(.W(17)) dut17 (.a(a17), .b(b17), .cin(c17), .s(s17), .cout(co17));
  prefix_adder #(.W(64)) dut64 (.a(a64), .b(b64), .cin(c64), .s(s64), .cout(co64));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [16:0] a, b, input logic c,
                     input logic [63:0] x, y, input logic d);
    logic [17:0] e17;
    logic [64:0] e64;
    a17 = a; b17 = b; c17 = c; a64 = x; b64 = y; c64 = d;
    #1;
    e17 = {1'b0, a} + {1'b0, b} + 18'(c);
    e64 = {1'b0, x} + {1'b0, y} + 65'(d);
    checks++;
    if ({co17, s17} !== e17) begin
      failures++;
      $display("17: %h+%h+%b = %h, expected %h", a, b, c, {co17, s17}, e17);
    end
    checks++;
    if ({co64, s64} !== e64) begin
      failures++;
      $display("64: %h+%h+%b = %h, expected %h", x, y, d, {co64, s64}, e64);
    end
  endtask

  initial begin
    one('1, 17'd0, 1'b1, '1, 64'd0, 1'b1);
    one('1, 17'd1, 1'b0, '1, 64'd1, 1'b0);
    one(17'h0AAAA, 17'h15555, 1'b1, 64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_5555_5555, 1'b1);
    for (int n = 0; n < 5000; n++)
      one(17'($urandom), 17'($urandom), 1'($urandom),
          {$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
