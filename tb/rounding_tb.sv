// rounding_tb - checks the rounding block against an arithmetic model: for
// x in [2^k, 2^(k+1)) the result is 2^(k+1) when 2x >= 3*2^k (half-way rounds
// up), else 2^k; zero stays zero. Exhaustive at 8 bits, random at 16 bits.
module rounding_tb;
  int checks = 0, failures = 0;

  logic [7:0]  x8;
  logic [8:0]  r8;
  logic [3:0]  k8;
  logic        nz8;
  logic [15:0] x16;
  logic [16:0] r16;
  logic [4:0]  k16;
  logic        nz16;

  rounding #(.N(8))  dut8  (.x(x8),  .r(r8),  .k(k8),  .nz(nz8));
  rounding #(.N(16)) dut16 (.x(x16), .r(r16), .k(k16), .nz(nz16));

  function automatic longint unsigned round_ref(longint unsigned x);
    int k;
    if (x == 0) return 0;
    k = 0;
    while ((x >> (k + 1)) != 0) k++;
    if (2 * x >= 3 * (longint'(1) << k)) return longint'(1) << (k + 1);
    return longint'(1) << k;
  endfunction

  task automatic check(longint unsigned x, longint unsigned r, int k, logic nz);
    longint unsigned e = round_ref(x);
    checks++;
    if (r != e || nz != (e != 0) || (e != 0 && (longint'(1) << k) != e)) begin
      failures++;
      $display("x=%0d: r=%0d k=%0d nz=%b, expected r=%0d", x, r, k, nz, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x16 = '0;
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      check(x8, r8, k8, nz8);
    end
    // hand-worked cases
    x8 = 8'd3;   #1; checks++; if (r8 !== 9'd4)   begin failures++; $display("3 -> %0d", r8); end
    x8 = 8'd46;  #1; checks++; if (r8 !== 9'd32)  begin failures++; $display("46 -> %0d", r8); end
    x8 = 8'd48;  #1; checks++; if (r8 !== 9'd64)  begin failures++; $display("48 -> %0d", r8); end
    x8 = 8'd192; #1; checks++; if (r8 !== 9'd256) begin failures++; $display("192 -> %0d", r8); end
    for (int n = 0; n < 5000; n++) begin
      x16 = 16'($urandom) >> ($urandom % 16);
      #1;
      check(x16, r16, k16, nz16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
