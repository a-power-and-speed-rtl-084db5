// roba_multiplier_tb - checks the approximate product against the formula
//   p = Ar*B + Br*A - Ar*Br   (on magnitudes, then signed)
// with Ar, Br formed arithmetically (nearest power of two, half-way rounds
// up) and the products formed with the * operator, not with shifts.
//   - 8-bit signed (the default) and 8-bit unsigned: every operand pair
//   - 16-bit and 64-bit signed: random pairs
//   - hand-worked values, including the design's simulated operand pairs
// It also checks that the error equals -(A-Ar)(B-Br) and that an operand that
// is a power of two gives the exact product.
module roba_multiplier_tb;
  int checks = 0, failures = 0;

  localparam int XW = 132;  // wide enough for 64-bit operands
  typedef logic signed [XW-1:0] wide_t;

  logic [7:0]   a8, b8;
  logic [16:0]  p8s, p8u;
  logic [15:0]  a16, b16;
  logic [32:0]  p16;
  logic [63:0]  a64, b64;
  logic [128:0] p64;

  roba_multiplier                              dut8s (.a(a8),  .b(b8),  .p(p8s));
  roba_multiplier #(.N(8), .SIGNED(1'b0))      dut8u (.a(a8),  .b(b8),  .p(p8u));
  roba_multiplier #(.N(16))                    dut16 (.a(a16), .b(b16), .p(p16));
  roba_multiplier #(.N(64))                    dut64 (.a(a64), .b(b64), .p(p64));

  function automatic wide_t round_ref(wide_t x);
    int k;
    if (x == 0) return 0;
    k = 0;
    while ((x >>> (k + 1)) != 0) k++;
    if (2 * x >= 3 * (wide_t'(1) <<< k)) return wide_t'(1) <<< (k + 1);
    return wide_t'(1) <<< k;
  endfunction

  // operand value as an integer, given its width and signedness
  function automatic wide_t val(logic [63:0] x, int n, bit sg);
    wide_t v = 0;
    for (int i = 0; i < n; i++) v[i] = x[i];
    if (sg && x[n-1]) v = v - (wide_t'(1) <<< n);
    return v;
  endfunction

  // expected product, reduced to 2n+1 bits
  function automatic wide_t roba_ref(logic [63:0] a, logic [63:0] b, int n, bit sg);
    wide_t va = val(a, n, sg), vb = val(b, n, sg);
    wide_t ma = (va < 0) ? -va : va, mb = (vb < 0) ? -vb : vb;
    wide_t ar = round_ref(ma), br = round_ref(mb);
    wide_t m  = ar * mb + br * ma - ar * br;
    wide_t r  = ((va < 0) != (vb < 0)) ? -m : m;
    wide_t res = 0;
    for (int i = 0; i < 2 * n + 1; i++) res[i] = r[i];
    // sanity: the error identity of the method
    if (m != ma * mb - (ma - ar) * (mb - br)) $display("model identity broken");
    return res;
  endfunction

  task automatic cmp(string tag, wide_t got, wide_t exp, logic [63:0] a, logic [63:0] b);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s a=%h b=%h: p=%h expected %h", tag, a, b, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exact_pow2 = 0;
    a16 = 0; b16 = 0; a64 = 0; b64 = 0;
    // exhaustive 8-bit
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        cmp("s8", wide_t'(p8s), roba_ref(64'(i), 64'(j), 8, 1'b1), 64'(i), 64'(j));
        cmp("u8", wide_t'(p8u), roba_ref(64'(i), 64'(j), 8, 1'b0), 64'(i), 64'(j));
        // power-of-two operand: exact product
        if (i != 0 && (i & (i - 1)) == 0) begin
          cmp("u8 exact", wide_t'(p8u), wide_t'(i * j), 64'(i), 64'(j));
          exact_pow2++;
        end
      end
    // hand-worked values (unsigned and signed)
    a8 = 8'd36;  b8 = 8'd120; #1;   // Ar=32, Br=128: 3840+4608-4096
    cmp("hand", wide_t'(p8s), 4352, 36, 120);
    a8 = 8'd46;  b8 = 8'd35;  #1;   // Ar=32, Br=32: 1120+1472-1024
    cmp("hand", wide_t'(p8s), 1568, 46, 35);
    a8 = 8'd255; b8 = 8'd255; #1;   // unsigned: Ar=Br=256
    cmp("hand", wide_t'(p8u), 65024, 255, 255);
    a8 = -8'sd46; b8 = 8'd35; #1;   // signed: -1568 in 17 bits
    cmp("hand", wide_t'(p8s), wide_t'(17'h1_F9E0), a8, b8);
    a8 = 8'h80;  b8 = 8'h80;  #1;   // -128 * -128 exact
    cmp("hand", wide_t'(p8s), 16384, a8, b8);
    // random 16 and 64 bit
    for (int n = 0; n < 3000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a64 = {$urandom, $urandom} >> ($urandom % 64);
      b64 = {$urandom, $urandom};
      if (n % 2 == 1) a64 = -a64;
      #1;
      cmp("s16", wide_t'(p16), roba_ref(64'(a16), 64'(b16), 16, 1'b1), 64'(a16), 64'(b16));
      cmp("s64", wide_t'(p64), roba_ref(a64, b64, 64, 1'b1), a64, b64);
    end
    checks++;
    if (exact_pow2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
