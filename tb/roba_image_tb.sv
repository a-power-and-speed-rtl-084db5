// roba_image_tb - image smoothing and sharpening on the RoBA MAC unit with
// full-range 8-bit pixels.
//
// Pixels 0..255 together with negative kernel weights need signed 9-bit
// operands, so the MAC is built with N = 9 (19-bit product, 27-bit sum). A
// 16x16 test image (a gradient with a bright square and a ramp) is filtered
// with a 3x3 smoothing kernel (1 2 1 / 2 4 2 / 1 2 1, sum scaled by 1/16)
// and a 3x3 sharpening kernel (centre 9, neighbours -1). Every output pixel
// is a clear followed by nine accumulating cycles. The raw sum is compared
// with a behavioural model of the approximate products (nearest powers of
// two, half-way up, products with the * operator); the mean absolute error
// against exact convolution and a PSNR-style figure are printed.
module roba_image_tb;
  localparam int N = 9, PW = 2 * N + 1, AW = PW + 8, SZ = 16;

  int checks = 0, failures = 0;

  logic          clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [N-1:0]  a = '0, b = '0;
  logic [PW-1:0] prod;
  logic [AW-1:0] acc;

  roba_mac #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a), .b(b),
                         .prod(prod), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int round_ref(int x);
    int k;
    if (x == 0) return 0;
    k = 0;
    while ((x >> (k + 1)) != 0) k++;
    if (2 * x >= 3 * (1 << k)) return 1 << (k + 1);
    return 1 << k;
  endfunction

  function automatic int roba_ref(int va, int vb);
    int ma = (va < 0) ? -va : va, mb = (vb < 0) ? -vb : vb;
    int ar = round_ref(ma), br = round_ref(mb);
    int m  = ar * mb + br * ma - ar * br;
    return ((va < 0) != (vb < 0)) ? -m : m;
  endfunction

  function automatic int pixel(int x, int y);
    if (x >= 5 && x < 11 && y >= 5 && y < 11) return 250;
    return (x * 11 + y * 5) % 256;
  endfunction

  int smooth_w[9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
  int sharp_w[9]  = '{-1, -1, -1, -1, 9, -1, -1, -1, -1};

  task automatic run_kernel(string name, int w[9], int shift);
    longint err_abs = 0, err_sq = 0;
    int     outs = 0;
    for (int y = 1; y < SZ - 1; y++)
      for (int x = 1; x < SZ - 1; x++) begin
        int     exact = 0, model = 0;
        longint o_exact, o_appr;
        @(negedge clk); clr = 1'b1; en = 1'b0;
        for (int t = 0; t < 9; t++) begin
          int px = pixel(x + t % 3 - 1, y + t / 3 - 1);
          @(negedge clk);
          clr = 1'b0; en = 1'b1;
          a = N'(px); b = N'(w[t]);
          exact += px * w[t];
          model += roba_ref(px, w[t]);
        end
        @(negedge clk); en = 1'b0;
        checks++;
        if (int'($signed(acc)) != model) begin
          failures++;
          $display("%s (%0d,%0d): acc=%0d expected %0d", name, x, y, $signed(acc), model);
        end
        // output pixel, scaled and clamped to 0..255
        o_exact = exact >>> shift; o_appr = model >>> shift;
        o_exact = (o_exact < 0) ? 0 : (o_exact > 255) ? 255 : o_exact;
        o_appr  = (o_appr  < 0) ? 0 : (o_appr  > 255) ? 255 : o_appr;
        err_abs += (o_appr > o_exact) ? o_appr - o_exact : o_exact - o_appr;
        err_sq  += (o_appr - o_exact) * (o_appr - o_exact);
        outs++;
      end
    $display("%s: %0d output pixels, sum |error| = %0d, sum error^2 = %0d (after scaling and clamping)",
             name, outs, err_abs, err_sq);
    if (err_sq > 0)
      $display("%s: PSNR = %0.1f dB", name,
               10.0 * $log10(255.0 * 255.0 * outs / real'(err_sq)));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_kernel("smoothing", smooth_w, 4);
    run_kernel("sharpening", sharp_w, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
