// roba_mac_tb - end-to-end test of the RoBA multiply-accumulate unit at its
// default size (8-bit signed operands, 17-bit product, 25-bit sum).
//
// Phase 1 runs random operands with random en and clr and checks prod in
// every cycle and acc after every rising edge against a behavioural model.
// Phase 2 runs two image kernels as dot products on a generated 8x8 image
// with 7-bit pixels: a 3x3 smoothing kernel (weights 1 2 1 / 2 4 2 / 1 2 1)
// and a 3x3 sharpening kernel (centre 9, neighbours -1). Each output pixel
// is one clear followed by nine accumulating cycles. The model for every
// product is Ar*B + Br*A - Ar*Br with Ar, Br the nearest powers of two
// (half-way rounds up), computed with the * operator. The mean absolute
// error against exact convolution is printed for information.
//
// It counts each mechanism of the unit: accumulate, hold (en low), clear,
// negative product (sign set), operand rounded up, operand rounded down,
// exact product (a power-of-two operand), and fails if any never happened.
module roba_mac_tb;
  int checks = 0, failures = 0;
  int n_acc = 0, n_hold = 0, n_clr = 0, n_neg = 0, n_up = 0, n_down = 0, n_exact = 0;

  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [7:0]  a = '0, b = '0;
  logic [16:0] prod;
  logic [24:0] acc;

  roba_mac dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a), .b(b),
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

  // approximate product of two signed 8-bit operands; counts mechanisms
  function automatic int roba_ref(int va, int vb, bit count);
    int ma = (va < 0) ? -va : va, mb = (vb < 0) ? -vb : vb;
    int ar = round_ref(ma), br = round_ref(mb);
    int m  = ar * mb + br * ma - ar * br;
    if (count) begin
      if ((va < 0) != (vb < 0) && m != 0) n_neg++;
      if (ar > ma || br > mb) n_up++;
      if (ar < ma || br < mb) n_down++;
      if (ma != 0 && mb != 0 && m == ma * mb) n_exact++;
    end
    return ((va < 0) != (vb < 0)) ? -m : m;
  endfunction

  longint model = 0;

  // one clock: apply operands and controls, check prod, then acc after the edge
  task automatic step(int va, int vb, logic e, logic c);
    int p;
    @(negedge clk);
    a = 8'(va); b = 8'(vb); en = e; clr = c;
    #1;
    p = roba_ref(va, vb, e && !c);
    checks++;
    if ($signed(prod) != p) begin
      failures++;
      $display("prod %0d*%0d = %0d, expected %0d", va, vb, $signed(prod), p);
    end
    @(posedge clk);
    if (c) begin model = 0; n_clr++; end
    else if (e) begin model = longint'($signed(25'(model + p))); n_acc++; end
    else n_hold++;
    #1;
    checks++;
    if ($signed(acc) != model) begin
      failures++;
      $display("acc = %0d, expected %0d", $signed(acc), model);
    end
  endtask

  function automatic int pixel(int x, int y);
    return (x * 13 + y * 29 + (x * y) % 17) % 128;
  endfunction

  int smooth_w[9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
  int sharp_w[9]  = '{-1, -1, -1, -1, 9, -1, -1, -1, -1};

  task automatic run_kernel(string name, int w[9]);
    longint err_sum = 0;
    int     outs = 0;
    for (int y = 1; y < 7; y++)
      for (int x = 1; x < 7; x++) begin
        int exact = 0;
        step(0, 0, 1'b0, 1'b1);                       // clear
        for (int t = 0; t < 9; t++) begin
          int px = pixel(x + t % 3 - 1, y + t / 3 - 1);
          exact += px * w[t];
          step(px, w[t], 1'b1, 1'b0);
        end
        step(0, 0, 1'b0, 1'b0);                       // hold: result stays
        err_sum += (model > exact) ? model - exact : exact - model;
        outs++;
      end
    $display("%s: %0d output pixels, mean |error| vs exact = %0d/%0d",
             name, outs, err_sum, outs);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: random operands and controls
    for (int n = 0; n < 2000; n++) begin
      int r;
      r = int'($urandom % 100);
      step(int'($signed(8'($urandom))), int'($signed(8'($urandom))), r >= 15, r < 3);
    end
    // phase 2: image kernels
    run_kernel("smoothing", smooth_w);
    run_kernel("sharpening", sharp_w);
    $display("accumulate=%0d hold=%0d clear=%0d negative=%0d round_up=%0d round_down=%0d exact=%0d",
             n_acc, n_hold, n_clr, n_neg, n_up, n_down, n_exact);
    checks++;
    if (n_acc == 0 || n_hold == 0 || n_clr == 0 || n_neg == 0 ||
        n_up == 0 || n_down == 0 || n_exact == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
