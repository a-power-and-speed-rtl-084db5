// accumulator_tb - drives random products with random en and clr at the
// MAC's widths (17-bit signed product, 25-bit sum) and compares acc after
// each rising edge with a behavioural running sum. Also checks the one-cycle
// latency: a product shows in acc right after the edge that takes it.
module accumulator_tb;
  int checks = 0, failures = 0;
  int n_add = 0, n_hold = 0, n_clr = 0, n_wrap = 0;

  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [16:0] din = '0;
  logic [24:0] acc;
  longint      model = 0;

  accumulator #(.IW(17), .AW(25), .SIGNED(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .din(din), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (acc !== '0) begin failures++; $display("reset: acc=%h", acc); end
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int r;
      @(negedge clk);
      r   = int'($urandom % 1000);
      clr = (r < 4) && (n < 1500);
      en  = (r >= 150);
      // first half: products of either sign; second half: large positive
      // products, so that the sum wraps past 2^24
      din = (n < 1500) ? 17'($urandom) : 17'(65535 - ($urandom % 1024));
      @(posedge clk);
      if (clr) begin model = 0; n_clr++; end
      else if (en) begin
        model = model + longint'($signed(din));
        if (model >= (1 << 24) || model < -(1 << 24)) n_wrap++;
        model = longint'($signed(25'(model)));
        n_add++;
      end else n_hold++;
      #1;
      checks++;
      if (acc !== 25'(model)) begin
        failures++;
        $display("cycle %0d: acc=%h expected %h", n, acc, 25'(model));
      end
    end
    $display("adds=%0d holds=%0d clears=%0d wraps=%0d", n_add, n_hold, n_clr, n_wrap);
    checks++;
    if (n_add == 0 || n_hold == 0 || n_clr == 0 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
