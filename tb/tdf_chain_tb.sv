// tdf_chain_tb: self-checking test of the transposed delay/adder chain.
//
// A chain of N = 11 taps is fed, on enabled cycles, with products
// p[k] = b(k) * x formed in the testbench from random coefficients and
// random samples. A direct-form reference keeps the last N samples and
// computes sum b(k) x(n-k) after every enabled edge. Idle cycles (en low)
// must leave the output unchanged, and reset must clear the history. The
// first output after each enabled edge is also checked for one-cycle
// latency: y reflects sample n on the edge that takes sample n.
module tdf_chain_tb;
  localparam int N  = 11;
  localparam int PW = 64;
  localparam int AW = 65;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [PW-1:0] p [N];
  logic signed [AW-1:0] y;

  tdf_chain #(.N(N), .PW(PW), .AW(AW)) dut (.clk(clk), .rst(rst), .en(en), .p(p), .y(y));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [31:0] b [N];
  logic signed [31:0] hist [N];      // hist[k] = x(n-k)
  logic signed [AW+7:0] ref_y;
  int idle_seen = 0, reset_seen = 0;

  task automatic ref_step(input logic signed [31:0] xn);
    for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xn;
    ref_y = '0;
    for (int k = 0; k < N; k++) ref_y += (AW+8)'(longint'(hist[k]) * longint'(b[k]));
  endtask

  task automatic clear_ref();
    foreach (hist[k]) hist[k] = '0;
    ref_y = '0;
  endtask

  initial begin : stim
    logic signed [31:0] xn;
    // Coefficients are kept to |b| < 2^29 (one extreme tap of -2^31) so that
    // sum |b(k)| * 2^31 fits in the 65-bit chain, the range it is sized for.
    foreach (b[k]) b[k] = 32'($signed($urandom) >>> 3);
    b[0] = 32'sh8000_0000;
    clear_ref();
    foreach (p[k]) p[k] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n == 1500) begin
        rst = 1'b1; en = 1'b0;
        @(negedge clk);
        rst = 1'b0;
        clear_ref();
        reset_seen++;
        checks++;
        if (y != 0) begin failures++; $display("FAIL reset y=%0d", y); end
      end
      en = ($urandom % 4) != 0;
      if (n < 40) xn = (n % 2) ? 32'sh8000_0000 : 32'sh7fff_ffff;
      else        xn = $urandom;
      for (int k = 0; k < N; k++) p[k] = longint'(xn) * longint'(b[k]);
      if (en) ref_step(xn); else idle_seen++;
      @(posedge clk); #1;
      checks++;
      if (y != ref_y[AW-1:0] || ref_y != (AW+8)'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%0d exp=%0d", n, y, ref_y);
      end
    end
    checks++;
    if (idle_seen == 0 || reset_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
