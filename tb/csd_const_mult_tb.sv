// csd_const_mult_tb: self-checking test of the CSD shift-add multiplier.
//
// Thirteen multipliers are built with the six distinct default filter
// coefficients and with corner-case constants (0, +1, -1, the most negative
// and most positive 32-bit values, alternating-bit patterns). Each is driven
// with corner and random samples and its product is compared with a 64-bit
// '*' computed in the testbench. The package's CSD recoding is also checked
// directly: the digits must add up to the constant and no two adjacent digits
// may both be nonzero.
module csd_const_mult_tb;
  import csd_fir_pkg::*;

  localparam int NC = 13;
  localparam coef_t CS [NC] = '{
    32'sd6543229, 32'sd23570415, 32'sd77492830, 32'sd162896244,
    32'sd243950093, 32'sd277383305,
    32'sd0, 32'sd1, -32'sd1, 32'sh8000_0000, 32'sh7fff_ffff,
    32'sh5555_5555, 32'shaaaa_aaab
  };

  logic signed [DATA_W-1:0] x;
  logic signed [PROD_W-1:0] p [NC];

  for (genvar i = 0; i < NC; i++) begin : g_dut
    csd_const_mult #(.COEF(CS[i])) dut (.x(x), .p(p[i]));
  end

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    longint exp;
    #1;
    for (int i = 0; i < NC; i++) begin
      exp = longint'(x) * longint'(CS[i]);
      checks++;
      if (p[i] !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL coef=%0d x=%0d got=%0d exp=%0d", CS[i], x, p[i], exp);
      end
    end
  endtask

  initial begin : stim
    logic signed [DATA_W-1:0] corner [6];
    csd_t d;
    logic signed [COEF_W+1:0] v;
    corner = '{32'sd0, 32'sd1, -32'sd1, 32'sh8000_0000, 32'sh7fff_ffff, 32'sh1234_5678};

    // CSD recoding: value and non-adjacency.
    for (int i = 0; i < NC + 200; i++) begin
      coef_t c;
      c = (i < NC) ? CS[i] : coef_t'($urandom);
      d = csd_recode(c);
      v = '0;
      for (int b = 0; b <= COEF_W; b++) begin
        if (d.pos[b]) v = v + ((COEF_W+2)'(1) <<< b);
        if (d.neg[b]) v = v - ((COEF_W+2)'(1) <<< b);
      end
      checks++;
      if (v != (COEF_W+2)'(c) || ((d.pos | d.neg) & ((d.pos | d.neg) >> 1)) != 0
          || (d.pos & d.neg) != 0) begin
        failures++;
        $display("FAIL csd_recode(%0d)", c);
      end
    end

    foreach (corner[j]) begin
      x = corner[j];
      check_all();
      @(posedge clk);
    end
    for (int n = 0; n < 2000; n++) begin
      x = $urandom;
      check_all();
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
