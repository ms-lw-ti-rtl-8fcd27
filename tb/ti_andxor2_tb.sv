// ti_andxor2_tb: exhaustive test of the 2-share nonlinear primitive in
// its four forms (LIN, INV) = 00, 10, 11, 01. Every assignment of the x, y, z
// shares is applied on a falling edge. Just before the next rising edge the
// outputs must still hold the previous result (the gate is registered); one
// edge later each output share must match its sharing equation and the XOR
// of the shares must equal x&y ^ z (^ x ^ y) (^ 1).
module ti_andxor2_tb;
  import ms_lw_ti_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  sh2_t x, y, z;
  sh2_t t [4];
  sh2_t prev [4];

  localparam bit LINS [4] = '{1'b0, 1'b1, 1'b1, 1'b0};
  localparam bit INVS [4] = '{1'b0, 1'b0, 1'b1, 1'b1};

  for (genvar g = 0; g < 4; g++) begin : g_dut
    ti_andxor2 #(.LIN(LINS[g]), .INV(INVS[g])) dut (.clk, .x, .y, .z, .t(t[g]));
  end

  always #5 clk = ~clk;

  // expected output shares, written from the sharing equations
  function automatic sh2_t expect_shares(sh2_t a, sh2_t b, sh2_t c, bit lin, bit inv);
    sh2_t r;
    r[0] = ((a[0] & b[0]) ^ c[0] ^ (lin & (a[0] ^ b[0])) ^ inv) ^ (a[0] & b[1]);
    r[1] = (a[1] & b[0]) ^ ((a[1] & b[1]) ^ c[1] ^ (lin & (a[1] ^ b[1])));
    return r;
  endfunction

  task automatic check(bit ok, string what, int g);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s form=%0d x=%b y=%b z=%b t=%b", what, g, x, y, z, t[g]);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    int n = 1 << (3*2);
    // settle the registers on a first vector
    {x, y, z} = '0;
    @(posedge clk); @(negedge clk);
    for (int g = 0; g < 4; g++) prev[g] = t[g];
    for (int s = 1; s <= n; s++) begin
      v = (s * 5) % n;              // visit every vector once, in a scrambled order
      {x, y, z} = v[3*2-1:0];
      #4;                           // inputs changed, no edge yet
      for (int g = 0; g < 4; g++) check(t[g] == prev[g], "output moved before the clock edge", g);
      @(posedge clk); #1;
      for (int g = 0; g < 4; g++) begin
        check(t[g] == expect_shares(x, y, z, LINS[g], INVS[g]), "share equation", g);
        check(^t[g] == (((^x) & (^y)) ^ (^z) ^ (LINS[g] & ((^x) ^ (^y))) ^ INVS[g]), "unmasked value", g);
        prev[g] = t[g];
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
