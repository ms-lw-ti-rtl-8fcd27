// gift_ti2_tb: exhaustive test of the 2-share GIFT S-box.
//
// Every one of the 16 input values is applied with every possible sharing
// (2^4 per value), values changing from one vector to the next. Each vector
// is set up after a rising edge and held; after GIFT_LATENCY edges the XOR of
// each output bit's shares must equal the published GIFT S-box table. The
// outputs one edge earlier are recorded too: at least one vector must still
// be wrong there, which shows the latency is not shorter than stated.
// Finally, for every input value and output bit, each of the 2 sharings of the
// correct output bit must appear equally often (uniform output sharing).
module gift_ti2_tb;
  import ms_lw_ti_pkg::*;
  import ms_lw_ti_ref_pkg::*;

  localparam int unsigned LAT = GIFT_LATENCY;
  localparam int unsigned NSH = 2;

  int checks = 0, failures = 0;
  int early_wrong = 0;
  logic clk = 1'b0;
  nib2_t x, y;
  int hist [16][4][1 << NSH];

  gift_ti2 dut (.clk, .x, .y);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%h y=%h", what, x, y);
    end
  endtask

  function automatic logic [3:0] unmask(nib2_t s);
    logic [3:0] b;
    for (int i = 0; i < 4; i++) b[i] = ^s[i];
    return b;
  endfunction

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] xb, yb;
    logic [4-1:0] m;
    foreach (hist[a, b, c]) hist[a][b][c] = 0;
    @(negedge clk);
    for (int mi = 0; mi < (1 << 4); mi++) begin
      for (int v = 0; v < 16; v++) begin
        m  = 4'(mi);
        xb = to_bits(4'(v));
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < NSH - 1; j++) x[i][j] = m[i*(NSH-1) + j];
          x[i][NSH-1] = xb[i] ^ (^x[i][NSH-2:0]);
        end
        yb = to_bits(sbox(GIFT, 4'(v)));
        repeat (LAT - 1) @(posedge clk);
        #1;
        if (unmask(y) != yb) early_wrong++;
        @(posedge clk);
        #1;
        check(unmask(y) == yb, "wrong S-box output");
        for (int i = 0; i < 4; i++) hist[v][i][y[i]]++;
        @(negedge clk);
      end
    end
    check(early_wrong > 0, "outputs already valid one edge before the latency");
    // uniformity: each correct sharing of every output bit equally often
    for (int v = 0; v < 16; v++) begin
      yb = to_bits(sbox(GIFT, 4'(v)));
      for (int i = 0; i < 4; i++)
        for (int p = 0; p < (1 << NSH); p++)
          check(hist[v][i][p] == ((^p[NSH-1:0]) == yb[i] ? (1 << 4) / (1 << (NSH - 1)) : 0),
                $sformatf("non-uniform sharing v=%0d bit=%0d pattern=%0d count=%0d", v, i, p, hist[v][i][p]));
    end
    $display("vectors=%0d early_wrong=%0d", 16 << 4, early_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
