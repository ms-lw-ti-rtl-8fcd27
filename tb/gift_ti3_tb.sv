// gift_ti3_tb: exhaustive test of the 3-share GIFT S-box.
//
// Every one of the 16 input values is applied with every possible sharing
// (2^8 per value), values changing from one vector to the next. Each vector
// is set up after a rising edge and held; after GIFT_LATENCY edges the XOR of
// each output bit's shares must equal the published GIFT S-box table. The
// outputs one edge earlier are recorded too: at least one vector must still
// be wrong there, which shows the latency is not shorter than stated.
// Finally, for every input value and output bits y0, y2 and y3, each of the 4
// sharings of the correct output bit must appear equally often (uniform output
// sharing). The three-share y1 = y0&y2 ^ t2 gate re-masks with t2, which is
// not independent of its other inputs, and its output sharing is slightly
// non-uniform for half of the input values; the number of such values is
// printed and checked, not treated as an error.
// Over all 4096 input sharings, the sharings of the gates t2, t3 and y0 must
// each take all 8 patterns 512 times. The same count for y1 and the joint
// sharing of (t2, t3), which feeds the linear y2, are not uniform for this
// sharing; their smallest and largest pattern counts are printed.
module gift_ti3_tb;
  import ms_lw_ti_pkg::*;
  import ms_lw_ti_ref_pkg::*;

  localparam int unsigned LAT = GIFT_LATENCY;
  localparam int unsigned NSH = 3;

  int checks = 0, failures = 0;
  int early_wrong = 0;
  int y1_nonuniform = 0;
  logic clk = 1'b0;
  nib3_t x, y;
  int hist [16][4][1 << NSH];
  int gate_hist [4][8];      // t2, t3, y0, y1 sharings over all vectors
  int joint_hist [64];       // (t2, t3) joint sharing

  gift_ti3 dut (.clk, .x, .y);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%h y=%h", what, x, y);
    end
  endtask

  function automatic logic [3:0] unmask(nib3_t s);
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
    int y1_min, y1_max;
    logic [8-1:0] m;
    foreach (hist[a, b, c]) hist[a][b][c] = 0;
    foreach (gate_hist[a, b]) gate_hist[a][b] = 0;
    foreach (joint_hist[a]) joint_hist[a] = 0;
    @(negedge clk);
    for (int mi = 0; mi < (1 << 8); mi++) begin
      for (int v = 0; v < 16; v++) begin
        m  = 8'(mi);
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
        gate_hist[0][dut.t2]++;
        gate_hist[1][dut.t3]++;
        gate_hist[2][y[0]]++;
        gate_hist[3][y[1]]++;
        joint_hist[{dut.t2, dut.t3}]++;
        @(negedge clk);
      end
    end
    check(early_wrong > 0, "outputs already valid one edge before the latency");
    // uniformity: each correct sharing of every output bit equally often
    for (int v = 0; v < 16; v++) begin
      yb = to_bits(sbox(GIFT, 4'(v)));
      y1_min = 1 << 30;
      y1_max = 0;
      for (int p = 0; p < (1 << NSH); p++)
        if ((^p[NSH-1:0]) == yb[1]) begin
          y1_min = (hist[v][1][p] < y1_min) ? hist[v][1][p] : y1_min;
          y1_max = (hist[v][1][p] > y1_max) ? hist[v][1][p] : y1_max;
        end
      if (y1_min != y1_max) y1_nonuniform++;
      for (int i = 0; i < 4; i++)
        if (i != 1)
        for (int p = 0; p < (1 << NSH); p++)
          check(hist[v][i][p] == ((^p[NSH-1:0]) == yb[i] ? (1 << 8) / (1 << (NSH - 1)) : 0),
                $sformatf("non-uniform sharing v=%0d bit=%0d pattern=%0d count=%0d", v, i, p, hist[v][i][p]));
    end
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 8; b++)
        check(gate_hist[a][b] == 512, $sformatf("gate %0d sharing %0d occurs %0d times", a, b, gate_hist[a][b]));
    $display("y1 sharing counts over all vectors: min=%0d max=%0d (uniform: 512)",
             gate_hist[3].min()[0], gate_hist[3].max()[0]);
    $display("(t2,t3) joint sharing counts: min=%0d max=%0d (uniform: 64)",
             joint_hist.min()[0], joint_hist.max()[0]);
    check(y1_nonuniform == 8, $sformatf("y1 non-uniform for %0d input values, expected 8", y1_nonuniform));
    $display("y1 sharing non-uniform for %0d of 16 input values", y1_nonuniform);
    $display("vectors=%0d early_wrong=%0d", 16 << 8, early_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
