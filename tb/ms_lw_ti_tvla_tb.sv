// ms_lw_ti_tvla_tb: simulated fixed-versus-random leakage assessment (TVLA) of
// the six masked S-boxes.
//
// Each trace draws, with equal probability, either a fixed input nibble or a
// random one for every S-box, splits it into fresh random shares and holds it
// for four clock edges. At each edge the "power sample" of an S-box is the
// Hamming weight of all its output share bits (a noise-free Hamming-weight
// model of the share registers and compression outputs; glitches are not
// modelled). Welch's t statistic between the two groups is formed per S-box
// and per edge; a first-order secure sharing keeps |t| below 4.5. As a
// sanity check of the method, the same statistic on an unprotected S-box
// (Hamming weight of the unmasked output) must exceed 4.5.
module ms_lw_ti_tvla_tb;
  import ms_lw_ti_pkg::*;
  import ms_lw_ti_ref_pkg::*;

  localparam int NTRACES = 5000000;
  localparam int NSAMP   = 4;
  localparam real THRESHOLD = 4.5;
  localparam logic [3:0] FIXED [6] = '{4'h0, 4'h0, 4'h0, 4'h0, 4'h0, 4'h0};

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  nib2_t gift_x2, gift_y2, present_x2, present_y2, piccolo_x2, piccolo_y2;
  nib3_t gift_x3, gift_y3, present_x3, present_y3, piccolo_x3, piccolo_y3;

  // running sums per group (0 fixed, 1 random), S-box k (6 = unprotected GIFT), sample e
  real s1 [2][7][NSAMP];
  real s2 [2][7][NSAMP];
  int  cnt [2];
  logic [3:0] val [6];

  ms_lw_ti_top dut (.*);

  always #5 clk = ~clk;

  function automatic nib2_t share2(logic [3:0] v);
    nib2_t s;
    logic [3:0] b = to_bits(v);
    for (int i = 0; i < 4; i++) begin
      s[i][0] = 1'($urandom);
      s[i][1] = b[i] ^ s[i][0];
    end
    return s;
  endfunction

  function automatic nib3_t share3(logic [3:0] v);
    nib3_t s;
    logic [3:0] b = to_bits(v);
    for (int i = 0; i < 4; i++) begin
      s[i][0] = 1'($urandom);
      s[i][1] = 1'($urandom);
      s[i][2] = b[i] ^ s[i][0] ^ s[i][1];
    end
    return s;
  endfunction

  function automatic int power(int k);
    case (k)
      0: return $countones(gift_y2);
      1: return $countones(gift_y3);
      2: return $countones(present_y2);
      3: return $countones(present_y3);
      4: return $countones(piccolo_y2);
      5: return $countones(piccolo_y3);
      default: return $countones(sbox(GIFT, val[0]));  // unprotected reference
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    real m0, m1, v0, v1, t, tmax;
    foreach (s1[a, b, c]) begin
      s1[a][b][c] = 0.0;
      s2[a][b][c] = 0.0;
    end
    cnt[0] = 0;
    cnt[1] = 0;
    @(negedge clk);
    for (int n = 0; n < NTRACES; n++) begin
      g = int'($urandom & 1);
      foreach (val[k]) val[k] = (g == 0) ? FIXED[k] : 4'($urandom);
      gift_x2    = share2(val[0]);
      gift_x3    = share3(val[1]);
      present_x2 = share2(val[2]);
      present_x3 = share3(val[3]);
      piccolo_x2 = share2(val[4]);
      piccolo_x3 = share3(val[5]);
      cnt[g]++;
      for (int e = 0; e < NSAMP; e++) begin
        @(posedge clk);
        #1;
        for (int k = 0; k < 7; k++) begin
          s1[g][k][e] += real'(power(k));
          s2[g][k][e] += real'(power(k)) ** 2;
        end
      end
      @(negedge clk);
    end
    for (int k = 0; k < 7; k++) begin
      tmax = 0.0;
      for (int e = 0; e < NSAMP; e++) begin
        m0 = s1[0][k][e] / cnt[0];
        m1 = s1[1][k][e] / cnt[1];
        v0 = s2[0][k][e] / cnt[0] - m0 * m0;
        v1 = s2[1][k][e] / cnt[1] - m1 * m1;
        t  = (v0 + v1 > 0.0) ? (m0 - m1) / $sqrt(v0 / cnt[0] + v1 / cnt[1]) : 0.0;
        if (t < 0.0) t = -t;
        if (t > tmax) tmax = t;
      end
      $display("sbox %0d: traces fixed=%0d random=%0d max|t|=%0.2f", k, cnt[0], cnt[1], tmax);
      if (k < 6) check(tmax < THRESHOLD, $sformatf("masked S-box %0d leaks, |t|=%0.2f", k, tmax));
      else       check(tmax > THRESHOLD, "unprotected reference shows no leakage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
