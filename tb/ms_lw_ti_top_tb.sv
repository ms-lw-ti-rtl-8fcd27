// ms_lw_ti_top_tb: end-to-end test of the six masked S-boxes in the top.
//
// For NOPS operations, a random nibble is drawn for each S-box and split into
// fresh random shares ($urandom); all six inputs change together and are held.
// After PICCOLO_LATENCY edges the PICCOLO outputs, and after GIFT_LATENCY /
// PRESENT_LATENCY edges the GIFT and PRESENT outputs, are unmasked and compared
// with the published S-box tables; after one more edge with the inputs still
// held, every output must still be correct. Counted per S-box: completed
// operations, operations whose outputs were still wrong one edge before the
// latency (the register stages at work), and outputs checked while held. Each
// of these must happen at least once for every S-box.
module ms_lw_ti_top_tb;
  import ms_lw_ti_pkg::*;
  import ms_lw_ti_ref_pkg::*;

  localparam int NOPS = 2000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  nib2_t gift_x2, gift_y2, present_x2, present_y2, piccolo_x2, piccolo_y2;
  nib3_t gift_x3, gift_y3, present_x3, present_y3, piccolo_x3, piccolo_y3;

  // per S-box: 0 gift2, 1 gift3, 2 present2, 3 present3, 4 piccolo2, 5 piccolo3
  int done_ops [6];
  int early_wrong [6];
  int held_ok [6];
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

  function automatic logic [3:0] unmask2(nib2_t s);
    logic [3:0] b;
    for (int i = 0; i < 4; i++) b[i] = ^s[i];
    return b;
  endfunction

  function automatic logic [3:0] unmask3(nib3_t s);
    logic [3:0] b;
    for (int i = 0; i < 4; i++) b[i] = ^s[i];
    return b;
  endfunction

  function automatic cipher_e cipher_of(int k);
    return (k < 2) ? GIFT : (k < 4) ? PRESENT : PICCOLO;
  endfunction

  function automatic int latency_of(int k);
    return (k < 2) ? int'(GIFT_LATENCY) : (k < 4) ? int'(PRESENT_LATENCY) : int'(PICCOLO_LATENCY);
  endfunction

  function automatic logic [3:0] result(int k);
    case (k)
      0: return unmask2(gift_y2);
      1: return unmask3(gift_y3);
      2: return unmask2(present_y2);
      3: return unmask3(present_y3);
      4: return unmask2(piccolo_y2);
      default: return unmask3(piccolo_y3);
    endcase
  endfunction

  task automatic check(bit ok, string what, int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s sbox=%0d in=%h out=%h", what, k, val[k], result(k));
    end
  endtask

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int maxlat;
    logic [3:0] exp_out;
    foreach (done_ops[k]) begin
      done_ops[k] = 0;
      early_wrong[k] = 0;
      held_ok[k] = 0;
    end
    maxlat = int'(GIFT_LATENCY);
    if (int'(PRESENT_LATENCY) > maxlat) maxlat = int'(PRESENT_LATENCY);
    if (int'(PICCOLO_LATENCY) > maxlat) maxlat = int'(PICCOLO_LATENCY);
    @(negedge clk);
    for (int op = 0; op < NOPS; op++) begin
      foreach (val[k]) val[k] = 4'($urandom);
      gift_x2    = share2(val[0]);
      gift_x3    = share3(val[1]);
      present_x2 = share2(val[2]);
      present_x3 = share3(val[3]);
      piccolo_x2 = share2(val[4]);
      piccolo_x3 = share3(val[5]);
      for (int e = 1; e <= maxlat + 1; e++) begin
        @(posedge clk);
        #1;
        for (int k = 0; k < 6; k++) begin
          exp_out = to_bits(sbox(cipher_of(k), val[k]));
          if (e == latency_of(k) - 1 && result(k) != exp_out) early_wrong[k]++;
          if (e == latency_of(k)) begin
            check(result(k) == exp_out, "wrong output at latency", k);
            done_ops[k]++;
          end
          if (e > latency_of(k)) begin
            check(result(k) == exp_out, "output lost while input held", k);
            held_ok[k]++;
          end
        end
      end
      @(negedge clk);
    end
    for (int k = 0; k < 6; k++) begin
      $display("sbox %0d: operations=%0d wrong_one_edge_early=%0d held_checks=%0d",
               k, done_ops[k], early_wrong[k], held_ok[k]);
      check(done_ops[k] > 0, "no operation completed", k);
      check(early_wrong[k] > 0, "latency never observed", k);
      check(held_ok[k] > 0, "held output never checked", k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
