// ti_xor2_tb: exhaustive test of the 2-share linear gate, plain and
// complemented. For every assignment of the input shares it checks each
// output share against the sharing equation (share k from input domain k+1)
// and the XOR of the output shares against x ^ y (^ 1).
module ti_xor2_tb;
  import ms_lw_ti_pkg::*;

  int checks = 0, failures = 0;
  sh2_t x, y, t_plain, t_inv;

  ti_xor2               dut_plain (.x, .y, .t(t_plain));
  ti_xor2 #(.INV(1'b1)) dut_inv   (.x, .y, .t(t_inv));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%b y=%b plain=%b inv=%b", what, x, y, t_plain, t_inv);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*2)); v++) begin
      {x, y} = v[2*2-1:0];
      #1;
      for (int k = 0; k < 2; k++) begin
        check(t_plain[k] == (x[(k+1)%2] ^ y[(k+1)%2]), "plain share equation");
        check(t_inv[k] == (x[(k+1)%2] ^ y[(k+1)%2] ^ (k == 0)), "inv share equation");
      end
      check(^t_plain == (^x ^ ^y), "plain value");
      check(^t_inv == !(^x ^ ^y), "inv value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
