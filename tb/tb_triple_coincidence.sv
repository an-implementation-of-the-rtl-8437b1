// tb_triple_coincidence: exhaustive-by-sampling test of the seed and
// triple-coincidence test. Random sparse windows are applied; the expected
// flags are computed by scanning the window positions one by one.
module tb_triple_coincidence;
  import l0mu_pkg::*;
  logic seed_pad, seed, h4, h5, triple;
  logic [2:0][2:0] mu4;
  logic [2:0][4:0] mu5;
  triple_coincidence dut (.seed_pad, .mu4, .mu5, .seed, .mu4_hit(h4), .mu5_hit(h5), .triple);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      bit e4, e5;
      seed_pad = 1'($urandom);
      mu4 = 9'((n % 4 == 0) ? (1 << $urandom_range(0, 8)) : ($urandom & $urandom & $urandom));
      mu5 = 15'((n % 5 == 0) ? (1 << $urandom_range(0, 14)) : ($urandom & $urandom & $urandom & $urandom));
      #1;
      e4 = 0; e5 = 0;
      for (int r = 0; r < 3; r++) begin
        for (int dx = -1; dx <= 1; dx++) if (mu4[r][dx + 1]) e4 = 1;
        for (int dx = -2; dx <= 2; dx++) if (mu5[r][dx + 2]) e5 = 1;
      end
      check(seed == seed_pad, "seed");
      check(h4 == e4 && h5 == e5, "mu4 / mu5 window hits");
      check(triple == (seed_pad && e4 && e5), "triple coincidence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
