// tb_stack2_processor: self-checking test of the second-stack processor.
//
// Sends random seed records (random position, sparse random mu1/mu2 hits)
// plus a few hand-made ones (no mu2 hit, no mu1 hit, a track straight from
// the interaction point) and compares every result field with a reference
// model written here from the geometry: pad centres scaled by z, the
// straight line through mu3 and mu2 extrapolated to mu1, the closest mu1
// hit, slopes, y intercept and pt = kick * r1 / (z1 * |tx - x1/z1|). The
// pt of each result is also compared, within 1 %, with the same quantity
// computed in floating point. The result latency (81 clocks with a
// combination, 7 without) is checked for every record.
module tb_stack2_processor;
  import l0mu_pkg::*;

  localparam int X_SPAN = 220, Y_SPAN = 42;
  localparam int Z1 = 12150, Z2 = 15500, Z3 = 16600;
  localparam int PX = 10000, PY = 20000, KICK = 1200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cand_t   cand;
  logic    in_valid, in_ready, out_valid;
  logic [31:0] pt_min, y0_cut;
  result_t res;

  stack2_processor #(.X_SPAN(X_SPAN), .Y_SPAN(Y_SPAN)) dut (
    .clk, .rst_n, .in_cand(cand), .in_valid, .in_ready,
    .pt_min_mev(pt_min), .y0_cut_um(y0_cut), .result(res), .out_valid
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint rnd(input longint a, input longint b);
    return (a + b / 2) / b;
  endfunction

  // reference model
  function automatic result_t model(input cand_t c, input logic [31:0] ptm, input logic [31:0] ycut);
    result_t r;
    longint aq, bq, hs, best, bj, bi;
    bit f;
    r = '0;
    aq = rnd(longint'(Z2) * (Z3 - Z1) * 65536, longint'(Z1) * (Z3 - Z2));
    bq = -rnd(longint'(Z3) * (Z2 - Z1) * 65536, longint'(Z1) * (Z3 - Z2));
    hs = 2 * longint'(c.col) + 1 - X_SPAN;
    f = 0; best = 0; bj = 0; bi = 0;
    for (int j = 0; j < 5; j++) begin
      if (c.mu2[j]) begin
        longint h2, e;
        h2 = hs + 2 * (j - 2);
        e  = h2 * aq + hs * bq;
        for (int i = 0; i < 17; i++) begin
          if (c.mu1[i]) begin
            longint d;
            d = (hs + 2 * (i - 8)) * 65536 - e;
            if (d < 0) d = -d;
            if (!f || d < best) begin
              f = 1; best = d; bj = j; bi = i;
            end
          end
        end
      end
    end
    r.bcid = c.bcid; r.row = c.row; r.col = c.col; r.found = f;
    if (f) begin
      longint x1, x2, y1, y2, hy, tx, ty, t1, d, y0, ad;
      logic [31:0] pt;
      hy = 2 * longint'(c.row) + 1 - Y_SPAN;
      x1 = ((hs + 2 * (bi - 8)) * (longint'(PX) * 32768)) >>> 16;
      x2 = ((hs + 2 * (bj - 2)) * rnd(longint'(PX) * Z2 * 32768, Z1)) >>> 16;
      y1 = (hy * (longint'(PY) * 32768)) >>> 16;
      y2 = (hy * rnd(longint'(PY) * Z2 * 32768, Z1)) >>> 16;
      tx = ((x2 - x1) * rnd(64'd65536000, Z2 - Z1)) >>> 16;
      ty = ((y2 - y1) * rnd(64'd65536000, Z2 - Z1)) >>> 16;
      t1 = (x1 * rnd(64'd65536000, Z1)) >>> 16;
      d  = tx - t1;
      y0 = y1 - ((ty * rnd(longint'(Z1) * 65536, 1000)) >>> 16);
      ad = d < 0 ? -d : d;
      begin
        longint r1, q, v;
        v = x1 * x1 + y1 * y1;
        r1 = longint'($floor($sqrt(real'(v))));
        while (r1 * r1 > v) r1--;
        while ((r1 + 1) * (r1 + 1) <= v) r1++;
        q = (ad == 0) ? -1 : (r1 * KICK * 1000) / (longint'(Z1) * ad);
        pt = (q < 0 || q > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : 32'(q);
      end
      r.mu2_off = 5'(bj); r.mu1_off = 5'(bi);
      r.tx_urad = 32'(tx); r.ty_urad = 32'(ty); r.y0_um = 32'(y0);
      r.pt_mev = pt;
      r.y0_ok = ((y0 < 0 ? -y0 : y0) <= longint'(ycut));
      r.pt_ok = (pt >= ptm);
      r.accept = r.y0_ok && r.pt_ok;
    end
    return r;
  endfunction

  // floating-point pt of the chosen combination
  function automatic real fpt(input cand_t c, input result_t r);
    real u1, u2, x1, x2, tx, y1, d;
    u1 = real'(int'(c.col) + int'(r.mu1_off) - 8) + 0.5 - X_SPAN / 2.0;
    u2 = real'(int'(c.col) + int'(r.mu2_off) - 2) + 0.5 - X_SPAN / 2.0;
    x1 = u1 * PX;
    x2 = u2 * PX * Z2 / Z1;
    y1 = (real'(c.row) + 0.5 - Y_SPAN / 2.0) * PY;
    tx = (x2 - x1) / (Z2 - Z1) * 1000.0;
    d = tx - x1 * 1000.0 / Z1;
    if (d < 0) d = -d;
    // p = kick / dtheta, pt = p * r1 / z1
    return KICK * 1.0e6 / d * $sqrt(x1 * x1 + y1 * y1) / (Z1 * 1000.0);
  endfunction

  task automatic run(input cand_t c);
    result_t exp_r;
    int lat;
    exp_r = model(c, pt_min, y0_cut);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    cand = c; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 200) begin
      @(negedge clk);
      lat++;
    end
    check(out_valid, "result produced");
    check(res == exp_r, $sformatf("result fields col=%0d row=%0d found=%0d/%0d pt=%0d/%0d tx=%0d/%0d y0=%0d/%0d",
          c.col, c.row, res.found, exp_r.found, res.pt_mev, exp_r.pt_mev, res.tx_urad, exp_r.tx_urad,
          res.y0_um, exp_r.y0_um));
    check(lat - 1 == (exp_r.found ? 81 : 7), $sformatf("latency %0d", lat));
    if (exp_r.found && res.pt_mev != 32'hFFFF_FFFF && res.pt_mev < 100000) begin
      real f, e;
      f = fpt(c, res);
      e = (real'(res.pt_mev) - f) / f;
      check(e < 0.01 && e > -0.01, $sformatf("pt %0d vs floating point %f", res.pt_mev, f));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cand_t c;
    cand = '0; in_valid = 0; pt_min = 32'd1000; y0_cut = 32'd5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // straight track from the interaction point: same column everywhere
    c = '0; c.col = 10'd150; c.row = 8'd30; c.bcid = 8'd7;
    c.mu2 = 5'b00100; c.mu1 = 17'h00100;
    run(c);
    // no mu2 hit, and no mu1 hit
    c.mu2 = '0; run(c);
    c.mu2 = 5'b10001; c.mu1 = '0; run(c);
    // bent track: mu1 four columns outward of the mu2-mu3 line
    c.col = 10'd160; c.mu2 = 5'b01000; c.mu1 = 17'h1000 | 17'h0002; run(c);
    for (int n = 0; n < 400; n++) begin
      c = '0;
      c.col  = 10'($urandom_range(0, X_SPAN - 1));
      c.row  = 8'($urandom_range(0, Y_SPAN - 1));
      c.bcid = 8'($urandom);
      c.mu2  = 5'($urandom & $urandom);
      c.mu1  = 17'($urandom & $urandom & $urandom);
      if (n % 3 == 0) y0_cut = 32'($urandom_range(0, 3));
      if (n % 5 == 0) pt_min = 32'($urandom_range(0, 20000));
      run(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
