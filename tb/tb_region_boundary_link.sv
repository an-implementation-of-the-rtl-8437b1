// tb_region_boundary_link: checks the region-boundary wiring with random
// inputs: the outer processor's data and strobe reach both inner
// processors, its FULL reaches both, the two inner data words are ORed for
// the outer one with the strobe of inner processor 0, and the inner FULL
// flags are ORed.
module tb_region_boundary_link;
  import l0mu_pkg::*;
  own_pads_t od_i, od_o;
  logic os_i, of_i, os_o, of_o;
  own_pads_t [1:0] id_i, id_o;
  logic [1:0] is_i, if_i, is_o, if_o;

  region_boundary_link dut (
    .outer_data_in(od_i), .outer_strobe_in(os_i), .outer_full_in(of_i),
    .outer_data_out(od_o), .outer_strobe_out(os_o), .outer_full_out(of_o),
    .inner_data_in(id_i), .inner_strobe_in(is_i), .inner_full_in(if_i),
    .inner_data_out(id_o), .inner_strobe_out(is_o), .inner_full_out(if_o));

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
    for (int n = 0; n < 2000; n++) begin
      od_i = own_pads_t'($urandom); os_i = 1'($urandom); of_i = 1'($urandom);
      id_i[0] = own_pads_t'($urandom & $urandom); id_i[1] = own_pads_t'($urandom & $urandom);
      is_i = 2'($urandom); if_i = 2'($urandom);
      #1;
      for (int b = 0; b < 31; b++)
        check(od_o[b] == (id_i[0][b] || id_i[1][b]), "inner data ORed to outer");
      check(os_o == is_i[0], "strobe of inner processor 0");
      check(of_o == (if_i[0] || if_i[1]), "inner FULL ORed");
      check(id_o[0] == od_i && id_o[1] == od_i, "outer data to both inner");
      check(is_o == {os_i, os_i}, "outer strobe to both inner");
      check(if_o == {of_i, of_i}, "outer FULL to both inner");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
