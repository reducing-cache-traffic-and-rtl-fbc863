// tb_mdl_pkg: checks the shared functions of mdl_pkg (byte_mask,
// is_aligned, place_lanes, covers) against values worked out lane by lane
// for every size and offset.
module tb_mdl_pkg;
  import mdl_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_m;
    macro_t v, exp_v;
    for (int s = 0; s < 4; s++) begin
      for (int o = 0; o < 8; o++) begin
        int n;
        n = 1 << s;
        exp_m = '0;
        for (int b = o; b < o + n && b < 8; b++) exp_m[b] = 1'b1;
        check(is_aligned(3'(o), mem_size_e'(s)) == ((o % n) == 0),
              $sformatf("is_aligned size %0d ofs %0d", s, o));
        if ((o % n) == 0)
          check(byte_mask(3'(o), mem_size_e'(s)) == exp_m,
                $sformatf("byte_mask size %0d ofs %0d got %b", s, o, byte_mask(3'(o), mem_size_e'(s))));
      end
    end
    for (int it = 0; it < 200; it++) begin
      logic [7:0] a, b;
      v = {$urandom, $urandom};
      for (int o = 0; o < 8; o++) begin
        exp_v = '0;
        for (int k = 0; k + o < 8; k++) exp_v[8*(k+o) +: 8] = v[8*k +: 8];
        check(place_lanes(v, 3'(o)) == exp_v, $sformatf("place_lanes ofs %0d", o));
      end
      a = 8'($urandom);
      b = 8'($urandom);
      check(covers(a, b) == ((a | b) == a), "covers random");
      check(covers(a | b, b), "covers superset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
