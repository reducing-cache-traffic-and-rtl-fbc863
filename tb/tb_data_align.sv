// tb_data_align: checks the load alignment unit against a byte-by-byte
// reference for every size, every aligned offset and both extensions,
// over random 64-bit words.
module tb_data_align;
  import mdl_pkg::*;
  import tb_util_pkg::*;

  macro_t    macro_w, data;
  logic [2:0] ofs;
  mem_size_e size;
  logic      sgn;
  int        checks = 0, failures = 0;

  data_align dut (.macro_i(macro_w), .ofs_i(ofs), .size_i(size), .signed_i(sgn), .data_o(data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      macro_w = {$urandom, $urandom};
      if (it % 4 == 0) macro_w = macro_w | 64'h8080_8080_8080_8080;
      for (int s = 0; s < 4; s++) begin
        for (int o = 0; o < 8; o += (1 << s)) begin
          for (int g = 0; g < 2; g++) begin
            size = mem_size_e'(s);
            ofs  = 3'(o);
            sgn  = g[0];
            #1;
            checks++;
            if (data !== load_value(macro_w, o, size, g[0])) begin
              failures++;
              if (failures < 10)
                $display("FAIL word=%h ofs=%0d size=%0d sgn=%0d got=%h exp=%h",
                         macro_w, o, s, g, data, load_value(macro_w, o, size, g[0]));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
