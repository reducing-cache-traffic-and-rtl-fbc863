// tb_mvrt: feeds random loads and stores over a few blocks into the
// memory value reuse table, first without and then with macro data loads
// (reset in between). Every load's verdict (none/S2L/L2L/ML) is compared
// with the reference model MvrtRef, and the value of every reused load
// with a byte-level reference memory. Requires each class to occur, and
// ML never to occur without macro data loads. A 16-entry table makes the
// FIFO replacement wrap.
module tb_mvrt;
  import mdl_pkg::*;
  import tb_util_pkg::*;

  localparam int N      = 16;
  localparam int BLOCKS = 6;
  localparam int OPS    = 4000;

  logic clk = 0, rst_n = 1;
  logic macro_en, in_valid, in_store;
  logic [31:0] in_addr;
  mem_size_e in_size;
  macro_t in_value, out_data;
  logic out_valid, out_hit, out_s2l, out_l2l, out_ml;
  int checks = 0, failures = 0;
  int cnt [2][4];
  macro_t refmem [int];

  mvrt #(.ENTRIES(N), .ADDR_W(32)) dut (
    .clk, .rst_n, .macro_en_i(macro_en), .in_valid_i(in_valid), .in_store_i(in_store),
    .in_addr_i(in_addr), .in_size_i(in_size), .in_value_i(in_value),
    .out_valid_o(out_valid), .out_hit_o(out_hit), .out_s2l_o(out_s2l),
    .out_l2l_o(out_l2l), .out_ml_o(out_ml), .out_data_o(out_data));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic macro_t rd(int b);
    return refmem.exists(b) ? refmem[b] : init_word(32'(b));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    MvrtRef ref_m;
    int s, o, b, cls, pend_cls;
    bit pend;
    macro_t pend_val;
    logic [7:0] m;
    foreach (cnt[i, j]) cnt[i][j] = 0;
    in_valid = 0; in_store = 0; in_addr = 0; in_size = SZ_BYTE; in_value = 0; macro_en = 0;
    for (int mode = 0; mode < 2; mode++) begin
      ref_m = new(N);
      macro_en = mode[0];
      #1 rst_n = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      pend = 0; pend_cls = 0; pend_val = 0;
      for (int k = 0; k < OPS + 2; k++) begin
        @(negedge clk);
        // verdict of the previous cycle's instruction
        check(out_valid == pend, "verdict valid");
        if (pend) begin
          check({out_s2l, out_l2l, out_ml} == {pend_cls == 1, pend_cls == 2, pend_cls == 3},
                $sformatf("class got %b%b%b exp %0d", out_s2l, out_l2l, out_ml, pend_cls));
          check(out_hit == (pend_cls != 0), "hit flag");
          if (pend_cls != 0) check(out_data == pend_val, "reused value");
          cnt[mode][pend_cls]++;
        end
        pend = 0;
        in_valid = (k < OPS) && ($urandom_range(0, 7) != 0);
        if (!in_valid) continue;
        s = $urandom_range(0, 3);
        o = $urandom_range(0, 7) & ~((1 << s) - 1);
        b = 32'h40 + $urandom_range(0, BLOCKS - 1);
        m = mask_of(o, mem_size_e'(s));
        in_store = $urandom_range(0, 3) == 0;
        in_size  = mem_size_e'(s);
        in_addr  = 32'(b * 8 + o);
        cls = ref_m.access(in_store, b, m, macro_en);
        if (in_store) begin
          macro_t w;
          in_value = {$urandom, $urandom};
          w = rd(b);
          for (int i = 0; i < 8; i++) if (m[i]) w[8*i +: 8] = in_value[8*(i-o) +: 8];
          refmem[b] = w;
        end else begin
          in_value = rd(b);
          pend = 1;
          pend_cls = cls;
          pend_val = load_value(rd(b), o, in_size, 1'b0);
        end
      end
    end
    for (int mode = 0; mode < 2; mode++) begin
      check(cnt[mode][1] > 0, "S2L seen");
      check(cnt[mode][2] > 0, "L2L seen");
    end
    check(cnt[0][3] == 0, "no ML without macro data loads");
    check(cnt[1][3] > 0, "ML seen with macro data loads");
    $display("without macro: none=%0d S2L=%0d L2L=%0d ML=%0d", cnt[0][0], cnt[0][1], cnt[0][2], cnt[0][3]);
    $display("with macro:    none=%0d S2L=%0d L2L=%0d ML=%0d", cnt[1][0], cnt[1][1], cnt[1][2], cnt[1][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
