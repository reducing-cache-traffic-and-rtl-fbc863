// tb_mvrt_sweep: the reuse table's size sweep. Ten tables (16, 32, 64,
// 128 and 256 entries, each without and with macro data loads) see the
// same stream of loads and stores in the same cycles. The stream mixes
// narrow sequential scans through a buffer (as in string or media code)
// with random accesses over a drifting window of blocks. Every verdict of
// every table is compared with the reference model MvrtRef. Because a
// table of N entries holds the last N instructions under the same
// invalidation rule, a larger table must find every reuse a smaller one
// finds in the same mode; this is checked load by load. Prints the reuse
// counts per size and mode.
module tb_mvrt_sweep;
  import mdl_pkg::*;
  import tb_util_pkg::*;

  localparam int NS  = 5;
  localparam int OPS = 12000;
  localparam int SIZES [NS] = '{16, 32, 64, 128, 256};

  logic clk = 0, rst_n = 1;
  logic in_valid, in_store;
  logic [31:0] in_addr;
  mem_size_e in_size;
  macro_t in_value;
  logic   out_valid [2][NS];
  logic   out_hit   [2][NS];
  logic   out_s2l   [2][NS];
  logic   out_l2l   [2][NS];
  logic   out_ml    [2][NS];
  macro_t out_data  [2][NS];

  int checks = 0, failures = 0;
  int hits [2][NS];
  int cls_cnt [2][NS][4];
  int exp_cls [2][NS];
  bit pend = 0;
  int loads = 0;
  macro_t refmem [int];

  for (genvar md = 0; md < 2; md++) begin : g_mode
    for (genvar si = 0; si < NS; si++) begin : g_size
      mvrt #(.ENTRIES(SIZES[si]), .ADDR_W(32)) u_mvrt (
        .clk, .rst_n, .macro_en_i(md == 1), .in_valid_i(in_valid), .in_store_i(in_store),
        .in_addr_i(in_addr), .in_size_i(in_size), .in_value_i(in_value),
        .out_valid_o(out_valid[md][si]), .out_hit_o(out_hit[md][si]),
        .out_s2l_o(out_s2l[md][si]), .out_l2l_o(out_l2l[md][si]),
        .out_ml_o(out_ml[md][si]), .out_data_o(out_data[md][si]));
    end
  end

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
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    MvrtRef ref_m [2][NS];
    int s, o, b, win, scan_ptr, scan_len;
    logic [7:0] m;
    foreach (hits[i, j]) hits[i][j] = 0;
    foreach (cls_cnt[i, j, k]) cls_cnt[i][j][k] = 0;
    foreach (ref_m[i, j]) ref_m[i][j] = new(SIZES[j]);
    in_valid = 0; in_store = 0; in_addr = 0; in_size = SZ_BYTE; in_value = 0;
    win = 32'h1000; scan_ptr = 0; scan_len = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < OPS + 2; k++) begin
      @(negedge clk);
      if (pend) begin
        for (int md = 0; md < 2; md++) begin
          for (int si = 0; si < NS; si++) begin
            int c;
            c = exp_cls[md][si];
            check(out_valid[md][si], "verdict valid");
            check({out_s2l[md][si], out_l2l[md][si], out_ml[md][si]} == {c == 1, c == 2, c == 3},
                  $sformatf("mode %0d size %0d class exp %0d", md, SIZES[si], c));
            cls_cnt[md][si][c]++;
            if (c != 0) hits[md][si]++;
            if (si > 0) check(!(exp_cls[md][si-1] != 0 && !out_hit[md][si]),
                              "larger table lost a reuse the smaller one found");
          end
        end
      end
      pend = 0;
      in_valid = (k < OPS) && ($urandom_range(0, 4) != 0);
      if (!in_valid) continue;
      if ($urandom_range(0, 199) == 0) win += 16;
      if (scan_len == 0 && $urandom_range(0, 15) == 0) begin
        scan_ptr = (win + $urandom_range(0, 63)) * 8;
        scan_len = $urandom_range(8, 48);
      end
      if (scan_len > 0) begin
        s = $urandom_range(0, 1);
        scan_ptr = (scan_ptr + (1 << s)) & ~((1 << s) - 1);
        b = scan_ptr / 8;
        o = scan_ptr % 8;
        in_store = $urandom_range(0, 7) == 0;
        scan_len--;
      end else begin
        s = $urandom_range(0, 3);
        o = $urandom_range(0, 7) & ~((1 << s) - 1);
        b = win + $urandom_range(0, 63);
        in_store = $urandom_range(0, 3) == 0;
      end
      m = mask_of(o, mem_size_e'(s));
      in_size = mem_size_e'(s);
      in_addr = 32'(b * 8 + o);
      for (int md = 0; md < 2; md++)
        for (int si = 0; si < NS; si++)
          exp_cls[md][si] = ref_m[md][si].access(in_store, b, m, md == 1);
      if (in_store) begin
        macro_t w;
        in_value = {$urandom, $urandom};
        w = rd(b);
        for (int i = 0; i < 8; i++) if (m[i]) w[8*i +: 8] = in_value[8*(i-o) +: 8];
        refmem[b] = w;
      end else begin
        in_value = rd(b);
        pend = 1;
        loads++;
      end
    end
    for (int md = 0; md < 2; md++)
      for (int si = 1; si < NS; si++)
        check(hits[md][si] >= hits[md][si-1], "reuse grows with table size");
    check(cls_cnt[1][0][3] > 0, "ML seen");
    $display("%0d loads; loads finding a value, by table size:", loads);
    for (int si = 0; si < NS; si++)
      $display("  %3d entries: without macro %0d (S2L %0d, L2L %0d)   with macro %0d (S2L %0d, L2L %0d, ML %0d)",
               SIZES[si], hits[0][si], cls_cnt[0][si][1], cls_cnt[0][si][2],
               hits[1][si], cls_cnt[1][si][1], cls_cnt[1][si][2], cls_cnt[1][si][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
