// tb_mdl_top: end-to-end test of the whole design at its default sizes
// (64-entry LSQ, 2-cycle cache, 256-entry reuse table). One random stream
// of loads and stores over a set of 8-byte blocks is fed to the LSQ (with
// the cache modelled by dcache_model) and, in the same cycle, to the
// memory value reuse table. Run twice, with the table without and with
// macro data loads, resetting the design in between (the mode switch).
// Checked for every load: the LSQ's value, result bus, reuse source and
// latency (1 cycle from the LSQ, 3 from the cache), and the table's
// verdict and reused value, against reference models. Counts, and
// requires, every mechanism: store-to-load, exact and macro load-to-load
// reuse, cache accesses and LSQ updates, store invalidation, queue
// wrap-around, both result buses at once, and each reuse class of the
// table. Reports the cache read traffic left after reuse.
module tb_mdl_top;
  import mdl_pkg::*;
  import tb_util_pkg::*;

  localparam int N      = 64;
  localparam int MV_N   = 256;
  localparam int LAT    = 2;
  localparam int BLOCKS = 40;
  localparam int OPS    = 8000;

  logic clk = 0, rst_n = 1;
  logic req_valid, req_store, req_signed;
  logic [31:0] req_addr;
  mem_size_e req_size;
  macro_t req_wdata, mv_value;
  logic [6:0] req_tag;
  logic rr_valid, cr_valid;
  logic [6:0] rr_tag, cr_tag;
  macro_t rr_data, cr_data;
  reuse_src_e rr_src;
  logic dc_rd_valid, dc_rd_rvalid, dc_wr_valid;
  logic [31:0] dc_rd_addr, dc_wr_addr;
  macro_t dc_rd_data, dc_wr_data;
  bmask_t dc_wr_be;

  logic mv_macro_en, mv_out_valid, mv_out_hit, mv_out_s2l, mv_out_l2l, mv_out_ml;
  macro_t mv_out_data;

  mdl_top dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_store_i(req_store), .req_addr_i(req_addr),
    .req_size_i(req_size), .req_signed_i(req_signed), .req_wdata_i(req_wdata),
    .req_tag_i(req_tag),
    .rr_valid_o(rr_valid), .rr_tag_o(rr_tag), .rr_data_o(rr_data), .rr_src_o(rr_src),
    .cr_valid_o(cr_valid), .cr_tag_o(cr_tag), .cr_data_o(cr_data),
    .dc_rd_valid_o(dc_rd_valid), .dc_rd_addr_o(dc_rd_addr),
    .dc_rd_rvalid_i(dc_rd_rvalid), .dc_rd_data_i(dc_rd_data),
    .dc_wr_valid_o(dc_wr_valid), .dc_wr_addr_o(dc_wr_addr),
    .dc_wr_data_o(dc_wr_data), .dc_wr_be_o(dc_wr_be),
    .mv_macro_en_i(mv_macro_en), .mv_in_valid_i(req_valid), .mv_in_store_i(req_store),
    .mv_in_addr_i(req_addr), .mv_in_size_i(req_size), .mv_in_value_i(mv_value),
    .mv_out_valid_o(mv_out_valid), .mv_out_hit_o(mv_out_hit), .mv_out_s2l_o(mv_out_s2l),
    .mv_out_l2l_o(mv_out_l2l), .mv_out_ml_o(mv_out_ml), .mv_out_data_o(mv_out_data));

  dcache_model #(.ADDR_W(32), .LAT(LAT)) u_cache (
    .clk, .rd_valid(dc_rd_valid), .rd_addr(dc_rd_addr), .rd_rvalid(dc_rd_rvalid),
    .rd_data(dc_rd_data), .wr_valid(dc_wr_valid), .wr_addr(dc_wr_addr),
    .wr_data(dc_wr_data), .wr_be(dc_wr_be));

  always #5 clk = ~clk;

  typedef struct {
    int     cycle;    // cycle its result must appear in
    bit     reuse;    // on the reuse bus
    int     src;      // 1 store, 2 load
    logic [6:0] tag;
    macro_t value;
  } exp_t;

  exp_t   expq[$];
  macro_t refmem [int];
  int     cyc = 0;
  int     checks = 0, failures = 0;
  int     n_s2l = 0, n_l2l_exact = 0, n_ml = 0, n_miss = 0, n_store = 0, n_both = 0;
  LsqRef  ref_m;
  int     fill_at [int];   // cycle -> entry filled at the end of it
  MvrtRef mv_ref;
  int     mv_cnt [2][4];
  bit     mv_pend;
  int     mv_cls;
  macro_t mv_val;
  bit     mv_pend_d = 0;
  int     mv_cls_d;
  macro_t mv_val_d;
  int     mode = 0;
  int     loads = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic macro_t rd(int b);
    return refmem.exists(b) ? refmem[b] : init_word(32'(b));
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The table's verdict comes one cycle after its instruction.
  always @(posedge clk) begin
    mv_pend_d <= mv_pend && req_valid && rst_n;
    mv_cls_d  <= mv_cls;
    mv_val_d  <= mv_val;
  end

  // Result monitor: sampled just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    bit got_r, got_c;
    got_r = 0; got_c = 0;
    if (rr_valid && cr_valid) n_both++;
    for (int i = 0; i < expq.size(); i++) begin
      if (expq[i].cycle == cyc) begin
        if (expq[i].reuse) begin
          got_r = 1;
          check(rr_valid, "reuse result missing or late");
          check(rr_tag == expq[i].tag, "reuse result tag");
          check(rr_data == expq[i].value, $sformatf("reuse value %h exp %h", rr_data, expq[i].value));
          check(int'(rr_src) == expq[i].src, "reuse source");
        end else begin
          got_c = 1;
          check(cr_valid, "cache result missing or late");
          check(cr_tag == expq[i].tag, "cache result tag");
          check(cr_data == expq[i].value, $sformatf("cache value %h exp %h", cr_data, expq[i].value));
        end
      end
    end
    check(mv_out_valid == mv_pend_d, "table verdict valid");
    if (mv_pend_d) begin
      check({mv_out_s2l, mv_out_l2l, mv_out_ml} == {mv_cls_d == 1, mv_cls_d == 2, mv_cls_d == 3},
            $sformatf("table class %b%b%b exp %0d", mv_out_s2l, mv_out_l2l, mv_out_ml, mv_cls_d));
      check(mv_out_hit == (mv_cls_d != 0), "table hit flag");
      if (mv_cls_d != 0) check(mv_out_data == mv_val_d, "table reused value");
      mv_cnt[mode][mv_cls_d]++;
    end
    if (!got_r) check(!rr_valid, "unexpected reuse result");
    if (!got_c) check(!cr_valid, "unexpected cache result");
    while (expq.size() > 0 && expq[0].cycle <= cyc) void'(expq.pop_front());
  end

  initial begin
    int s, o, b, hit, idx;
    logic [7:0] m;
    foreach (mv_cnt[i, j]) mv_cnt[i][j] = 0;
    req_valid = 0; req_store = 0; req_addr = 0; req_size = SZ_BYTE; req_signed = 0;
    req_wdata = 0; req_tag = 0; mv_value = 0; mv_macro_en = 0; mv_pend = 0; mv_cls = 0; mv_val = 0;
    for (int ph = 0; ph < 2; ph++) begin
    ref_m  = new(N);
    mv_ref = new(MV_N);
    fill_at.delete();
    #1 rst_n = 0;
    mode = ph;
    mv_macro_en = ph[0];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < OPS + 10; k++) begin
      @(posedge clk);
      #2;
      cyc++;
      mv_pend = 0;
      // the LSQ update path has written at the edge just passed
      if (fill_at.exists(cyc - 1)) ref_m.fill(fill_at[cyc - 1]);
      req_valid = (k < OPS) && ($urandom_range(0, 9) != 0);
      if (!req_valid) continue;
      s = $urandom_range(0, 3);
      o = $urandom_range(0, 7) & ~((1 << s) - 1);
      b = 32'h200 + $urandom_range(0, BLOCKS - 1);
      m = mask_of(o, mem_size_e'(s));
      req_store  = $urandom_range(0, 3) == 0;
      req_size   = mem_size_e'(s);
      req_addr   = 32'(b * 8 + o);
      req_signed = 1'($urandom_range(0, 1));
      req_wdata  = {$urandom, $urandom};
      req_tag    = 7'(k);
      mv_value   = req_store ? req_wdata : rd(b);
      mv_cls     = mv_ref.access(req_store, b, m, mv_macro_en);
      if (req_store) begin
        macro_t w;
        w = rd(b);
        for (int i = 0; i < 8; i++) if (m[i]) w[8*i +: 8] = req_wdata[8*(i-o) +: 8];
        refmem[b] = w;
        void'(ref_m.alloc(1, b, m, -1));
        n_store++;
      end else begin
        exp_t e;
        loads++;
        mv_pend = 1;
        mv_val  = load_value(rd(b), o, req_size, 1'b0);
        hit = ref_m.search(b, m);
        e.reuse = hit >= 0;
        e.src   = hit < 0 ? 0 : (ref_m.sl[hit] ? 1 : 2);
        e.cycle = cyc + (hit >= 0 ? 1 : 1 + LAT);
        e.tag   = req_tag;
        e.value = load_value(rd(b), o, req_size, req_signed);
        expq.push_back(e);
        if (hit < 0) n_miss++;
        else if (ref_m.sl[hit]) n_s2l++;
        else if (ref_m.mask[hit] == m) n_l2l_exact++;
        else n_ml++;
        idx = ref_m.alloc(0, b, m, hit);
        if (hit < 0) fill_at[cyc + 1 + LAT] = idx;
      end
    end
    end
    req_valid = 0;
    repeat (5) @(posedge clk);
    check(u_cache.reads == n_miss, $sformatf("cache reads %0d exp %0d", u_cache.reads, n_miss));
    check(u_cache.writes == n_store, $sformatf("cache writes %0d exp %0d", u_cache.writes, n_store));
    check(expq.size() == 0, "results outstanding");
    check(n_s2l > 0, "store-to-load reuse seen");
    check(n_l2l_exact > 0, "exact load-to-load reuse seen");
    check(n_ml > 0, "macro (partial) load-to-load reuse seen");
    check(n_miss > 0, "cache access seen");
    check(ref_m.invalidations > 0, "store invalidation seen");
    check(ref_m.wraps > 0, "queue wrap seen");
    check(n_both > 0, "both result buses in one cycle seen");
    for (int i = 0; i < 2; i++) begin
      check(mv_cnt[i][1] > 0, "table S2L seen");
      check(mv_cnt[i][2] > 0, "table L2L seen");
    end
    check(mv_cnt[0][3] == 0, "no table ML without macro data loads");
    check(mv_cnt[1][3] > 0, "table ML seen with macro data loads");
    $display("table without macro: none=%0d S2L=%0d L2L=%0d ML=%0d", mv_cnt[0][0], mv_cnt[0][1], mv_cnt[0][2], mv_cnt[0][3]);
    $display("table with macro:    none=%0d S2L=%0d L2L=%0d ML=%0d", mv_cnt[1][0], mv_cnt[1][1], mv_cnt[1][2], mv_cnt[1][3]);
    $display("LSQ: %0d loads, %0d cache reads (%0d%% of loads)", loads, u_cache.reads, 100 * u_cache.reads / loads);
    $display("loads: s2l=%0d l2l_exact=%0d macro=%0d miss=%0d  stores=%0d  invalidations=%0d wraps=%0d both_buses=%0d",
             n_s2l, n_l2l_exact, n_ml, n_miss, n_store, ref_m.invalidations, ref_m.wraps, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
