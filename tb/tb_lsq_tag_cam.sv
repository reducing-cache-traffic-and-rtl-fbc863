// tb_lsq_tag_cam: drives random allocations (stores and loads), fills and
// partial-match searches into the LSQ tag CAM over a few blocks, and
// compares every search result and allocation index with the reference
// model LsqRef. A small queue (8 entries) makes the circular allocation
// wrap many times.
module tb_lsq_tag_cam;
  import mdl_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [28:0] srch_blk, alloc_blk;
  bmask_t srch_mask, alloc_mask, hit_mask;
  logic hit, hit_sl, alloc, alloc_sl, alloc_present, fill;
  logic [2:0] hit_idx, alloc_idx, fill_idx;
  int checks = 0, failures = 0;
  int n_hit = 0, n_partial = 0, n_fill = 0;
  LsqRef ref_m;

  lsq_tag_cam #(.ENTRIES(N), .ADDR_W(32)) dut (
    .clk, .rst_n,
    .srch_blk_i(srch_blk), .srch_mask_i(srch_mask), .hit_o(hit), .hit_idx_o(hit_idx),
    .hit_sl_o(hit_sl), .hit_mask_o(hit_mask),
    .alloc_i(alloc), .alloc_sl_i(alloc_sl), .alloc_blk_i(alloc_blk), .alloc_mask_i(alloc_mask),
    .alloc_present_i(alloc_present), .alloc_idx_o(alloc_idx),
    .fill_i(fill), .fill_idx_i(fill_idx));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_hit, s, o, pend_idx;
    bit pend;
    ref_m = new(N);
    alloc = 0; fill = 0; srch_blk = 0; srch_mask = 0; alloc_blk = 0; alloc_mask = 0;
    alloc_sl = 0; alloc_present = 0; fill_idx = 0;
    pend = 0; pend_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      s = $urandom_range(0, 3);
      o = $urandom_range(0, 7) & ~((1 << s) - 1);
      srch_blk  = 29'($urandom_range(0, 3));
      srch_mask = mask_of(o, mem_size_e'(s));
      #1;
      exp_hit = ref_m.search(int'(srch_blk), srch_mask);
      check(hit == (exp_hit >= 0), "hit flag");
      if (exp_hit >= 0) begin
        check(hit_idx == 3'(exp_hit), "hit index");
        check(hit_sl == ref_m.sl[exp_hit], "hit SL bit");
        check(hit_mask == ref_m.mask[exp_hit], "hit mask");
        n_hit++;
        if (ref_m.mask[exp_hit] != srch_mask) n_partial++;
      end
      check(alloc_idx == 3'(ref_m.head), "allocation index");
      // fill the entry allocated by the previous miss, if any
      fill     = pend && ($urandom_range(0, 3) != 0);
      fill_idx = 3'(pend_idx);
      // allocate this instruction
      alloc     = $urandom_range(0, 4) != 0;
      alloc_sl  = $urandom_range(0, 2) == 0;
      alloc_blk = srch_blk;
      alloc_mask = alloc_sl ? srch_mask : (hit ? hit_mask : 8'hFF);
      alloc_present = alloc_sl || hit;
      if (fill && alloc && fill_idx == alloc_idx) fill = 0;
      @(posedge clk);
      if (fill) begin ref_m.fill(pend_idx); n_fill++; pend = 0; end
      if (alloc) begin
        int idx;
        idx = ref_m.alloc(alloc_sl, int'(alloc_blk), alloc_mask, alloc_sl ? -1 : exp_hit);
        if (!alloc_sl && exp_hit < 0) begin pend = 1; pend_idx = idx; end
      end
    end
    check(n_hit > 50 && n_partial > 10 && n_fill > 50 && ref_m.invalidations > 50 && ref_m.wraps > 10,
          "every mechanism seen");
    $display("hits=%0d partial=%0d fills=%0d invalidations=%0d wraps=%0d",
             n_hit, n_partial, n_fill, ref_m.invalidations, ref_m.wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
